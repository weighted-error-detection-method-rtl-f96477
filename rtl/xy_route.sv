// xy_route: XY routing computation of a mesh router.
//
// Combinational. Compares the destination node ID {y,x} of a head flit with
// the router's own coordinates and returns a one-hot output port: first along
// X (east for larger x, west for smaller), then along Y, then local. Port
// order N,E,S,W,L (wed_pkg). y grows towards the south (own choice).
module xy_route
  import wed_pkg::*;
(
  input  logic [3:0]       my_x,
  input  logic [3:0]       my_y,
  input  logic [7:0]       dst,
  output logic [NPORT-1:0] port
);
  logic [3:0] dx, dy;
  assign dx = dst[3:0];
  assign dy = dst[7:4];

  always_comb begin
    port = '0;
    if      (dx > my_x) port[P_E] = 1'b1;
    else if (dx < my_x) port[P_W] = 1'b1;
    else if (dy > my_y) port[P_S] = 1'b1;
    else if (dy < my_y) port[P_N] = 1'b1;
    else                port[P_L] = 1'b1;
  end
endmodule
