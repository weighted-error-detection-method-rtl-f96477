// tb_xy_route: exhaustive check of XY routing over a 12 x 12 mesh: X is
// resolved first (E/W), then Y (S for larger y, N for smaller), then local.
module tb_xy_route;
  import wed_pkg::*;
  logic [3:0] my_x, my_y;
  logic [7:0] dst;
  logic [NPORT-1:0] port;
  int checks = 0, failures = 0;

  xy_route dut (.*);

  initial begin
    for (int x = 0; x < 12; x++)
      for (int y = 0; y < 12; y++)
        for (int dx = 0; dx < 12; dx++)
          for (int dy = 0; dy < 12; dy++) begin
            automatic logic [NPORT-1:0] exp = '0;
            my_x = 4'(x); my_y = 4'(y); dst = {4'(dy), 4'(dx)};
            #1;
            if (dx > x)      exp[P_E] = 1;
            else if (dx < x) exp[P_W] = 1;
            else if (dy > y) exp[P_S] = 1;
            else if (dy < y) exp[P_N] = 1;
            else             exp[P_L] = 1;
            checks++;
            if (port !== exp) begin
              failures++;
              if (failures < 10) $display("FAIL (%0d,%0d)->(%0d,%0d) port=%b exp=%b", x, y, dx, dy, port, exp);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
