// wed_pkg: types and constants shared by the weighted-error-detection NoC.
//
// A flit is 34 bits. Bits [33:32] carry the flit type, bits [31:16] the
// packet start time, and in a head flit bits [15:8] the source node and
// bits [7:0] the destination node. The tail flit carries the packet size in
// bits [15:8]. These field positions follow the published packet format.
// A node ID is {y[3:0], x[3:0]} (own choice; enough for a 12x12 mesh).
//
// Every flit travels with an 8-bit checksum on a side band of the link (own
// choice: the format has no checksum field). The checksum is the inverted
// modulo-256 sum of the five bytes of the flit ({6'b0,type}, and bits
// [31:0] split in four bytes), so any single flipped bit is detected.
//
// Flit type codes: head = 2'b11 (stated everywhere); the written description
// gives body = 2'b10 and tail = 2'b01 while the packet-format drawing prints
// body = 01 and tail = 10. The drawing is followed here.
package wed_pkg;

  localparam int FLIT_W = 34;
  localparam int CHK_W  = 8;
  localparam int NPORT  = 5;

  // Port numbering of a router.
  localparam int P_N = 0;
  localparam int P_E = 1;
  localparam int P_S = 2;
  localparam int P_W = 3;
  localparam int P_L = 4;

  typedef enum logic [1:0] {
    FT_IDLE = 2'b00,
    FT_BODY = 2'b01,
    FT_TAIL = 2'b10,
    FT_HEAD = 2'b11
  } ftype_e;

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [CHK_W-1:0]  chk_t;

  // Head flit view of a flit.
  typedef struct packed {
    ftype_e      ftype;
    logic [15:0] stime;
    logic [7:0]  src;
    logic [7:0]  dst;
  } head_s;

  // One direction of a physical channel: flit plus checksum side band.
  typedef struct packed {
    logic  valid;
    flit_t flit;
    chk_t  chk;
  } link_s;

  function automatic ftype_e flit_type(flit_t f);
    return ftype_e'(f[33:32]);
  endfunction

  function automatic chk_t checksum(flit_t f);
    logic [7:0] s;
    s = {6'b0, f[33:32]} + f[31:24] + f[23:16] + f[15:8] + f[7:0];
    return ~s;
  endfunction

endpackage
