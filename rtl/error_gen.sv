// error_gen: error generator placed on a physical output port.
//
// Sits on the link between a router output and the next router. For every
// valid flit it draws a 32-bit pseudo-random number from a Galois LFSR; if
// the number is below err_rate (so the error probability per flit is
// err_rate / 2^32) one bit of the flit's bits [31:0] is inverted, the bit
// index being taken from other LFSR bits. The flit-type field [33:32] and the
// checksum side band are never touched, matching the assumption that the
// type field stays error free. Purely combinational on the data path; the
// LFSR advances once per valid flit. SEED sets the LFSR start value (must be
// non-zero). The per-port generator and the tunable rate follow the
// document; the LFSR and the single-bit error model are own choices.
module error_gen
  import wed_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] err_rate,
  input  link_s       in,
  output link_s       out,
  output logic        injected
);
  logic [31:0] lfsr;

  assign injected = in.valid && (lfsr < err_rate);

  always_comb begin
    out = in;
    if (injected) out.flit[{1'b0, lfsr[4:0]}] = ~in.flit[{1'b0, lfsr[4:0]}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= (SEED == 0) ? 32'h1 : SEED;
    else if (in.valid) lfsr <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
  end
endmodule
