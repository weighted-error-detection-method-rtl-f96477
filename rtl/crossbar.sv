// crossbar: 5x5 flit crossbar of the router.
//
// Combinational. sel[o] is the one-hot set of inputs granted to output o by
// the switch allocator; out[o] carries the selected input's word and valid
// is set when some input is selected. At most one bit of sel[o] may be set.
module crossbar #(
  parameter int N = 5,
  parameter int W = 42
) (
  input  logic [N-1:0][W-1:0] in,
  input  logic [N-1:0][N-1:0] sel,
  output logic [N-1:0][W-1:0] out,
  output logic [N-1:0]        valid
);
  always_comb begin
    for (int o = 0; o < N; o++) begin
      out[o]   = '0;
      valid[o] = |sel[o];
      for (int i = 0; i < N; i++)
        if (sel[o][i]) out[o] = in[i];
    end
  end
endmodule
