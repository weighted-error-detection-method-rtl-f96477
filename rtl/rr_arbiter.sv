// rr_arbiter: round-robin arbiter (the arbitration policy of the router).
//
// Combinational grant: the first requester at or after the priority pointer
// wins (one-hot gnt). When advance is 1 and a grant is given, the pointer
// moves to the requester after the winner at the next clock edge, so the
// winner has lowest priority next time. Reset sets the pointer to 0.
module rr_arbiter #(
  parameter int N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int PW = (N > 1) ? $clog2(N) : 1;
  logic [PW-1:0] ptr;
  logic [PW-1:0] win;

  always_comb begin
    gnt = '0;
    win = '0;
    for (int k = 0; k < N; k++) begin
      if (gnt == '0 && req[(int'(ptr) + k) % N]) begin
        gnt[(int'(ptr) + k) % N] = 1'b1;
        win = PW'((int'(ptr) + k) % N);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && |req) ptr <= (win == PW'(N-1)) ? '0 : win + 1'b1;
  end
endmodule
