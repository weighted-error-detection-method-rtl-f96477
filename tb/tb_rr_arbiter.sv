// tb_rr_arbiter: random requests; the grant must be one-hot, go to a
// requester, and be the first requester at or after the reference pointer,
// which moves past the winner on every advance.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, gnt;
  logic advance = 0;
  int checks = 0, failures = 0;
  int ptr = 0;

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      automatic logic [N-1:0] exp = '0;
      automatic int win = -1;
      @(negedge clk);
      req     = N'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      #1;
      for (int k = 0; k < N; k++)
        if (win < 0 && req[(ptr + k) % N]) win = (ptr + k) % N;
      if (win >= 0) exp[win] = 1'b1;
      checks++;
      if (gnt !== exp) begin failures++; $display("FAIL req=%b ptr=%0d gnt=%b exp=%b", req, ptr, gnt, exp); end
      @(posedge clk);
      if (advance && win >= 0) ptr = (win + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
