// tb_crossbar: random one-hot (or empty) selections per output; each output
// must carry the selected input and valid must follow the selection.
module tb_crossbar;
  localparam int N = 5, W = 42;
  logic [N-1:0][W-1:0] in, out;
  logic [N-1:0][N-1:0] sel;
  logic [N-1:0] valid;
  int checks = 0, failures = 0;
  int pick [N];

  crossbar #(.N(N), .W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) in[i] = {10'($urandom), $urandom};
      for (int o = 0; o < N; o++) begin
        pick[o] = $urandom_range(0, N);   // N means no input
        sel[o]  = (pick[o] < N) ? N'(1) << pick[o] : '0;
      end
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (valid[o] !== (pick[o] < N) || (pick[o] < N && out[o] !== in[pick[o]])) begin
          failures++;
          $display("FAIL out %0d pick %0d", o, pick[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
