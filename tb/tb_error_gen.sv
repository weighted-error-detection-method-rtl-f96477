// tb_error_gen: with rate 0 flits pass unchanged; with rate 2^32-1 every
// flit gets exactly one flipped bit in [31:0] and type/checksum untouched;
// with rate 2^30 about a quarter of the flits are hit. Invalid cycles
// never inject.
module tb_error_gen;
  import wed_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] err_rate = '0;
  link_s in, out;
  logic injected;
  int checks = 0, failures = 0;
  int hits;

  error_gen #(.SEED(32'h1234_5679)) dut (.*);
  always #5 clk = ~clk;

  task automatic drive_and_check(int n, int mode);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in = '{valid: ($urandom_range(0, 3) != 0), flit: {2'($urandom), $urandom}, chk: 8'($urandom)};
      #1;
      checks++;
      if (!in.valid) begin
        if (injected) begin failures++; $display("FAIL inject on idle"); end
      end else if (mode == 0) begin
        if (out !== in || injected) begin failures++; $display("FAIL rate 0 changed flit"); end
      end else begin
        if (injected) hits++;
        if (out.chk !== in.chk || out.flit[33:32] !== in.flit[33:32] || out.valid !== in.valid ||
            $countones(out.flit ^ in.flit) != (injected ? 1 : 0)) begin
          failures++; $display("FAIL bad corruption %h -> %h", in.flit, out.flit);
        end
        if (mode == 1 && !injected) begin failures++; $display("FAIL full rate missed"); end
      end
    end
  endtask

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    drive_and_check(300, 0);
    err_rate = 32'hFFFF_FFFF;
    drive_and_check(300, 1);
    err_rate = 32'h4000_0000;
    hits = 0;
    drive_and_check(4000, 2);
    checks++;
    if (hits < 500 || hits > 1000) begin failures++; $display("FAIL quarter rate hits=%0d", hits); end
    $display("hits at 1/4 rate: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
