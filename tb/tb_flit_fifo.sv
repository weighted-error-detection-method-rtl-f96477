// tb_flit_fifo: random pushes and pops against a queue model; checks data
// order, empty/full flags and count, including read+write when full.
module tb_flit_fifo;
  localparam int DEPTH = 4, WIDTH = 42;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];

  flit_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == DEPTH) || count !== 3'(model.size())) begin
        failures++; $display("FAIL flags size=%0d empty=%b full=%b count=%0d", model.size(), empty, full, count);
      end
      if (model.size() > 0) begin
        checks++;
        if (rd_data !== model[0]) begin failures++; $display("FAIL data %h exp %h", rd_data, model[0]); end
      end
      rd_en   = (model.size() > 0) && ($urandom_range(0, 2) != 0);
      wr_en   = ((model.size() < DEPTH) || rd_en) && ($urandom_range(0, 2) != 0);
      wr_data = {10'($urandom), $urandom};
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      rd_en = 0; wr_en = 0;
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
