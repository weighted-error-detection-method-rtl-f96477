// tb_pkt_gen: source at 0.5 flit/cycle/node on a 12 x 12 mesh with a
// randomly stalling consumer. Checks packet structure (head, 6 bodies, tail),
// source ID, destination inside the mesh and not the own node, a common start
// time per packet that is not in the future, the packet size in the tail,
// the exact number of packets the rate asks for, and fixed-destination mode.
module tb_pkt_gen;
  import wed_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en = 0, fixed_dst_en = 0, out_valid, out_ready = 0, pkt_queued, pkt_dropped;
  logic [16:0] rate = 17'd32768;
  logic [7:0] fixed_dst = 8'h00;
  logic [15:0] now = '0;
  flit_t out_flit;
  logic [3:0] my_x = 4'd3, my_y = 4'd5;
  int checks = 0, failures = 0;
  int fidx = 0, queued = 0, pkts = 0;
  logic [15:0] st;

  pkt_gen #(.ROWS(12), .COLS(12), .PKT_LEN(8), .SEED(32'hACE1)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) now <= now + 1'b1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (flit %h)", what, out_flit); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (pkt_queued) queued++;
    if (out_valid && out_ready) begin
      if (fidx == 0) begin
        chk(flit_type(out_flit) == FT_HEAD, "head type");
        chk(out_flit[15:8] == {my_y, my_x}, "source id");
        chk(out_flit[3:0] < 12 && out_flit[7:4] < 12, "destination inside mesh");
        chk(out_flit[7:0] != {my_y, my_x}, "destination not own node");
        if (fixed_dst_en) chk(out_flit[7:0] == fixed_dst, "fixed destination");
        chk(out_flit[31:30] == 2'b00, "data packet kind");
        chk(14'(now[13:0] - out_flit[29:16]) < 14'd2000, "start time not in future");
        st = out_flit[31:16];
      end else if (fidx == 7) begin
        chk(flit_type(out_flit) == FT_TAIL, "tail type");
        chk(out_flit[15:8] == 8'd8, "packet size in tail");
        chk(out_flit[31:16] == st, "tail start time");
        pkts++;
      end else begin
        chk(flit_type(out_flit) == FT_BODY, "body type");
        chk(out_flit[15:8] == 8'(fidx) && out_flit[7:0] == {my_y, my_x}, "body index and source");
        chk(out_flit[31:16] == st, "body start time");
      end
      fidx = (fidx + 1) % 8;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1;
    repeat (1600) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 7) != 0);
    end
    en = 0;
    // 1600 cycles at 0.5 flit/cycle = 800 flits = 100 packets
    chk(queued == 100, "packet count follows rate");
    out_ready = 1;
    repeat (2000) @(negedge clk);
    chk(pkts == queued, "all queued packets sent");
    $display("queued=%0d sent=%0d", queued, pkts);
    fixed_dst_en = 1; fixed_dst = 8'h2A; rate = 17'd65536;
    en = 1;
    repeat (200) @(negedge clk);
    en = 0;
    repeat (400) @(negedge clk);
    chk(pkts == queued, "fixed destination packets sent");
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
