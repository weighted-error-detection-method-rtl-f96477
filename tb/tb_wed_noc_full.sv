// tb_wed_noc_full: the mesh at its default size (12 x 12) with uniform
// random traffic at 0.05 flit/cycle/node and a link error rate of about
// 1/1000 per flit per link. After 3000 cycles of traffic and a drain, every
// generated packet must have arrived complete at its own destination, every
// head hit by a link error must have been caught by a per-hop check, every
// packet with payload errors must have been repaired end to end, and the
// average latency must be reported and plausible.
module tb_wed_noc_full;
  import wed_pkg::*;
  localparam int N = 144;

  logic clk = 0, rst_n = 0;
  logic gen_en = 0, fixed_dst_en = 0;
  logic [16:0] inj_rate = 17'd3277;           // 0.05 flit/cycle/node
  logic [31:0] err_rate = 32'd4294967;         // 1/1000
  logic [7:0]  fixed_dst = '0;
  logic [N-1:0][31:0] rx_pkts, rx_flits, err_flits, err_pkts, misrouted;
  logic [N-1:0][31:0] req_sent, resend_sent, repaired, lost;
  logic [N-1:0][47:0] lat_sum;
  logic [N-1:0] ev_pkt_queued, ev_pkt_dropped, ev_flit_injected, ev_head_err, ev_overflow,
                ev_inj_stall, ev_enc_conflict;
  logic [N-1:0][3:0] ev_link_error, ev_link_head_error;

  wed_noc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint n_queued = 0, n_dropped = 0, n_lhe = 0, n_he = 0;

  always_ff @(posedge clk) if (rst_n) begin
    n_queued  <= n_queued + $countones(ev_pkt_queued);
    n_dropped <= n_dropped + $countones(ev_pkt_dropped);
    n_lhe     <= n_lhe + $countones(ev_link_head_error);
    n_he      <= n_he + $countones(ev_head_err);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    automatic longint pk = 0, fl = 0, lat = 0, mis = 0, ef = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    gen_en = 1;
    repeat (3000) @(posedge clk);
    gen_en = 0;
    repeat (3000) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      pk += rx_pkts[i]; fl += rx_flits[i]; lat += lat_sum[i]; mis += misrouted[i]; ef += err_flits[i];
    end
    $display("queued=%0d dropped=%0d received=%0d head_link_errors=%0d head_retx=%0d payload_errors=%0d avg_latency=%0d",
             n_queued, n_dropped, pk, n_lhe, n_he, ef, pk ? lat / pk : 0);
    check(n_queued > 0, "traffic generated");
    check(pk == n_queued - n_dropped, "every packet delivered");
    check(fl == 8 * pk, "every packet complete");
    check(mis == 0, "no misrouted head");
    check(n_he == n_lhe, "every head error caught per hop");
    begin
      automatic longint rep = 0, ep = 0, ls = 0;
      for (int i = 0; i < N; i++) begin rep += repaired[i]; ep += err_pkts[i]; ls += lost[i]; end
      $display("packets with payload errors=%0d repaired=%0d lost=%0d", ep, rep, ls);
      check(rep == ep && ls == 0, "every payload error repaired end to end");
    end
    check(pk > 0 && lat / pk > 10 && lat / pk < 200, "plausible latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
