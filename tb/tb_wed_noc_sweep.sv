// tb_wed_noc_sweep: the evaluation workloads on the mesh at its default size
// (12 x 12), uniform random traffic.
//  - Error-rate sweep at 0.05 flit/cycle/node: link error rates of 0.001 %,
//    0.01 %, 0.1 % and 1 % per flit per link (the range of the latency and
//    power curves the design was evaluated with).
//  - Injection-rate sweep without errors: 0.02, 0.05, 0.10 and 0.15
//    flit/cycle/node (latency against offered load).
// Each point starts from reset, generates traffic for 2000 cycles and then
// drains for up to 6000 cycles. Per point it checks that every generated
// packet arrived complete at its own destination, that every head hit by a
// link error was caught per hop, and that every packet with payload errors
// was repaired end to end; it prints the average latency. Across points it
// checks that latency does not fall as the error rate or the load grows
// (with a 3-cycle tolerance for the random traffic).
module tb_wed_noc_sweep;
  import wed_pkg::*;
  localparam int N = 144;
  localparam int NPT = 8;

  logic clk = 0, rst_n = 0;
  logic gen_en = 0, fixed_dst_en = 0;
  logic [16:0] inj_rate = '0;
  logic [31:0] err_rate = '0;
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

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_queued <= 0; n_dropped <= 0; n_lhe <= 0; n_he <= 0;
    end else begin
      n_queued  <= n_queued + $countones(ev_pkt_queued);
      n_dropped <= n_dropped + $countones(ev_pkt_dropped);
      n_lhe     <= n_lhe + $countones(ev_link_head_error);
      n_he      <= n_he + $countones(ev_head_err);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // rate in Q0.16 flit/cycle/node, error rate as probability x 2^32
  logic [16:0] pt_rate [NPT] = '{17'd3277, 17'd3277, 17'd3277, 17'd3277,
                                 17'd1311, 17'd3277, 17'd6554, 17'd9830};
  logic [31:0] pt_err  [NPT] = '{32'd42950, 32'd429497, 32'd4294967, 32'd42949673,
                                 32'd0, 32'd0, 32'd0, 32'd0};
  string       pt_name [NPT] = '{"inj 0.05 err 0.001%", "inj 0.05 err 0.01%", "inj 0.05 err 0.1%",
                                 "inj 0.05 err 1%", "inj 0.02 err 0", "inj 0.05 err 0",
                                 "inj 0.10 err 0", "inj 0.15 err 0"};
  longint avg_lat [NPT];

  function automatic longint sum32(input logic [N-1:0][31:0] v);
    longint s = 0;
    for (int i = 0; i < N; i++) s += v[i];
    return s;
  endfunction

  initial begin
    for (int p = 0; p < NPT; p++) begin
      automatic longint pk, fl, lat, ep, rep, ls, rq;
      rst_n = 0;
      inj_rate = pt_rate[p];
      err_rate = pt_err[p];
      repeat (3) @(posedge clk);
      rst_n = 1;
      @(posedge clk);
      gen_en = 1;
      repeat (2000) @(posedge clk);
      gen_en = 0;
      for (int c = 0; c < 6000; c++) begin
        @(posedge clk);
        if (c % 100 == 99 && sum32(rx_pkts) == n_queued - n_dropped &&
            sum32(repaired) + sum32(lost) == sum32(err_pkts)) break;
      end
      repeat (50) @(posedge clk);
      pk = sum32(rx_pkts); fl = sum32(rx_flits); ep = sum32(err_pkts);
      rep = sum32(repaired); ls = sum32(lost); rq = sum32(req_sent);
      lat = 0;
      for (int i = 0; i < N; i++) lat += lat_sum[i];
      avg_lat[p] = pk ? lat / pk : 0;
      $display("%s: queued=%0d dropped=%0d received=%0d head_errors=%0d/%0d payload_err_pkts=%0d requests=%0d repaired=%0d lost=%0d avg_latency=%0d",
               pt_name[p], n_queued, n_dropped, pk, n_he, n_lhe, ep, rq, rep, ls, avg_lat[p]);
      check(n_queued > 0, {pt_name[p], ": traffic generated"});
      check(pk == n_queued - n_dropped, {pt_name[p], ": every packet delivered"});
      check(fl == 8 * pk, {pt_name[p], ": every packet complete"});
      check(sum32(misrouted) == 0, {pt_name[p], ": no misrouted head"});
      check(n_he == n_lhe, {pt_name[p], ": every head error caught per hop"});
      check(rep == ep && ls == 0, {pt_name[p], ": every payload error repaired"});
      check(avg_lat[p] > 10 && avg_lat[p] < 1000, {pt_name[p], ": plausible latency"});
    end
    check(pt_err[3] == 0 || avg_lat[3] + 3 >= avg_lat[0], "latency does not fall as the error rate grows");
    check(avg_lat[3] > avg_lat[0], "1% error rate costs latency");
    for (int p = 5; p < NPT; p++)
      check(avg_lat[p] + 3 >= avg_lat[p-1], "latency does not fall as the load grows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
