// tb_wed_noc: end-to-end test of the mesh with traffic and link errors.
//
// Runs a reduced mesh (4 x 4) in three phases, each followed by a drain
// with the generators stopped:
//   1. error-free uniform random traffic: every generated packet must arrive,
//      complete (8 flits), at its own destination, with no checksum errors;
//   2. the same with a high link error rate: every head hit by an error must
//      be caught by the per-hop check and retransmitted (head-check count ==
//      head link-error count), every packet must still arrive at the right
//      node, payload errors must show up at the destination check, and every
//      packet with such errors must be repaired by an end-to-end resend;
//   3. all nodes send to one node (hot spot) at a high rate so that buffers
//      fill: the additional buffer's overflow use must occur.
// Each mechanism (head retransmission, end-to-end payload detection and resend,
// overflow parking, injection held back by the shared encoder, encoder
// conflict) is counted and must have happened at least once.
module tb_wed_noc;
  import wed_pkg::*;
  localparam int ROWS = 4, COLS = 4, N = ROWS * COLS;

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

  wed_noc #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint n_queued = 0, n_dropped = 0, n_link_err = 0, n_link_head_err = 0, n_head_err = 0;
  longint n_ovf = 0, n_stall = 0, n_conf = 0, n_inj = 0;
  longint cyc = 0;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      n_queued        <= n_queued + $countones(ev_pkt_queued);
      n_dropped       <= n_dropped + $countones(ev_pkt_dropped);
      n_link_err      <= n_link_err + $countones(ev_link_error);
      n_link_head_err <= n_link_head_err + $countones(ev_link_head_error);
      n_head_err      <= n_head_err + $countones(ev_head_err);
      n_ovf           <= n_ovf + $countones(ev_overflow);
      n_stall         <= n_stall + $countones(ev_inj_stall);
      n_conf          <= n_conf + $countones(ev_enc_conflict);
      n_inj           <= n_inj + $countones(ev_flit_injected);
    end
  end

  function automatic longint sum32(logic [N-1:0][31:0] v);
    longint s = 0;
    for (int i = 0; i < N; i++) s += v[i];
    return s;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  longint base_pkts, base_head, base_lhead, base_errf;

  task automatic run_phase(string name, int cycles, int drain);
    gen_en = 1;
    repeat (cycles) @(posedge clk);
    gen_en = 0;
    repeat (drain) @(posedge clk);
    $display("%s: queued=%0d dropped=%0d received=%0d flits=%0d inj=%0d link_err=%0d head_link_err=%0d head_retx=%0d err_flits=%0d err_pkts=%0d ovf=%0d stall=%0d conf=%0d misrouted=%0d",
             name, n_queued, n_dropped, sum32(rx_pkts), sum32(rx_flits), n_inj, n_link_err,
             n_link_head_err, n_head_err, sum32(err_flits), sum32(err_pkts), n_ovf, n_stall, n_conf,
             sum32(misrouted));
    check(sum32(rx_pkts) == n_queued - n_dropped, {name, ": every generated packet delivered"});
    check(sum32(rx_flits) == 8 * sum32(rx_pkts), {name, ": every packet has 8 flits"});
    check(sum32(misrouted) == 0, {name, ": no head at a wrong node"});
    check(n_head_err == n_link_head_err, {name, ": every head error caught by per-hop check"});
    check(sum32(repaired) == sum32(err_pkts), {name, ": every packet with payload errors repaired end to end"});
    check(sum32(lost) == 0, {name, ": no recovery request lost"});
    $display("%s: requests=%0d resends=%0d repaired=%0d", name, sum32(req_sent), sum32(resend_sent), sum32(repaired));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // phase 1: error free, 0.1 flit/cycle/node
    inj_rate = 17'd6554;
    run_phase("clean", 3000, 2000);
    check(sum32(err_flits) == 0, "clean: no payload error reported");
    check(n_link_err == 0, "clean: no link error injected");
    begin
      automatic longint l = 0;
      for (int i = 0; i < N; i++) l += lat_sum[i];
      check(l > 0 && l / sum32(rx_pkts) >= 10, "clean: plausible average latency");
      $display("clean: average latency %0d cycles", l / sum32(rx_pkts));
    end

    // phase 2: error rate about 1/64 per flit per link
    err_rate = 32'h0400_0000;
    run_phase("errors", 3000, 3000);
    check(n_head_err > 0, "errors: head retransmission happened");
    check(sum32(err_flits) > 0, "errors: payload error detected end to end");
    check(sum32(req_sent) > 0 && sum32(resend_sent) > 0, "errors: end-to-end request and resend happened");
    check(sum32(err_flits) <= n_link_err - n_link_head_err, "errors: no payload error without a link error");

    // phase 3: hot spot to node (1,1), error free, high rate
    err_rate = '0;
    fixed_dst_en = 1;
    fixed_dst = 8'h11;
    inj_rate = 17'd26214;
    run_phase("hotspot", 1500, 6000);
    check(n_ovf > 0, "overflow parking in additional buffer happened");
    check(n_stall > 0, "injection held back by shared encoder happened");
    check(n_conf > 0, "encoder conflict between heads happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
