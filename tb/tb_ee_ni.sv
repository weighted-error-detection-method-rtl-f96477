// tb_ee_ni: two recovery units, A (source) and B (destination), joined by a
// model channel in each direction that can mark chosen flits as having
// failed the destination checksum check.
//   1  clean data packet: delivered to B's sink, no request;
//   2  body flit 2 and the tail of a packet fail: B sends one request, A
//      resends exactly head + body 2 + tail with rebuilt contents, B counts
//      the packet repaired;
//   3  the resent body fails again: a second request for just that flit,
//      then repaired;
//   4  the request's tail fails on its way to A: A resends the whole payload;
//   5  a request for an ID A never sent is counted as lost.
module tb_ee_ni;
  import wed_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  a_gen_valid = 0, a_gen_ready, b_gen_valid = 0, b_gen_ready;
  flit_t a_gen_flit = '0, b_gen_flit = '0;
  logic  a_inj_valid, b_inj_valid;
  flit_t a_inj_flit, b_inj_flit;
  logic  a_ej_valid = 0, b_ej_valid = 0, a_ej_err = 0, b_ej_err = 0;
  flit_t a_ej_flit = '0, b_ej_flit = '0;
  logic  a_sink_valid, b_sink_valid, a_sink_err, b_sink_err;
  flit_t a_sink_flit, b_sink_flit;
  logic [31:0] a_req, a_res, a_rep, a_lost, b_req, b_res, b_rep, b_lost;

  localparam logic [7:0] A_ID = 8'h00, B_ID = 8'h21;

  ee_ni u_a (.clk, .rst_n, .my_id(A_ID),
    .gen_valid(a_gen_valid), .gen_flit(a_gen_flit), .gen_ready(a_gen_ready),
    .inj_valid(a_inj_valid), .inj_flit(a_inj_flit), .inj_ready(1'b1),
    .ej_valid(a_ej_valid), .ej_flit(a_ej_flit), .ej_err(a_ej_err),
    .sink_valid(a_sink_valid), .sink_flit(a_sink_flit), .sink_err(a_sink_err),
    .req_sent(a_req), .resend_sent(a_res), .repaired(a_rep), .lost(a_lost));
  ee_ni u_b (.clk, .rst_n, .my_id(B_ID),
    .gen_valid(b_gen_valid), .gen_flit(b_gen_flit), .gen_ready(b_gen_ready),
    .inj_valid(b_inj_valid), .inj_flit(b_inj_flit), .inj_ready(1'b1),
    .ej_valid(b_ej_valid), .ej_flit(b_ej_flit), .ej_err(b_ej_err),
    .sink_valid(b_sink_valid), .sink_flit(b_sink_flit), .sink_err(b_sink_err),
    .req_sent(b_req), .resend_sent(b_res), .repaired(b_rep), .lost(b_lost));

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // channels: flits injected at one end are ejected at the other a cycle later
  // (nothing is taken while reset is applied: the units' state is only
  // defined after the first clock edge in reset)
  flit_t qab [$], qba [$];
  int    n_ab = 0, n_ba = 0;       // flits delivered so far per direction
  int    bad_ab [$], bad_ba [$];   // delivery numbers to mark as failed
  flit_t seen_ab [$];              // everything A sent
  int    b_sink_flits = 0, b_sink_errs = 0;

  always @(posedge clk) if (rst_n) begin
    if (a_inj_valid) begin qab.push_back(a_inj_flit); seen_ab.push_back(a_inj_flit); end
    if (b_inj_valid) qba.push_back(b_inj_flit);
    if (b_sink_valid) begin b_sink_flits++; if (b_sink_err) b_sink_errs++; end
  end
  always @(negedge clk) begin
    b_ej_valid = 0; b_ej_err = 0; a_ej_valid = 0; a_ej_err = 0;
    if (qab.size() > 0) begin
      b_ej_valid = 1; b_ej_flit = qab.pop_front();
      foreach (bad_ab[i]) if (bad_ab[i] == n_ab) b_ej_err = 1;
      n_ab++;
    end
    if (qba.size() > 0) begin
      a_ej_valid = 1; a_ej_flit = qba.pop_front();
      foreach (bad_ba[i]) if (bad_ba[i] == n_ba) a_ej_err = 1;
      n_ba++;
    end
  end

  task automatic send_packet(logic [13:0] id);
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      a_gen_valid = 1;
      if (k == 0)      a_gen_flit = {FT_HEAD, 2'b00, id, A_ID, B_ID};
      else if (k == 7) a_gen_flit = {FT_TAIL, 2'b00, id, 8'd8, 8'h00};
      else             a_gen_flit = {FT_BODY, 2'b00, id, 8'(k), A_ID};
      #1;
      while (!a_gen_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    a_gen_valid = 0;
  endtask

  initial begin
    int base;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------- 1 ----------
    send_packet(14'd100);
    repeat (10) @(negedge clk);
    chk(b_sink_flits == 8 && b_sink_errs == 0, "clean packet to sink");
    chk(b_req == 0 && a_res == 0, "no request for a clean packet");
    // ---------- 2 ----------
    base = n_ab;
    bad_ab = '{base + 2, base + 7};
    send_packet(14'd200);
    repeat (20) @(negedge clk);
    chk(b_req == 1 && a_res == 1, "one request, one resend");
    chk(b_rep == 1, "packet repaired");
    chk(seen_ab.size() == 19, "resend has 3 flits");
    if (seen_ab.size() == 19) begin
      chk(seen_ab[16] == {FT_HEAD, 2'b10, 14'd200, A_ID, B_ID}, "resend head");
      chk(seen_ab[17] == {FT_BODY, 2'b10, 14'd200, 8'd2, A_ID}, "rebuilt body 2");
      chk(seen_ab[18] == {FT_TAIL, 2'b10, 14'd200, 8'h42, 8'h00}, "resend tail with mask");
    end
    chk(b_sink_flits == 16 && b_sink_errs == 2, "only data packets reach the sink");
    // ---------- 3 ----------
    base = n_ab;
    bad_ab = '{base + 5, base + 9};  // data body 5, then the resent body 5
    send_packet(14'd300);
    repeat (30) @(negedge clk);
    chk(b_req == 3 && a_res == 3, "second request after failed resend");
    chk(b_rep == 2, "repaired after second resend");
    // ---------- 4 ----------
    base = n_ab;
    bad_ab = '{base + 1};
    bad_ba = '{n_ba + 1};             // tail of the request
    send_packet(14'd400);
    repeat (30) @(negedge clk);
    chk(a_res == 4 && b_rep == 3, "resend after corrupted request");
    chk(seen_ab.size() >= 8 && seen_ab[seen_ab.size()-8] == {FT_HEAD, 2'b10, 14'd400, A_ID, B_ID} &&
        seen_ab[seen_ab.size()-1] == {FT_TAIL, 2'b10, 14'd400, 8'h7F, 8'h00}, "whole payload resent");
    // ---------- 5 ----------
    bad_ab = {};
    bad_ba = {};
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      b_gen_valid = 1;
      b_gen_flit  = (k == 0) ? {FT_HEAD, 2'b01, 14'd999, B_ID, A_ID} : {FT_TAIL, 2'b01, 14'd999, 8'h01, 8'h00};
      #1;
      while (!b_gen_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    b_gen_valid = 0;
    repeat (10) @(negedge clk);
    chk(a_lost == 1 && a_res == 4, "request for unknown ID lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
