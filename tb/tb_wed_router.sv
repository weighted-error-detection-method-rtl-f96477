// tb_wed_router: one router at (1,1) with its four neighbours and the local
// core modelled by the testbench. Neighbour models accept everything and
// ack every head after one cycle unless told to nack it.
//   1  local injection of a packet to (3,1): 8 flits leave east in order;
//      the head carries a fresh checksum from the shared encoder, payload
//      flits the checksum made at injection;
//   2  head from the west with a bad checksum: nacked upstream, nothing
//      forwarded; the good resend is acked and forwarded east; a head leaves
//      2 cycles and a payload flit 1 cycle after arriving;
//   3  the east neighbour nacks a head: the router resends it;
//   4  packet from the north for this node with one corrupted payload flit:
//      ejected in order, only that flit flagged by the end-to-end check;
//   5  three heads ready for three outputs at once: they leave one per
//      cycle (one encoder) and a local injection meanwhile is held back.
module tb_wed_router;
  import wed_pkg::*;
  logic clk = 0, rst_n = 0;
  link_s [3:0] in_link = '0, out_link;
  logic [3:0] in_rdy_head, in_rdy_body, in_ack, in_nack;
  logic [3:0] out_rdy_head = '1, out_rdy_body = '1, out_ack = '0, out_nack = '0;
  logic inj_valid = 0, inj_ready, ej_valid, ej_err;
  flit_t inj_flit = '0, ej_flit;
  logic ev_head_err, ev_overflow, ev_inj_stall, ev_enc_conflict;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit nack_east_next = 0;
  int n_conf = 0, n_stall = 0, n_herr = 0;

  wed_router #(.DEPTH(4)) dut (.clk, .rst_n, .my_x(4'd1), .my_y(4'd1), .*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @cyc %0d", what, cyc); end
  endtask

  // output monitors
  flit_t q_out [4][$];
  int    t_out [4][$];
  flit_t q_ej [$];
  bit    e_ej [$];
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (ev_enc_conflict) n_conf++;
    if (ev_inj_stall) n_stall++;
    if (ev_head_err) n_herr++;
    out_ack  <= '0;
    out_nack <= '0;
    for (int p = 0; p < 4; p++) if (out_link[p].valid) begin
      q_out[p].push_back(out_link[p].flit);
      t_out[p].push_back(cyc);
      if (flit_type(out_link[p].flit) == FT_HEAD) begin
        checks++;
        if (out_link[p].chk != checksum(out_link[p].flit)) begin failures++; $display("FAIL head checksum"); end
        if (p == P_E && nack_east_next) begin
          out_nack[p] <= 1'b1;
          nack_east_next = 0;
        end else out_ack[p] <= 1'b1;
      end else begin
        checks++;
        if (out_link[p].chk != checksum(out_link[p].flit)) begin failures++; $display("FAIL payload checksum"); end
      end
    end
    if (ej_valid) begin q_ej.push_back(ej_flit); e_ej.push_back(ej_err); end
  end

  function automatic flit_t hd(logic [7:0] src, logic [7:0] dst, int n);
    return {FT_HEAD, 16'(n), src, dst};
  endfunction
  function automatic flit_t pl(int k, int n);
    return {(k == 7) ? FT_TAIL : FT_BODY, 16'(n), 16'(k * 257 + n)};
  endfunction

  task automatic inject_packet(logic [7:0] dst, int n);
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      inj_valid = 1;
      inj_flit = (k == 0) ? hd(8'h11, dst, n) : pl(k, n);
      #1;
      while (!inj_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    inj_valid = 0;
  endtask

  task automatic link_send(int p, flit_t f, bit corrupt = 0);
    @(negedge clk);
    in_link[p] = '{valid: 1'b1, flit: f, chk: checksum(f) ^ (corrupt ? 8'h10 : 8'h00)};
    @(negedge clk);
    in_link[p] = '0;
  endtask

  task automatic expect_packet(int p, logic [7:0] src, logic [7:0] dst, int n, string what);
    chk(q_out[p].size() == 8, {what, ": 8 flits"});
    for (int k = 0; k < 8 && q_out[p].size() > 0; k++) begin
      automatic flit_t f = q_out[p].pop_front();
      void'(t_out[p].pop_front());
      chk(f == ((k == 0) ? hd(src, dst, n) : pl(k, n)), {what, ": flit order and content"});
    end
  endtask

  initial begin
    int t_in;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------- 1 ----------
    inject_packet(8'h13, 1);
    repeat (5) @(negedge clk);
    expect_packet(P_E, 8'h11, 8'h13, 1, "local to east");
    // ---------- 2 ----------
    link_send(P_W, hd(8'h10, 8'h13, 2), 1);
    chk(n_herr == 0, "no error counted before the check");
    @(negedge clk);
    chk(in_nack[P_W] && !in_ack[P_W], "bad head nacked");
    chk(n_herr == 1, "head error event");
    repeat (3) @(negedge clk);
    chk(q_out[P_E].size() == 0, "bad head not forwarded");
    t_in = cyc + 1;
    link_send(P_W, hd(8'h10, 8'h13, 2));
    @(negedge clk);
    chk(in_ack[P_W], "good head acked");
    @(negedge clk);
    chk(t_out[P_E].size() == 1 && t_out[P_E][0] == t_in + 2, "head leaves 2 cycles after arrival");
    repeat (2) @(negedge clk);
    for (int k = 1; k < 8; k++) begin
      t_in = cyc + 1;
      link_send(P_W, pl(k, 2));
      @(negedge clk);
      chk(t_out[P_E].size() == k + 1 && t_out[P_E][k] == t_in + 1, "payload leaves 1 cycle after arrival");
    end
    expect_packet(P_E, 8'h10, 8'h13, 2, "west to east");
    // ---------- 3 ----------
    nack_east_next = 1;
    inject_packet(8'h14, 3);
    repeat (6) @(negedge clk);
    chk(q_out[P_E].size() == 9, "nacked head sent twice");
    if (q_out[P_E].size() == 9) begin
      chk(q_out[P_E][0] == hd(8'h11, 8'h14, 3) && q_out[P_E][1] == hd(8'h11, 8'h14, 3), "head resent before payload");
      void'(q_out[P_E].pop_front()); void'(t_out[P_E].pop_front());
    end
    expect_packet(P_E, 8'h11, 8'h14, 3, "resent packet");
    // ---------- 4 ----------
    link_send(P_N, hd(8'h01, 8'h11, 4));
    for (int k = 1; k < 8; k++) link_send(P_N, pl(k, 4), k == 3);
    repeat (4) @(negedge clk);
    chk(q_ej.size() == 8, "8 flits ejected");
    for (int k = 0; k < 8 && q_ej.size() > 0; k++) begin
      automatic flit_t f = q_ej.pop_front();
      automatic bit e = e_ej.pop_front();
      chk(f == ((k == 0) ? hd(8'h01, 8'h11, 4) : pl(k, 4)), "ejected flit order");
      chk(e == (k == 3), "only the corrupted payload flit flagged");
    end
    // ---------- 5 ----------
    @(negedge clk);
    in_link[P_W] = '{valid: 1'b1, flit: hd(8'h10, 8'h13, 5), chk: checksum(hd(8'h10, 8'h13, 5))};
    in_link[P_N] = '{valid: 1'b1, flit: hd(8'h01, 8'h31, 6), chk: checksum(hd(8'h01, 8'h31, 6))};
    @(negedge clk);
    in_link = '0;
    inj_valid = 1;                  // local head to the west, ready to route
    inj_flit = hd(8'h11, 8'h10, 7); // in the same cycle as the west head
    @(negedge clk);
    inj_flit = pl(1, 7);            // its first payload flit keeps asking
    #1;
    chk(!inj_ready, "injection held while a head uses the encoder");
    repeat (4) @(negedge clk);
    inj_valid = 0;
    repeat (2) @(negedge clk);
    chk(q_out[P_E].size() == 1 && q_out[P_S].size() == 1 && q_out[P_W].size() >= 1,
        "all three heads forwarded");
    if (q_out[P_E].size() == 1 && q_out[P_S].size() == 1 && q_out[P_W].size() >= 1)
      chk(t_out[P_E][0] != t_out[P_W][0] && t_out[P_E][0] != t_out[P_S][0] &&
          t_out[P_W][0] != t_out[P_S][0], "heads used the encoder in different cycles");
    chk(n_conf > 0, "encoder conflict seen");
    chk(n_stall > 0, "injection held back while encoder busy");
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
