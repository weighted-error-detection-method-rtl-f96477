// tb_wed_input_unit: directed scenarios on a neighbour input port of the
// router at (1,1):
//   A  good head: decoder check -> ack upstream, head routed east, its body
//      flits held until the next hop acks the head, then sent in order; the
//      tail ends the packet;
//   B  corrupted head: nack upstream, head dropped, buffer free again;
//   C  next hop nacks the head: the kept copy is offered again on the same
//      port, then freed by the ack;
//   D  FIFO full: the next payload flit is parked in the additional buffer
//      (overflow), flow control closes, and all flits leave in order.
// Also checks that a checked head is offered to the switch the cycle after
// its check (two cycles after arrival).
module tb_wed_input_unit;
  import wed_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] my_x = 4'd1, my_y = 4'd1;
  link_s in = '0;
  logic rdy_head, rdy_body, ack_up, nack_up, chk_pending, chk_sel = 0, chk_err = 0;
  flit_t chk_flit;
  chk_t chk_code;
  logic req, req_head, gnt = 0, ev_overflow;
  logic [NPORT-1:0] req_port, dn_ack = '0, dn_nack = '0;
  link_s req_data;
  int checks = 0, failures = 0;
  localparam logic [NPORT-1:0] EAST = 5'b00010;

  wed_input_unit #(.DEPTH(4), .CHECK(1'b1)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic flit_t mk(ftype_e t, int n);
    return (t == FT_HEAD) ? {t, 16'(n), 8'h11, 8'h13} : {t, 16'(n), 16'(n * 3)};
  endfunction

  // drive one flit on the link for one cycle (at negedge), with a good checksum
  task automatic send(flit_t f, bit corrupt = 0);
    @(negedge clk);
    in = '{valid: 1'b1, flit: f, chk: checksum(f) ^ (corrupt ? 8'h01 : 8'h00)};
    @(negedge clk);
    in = '0;
  endtask

  task automatic decode_cycle(bit err);
    chk(chk_pending, "head waits for decoder");
    chk_sel = 1; chk_err = err;
    @(negedge clk);
    chk_sel = 0; chk_err = 0;
  endtask

  task automatic grant_and_expect(flit_t f, bit head, string what);
    chk(req && req_head == head && req_data.flit == f && req_port == EAST, what);
    gnt = 1;
    @(negedge clk);
    gnt = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---------- A ----------
    chk(rdy_head && rdy_body && !req, "idle after reset");
    send(mk(FT_HEAD, 1));
    chk(!rdy_head, "additional buffer holds the head");
    chk(!req, "unchecked head not offered");
    decode_cycle(0);
    chk(ack_up && !nack_up, "good head acked upstream");
    chk(req && req_head && req_port == EAST, "head offered one cycle after check");
    fork
      begin send(mk(FT_BODY, 2)); send(mk(FT_BODY, 3)); end
    join
    grant_and_expect(mk(FT_HEAD, 1), 1, "head first");
    repeat (2) begin
      chk(!req, "payload held until next hop acks head");
      @(negedge clk);
    end
    dn_ack = EAST;
    @(negedge clk);
    dn_ack = '0;
    chk(rdy_head, "copy released by next-hop ack");
    grant_and_expect(mk(FT_BODY, 2), 0, "body 2 after ack");
    grant_and_expect(mk(FT_BODY, 3), 0, "body 3");
    send(mk(FT_TAIL, 4));
    grant_and_expect(mk(FT_TAIL, 4), 0, "tail");
    chk(!req, "packet done");
    // ---------- B ----------
    send(mk(FT_HEAD, 5), 1);
    decode_cycle(1);
    chk(nack_up && !ack_up, "corrupted head nacked");
    chk(!req && rdy_head, "corrupted head dropped");
    // ---------- C ----------
    send(mk(FT_HEAD, 6));
    decode_cycle(0);
    grant_and_expect(mk(FT_HEAD, 6), 1, "head C sent");
    dn_nack = EAST;
    @(negedge clk);
    dn_nack = '0;
    chk(req && req_head && req_port == EAST && req_data.flit == mk(FT_HEAD, 6), "head resent after nack");
    grant_and_expect(mk(FT_HEAD, 6), 1, "resend granted");
    dn_ack = EAST;
    @(negedge clk);
    dn_ack = '0;
    // ---------- D ----------
    for (int i = 0; i < 4; i++) send(mk(FT_BODY, 10 + i));
    chk(rdy_body, "room in additional buffer when FIFO full");
    @(negedge clk);
    in = '{valid: 1'b1, flit: mk(FT_TAIL, 14), chk: checksum(mk(FT_TAIL, 14))};
    #1;
    chk(ev_overflow, "payload flit parked in additional buffer");
    @(negedge clk);
    in = '0;
    chk(!rdy_body && !rdy_head, "flow control closed when both buffers full");
    for (int i = 0; i < 4; i++) grant_and_expect(mk(FT_BODY, 10 + i), 0, "overflow order body");
    grant_and_expect(mk(FT_TAIL, 14), 0, "parked tail leaves last");
    chk(!req && rdy_head && rdy_body, "empty after overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
