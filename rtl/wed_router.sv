// wed_router: the proposed weighted-error-detection mesh router.
//
// Five input units (N,E,S,W,L), XY routing, wormhole switching, round-robin
// switch allocation, a crossbar and on/off flow control. Error detection is
// weighted by flit type:
//   * head flits are checked at every hop. Each neighbour input unit keeps
//     an arriving head in its additional buffer until the router's single
//     decoder has checked it; the result goes back to the upstream router as
//     ack/nack. A head leaving on N/E/S/W gets a fresh checksum from the
//     router's single encoder and its copy is kept until the next hop acks.
//   * body and tail flits are encoded once, when the local core injects them,
//     and checked once, by the same decoder, when they are ejected at the
//     destination (ej_err). On the way they are not checked.
// Sharing the coders (one encoder, one decoder, as drawn for the proposed
// router) gives these rules, which are this design's own:
//   * at most one head flit may leave on N/E/S/W per cycle (it needs the
//     encoder); an extra round-robin among output ports picks it;
//   * the local core may inject only in a cycle where no head uses the
//     encoder (inj_ready);
//   * heads waiting for a check have the decoder first (round-robin among
//     the four neighbour ports); in such a cycle nothing is ejected.
// Timing: a flit on an input link is written into the input unit at the
// next clock edge. A head then spends one cycle in the check (neighbour
// ports only); in the following cycle switch allocation and traversal happen
// together and the flit is on the output link combinationally. So a head
// leaves 2 cycles after it arrived and a payload flit 1 cycle after (the
// document's router has 4 stages BW/RC/SA/ST; merging SA and ST and doing RC
// in the check cycle is own choice). The upstream copy of a head is freed
// 2 cycles after the head arrives (ack registered), and the packet's payload
// follows from then on. rdy/ack/nack signals come from registers.
module wed_router
  import wed_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  my_x,
  input  logic [3:0]  my_y,
  // neighbour channels, index P_N..P_W
  input  link_s [3:0] in_link,
  output logic  [3:0] in_rdy_head,
  output logic  [3:0] in_rdy_body,
  output logic  [3:0] in_ack,
  output logic  [3:0] in_nack,
  output link_s [3:0] out_link,
  input  logic  [3:0] out_rdy_head,
  input  logic  [3:0] out_rdy_body,
  input  logic  [3:0] out_ack,
  input  logic  [3:0] out_nack,
  // local core
  input  logic        inj_valid,
  input  flit_t       inj_flit,
  output logic        inj_ready,
  output logic        ej_valid,
  output flit_t       ej_flit,
  output logic        ej_err,
  // events, one pulse per occurrence
  output logic        ev_head_err,     // a head failed the per-hop check
  output logic        ev_overflow,     // a payload flit was parked in an additional buffer
  output logic        ev_inj_stall,    // injection held back because the encoder was busy
  output logic        ev_enc_conflict  // two or more heads wanted the encoder
);
  localparam int W = FLIT_W + CHK_W;

  // ---------------- input units ----------------
  link_s [NPORT-1:0]            iu_in;
  logic  [NPORT-1:0]            iu_rdy_head, iu_rdy_body, iu_ack, iu_nack;
  logic  [NPORT-1:0]            iu_chk_pending, iu_chk_sel;
  flit_t [NPORT-1:0]            iu_chk_flit;
  chk_t  [NPORT-1:0]            iu_chk_code;
  logic  [NPORT-1:0]            iu_req, iu_req_head, iu_gnt, iu_ovf;
  logic  [NPORT-1:0][NPORT-1:0] iu_req_port;
  link_s [NPORT-1:0]            iu_req_data;
  logic  [NPORT-1:0]            dn_ack, dn_nack;
  logic                         dec_err;

  assign dn_ack  = {1'b0, out_ack};
  assign dn_nack = {1'b0, out_nack};

  chk_t inj_chk;
  logic head_uses_enc;

  for (genvar p = 0; p < NPORT; p++) begin : g_iu
    if (p < 4) begin : g_nb
      assign iu_in[p] = in_link[p];
    end else begin : g_loc
      assign iu_in[p] = '{valid: inj_valid && inj_ready, flit: inj_flit, chk: inj_chk};
    end
    wed_input_unit #(.DEPTH(DEPTH), .CHECK(p < 4)) u_iu (
      .clk, .rst_n, .my_x, .my_y,
      .in(iu_in[p]),
      .rdy_head(iu_rdy_head[p]), .rdy_body(iu_rdy_body[p]),
      .ack_up(iu_ack[p]), .nack_up(iu_nack[p]),
      .chk_pending(iu_chk_pending[p]), .chk_flit(iu_chk_flit[p]), .chk_code(iu_chk_code[p]),
      .chk_sel(iu_chk_sel[p]), .chk_err(dec_err),
      .req(iu_req[p]), .req_head(iu_req_head[p]), .req_port(iu_req_port[p]),
      .req_data(iu_req_data[p]), .gnt(iu_gnt[p]),
      .dn_ack, .dn_nack,
      .ev_overflow(iu_ovf[p])
    );
  end

  assign in_rdy_head = iu_rdy_head[3:0];
  assign in_rdy_body = iu_rdy_body[3:0];
  assign in_ack      = iu_ack[3:0];
  assign in_nack     = iu_nack[3:0];

  // ---------------- decoder sharing ----------------
  logic [3:0] chk_gnt;
  logic       dec_for_head;
  rr_arbiter #(.N(4)) u_dec_arb (
    .clk, .rst_n, .req(iu_chk_pending[3:0]), .advance(1'b1), .gnt(chk_gnt)
  );
  assign dec_for_head = |iu_chk_pending[3:0];
  assign iu_chk_sel   = {1'b0, chk_gnt};

  // ---------------- switch allocation ----------------
  logic [NPORT-1:0]            out_busy;
  logic [NPORT-1:0][NPORT-1:0] out_owner;   // one-hot input index
  logic [NPORT-1:0][NPORT-1:0] elig, ogrant, xsel;
  logic [NPORT-1:0]            dn_head_ok, dn_body_ok;
  logic [3:0]                  head_win, enc_pick;

  assign dn_head_ok = {!dec_for_head, out_rdy_head};
  assign dn_body_ok = {!dec_for_head, out_rdy_body};

  always_comb begin
    for (int o = 0; o < NPORT; o++)
      for (int i = 0; i < NPORT; i++)
        elig[o][i] = iu_req[i] && iu_req_port[i][o] &&
                     (iu_req_head[i] ? (dn_head_ok[o] && (!out_busy[o] || out_owner[o][i]))
                                     : (dn_body_ok[o] && out_busy[o] && out_owner[o][i]));
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_sa
    rr_arbiter #(.N(NPORT)) u_arb (
      .clk, .rst_n, .req(elig[o]), .advance(|xsel[o]), .gnt(ogrant[o])
    );
  end

  // One head per cycle through the shared encoder.
  always_comb begin
    for (int o = 0; o < 4; o++) head_win[o] = |(ogrant[o] & iu_req_head);
  end
  rr_arbiter #(.N(4)) u_enc_arb (
    .clk, .rst_n, .req(head_win), .advance(1'b1), .gnt(enc_pick)
  );
  assign head_uses_enc = |head_win;

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      if (o < 4 && head_win[o] && !enc_pick[o]) xsel[o] = '0;
      else                                      xsel[o] = ogrant[o];
    end
    iu_gnt = '0;
    for (int o = 0; o < NPORT; o++) iu_gnt = iu_gnt | xsel[o];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_busy  <= '0;
      out_owner <= '0;
    end else begin
      for (int o = 0; o < NPORT; o++) begin
        if (|xsel[o]) begin
          if (|(xsel[o] & iu_req_head)) begin
            out_busy[o]  <= 1'b1;
            out_owner[o] <= xsel[o];
          end else if (|(xsel[o] & ~iu_req_head)) begin
            // a granted payload flit that is a tail releases the output
            for (int i = 0; i < NPORT; i++)
              if (xsel[o][i] && flit_type(iu_req_data[i].flit) == FT_TAIL) out_busy[o] <= 1'b0;
          end
        end
      end
    end
  end

  // ---------------- crossbar ----------------
  logic [NPORT-1:0][W-1:0] xb_in, xb_out;
  logic [NPORT-1:0]        xb_valid;
  always_comb begin
    for (int i = 0; i < NPORT; i++) xb_in[i] = {iu_req_data[i].flit, iu_req_data[i].chk};
  end
  crossbar #(.N(NPORT), .W(W)) u_xbar (.in(xb_in), .sel(xsel), .out(xb_out), .valid(xb_valid));

  // ---------------- shared encoder ----------------
  // Input multiplexer: the head leaving on N/E/S/W this cycle, else the flit
  // offered by the local core.
  flit_t enc_in;
  chk_t  enc_out;
  always_comb begin
    enc_in = inj_flit;
    for (int o = 0; o < 4; o++)
      if (enc_pick[o]) enc_in = xb_out[o][W-1:CHK_W];
  end
  cs_encoder u_enc (.flit(enc_in), .chk(enc_out));

  assign inj_chk   = enc_out;
  assign inj_ready = !head_uses_enc &&
                     ((flit_type(inj_flit) == FT_HEAD) ? iu_rdy_head[P_L] : iu_rdy_body[P_L]);

  // Output demultiplexer: heads take the fresh checksum.
  always_comb begin
    for (int o = 0; o < 4; o++) begin
      out_link[o].valid = xb_valid[o];
      out_link[o].flit  = xb_out[o][W-1:CHK_W];
      out_link[o].chk   = enc_pick[o] ? enc_out : xb_out[o][CHK_W-1:0];
    end
  end

  // ---------------- shared decoder ----------------
  flit_t dec_flit;
  chk_t  dec_chk;
  always_comb begin
    dec_flit = xb_out[P_L][W-1:CHK_W];
    dec_chk  = xb_out[P_L][CHK_W-1:0];
    for (int p = 0; p < 4; p++)
      if (chk_gnt[p]) begin
        dec_flit = iu_chk_flit[p];
        dec_chk  = iu_chk_code[p];
      end
  end
  cs_decoder u_dec (.flit(dec_flit), .chk(dec_chk), .err(dec_err));

  assign ej_valid = xb_valid[P_L];
  assign ej_flit  = xb_out[P_L][W-1:CHK_W];
  assign ej_err   = xb_valid[P_L] && dec_err;

  // ---------------- events ----------------
  assign ev_head_err     = dec_for_head && dec_err;
  assign ev_overflow     = |iu_ovf;
  assign ev_inj_stall    = inj_valid && head_uses_enc;
  assign ev_enc_conflict = ((head_win & (head_win - 4'd1)) != 4'd0);

  a_onehot_gnt: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(enc_pick & head_win));
  a_eject_free: assert property (@(posedge clk) disable iff (!rst_n) xb_valid[P_L] |-> !dec_for_head);
endmodule
