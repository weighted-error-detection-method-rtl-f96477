// wed_noc: mesh network of weighted-error-detection routers with its test
// environment (traffic sources, sinks and error generators).
//
// ROWS x COLS routers (default 12 x 12, the evaluated size) in a 2-D mesh.
// Router (x,y) has node ID {y,x}; its east output feeds the west input of
// (x+1,y) and its south output the north input of (x,y+1). Every neighbour
// output goes through an error generator before it reaches the next router.
// Each node has a packet generator and a packet sink, attached to the
// router's local port through an end-to-end recovery unit (ee_ni) that asks
// sources to resend payload flits that failed the destination check. Edge ports are tied off (XY routing never uses them).
// Controls: gen_en starts traffic, inj_rate is the flit injection rate per
// node in Q0.16 flits/cycle, err_rate the per-flit error probability of every
// link (err_rate/2^32). Statistics come out per node; event pulses are
// one bit per node (ev_*), except the link-error pulses, which have one bit
// per output port N,E,S,W; ev_link_head_error marks an error that hit a head.
// The mesh, XY routing and placement of the error generators follow the
// document; the controls and statistic outputs are own choices.
module wed_noc
  import wed_pkg::*;
#(
  parameter int ROWS    = 12,
  parameter int COLS    = 12,
  parameter int DEPTH   = 4,
  parameter int PKT_LEN = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        gen_en,
  input  logic [16:0] inj_rate,
  input  logic [31:0] err_rate,
  input  logic        fixed_dst_en,
  input  logic [7:0]  fixed_dst,
  output logic [ROWS*COLS-1:0][31:0] rx_pkts,
  output logic [ROWS*COLS-1:0][31:0] rx_flits,
  output logic [ROWS*COLS-1:0][47:0] lat_sum,
  output logic [ROWS*COLS-1:0][31:0] err_flits,
  output logic [ROWS*COLS-1:0][31:0] err_pkts,
  output logic [ROWS*COLS-1:0][31:0] misrouted,
  output logic [ROWS*COLS-1:0][31:0] req_sent,
  output logic [ROWS*COLS-1:0][31:0] resend_sent,
  output logic [ROWS*COLS-1:0][31:0] repaired,
  output logic [ROWS*COLS-1:0][31:0] lost,
  output logic [ROWS*COLS-1:0]       ev_pkt_queued,
  output logic [ROWS*COLS-1:0]       ev_pkt_dropped,
  output logic [ROWS*COLS-1:0]       ev_flit_injected,
  output logic [ROWS*COLS-1:0][3:0]  ev_link_error,
  output logic [ROWS*COLS-1:0][3:0]  ev_link_head_error,
  output logic [ROWS*COLS-1:0]       ev_head_err,
  output logic [ROWS*COLS-1:0]       ev_overflow,
  output logic [ROWS*COLS-1:0]       ev_inj_stall,
  output logic [ROWS*COLS-1:0]       ev_enc_conflict
);
  localparam int N = ROWS * COLS;

  logic [15:0] now;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  // Per-router channel signals, indexed [node][port N,E,S,W].
  link_s [N-1:0][3:0] r_in, r_out, l_out;
  logic  [N-1:0][3:0] r_in_rdy_head, r_in_rdy_body, r_in_ack, r_in_nack;
  logic  [N-1:0][3:0] r_out_rdy_head, r_out_rdy_body, r_out_ack, r_out_nack;
  logic  [N-1:0][3:0] l_err;

  for (genvar y = 0; y < ROWS; y++) begin : g_y
    for (genvar x = 0; x < COLS; x++) begin : g_x
      localparam int ID = y * COLS + x;

      logic  inj_valid, inj_ready, ej_valid, ej_err;
      flit_t inj_flit, ej_flit;
      logic  gen_valid, gen_ready, sink_valid, sink_err;
      flit_t gen_flit, sink_flit;

      // --- neighbour wiring: input side of this router ---
      // north input <- south output of (x,y-1)
      if (y > 0) begin : g_n
        assign r_in[ID][P_N]           = l_out[ID-COLS][P_S];
        assign r_out_rdy_head[ID][P_N] = r_in_rdy_head[ID-COLS][P_S];
        assign r_out_rdy_body[ID][P_N] = r_in_rdy_body[ID-COLS][P_S];
        assign r_out_ack[ID][P_N]      = r_in_ack[ID-COLS][P_S];
        assign r_out_nack[ID][P_N]     = r_in_nack[ID-COLS][P_S];
      end else begin : g_n0
        assign r_in[ID][P_N]           = '0;
        assign r_out_rdy_head[ID][P_N] = 1'b0;
        assign r_out_rdy_body[ID][P_N] = 1'b0;
        assign r_out_ack[ID][P_N]      = 1'b0;
        assign r_out_nack[ID][P_N]     = 1'b0;
      end
      if (y < ROWS-1) begin : g_s
        assign r_in[ID][P_S]           = l_out[ID+COLS][P_N];
        assign r_out_rdy_head[ID][P_S] = r_in_rdy_head[ID+COLS][P_N];
        assign r_out_rdy_body[ID][P_S] = r_in_rdy_body[ID+COLS][P_N];
        assign r_out_ack[ID][P_S]      = r_in_ack[ID+COLS][P_N];
        assign r_out_nack[ID][P_S]     = r_in_nack[ID+COLS][P_N];
      end else begin : g_s0
        assign r_in[ID][P_S]           = '0;
        assign r_out_rdy_head[ID][P_S] = 1'b0;
        assign r_out_rdy_body[ID][P_S] = 1'b0;
        assign r_out_ack[ID][P_S]      = 1'b0;
        assign r_out_nack[ID][P_S]     = 1'b0;
      end
      if (x > 0) begin : g_w
        assign r_in[ID][P_W]           = l_out[ID-1][P_E];
        assign r_out_rdy_head[ID][P_W] = r_in_rdy_head[ID-1][P_E];
        assign r_out_rdy_body[ID][P_W] = r_in_rdy_body[ID-1][P_E];
        assign r_out_ack[ID][P_W]      = r_in_ack[ID-1][P_E];
        assign r_out_nack[ID][P_W]     = r_in_nack[ID-1][P_E];
      end else begin : g_w0
        assign r_in[ID][P_W]           = '0;
        assign r_out_rdy_head[ID][P_W] = 1'b0;
        assign r_out_rdy_body[ID][P_W] = 1'b0;
        assign r_out_ack[ID][P_W]      = 1'b0;
        assign r_out_nack[ID][P_W]     = 1'b0;
      end
      if (x < COLS-1) begin : g_e
        assign r_in[ID][P_E]           = l_out[ID+1][P_W];
        assign r_out_rdy_head[ID][P_E] = r_in_rdy_head[ID+1][P_W];
        assign r_out_rdy_body[ID][P_E] = r_in_rdy_body[ID+1][P_W];
        assign r_out_ack[ID][P_E]      = r_in_ack[ID+1][P_W];
        assign r_out_nack[ID][P_E]     = r_in_nack[ID+1][P_W];
      end else begin : g_e0
        assign r_in[ID][P_E]           = '0;
        assign r_out_rdy_head[ID][P_E] = 1'b0;
        assign r_out_rdy_body[ID][P_E] = 1'b0;
        assign r_out_ack[ID][P_E]      = 1'b0;
        assign r_out_nack[ID][P_E]     = 1'b0;
      end

      wed_router #(.DEPTH(DEPTH)) u_router (
        .clk, .rst_n, .my_x(4'(x)), .my_y(4'(y)),
        .in_link(r_in[ID]),
        .in_rdy_head(r_in_rdy_head[ID]), .in_rdy_body(r_in_rdy_body[ID]),
        .in_ack(r_in_ack[ID]), .in_nack(r_in_nack[ID]),
        .out_link(r_out[ID]),
        .out_rdy_head(r_out_rdy_head[ID]), .out_rdy_body(r_out_rdy_body[ID]),
        .out_ack(r_out_ack[ID]), .out_nack(r_out_nack[ID]),
        .inj_valid, .inj_flit, .inj_ready,
        .ej_valid, .ej_flit, .ej_err,
        .ev_head_err(ev_head_err[ID]), .ev_overflow(ev_overflow[ID]),
        .ev_inj_stall(ev_inj_stall[ID]), .ev_enc_conflict(ev_enc_conflict[ID])
      );

      for (genvar p = 0; p < 4; p++) begin : g_eg
        error_gen #(.SEED(32'(ID * 4 + p + 1) * 32'h9E37_79B9 | 32'h1)) u_eg (
          .clk, .rst_n, .err_rate,
          .in(r_out[ID][p]), .out(l_out[ID][p]), .injected(l_err[ID][p])
        );
      end
      assign ev_link_error[ID]    = l_err[ID];
      always_comb begin
        for (int p = 0; p < 4; p++)
          ev_link_head_error[ID][p] = l_err[ID][p] && (flit_type(r_out[ID][p].flit) == FT_HEAD);
      end
      assign ev_flit_injected[ID] = inj_valid && inj_ready;

      pkt_gen #(.ROWS(ROWS), .COLS(COLS), .PKT_LEN(PKT_LEN),
                .SEED(32'(ID + 1) * 32'h2545_F491 | 32'h1)) u_gen (
        .clk, .rst_n, .my_x(4'(x)), .my_y(4'(y)),
        .en(gen_en), .rate(inj_rate), .fixed_dst_en, .fixed_dst, .now,
        .out_valid(gen_valid), .out_flit(gen_flit), .out_ready(gen_ready),
        .pkt_queued(ev_pkt_queued[ID]), .pkt_dropped(ev_pkt_dropped[ID])
      );

      ee_ni u_ni (
        .clk, .rst_n, .my_id(8'({4'(y), 4'(x)})),
        .gen_valid, .gen_flit, .gen_ready,
        .inj_valid, .inj_flit, .inj_ready,
        .ej_valid, .ej_flit, .ej_err,
        .sink_valid, .sink_flit, .sink_err,
        .req_sent(req_sent[ID]), .resend_sent(resend_sent[ID]),
        .repaired(repaired[ID]), .lost(lost[ID])
      );

      pkt_sink u_sink (
        .clk, .rst_n, .my_x(4'(x)), .my_y(4'(y)), .now,
        .in_valid(sink_valid), .in_flit(sink_flit), .in_err(sink_err),
        .rx_pkts(rx_pkts[ID]), .rx_flits(rx_flits[ID]), .lat_sum(lat_sum[ID]),
        .err_flits(err_flits[ID]), .err_pkts(err_pkts[ID]), .misrouted(misrouted[ID])
      );
    end
  end
endmodule
