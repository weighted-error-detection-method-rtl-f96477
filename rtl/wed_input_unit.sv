// wed_input_unit: one input port of the proposed router.
//
// Holds the normal FIFO (DEPTH flits) and the additional one-flit buffer.
// The additional buffer has two uses:
//   * every head flit is written into it, not into the FIFO. On a neighbour
//     port (CHECK=1) the head first waits for the router's shared decoder
//     (state HB_CHECK). A good head is acknowledged upstream (ack_up); a bad
//     one is dropped and negatively acknowledged (nack_up) so the upstream
//     router sends its copy again. After being sent on through the switch,
//     the head stays here as the retransmission copy (HB_WAIT) until the
//     next hop acks it (freed) or nacks it (HB_RESEND, sent again).
//     A head ejected to the local port needs no copy and is freed at once.
//   * when it is empty and the FIFO is full, an arriving body/tail flit is
//     parked in it (HB_BODY) and moved into the FIFO as soon as there is room.
// These two rules and the three selectors come from the drawing of the
// additional-buffer control; state encoding and handshakes are own choices.
//
// Switch interface: req with req_port (one-hot N,E,S,W,L), req_head and the
// flit on req_data (flit,chk). gnt in the same cycle means the flit leaves.
// Body flits of a packet only leave once the head has been acknowledged by
// the next hop (they wait while HB_WAIT), so a retransmitted head never falls
// behind its own payload. A new head is only routed after the previous
// packet's tail has left (route_valid cleared), which also means all older
// flits in the FIFO have gone.
// Upstream flow control (on/off): rdy_head / rdy_body are computed from
// registers only, so the upstream router can use them in the same cycle.
module wed_input_unit
  import wed_pkg::*;
#(
  parameter int DEPTH = 4,
  parameter bit CHECK = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       my_x,
  input  logic [3:0]       my_y,
  // from upstream
  input  link_s            in,
  output logic             rdy_head,
  output logic             rdy_body,
  output logic             ack_up,
  output logic             nack_up,
  // shared decoder
  output logic             chk_pending,
  output flit_t            chk_flit,
  output chk_t             chk_code,
  input  logic             chk_sel,
  input  logic             chk_err,
  // switch allocation
  output logic             req,
  output logic             req_head,
  output logic [NPORT-1:0] req_port,
  output link_s            req_data,
  input  logic             gnt,
  // next-hop head acknowledgement, one bit per output port of this router
  input  logic [NPORT-1:0] dn_ack,
  input  logic [NPORT-1:0] dn_nack,
  // events
  output logic             ev_overflow
);
  typedef enum logic [2:0] {
    HB_EMPTY, HB_BODY, HB_CHECK, HB_ROUTE, HB_WAIT, HB_RESEND
  } hb_state_e;

  localparam int W = FLIT_W + CHK_W;

  hb_state_e        hb_state;
  flit_t            hb_flit;
  chk_t             hb_chk;
  logic             route_valid;
  logic [NPORT-1:0] cur_out;

  logic             f_wr, f_rd, f_empty, f_full;
  logic [W-1:0]     f_wdata, f_rdata;
  logic [$clog2(DEPTH+1)-1:0] f_count;
  logic [NPORT-1:0] rc_port;

  logic in_head, in_body, in_to_hb, in_to_fifo, hb_to_fifo;

  assign in_head = in.valid && (flit_type(in.flit) == FT_HEAD);
  assign in_body = in.valid && (flit_type(in.flit) == FT_BODY || flit_type(in.flit) == FT_TAIL);

  assign rdy_head = (hb_state == HB_EMPTY);
  assign rdy_body = (hb_state != HB_BODY) && !(f_full && hb_state != HB_EMPTY);

  // Input demultiplexer: "is header or (additional buffer empty and normal
  // buffer full)" selects the additional buffer.
  assign in_to_hb   = in_head || (in_body && f_full && hb_state == HB_EMPTY);
  assign in_to_fifo = in_body && !in_to_hb;
  // A parked payload flit moves to the FIFO when there is room.
  assign hb_to_fifo = (hb_state == HB_BODY) && (!f_full || f_rd);

  assign f_wr    = in_to_fifo || hb_to_fifo;
  assign f_wdata = hb_to_fifo ? {hb_flit, hb_chk} : {in.flit, in.chk};

  flit_fifo #(.DEPTH(DEPTH), .WIDTH(W)) u_fifo (
    .clk, .rst_n,
    .wr_en(f_wr), .wr_data(f_wdata),
    .rd_en(f_rd), .rd_data(f_rdata),
    .empty(f_empty), .full(f_full), .count(f_count)
  );

  xy_route u_rc (.my_x, .my_y, .dst(hb_flit[7:0]), .port(rc_port));

  // Decoder request.
  assign chk_pending = (hb_state == HB_CHECK);
  assign chk_flit    = hb_flit;
  assign chk_code    = hb_chk;

  // Output multiplexer: the additional buffer feeds the switch for a head
  // (first send or resend), the FIFO otherwise.
  logic head_req, body_req;
  assign head_req = (hb_state == HB_ROUTE && !route_valid) || (hb_state == HB_RESEND);
  assign body_req = route_valid && !f_empty && hb_state != HB_WAIT && hb_state != HB_RESEND;

  always_comb begin
    req      = head_req || body_req;
    req_head = head_req;
    req_port = head_req && !route_valid ? rc_port : cur_out;
    if (head_req) req_data = '{valid: 1'b1, flit: hb_flit, chk: hb_chk};
    else          req_data = '{valid: body_req, flit: f_rdata[W-1:CHK_W], chk: f_rdata[CHK_W-1:0]};
  end

  assign f_rd = gnt && body_req && !head_req;

  logic tail_out;
  assign tail_out = f_rd && (flit_type(f_rdata[W-1:CHK_W]) == FT_TAIL);
  assign ev_overflow = in_to_hb && in_body;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hb_state    <= HB_EMPTY;
      hb_flit     <= '0;
      hb_chk      <= '0;
      route_valid <= 1'b0;
      cur_out     <= '0;
      ack_up      <= 1'b0;
      nack_up     <= 1'b0;
    end else begin
      ack_up  <= 1'b0;
      nack_up <= 1'b0;
      if (tail_out) route_valid <= 1'b0;
      unique case (hb_state)
        HB_EMPTY: if (in_to_hb) begin
          hb_flit  <= in.flit;
          hb_chk   <= in.chk;
          hb_state <= in_head ? (CHECK ? HB_CHECK : HB_ROUTE) : HB_BODY;
        end
        HB_BODY: if (hb_to_fifo) hb_state <= HB_EMPTY;
        HB_CHECK: if (chk_sel) begin
          if (chk_err) begin
            hb_state <= HB_EMPTY;
            nack_up  <= 1'b1;
          end else begin
            hb_state <= HB_ROUTE;
            ack_up   <= 1'b1;
          end
        end
        HB_ROUTE, HB_RESEND: if (gnt && head_req) begin
          route_valid <= 1'b1;
          cur_out     <= req_port;
          hb_state    <= req_port[P_L] ? HB_EMPTY : HB_WAIT;
        end
        HB_WAIT: begin
          if (|(dn_nack & cur_out))     hb_state <= HB_RESEND;
          else if (|(dn_ack & cur_out)) hb_state <= HB_EMPTY;
        end
        default: hb_state <= HB_EMPTY;
      endcase
    end
  end

  a_head_room: assert property (@(posedge clk) disable iff (!rst_n) in_head |-> rdy_head);
  a_body_room: assert property (@(posedge clk) disable iff (!rst_n) in_body |-> rdy_body);
endmodule
