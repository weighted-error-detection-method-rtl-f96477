// ee_ni: end-to-end recovery of payload errors at a node (network interface).
//
// Payload (body and tail) flits are only checked when they are ejected at
// their destination. This unit turns such a detection into a repair, in the
// way the end-to-end scheme works: the destination sends a retransmission
// request packet back to the source, and the source resends only the faulty
// part of the packet, framed by a head and a tail.
//
// Packet kinds are carried in bits [31:30] of every flit of a packet
// (00 data, 01 request, 10 resend); bits [29:16] hold the packet ID, which is
// the 14-bit start time of the original packet. The head flit, which is
// checked at every hop, therefore always delivers kind, ID and source
// reliably. A request is head + tail, the tail holding in [14:8] the mask of
// faulty flits (bit k-1 = flit k, k = 1..7, 7 being the tail). A resend is
// head + the body flits named in the mask (ascending) + tail, the tail
// holding the same mask in [14:8]. A body flit k of packet ID from node S
// holds {kind, ID, k[7:0], S}, so the source can rebuild it from the ID alone.
// If a request's tail is corrupted the whole payload is resent; if a
// resend's tail is corrupted the whole payload is requested again.
//
// Source side: the ID and destination of the last RECORDS data packets are
// recorded when their head is injected; a request for an unknown ID is
// counted as lost. Jobs (requests to send, resends to send) wait in a queue
// of JOBS entries (a full queue drops and counts the job) and are injected
// between data packets, ahead of new data. Data flits from the generator
// pass straight through; flits of data packets are passed to the sink
// (sink_*), control packets are consumed here.
// Counters: req_sent, resend_sent, repaired (resends that arrived clean),
// lost (unknown ID or job dropped).
// The request/resend protocol follows the document's end-to-end scheme; the
// field layout, record table and queue are this design's own choices (the
// document says only that the request uses "another special format").
module ee_ni
  import wed_pkg::*;
#(
  parameter int RECORDS = 8,
  parameter int JOBS    = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  my_id,
  // from the packet generator
  input  logic        gen_valid,
  input  flit_t       gen_flit,
  output logic        gen_ready,
  // to / from the router's local port
  output logic        inj_valid,
  output flit_t       inj_flit,
  input  logic        inj_ready,
  input  logic        ej_valid,
  input  flit_t       ej_flit,
  input  logic        ej_err,
  // data packets to the sink
  output logic        sink_valid,
  output flit_t       sink_flit,
  output logic        sink_err,
  // counters
  output logic [31:0] req_sent,
  output logic [31:0] resend_sent,
  output logic [31:0] repaired,
  output logic [31:0] lost
);
  localparam logic [1:0] K_DATA = 2'b00, K_REQ = 2'b01, K_RES = 2'b10;

  typedef struct packed {
    logic [1:0]  kind;
    logic [13:0] id;
    logic [7:0]  dst;
    logic [6:0]  mask;
  } job_s;

  // ---------------- receive side ----------------
  logic [1:0]  rx_kind;
  logic [13:0] rx_id;
  logic [7:0]  rx_src;
  logic [3:0]  rx_pos;
  logic [7:0]  rx_perr;      // error per arrival position 1..7
  logic [1:0]  cur_kind;
  ftype_e      et;

  assign et       = flit_type(ej_flit);
  assign cur_kind = (et == FT_HEAD) ? ej_flit[31:30] : rx_kind;

  assign sink_valid = ej_valid && cur_kind == K_DATA;
  assign sink_flit  = ej_flit;
  assign sink_err   = ej_err;

  // Decision at a tail flit.
  job_s       rx_job;
  logic       rx_push, rx_repaired, rx_lookup;
  logic [7:0] perr_all;
  logic [6:0] new_mask;

  always_comb begin
    perr_all = rx_perr;
    perr_all[3'(rx_pos + 4'd1)] = ej_err;          // the tail itself
    // map arrival positions of a resend to flit numbers through its mask
    new_mask = '0;
    begin
      int j;
      j = 1;
      for (int k = 0; k < 7; k++)
        if (ej_flit[8 + k] || k == 6) begin
          if (k == 6) new_mask[6] = ej_err;
          else begin
            new_mask[k] = perr_all[j];
            j++;
          end
        end
    end
    rx_job      = '{kind: K_REQ, id: rx_id, dst: rx_src, mask: perr_all[7:1]};
    rx_push     = 1'b0;
    rx_repaired = 1'b0;
    rx_lookup   = 1'b0;
    if (ej_valid && et == FT_TAIL) begin
      unique case (rx_kind)
        K_DATA: rx_push = (perr_all[7:1] != 0);
        K_REQ: begin
          rx_lookup   = 1'b1;
          rx_job.kind = K_RES;
          rx_job.mask = ej_err ? 7'h7F : ej_flit[14:8];
        end
        K_RES: begin
          if (ej_err) begin
            rx_push     = 1'b1;
            rx_job.mask = 7'h7F;
          end else if (new_mask != 0) begin
            rx_push     = 1'b1;
            rx_job.mask = new_mask;
          end else begin
            rx_repaired = 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  // Record table of injected data packets.
  logic [RECORDS-1:0]       rec_v;
  logic [RECORDS-1:0][13:0] rec_id;
  logic [RECORDS-1:0][7:0]  rec_dst;
  logic [$clog2(RECORDS)-1:0] rec_wr;
  logic rec_hit;
  always_comb begin
    rec_hit = 1'b0;
    for (int r = 0; r < RECORDS; r++)
      if (rec_v[r] && rec_id[r] == rx_id && rec_dst[r] == rx_src) rec_hit = 1'b1;
  end

  // ---------------- job queue ----------------
  job_s q [JOBS];
  logic [$clog2(JOBS):0]   q_cnt;
  logic [$clog2(JOBS)-1:0] q_rd, q_wr;
  logic q_push, q_pop, q_full;
  job_s q_head;
  assign q_full = (q_cnt == ($clog2(JOBS)+1)'(JOBS));
  assign q_push = (rx_push || (rx_lookup && rec_hit)) && !q_full;
  assign q_head = q[q_rd];

  // ---------------- transmit side ----------------
  typedef enum logic [1:0] {TX_IDLE, TX_GEN, TX_JOB} tx_e;
  tx_e        tx;
  job_s       job;
  logic [3:0] jpos;          // 0 head, 1..6 bodies, 7 tail
  logic [3:0] jnext;
  flit_t      job_flit;

  // next flit number of the job after position p (skips bodies not in mask)
  function automatic logic [3:0] next_pos(logic [3:0] p, job_s j);
    logic [3:0] n;
    n = 4'd7;
    if (j.kind == K_RES)
      for (int k = 6; k >= 1; k--)
        if (k > int'(p) && j.mask[k-1]) n = 4'(k);
    return n;
  endfunction

  assign jnext = next_pos(jpos, job);

  always_comb begin
    if (jpos == 0)
      job_flit = {FT_HEAD, job.kind, job.id, my_id, job.dst};
    else if (jpos == 4'd7)
      job_flit = {FT_TAIL, job.kind, job.id, 1'b0, job.mask, 8'h00};
    else
      job_flit = {FT_BODY, job.kind, job.id, 4'h0, jpos, my_id};
  end

  logic gen_head;
  assign gen_head = gen_valid && flit_type(gen_flit) == FT_HEAD;

  always_comb begin
    inj_valid = 1'b0;
    inj_flit  = gen_flit;
    gen_ready = 1'b0;
    unique case (tx)
      TX_GEN: begin
        inj_valid = gen_valid;
        gen_ready = inj_ready;
      end
      TX_JOB: begin
        inj_valid = 1'b1;
        inj_flit  = job_flit;
      end
      default: ;
    endcase
  end
  assign q_pop = (tx == TX_IDLE) && q_cnt != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_kind <= K_DATA; rx_id <= '0; rx_src <= '0; rx_pos <= '0; rx_perr <= '0;
      rec_v <= '0; rec_id <= '0; rec_dst <= '0; rec_wr <= '0;
      q_cnt <= '0; q_rd <= '0; q_wr <= '0;
      tx <= TX_IDLE; job <= '0; jpos <= '0;
      req_sent <= '0; resend_sent <= '0; repaired <= '0; lost <= '0;
    end else begin
      // receive bookkeeping
      if (ej_valid) begin
        if (et == FT_HEAD) begin
          rx_kind <= ej_flit[31:30];
          rx_id   <= ej_flit[29:16];
          rx_src  <= ej_flit[15:8];
          rx_pos  <= '0;
          rx_perr <= '0;
        end else begin
          rx_pos <= rx_pos + 4'd1;
          rx_perr[3'(rx_pos + 4'd1)] <= ej_err;
        end
      end
      if (rx_repaired) repaired <= repaired + 1'b1;
      if ((rx_lookup && !rec_hit) || ((rx_push || (rx_lookup && rec_hit)) && q_full)) lost <= lost + 1'b1;
      // queue
      if (q_push) begin
        q[q_wr] <= rx_job;
        q_wr    <= (q_wr == ($clog2(JOBS))'(JOBS-1)) ? '0 : q_wr + 1'b1;
      end
      if (q_pop) q_rd <= (q_rd == ($clog2(JOBS))'(JOBS-1)) ? '0 : q_rd + 1'b1;
      q_cnt <= q_cnt + ($clog2(JOBS)+1)'(q_push) - ($clog2(JOBS)+1)'(q_pop);
      // transmit
      unique case (tx)
        TX_IDLE: begin
          if (q_cnt != 0) begin
            tx   <= TX_JOB;
            job  <= q_head;
            jpos <= '0;
            if (q_head.kind == K_REQ) req_sent <= req_sent + 1'b1;
            else                      resend_sent <= resend_sent + 1'b1;
          end else if (gen_head) begin
            tx <= TX_GEN;
          end
        end
        TX_GEN: if (gen_valid && inj_ready) begin
          if (flit_type(gen_flit) == FT_HEAD) begin
            rec_v[rec_wr]   <= 1'b1;
            rec_id[rec_wr]  <= gen_flit[29:16];
            rec_dst[rec_wr] <= gen_flit[7:0];
            rec_wr <= (rec_wr == ($clog2(RECORDS))'(RECORDS-1)) ? '0 : rec_wr + 1'b1;
          end
          if (flit_type(gen_flit) == FT_TAIL) tx <= TX_IDLE;
        end
        TX_JOB: if (inj_ready) begin
          if (jpos == 4'd7) tx <= TX_IDLE;
          else              jpos <= (jpos == 0) ? next_pos(4'd0, job) : jnext;
        end
        default: tx <= TX_IDLE;
      endcase
    end
  end
endmodule
