// pkt_gen: packet generation module (traffic source of one node).
//
// Produces fixed-length packets (PKT_LEN flits: head, bodies, tail) at a
// constant flit injection rate with uniformly distributed random
// destinations. rate is flits/cycle in Q0.16 (65536 = 1 flit per cycle): it
// is added to an accumulator every cycle and each time the accumulator
// passes PKT_LEN flits one packet is queued in the source queue, which keeps
// the generation time of up to QDEPTH packets (a packet generated while the
// queue is full is dropped and counted on pkt_dropped). Queued packets are sent flit by flit whenever the router accepts
// (out_valid/out_ready). Every flit carries the packet start time (the cycle
// at which the packet was generated) in [31:16]: bits [31:30] are 00 (data
// packet, see ee_ni) and [29:16] the low 14 bits of the cycle count, which
// also serve as packet ID. The head carries source and destination IDs in
// [15:8]/[7:0], the tail the packet size in [15:8], body flit k (1..6) holds
// k in [15:8] and the source ID in [7:0], so it can be rebuilt for a resend. When fixed_dst_en
// is 1 every packet goes to fixed_dst instead. Destinations never equal the
// own node. The flit layout follows the document; the rate accumulator,
// random generator and body payload are own choices.
module pkt_gen
  import wed_pkg::*;
#(
  parameter int          ROWS    = 12,
  parameter int          COLS    = 12,
  parameter int          PKT_LEN = 8,
  parameter int          QDEPTH  = 16,
  parameter logic [31:0] SEED    = 32'h1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  my_x,
  input  logic [3:0]  my_y,
  input  logic        en,
  input  logic [16:0] rate,
  input  logic        fixed_dst_en,
  input  logic [7:0]  fixed_dst,
  input  logic [15:0] now,
  output logic        out_valid,
  output flit_t       out_flit,
  input  logic        out_ready,
  output logic        pkt_queued,
  output logic        pkt_dropped
);
  localparam logic [23:0] PKT_UNITS = 24'(PKT_LEN) << 16;

  logic [23:0] acc;
  localparam int QW = $clog2(QDEPTH);
  logic [QW:0]   pending;
  logic [QW-1:0] q_wr, q_rd;
  logic [15:0]   qtime [QDEPTH];
  logic          q_push;
  logic [7:0]  fidx;          // flit index inside the current packet
  logic        busy;
  logic [15:0] stime;
  logic [7:0]  dst;
  logic [31:0] lfsr;
  logic [7:0]  my_id;
  logic        start;
  logic [23:0] acc_sum;

  assign my_id = {my_y, my_x};

  // Random destination: x and y drawn from LFSR bits, moved off the own node.
  logic [3:0] rx, ry;
  logic [7:0] rnd_dst;
  always_comb begin
    rx = 4'((lfsr[15:0] % 16'(COLS)));
    ry = 4'((lfsr[31:16] % 16'(ROWS)));
    if (rx == my_x && ry == my_y) rx = (rx == 4'(COLS-1)) ? 4'd0 : rx + 4'd1;
    rnd_dst = {ry, rx};
  end

  assign acc_sum    = en ? acc + 24'(rate) : acc;
  assign pkt_queued  = en && (acc_sum >= PKT_UNITS);
  assign q_push      = pkt_queued && (pending != (QW+1)'(QDEPTH));
  assign pkt_dropped = pkt_queued && !q_push;
  assign start      = !busy && (pending != 0);

  always_comb begin
    out_valid = busy;
    if (fidx == 0)
      out_flit = {FT_HEAD, 2'b00, stime[13:0], my_id, dst};
    else if (fidx == 8'(PKT_LEN-1))
      out_flit = {FT_TAIL, 2'b00, stime[13:0], 8'(PKT_LEN), 8'h00};
    else
      out_flit = {FT_BODY, 2'b00, stime[13:0], fidx, my_id};
  end

  always_ff @(posedge clk) begin
    if (q_push) qtime[q_wr] <= now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      pending <= '0;
      fidx    <= '0;
      busy    <= 1'b0;
      stime   <= '0;
      dst     <= '0;
      lfsr    <= (SEED == 0) ? 32'h1 : SEED;
      q_wr    <= '0;
      q_rd    <= '0;
    end else begin
      acc <= pkt_queued ? acc_sum - PKT_UNITS : acc_sum;
      pending <= pending + (QW+1)'(q_push) - (QW+1)'(start);
      if (q_push) q_wr <= (q_wr == QW'(QDEPTH-1)) ? '0 : q_wr + 1'b1;
      if (start)  q_rd <= (q_rd == QW'(QDEPTH-1)) ? '0 : q_rd + 1'b1;
      if (start) begin
        busy  <= 1'b1;
        fidx  <= '0;
        stime <= qtime[q_rd];
        dst   <= fixed_dst_en ? fixed_dst : rnd_dst;
        lfsr  <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
      end else if (busy && out_ready) begin
        if (fidx == 8'(PKT_LEN-1)) begin
          busy <= 1'b0;
          fidx <= '0;
        end else begin
          fidx <= fidx + 1'b1;
        end
      end
    end
  end
endmodule
