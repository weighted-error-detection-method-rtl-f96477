// pkt_sink: packet ejection module (traffic sink of one node).
//
// Consumes every flit the router ejects (always ready). On each tail flit it
// counts one received packet and adds its latency (now minus the start time
// carried in bits [29:16] of the flit, modulo 2^14) to a running sum, so average latency is
// lat_sum / rx_pkts. It also counts flits that failed the end-to-end
// checksum (err_flits), packets that contained at least one such flit
// (err_pkts: these are the packets an end-to-end scheme would have to ask the
// source to resend) and head flits whose destination is not this node
// (misrouted). The packet ejection module and its latency/throughput role
// follow the document; the counters' widths are own choices.
module pkt_sink
  import wed_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  my_x,
  input  logic [3:0]  my_y,
  input  logic [15:0] now,
  input  logic        in_valid,
  input  flit_t       in_flit,
  input  logic        in_err,
  output logic [31:0] rx_pkts,
  output logic [31:0] rx_flits,
  output logic [47:0] lat_sum,
  output logic [31:0] err_flits,
  output logic [31:0] err_pkts,
  output logic [31:0] misrouted
);
  logic   pkt_bad;
  ftype_e t;
  assign t = flit_type(in_flit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_pkts   <= '0;
      rx_flits  <= '0;
      lat_sum   <= '0;
      err_flits <= '0;
      err_pkts  <= '0;
      misrouted <= '0;
      pkt_bad   <= 1'b0;
    end else if (in_valid) begin
      rx_flits <= rx_flits + 1'b1;
      if (in_err) err_flits <= err_flits + 1'b1;
      if (t == FT_HEAD) begin
        pkt_bad <= in_err;
        if (in_flit[7:0] != {my_y, my_x}) misrouted <= misrouted + 1'b1;
      end else if (t == FT_TAIL) begin
        rx_pkts <= rx_pkts + 1'b1;
        lat_sum <= lat_sum + 48'(14'(now[13:0] - in_flit[29:16]));
        if (pkt_bad || in_err) err_pkts <= err_pkts + 1'b1;
        pkt_bad <= 1'b0;
      end else if (in_err) begin
        pkt_bad <= 1'b1;
      end
    end
  end
endmodule
