// tb_pkt_sink: feeds packets with known start times and errors; checks the
// packet, flit, latency, error and misroute counters against a model.
module tb_pkt_sink;
  import wed_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] my_x = 4'd2, my_y = 4'd1;
  logic [15:0] now = '0;
  logic in_valid = 0, in_err = 0;
  flit_t in_flit = '0;
  logic [31:0] rx_pkts, rx_flits, err_flits, err_pkts, misrouted;
  logic [47:0] lat_sum;
  int checks = 0, failures = 0;
  longint e_pkts = 0, e_flits = 0, e_lat = 0, e_errf = 0, e_errp = 0, e_mis = 0;

  pkt_sink dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) now <= now + 1'b1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 50; p++) begin
      automatic logic [15:0] st = now - 16'($urandom_range(5, 300));
      automatic bit wrong = ($urandom_range(0, 9) == 0);
      automatic bit bad = 0;
      for (int f = 0; f < 8; f++) begin
        @(negedge clk);
        in_valid = 1;
        in_err   = ($urandom_range(0, 19) == 0);
        if (f == 0)      in_flit = {FT_HEAD, 2'b00, st[13:0], 8'h00, wrong ? 8'h33 : 8'h12};
        else if (f == 7) in_flit = {FT_TAIL, 2'b00, st[13:0], 8'd8, 8'h00};
        else             in_flit = {FT_BODY, 2'b00, st[13:0], 16'($urandom)};
        e_flits++;
        if (in_err) begin e_errf++; bad = 1; end
        if (f == 0 && wrong) e_mis++;
        if (f == 7) begin
          e_pkts++;
          e_lat += 14'(now[13:0] - st[13:0]);
          if (bad) e_errp++;
        end
        @(negedge clk);
        in_valid = 0;
        in_err = 0;
        if ($urandom_range(0, 1) == 0) @(negedge clk);
      end
    end
    @(negedge clk);
    checks += 6;
    if (rx_pkts != e_pkts)     begin failures++; $display("FAIL pkts %0d %0d", rx_pkts, e_pkts); end
    if (rx_flits != e_flits)   begin failures++; $display("FAIL flits"); end
    if (lat_sum != e_lat)      begin failures++; $display("FAIL lat %0d %0d", lat_sum, e_lat); end
    if (err_flits != e_errf)   begin failures++; $display("FAIL errf"); end
    if (err_pkts != e_errp)    begin failures++; $display("FAIL errp %0d %0d", err_pkts, e_errp); end
    if (misrouted != e_mis)    begin failures++; $display("FAIL mis"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
