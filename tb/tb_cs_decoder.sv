// tb_cs_decoder: a flit with its correct checksum must pass; the same flit
// with any single bit of [31:0] or of the checksum flipped must fail.
module tb_cs_decoder;
  import wed_pkg::*;
  flit_t flit;
  chk_t  chk;
  logic  err;
  int checks = 0, failures = 0;

  cs_decoder dut (.flit, .chk, .err);

  function automatic logic [7:0] ref_chk(logic [33:0] f);
    int s;
    s = int'(f[33:32]);
    for (int b = 0; b < 4; b++) s += int'(f[8*b +: 8]);
    return 8'(255 - (s % 256));
  endfunction

  initial begin
    for (int i = 0; i < 200; i++) begin
      automatic logic [33:0] f = {2'($urandom), $urandom};
      automatic int bit_i = $urandom_range(0, 39);
      flit = f; chk = ref_chk(f); #1;
      checks++; if (err !== 1'b0) begin failures++; $display("FAIL good flit flagged %h", f); end
      if (bit_i < 32) flit[bit_i] = ~flit[bit_i];
      else            chk[bit_i-32] = ~chk[bit_i-32];
      #1;
      checks++; if (err !== 1'b1) begin failures++; $display("FAIL bad flit passed %h bit %0d", f, bit_i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
