// tb_cs_encoder: checks the checksum generator against a reference sum
// computed here for directed and random flits.
module tb_cs_encoder;
  import wed_pkg::*;
  flit_t flit;
  chk_t  chk;
  int checks = 0, failures = 0;

  cs_encoder dut (.flit, .chk);

  function automatic logic [7:0] ref_chk(logic [33:0] f);
    int s;
    s = int'(f[33:32]);
    for (int b = 0; b < 4; b++) s += int'(f[8*b +: 8]);
    return 8'(255 - (s % 256));
  endfunction

  initial begin
    flit = '0; #1;
    checks++; if (chk !== 8'hFF) begin failures++; $display("FAIL zero flit chk=%h", chk); end
    flit = {2'b11, 16'h0001, 8'h12, 8'h34}; #1;
    checks++; if (chk !== 8'(~(8'h03 + 8'h00 + 8'h01 + 8'h12 + 8'h34))) begin failures++; $display("FAIL head"); end
    for (int i = 0; i < 500; i++) begin
      flit = {2'($urandom), $urandom};
      #1;
      checks++;
      if (chk !== ref_chk(flit)) begin
        failures++;
        $display("FAIL flit=%h chk=%h exp=%h", flit, chk, ref_chk(flit));
      end
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
