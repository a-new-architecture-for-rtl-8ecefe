// tb_maf_subword_multiplier: random mantissas in both modes. The carry-save output must
// add up to the exact 106-bit product in double mode, and to {A2*B2 at bit 49, A1*B1 at
// bit 0} in single mode, with bit 48 of both words clear so no carry can cross lanes.
module tb_maf_subword_multiplier;
  import maf_pkg::*;
  logic dbl;
  logic [DMW-1:0] fa, fb;
  logic [PW-1:0] psum, pcarry;
  int checks = 0, failures = 0;

  maf_subword_multiplier dut (.*);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [PW-1:0] e;
      logic [23:0] a1, a2, b1, b2;
      dbl = $urandom % 2;
      if (dbl) begin
        fa = {1'b1, $urandom, $urandom}; fb = {1'b1, $urandom, $urandom};
        if (i < 4) begin fa = '1; fb = '1; end
        e = PW'(fa) * PW'(fb);
      end else begin
        a1 = $urandom | 24'h800000; a2 = $urandom | 24'h800000;
        b1 = $urandom | 24'h800000; b2 = $urandom | 24'h800000;
        if (i < 4) begin a1 = '1; a2 = '1; b1 = '1; b2 = '1; end
        fa = {4'b0, a2, 1'b0, a1};
        fb = {5'b0, b2, b1};
        e = (PW'(a2) * PW'(b2) << 49) | (PW'(a1) * PW'(b1));
      end
      #1;
      checks++;
      if (PW'(psum + pcarry) !== e || (!dbl && (psum[48] | pcarry[48]))) begin
        failures++;
        if (failures < 10) $display("FAIL dbl=%0d got=%h exp=%h", dbl, psum + pcarry, e);
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
