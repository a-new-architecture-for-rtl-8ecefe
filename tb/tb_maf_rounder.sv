// tb_maf_rounder: random mantissas, round/sticky bits, signs, exponents and all four
// rounding modes, for a 53-bit rounder used both wide and narrow (24-bit) and for a
// 24-bit rounder. The expected result comes from comparing the discarded part with one
// half unit: round-to-nearest-even, truncation, or directed rounding by sign, with a
// mantissa overflow renormalized and the exponent incremented.
module tb_maf_rounder;
  import maf_pkg::*;
  logic narrow, rbit, sticky, sign, rbit2, sticky2, sign2;
  rmode_e rm;
  logic [52:0] sig;
  logic [23:0] sig2;
  logic [12:0] exp_in, exp_out;
  logic [9:0] exp_in2, exp_out2;
  logic [51:0] frac;
  logic [22:0] frac2;
  logic inexact, inexact2;
  int checks = 0, failures = 0;

  maf_rounder #(.MW(53), .SW(24), .EW(13)) dut (.*);
  maf_rounder #(.MW(24), .SW(24), .EW(10)) dut2 (
    .narrow(1'b0), .sig(sig2), .rbit(rbit2), .sticky(sticky2), .sign(sign2), .rm(rm),
    .exp_in(exp_in2), .frac(frac2), .exp_out(exp_out2), .inexact(inexact2));

  // reference: value = m + (r/2 + s/4) ulp; round to an integer number of ulps
  task automatic ref_round(input longint m, input int w, input bit r, input bit s,
                           input bit sg, input int mode, input int e,
                           output longint fm, output int fe, output bit ix);
    bit up;
    ix = r | s;
    case (mode)
      0: up = r && (s || (m % 2 == 1));
      1: up = 0;
      2: up = !sg && ix;
      default: up = sg && ix;
    endcase
    fm = m + (up ? 1 : 0);
    fe = e;
    if (fm == (longint'(1) << w)) begin fm = longint'(1) << (w - 1); fe = e + 1; end
    fm = fm - (longint'(1) << (w - 1));
  endtask

  initial begin
    for (int i = 0; i < 6000; i++) begin
      longint m, m2, fm, fm2;
      int fe, fe2, e, e2;
      bit ix, ix2;
      narrow = $urandom % 2;
      rm = rmode_e'($urandom % 4);
      rbit = $urandom; sticky = $urandom; sign = $urandom;
      rbit2 = $urandom; sticky2 = $urandom; sign2 = $urandom;
      e = int'($urandom % 3000) - 500; e2 = int'($urandom % 400) - 100;
      m  = narrow ? longint'({$urandom} % (1 << 23)) + (1 << 23)
                  : longint'({$urandom, $urandom} % (64'd1 << 52)) + (longint'(1) << 52);
      m2 = longint'({$urandom} % (1 << 23)) + (1 << 23);
      if (i % 5 == 0) begin
        m = narrow ? longint'((1 << 24) - 1) : (longint'(1) << 53) - 1;
        m2 = (1 << 24) - 1;
      end
      sig = 53'(m); sig2 = 24'(m2);
      exp_in = 13'(e); exp_in2 = 10'(e2);
      #1;
      ref_round(m, narrow ? 24 : 53, rbit, sticky, sign, int'(rm), e, fm, fe, ix);
      ref_round(m2, 24, rbit2, sticky2, sign2, int'(rm), e2, fm2, fe2, ix2);
      checks += 2;
      if (longint'(frac) != fm || $signed(exp_out) != fe || inexact != ix) begin
        failures++;
        if (failures < 10) $display("FAIL r1 n=%0d m=%h got=%h/%0d exp=%h/%0d", narrow, m, frac,
                                    $signed(exp_out), fm, fe);
      end
      if (longint'(frac2) != fm2 || $signed(exp_out2) != fe2 || inexact2 != ix2) begin
        failures++;
        if (failures < 10) $display("FAIL r2 m=%h got=%h exp=%h", m2, frac2, fm2);
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
