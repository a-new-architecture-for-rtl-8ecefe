// tb_maf_result_format: random signs, exponents (spanning underflow, normal and
// overflow ranges), fractions, zero and invalid flags, rounding modes and both precision
// modes. The expected IEEE word and flags are written out case by case for each lane.
module tb_maf_result_format;
  import maf_pkg::*;
  logic dbl;
  rmode_e rm;
  logic [1:0] sign, inexact_in, zero, invalid;
  logic [DEW-1:0] exp0;
  logic [SEW-1:0] exp1;
  logic [51:0] frac0;
  logic [22:0] frac1;
  logic [63:0] result;
  maf_flags_t flags;
  int checks = 0, failures = 0;

  maf_result_format dut (.*);

  function automatic logic [63:0] lane(input bit isd, input bit s, input int e,
                                       input logic [51:0] f, input bit ixi, input bit z,
                                       input bit inv, input int mode, output logic [3:0] fl);
    int emax;
    logic [63:0] sgn, inf, big;
    emax = isd ? 2047 : 255;
    sgn  = isd ? {s, 63'b0} : 64'({s, 31'b0});
    inf  = isd ? 64'h7FF0000000000000 : 64'h7F800000;
    big  = isd ? 64'h7FEFFFFFFFFFFFFF : 64'h7F7FFFFF;
    fl = '0;
    if (inv) begin fl = 4'b1000; return isd ? 64'h7FF8000000000000 : 64'h7FC00000; end
    if (z) return (mode == 3) ? (isd ? 64'h8000000000000000 : 64'h80000000) : 64'd0;
    if (e >= emax) begin
      fl = 4'b0101;
      if (mode == 0 || (mode == 2 && !s) || (mode == 3 && s)) return sgn | inf;
      return sgn | big;
    end
    if (e <= 0) begin fl = 4'b0011; return sgn; end
    fl = {3'b0, ixi};
    return isd ? (sgn | (64'(e) << 52) | 64'(f)) : (sgn | (64'(e) << 23) | 64'(f[22:0]));
  endfunction

  initial begin
    for (int i = 0; i < 6000; i++) begin
      int e0, e1;
      logic [63:0] r0, r1, er;
      logic [3:0] f0, f1;
      logic [7:0] ef, gf;
      dbl = $urandom % 2;
      rm = rmode_e'($urandom % 4);
      sign = $urandom; inexact_in = $urandom;
      zero = ($urandom % 8 == 0) ? 2'($urandom) : 2'b00;
      invalid = ($urandom % 8 == 0) ? 2'($urandom) : 2'b00;
      e0 = dbl ? int'($urandom % 2200) - 80 : int'($urandom % 300) - 20;
      e1 = int'($urandom % 300) - 20;
      frac0 = {$urandom, $urandom};
      frac1 = $urandom;
      if (dbl) begin sign[1] = 0; zero[1] = 0; invalid[1] = 0; inexact_in[1] = 0; end
      exp0 = DEW'(e0); exp1 = SEW'(e1);
      #1;
      if (dbl) begin
        er = lane(1, sign[0], e0, frac0, inexact_in[0], zero[0], invalid[0], int'(rm), f0);
        f1 = '0;
      end else begin
        r0 = lane(0, sign[0], e0, frac0, inexact_in[0], zero[0], invalid[0], int'(rm), f0);
        r1 = lane(0, sign[1], e1, 52'(frac1), inexact_in[1], zero[1], invalid[1], int'(rm), f1);
        er = {r1[31:0], r0[31:0]};
      end
      ef = {f1[3], f0[3], f1[2], f0[2], f1[1], f0[1], f1[0], f0[0]};
      gf = flags;
      checks++;
      if (result !== er || gf !== ef) begin
        failures++;
        if (failures < 10) $display("FAIL dbl=%0d e=%0d,%0d got=%h/%b exp=%h/%b", dbl, e0, e1,
                                    result, gf, er, ef);
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
