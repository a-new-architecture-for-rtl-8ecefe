// tb_maf_negate_csa: random aligned addends, products (given as a random carry-free
// split into sum and carry words), subtraction flags and st1. For each lane the value
// {sign, high part} * 2^low_width + CSA sum + CSA carry, taken modulo the lane width, must
// equal product + aligned C for an addition, product - C for a subtraction with
// st1 = 0, and product - C - 1 (the floor of the exact value) when bits were lost.
module tb_maf_negate_csa;
  import maf_pkg::*;
  logic dbl;
  logic [WW-1:0] c_al;
  logic [1:0] sub, st1, msb_sign;
  logic [PW-1:0] psum, pcarry, csa_sum;
  logic [PW:0] csa_carry;
  logic [MSBW-1:0] c_msb;
  int checks = 0, failures = 0;

  maf_negate_csa dut (.*);

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [PW-1:0] p, r;
      logic [161:0] got, e;
      logic [74:0] g1, g2, e1, e2;
      logic [47:0] p1, p2;
      logic [73:0] c1, c2;
      dbl = $urandom % 2;
      sub = $urandom; st1 = $urandom;
      r = {$urandom, $urandom, $urandom, $urandom};
      if (dbl) begin
        p = {$urandom, $urandom, $urandom, $urandom} >> 1;
        c_al = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        sub[1] = 1'b0; st1[1] = 1'b0;
      end else begin
        p1 = {$urandom, $urandom}; p2 = {$urandom, $urandom};
        c1 = {$urandom, $urandom, $urandom}; c2 = {$urandom, $urandom, $urandom};
        p = {9'b0, p2, 1'b0, p1};
        c_al = {12'b0, c2, 1'b0, c1};
      end
      psum = p & r; pcarry = p & ~r;
      #1;
      checks++;
      if (dbl) begin
        got = ({msb_sign[0], c_msb} << 106) + 162'(csa_sum) + 162'(csa_carry);
        e = sub[0] ? (162'(p) - 162'(c_al) - 162'(st1[0])) : (162'(p) + 162'(c_al));
        if (got !== e) begin
          failures++;
          if (failures < 10) $display("FAIL dbl sub=%b st1=%b got=%h exp=%h", sub, st1, got, e);
        end
      end else begin
        g1 = ({msb_sign[0], c_msb[25:0]} << 48) + 75'(csa_sum[47:0]) + 75'(csa_carry[48:0]);
        g2 = ({msb_sign[1], c_msb[52:27]} << 48) + 75'(csa_sum[96:49]) + 75'(csa_carry[97:49]);
        e1 = sub[0] ? (75'(p1) - 75'(c1) - 75'(st1[0])) : (75'(p1) + 75'(c1));
        e2 = sub[1] ? (75'(p2) - 75'(c2) - 75'(st1[1])) : (75'(p2) + 75'(c2));
        if (g1 !== e1 || g2 !== e2) begin
          failures++;
          if (failures < 10) $display("FAIL sgl sub=%b st1=%b got=%h,%h exp=%h,%h", sub, st1, g2, g1, e2, e1);
        end
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
