// tb_maf_mantissa_adder: random high parts, signs and CSA words shaped as the CSA
// produces them (single mode: separator bits clear, a lane's carry word may reach one bit
// above its sum word). The expected signed sums are {sign, high} * 2^low + sum + carry,
// computed with wide integers per lane, and the sign outputs are their top bits.
module tb_maf_mantissa_adder;
  import maf_pkg::*;
  logic dbl;
  logic [MSBW-1:0] c_msb;
  logic [1:0] msb_sign, neg;
  logic [PW-1:0] csa_sum;
  logic [PW:0] csa_carry;
  logic [WW:0] sum_w;
  int checks = 0, failures = 0;

  maf_mantissa_adder dut (.*);

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [161:0] e;
      logic [74:0] e1, e2;
      dbl = $urandom % 2;
      msb_sign = $urandom;
      c_msb = {$urandom, $urandom};
      csa_sum = {$urandom, $urandom, $urandom, $urandom};
      csa_carry = {$urandom, $urandom, $urandom, $urandom};
      if (i % 4 == 0) c_msb = dbl ? {MSBW{msb_sign[0]}} : {2'b0, {26{msb_sign[1]}}, 1'b0, {26{msb_sign[0]}}};
      if (!dbl) begin
        c_msb[54:53] = '0; c_msb[26] = 1'b0;
        csa_sum[105:97] = '0; csa_sum[48] = 1'b0;
        csa_carry[106:98] = '0;
        if (csa_carry[48]) begin csa_sum[47] = 1'b0; csa_carry[47] = 1'b0; end
        if (csa_carry[97]) begin csa_sum[96] = 1'b0; csa_carry[96] = 1'b0; end
      end else begin
        msb_sign[1] = 1'b0;
        if (csa_carry[106]) begin csa_sum[105] = 1'b0; csa_carry[105] = 1'b0; end
      end
      #1;
      checks++;
      if (dbl) begin
        e = ({msb_sign[0], c_msb} << 106) + 162'(csa_sum) + 162'(csa_carry);
        if (sum_w !== e || neg !== {1'b0, e[161]}) begin
          failures++;
          if (failures < 10) $display("FAIL dbl got=%h exp=%h", sum_w, e);
        end
      end else begin
        e1 = ({msb_sign[0], c_msb[25:0]} << 48) + 75'(csa_sum[47:0]) + 75'(csa_carry[48:0]);
        e2 = ({msb_sign[1], c_msb[52:27]} << 48) + 75'(csa_sum[96:49]) + 75'(csa_carry[97:49]);
        if (sum_w[74:0] !== e1 || sum_w[149:75] !== e2 || neg !== {e2[74], e1[74]}) begin
          failures++;
          if (failures < 10) $display("FAIL sgl got=%h,%h exp=%h,%h", sum_w[149:75], sum_w[74:0], e2, e1);
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
