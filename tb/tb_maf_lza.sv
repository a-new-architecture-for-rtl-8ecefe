// tb_maf_lza: random adder operands (full-range and cancellation-shaped, where the
// high part is pure sign extension so the sum is small). For each non-zero lane the
// exact signed sum is formed with wide integers, its magnitude's leading one position p
// is found, and the window is chosen the way the exponent unit would (low window when p
// is low). The anticipated count must be within one of the true count, top - p, where
// top is the window's upper edge (161 or 108 double, 74 or 50 single).
module tb_maf_lza;
  import maf_pkg::*;
  logic dbl;
  logic [MSBW-1:0] c_msb;
  logic [1:0] msb_sign, lowwin;
  logic [PW-1:0] csa_sum;
  logic [PW:0] csa_carry;
  logic [11:0] lz;
  int checks = 0, failures = 0;
  int hist [5];

  maf_lza dut (.*);

  function automatic int lead(input logic [161:0] m);
    for (int k = 161; k >= 0; k--) if (m[k]) return k;
    return -1;
  endfunction

  task automatic chk(input int pred, input int tru);
    checks++;
    if (pred - tru >= -2 && pred - tru <= 2) hist[pred - tru + 2]++;
    if (pred - tru > 1 || pred - tru < -1) begin
      failures++;
      if (failures < 10) $display("FAIL dbl=%0d lw=%b pred=%0d true=%0d", dbl, lowwin, pred, tru);
    end
  endtask

  initial begin
    hist = '{default: 0};
    for (int i = 0; i < 6000; i++) begin
      logic [161:0] s, m;
      logic [74:0] s1, s2, m1, m2;
      int p, p1, p2;
      dbl = $urandom % 2;
      msb_sign = $urandom;
      c_msb = {$urandom, $urandom};
      csa_sum = {$urandom, $urandom, $urandom, $urandom} >> ($urandom % 100);
      csa_carry = {$urandom, $urandom, $urandom, $urandom} >> ($urandom % 100);
      if (i % 2 == 0) c_msb = dbl ? {MSBW{msb_sign[0]}} : {2'b0, {26{msb_sign[1]}}, 1'b0, {26{msb_sign[0]}}};
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
      if (dbl) begin
        s = ({msb_sign[0], c_msb} << 106) + 162'(csa_sum) + 162'(csa_carry);
        m = s[161] ? 162'(0) - s : s;
        p = lead(m);
        lowwin = {1'b0, p <= 106};
        #1;
        if (p >= 0) chk(int'(lz[6:0]), (p <= 106 ? 108 : 161) - p);
      end else begin
        s1 = ({msb_sign[0], c_msb[25:0]} << 48) + 75'(csa_sum[47:0]) + 75'(csa_carry[48:0]);
        s2 = ({msb_sign[1], c_msb[52:27]} << 48) + 75'(csa_sum[96:49]) + 75'(csa_carry[97:49]);
        m1 = s1[74] ? 75'(0) - s1 : s1;
        m2 = s2[74] ? 75'(0) - s2 : s2;
        p1 = lead(162'(m1)); p2 = lead(162'(m2));
        lowwin = {p2 <= 48, p1 <= 48};
        #1;
        if (p1 >= 0) chk(int'(lz[5:0]), (p1 <= 48 ? 50 : 74) - p1);
        if (p2 >= 0) chk(int'(lz[11:6]), (p2 <= 48 ? 50 : 74) - p2);
      end
    end
    $display("prediction error histogram -2..+2: %0d %0d %0d %0d %0d",
             hist[0], hist[1], hist[2], hist[3], hist[4]);
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
