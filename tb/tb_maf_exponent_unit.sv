// tb_maf_exponent_unit: random biased exponents over the whole normal range in both
// modes. Expected values use integer arithmetic: delta = ea + eb - ec - OFF (967 double,
// 100 single), shift = delta clamped to [0, 161] or [0, 74], exponent of the window's top
// bit = ea + eb - OFF (or ec when delta < 0), constant-shift flag = delta >= 54 or 25.
module tb_maf_exponent_unit;
  import maf_pkg::*;
  logic dbl;
  logic [DEW-1:0] ea0, eb0, ec0, maf_exp0;
  logic [SEW-1:0] ea1, eb1, ec1, maf_exp1;
  logic [13:0] shamt;
  logic [1:0] lowwin, c_big;
  int checks = 0, failures = 0;

  maf_exponent_unit dut (.*);

  function automatic int clampi(input int v, input int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int a0, b0, c0, a1, b1, c1, d0, d1, off, mx, thr;
      int e_sh, e_x0, e_x1;
      logic [1:0] e_lw;
      dbl = $urandom % 2;
      mx = dbl ? 2046 : 254;
      a0 = 1 + int'($urandom % mx); b0 = 1 + int'($urandom % mx); c0 = 1 + int'($urandom % mx);
      a1 = 1 + int'($urandom % 254); b1 = 1 + int'($urandom % 254); c1 = 1 + int'($urandom % 254);
      if (i % 3 == 0) c0 = (a0 + b0 - (dbl ? 1023 : 127) + int'($urandom % 120) - 60);
      if (c0 < 1) c0 = 1;
      if (c0 > mx) c0 = mx;
      ea0 = DEW'(a0); eb0 = DEW'(b0); ec0 = DEW'(c0);
      ea1 = dbl ? '0 : SEW'(a1); eb1 = dbl ? '0 : SEW'(b1); ec1 = dbl ? '0 : SEW'(c1);
      if (dbl) begin a1 = 0; b1 = 0; c1 = 0; end
      #1;
      off = dbl ? 967 : 100; thr = dbl ? 54 : 25;
      d0 = a0 + b0 - c0 - off;
      d1 = a1 + b1 - c1 - 100;
      e_x0 = (d0 < 0) ? c0 : a0 + b0 - off;
      e_x1 = (d1 < 0) ? c1 : a1 + b1 - 100;
      e_lw = {!dbl && d1 >= 25, d0 >= thr};
      e_sh = dbl ? clampi(d0, 161) : (clampi(d1, 74) * 128 + clampi(d0, 74));
      checks++;
      if (int'(shamt) != e_sh || $signed(maf_exp0) != e_x0 || lowwin !== e_lw ||
          (!dbl && $signed(maf_exp1) != e_x1)) begin
        failures++;
        if (failures < 10)
          $display("FAIL dbl=%0d e=%0d,%0d,%0d sh=%0d/%0d x0=%0d/%0d lw=%b/%b", dbl, a0, b0, c0,
                   shamt, e_sh, $signed(maf_exp0), e_x0, lowwin, e_lw);
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
