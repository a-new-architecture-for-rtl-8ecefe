// tb_maf_norm_shifter: random magnitudes with the leading one at a random position p,
// the constant-shift flag chosen as the exponent unit would, and an anticipated count
// that is the true count with an error of -1, 0 or +1. The result must be the magnitude
// shifted left by exactly 160 - p (double) or 73 - p (single lane, lanes independent), and
// the reported total shift must equal that amount.
module tb_maf_norm_shifter;
  import maf_pkg::*;
  logic dbl;
  logic [WW-1:0] mag, norm;
  logic [1:0] lowwin;
  logic [11:0] lz;
  logic [7:0] tsh0;
  logic [6:0] tsh1;
  int checks = 0, failures = 0;

  maf_norm_shifter dut (.*);

  function automatic logic [WW-1:0] rnd_mag(input int p);
    logic [WW-1:0] v;
    v = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    v = v & ((WW'(1) << p) - 1);
    return v | (WW'(1) << p);
  endfunction

  function automatic int cnt(input int top, input int p, input int lim);
    int v;
    v = top - p + int'($urandom % 3) - 1;
    if (v < 0) v = 0;
    if (v > lim) v = lim;
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 6000; i++) begin
      logic [WW-1:0] e;
      logic [LW-1:0] m1, m2;
      int p, p1, p2;
      dbl = $urandom % 2;
      if (dbl) begin
        p = int'($urandom % 161);
        mag = rnd_mag(p);
        lowwin = {1'b0, p <= 106};
        lz = 12'(cnt(p <= 106 ? 108 : 161, p, 108));
        e = mag << (160 - p);
        #1;
        checks++;
        if (norm !== e || int'(tsh0) != 160 - p) begin
          failures++;
          if (failures < 10) $display("FAIL dbl p=%0d lz=%0d tsh=%0d", p, lz, tsh0);
        end
      end else begin
        p1 = int'($urandom % 74); p2 = int'($urandom % 74);
        m1 = LW'(rnd_mag(p1)); m2 = LW'(rnd_mag(p2));
        mag = {12'b0, m2, 1'b0, m1};
        lowwin = {p2 <= 48, p1 <= 48};
        lz = 12'(cnt(p2 <= 48 ? 50 : 74, p2, 50) * 64 + cnt(p1 <= 48 ? 50 : 74, p1, 50));
        e = {12'b0, LW'(m2 << (73 - p2)), 1'b0, LW'(m1 << (73 - p1))};
        #1;
        checks++;
        if (norm !== e || int'(tsh0) != 73 - p1 || int'(tsh1) != 73 - p2) begin
          failures++;
          if (failures < 10) $display("FAIL sgl p=%0d,%0d lz=%h tsh=%0d,%0d", p2, p1, lz, tsh1, tsh0);
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
