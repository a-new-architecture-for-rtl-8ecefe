// tb_maf_align_shifter: random C mantissas and shift amounts (0..161 double, 0..74 per
// single lane). The expected window is the positioned mantissa shifted right by plain
// wide-integer shifts, lane by lane; the expected st1 is whether any bit was lost.
module tb_maf_align_shifter;
  import maf_pkg::*;
  logic dbl;
  logic [DMW-1:0] fc;
  logic [13:0] shamt;
  logic [WW-1:0] c_al;
  logic [1:0] st1;
  int checks = 0, failures = 0;

  maf_align_shifter dut (.*);

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [255:0] full, e_win;
      logic [127:0] l1, l2;
      logic [1:0] e_st;
      int s0, s1;
      dbl = $urandom % 2;
      fc = {$urandom, $urandom};
      if (dbl) begin
        fc[52] = 1'b1;
        s0 = int'($urandom % 162); s1 = 0;
        shamt = 14'(s0);
      end else begin
        fc[52:48] = '0; fc[47] = 1'b1; fc[23] = 1'b1;
        s0 = int'($urandom % 75); s1 = int'($urandom % 75);
        shamt = 14'(s1 * 128 + s0);
      end
      #1;
      if (dbl) begin
        full  = 256'(fc) << (108 + 64);           // 64 guard bits below the window
        full  = full >> s0;
        e_win = full >> 64;
        e_st  = {1'b0, full[63:0] != 0};
      end else begin
        l1 = (128'(fc[23:0]) << (50 + 40)) >> s0;     // 40 guard bits below each lane
        l2 = (128'(fc[47:24]) << (50 + 40)) >> s1;
        e_win = (256'(l2 >> 40) << 75) | 256'(l1 >> 40);
        e_st  = {l2[39:0] != 0, l1[39:0] != 0};
      end
      checks++;
      if (c_al !== e_win[WW-1:0] || st1 !== e_st) begin
        failures++;
        if (failures < 10)
          $display("FAIL dbl=%0d s=%0d,%0d got=%h st=%b exp=%h st=%b", dbl, s0, s1, c_al, st1,
                   e_win[WW-1:0], e_st);
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
