// tb_maf_complementer: random signed sums. The expected magnitude is the negated value
// (minus one more when st1 says a positive fraction was lost) for negative lanes and the
// value itself otherwise; the zero flag is set only for an exactly zero lane.
module tb_maf_complementer;
  import maf_pkg::*;
  logic dbl;
  logic [WW:0] sum_w;
  logic [1:0] neg, st1, zero;
  logic [WW-1:0] mag;
  int checks = 0, failures = 0;

  maf_complementer dut (.*);

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [161:0] s;
      logic [74:0] s1, s2;
      logic [WW-1:0] e;
      logic [1:0] ez;
      dbl = $urandom % 2;
      st1 = $urandom;
      s  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      s1 = {$urandom, $urandom, $urandom};
      s2 = {$urandom, $urandom, $urandom};
      if (i % 7 == 0) begin s = '0; s1 = '0; s2 = '0; end
      if (i % 5 == 0) begin s = '1; s1 = '1; s2 = '1; end
      if (dbl) begin
        sum_w = s; neg = {1'b0, s[161]}; st1[1] = 1'b0;
        e  = s[161] ? WW'(162'(0) - s - 162'(st1[0])) : s[160:0];
        ez = {1'b0, s == 0 && !st1[0]};
      end else begin
        sum_w = {12'b0, s2, s1}; neg = {s2[74], s1[74]};
        e = {12'b0,
             s2[74] ? 74'(75'(0) - s2 - 75'(st1[1])) : s2[73:0], 1'b0,
             s1[74] ? 74'(75'(0) - s1 - 75'(st1[0])) : s1[73:0]};
        ez = {s2 == 0 && !st1[1], s1 == 0 && !st1[0]};
      end
      #1;
      checks++;
      if (mag !== e || zero !== ez) begin
        failures++;
        if (failures < 10) $display("FAIL dbl=%0d got=%h exp=%h z=%b/%b", dbl, mag, e, zero, ez);
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
