// tb_maf_sign_unit: exhaustive over the six sign bits in both modes; the expected
// product sign and effective-subtraction flags come from counting negative factors.
module tb_maf_sign_unit;
  logic dbl;
  logic [63:0] a, b, c;
  logic [1:0] s_ab, s_c, sub;
  int checks = 0, failures = 0;

  maf_sign_unit dut (.*);

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 64; v++) begin
        logic [1:0] e_ab, e_sub;
        dbl = m[0];
        a = {v[0], 31'h0, v[1], 31'h0};
        b = {v[2], 31'h0, v[3], 31'h0};
        c = {v[4], 31'h0, v[5], 31'h0};
        #1;
        e_ab[1]  = dbl ? 1'b0 : ((v[0] + v[2]) % 2 == 1);
        e_ab[0]  = dbl ? ((v[0] + v[2]) % 2 == 1) : ((v[1] + v[3]) % 2 == 1);
        e_sub[1] = dbl ? 1'b0 : ((v[0] + v[2] + v[4]) % 2 == 1);
        e_sub[0] = dbl ? ((v[0] + v[2] + v[4]) % 2 == 1) : ((v[1] + v[3] + v[5]) % 2 == 1);
        checks++;
        if (s_ab !== e_ab || sub !== e_sub) begin
          failures++;
          $display("FAIL dbl=%0d v=%b s_ab=%b/%b sub=%b/%b", dbl, v[5:0], s_ab, e_ab, sub, e_sub);
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
