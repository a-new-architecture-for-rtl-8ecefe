// tb_maf_operand_select: random operands in both precision modes; the expected mantissa,
// exponent and invalid fields are rebuilt arithmetically from the IEEE fields
// (hidden one added, single lanes placed at their multiplier/shifter offsets).
module tb_maf_operand_select;
  import maf_pkg::*;
  logic dbl;
  logic [63:0] a, b, c;
  logic [DMW-1:0] fa, fb, fc;
  logic [DEW-1:0] ea0, eb0, ec0;
  logic [SEW-1:0] ea1, eb1, ec1;
  logic [1:0] invalid;
  int checks = 0, failures = 0;

  maf_operand_select dut (.*);

  function automatic logic [63:0] man(input logic [63:0] x, input bit d, input int lane);
    if (d) return (x & 64'hF_FFFF_FFFF_FFFF) + 64'h10_0000_0000_0000;
    return ((x >> (32 * lane)) & 64'h7F_FFFF) + 64'h80_0000;
  endfunction
  function automatic int ex(input logic [63:0] x, input bit d, input int lane);
    if (d) return int'((x >> 52) % 2048);
    return int'((x >> (32 * lane + 23)) % 256);
  endfunction

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s dbl=%0d got=%h exp=%h", what, dbl, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] ops [3];
      dbl = $urandom % 2;
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
      if ($urandom % 8 == 0) a[62:52] = '0;
      if ($urandom % 8 == 0) b[30:23] = '1;
      #1;
      if (dbl) begin
        chk("fa", 64'(fa), man(a, 1, 0));
        chk("fb", 64'(fb), man(b, 1, 0));
        chk("fc", 64'(fc), man(c, 1, 0));
        chk("ea", 64'(ea0), 64'(ex(a, 1, 0)));
        chk("ec", 64'(ec0), 64'(ex(c, 1, 0)));
        chk("inv", 64'(invalid), 64'(
          (ex(a,1,0) == 0 || ex(a,1,0) == 2047 || ex(b,1,0) == 0 || ex(b,1,0) == 2047 ||
           ex(c,1,0) == 0 || ex(c,1,0) == 2047) ? 1 : 0));
      end else begin
        chk("fa", 64'(fa), man(a, 0, 1) * (64'd1 << 25) + man(a, 0, 0));
        chk("fb", 64'(fb), man(b, 0, 1) * (64'd1 << 24) + man(b, 0, 0));
        chk("fc", 64'(fc), man(c, 0, 1) * (64'd1 << 24) + man(c, 0, 0));
        chk("ea0", 64'(ea0), 64'(ex(a, 0, 0)));
        chk("eb1", 64'(eb1), 64'(ex(b, 0, 1)));
        chk("ec1", 64'(ec1), 64'(ex(c, 0, 1)));
        for (int l = 0; l < 2; l++)
          chk("inv", 64'(invalid[l]), 64'(
            (ex(a,0,l) == 0 || ex(a,0,l) == 255 || ex(b,0,l) == 0 || ex(b,0,l) == 255 ||
             ex(c,0,l) == 0 || ex(c,0,l) == 255) ? 1 : 0));
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
