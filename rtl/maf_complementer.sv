// maf_complementer: magnitude of the signed mantissa sums. A negative lane is replaced
// by its two's complement. If bits of C were shifted out during alignment (st1 = 1) the
// exact sum is the window value plus a positive fraction, and its magnitude is then the
// one's complement of the window plus a positive fraction, so the +1 is left out; the
// fraction remains represented by st1 in the sticky bit. The output uses the 161-bit
// window layout (double bits 160:0; single lane 1 bits 73:0, lane 2 bits 148:75) and
// flags lanes whose sum is exactly zero. Combinational.
module maf_complementer
  import maf_pkg::*;
(
  input  logic          dbl,
  input  logic [WW:0]   sum_w,
  input  logic [1:0]    neg,
  input  logic [1:0]    st1,
  output logic [WW-1:0] mag,
  output logic [1:0]    zero
);
  logic [1:0] inc;
  assign inc = ~st1;

  always_comb begin
    logic [WW-1:0] d;
    logic [LW-1:0] l1, l2;
    d  = neg[0] ? (~sum_w[WW-1:0] + WW'(inc[0])) : sum_w[WW-1:0];
    l1 = neg[0] ? (~sum_w[LW-1:0] + LW'(inc[0])) : sum_w[LW-1:0];
    l2 = neg[1] ? (~sum_w[L2LO+LW-1:L2LO] + LW'(inc[1])) : sum_w[L2LO+LW-1:L2LO];
    if (dbl) begin
      mag  = d;
      zero = {1'b0, (d == '0) & ~st1[0]};
    end else begin
      mag  = {12'b0, l2, 1'b0, l1};
      zero = {(l2 == '0) & ~st1[1], (l1 == '0) & ~st1[0]};
    end
  end
endmodule
