// maf_operand_select: precision-mode multiplexers M1, M2 and M3 of the MAF unit.
// A 64-bit register holds one double or two singles (single lane 2 in bits 63:32,
// lane 1 in bits 31:0). With double=1 the 53-bit mantissa bus gets {1, fraction}; with
// double=0 it gets the two 24-bit single mantissas with the hidden ones restored. A is
// placed as {A2 at 48:25, 0 at 24, A1 at 23:0}; B and C as {B2 at 47:24, B1 at 23:0},
// exactly the operand positions of the multiplier and alignment shifter. Exponents go
// out zero-extended: the 13-bit bus carries the double exponent or the lane-1 exponent,
// the 10-bit bus the lane-2 exponent. An operand whose exponent is all zeros or all ones
// (zero, subnormal, infinity, NaN) is not a normalized number and is flagged invalid per
// lane; handling of such operands is this design's own addition. Purely combinational.
module maf_operand_select
  import maf_pkg::*;
(
  input  logic            dbl,       // 1: one double operation, 0: two single operations
  input  logic [63:0]     a, b, c,
  output logic [DMW-1:0]  fa, fb, fc,
  output logic [DEW-1:0]  ea0, eb0, ec0,   // double or single lane 1
  output logic [SEW-1:0]  ea1, eb1, ec1,   // single lane 2
  output logic [1:0]      invalid
);
  function automatic logic bad_d(input logic [63:0] x);
    return (x[62:52] == '0) || (x[62:52] == '1);
  endfunction
  function automatic logic bad_s(input logic [31:0] x);
    return (x[30:23] == '0) || (x[30:23] == '1);
  endfunction

  always_comb begin
    if (dbl) begin
      fa  = {1'b1, a[51:0]};
      fb  = {1'b1, b[51:0]};
      fc  = {1'b1, c[51:0]};
      ea0 = {2'b00, a[62:52]};
      eb0 = {2'b00, b[62:52]};
      ec0 = {2'b00, c[62:52]};
      ea1 = '0;
      eb1 = '0;
      ec1 = '0;
      invalid = {1'b0, bad_d(a) | bad_d(b) | bad_d(c)};
    end else begin
      fa  = {4'b0000, 1'b1, a[54:32], 1'b0, 1'b1, a[22:0]};
      fb  = {5'b00000, 1'b1, b[54:32], 1'b1, b[22:0]};
      fc  = {5'b00000, 1'b1, c[54:32], 1'b1, c[22:0]};
      ea0 = {5'b0, a[30:23]};
      eb0 = {5'b0, b[30:23]};
      ec0 = {5'b0, c[30:23]};
      ea1 = {2'b0, a[62:55]};
      eb1 = {2'b0, b[62:55]};
      ec1 = {2'b0, c[62:55]};
      invalid = {bad_s(a[63:32]) | bad_s(b[63:32]) | bad_s(c[63:32]),
                 bad_s(a[31:0])  | bad_s(b[31:0])  | bad_s(c[31:0])};
    end
  end
endmodule
