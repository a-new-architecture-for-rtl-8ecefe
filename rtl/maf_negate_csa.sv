// maf_negate_csa: two's complement of the aligned addend and the 3-2 CSA that adds it to
// the product. Negation comes after alignment, so the shifter only ever shifts in zeros:
// for an effective subtraction the lane's window bits are inverted (double: all 161 bits
// by sub[0]; single: bits 73:0 by sub[0] and bits 160:75 by sub[1]). Multiplexers M4/M5
// then repack the result: M5 gives the 106-bit low part that lines up with the product
// (double: bits 105:0; single: {9'b0, lane-2 bits 122:75, 1'b0, lane-1 bits 47:0}) and M4
// the 55-bit high part handled later by the incrementer (double: bits 160:106; single:
// {2'b0, lane-2 bits 148:123, 1'b0, lane-1 bits 73:48}). The sign of each lane's negated
// addend leaves as msb_sign. The 3-2 CSA adds product sum, product carry and the low part.
// The missing +1 of the two's complement goes into the CSA carry word's empty slots: bit 0
// gets sub & ~st1 (double or lane 1) and, in single mode, bit 49 gets lane 2's
// sub & ~st1; in double mode bit 49 keeps its normal carry. When bits of C were shifted
// out (st1 = 1), the inverted window plus the lost fraction is already exact, so no +1 is
// added. Combinational.
module maf_negate_csa
  import maf_pkg::*;
(
  input  logic            dbl,
  input  logic [WW-1:0]   c_al,
  input  logic [1:0]      sub,
  input  logic [1:0]      st1,
  input  logic [PW-1:0]   psum, pcarry,
  output logic [MSBW-1:0] c_msb,
  output logic [1:0]      msb_sign,
  output logic [PW-1:0]   csa_sum,
  output logic [PW:0]     csa_carry
);
  logic [WW-1:0] inv, neg;
  logic [PW-1:0] c_lsb, maj;

  assign inv = dbl ? {WW{sub[0]}} : {{(WW-L2LO){sub[1]}}, {L2LO{sub[0]}}};
  assign neg = c_al ^ inv;

  assign c_msb = dbl ? neg[160:106] : {2'b00, neg[148:123], 1'b0, neg[73:48]};
  assign c_lsb = dbl ? neg[105:0]   : {9'b0, neg[122:75], 1'b0, neg[47:0]};
  assign msb_sign = dbl ? {1'b0, sub[0]} : sub;

  assign csa_sum = psum ^ pcarry ^ c_lsb;
  assign maj     = (psum & pcarry) | (psum & c_lsb) | (pcarry & c_lsb);

  always_comb begin
    csa_carry     = {maj, 1'b0};
    csa_carry[0]  = sub[0] & ~st1[0];
    if (!dbl)
      csa_carry[49] = sub[1] & ~st1[1];
  end
endmodule
