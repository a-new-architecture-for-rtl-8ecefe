// maf_mantissa_adder: the 161-bit mantissa adder, built as a 106-bit carry-propagate
// adder for the low part (CSA sum + CSA carry) and an incrementer for the 55-bit high
// part of the aligned addend, whose carry-in is the adder's carry-out. The adder itself
// needs no lane split: in single mode bit 48 of both words is the empty separator, so the
// lane-1 carry-out lands in result bit 48 and lane 2's in bit 97. The incrementer is split
// in two carry-select halves (incremented and unincremented value, chosen by the incoming
// carry). The low half takes the lane-1 high part with its sign (single) or bits 26:0 of
// the high part (double); the high half takes lane 2 (single) or the remaining bits with
// the double sign, chained to the low half's carry-out in double mode.
// Output sum_w is the signed sum in window layout: double uses bits 161:0 (bit 161 is the
// sign); single lane 1 uses bits 74:0 (sign at 74) and lane 2 bits 149:75 (sign at 149).
// neg gives the lane signs. Combinational.
module maf_mantissa_adder
  import maf_pkg::*;
(
  input  logic            dbl,
  input  logic [MSBW-1:0] c_msb,
  input  logic [1:0]      msb_sign,
  input  logic [PW-1:0]   csa_sum,
  input  logic [PW:0]     csa_carry,
  output logic [WW:0]     sum_w,
  output logic [1:0]      neg
);
  logic [PW:0]  res;
  logic [26:0]  lo_in, lo_out;
  logic [28:0]  hi_in, hi_out;
  logic         lo_cin, lo_cout, hi_cin;

  assign res = {1'b0, csa_sum} + csa_carry;           // 106-bit CPA with carry-out

  always_comb begin
    lo_in  = dbl ? c_msb[26:0] : {msb_sign[0], c_msb[25:0]};
    hi_in  = dbl ? {msb_sign[0], c_msb[54:27]}
                 : {{3{msb_sign[1]}}, c_msb[52:27]};
    lo_cin = dbl ? res[106] : res[48];
    lo_out = lo_cin ? lo_in + 1'b1 : lo_in;
    lo_cout = lo_cin & (&lo_in);
    hi_cin = dbl ? lo_cout : res[97];
    hi_out = hi_cin ? hi_in + 1'b1 : hi_in;

    if (dbl) begin
      sum_w = {hi_out, lo_out, res[105:0]};
      neg   = {1'b0, hi_out[28]};
    end else begin
      sum_w = {12'b0, hi_out[26:0], res[96:49], lo_out, res[47:0]};
      neg   = {hi_out[26], lo_out[26]};
    end
  end
endmodule
