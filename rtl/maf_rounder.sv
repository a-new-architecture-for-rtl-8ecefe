// maf_rounder: rounds one normalized mantissa given its round bit and sticky bit, in one
// of the four IEEE rounding modes: to nearest even, toward zero, toward +infinity,
// toward -infinity (the last two use the result sign). A carry out of the rounding
// increment renormalizes the mantissa to 1.000... and raises the exponent by one.
// The mantissa is MW bits wide with its leading one at sig[MW-1]; when narrow is set it
// is instead an SW-bit mantissa in sig[SW-1:0] (upper bits zero) and the fraction leaves
// in frac[SW-2:0]. Rounder 1 (MW = 53, SW = 24) thus serves double precision and single
// lane 1; the duplicated rounder 2 (MW = SW = 24) serves single lane 2. Combinational.
module maf_rounder
  import maf_pkg::*;
#(
  parameter int unsigned MW = 53,
  parameter int unsigned SW = 24,
  parameter int unsigned EW = 13
) (
  input  logic          narrow,
  input  logic [MW-1:0] sig,
  input  logic          rbit,
  input  logic          sticky,
  input  logic          sign,
  input  rmode_e        rm,
  input  logic [EW-1:0] exp_in,
  output logic [MW-2:0] frac,
  output logic [EW-1:0] exp_out,
  output logic          inexact
);
  logic        up, cout;
  logic [MW:0] inc;

  always_comb begin
    inexact = rbit | sticky;
    unique case (rm)
      RM_RNE:  up = rbit & (sticky | sig[0]);
      RM_RTZ:  up = 1'b0;
      RM_RUP:  up = ~sign & inexact;
      RM_RDN:  up = sign & inexact;
      default: up = 1'b0;
    endcase
    inc  = {1'b0, sig} + (MW+1)'(up);
    cout = narrow ? inc[SW] : inc[MW];
    frac = cout ? '0 : (narrow ? (MW-1)'(inc[SW-2:0]) : inc[MW-2:0]);
    exp_out = exp_in + EW'(cout);
  end
endmodule
