// maf_lane_pack: result formatting and exception generation for one lane. Takes the
// rounded sign, signed exponent (EW bits) and fraction (FW bits) and produces the IEEE
// word with EB exponent bits: an exponent at or above the all-ones code overflows (to
// infinity or to the largest finite number, as the rounding mode and sign require); an
// exponent at or below zero underflows and is flushed to a signed zero; an exactly zero
// sum gives +0, or -0 when rounding toward -infinity; an invalid operand gives the
// default quiet NaN. Combinational.
module maf_lane_pack
  import maf_pkg::*;
#(
  parameter int unsigned EW = 13,
  parameter int unsigned EB = 11,
  parameter int unsigned FW = 52
) (
  input  logic             sign,
  input  logic [EW-1:0]    exp_in,
  input  logic [FW-1:0]    frac,
  input  logic             inexact_in,
  input  logic             zero,
  input  logic             invalid,
  input  rmode_e           rm,
  output logic [EB+FW:0]   word,
  output logic             overflow,
  output logic             underflow,
  output logic             inexact
);
  localparam logic [EW-1:0] EMAX = EW'((1 << EB) - 1);

  always_comb begin
    overflow  = 1'b0;
    underflow = 1'b0;
    inexact   = 1'b0;
    if (invalid) begin
      word = {1'b0, {EB{1'b1}}, 1'b1, {(FW-1){1'b0}}};
    end else if (zero) begin
      word = {(rm == RM_RDN), {(EB+FW){1'b0}}};
    end else if ($signed(exp_in) >= $signed(EMAX)) begin
      overflow = 1'b1;
      inexact  = 1'b1;
      if (rm == RM_RTZ || (rm == RM_RUP && sign) || (rm == RM_RDN && !sign))
        word = {sign, {(EB-1){1'b1}}, 1'b0, {FW{1'b1}}};   // largest finite
      else
        word = {sign, {EB{1'b1}}, {FW{1'b0}}};             // infinity
    end else if ($signed(exp_in) <= 0) begin
      underflow = 1'b1;
      inexact   = 1'b1;
      word = {sign, {(EB+FW){1'b0}}};
    end else begin
      inexact = inexact_in;
      word = {sign, exp_in[EB-1:0], frac};
    end
  end
endmodule
