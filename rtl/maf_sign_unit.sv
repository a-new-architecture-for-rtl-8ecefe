// maf_sign_unit: 2-bit sign processing. The product sign of each lane is the XOR of the
// A and B signs; in double mode bit 1 is forced to zero and bit 0 takes the double sign
// (bit 63), in single mode bit 1 is lane 2 (bit 63) and bit 0 lane 1 (bit 31). The
// effective-subtraction flag of each lane is product sign XOR C sign, in the same
// layout. Purely combinational.
module maf_sign_unit (
  input  logic       dbl,
  input  logic [63:0] a, b, c,
  output logic [1:0] s_ab,   // product signs
  output logic [1:0] s_c,    // addend signs
  output logic [1:0] sub     // effective subtraction
);
  logic x_hi, x_lo;
  assign x_hi = a[63] ^ b[63];
  assign x_lo = a[31] ^ b[31];
  assign s_ab = dbl ? {1'b0, x_hi}  : {x_hi, x_lo};
  assign s_c  = dbl ? {1'b0, c[63]} : {c[63], c[31]};
  assign sub  = s_ab ^ s_c;
endmodule
