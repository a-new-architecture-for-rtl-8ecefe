// maf_exp_path: one exponent-difference datapath. Adder 1 forms ea + eb - OFF through a
// 3-2 CSA and a carry-propagate add (OFF is 967 for double, 100 for single, so the sum is
// the biased exponent of the top bit of the alignment window). Adder 2 subtracts ec by
// adding its inversion plus one, giving the alignment shift amount delta. Shift adjust
// clamps delta to [0, maxsh]. The MAF exponent (exponent of the top window bit) is
// Adder 1 when delta >= 0 and ec when C is so large that the shift clamps at zero.
// lowwin tells the normalizer that the result's leading one can only be in the low part
// of the window (delta >= lowthr), so its constant shift step is taken. All arithmetic
// is W-bit two's complement; W = 13 holds every double case, W = 10 every single case.
// Purely combinational.
module maf_exp_path #(
  parameter int unsigned W = 13
) (
  input  logic [W-1:0] ea, eb, ec,   // biased exponents, zero-extended
  input  logic [W-1:0] off,          // OFF, positive
  input  logic [7:0]   maxsh,        // largest useful shift
  input  logic [7:0]   lowthr,       // delta at which the constant normalize shift applies
  output logic [7:0]   shamt,        // clamped alignment shift
  output logic [W-1:0] maf_exp,      // exponent of the window's top bit
  output logic         lowwin,
  output logic         c_big         // delta < 0: alignment clamped to zero
);
  logic [W-1:0] csa_s, csa_c, add1, add2;
  logic [W-1:0] noff;

  assign noff  = ~off + 1'b1;
  // 3-2 CSA of ea, eb and -OFF
  assign csa_s = ea ^ eb ^ noff;
  assign csa_c = ((ea & eb) | (ea & noff) | (eb & noff)) << 1;
  assign add1  = csa_s + csa_c;                 // Adder 1
  assign add2  = add1 + ~ec + 1'b1;             // Adder 2: add1 - ec

  always_comb begin
    c_big  = add2[W-1];
    lowwin = !add2[W-1] && ($signed(add2) >= $signed({{(W-8){1'b0}}, lowthr}));
    if (add2[W-1])
      shamt = '0;
    else if ($signed(add2) > $signed({{(W-8){1'b0}}, maxsh}))
      shamt = maxsh;
    else
      shamt = add2[7:0];
    maf_exp = c_big ? ec : add1;                 // M2
  end
endmodule
