// maf_exponent_unit: exponent processing of the MAF unit. The double-precision datapath
// (13 bits) also serves single lane 1 in single mode, its constant, clamp limit and
// threshold switched by the precision mode (multiplexer M1 of the exponent unit); a
// duplicated 10-bit single datapath serves lane 2. The two shift amounts leave as the
// 14-bit shift bus of the alignment shifter: bits 7:0 hold the double shift (0..161), or
// bits 6:0 the lane-1 and bits 13:7 the lane-2 single shift (0..74). Combinational.
module maf_exponent_unit
  import maf_pkg::*;
(
  input  logic           dbl,
  input  logic [DEW-1:0] ea0, eb0, ec0,
  input  logic [SEW-1:0] ea1, eb1, ec1,
  output logic [13:0]    shamt,
  output logic [DEW-1:0] maf_exp0,
  output logic [SEW-1:0] maf_exp1,
  output logic [1:0]     lowwin,
  output logic [1:0]     c_big
);
  logic [7:0] sh0, sh1;
  logic       lw0, lw1, cb0, cb1;

  maf_exp_path #(.W(DEW)) u_dp0 (
    .ea(ea0), .eb(eb0), .ec(ec0),
    .off   (dbl ? DEW'(DOFF) : DEW'(SOFF)),
    .maxsh (dbl ? 8'(DMAXSH) : 8'(SMAXSH)),
    .lowthr(dbl ? 8'd54 : 8'd25),
    .shamt(sh0), .maf_exp(maf_exp0), .lowwin(lw0), .c_big(cb0)
  );

  maf_exp_path #(.W(SEW)) u_dp1 (
    .ea(ea1), .eb(eb1), .ec(ec1),
    .off(SEW'(SOFF)), .maxsh(8'(SMAXSH)), .lowthr(8'd25),
    .shamt(sh1), .maf_exp(maf_exp1), .lowwin(lw1), .c_big(cb1)
  );

  assign shamt  = dbl ? {6'b0, sh0} : {sh1[6:0], sh0[6:0]};
  assign lowwin = {lw1 & ~dbl, lw0};
  assign c_big  = {cb1 & ~dbl, cb0};
endmodule
