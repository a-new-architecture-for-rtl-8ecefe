// maf_result_format: result formatter and exception generation. Two lane packers (a
// double-format one that also serves single lane 1, and a single-format one for lane 2)
// build the IEEE words and flags, and the precision mode selects the 64-bit result:
// the double word, or {lane 2, lane 1} singles. Flags are per lane (bit 0: double or
// lane 1). Combinational.
module maf_result_format
  import maf_pkg::*;
(
  input  logic           dbl,
  input  rmode_e         rm,
  input  logic [1:0]     sign,
  input  logic [DEW-1:0] exp0,
  input  logic [SEW-1:0] exp1,
  input  logic [51:0]    frac0,      // double fraction, or lane-1 fraction in bits 22:0
  input  logic [22:0]    frac1,
  input  logic [1:0]     inexact_in,
  input  logic [1:0]     zero,
  input  logic [1:0]     invalid,
  output logic [63:0]    result,
  output maf_flags_t     flags
);
  logic [63:0] wd;
  logic [31:0] w1, w2;
  logic        ovd, unf_d, ixd, ov1, un1, ix1, ov2, un2, ix2;

  maf_lane_pack #(.EW(DEW), .EB(11), .FW(52)) u_pd (
    .sign(sign[0]), .exp_in(exp0), .frac(frac0), .inexact_in(inexact_in[0]),
    .zero(zero[0]), .invalid(invalid[0]), .rm(rm),
    .word(wd), .overflow(ovd), .underflow(unf_d), .inexact(ixd));

  maf_lane_pack #(.EW(DEW), .EB(8), .FW(23)) u_p1 (
    .sign(sign[0]), .exp_in(exp0), .frac(frac0[22:0]), .inexact_in(inexact_in[0]),
    .zero(zero[0]), .invalid(invalid[0]), .rm(rm),
    .word(w1), .overflow(ov1), .underflow(un1), .inexact(ix1));

  maf_lane_pack #(.EW(SEW), .EB(8), .FW(23)) u_p2 (
    .sign(sign[1]), .exp_in(exp1), .frac(frac1), .inexact_in(inexact_in[1]),
    .zero(zero[1]), .invalid(invalid[1]), .rm(rm),
    .word(w2), .overflow(ov2), .underflow(un2), .inexact(ix2));

  always_comb begin
    if (dbl) begin
      result = wd;
      flags  = '{invalid: {1'b0, invalid[0]}, overflow: {1'b0, ovd},
                 underflow: {1'b0, unf_d}, inexact: {1'b0, ixd}};
    end else begin
      result = {w2, w1};
      flags  = '{invalid: invalid, overflow: {ov2, ov1},
                 underflow: {un2, un1}, inexact: {ix2, ix1}};
    end
  end
endmodule
