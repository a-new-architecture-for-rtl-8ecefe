// maf_lza: leading-zero anticipator, one 108-bit or two 50-bit predictions. It works in
// parallel with the mantissa adder on the same operands, which the operand selector
// forms from the registered CSA sum, CSA carry and aligned-C high part (double: X =
// {sign, C high, sum}, Y = carry; single: the same per lane). After pre-encoding, the
// 108-bit (or 50-bit) part of the indicator string that can hold the leading digit is
// chosen by lowwin, the same exponent-difference decision that drives the normalizer's
// constant shift: double window f[161:54], or f[108:1] when lowwin; single lane window
// f[74:25], or f[50:1]. The windows are packed into a 114-bit string (double at bits
// 113:6; single lane 2 at 113:64 and lane 1 at 49:0), encoded by a 64-bit LOD over bits
// 113:50 and a 50-bit LOD over bits 49:0, and combined like a 128-bit LOD in double mode.
// The 12-bit shift amount is {5'b0, count} (double, 0..108) or {lane-2 count, lane-1
// count} (single, 0..50); the count is the leading-zero count in the window and is off
// by at most one position. The concurrent position-correction trees are not built; the
// normalizer fixes the error after shifting. Combinational.
module maf_lza
  import maf_pkg::*;
(
  input  logic            dbl,
  input  logic [MSBW-1:0] c_msb,
  input  logic [1:0]      msb_sign,
  input  logic [PW-1:0]   csa_sum,
  input  logic [PW:0]     csa_carry,
  input  logic [1:0]      lowwin,
  output logic [11:0]     lz
);
  logic [WW:0]   xd, yd, fd;
  logic [LW:0]   x1, y1, x2, y2, f1, f2;
  logic [113:0]  w;
  logic          v1, v0;
  logic [6:0]    p1, p0;
  logic [6:0]    lzd;
  logic [5:0]    lz1, lz2;

  // operand selector
  assign xd = {msb_sign[0], c_msb, csa_sum};
  assign yd = {55'b0, csa_carry};
  assign x1 = {msb_sign[0], c_msb[25:0], csa_sum[47:0]};
  assign y1 = {26'b0, csa_carry[48:0]};
  assign x2 = {msb_sign[1], c_msb[52:27], csa_sum[96:49]};
  assign y2 = {26'b0, csa_carry[97:49]};

  maf_lza_preenc #(.N(WW+1)) u_pd  (.x(xd), .y(yd), .f(fd));
  maf_lza_preenc #(.N(LW+1)) u_p1  (.x(x1), .y(y1), .f(f1));
  maf_lza_preenc #(.N(LW+1)) u_p2  (.x(x2), .y(y2), .f(f2));

  // window selection (multiplexer M1)
  always_comb begin
    if (dbl)
      w = {(lowwin[0] ? fd[108:1] : fd[161:54]), 6'b0};
    else
      w = {(lowwin[1] ? f2[50:1] : f2[74:25]), 14'b0,
           (lowwin[0] ? f1[50:1] : f1[74:25])};
  end

  maf_lod #(.W(64), .PB(7)) u_lod64 (.f(w[113:50]), .valid(v1), .pos(p1));
  maf_lod #(.W(50), .PB(7)) u_lod50 (.f(w[49:0]),   .valid(v0), .pos(p0));

  always_comb begin
    // LOD 128 combination for double
    if (v1)      lzd = p1;
    else if (v0) lzd = 7'd64 + p0;
    else         lzd = 7'd108;
    if (lzd > 7'd108) lzd = 7'd108;
    lz2 = (v1 && p1 < 7'd50) ? p1[5:0] : 6'd50;
    lz1 = v0 ? p0[5:0] : 6'd50;
    lz  = dbl ? {5'b0, lzd} : {lz2, lz1};
  end
endmodule
