// maf_top: multiple-precision floating-point multiply-add fused unit. Every cycle it
// accepts three 64-bit operands and computes R = A*B + C with a single rounding, either
// as one IEEE double (dbl = 1) or as two independent IEEE singles packed in the upper and
// lower 32 bits (dbl = 0). One double-width datapath is shared: the mantissa multiplier,
// alignment shifter, adder and normalizer are split into two single lanes by precision
// multiplexers, while the exponent unit and the rounder carry a duplicated single lane.
// Pipeline (latency 3, one operation per cycle, no stalls):
//   stage 1 multiply & align: operand unpacking, signs, exponent difference, array
//           multiplier to carry-save form, alignment shift of C, negation, 3-2 CSA;
//   stage 2 add & LZA: 106-bit adder plus incrementer, complementer, leading-zero
//           anticipation in parallel;
//   stage 3 normalize & round: constant + variable normalization shift, rounding, result
//           formatting and exception flags.
// Operands presented with in_valid at clock edge k give out_valid and the result after
// edge k+3. Operands must be normalized numbers (the unit's defined domain); any other
// operand gives a quiet NaN and the invalid flag. Results that underflow are flushed to
// zero. rst_n is a synchronous active-low reset that clears all pipeline registers.
// Assertions in stage 3 check that the normalizer leaves each non-zero lane with its
// leading one at the lane's top bit.
module maf_top
  import maf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        dbl,        // 1: one double, 0: two singles
  input  rmode_e      rm,
  input  logic [63:0] a, b, c,
  output logic        out_valid,
  output logic [63:0] result,
  output maf_flags_t  flags
);
  // ---------------- stage 1: multiply & align ----------------
  logic [DMW-1:0]  fa, fb, fc;
  logic [DEW-1:0]  ea0, eb0, ec0, mexp0;
  logic [SEW-1:0]  ea1, eb1, ec1, mexp1;
  logic [1:0]      invalid, s_ab, s_c, sub, lowwin, c_big, st1, msb_sign;
  logic [13:0]     shamt;
  logic [WW-1:0]   c_al;
  logic [PW-1:0]   psum, pcarry, csa_sum;
  logic [PW:0]     csa_carry;
  logic [MSBW-1:0] c_msb;

  maf_operand_select u_opsel (.dbl, .a, .b, .c, .fa, .fb, .fc,
                              .ea0, .eb0, .ec0, .ea1, .eb1, .ec1, .invalid);
  maf_sign_unit      u_sign  (.dbl, .a, .b, .c, .s_ab, .s_c, .sub);
  maf_exponent_unit  u_exp   (.dbl, .ea0, .eb0, .ec0, .ea1, .eb1, .ec1, .shamt,
                              .maf_exp0(mexp0), .maf_exp1(mexp1), .lowwin, .c_big);
  maf_align_shifter  u_align (.dbl, .fc, .shamt, .c_al, .st1);
  maf_subword_multiplier u_mul (.dbl, .fa, .fb, .psum, .pcarry);
  maf_negate_csa     u_ncsa  (.dbl, .c_al, .sub, .st1, .psum, .pcarry,
                              .c_msb, .msb_sign, .csa_sum, .csa_carry);

  typedef struct packed {
    logic            valid;
    logic            dbl;
    rmode_e          rm;
    logic [MSBW-1:0] c_msb;
    logic [1:0]      msb_sign;
    logic [PW-1:0]   csa_sum;
    logic [PW:0]     csa_carry;
    logic [1:0]      st1;
    logic [1:0]      lowwin;
    logic [DEW-1:0]  mexp0;
    logic [SEW-1:0]  mexp1;
    logic [1:0]      s_ab;
    logic [1:0]      invalid;
  } s1_t;

  typedef struct packed {
    logic            valid;
    logic            dbl;
    rmode_e          rm;
    logic [WW-1:0]   mag;
    logic [1:0]      zero;
    logic [1:0]      sign;
    logic [1:0]      st1;
    logic [1:0]      lowwin;
    logic [11:0]     lz;
    logic [DEW-1:0]  mexp0;
    logic [SEW-1:0]  mexp1;
    logic [1:0]      invalid;
  } s2_t;

  s1_t r1;
  s2_t r2;

  always_ff @(posedge clk) begin
    if (!rst_n) r1 <= '0;
    else r1 <= '{valid: in_valid, dbl: dbl, rm: rm, c_msb: c_msb, msb_sign: msb_sign,
                 csa_sum: csa_sum, csa_carry: csa_carry, st1: st1, lowwin: lowwin,
                 mexp0: mexp0, mexp1: mexp1, s_ab: s_ab, invalid: invalid};
  end

  // ---------------- stage 2: add & LZA ----------------
  logic [WW:0]   sum_w;
  logic [1:0]    neg, zero;
  logic [WW-1:0] mag;
  logic [11:0]   lz;

  maf_mantissa_adder u_add (.dbl(r1.dbl), .c_msb(r1.c_msb), .msb_sign(r1.msb_sign),
                            .csa_sum(r1.csa_sum), .csa_carry(r1.csa_carry),
                            .sum_w, .neg);
  maf_complementer   u_cmp (.dbl(r1.dbl), .sum_w, .neg, .st1(r1.st1), .mag, .zero);
  maf_lza            u_lza (.dbl(r1.dbl), .c_msb(r1.c_msb), .msb_sign(r1.msb_sign),
                            .csa_sum(r1.csa_sum), .csa_carry(r1.csa_carry),
                            .lowwin(r1.lowwin), .lz);

  always_ff @(posedge clk) begin
    if (!rst_n) r2 <= '0;
    else r2 <= '{valid: r1.valid, dbl: r1.dbl, rm: r1.rm, mag: mag, zero: zero,
                 sign: r1.s_ab ^ neg, st1: r1.st1, lowwin: r1.lowwin, lz: lz,
                 mexp0: r1.mexp0, mexp1: r1.mexp1, invalid: r1.invalid};
  end

  // ---------------- stage 3: normalize & round ----------------
  logic [WW-1:0]  norm;
  logic [7:0]     tsh0;
  logic [6:0]     tsh1;
  logic [DEW-1:0] nexp0, rexp0;
  logic [SEW-1:0] nexp1, rexp1;
  logic [DMW-1:0] sig0;
  logic           rb0, sk0, rb1, sk1;
  logic [51:0]    frac0;
  logic [22:0]    frac1;
  logic [1:0]     inexact;
  logic [63:0]    res_d;
  maf_flags_t     flags_d;

  maf_norm_shifter u_norm (.dbl(r2.dbl), .mag(r2.mag), .lowwin(r2.lowwin), .lz(r2.lz),
                           .norm, .tsh0, .tsh1);

  always_comb begin
    nexp0 = r2.mexp0 - DEW'(tsh0);
    nexp1 = r2.mexp1 - SEW'(tsh1);
    if (r2.dbl) begin
      sig0 = norm[160:108];
      rb0  = norm[107];
      sk0  = (|norm[106:0]) | r2.st1[0];
    end else begin
      sig0 = {29'b0, norm[73:50]};
      rb0  = norm[49];
      sk0  = (|norm[48:0]) | r2.st1[0];
    end
    rb1 = norm[124];
    sk1 = (|norm[123:75]) | r2.st1[1];
  end

  maf_rounder #(.MW(DMW), .SW(SMW), .EW(DEW)) u_rnd1 (
    .narrow(~r2.dbl), .sig(sig0), .rbit(rb0), .sticky(sk0), .sign(r2.sign[0]),
    .rm(r2.rm), .exp_in(nexp0), .frac(frac0), .exp_out(rexp0), .inexact(inexact[0]));

  maf_rounder #(.MW(SMW), .SW(SMW), .EW(SEW)) u_rnd2 (
    .narrow(1'b0), .sig(norm[148:125]), .rbit(rb1), .sticky(sk1), .sign(r2.sign[1]),
    .rm(r2.rm), .exp_in(nexp1), .frac(frac1), .exp_out(rexp1), .inexact(inexact[1]));

  maf_result_format u_fmt (.dbl(r2.dbl), .rm(r2.rm), .sign(r2.sign), .exp0(rexp0),
                           .exp1(rexp1), .frac0, .frac1, .inexact_in(inexact),
                           .zero(r2.zero), .invalid(r2.invalid),
                           .result(res_d), .flags(flags_d));

  // After the position correction the leading one of every non-zero lane sits at the
  // lane's top bit; a miss here means the LZA error exceeded the correction range.
  a_norm_dbl: assert property (@(posedge clk) disable iff (!rst_n)
    r2.valid && r2.dbl && !r2.zero[0] |-> norm[160]);
  a_norm_l1:  assert property (@(posedge clk) disable iff (!rst_n)
    r2.valid && !r2.dbl && !r2.zero[0] |-> norm[73]);
  a_norm_l2:  assert property (@(posedge clk) disable iff (!rst_n)
    r2.valid && !r2.dbl && !r2.zero[1] |-> norm[148]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
      flags     <= '0;
    end else begin
      out_valid <= r2.valid;
      result    <= res_d;
      flags     <= flags_d;
    end
  end
endmodule
