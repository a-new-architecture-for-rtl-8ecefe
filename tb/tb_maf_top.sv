// tb_maf_top: end-to-end test of the multiple-precision MAF unit. Issues one operation
// per cycle with random precision mode and rounding mode, and compares every result and
// flag vector with the exact reference model, both single lanes independently. Checks
// that each result leaves exactly three cycles after it entered. Operand classes:
// random, product and addend of equal magnitude (massive cancellation, negative sums),
// far-apart exponents (alignment clamped at both ends), exponents at the edges of the
// range (overflow, underflow), operands outside the normalized domain (invalid), an
// all-ones mantissa that rounds up into the next binade, and exact cancellation (zero). It counts how often each mechanism of the datapath was
// exercised and fails if one never was. NOPS sets the number of operations.
module tb_maf_top;
  import maf_pkg::*;
  import maf_ref_pkg::*;

  localparam int NOPS = 20000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid, dbl;
  rmode_e      rm;
  logic [63:0] a, b, c;
  logic        out_valid;
  logic [63:0] result;
  maf_flags_t  flags;

  maf_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, in issue order
  typedef struct {
    logic [63:0] res;
    logic [7:0]  fl;     // {lane2 ivuo x, lane1 ivux} as {inv,ov,un,ix} per lane
    int          cyc;
    logic        dbl;
    logic [63:0] a, b, c;
    int          rm;
  } exp_t;
  exp_t q[$];

  // mechanism counters
  int n_dbl, n_sgl, n_switch, n_sub, n_negsum, n_lowwin, n_cbig, n_maxsh, n_st1,
      n_corr, n_rndcarry, n_ovf, n_unf, n_zero, n_inv, n_inexact;

  function automatic logic [63:0] rnd_d(input int emin, input int emax_);
    logic [63:0] v;
    int e;
    e = emin + int'($urandom % (emax_ - emin + 1));
    v = {$urandom, $urandom};
    v[62:52] = 11'(e);
    return v;
  endfunction

  function automatic logic [31:0] rnd_s(input int emin, input int emax_);
    logic [31:0] v;
    int e;
    e = emin + int'($urandom % (emax_ - emin + 1));
    v = $urandom;
    v[30:23] = 8'(e);
    return v;
  endfunction

  // operand triple for one lane; kind selects the operand class
  task automatic gen_lane(input bit isd, input int kind,
                          output logic [63:0] oa, output logic [63:0] ob, output logic [63:0] oc);
    int bias, mx;
    logic [63:0] p;
    real ra, rb;
    bias = isd ? 1023 : 127;
    mx   = isd ? 2046 : 254;
    if (isd) begin oa = rnd_d(bias - 40, bias + 40); ob = rnd_d(bias - 40, bias + 40); end
    else begin oa = 64'(rnd_s(bias - 20, bias + 20)); ob = 64'(rnd_s(bias - 20, bias + 20)); end
    case (kind)
      0: oc = isd ? rnd_d(bias - 90, bias + 90) : 64'(rnd_s(bias - 45, bias + 45));
      1, 2: begin  // C close to -A*B: cancellation
        if (isd) begin
          ra = $bitstoreal(oa); rb = $bitstoreal(ob);
          p = $realtobits(ra * rb);
        end else begin
          ra = $bitstoreal({oa[31], 3'b0, oa[30:0], 29'b0} + (64'd896 << 52));
          rb = $bitstoreal({ob[31], 3'b0, ob[30:0], 29'b0} + (64'd896 << 52));
          p = $realtobits(ra * rb);
          p = 64'({p[63], 8'(p[62:52] - 11'd896), p[51:29]});
        end
        oc = p;
        if (isd) oc[63] = ~p[63]; else oc[31] = ~p[31];
        if (kind == 2) oc = oc ^ 64'($urandom % 8);   // near, not exact
      end
      3: oc = isd ? rnd_d(1, mx) : 64'(rnd_s(1, mx));    // far apart exponents
      4: begin  // edges of the exponent range
        if ($urandom % 2) begin
          oa = isd ? rnd_d(mx - 60, mx) : 64'(rnd_s(mx - 15, mx));
          ob = isd ? rnd_d(bias, bias + 60) : 64'(rnd_s(bias, bias + 15));
          oc = isd ? rnd_d(1, mx) : 64'(rnd_s(1, mx));
        end else begin
          oa = isd ? rnd_d(1, 60) : 64'(rnd_s(1, 15));
          ob = isd ? rnd_d(bias - 60, bias) : 64'(rnd_s(bias - 15, bias));
          oc = isd ? rnd_d(1, 60) : 64'(rnd_s(1, 15));
        end
      end
      6: begin  // all-ones mantissa times one: rounding carries out of the mantissa
        if (isd) begin oa[51:0] = '1; ob[51:0] = '0; oc = rnd_d(bias - 120, bias - 60); end
        else begin oa[22:0] = '1; ob[22:0] = '0; oc = 64'(rnd_s(bias - 40, bias - 26)); end
      end
      7: begin  // short mantissas, C = -A*B exactly: zero sum
        if (isd) oa[25:0] = '0; else oa[11:0] = '0;
        if (isd) ob[25:0] = '0; else ob[11:0] = '0;
        if (isd) begin
          p = $realtobits($bitstoreal(oa) * $bitstoreal(ob));
          oc = {~p[63], p[62:0]};
        end else begin
          ra = $bitstoreal({oa[31], 3'b0, oa[30:0], 29'b0} + (64'd896 << 52));
          rb = $bitstoreal({ob[31], 3'b0, ob[30:0], 29'b0} + (64'd896 << 52));
          p = $realtobits(ra * rb);
          oc = 64'({~p[63], 8'(p[62:52] - 11'd896), p[51:29]});
        end
      end
      default: begin  // operand outside the normalized domain
        oc = isd ? rnd_d(1, mx) : 64'(rnd_s(1, mx));
        if (isd) oa[62:52] = ($urandom % 2) ? '0 : '1;
        else     oa[30:23] = ($urandom % 2) ? '0 : '1;
      end
    endcase
  endtask

  function automatic int pick_kind();
    int r;
    r = int'($urandom % 100);
    if (r < 40) return 0;
    if (r < 55) return 1;
    if (r < 70) return 2;
    if (r < 80) return 3;
    if (r < 90) return 4;
    if (r < 93) return 6;
    if (r < 97) return 7;
    return 5;
  endfunction

  task automatic issue();
    exp_t e;
    logic [63:0] a1, b1, c1, a2, b2, c2;
    logic [3:0]  f1, f2;
    logic [63:0] r1, r2;
    e.dbl = $urandom % 2;
    e.rm  = int'($urandom % 4);
    if (e.dbl) begin
      gen_lane(1'b1, pick_kind(), a1, b1, c1);
      e.a = a1; e.b = b1; e.c = c1;
      e.res = fma(1'b1, a1, b1, c1, e.rm, f1);
      e.fl  = {4'b0, f1};
    end else begin
      gen_lane(1'b0, pick_kind(), a1, b1, c1);
      gen_lane(1'b0, pick_kind(), a2, b2, c2);
      e.a = {a2[31:0], a1[31:0]}; e.b = {b2[31:0], b1[31:0]}; e.c = {c2[31:0], c1[31:0]};
      r1 = fma(1'b0, 64'(a1[31:0]), 64'(b1[31:0]), 64'(c1[31:0]), e.rm, f1);
      r2 = fma(1'b0, 64'(a2[31:0]), 64'(b2[31:0]), 64'(c2[31:0]), e.rm, f2);
      e.res = {r2[31:0], r1[31:0]};
      e.fl  = {f2, f1};
    end
    e.cyc = cycle;
    dbl <= e.dbl; rm <= rmode_e'(e.rm); a <= e.a; b <= e.b; c <= e.c; in_valid <= 1'b1;
    q.push_back(e);
  endtask

  // result checking
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      logic [7:0] got;
      got = {flags.invalid[1], flags.overflow[1], flags.underflow[1], flags.inexact[1],
             flags.invalid[0], flags.overflow[0], flags.underflow[0], flags.inexact[0]};
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result");
      end else begin
        e = q.pop_front();
        checks++;
        if (result !== e.res || got !== e.fl || cycle - e.cyc != 4) begin
          failures++;
          if (failures < 10)
            $display("FAIL dbl=%0d rm=%0d a=%h b=%h c=%h got=%h/%b exp=%h/%b lat=%0d",
                     e.dbl, e.rm, e.a, e.b, e.c, result, got, e.res, e.fl, cycle - e.cyc - 1);
        end
        if (got[3] | got[7]) n_inv++;
        if (got[2] | got[6]) n_ovf++;
        if (got[1] | got[5]) n_unf++;
        if (got[0] | got[4]) n_inexact++;
      end
    end
  end

  // mechanism observation inside the pipeline
  logic prev_dbl;
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid) begin
        if (dbl) n_dbl++; else n_sgl++;
        if (dbl != prev_dbl) n_switch++;
        prev_dbl <= dbl;
        if (|dut.sub)    n_sub++;
        if (|dut.lowwin) n_lowwin++;
        if (|(dut.c_big & ~dut.invalid)) n_cbig++;
        if (|dut.st1)    n_st1++;
        if (dbl ? (dut.shamt[7:0] == 8'd161) : (dut.shamt[6:0] == 7'd74 || dut.shamt[13:7] == 7'd74))
          n_maxsh++;
      end
      if (dut.r1.valid && |(dut.neg & ~dut.r1.invalid)) n_negsum++;
      if (dut.r2.valid && |(dut.r2.zero & ~dut.r2.invalid)) n_zero++;
      if (dut.r2.valid && (dut.u_norm.k0 != 2'd2 || (!dut.r2.dbl && dut.u_norm.k1 != 2'd2)))
        n_corr++;
      if (dut.r2.valid && (dut.rexp0 != dut.nexp0 || (!dut.r2.dbl && dut.rexp1 != dut.nexp1)))
        n_rndcarry++;
    end
  end

  task automatic need(input string name, input int n);
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL: mechanism %s never exercised", name); end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; dbl = 1'b1; rm = RM_RNE; a = '0; b = '0; c = '0;
    prev_dbl = 1'b1;
    {n_dbl, n_sgl, n_switch, n_sub, n_negsum, n_lowwin, n_cbig, n_maxsh, n_st1,
     n_corr, n_rndcarry, n_ovf, n_unf, n_zero, n_inv, n_inexact} = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < NOPS; i++) begin
      issue();
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (6) @(posedge clk);
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    need("double operations", n_dbl);
    need("paired single operations", n_sgl);
    need("precision mode switches", n_switch);
    need("effective subtractions", n_sub);
    need("negative sums complemented", n_negsum);
    need("constant normalize shift", n_lowwin);
    need("alignment clamped at zero", n_cbig);
    need("alignment clamped at max", n_maxsh);
    need("alignment sticky st1", n_st1);
    need("LZA off-by-one corrected", n_corr);
    need("rounding carry-out", n_rndcarry);
    need("overflow", n_ovf);
    need("underflow", n_unf);
    need("exact zero sum", n_zero);
    need("invalid operand", n_inv);
    need("inexact", n_inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NOPS + 1000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
