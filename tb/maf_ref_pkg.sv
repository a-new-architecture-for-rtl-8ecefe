// maf_ref_pkg: exact reference model of IEEE fused multiply-add for testbenches. The
// product and addend are placed as integers on a common binary scale (RW bits wide) and
// added exactly; the result is then normalized and rounded once. When the two terms are
// so far apart that one of them can only act as a sticky bit, it is replaced by a single
// unit far below the other one, which rounds identically. Conventions match the unit
// under test: operands with exponent field 0 or all ones give the default quiet NaN and
// the invalid flag, results below the normal range are flushed to a signed zero
// (underflow + inexact), overflow follows the rounding mode, an exact zero sum is +0
// (-0 when rounding toward -infinity). Flags are {invalid, overflow, underflow, inexact}.
package maf_ref_pkg;
  localparam int RW = 640;

  function automatic logic [63:0] fma(input bit is_dbl, input logic [63:0] a,
                                      input logic [63:0] b, input logic [63:0] c,
                                      input int rm, output logic [3:0] fl);
    int mb, eb, bias, emax;
    logic sa, sb, sc, sp, sr;
    int ea, ebb, ec, ep, ecl, lo, q, e;
    logic [RW-1:0] x, y, mag, m, one;
    logic [63:0] fa, fb, fcc;
    logic rbit, sticky, up;
    mb   = is_dbl ? 52 : 23;
    eb   = is_dbl ? 11 : 8;
    bias = is_dbl ? 1023 : 127;
    emax = (1 << eb) - 1;
    fl   = '0;
    sa = a[mb+eb]; sb = b[mb+eb]; sc = c[mb+eb];
    ea  = int'((a >> mb) & 64'(emax));
    ebb = int'((b >> mb) & 64'(emax));
    ec  = int'((c >> mb) & 64'(emax));
    if (ea == 0 || ea == emax || ebb == 0 || ebb == emax || ec == 0 || ec == emax) begin
      fl = 4'b1000;
      return is_dbl ? 64'h7FF8000000000000 : 64'h7FC00000;
    end
    fa  = (a & ((64'd1 << mb) - 1)) | (64'd1 << mb);
    fb  = (b & ((64'd1 << mb) - 1)) | (64'd1 << mb);
    fcc = (c & ((64'd1 << mb) - 1)) | (64'd1 << mb);
    x = RW'(fa) * RW'(fb);
    y = RW'(fcc);
    ep  = ea + ebb - 2 * bias - 2 * mb;     // exponent of the product's LSB
    ecl = ec - bias - mb;                   // exponent of the addend's LSB
    if (ecl - ep > 200) begin x = 1; ep = ecl - 200; end
    if (ep - ecl > 300) begin y = 1; ecl = ep - 300; end
    lo = (ep < ecl) ? ep : ecl;
    x = x << (ep - lo);
    y = y << (ecl - lo);
    sp = sa ^ sb;
    if (sp == sc) begin
      mag = x + y; sr = sp;
    end else if (x >= y) begin
      mag = x - y; sr = sp;
    end else begin
      mag = y - x; sr = sc;
    end
    if (mag == 0) begin
      return (rm == 3) ? (is_dbl ? 64'h8000000000000000 : 64'h80000000) : 64'd0;
    end
    q = 0;
    for (int i = RW - 1; i >= 0; i--) if (mag[i]) begin q = i; break; end
    one = 1;
    if (q > mb) begin
      m      = mag >> (q - mb);
      rbit   = mag[q-mb-1];
      sticky = (mag & ((one << (q - mb - 1)) - 1)) != 0;
    end else begin
      m = mag << (mb - q);
      rbit = 0; sticky = 0;
    end
    e = q + lo + bias;
    case (rm)
      0: up = rbit & (sticky | m[0]);
      1: up = 0;
      2: up = ~sr & (rbit | sticky);
      default: up = sr & (rbit | sticky);
    endcase
    m = m + RW'(up);
    if (m[mb+1]) begin m = m >> 1; e = e + 1; end
    if (e >= emax) begin
      fl = 4'b0101;
      if (rm == 1 || (rm == 2 && sr) || (rm == 3 && !sr))
        return (64'(sr) << (mb + eb)) | (64'(emax - 1) << mb) | ((64'd1 << mb) - 1);
      return (64'(sr) << (mb + eb)) | (64'(emax) << mb);
    end
    if (e <= 0) begin
      fl = 4'b0011;
      return 64'(sr) << (mb + eb);
    end
    fl = {3'b000, rbit | sticky};
    return (64'(sr) << (mb + eb)) | (64'(e) << mb) | (m[63:0] & ((64'd1 << mb) - 1));
  endfunction
endpackage
