// maf_subword_multiplier: 53-bit mantissa multiplier that computes one 53x53 product or
// two independent 24x24 products. It is an array (non-Booth) multiplier: partial-product
// bit a_i*b_j is generated as double & a_i & b_j in the region that only a double
// multiplication uses and as a_i & b_j in the two regions used by the single products
// (A1xB1: i,j < 24; A2xB2: 25 <= i <= 48, 24 <= j <= 47). In single mode the cross terms
// are zero, so the lane-1 product occupies bits 47:0, bit 48 stays empty and the lane-2
// product occupies bits 96:49. The 53 partial-product rows are reduced by a tree of 3-2
// carry-save adders (Wallace order) to a sum and a carry word; nothing is added into the
// carry word's bit 0. Because all rows are non-negative and the tree keeps two spare bits
// at the top, sum + carry equals the exact product, both words stay below 2^106 and no
// carry ever crosses the empty bit 48 between the single lanes. Combinational; the
// product is finished by the adder of the next pipeline stage.
module maf_subword_multiplier
  import maf_pkg::*;
(
  input  logic           dbl,
  input  logic [DMW-1:0] fa, fb,
  output logic [PW-1:0]  psum,
  output logic [PW-1:0]  pcarry
);
  localparam int IW = PW + 2;

  function automatic int rows_at(input int lvl);
    int n;
    n = DMW;
    for (int l = 0; l < lvl; l++) n = 2 * (n / 3) + (n % 3);
    return n;
  endfunction

  function automatic int num_levels();
    int n, l;
    n = DMW; l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + (n % 3);
      l++;
    end
    return l;
  endfunction

  localparam int NLEV = num_levels();

  function automatic logic gray(input int i, input int j);
    return ((i < SMW) && (j < SMW)) ||
           ((i >= SMW + 1) && (i <= 2*SMW) && (j >= SMW) && (j < 2*SMW));
  endfunction

  logic [DMW-1:0][IW-1:0] pp;

  // partial products
  always_comb begin
    pp = '0;
    for (int j = 0; j < DMW; j++)
      for (int i = 0; i < DMW; i++)
        pp[j][i+j] = fa[i] & fb[j] & (dbl | gray(i, j));
  end

  // carry-save reduction tree, one generate level per row of 3-2 CSAs
  for (genvar l = 0; l < NLEV; l++) begin : g_lvl
    localparam int N  = rows_at(l);
    localparam int NG = N / 3;
    localparam int NO = rows_at(l + 1);
    logic [N-1:0][IW-1:0]  din;
    logic [NO-1:0][IW-1:0] q;
    if (l == 0) begin : g_first
      assign din = pp;
    end else begin : g_next
      assign din = g_lvl[l-1].q;
    end
    for (genvar g = 0; g < NG; g++) begin : g_csa
      assign q[2*g]   = din[3*g] ^ din[3*g+1] ^ din[3*g+2];
      assign q[2*g+1] = ((din[3*g] & din[3*g+1]) | (din[3*g] & din[3*g+2]) |
                         (din[3*g+1] & din[3*g+2])) << 1;
    end
    for (genvar r = 3 * NG; r < N; r++) begin : g_pass
      assign q[2*NG + r - 3*NG] = din[r];
    end
  end

  assign psum   = g_lvl[NLEV-1].q[0][PW-1:0];
  assign pcarry = g_lvl[NLEV-1].q[1][PW-1:0];
endmodule
