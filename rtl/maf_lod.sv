// maf_lod: leading-one detector tree. Returns the number of zeros above the most
// significant one of f (counted from bit W-1) and whether f has any one at all.
// f is padded with zeros at the bottom to the next power of two, 2^LW bits. The tree has
// LW levels of 2-input nodes. A level-l node covers 2^l bits and holds a valid bit and an
// l-bit count. It takes the upper child's count when the upper child is valid, otherwise
// 2^(l-1) plus the lower child's count. That adds one count bit per level, as in the LOD
// tree of a leading-one predictor. When f is all zero, pos is W. Used as the 64-bit and
// 50-bit detectors of the leading-zero anticipator. Combinational.
module maf_lod #(
  parameter int unsigned W  = 64,
  parameter int unsigned PB = 7
) (
  input  logic [W-1:0]  f,
  output logic          valid,
  output logic [PB-1:0] pos
);
  localparam int unsigned LW = $clog2(W);
  localparam int unsigned P  = 1 << LW;

  logic [P-1:0] fp;
  assign fp = P'(f) << (P - W);

  for (genvar l = 1; l <= LW; l++) begin : g_lvl
    localparam int unsigned N = P >> l;
    logic [N-1:0]   v;
    logic [N*l-1:0] p;
    for (genvar k = 0; k < N; k++) begin : g_node
      if (l == 1) begin : g_leaf
        assign v[k] = fp[2*k+1] | fp[2*k];
        assign p[k] = ~fp[2*k+1];
      end else begin : g_inner
        logic vu, vl;
        logic [l-2:0] pu, pl;
        assign vu = g_lvl[l-1].v[2*k+1];
        assign vl = g_lvl[l-1].v[2*k];
        assign pu = g_lvl[l-1].p[(2*k+1)*(l-1) +: (l-1)];
        assign pl = g_lvl[l-1].p[(2*k)*(l-1) +: (l-1)];
        assign v[k] = vu | vl;
        assign p[k*l +: l] = vu ? {1'b0, pu} : {1'b1, pl};
      end
    end
  end

  assign valid = g_lvl[LW].v[0];
  assign pos   = valid ? PB'(g_lvl[LW].p) : PB'(W);
endmodule
