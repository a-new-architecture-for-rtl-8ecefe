// maf_lza_preenc: pre-encoding of a leading-zero anticipator for two's complement
// operands X and Y (N bits each, sign at N-1). With T = X^Y, G = X&Y, Z = ~X&~Y the
// indicator string is
//   f[N-1] = ~T[N-1] & T[N-2]
//   f[i]   =  T[i+1] & (G[i]&~Z[i-1] | Z[i]&~G[i-1])
//           | ~T[i+1] & (Z[i]&~Z[i-1] | G[i]&~G[i-1])       for 0 <= i < N-1
// with X[-1] = Y[-1] = 0. The most significant one of f marks the leading digit of X+Y,
// positive or negative, to within one position. Combinational.
module maf_lza_preenc #(
  parameter int unsigned N = 162
) (
  input  logic [N-1:0] x, y,
  output logic [N-1:0] f
);
  logic [N:0] t, g, z;   // index shifted by one: bit k+1 holds position k, bit 0 position -1
  assign t = {x ^ y, 1'b0};
  assign g = {x & y, 1'b0};
  assign z = {~x & ~y, 1'b1};

  always_comb begin
    f[N-1] = ~t[N] & t[N-1];
    for (int i = 0; i < N - 1; i++)
      f[i] = ( t[i+2] & ((g[i+1] & ~z[i]) | (z[i+1] & ~g[i])))
           | (~t[i+2] & ((z[i+1] & ~z[i]) | (g[i+1] & ~g[i])));
  end
endmodule
