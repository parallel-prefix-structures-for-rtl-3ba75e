// pp_black_cell -- the prefix operator "o" of a parallel-prefix tree.
// Combines an upper group (bits i:k) with the adjacent lower group (bits k-1:j):
//   G(i:j) = G(i:k) + P(i:k).G(k-1:j)      P(i:j) = P(i:k).P(k-1:j)
// The same cell computes Ling's H/I pair (H = Hhi + Ihi.Hlo, I = Ihi.Ilo).
// Purely combinational: one AND-OR and one AND gate.
//
// Source: the black cell of the thesis.
module pp_black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g,
  output logic p
);
  assign g = g_hi | (p_hi & g_lo);
  assign p = p_hi & p_lo;
endmodule
