// pp_gray_cell -- prefix operator that keeps only the group generate.
// Used where the lower input already reaches the least significant position, so the result is
// a final carry (or Ling pseudo-carry) and its propagate is never needed:
//   G(i:j) = G(i:k) + P(i:k).G(k-1:j)
// Purely combinational: one AND-OR gate.
//
// Source: the gray cell of the thesis.
module pp_gray_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g
);
  assign g = g_hi | (p_hi & g_lo);
endmodule
