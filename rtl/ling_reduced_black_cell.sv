// ling_reduced_black_cell -- first-level cell of a Ling prefix tree.
// With one-bit leaves H(i:i) = g_i and I(i:i) = p_(i-1) (p = a + b), the first combination
// simplifies because g_(i-1) implies p_(i-1):
//   H(i:i-1) = g_i + g_(i-1)        I(i:i-1) = p_(i-1).p_(i-2)
// so H needs a plain OR instead of an AND-OR. Combinational.
//
// Source: the reduced black cell of the thesis's Ling prefix tree.
module ling_reduced_black_cell (
  input  logic g_hi,  // g_i
  input  logic g_lo,  // g_(i-1)
  input  logic p_hi,  // p_(i-1)
  input  logic p_lo,  // p_(i-2)
  output logic h,
  output logic i_o
);
  assign h   = g_hi | g_lo;
  assign i_o = p_hi & p_lo;
endmodule
