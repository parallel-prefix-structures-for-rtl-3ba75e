// ling_reduced_gray_cell -- first-level Ling cell whose I output is not needed:
//   H(i:i-1) = g_i + g_(i-1)
// Combinational, a single OR gate.
//
// Source: the reduced gray cell of the thesis's Ling prefix tree.
module ling_reduced_gray_cell (
  input  logic g_hi,  // g_i
  input  logic g_lo,  // g_(i-1)
  output logic h
);
  assign h = g_hi | g_lo;
endmodule
