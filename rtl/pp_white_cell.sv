// pp_white_cell -- pre-computation cell: bit generate and propagate of one operand bit pair.
//   g = a.b ;  p = a xor b (XOR_P = 1) or p = a + b (XOR_P = 0)
// The XOR form doubles as the half-sum t used by the sum stage; the OR form is required by
// Ling's scheme and the hatted pairs of the modulo 2^n+1 full prefix adder. Combinational.
//
// Source: the white (pre-computation) cell of the thesis.
module pp_white_cell #(
  parameter bit XOR_P = 1'b1
) (
  input  logic a,
  input  logic b,
  output logic g,
  output logic p
);
  assign g = a & b;
  assign p = XOR_P ? (a ^ b) : (a | b);
endmodule
