// full_adder -- 1-bit full adder built, as in the thesis, from two half adders and an OR gate:
// the first half adder adds a and b, the second adds the carry-in to that half-sum, and the two
// half-adder carries are ORed (they are never both 1). s = a xor b xor ci,
// co = a.b + (a xor b).ci. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic t, c1, c2;
  half_adder u_ha0 (.a(a), .b(b),  .s(t), .c(c1));
  half_adder u_ha1 (.a(t), .b(ci), .s(s), .c(c2));
  assign co = c1 | c2;
endmodule
