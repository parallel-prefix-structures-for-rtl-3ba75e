// half_adder -- 1-bit half adder: s = a xor b, c = a.b.
// Building block of the ripple-carry full adder and of the carry-increment adder's incrementers,
// as in the thesis's background chapter. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
