// ripple_carry_adder -- N-bit ripple-carry adder: a chain of full adders, the carry-out of bit i
// feeding the carry-in of bit i+1. {cout, s} = a + b + cin.
// Delay grows linearly with N (about 4 gate delays per bit); it is the reference point of the
// thesis's adder survey and the block adder inside the carry-select, carry-increment and
// carry-skip adders. Default N = 16, the width of the survey's examples. Combinational.
module ripple_carry_adder #(
  parameter int N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign cout = c[N];
endmodule
