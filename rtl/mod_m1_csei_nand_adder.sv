// mod_m1_csei_nand_adder -- modulo 2^n-1 end-around adder: NAND ripple adder followed by the
// carry-select incrementer.
//
// The NAND adder (carry-in 0) forms S' = A + B and c_out; the incrementer adds c_out back:
// S = S' + c_out (mod 2^n). Zero has two codes. Linear delay; combinational.
//
// Source: the NAND-adder variant of the end-around adder in the thesis (Sec. 4.1.5).
module mod_m1_csei_nand_adder #(
  parameter int N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  logic [N-1:0] s1;
  logic         cout;

  nand_adder #(.N(N)) u_add (.a(a), .b(b), .cin(1'b0), .s(s1), .cout(cout));
  cse_incrementer #(.N(N)) u_inc (.s_in(s1), .inc(cout), .s(s));
endmodule
