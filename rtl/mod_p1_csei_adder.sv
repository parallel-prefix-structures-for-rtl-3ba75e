// mod_p1_csei_adder -- diminished-one modulo 2^n+1 end-around adder with a carry-select
// incrementer.
//
// a = A-1, b = B-1, s = |A+B| mod (2^n+1) - 1. A binary parallel-prefix adder (carry-in 0) forms
// S' = a + b and c_out; the incrementer adds the inverted carry: s = S' + not(c_out) (mod 2^n).
// The inverter on c_out is the only difference from the modulo 2^n-1 version. A true result of
// zero has no code and comes out as 0. Combinational.
//
// Source: the carry-select modulo 2^n+1 adder of the thesis (Sec. 4.2.5).
module mod_p1_csei_adder
  import ppa_pkg::*;
#(
  parameter int    N    = 64,
  parameter tree_e TREE = TREE_BK
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  logic [N-1:0] s1;
  logic         cout;

  prefix_adder #(.N(N), .TREE(TREE)) u_add (.a(a), .b(b), .cin(1'b0), .s(s1), .cout(cout));
  cse_incrementer #(.N(N)) u_inc (.s_in(s1), .inc(~cout), .s(s));
endmodule
