// mod_m1_csei_adder -- modulo 2^n-1 end-around adder with a carry-select incrementer.
//
// Two steps: a binary parallel-prefix adder (carry-in 0) forms S' = A + B and c_out; the
// carry-select incrementer then adds c_out back in: S = S' + c_out (mod 2^n). The first-stage
// adder can be any tree (TREE). Zero has two codes (A + B = 2^n-1 gives all ones).
// Slower than the single-step prefix structures but simple. Combinational.
//
// Source: the end-around adder with carry-select incrementer of the thesis (Sec. 4.1.5).
module mod_m1_csei_adder
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
  cse_incrementer #(.N(N)) u_inc (.s_in(s1), .inc(cout), .s(s));
endmodule
