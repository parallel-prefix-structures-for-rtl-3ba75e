// mod_p1_reduced_prefix_adder -- diminished-one modulo 2^n+1 adder, reduced parallel-prefix
// structure.
//
// Operands and result are diminished-one: a = A-1, b = B-1, s = |A+B| mod (2^n+1) - 1, and the
// value zero has no code. The sum is s = a + b + not(c_out) (mod 2^n): it is incremented unless
// the plain sum overflowed. A prefix tree without carry-in gives G(k:0), P(k:0) and the
// first-pass c_out = G(n-1:0); an inverter and one extra row of gray cells give
// c_0 = not c_out, c_(i+1) = G(i:0) + P(i:0).not(c_out). s_i = p_i xor c_i.
// When A+B is a multiple of 2^n+1 (true result zero) the output is 0.
// Depth: tree depth plus one gray-cell level. Combinational.
//
// Source: the reduced parallel-prefix modulo 2^n+1 adder of the thesis (Sec. 4.2.2).
module mod_p1_reduced_prefix_adder
  import ppa_pkg::*;
#(
  parameter int    N    = 64,
  parameter tree_e TREE = TREE_BK
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  logic [N-1:0] g, p, gg, pp, c;
  logic         cout_n;

  for (genvar i = 0; i < N; i++) begin : g_pre
    pp_white_cell #(.XOR_P(1'b1)) u_white (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]));
  end

  prefix_tree #(.N(N), .TREE(TREE), .HAS_CIN(1'b0)) u_tree (
    .g_in(g), .p_in(p), .g_out(gg), .p_out(pp)
  );
  assign cout_n = ~gg[N-1];

  assign c[0] = cout_n;
  for (genvar i = 0; i < N - 1; i++) begin : g_last
    pp_gray_cell u_gray (.g_hi(gg[i]), .p_hi(pp[i]), .g_lo(cout_n), .g(c[i+1]));
  end
  assign s = p ^ c;

  logic unused_ptop;
  assign unused_ptop = pp[N-1];
endmodule
