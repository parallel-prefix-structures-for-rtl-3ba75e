// mod_m1_reduced_prefix_adder -- modulo 2^n-1 adder, reduced parallel-prefix structure.
//
// S = |A + B| mod (2^n - 1) computed as A + B + c_out (end-around carry) in one pass:
// a prefix tree without carry-in (column k = bit k, all black cells) gives G(k:0), P(k:0);
// its top column is the first-pass carry-out c_out = G(n-1:0). One extra row of gray cells
// feeds c_out back in as c_0: c_(i+1) = G(i:0) + P(i:0).c_out. Sum s_i = p_i xor c_i.
// Any tree family can be used (TREE). Zero has two codes: A + B = 2^n-1 gives all ones.
// Logic depth is the tree depth plus one gray-cell level. Combinational.
//
// Source: the reduced parallel-prefix modulo 2^n-1 adder of the thesis (Sec. 4.1.3).
module mod_m1_reduced_prefix_adder
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
  logic         cout;

  for (genvar i = 0; i < N; i++) begin : g_pre
    pp_white_cell #(.XOR_P(1'b1)) u_white (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]));
  end

  prefix_tree #(.N(N), .TREE(TREE), .HAS_CIN(1'b0)) u_tree (
    .g_in(g), .p_in(p), .g_out(gg), .p_out(pp)
  );
  assign cout = gg[N-1];

  assign c[0] = cout;
  for (genvar i = 0; i < N - 1; i++) begin : g_last
    pp_gray_cell u_gray (.g_hi(gg[i]), .p_hi(pp[i]), .g_lo(cout), .g(c[i+1]));
  end
  assign s = p ^ c;

  logic unused_ptop;
  assign unused_ptop = pp[N-1];
endmodule
