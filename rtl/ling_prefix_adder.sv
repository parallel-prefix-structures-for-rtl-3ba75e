// ling_prefix_adder -- N-bit binary parallel-prefix adder using Ling's pseudo-carries.
//
// Pre-computation uses OR-propagate: g_i = a_i.b_i, p_i = a_i + b_i, t_i = a_i xor b_i.
// The tree works on Ling's pairs: leaf H(i:i) = g_i, I(i:i) = p_(i-1); level 1 uses the reduced
// Ling cells (H = g_i + g_(i-1)), later levels the ordinary black/gray cells. Column k of the tree
// yields the pseudo-carry d_k = H(k-1:-1) with d_0 = cin; the real carry is c_k = p_(k-1).d_k.
// The MSB pseudo-carry d_n = g_(n-1) + p_(n-2).d_(n-1) is formed after the tree.
// Sum: s_i = (p_i xor d_(i+1)) + g_i.p_(i-1).d_i, with p_(-1) = 1; cout = p_(n-1).d_n.
// Combinational, no clock.
//
// Source: Ling's scheme as reformulated for prefix trees in the thesis (Sec. 3.4). The MSB
// pseudo-carry and carry-out equations follow the thesis text.
module ling_prefix_adder
  import ppa_pkg::*;
#(
  parameter int    N    = 64,
  parameter tree_e TREE = TREE_BK
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] g, p, it;
  logic [N:0]   d;
  logic [N-1:0] pm;   // pm[i] = p_(i-1), pm[0] = p_(-1) = 1

  for (genvar i = 0; i < N; i++) begin : g_pre
    pp_white_cell #(.XOR_P(1'b0)) u_white (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]));
  end
  assign pm = {p[N-2:0], 1'b1};

  prefix_tree #(.N(N), .TREE(TREE), .HAS_CIN(1'b1), .LING(1'b1)) u_tree (
    .g_in ({g[N-2:0], cin}),
    .p_in ({pm[N-2:0], 1'b0}),
    .g_out(d[N-1:0]),
    .p_out(it)
  );
  pp_gray_cell u_dn (.g_hi(g[N-1]), .p_hi(p[N-2]), .g_lo(d[N-1]), .g(d[N]));

  for (genvar i = 0; i < N; i++) begin : g_sum
    assign s[i] = (p[i] ^ d[i+1]) | (g[i] & pm[i] & d[i]);
  end
  assign cout = p[N-1] & d[N];

  logic unused_it;
  assign unused_it = ^it;
endmodule
