// prefix_adder -- N-bit binary parallel-prefix adder with carry-in and carry-out.
//
// Three stages: pre-computation (white cells: g_i = a_i.b_i, p_i = a_i xor b_i), a prefix tree
// whose column 0 is the carry-in (bit -1, g_-1 = cin, p_-1 = 0) and whose column k holds bit k-1,
// so the tree output of column k is the carry c_k = G(k-1:-1); and post-computation
// s_i = p_i xor c_i, cout = g_(n-1) + p_(n-1).c_(n-1) (one more gray cell).
// TREE picks the tree family (see ppa_pkg); the carry network has tree_levels(TREE, N) cell
// levels. Combinational, no clock.
//
// Source: the three-stage prefix adder of the thesis (Ch. 3). Own choice: carry-in enters as
// tree column 0 rather than through a separate row.
module prefix_adder
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
  logic [N-1:0] g, p, c, pt;

  for (genvar i = 0; i < N; i++) begin : g_pre
    pp_white_cell #(.XOR_P(1'b1)) u_white (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]));
  end

  prefix_tree #(.N(N), .TREE(TREE), .HAS_CIN(1'b1)) u_tree (
    .g_in ({g[N-2:0], cin}),
    .p_in ({p[N-2:0], 1'b0}),
    .g_out(c),
    .p_out(pt)
  );

  assign s = p ^ c;
  pp_gray_cell u_cout (.g_hi(g[N-1]), .p_hi(p[N-1]), .g_lo(c[N-1]), .g(cout));

  logic unused_pt;
  assign unused_pt = ^pt;
endmodule
