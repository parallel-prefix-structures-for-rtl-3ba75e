// cs_prefix_adder -- N-bit parallel-prefix adder embedded with carry-save notation.
//
// Sparse prefix trees (Brent-Kung, Han-Carlson, Ladner-Fischer, Harris) end with a row of gray
// cells that forms every even carry from its odd neighbour: c_k = g_(k-1) + t_(k-1).c_(k-1).
// Here that row is replaced by 2-input AND gates producing the carry-save carry
// c'_k = t_(k-1).c_(k-1), one OR shorter. Those even bits k >= 2 use the modified half-sum
// t'_k = t_k xor g_(k-1), formed in pre-computation off the critical path, and s_k = t'_k xor c'_k;
// bit 0 and the odd bits keep s_k = t_k xor c_k. cout = g_(n-1) + t_(n-1).c_(n-1).
// The carry path is one OR gate shorter than the full tree ("log2 n + 0.5" levels for HC and LF).
// Combinational, no clock.
//
// Source: the carry-save prefix scheme of the thesis (Sec. 3.5). Own choice: the selection of
// sum bits is written as a per-bit generate instead of a separate pre-computation block.
module cs_prefix_adder
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
  logic [N-1:0] g, t, c, pt;
  logic [N-1:0] c_sel, t_sel;

  for (genvar i = 0; i < N; i++) begin : g_pre
    pp_white_cell #(.XOR_P(1'b1)) u_white (.a(a[i]), .b(b[i]), .g(g[i]), .p(t[i]));
  end

  prefix_tree #(.N(N), .TREE(TREE), .HAS_CIN(1'b1), .DROP_LAST(1'b1)) u_tree (
    .g_in ({g[N-2:0], cin}),
    .p_in ({t[N-2:0], 1'b0}),
    .g_out(c),
    .p_out(pt)
  );

  for (genvar k = 0; k < N; k++) begin : g_post
    if (k >= 2 && (k % 2) == 0) begin : g_cs
      assign c_sel[k] = t[k-1] & c[k-1];   // c'_k
      assign t_sel[k] = t[k] ^ g[k-1];     // t'_k
    end else begin : g_reg
      assign c_sel[k] = c[k];
      assign t_sel[k] = t[k];
    end
  end
  assign s = t_sel ^ c_sel;
  pp_gray_cell u_cout (.g_hi(g[N-1]), .p_hi(t[N-1]), .g_lo(c[N-1]), .g(cout));

  logic unused_pt;
  assign unused_pt = ^pt;
endmodule
