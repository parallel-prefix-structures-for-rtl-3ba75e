// mod_p1_ling_prefix_adder -- diminished-one modulo 2^n+1 adder, reduced parallel-prefix structure
// with Ling's pseudo-carries.
//
// g_i = a_i.b_i, p_i = a_i + b_i. A Ling tree without carry-in (leaves H = g_i, I = p_(i-1) with
// p_(-1) = 1, reduced cells in level 1) yields H(k:0) and I(k:0) = P(k-1:0). Its top column is
// d_out = H(n-1:0); one AND gate gives the real carry-out c_out = p_(n-1).d_out, which is inverted
// and fed back as the pseudo-carry d_0 (a = A-1, b = B-1, s = |A+B| mod (2^n+1) - 1).
// A last row of gray cells forms d_(i+1) = H(i:0) + I(i:0).d_0; d_n is
// g_(n-1) + p_(n-2).d_(n-1). Sum: s_i = (p_i xor d_(i+1)) + g_i.p_(i-1).d_i with p_(-1) = 1.
// The only difference from the modulo 2^n-1 version is that inverter. A true result of zero
// has no code and comes out as 0. Combinational.
//
// Source: the reduced Ling modulo 2^n+1 adder of the thesis (Sec. 4.2.3). The pseudo-carry fed
// back is not(c_out), as the thesis's text and figure show.
module mod_p1_ling_prefix_adder
  import ppa_pkg::*;
#(
  parameter int    N    = 64,
  parameter tree_e TREE = TREE_BK
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  logic [N-1:0] g, p, hh, ii;
  logic [N:0]   d;
  logic [N-1:0] pm;   // pm[i] = p_(i-1), pm[0] = p_(-1) = 1
  logic         d_out, cout;

  for (genvar i = 0; i < N; i++) begin : g_pre
    pp_white_cell #(.XOR_P(1'b0)) u_white (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]));
  end
  assign pm = {p[N-2:0], 1'b1};

  prefix_tree #(.N(N), .TREE(TREE), .HAS_CIN(1'b0), .LING(1'b1)) u_tree (
    .g_in(g), .p_in(pm), .g_out(hh), .p_out(ii)
  );
  assign d_out = hh[N-1];
  assign cout  = p[N-1] & d_out;

  assign d[0] = ~cout;
  for (genvar i = 0; i < N - 1; i++) begin : g_last
    pp_gray_cell u_gray (.g_hi(hh[i]), .p_hi(ii[i]), .g_lo(d[0]), .g(d[i+1]));
  end
  pp_gray_cell u_dn (.g_hi(g[N-1]), .p_hi(p[N-2]), .g_lo(d[N-1]), .g(d[N]));

  for (genvar i = 0; i < N; i++) begin : g_sum
    assign s[i] = (p[i] ^ d[i+1]) | (g[i] & pm[i] & d[i]);
  end

  logic unused;
  assign unused = ii[N-1];
endmodule
