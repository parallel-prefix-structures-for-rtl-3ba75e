// mod_p1_full_prefix_adder -- diminished-one modulo 2^n+1 adder, full parallel-prefix structure
// with the minimum log2(n) levels.
//
// a = A-1, b = B-1, s = |A+B| mod (2^n+1) - 1 (zero has no code; a zero result comes out as 0).
// Carries: c_0 = not G(n-1:0) and c_i = G(i-1:0) + P(i-1:0).not G(n-1:i). Written with the prefix
// operator, the part of a carry group that wraps past bit 0 appears inverted; an inverted group
// can absorb the pairs above it if those are replaced by the "hatted" pairs (not p_j, not g_j):
//   (G,P)a o not(X) = not( (G^,P^)a o X ).
// Structure: g = a.b, p = a + b (OR), t = a xor b for the sum.
//   Levels 1 .. L-1 (L = log2 n) run two cyclic Kogge-Stone networks side by side:
//     X: plain pairs, column t holds the group of 2^l bits ending at bit t (mod n);
//     Y: the same spans, but bits at or below t use hatted pairs and, where the span wraps past
//        bit 0, the wrapped bits (from the MSB down) use plain pairs taken from X.
//   Level L joins two n/2-bit halves per carry:
//     c_0           = not( X[n-1] o X[n/2-1] )                 (inverted gray cell)
//     c_i, i < n/2  = not( Y[i-1] o X[i-1+n/2] )               (inverted gray cell)
//     c_i, i >= n/2 = X[i-1] o not(Y[i-1-n/2]), Y[-1] := X[n-1] (gray cell, inverted lower input)
// Sum s_i = t_i xor c_i. Entries of X for wrapping spans are never read. Combinational.
//
// Source: the full parallel-prefix modulo 2^n+1 adder of the thesis (Sec. 4.2.4, two theorems
// on inverted groups). Its 8-bit figure was not available; the level-by-level wiring above is my
// own construction from the equations. The propagate half of Y is not read in the upper columns
// of the last generation level (only Y[i-1] with i < n/2 feeds level L), so the linter reports
// those bits as unused; synthesis removes them.
module mod_p1_full_prefix_adder
  import ppa_pkg::*;
#(
  parameter int N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  localparam int L = log2c(N);
  localparam int H = N / 2;
  logic [N-1:0] g, p, t, c;

  if (N < 2 || (1 << L) != N) begin : g_bad_width
    $error("mod_p1_full_prefix_adder: N must be a power of two, at least 2");
  end

  for (genvar i = 0; i < N; i++) begin : g_pre
    pp_white_cell #(.XOR_P(1'b0)) u_white (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]));
  end
  assign t = a ^ b;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    logic [N-1:0] xg, xp, yg, yp;
    if (l == 0) begin : g_leaf
      assign xg = g;
      assign xp = p;
      assign yg = ~p;   // hatted pair: g^ = not p
      assign yp = ~g;   //              p^ = not g
    end else begin : g_row
      for (genvar i = 0; i < N; i++) begin : g_col
        localparam int J = i - (1 << (l - 1));
        if (J >= 0) begin : g_in
          pp_black_cell u_x (.g_hi(g_lvl[l-1].xg[i]), .p_hi(g_lvl[l-1].xp[i]),
                             .g_lo(g_lvl[l-1].xg[J]), .p_lo(g_lvl[l-1].xp[J]),
                             .g(xg[i]), .p(xp[i]));
          pp_black_cell u_y (.g_hi(g_lvl[l-1].yg[i]), .p_hi(g_lvl[l-1].yp[i]),
                             .g_lo(g_lvl[l-1].yg[J]), .p_lo(g_lvl[l-1].yp[J]),
                             .g(yg[i]), .p(yp[i]));
        end else begin : g_wrap
          pp_black_cell u_x (.g_hi(g_lvl[l-1].xg[i]), .p_hi(g_lvl[l-1].xp[i]),
                             .g_lo(g_lvl[l-1].xg[J+N]), .p_lo(g_lvl[l-1].xp[J+N]),
                             .g(xg[i]), .p(xp[i]));
          pp_black_cell u_y (.g_hi(g_lvl[l-1].yg[i]), .p_hi(g_lvl[l-1].yp[i]),
                             .g_lo(g_lvl[l-1].xg[J+N]), .p_lo(g_lvl[l-1].xp[J+N]),
                             .g(yg[i]), .p(yp[i]));
        end
      end
    end
  end

  // last level
  for (genvar i = 0; i < N; i++) begin : g_last
    logic gl;
    if (i == 0) begin : g_c0
      pp_gray_cell u_cell (.g_hi(g_lvl[L-1].xg[N-1]), .p_hi(g_lvl[L-1].xp[N-1]),
                           .g_lo(g_lvl[L-1].xg[H-1]), .g(gl));
      assign c[i] = ~gl;
    end else if (i < H) begin : g_lo_half
      pp_gray_cell u_cell (.g_hi(g_lvl[L-1].yg[i-1]), .p_hi(g_lvl[L-1].yp[i-1]),
                           .g_lo(g_lvl[L-1].xg[i-1+H]), .g(gl));
      assign c[i] = ~gl;
    end else if (i == H) begin : g_mid
      assign gl = ~g_lvl[L-1].xg[N-1];
      pp_gray_cell u_cell (.g_hi(g_lvl[L-1].xg[i-1]), .p_hi(g_lvl[L-1].xp[i-1]),
                           .g_lo(gl), .g(c[i]));
    end else begin : g_hi_half
      assign gl = ~g_lvl[L-1].yg[i-1-H];
      pp_gray_cell u_cell (.g_hi(g_lvl[L-1].xg[i-1]), .p_hi(g_lvl[L-1].xp[i-1]),
                           .g_lo(gl), .g(c[i]));
    end
  end

  assign s = t ^ c;
endmodule
