// prefix_tree -- radix-2 parallel-prefix carry network, generated for one of seven tree families.
//
// Input is one (g,p) leaf per column; output per column k is the group pair over columns k..0.
// The tree is built level by level: at level l column k combines with the partner column given by
// ppa_pkg::tree_partner() (Kogge-Stone, Brent-Kung, Knowles and Sklansky follow the published
// construction loops; Han-Carlson, Ladner-Fischer and Harris place cells on every other column
// and finish the even columns in a last row). Columns without a cell pass their pair down.
//
// HAS_CIN = 1: column 0 holds the carry-in (bit -1) and column k holds bit k-1, so g_out[k] is
//   the carry c_k. Cells whose lower input already reaches column 0 are gray cells (no P); the
//   group propagate of such a column is 0 because nothing propagates through a carry-in.
// HAS_CIN = 0: column k holds bit k (modulo adders, no carry-in); every cell is black so that
//   P(k:0) is available to a final row outside the tree.
// LING = 1: leaves are Ling's (H,I) = (g_i, p_(i-1)) with p = a + b; level-1 cells are the
//   reduced Ling cells (H = g_i + g_(i-1)). From level 2 on the cells are the ordinary ones.
// DROP_LAST = 1: the last row (even columns from their odd neighbour) is left out, for the
//   carry-save adder; only for BK, HC, LF and HA.
// No buffers are inserted; fan-out is left to synthesis. Purely combinational.
//
// Source: the tree constructions of the thesis (Ch. 3). Own choices: Knowles is built as
// [2,1,1,1] (the variant the thesis describes and counts), Harris as Knowles [2,1,..] on the odd
// columns. In HAS_CIN mode the p_out bits of columns that reached column 0 are constant 0.
module prefix_tree
  import ppa_pkg::*;
#(
  parameter int    N         = 64,
  parameter tree_e TREE      = TREE_BK,
  parameter bit    HAS_CIN   = 1'b1,
  parameter bit    LING      = 1'b0,
  parameter bit    DROP_LAST = 1'b0
) (
  input  logic [N-1:0] g_in,
  input  logic [N-1:0] p_in,
  output logic [N-1:0] g_out,
  output logic [N-1:0] p_out
);
  localparam int LV_FULL = tree_levels(TREE, N);
  localparam int LV      = DROP_LAST ? LV_FULL - 1 : LV_FULL;

  if (N < 2 || (1 << log2c(N)) != N) begin : g_bad_width
    $error("prefix_tree: N must be a power of two, at least 2");
  end
  if (DROP_LAST && !(TREE == TREE_BK || TREE == TREE_HC || TREE == TREE_LF || TREE == TREE_HA))
  begin : g_bad_drop
    $error("prefix_tree: DROP_LAST needs a tree whose last row fills the even columns");
  end

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    logic [N-1:0] g;
    logic [N-1:0] p;
    if (l == 0) begin : g_leaf
      assign g = g_in;
      assign p = p_in;
    end else begin : g_row
      for (genvar k = 0; k < N; k++) begin : g_col
        localparam int J    = tree_partner(TREE, N, l, k);
        localparam bit GRAY = HAS_CIN && (J >= 0) && (tree_low(TREE, N, l - 1, J) == 0);
        if (J < 0) begin : g_pass
          assign g[k] = g_lvl[l-1].g[k];
          assign p[k] = g_lvl[l-1].p[k];
        end else if (LING && l == 1) begin : g_ling
          if (J != k - 1) begin : g_bad_ling
            $error("prefix_tree: Ling first level needs adjacent columns");
          end
          if (GRAY) begin : g_gray
            ling_reduced_gray_cell u_cell (
              .g_hi(g_lvl[l-1].g[k]), .g_lo(g_lvl[l-1].g[J]), .h(g[k])
            );
            assign p[k] = 1'b0;
          end else begin : g_black
            ling_reduced_black_cell u_cell (
              .g_hi(g_lvl[l-1].g[k]), .g_lo(g_lvl[l-1].g[J]),
              .p_hi(g_lvl[l-1].p[k]), .p_lo(g_lvl[l-1].p[J]),
              .h(g[k]), .i_o(p[k])
            );
          end
        end else if (GRAY) begin : g_gray
          pp_gray_cell u_cell (
            .g_hi(g_lvl[l-1].g[k]), .p_hi(g_lvl[l-1].p[k]), .g_lo(g_lvl[l-1].g[J]), .g(g[k])
          );
          assign p[k] = 1'b0;
        end else begin : g_black
          pp_black_cell u_cell (
            .g_hi(g_lvl[l-1].g[k]), .p_hi(g_lvl[l-1].p[k]),
            .g_lo(g_lvl[l-1].g[J]), .p_lo(g_lvl[l-1].p[J]),
            .g(g[k]), .p(p[k])
          );
        end
      end
    end
  end

  assign g_out = g_lvl[LV].g;
  assign p_out = g_lvl[LV].p;
endmodule
