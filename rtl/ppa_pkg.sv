// ppa_pkg -- shared types and elaboration-time functions for the parallel-prefix adders.
//
// A radix-2 prefix tree over N columns is described level by level: at level l a column k
// either keeps its (G,P) pair or combines it with the pair of one lower "partner" column
// through the prefix operator (G,P)hi o (G,P)lo = (Ghi + Phi.Glo, Phi.Plo).
// tree_partner() returns that partner column, or -1 when the column has no cell at that level.
// The seven tree families follow the construction rules of the classic prefix-tree taxonomy:
//   BK  Brent-Kung      2L-1 levels, up-sweep then down-sweep
//   SK  Sklansky        L levels, cells in groups of 2^(l-1), high fan-out
//   KS  Kogge-Stone     L levels, every column every level
//   KN  Knowles [2,1,1,1]: Kogge-Stone with the last level shared by column pairs (fan-out 3)
//   HC  Han-Carlson     L+1 levels: odd columns run Kogge-Stone, a last row fills even columns
//   LF  Ladner-Fischer  L+1 levels: odd columns run Sklansky, a last row fills even columns
//   HA  Harris (1,1,1)  L+1 levels: odd columns run Knowles [2,1,..], a last row fills even columns
// (L = log2 N.)  Sparse trees (HC, LF, HA) and BK end with a row that computes every even column
// k >= 2 from column k-1; the carry-save adder relies on that.
// add_mode_e is the carry-select encoding of the combined adder: 0 modulo 2^n+1
// (diminished-one), 1 modulo 2^n-1, 2 binary with carry-in.
package ppa_pkg;

  typedef enum logic [2:0] {
    TREE_BK = 3'd0,
    TREE_SK = 3'd1,
    TREE_KS = 3'd2,
    TREE_HC = 3'd3,
    TREE_KN = 3'd4,
    TREE_LF = 3'd5,
    TREE_HA = 3'd6
  } tree_e;

  typedef enum logic [1:0] {
    MODE_MOD_P1 = 2'd0,
    MODE_MOD_M1 = 2'd1,
    MODE_BIN    = 2'd2
  } add_mode_e;

  function automatic int log2c(input int n);
    int l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  function automatic int tree_levels(input tree_e t, input int n);
    int l = log2c(n);
    case (t)
      TREE_BK:                   return (l < 1) ? 0 : 2 * l - 1;
      TREE_HC, TREE_LF, TREE_HA: return l + 1;
      default:                   return l;
    endcase
  endfunction

  // Knowles [2,..,1] last level on an m-column Kogge-Stone network: column pairs share a partner.
  function automatic int knowles_last(input int k, input int half);
    if (k < half) return -1;
    return (((k - half) % 2) == 0) ? k - half + 1 : k - half;
  endfunction

  function automatic int tree_partner(input tree_e t, input int n, input int lvl, input int k);
    int l = log2c(n);
    int h = 1 << (lvl - 1);
    int u, v, ll, m, mh, r;
    case (t)
      TREE_KS: return (k >= h) ? k - h : -1;
      TREE_SK: return ((k & h) != 0) ? ((k >> (lvl - 1)) << (lvl - 1)) - 1 : -1;
      TREE_KN: begin
        if (lvl < l) return (k >= h) ? k - h : -1;
        return knowles_last(k, h);
      end
      TREE_BK: begin
        if (lvl <= l) begin
          u = 1 << lvl; v = u / 2;
          return (((k + 1) % u) == 0) ? k - v : -1;
        end
        ll = 2 * l - lvl;
        u = 1 << ll; v = u / 2;
        return (k >= u + v - 1 && ((k - (u + v - 1)) % u) == 0) ? k - v : -1;
      end
      TREE_HC, TREE_LF, TREE_HA: begin
        if (lvl == 1) return (k % 2 == 1) ? k - 1 : -1;
        if (lvl == l + 1) return (k % 2 == 0 && k >= 2) ? k - 1 : -1;
        if (k % 2 == 0) return -1;
        if (t == TREE_HC) return (k > h) ? k - h : -1;
        if (t == TREE_LF) return ((k & h) != 0) ? ((k >> (lvl - 1)) << (lvl - 1)) - 1 : -1;
        // Harris: Knowles [2,1,..] on the odd columns, column index m = (k-1)/2
        m = (k - 1) / 2;
        mh = h / 2;
        if (lvl < l) return (m >= mh) ? 2 * (m - mh) + 1 : -1;
        r = knowles_last(m, mh);
        return (r < 0) ? -1 : 2 * r + 1;
      end
      default: return -1;
    endcase
  endfunction

  // Lowest column covered by column k after level lvl (0 = the leaf itself).
  function automatic int tree_low(input tree_e t, input int n, input int lvl, input int k);
    int c = k;
    for (int l = lvl; l >= 1; l--) begin
      int j = tree_partner(t, n, l, c);
      if (j >= 0) c = j;
    end
    return c;
  endfunction

endpackage
