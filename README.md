# Parallel-prefix adders: binary, modulo 2^n−1, modulo 2^n+1 and combined

An adder is fast when its carries are fast. A parallel-prefix adder computes every carry of an
n-bit addition in about log2(n) gate levels. It does this by treating carry generation as a
prefix problem over (generate, propagate) pairs. This RTL builds that idea into one family of
adders, all combinational and all parameterised by width and by the shape of the prefix tree:

* binary adders (regular, Ling, and carry-save);
* modulo 2^n−1 adders, the "one's-complement" arithmetic of residue number systems and checksums;
* modulo 2^n+1 adders in diminished-one form, as used in Fermat-number transforms and IDEA-type
  ciphers;
* one combined adder that does all three, selected by a 2-bit mode;
* for comparison, the classic adders the prefix designs are measured against: ripple-carry,
  carry-select, carry-increment, carry-skip and multi-level carry-lookahead.

The construction follows the PhD thesis *Parallel-Prefix Structures for Binary and Modulo
{2^n−1, 2^n, 2^n+1} Adders* (J. Chen, Oklahoma State University, 2008). The section
"Where this RTL departs from the thesis" says which parts are my own choices.

Everything is synthesizable SystemVerilog-2017. There are no clocks, registers or resets. Every
module is pure combinational logic, and every output depends only on the current inputs.

## 1. The prefix operator and its cells

Every adder starts with a bit generate g_i = a_i·b_i and a bit propagate p_i. Depending on the
scheme, p_i is a_i⊕b_i or a_i+b_i. Adjacent groups of bits combine through the associative
operator

    (G,P)hi ∘ (G,P)lo = (Ghi + Phi·Glo , Phi·Plo)

and the carry into bit i is the generate of the group from bit i−1 down to the carry-in. Four
cells implement this:

| cell | module | function |
|---|---|---|
| white | `pp_white_cell` | g = a·b, p = a⊕b (`XOR_P=1`) or a+b (`XOR_P=0`) |
| black | `pp_black_cell` | full operator: G and P |
| gray | `pp_gray_cell` | G only; used where the group already reaches the carry-in, so its P is never needed |
| reduced Ling black / gray | `ling_reduced_black_cell`, `ling_reduced_gray_cell` | first level of a Ling tree: H = g_i + g_(i−1) (a plain OR), I = p_(i−1)·p_(i−2) |

## 2. Prefix trees (`prefix_tree`, `ppa_pkg`)

The associative operator can be evaluated in many orders. Each order trades logic depth,
cell count, fan-out and wiring against each other. `prefix_tree` generates seven classic
families. Each level has one row of cells. At level l, column k either passes its pair down
unchanged or combines it with one lower *partner* column. The function
`ppa_pkg::tree_partner(tree, n, level, column)` returns that partner column, so the whole
topology is decided at elaboration time.

| `TREE` | family | levels | cells (16 bit, with carry-in) | max fan-out (16 bit) |
|---|---|---|---|---|
| `TREE_BK` | Brent-Kung: up-sweep, then down-sweep | 2·log2 n − 1 | 26 | 2 |
| `TREE_SK` | Sklansky: divide and conquer | log2 n | 32 | 9 |
| `TREE_KS` | Kogge-Stone: every column at every level | log2 n | 49 | 2 |
| `TREE_KN` | Knowles [2,1,1,1]: Kogge-Stone, with the last level shared by column pairs | log2 n | 49 | 3 |
| `TREE_HC` | Han-Carlson: Kogge-Stone on odd columns, then one row for the even ones | log2 n + 1 | 32 | 2 |
| `TREE_LF` | Ladner-Fischer: Sklansky on odd columns, then one row for the even ones | log2 n + 1 | 27 | 5 |
| `TREE_HA` | Harris: Knowles [2,1,…] on odd columns, then one row for the even ones | log2 n + 1 | 32 | 3 |

N must be a power of two, at least 4. Three parameters change what a column means:

* `HAS_CIN=1` (binary adders). Column 0 is the carry-in, treated as bit −1 with g = cin and
  p = 0. Column k holds bit k−1, so output k is directly the carry c_k. A cell whose lower input
  already reaches column 0 is a gray cell. The P outputs of such columns are constant 0, because
  nothing propagates through a carry-in.
* `HAS_CIN=0` (modulo and combined adders). Column k holds bit k. Every cell is black, so the
  group pair (G(k:0), P(k:0)) of every column is available to a final row outside the tree.
* `LING=1`. The leaves are Ling pairs, and level 1 uses the reduced Ling cells (section 3).
* `DROP_LAST=1`. The last row of BK/HC/LF/HA is left out. That row computes each even column from
  its odd neighbour. The carry-save adder replaces it (section 4).

The tree inserts no buffers. Fan-out is left to synthesis.

## 3. Ling's pseudo-carries

Ling's idea is to move one AND gate of the carry chain out of the critical path. With
OR-propagate p_i = a_i + b_i, and because g_i implies p_i, the carry factors as
c_(i+1) = p_i · d_(i+1), where the *pseudo-carry* is d_(i+1) = g_i + c_i. Pseudo-carries
obey their own prefix recurrence over the pairs

    H(i:i) = g_i ,  I(i:i) = p_(i−1)         (p_(−1) = 1)

and use the same black and gray cells. At level 1 the H half needs only an OR, because
g_(i−1) already implies p_(i−1). Those are the reduced cells. The sum is formed from
pseudo-carries without rebuilding the real carry:

    s_i = (p_i ⊕ d_(i+1)) + g_i · p_(i−1) · d_i

This is correct because d_(i+1) = c_(i+1) whenever p_i = 1, and when g_i = 1 the carry-out
of bit i is 1 regardless of c_i. `ling_prefix_adder` uses the tree with `LING=1`. It feeds cin in
as d_0 and forms the top pseudo-carry d_n = g_(n−1) + p_(n−2)·d_(n−1) after the tree. The
carry-out is cout = p_(n−1)·d_n.

`nand_adder` applies the same idea to a ripple adder. It runs two complementary pseudo-carry
chains (d, and e = its dual on p̂_i = ¬(a_i·b_i)) side by side. Each bit then costs one
3-input NAND instead of an AND-OR-INVERT. The sum is a mux selected by a_i⊕b_i. This adder is
linear in delay. It exists to feed the NAND-based end-around modulo adder. `nor_adder` is the
dual form for domino logic. Its recurrences d_(i+1) = g_i + g_(i−1) + ¬e_i and
e_(i+1) = ĝ_i + ĝ_(i−1) + ¬d_i (with ĝ = ¬a·¬b) are carried in complemented form, so each stage
is one 3-input NOR. The carry comes back as c_i = g_(i−1) + ¬e_i.

## 4. Carry-save notation inside the tree (`cs_prefix_adder`)

In the sparse trees (BK, HC, LF, HA) the last row is a column of gray cells:
c_k = g_(k−1) + t_(k−1)·c_(k−1) for even k ≥ 2. Here t is the XOR half-sum. The carry-save
adder keeps the half-sum and the carry apart for those bits. The last row becomes 2-input ANDs,
c'_k = t_(k−1)·c_(k−1), which saves one OR level. The missing g_(k−1) moves into a modified
half-sum t'_k = t_k ⊕ g_(k−1). That half-sum is formed in parallel with the tree and so stays
off the critical path. The sum is s_k = t'_k ⊕ c'_k, which is correct because t and g of the
same bit are never both 1.

Bit 0 and the odd bits are unchanged. This only works where a last row exists, so the
module accepts only the four sparse families.

## 5. Modulo 2^n−1 adders

Because 2^n ≡ 1, a carry out of bit n−1 is worth 1. It is added back in: S = A + B + c_out
(*end-around carry*). The all-ones word is a second code for zero. For example,
A + B = 2^n−1 gives all ones, and only 0 + 0 gives all zeros. Every adder here keeps that
double-zero convention.

* `mod_m1_reduced_prefix_adder`. A tree without carry-in (`HAS_CIN=0`) gives G(k:0), P(k:0) and
  the first-pass c_out = G(n−1:0). One extra row of gray cells then folds c_out back in:
  c_(i+1) = G(i:0) + P(i:0)·c_out, and s_i = p_i ⊕ c_i. This works with any tree family and
  costs one level over the binary adder.
* `mod_m1_ling_prefix_adder`. The same structure on Ling pairs. The feedback is
  c_out = p_(n−1)·H(n−1:0), injected as the pseudo-carry d_0.
* `mod_m1_full_prefix_adder`. No extra row. Each carry is the end-around group of all n bits
  that ends at the bit below it and wraps past bit 0. A *cyclic* Kogge-Stone network, where
  column i combines with column (i − 2^(l−1)) mod n at level l, gives all n of them in exactly
  log2 n levels. The price is n·log2 n cells and dense wiring.
* `mod_m1_csei_adder` and `mod_m1_csei_nand_adder`. Two-step end-around adders: a binary adder
  (prefix or NAND ripple) with carry-in 0, followed by `cse_incrementer`, which adds c_out.
  The incrementer forms c_i = inc·s'_0·…·s'_(i−1) with a log-depth tree of AND gates and flips
  each sum bit through a 2:1 mux.

## 6. Modulo 2^n+1 adders (diminished-one)

Numbers 0…2^n need n+1 bits. The diminished-one code stores A−1 instead, so n bits are enough.
Zero itself has no code and must be flagged outside the adder. Applications usually carry a
separate zero bit. In this code

    s = a + b + ¬c_out   (mod 2^n),    a = A−1, b = B−1, s = |A+B|_(2^n+1) − 1

so the end-around carry is inverted. When the true sum is a multiple of 2^n+1, the adders return
the all-zero word.

* `mod_p1_reduced_prefix_adder`, `mod_p1_ling_prefix_adder` and `mod_p1_csei_adder` are the
  modulo 2^n−1 designs with one inverter on the fed-back carry (or pseudo-carry).
* `mod_p1_full_prefix_adder` is the hardest piece of the design. In the reduced structure the
  inverted carry c_0 = ¬G(n−1:0) has to be ready before the last row can start. The full
  structure instead uses the identity

      (G,P) ∘ ¬X = ¬( (Ĝ,P̂) ∘ X ),   with the "hatted" pair (Ĝ,P̂) = (¬P, ¬G)

  which lets an inverted group absorb the bits above it. Expanding every carry with it gives
  c_0 = ¬G(n−1:0) and c_i = G(i−1:0) + P(i−1:0)·¬G(n−1:i). The module builds these in log2 n
  levels, with no extra row:
  * Levels 1 … log2 n − 1 run two cyclic Kogge-Stone networks side by side. **X** works on plain
    pairs. **Y** covers the same spans, but uses hatted pairs for the bits at or below the column
    and plain pairs for the part that wraps past bit 0.
  * Level log2 n joins two n/2-bit halves per carry:

        c_0             = ¬( X[n−1] ∘ X[n/2−1] )
        c_i, 0<i<n/2    = ¬( Y[i−1] ∘ X[i−1+n/2] )
        c_i, i ≥ n/2    = X[i−1] ∘ ¬Y[i−1−n/2]     (with Y[−1] taken as X[n−1])

  So the last level has inverted gray cells in the low half and gray cells with an inverted
  lower input in the high half. The sum uses the XOR half-sum: s_i = t_i ⊕ c_i. Part of the Y
  propagate vector is never read, and lint reports those bits as unused. Synthesis removes them.

## 7. The combined adder (`combined_adder`, `combined_ling_adder`)

The reduced structure differs between the three arithmetics only in the carry that enters its
last gray row. A 3-way multiplexer picks that carry:

| `mode` (`ppa_pkg::add_mode_e`) | carry entering the last row | result |
|---|---|---|
| 0 `MODE_MOD_P1` | ¬c_out | diminished-one modulo 2^n+1 |
| 1 `MODE_MOD_M1` | c_out | modulo 2^n−1 (double zero) |
| 2 `MODE_BIN` (3 behaves the same) | cin | binary a+b+cin; with cin = 0 this is modulo 2^n |

The last row has one gray cell more than the modulo-only adders, on bit n−1, so it can deliver
the binary carry-out `cout`. In the modulo modes `cout` has no meaning. The Ling version
multiplexes the pseudo-carry d_0 instead. Its first-pass carry-out comes from one AND gate,
c_out = p_(n−1)·H(n−1:0).

## 8. The classic adders

These are the baselines of the design space. They share one 1-bit cell: a `full_adder` made of
two `half_adder`s and an OR gate. All of them default to 16 bits with 4-bit blocks.

* `ripple_carry_adder` is a chain of full adders. Its delay is linear in n.
* `carry_select_adder` gives every block after the first two ripple adders, one for carry-in 0
  and one for carry-in 1. A mux picks the sums, and the block carry is c0 + c1·c_j, so the carry
  crosses a block in one AND-OR.
* `carry_increment_adder` gives each block one ripple adder with carry-in 0. The block carry is
  c0 + P·c_j, where P is the block's OR-propagate. A half-adder chain then increments the
  block's temporary sum by c_j.
* `carry_skip_adder` lets a block pass its carry-in straight through when every bit propagates.
  The skip test uses the XOR propagate t = a⊕b. With the OR form a block could both propagate and
  generate, and skipping it would lose the carry it generates.
* `carry_lookahead_adder` uses reduced full adders (g, p, t per bit) and a tree of `bclg` block
  lookahead generators with log_R n levels. Group pairs travel up the tree and carries travel
  back down. N must be a power of R.

## 9. Modules and parameters

| module | parameters (default) | ports |
|---|---|---|
| `prefix_adder`, `ling_prefix_adder`, `cs_prefix_adder`, `nand_adder`, `nor_adder` | `N` (64), `TREE` (`TREE_BK`; the NAND/NOR adders have none) | `a`, `b`, `cin` → `s`, `cout` |
| `mod_m1_*`, `mod_p1_*` | `N` (64), `TREE` (`TREE_BK`; the full-prefix and NAND versions have none) | `a`, `b` → `s` |
| `combined_adder`, `combined_ling_adder` | `N` (64), `TREE` (`TREE_BK`) | `a`, `b`, `cin`, `mode` → `s`, `cout` |
| `cse_incrementer` | `N` (64) | `s_in`, `inc` → `s` |
| `prefix_tree` | `N`, `TREE`, `HAS_CIN`, `LING`, `DROP_LAST` | `g_in`, `p_in` → `g_out`, `p_out` |
| `ripple_carry_adder`, `carry_select_adder`, `carry_increment_adder`, `carry_skip_adder`, `carry_lookahead_adder` | `N` (16), `R` block size (4; the ripple adder has none) | `a`, `b`, `cin` → `s`, `cout` |
| `full_adder`, `half_adder`, `bclg` | `bclg`: `R` (4) | bit cells and the lookahead generator |
| `ppa_top` | `N` (64), `TREE` (`TREE_BK`) | every adder above, side by side |

The default width of 64 is the width of the thesis's result tables. The thesis also evaluates
8, 16, 32 and 128 bits; set `N` for those. The modulus of a modulo adder is tied to N. All
seven trees have been simulated at N = 8 (exhaustively), 16, 32, 64 and 128.

`ppa_top` is an evaluation wrapper, not a datapath. All adders share the operand inputs `a`, `b`,
`cin` and `mode`, and each drives its own outputs (`s_bin`, `s_ling`, `s_cs`, `s_nand`, `s_nor`,
`s_m1_*`, `s_p1_*`, `s_comb*`, `s_inc`, `s_rca`, `s_csel`, `s_cinc`, `s_cskip`, `s_cla`, and
the `cout_*`). The classic adders are instantiated at the wrapper's width of 64 with 4-bit blocks. The incrementer adds `cin` to `a`. The
carry-save adder exists only for sparse trees, so the wrapper falls back to Brent-Kung for it
when `TREE` names another family.

## 10. Simulation

Each testbench in `tb/` is self-checking and prints one line
`TB_RESULT checks=<n> failures=<m>`. Build and run any of them with plain Verilator:

    verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
              rtl/ppa_pkg.sv tb/tb_mod_p1_adders.sv --top-module tb_mod_p1_adders -o sim
    ./obj_dir/sim

`-y` lets Verilator find every other module by its file name. Most benches build in well under
a minute and run in seconds. `tb_prefix_tree` instantiates 64 trees and takes about a minute to
compile.

| testbench | covers | method |
|---|---|---|
| `tb_pp_cells` | the five cells | every input combination |
| `tb_prefix_tree` | `prefix_tree`, all trees × {with/without carry-in} × {plain/Ling}, plus `DROP_LAST` | N = 8 exhaustive; N = 64 random; every output column compared with a ripple reference |
| `tb_prefix_adder`, `tb_ling_prefix_adder`, `tb_cs_prefix_adder` | binary adders, every applicable tree | N = 8 exhaustive over a, b, cin; N = 64 random plus long-propagate patterns |
| `tb_nand_adder`, `tb_cse_incrementer` | NAND and NOR ripple adders, incrementer | same scheme |
| `tb_mod_m1_adders` | all five modulo 2^n−1 adders, every tree | result ≡ a+b (mod 2^n−1), and zero only for 0+0 |
| `tb_mod_p1_adders` | all four modulo 2^n+1 adders, every tree | reference works on true values A = a+1, B = b+1 |
| `tb_combined_adder` | both combined adders, all modes and trees | per-mode references as above |
| `tb_basic_adders` | the classic adders, the 1-bit cells, `bclg` | N = 8 exhaustive; defaults (16 bit) and a 64-bit lookahead adder randomly |
| `tb_ppa_top` | the whole wrapper at its defaults (64 bit, Brent-Kung) | 40 000 operand sets; counts each mechanism and fails if one never occurs |

The mechanisms counted by `tb_ppa_top` are: binary carry-out, a carry chain of ≥ n/2 bits,
a Ling pseudo-carry that differs from the real carry, the mod 2^n−1 end-around carry, the
all-ones zero code, the injected inverted carry of mod 2^n+1, a zero mod 2^n+1 result, an
incrementer carry through all bits, each combined-adder mode, and a carry that skips a whole
block of the carry-skip adder. The references always come
from integer arithmetic, never from the prefix equations. Lint (`verilator --lint-only -Wall`)
is clean except for the unused Y bits described in section 6.

## 11. Where this RTL departs from the thesis

* **Tree wiring.** Kogge-Stone, Brent-Kung and Knowles follow the thesis's construction
  procedures, and Sklansky follows its step-by-step description. Han-Carlson, Ladner-Fischer
  and Harris are generated from their defining rule: cells on odd columns, then one row for
  the even columns. I checked them against the thesis's level and cell counts at 16 bits (table
  in section 2) but did not compare them wire by wire with its drawings. Harris is built as a
  Knowles [2,1,…] network on the odd columns.
* **Knowles.** The thesis's chapter on trees constructs and counts Knowles [2,1,1,1], but its
  result chapters label the evaluated tree "Knowles [1,1,1,1]". That label is the Kogge-Stone
  tree itself. `TREE_KN` is [2,1,1,1].
* **Full-prefix modulo adders.** The level-by-level wiring of both full structures (cyclic
  Kogge-Stone for 2^n−1, the X/Y network for 2^n+1) is my construction from the thesis's
  equations. The thesis gives the 2^n+1 structure only as an 8-bit example.
* **Printed equations that were not followed as printed:**
  * The basic sum equation prints an AND where an XOR is meant. The thesis's other statement of
    it, s_i = t_i ⊕ c_i, is used.
  * The odd-bit sum of the carry-save adder likewise prints an AND for an XOR.
  * The Ling modulo 2^n+1 recurrence prints the inversion on the wrong term. The thesis's text
    and drawing put a single inverter on the fed-back carry, and that is what is built.
  * The full modulo 2^n+1 carry c_0 is printed without its inversion. Its derivation has
    c_0 = ¬G(n−1:0), and that is used.

  Exhaustive simulation confirms each choice.
* **Combined Ling adder.** Its wiring follows the thesis's description (an AND gate for the
  carry-out, cin entering as the pseudo-carry) and reuses the reduced Ling modulo adders.
* **Classic adders.** Block sizes are fixed. The variable-size and multi-level refinements the
  thesis mentions are not built. The carry-skip adder uses the XOR propagate (section 8).
* **Carry-select incrementer.** The AND tree has Sklansky shape (⌈log2 n⌉ levels). The thesis
  asks only for a logarithmic tree.
* **Not reproduced:** the thesis's area, delay, power and EDP numbers. They come from
  standard-cell place-and-route in three processes, and no such flow is part of this RTL.
  Buffering is not modelled. The diminished-one zero operand (zero flag) is outside every
  adder, as in the thesis.
* **Own choices** with no counterpart in the thesis: the `add_mode_e` encoding, mode 3 acting as
  binary, the combined adder's extra gray cell for `cout`, the default tree (Brent-Kung), and the
  shared-operand wrapper `ppa_top`.
