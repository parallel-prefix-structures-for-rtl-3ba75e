// ppa_top -- every adder of the design side by side on shared operands.
//
// This is a wrapper for evaluating the adder family together: all adders see the same operands
// a and b (and cin where they have one) and each drives its own result port. Nothing is shared
// between the adders, so each keeps the structure and delay of its own architecture. The prefix
// cells and the prefix tree are not instantiated directly here; they sit inside every adder.
//
//   binary (mod 2^n):    prefix_adder, ling_prefix_adder, cs_prefix_adder, nand_adder,
//                        nor_adder
//   modulo 2^n-1:        mod_m1_full_prefix_adder, mod_m1_reduced_prefix_adder,
//                        mod_m1_ling_prefix_adder, mod_m1_csei_adder, mod_m1_csei_nand_adder
//   modulo 2^n+1 (diminished-one operands and result):
//                        mod_p1_full_prefix_adder, mod_p1_reduced_prefix_adder,
//                        mod_p1_ling_prefix_adder, mod_p1_csei_adder
//   combined (mode-selected binary / mod 2^n-1 / mod 2^n+1):
//                        combined_adder, combined_ling_adder
//   incrementer:         cse_incrementer, adding cin to a
//   classic binary adders (the survey the prefix adders are measured against):
//                        ripple_carry_adder, carry_select_adder, carry_increment_adder,
//                        carry_skip_adder, carry_lookahead_adder (block size 4)
//
// Parameters: N is the operand width (64, the width of the document's result tables) and TREE the
// prefix-tree family used by every tree-parameterised adder (Brent-Kung by default, my choice).
// The carry-save adder only exists for the sparse trees (Brent-Kung, Han-Carlson, Ladner-Fischer,
// Harris); for any other TREE it falls back to Brent-Kung. The classic adders use 4-bit blocks,
// as in the thesis's examples; the lookahead adder then needs N to be a power of 4 (64 is).
// mode uses the encoding of ppa_pkg::add_mode_e: 0 = mod 2^n+1, 1 = mod 2^n-1, 2 (and 3) = binary.
// Purely combinational; no clock or reset.
module ppa_top
  import ppa_pkg::*;
#(
  parameter int    N    = 64,
  parameter tree_e TREE = TREE_BK
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  input  logic [1:0]   mode,
  // binary
  output logic [N-1:0] s_bin,
  output logic         cout_bin,
  output logic [N-1:0] s_ling,
  output logic         cout_ling,
  output logic [N-1:0] s_cs,
  output logic         cout_cs,
  output logic [N-1:0] s_nand,
  output logic         cout_nand,
  output logic [N-1:0] s_nor,
  output logic         cout_nor,
  // modulo 2^n-1
  output logic [N-1:0] s_m1_full,
  output logic [N-1:0] s_m1_reduced,
  output logic [N-1:0] s_m1_ling,
  output logic [N-1:0] s_m1_csei,
  output logic [N-1:0] s_m1_csei_nand,
  // modulo 2^n+1, diminished-one
  output logic [N-1:0] s_p1_full,
  output logic [N-1:0] s_p1_reduced,
  output logic [N-1:0] s_p1_ling,
  output logic [N-1:0] s_p1_csei,
  // combined
  output logic [N-1:0] s_comb,
  output logic         cout_comb,
  output logic [N-1:0] s_comb_ling,
  output logic         cout_comb_ling,
  // incrementer
  output logic [N-1:0] s_inc,
  // classic binary adders
  output logic [N-1:0] s_rca,
  output logic         cout_rca,
  output logic [N-1:0] s_csel,
  output logic         cout_csel,
  output logic [N-1:0] s_cinc,
  output logic         cout_cinc,
  output logic [N-1:0] s_cskip,
  output logic         cout_cskip,
  output logic [N-1:0] s_cla,
  output logic         cout_cla
);
  localparam tree_e CS_TREE = (TREE == TREE_BK || TREE == TREE_HC || TREE == TREE_LF ||
                               TREE == TREE_HA) ? TREE : TREE_BK;

  prefix_adder      #(.N(N), .TREE(TREE))    u_bin  (.a(a), .b(b), .cin(cin),
                                                     .s(s_bin), .cout(cout_bin));
  ling_prefix_adder #(.N(N), .TREE(TREE))    u_ling (.a(a), .b(b), .cin(cin),
                                                     .s(s_ling), .cout(cout_ling));
  cs_prefix_adder   #(.N(N), .TREE(CS_TREE)) u_cs   (.a(a), .b(b), .cin(cin),
                                                     .s(s_cs), .cout(cout_cs));
  nand_adder        #(.N(N))                 u_nand (.a(a), .b(b), .cin(cin),
                                                     .s(s_nand), .cout(cout_nand));
  nor_adder         #(.N(N))                 u_nor  (.a(a), .b(b), .cin(cin),
                                                     .s(s_nor), .cout(cout_nor));

  mod_m1_full_prefix_adder    #(.N(N))               u_m1_full    (.a(a), .b(b), .s(s_m1_full));
  mod_m1_reduced_prefix_adder #(.N(N), .TREE(TREE))  u_m1_reduced (.a(a), .b(b), .s(s_m1_reduced));
  mod_m1_ling_prefix_adder    #(.N(N), .TREE(TREE))  u_m1_ling    (.a(a), .b(b), .s(s_m1_ling));
  mod_m1_csei_adder           #(.N(N), .TREE(TREE))  u_m1_csei    (.a(a), .b(b), .s(s_m1_csei));
  mod_m1_csei_nand_adder      #(.N(N))               u_m1_nand    (.a(a), .b(b),
                                                                   .s(s_m1_csei_nand));

  mod_p1_full_prefix_adder    #(.N(N))               u_p1_full    (.a(a), .b(b), .s(s_p1_full));
  mod_p1_reduced_prefix_adder #(.N(N), .TREE(TREE))  u_p1_reduced (.a(a), .b(b), .s(s_p1_reduced));
  mod_p1_ling_prefix_adder    #(.N(N), .TREE(TREE))  u_p1_ling    (.a(a), .b(b), .s(s_p1_ling));
  mod_p1_csei_adder           #(.N(N), .TREE(TREE))  u_p1_csei    (.a(a), .b(b), .s(s_p1_csei));

  combined_adder      #(.N(N), .TREE(TREE)) u_comb      (.a(a), .b(b), .cin(cin),
                                                         .mode(add_mode_e'(mode)),
                                                         .s(s_comb), .cout(cout_comb));
  combined_ling_adder #(.N(N), .TREE(TREE)) u_comb_ling (.a(a), .b(b), .cin(cin),
                                                         .mode(add_mode_e'(mode)),
                                                         .s(s_comb_ling), .cout(cout_comb_ling));

  cse_incrementer #(.N(N)) u_inc (.s_in(a), .inc(cin), .s(s_inc));

  ripple_carry_adder    #(.N(N))        u_rca   (.a(a), .b(b), .cin(cin), .s(s_rca),
                                                 .cout(cout_rca));
  carry_select_adder    #(.N(N), .R(4)) u_csel  (.a(a), .b(b), .cin(cin), .s(s_csel),
                                                 .cout(cout_csel));
  carry_increment_adder #(.N(N), .R(4)) u_cinc  (.a(a), .b(b), .cin(cin), .s(s_cinc),
                                                 .cout(cout_cinc));
  carry_skip_adder      #(.N(N), .R(4)) u_cskip (.a(a), .b(b), .cin(cin), .s(s_cskip),
                                                 .cout(cout_cskip));
  carry_lookahead_adder #(.N(N), .R(4)) u_cla   (.a(a), .b(b), .cin(cin), .s(s_cla),
                                                 .cout(cout_cla));
endmodule
