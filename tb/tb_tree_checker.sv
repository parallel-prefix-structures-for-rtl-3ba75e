// tb_tree_checker -- test helper: drives one prefix_tree from operand bits and compares every
// output column with a bit-serial ripple reference (carries, Ling pseudo-carries, group
// propagates). ok is 1 when all checked columns match.
// The ripple reference and the sizes are this bench's own choice.
module tb_tree_checker
  import ppa_pkg::*;
#(
  parameter int    N         = 8,
  parameter tree_e TREE      = TREE_BK,
  parameter bit    HAS_CIN   = 1'b1,
  parameter bit    LING      = 1'b0,
  parameter bit    DROP_LAST = 1'b0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic         ok
);
  logic [N-1:0] g_in, p_in, g_out, p_out, g_exp, p_exp, chk_g, chk_p;
  logic [N-1:0] gb, px, po;
  logic [N:0]   c;

  assign gb = a & b;
  assign px = a ^ b;
  assign po = a | b;

  always_comb begin : ripple
    logic carry;
    carry = HAS_CIN ? cin : 1'b0;
    c[0] = carry;
    for (int i = 0; i < N; i++) begin
      carry  = gb[i] | (px[i] & carry);
      c[i+1] = carry;
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++) begin
      chk_g[k] = 1'b1;
      chk_p[k] = 1'b0;
      if (HAS_CIN) begin
        if (k == 0) begin
          g_in[k] = cin;
          p_in[k] = 1'b0;
          g_exp[k] = cin;
        end else begin
          g_in[k] = gb[k-1];
          p_in[k] = LING ? ((k == 1) ? 1'b1 : po[k-2]) : px[k-1];
          g_exp[k] = LING ? (gb[k-1] | c[k-1]) : c[k];
        end
        p_exp[k] = 1'b0;
        if (DROP_LAST && k >= 2 && (k % 2 == 0)) chk_g[k] = 1'b0;
      end else begin
        g_in[k] = gb[k];
        p_in[k] = LING ? ((k == 0) ? 1'b1 : po[k-1]) : px[k];
        g_exp[k] = LING ? (gb[k] | c[k]) : c[k+1];
        p_exp[k] = 1'b1;
        for (int j = 0; j < N; j++)
          if (j <= k) p_exp[k] &= LING ? ((j == 0) ? 1'b1 : po[j-1]) : px[j];
        chk_p[k] = 1'b1;
      end
    end
  end

  prefix_tree #(.N(N), .TREE(TREE), .HAS_CIN(HAS_CIN), .LING(LING), .DROP_LAST(DROP_LAST)) dut (
    .g_in(g_in), .p_in(p_in), .g_out(g_out), .p_out(p_out)
  );

  assign ok = (((g_out ^ g_exp) & chk_g) == '0) && (((p_out ^ p_exp) & chk_p) == '0);
endmodule
