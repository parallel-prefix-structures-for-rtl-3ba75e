// bclg -- block carry-lookahead generator for R (generate, propagate) pairs.
// From bit pairs g[R-1:0], p[R-1:0] and the block carry-in ci it forms, in two-level AND-OR logic,
//   the group pair  G = g_(R-1) + p_(R-1).g_(R-2) + ... + p_(R-1)...p_1.g_0,  P = p_(R-1)...p_0
//   and every internal carry c_(i+1) = g_i + p_i.g_(i-1) + ... + p_i...p_0.ci (fully expanded).
// c[0] simply repeats ci so that c[i] is the carry into position i for every i. Used for every
// node of the carry-lookahead adder's tree. Source: the 4-bit BCLG equations of the thesis,
// generalised to R inputs. Combinational.
module bclg #(
  parameter int R = 4
) (
  input  logic [R-1:0] g,
  input  logic [R-1:0] p,
  input  logic         ci,
  output logic [R:0]   c,   // c[0] = ci, c[i+1] = carry out of position i
  output logic         gg,
  output logic         gp
);
  always_comb begin
    for (int i = 0; i <= R; i++) begin
      logic term, prod;
      // c[i] = OR over j < i of (p[i-1]..p[j+1]).g[j], plus (p[i-1]..p[0]).ci
      term = 1'b0;
      for (int j = 0; j < i; j++) begin
        prod = g[j];
        for (int m = j + 1; m < i; m++) prod = prod & p[m];
        term = term | prod;
      end
      prod = ci;
      for (int m = 0; m < i; m++) prod = prod & p[m];
      c[i] = term | prod;
    end
    gg = 1'b0;
    for (int j = 0; j < R; j++) begin
      logic prod;
      prod = g[j];
      for (int m = j + 1; m < R; m++) prod = prod & p[m];
      gg = gg | prod;
    end
    gp = &p;
  end
endmodule
