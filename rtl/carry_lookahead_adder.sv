// carry_lookahead_adder -- N-bit multi-level carry-lookahead adder with R-bit block carry-
// lookahead generators (BCLGs).
// Reduced full adders form g_i = a_i.b_i, p_i = a_i + b_i and t_i = a_i xor b_i. A tree of BCLGs
// with L = log_R N levels does the rest: level l has N/R^l nodes, each node combining the group
// pairs of R nodes (or bits) of level l-1 into its own group pair, which travels up; the carry
// into each node travels back down, and the node's BCLG expands it into the carries of its R
// children. The root's carry-in is cin. Each reduced full adder then gives s_i = t_i xor c_i;
// cout = G(N-1:0) + P(N-1:0).cin from the root. About 2.log_R N AND-OR levels in all.
// Defaults N = 16, R = 4 follow the thesis's example (16 reduced full adders, 5 BCLGs). N must be
// a power of R. Combinational.
module carry_lookahead_adder #(
  parameter int N = 16,
  parameter int R = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  function automatic bit is_power(int n, int r);
    int v = 1;
    while (v < n) v = v * r;
    return v == n;
  endfunction

  if (R < 2 || !is_power(N, R)) begin : g_bad
    $error("carry_lookahead_adder: N must be a power of R");
  end

  logic [N-1:0] g, p, t, c;
  logic         gg, gp;
  assign g = a & b;
  assign p = a | b;
  assign t = a ^ b;

  localparam int L = $clog2(N) / $clog2(R) + (($clog2(N) % $clog2(R)) != 0);

  // g_lvl[l]: the N/R^l nodes of level l (level 0 = bits). gv/pv are their group pairs, cv the
  // carry into each node, supplied by the parent node one level up (or cin at the root).
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    localparam int M = N / (R ** l);
    logic [M-1:0] gv, pv, cv;
    if (l == 0) begin : g_bits
      assign gv = g;
      assign pv = p;
    end else begin : g_nodes
      for (genvar j = 0; j < M; j++) begin : g_node
        logic [R:0] cc;
        bclg #(.R(R)) u_bclg (
          .g(g_lvl[l-1].gv[j*R +: R]), .p(g_lvl[l-1].pv[j*R +: R]), .ci(cv[j]),
          .c(cc), .gg(gv[j]), .gp(pv[j])
        );
      end
    end
    if (l == L) begin : g_root
      assign cv[0] = cin;
    end else begin : g_down
      for (genvar j = 0; j < M; j++) begin : g_cin
        assign cv[j] = g_lvl[l+1].g_nodes.g_node[j/R].cc[j%R];
      end
    end
  end

  assign c  = g_lvl[0].cv;
  assign gg = g_lvl[L].gv[0];
  assign gp = g_lvl[L].pv[0];

  assign s    = t ^ c;
  assign cout = gg | (gp & cin);
endmodule
