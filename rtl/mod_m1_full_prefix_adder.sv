// mod_m1_full_prefix_adder -- modulo 2^n-1 adder, full parallel-prefix structure.
//
// Every carry is the end-around group of all n bits, starting at the bit below it and wrapping
// past bit 0 to the MSB: c_(i+1) = (g_i,p_i) o (g_(i-1),p_(i-1)) o ... o (g_(i+1),p_(i+1)).
// This is computed for all columns at once by a cyclic Kogge-Stone network: at level l column i
// combines with column (i - 2^(l-1)) mod n, so after log2(n) levels every column holds the group
// of all n bits ending at it. No extra row is needed (log2 n levels, n.log2 n cells, last level
// gray), at the cost of dense cells and wires. s_i = p_i xor c_i, c_0 = group at column n-1.
// Zero has two codes: A + B = 2^n-1 gives all ones. Combinational.
//
// Source: the full parallel-prefix modulo 2^n-1 structure of the thesis (Sec. 4.1.2); its
// figures were not available, so the cyclic Kogge-Stone wiring is built from the equations.
module mod_m1_full_prefix_adder
  import ppa_pkg::*;
#(
  parameter int N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  localparam int L = log2c(N);
  logic [N-1:0] g, p, c;

  if (N < 2 || (1 << L) != N) begin : g_bad_width
    $error("mod_m1_full_prefix_adder: N must be a power of two, at least 2");
  end

  for (genvar i = 0; i < N; i++) begin : g_pre
    pp_white_cell #(.XOR_P(1'b1)) u_white (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]));
  end

  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [N-1:0] gl, pl;
    if (l == 0) begin : g_leaf
      assign gl = g;
      assign pl = p;
    end else begin : g_row
      for (genvar i = 0; i < N; i++) begin : g_col
        localparam int J = (i - (1 << (l - 1)) + N) % N;
        if (l == L) begin : g_gray
          pp_gray_cell u_cell (.g_hi(g_lvl[l-1].gl[i]), .p_hi(g_lvl[l-1].pl[i]),
                               .g_lo(g_lvl[l-1].gl[J]), .g(gl[i]));
          assign pl[i] = 1'b0;
        end else begin : g_black
          pp_black_cell u_cell (.g_hi(g_lvl[l-1].gl[i]), .p_hi(g_lvl[l-1].pl[i]),
                                .g_lo(g_lvl[l-1].gl[J]), .p_lo(g_lvl[l-1].pl[J]),
                                .g(gl[i]), .p(pl[i]));
        end
      end
    end
  end

  assign c = {g_lvl[L].gl[N-2:0], g_lvl[L].gl[N-1]};
  assign s = p ^ c;

  logic unused_p;
  assign unused_p = ^g_lvl[L].pl;
endmodule
