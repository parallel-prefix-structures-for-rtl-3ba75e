// combined_ling_adder -- binary / modulo 2^n-1 / diminished-one modulo 2^n+1 adder using Ling's
// pseudo-carries.
//
// g_i = a_i.b_i, p_i = a_i + b_i. A Ling tree without carry-in yields H(k:0), I(k:0) = P(k-1:0)
// and d_out = H(n-1:0); an AND gate forms the first-pass carry-out c_out = p_(n-1).d_out.
// A 3-way multiplexer chooses the pseudo-carry d_0 that enters the last row of gray cells,
// d_(i+1) = H(i:0) + I(i:0).d_0:
//   mode 0 (MODE_MOD_P1)  d_0 = not c_out   (diminished-one mod 2^n+1)
//   mode 1 (MODE_MOD_M1)  d_0 = c_out       (mod 2^n-1)
//   mode 2 (MODE_BIN)     d_0 = cin         (binary: d_0 = H(-1) = g_(-1) = cin)
// Mode 3 behaves as binary. d_n = g_(n-1) + p_(n-2).d_(n-1);
// s_i = (p_i xor d_(i+1)) + g_i.p_(i-1).d_i with p_(-1) = 1; binary cout = p_(n-1).d_n.
// Combinational.
//
// Source: the Ling version of the combined adder in the thesis; its printed figure was not
// available, so the wiring follows the reduced Ling modulo adders. Own choices as in combined_adder.
module combined_ling_adder
  import ppa_pkg::*;
#(
  parameter int    N    = 64,
  parameter tree_e TREE = TREE_BK
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  input  add_mode_e    mode,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] g, p, hh, ii;
  logic [N:0]   d;
  logic [N-1:0] pm;   // pm[i] = p_(i-1), pm[0] = p_(-1) = 1
  logic         c_first;

  for (genvar i = 0; i < N; i++) begin : g_pre
    pp_white_cell #(.XOR_P(1'b0)) u_white (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]));
  end
  assign pm = {p[N-2:0], 1'b1};

  prefix_tree #(.N(N), .TREE(TREE), .HAS_CIN(1'b0), .LING(1'b1)) u_tree (
    .g_in(g), .p_in(pm), .g_out(hh), .p_out(ii)
  );
  assign c_first = p[N-1] & hh[N-1];

  always_comb begin
    case (mode)
      MODE_MOD_P1: d[0] = ~c_first;
      MODE_MOD_M1: d[0] = c_first;
      default:     d[0] = cin;
    endcase
  end

  for (genvar i = 0; i < N - 1; i++) begin : g_last
    pp_gray_cell u_gray (.g_hi(hh[i]), .p_hi(ii[i]), .g_lo(d[0]), .g(d[i+1]));
  end
  pp_gray_cell u_dn (.g_hi(g[N-1]), .p_hi(p[N-2]), .g_lo(d[N-1]), .g(d[N]));

  for (genvar i = 0; i < N; i++) begin : g_sum
    assign s[i] = (p[i] ^ d[i+1]) | (g[i] & pm[i] & d[i]);
  end
  assign cout = p[N-1] & d[N];

  logic unused_i;
  assign unused_i = ii[N-1];
endmodule
