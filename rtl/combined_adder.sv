// combined_adder -- one adder for binary, modulo 2^n-1 and diminished-one modulo 2^n+1 addition.
//
// Built on the reduced parallel-prefix structure: a prefix tree without carry-in gives G(k:0),
// P(k:0) and the first-pass carry-out c_out = G(n-1:0). A 3-way multiplexer chooses the carry
// x that enters the last row of gray cells, which forms c_0 = x and c_(i+1) = G(i:0) + P(i:0).x:
//   mode 0 (MODE_MOD_P1)  x = not c_out   S = A + B + not c_out  (diminished-one mod 2^n+1)
//   mode 1 (MODE_MOD_M1)  x = c_out       S = A + B + c_out      (mod 2^n-1, two codes for zero)
//   mode 2 (MODE_BIN)     x = cin         S = A + B + cin        (binary; cin = 0 gives mod 2^n)
// Mode 3 is not used and behaves as binary. The last row has one more gray cell than the
// modulo-only adders, on bit n-1, to give the binary carry-out cout = c_n (in the modulo modes
// cout is that same c_n and carries no meaning). s_i = p_i xor c_i.
// Depth: tree depth + mux + one gray-cell level. Combinational.
//
// Source: the combined adder of the thesis (reduced prefix structure, carry chosen by a
// multiplexer). Own choices: the mode encoding, mode 3 acting as binary, and the extra gray cell
// that gives a binary carry-out.
module combined_adder
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
  logic [N-1:0] g, p, gg, pp;
  logic [N:0]   c;
  logic         x;

  for (genvar i = 0; i < N; i++) begin : g_pre
    pp_white_cell #(.XOR_P(1'b1)) u_white (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]));
  end

  prefix_tree #(.N(N), .TREE(TREE), .HAS_CIN(1'b0)) u_tree (
    .g_in(g), .p_in(p), .g_out(gg), .p_out(pp)
  );

  always_comb begin
    case (mode)
      MODE_MOD_P1: x = ~gg[N-1];
      MODE_MOD_M1: x = gg[N-1];
      default:     x = cin;
    endcase
  end

  assign c[0] = x;
  for (genvar i = 0; i < N; i++) begin : g_last
    pp_gray_cell u_gray (.g_hi(gg[i]), .p_hi(pp[i]), .g_lo(x), .g(c[i+1]));
  end
  assign s    = p ^ c[N-1:0];
  assign cout = c[N];
endmodule
