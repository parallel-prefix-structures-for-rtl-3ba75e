// nor_adder -- N-bit ripple adder built from NOR gates on Ling-style pseudo-carries (the dual of
// nand_adder, suited to domino logic).
//
// With g_i = a_i.b_i and the complemented generate g^_i = not(a_i).not(b_i), the two pseudo-carries
// d_(i+1) = g_i + c_i and e_(i+1) = g^_i + not c_i obey
//   d_(i+1) = g_i  + g_(i-1)  + not e_i        e_(i+1) = g^_i + g^_(i-1) + not d_i
// so the chain is carried in complemented form, each stage a single 3-input NOR:
//   nd_(i+1) = NOR(g_i, g_(i-1), ne_i)         ne_(i+1) = NOR(g^_i, g^_(i-1), nd_i)
// where nd = not d and ne = not e. Chain start: ne_0 = cin, nd_0 = not cin, g_(-1) = g^_(-1) = 0.
// The carries come back as c_i = g_(i-1) + ne_i and not c_i = g^_(i-1) + nd_i, and the sum is a mux
// selected by t_i = a_i xor b_i: s_i = t_i ? (g^_(i-1) + nd_i) : (g_(i-1) + ne_i).
// cout = g_(n-1) + ne_n. Linear delay; combinational.
//
// Source: the NOR adder equations of the thesis (Sec. 2.8); its carry-chain figure was not used.
// The chain start values are my own choice, picked so that c_0 = cin.
module nor_adder #(
  parameter int N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] g, gh, t;
  logic [N:0]   gm, ghm;     // gm[i] = g_(i-1), ghm[i] = g^_(i-1)
  logic [N:0]   nd, ne;

  assign g   = a & b;
  assign gh  = ~a & ~b;
  assign t   = a ^ b;
  assign gm  = {g, 1'b0};
  assign ghm = {gh, 1'b0};

  assign ne[0] = cin;
  assign nd[0] = ~cin;
  for (genvar i = 0; i < N; i++) begin : g_bit
    assign nd[i+1] = ~(g[i]  | gm[i]  | ne[i]);
    assign ne[i+1] = ~(gh[i] | ghm[i] | nd[i]);
    assign s[i]    = t[i] ? (ghm[i] | nd[i]) : (gm[i] | ne[i]);
  end
  assign cout = gm[N] | ne[N];

  logic unused;
  assign unused = nd[N] ^ ghm[N];
endmodule
