// nand_adder -- N-bit ripple adder built from NAND gates on Ling-style pseudo-carries.
//
// With p_i = a_i + b_i and p^_i = not(a_i.b_i), two pseudo-carries run side by side:
//   d_(i+1) = not(p^_i . p^_(i-1) . e_i)      (d_(i+1) = g_i + c_i)
//   e_(i+1) = not(p_i  . p_(i-1)  . d_i)      (e_(i+1) = not p_i + not c_i)
// so each bit of the carry chain is one 3-input NAND instead of an AND-OR-INVERT gate.
// Chain start: d_0 = cin, e_0 = not cin, p_(-1) = p^_(-1) = 1.
// Sum: a mux selected by t_i = a_i xor b_i: s_i = t_i ? p^_(i-1).e_i : p_(i-1).d_i
// (these are not c_i and c_i). cout = p_(n-1).d_n. Linear delay; combinational.
//
// Source: the NAND adder of the thesis (Sec. 2.8 and Sec. 4.1.5).
module nand_adder #(
  parameter int N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0]   d, e, pm, phm;
  logic [N-1:0] p, ph, t;

  assign p   = a | b;
  assign ph  = ~(a & b);
  assign t   = a ^ b;
  assign pm  = {p, 1'b1};    // pm[i]  = p_(i-1)
  assign phm = {ph, 1'b1};   // phm[i] = p^_(i-1)

  assign d[0] = cin;
  assign e[0] = ~cin;
  for (genvar i = 0; i < N; i++) begin : g_chain
    assign d[i+1] = ~(ph[i] & phm[i] & e[i]);
    assign e[i+1] = ~(p[i]  & pm[i]  & d[i]);
    assign s[i]   = t[i] ? (phm[i] & e[i]) : (pm[i] & d[i]);
  end
  assign cout = p[N-1] & d[N];

  logic unused_e;
  assign unused_e = e[N] ^ pm[N] ^ phm[N];
endmodule
