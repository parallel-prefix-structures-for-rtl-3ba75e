// cse_incrementer -- carry-select incrementer for end-around modulo adders.
//
// Adds a single carry bit to an n-bit first-stage sum S': s = S' + inc (mod 2^n). Since the
// operand being added is zero except for bit 0, bit i receives the carry
// c_i = s'_(i-1) . ... . s'_0 . inc, which a Sklansky-style tree of 2-input AND gates forms in
// ceil(log2 n) levels. Each sum bit is then chosen by a 2:1 multiplexer between s'_i and its
// complement, with c_i as the select. Combinational.
//
// Source: the carry-select incrementer of the thesis; the AND tree shape (Sklansky) is my choice,
// as the thesis's figure of it was not available.
module cse_incrementer #(
  parameter int N = 64
) (
  input  logic [N-1:0] s_in,
  input  logic         inc,
  output logic [N-1:0] s
);
  logic [N-1:0] c;

  // c[k] = inc & s_in[k-1] & ... & s_in[0], built as a prefix AND over columns {s_in[N-2:0], inc}
  always_comb begin
    logic [N-1:0] x;
    x = {s_in[N-2:0], inc};
    for (int span = 1; span < N; span = span * 2)
      for (int k = N - 1; k >= 0; k--)
        if ((k & span) != 0) x[k] = x[k] & x[(k & ~(span - 1)) - 1];
    c = x;
  end

  for (genvar i = 0; i < N; i++) begin : g_mux
    assign s[i] = c[i] ? ~s_in[i] : s_in[i];
  end
endmodule
