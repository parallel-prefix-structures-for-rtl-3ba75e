// carry_select_adder -- N-bit carry-select adder with fixed R-bit blocks.
// The first block is a ripple-carry adder on the real carry-in. Every later block holds two
// ripple-carry adders, one assuming a block carry-in of 0 and one of 1; when the real block carry
// c_j arrives, a 2:1 multiplexer per bit picks the sum, and the block carry-out is
// c_(j+R) = c0_(j+R) + c1_(j+R).c_j (an AND-OR instead of a mux). The carry thus crosses each later
// block in one AND-OR. Defaults N = 16, R = 4 follow the thesis's example; N must be a multiple
// of R. Combinational.
module carry_select_adder #(
  parameter int N = 16,
  parameter int R = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  localparam int K = N / R;
  logic [K:0] c;   // c[k] = carry into block k

  if (N % R != 0 || R < 1) begin : g_bad
    $error("carry_select_adder: N must be a multiple of R");
  end

  assign c[0] = cin;
  ripple_carry_adder #(.N(R)) u_first (
    .a(a[R-1:0]), .b(b[R-1:0]), .cin(cin), .s(s[R-1:0]), .cout(c[1])
  );
  for (genvar k = 1; k < K; k++) begin : g_blk
    logic [R-1:0] s0, s1;
    logic         c0, c1;
    ripple_carry_adder #(.N(R)) u_rca0 (
      .a(a[k*R +: R]), .b(b[k*R +: R]), .cin(1'b0), .s(s0), .cout(c0)
    );
    ripple_carry_adder #(.N(R)) u_rca1 (
      .a(a[k*R +: R]), .b(b[k*R +: R]), .cin(1'b1), .s(s1), .cout(c1)
    );
    assign s[k*R +: R] = c[k] ? s1 : s0;
    assign c[k+1]      = c0 | (c1 & c[k]);
  end
  assign cout = c[K];
endmodule
