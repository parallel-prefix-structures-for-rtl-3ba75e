// carry_skip_adder -- N-bit carry-skip adder with fixed R-bit blocks.
// Each block is a ripple-carry adder. Its carry-out is chosen by the block propagate
// P = t_(j+R-1)...t_j (t = a xor b): when P = 1 the block carry-in c_j skips straight to the next
// block, otherwise the block's own ripple carry-out (which then equals the block generate G)
// is used: c_(j+R) = not(P).G + P.c_j. The skip condition must use the exclusive propagate t:
// with p = a + b a block can have P = 1 and still generate its own carry (own choice where the
// thesis's general notation would allow either). A carry entering a block therefore waits only for the skip
// mux, except inside the first and last blocks. Defaults N = 16, R = 4 follow the thesis's
// example; N must be a multiple of R. Combinational; as a skip adder its worst-case static path
// still runs through the ripple chain, which timing tools report as a false path.
module carry_skip_adder #(
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
  logic [K:0] c;

  if (N % R != 0 || R < 1) begin : g_bad
    $error("carry_skip_adder: N must be a multiple of R");
  end

  assign c[0] = cin;
  for (genvar k = 0; k < K; k++) begin : g_blk
    logic rc, bp;
    ripple_carry_adder #(.N(R)) u_rca (
      .a(a[k*R +: R]), .b(b[k*R +: R]), .cin(c[k]), .s(s[k*R +: R]), .cout(rc)
    );
    assign bp     = &(a[k*R +: R] ^ b[k*R +: R]);
    assign c[k+1] = bp ? c[k] : rc;
  end
  assign cout = c[K];
endmodule
