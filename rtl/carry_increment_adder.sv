// carry_increment_adder -- N-bit one-level carry-increment adder with fixed R-bit blocks.
// Every block after the first adds its operands once, with carry-in 0, giving a temporary sum,
// c0 = G (block generate) and the block propagate P = p_(j+R-1)...p_j. The real block carry is then
// c_(j+R) = c0 + P.c_j (one AND-OR per block), and a half-adder incrementer adds c_j to the
// temporary sum. Compared with carry-select, one adder per block and incrementers replace the
// duplicated adders and multiplexers. The first block is a plain ripple-carry adder on cin.
// Defaults N = 16, R = 4 follow the thesis's example; N must be a multiple of R. Combinational.
module carry_increment_adder #(
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
    $error("carry_increment_adder: N must be a multiple of R");
  end

  assign c[0] = cin;
  ripple_carry_adder #(.N(R)) u_first (
    .a(a[R-1:0]), .b(b[R-1:0]), .cin(cin), .s(s[R-1:0]), .cout(c[1])
  );
  for (genvar k = 1; k < K; k++) begin : g_blk
    logic [R-1:0] st;     // temporary sum
    logic [R:0]   ic;     // incrementer carries
    logic         c0;
    ripple_carry_adder #(.N(R)) u_rca (
      .a(a[k*R +: R]), .b(b[k*R +: R]), .cin(1'b0), .s(st), .cout(c0)
    );
    assign c[k+1] = c0 | ((&(a[k*R +: R] | b[k*R +: R])) & c[k]);
    assign ic[0]  = c[k];
    for (genvar i = 0; i < R; i++) begin : g_inc
      half_adder u_ha (.a(st[i]), .b(ic[i]), .s(s[k*R+i]), .c(ic[i+1]));
    end
    logic unused_ic;
    assign unused_ic = ic[R];   // never set: the block carry-out is c[k+1]
  end
  assign cout = c[K];
endmodule
