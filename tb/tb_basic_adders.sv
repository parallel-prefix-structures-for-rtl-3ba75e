// tb_basic_adders -- self-checking test of the classic adders: ripple_carry_adder (and with it
// full_adder and half_adder), carry_select_adder, carry_increment_adder, carry_skip_adder and
// carry_lookahead_adder (with bclg).
// Every adder is checked against {cout, s} = a + b + cin:
//   * at its default size (N = 16, R = 4 blocks) with random operands plus long-propagate
//     patterns that make carries cross and skip whole blocks,
//   * exhaustively at N = 8 (R = 4; R = 2 for the lookahead adder, whose N must be a power of R),
//   * the lookahead adder also at N = 64, R = 4 (three BCLG levels).
// Operand sizes, stimulus patterns and run lengths are this bench's own choice; expected values
// come from plain integer arithmetic, never from the adder equations of the design.
`timescale 1ns/1ps
module tb_basic_adders;
  int checks = 0, failures = 0;
  logic [63:0] a, b;
  logic        cin;
  localparam int ND = 5;
  logic [15:0] s16[ND];
  logic        c16[ND];
  logic [7:0]  s8 [ND];
  logic        c8 [ND];
  logic [63:0] s64;
  logic        c64;

  ripple_carry_adder    u_rca16  (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16[0]), .cout(c16[0]));
  carry_select_adder    u_csel16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16[1]), .cout(c16[1]));
  carry_increment_adder u_cinc16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16[2]), .cout(c16[2]));
  carry_skip_adder      u_cskp16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16[3]), .cout(c16[3]));
  carry_lookahead_adder u_cla16  (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16[4]), .cout(c16[4]));

  ripple_carry_adder    #(.N(8))         u_rca8  (.a(a[7:0]), .b(b[7:0]), .cin(cin), .s(s8[0]), .cout(c8[0]));
  carry_select_adder    #(.N(8), .R(4))  u_csel8 (.a(a[7:0]), .b(b[7:0]), .cin(cin), .s(s8[1]), .cout(c8[1]));
  carry_increment_adder #(.N(8), .R(4))  u_cinc8 (.a(a[7:0]), .b(b[7:0]), .cin(cin), .s(s8[2]), .cout(c8[2]));
  carry_skip_adder      #(.N(8), .R(4))  u_cskp8 (.a(a[7:0]), .b(b[7:0]), .cin(cin), .s(s8[3]), .cout(c8[3]));
  carry_lookahead_adder #(.N(8), .R(2))  u_cla8  (.a(a[7:0]), .b(b[7:0]), .cin(cin), .s(s8[4]), .cout(c8[4]));

  carry_lookahead_adder #(.N(64), .R(4)) u_cla64 (.a(a), .b(b), .cin(cin), .s(s64), .cout(c64));

  task automatic check(input int width);
    logic [64:0] exp, got;
    for (int d = 0; d < ND; d++) begin
      if (width == 8) begin
        exp = 65'(a[7:0]) + 65'(b[7:0]) + 65'(cin);
        got = {56'd0, c8[d], s8[d]};
      end else begin
        exp = 65'(a[15:0]) + 65'(b[15:0]) + 65'(cin);
        got = {48'd0, c16[d], s16[d]};
      end
      checks++;
      if (got != exp) begin
        failures++;
        if (failures < 10) $display("FAIL adder=%0d N=%0d a=%h b=%h cin=%b got=%h exp=%h", d,
                                    width, a, b, cin, got, exp);
      end
    end
    if (width == 64) begin
      checks++;
      if ({c64, s64} != {1'b0, a} + {1'b0, b} + 65'(cin)) begin
        failures++;
        if (failures < 10) $display("FAIL cla64 a=%h b=%h cin=%b", a, b, cin);
      end
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      a = 64'(v[7:0]); b = 64'(v[15:8]); cin = v[16];
      #1 check(8);
    end
    for (int r = 0; r < 40000; r++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; cin = 1'($urandom);
      case (r % 4)
        1: b = ~a;                              // every bit propagates: carries skip all blocks
        2: b = ~a ^ (64'd1 << (r % 64));        // one block stops the skip
        3: b = -a;
        default: ;
      endcase
      #1 check(16);
      check(64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
