// tb_prefix_adder -- self-checking test of prefix_adder: binary parallel-prefix adder.
// Every listed tree family is built at N = 8 and checked exhaustively against a + b + cin
// (all 2^17 operand/carry combinations), and at the default width N = 64 with random operands,
// long carry-propagate patterns (b = ~a) and their one-bit variations.
// Operand sizes, stimulus patterns and run lengths are this bench's own choice; expected values
// come from plain integer arithmetic, never from the adder equations of the design.
`timescale 1ns/1ps
module tb_prefix_adder;
  import ppa_pkg::*;
  localparam int    NT     = 7;
  localparam tree_e TR[NT] = '{TREE_BK, TREE_SK, TREE_KS, TREE_HC, TREE_KN, TREE_LF, TREE_HA};
  int checks = 0, failures = 0;
  logic [63:0] a, b;
  logic        cin;
  logic [7:0]  s8  [NT];
  logic        co8 [NT];
  logic [63:0] s64 [NT];
  logic        co64[NT];

  for (genvar t = 0; t < NT; t++) begin : g_t
    prefix_adder #(.N(8), .TREE(TR[t])) u8 (.a(a[7:0]), .b(b[7:0]), .cin(cin), .s(s8[t]), .cout(co8[t]));
    prefix_adder #(.TREE(TR[t])) u64 (.a(a), .b(b), .cin(cin), .s(s64[t]), .cout(co64[t]));
  end

  task automatic check(input bit wide);
    logic [64:0] exp;
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (wide) exp = {1'b0, a} + {1'b0, b} + 65'(cin);
      else      exp = {56'd0, 9'({1'b0, a[7:0]} + {1'b0, b[7:0]} + 9'(cin))};
      if (wide ? ({co64[t], s64[t]} != exp) : ({co8[t], s8[t]} != exp[8:0])) begin
        failures++;
        if (failures < 10) $display("FAIL tree=%0d N=%0d a=%h b=%h cin=%b got=%h exp=%h", TR[t],
          wide ? 64 : 8, wide ? a : {56'd0, a[7:0]}, wide ? b : {56'd0, b[7:0]}, cin,
          wide ? {co64[t], s64[t]} : {56'd0, co8[t], s8[t]}, exp);
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
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a = 64'(x); b = 64'(y); cin = ci[0];
          #1 check(1'b0);
        end
    for (int r = 0; r < 20000; r++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; cin = 1'($urandom);
      if (r % 4 == 1) b = ~a;
      if (r % 4 == 2) b = ~a ^ (64'd1 << (r % 64));
      if (r % 4 == 3) b = -a;
      #1 check(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
