// tb_nand_adder -- self-checking test of the NAND-gate and NOR-gate ripple adders (nand_adder,
// nor_adder): {cout, s} = a + b + cin for both.
// N = 8 exhaustively (all operands and carry-in), N = 64 (default) randomly including full
// carry-propagate chains.
// Operand sizes, stimulus patterns and run lengths are this bench's own choice; expected values
// come from plain integer arithmetic, never from the adder equations of the design.
`timescale 1ns/1ps
module tb_nand_adder;
  int checks = 0, failures = 0;
  logic [63:0] a, b, s64;
  logic [7:0]  s8;
  logic        cin, co8, co64;
  logic [63:0] r64;
  logic [7:0]  r8;
  logic        ro8, ro64;

  nand_adder #(.N(8)) u8  (.a(a[7:0]), .b(b[7:0]), .cin(cin), .s(s8), .cout(co8));
  nand_adder          u64 (.a(a), .b(b), .cin(cin), .s(s64), .cout(co64));
  nor_adder  #(.N(8)) v8  (.a(a[7:0]), .b(b[7:0]), .cin(cin), .s(r8), .cout(ro8));
  nor_adder           v64 (.a(a), .b(b), .cin(cin), .s(r64), .cout(ro64));

  task automatic check(input bit wide);
    checks++;
    if (wide ? ({co64, s64} != {1'b0, a} + {1'b0, b} + 65'(cin))
             : ({co8, s8} != {1'b0, a[7:0]} + {1'b0, b[7:0]} + 9'(cin))) begin
      failures++;
      if (failures < 10) $display("FAIL nand N=%0d a=%h b=%h cin=%b", wide ? 64 : 8, a, b, cin);
    end
    checks++;
    if (wide ? ({ro64, r64} != {1'b0, a} + {1'b0, b} + 65'(cin))
             : ({ro8, r8} != {1'b0, a[7:0]} + {1'b0, b[7:0]} + 9'(cin))) begin
      failures++;
      if (failures < 10) $display("FAIL nor N=%0d a=%h b=%h cin=%b", wide ? 64 : 8, a, b, cin);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1 << 17; v++) begin
      a = 64'(v[7:0]); b = 64'(v[15:8]); cin = v[16];
      #1 check(1'b0);
    end
    for (int r = 0; r < 20000; r++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; cin = 1'($urandom);
      if (r % 3 == 1) b = ~a;
      if (r % 3 == 2) b = ~a ^ (64'd1 << (r % 64));
      #1 check(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
