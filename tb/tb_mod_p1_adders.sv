// tb_mod_p1_adders -- self-checking test of the four diminished-one modulo 2^n+1 adders:
// mod_p1_full_prefix_adder, mod_p1_reduced_prefix_adder, mod_p1_ling_prefix_adder and
// mod_p1_csei_adder.
// Operands and result are diminished-one numbers (a* = A - 1). The reference computes
// A + B mod 2^n+1 on the true values and converts back: S* = S - 1. The zero operand itself is
// not exercised in diminished-one form (it needs a separate zero flag, outside these adders);
// when the true sum is 0 the adders must return the all-zero word (the hardware convention).
// N = 8 exhaustively for every tree family, N = 64 (default) randomly.
// Operand sizes, stimulus patterns and run lengths are this bench's own choice; expected values
// come from plain integer arithmetic, never from the adder equations of the design.
`timescale 1ns/1ps
module tb_mod_p1_adders;
  import ppa_pkg::*;
  localparam int    NT     = 7;
  localparam tree_e TR[NT] = '{TREE_BK, TREE_SK, TREE_KS, TREE_HC, TREE_KN, TREE_LF, TREE_HA};
  localparam int    ND     = 3 * NT + 1;
  int checks = 0, failures = 0;
  logic [63:0] a, b;
  logic [7:0]  s8 [ND];
  logic [63:0] s64[ND];

  for (genvar t = 0; t < NT; t++) begin : g_t
    mod_p1_reduced_prefix_adder #(.N(8), .TREE(TR[t])) ur8 (.a(a[7:0]), .b(b[7:0]), .s(s8[3*t]));
    mod_p1_ling_prefix_adder    #(.N(8), .TREE(TR[t])) ul8 (.a(a[7:0]), .b(b[7:0]), .s(s8[3*t+1]));
    mod_p1_csei_adder           #(.N(8), .TREE(TR[t])) uc8 (.a(a[7:0]), .b(b[7:0]), .s(s8[3*t+2]));
    mod_p1_reduced_prefix_adder #(.TREE(TR[t])) ur64 (.a(a), .b(b), .s(s64[3*t]));
    mod_p1_ling_prefix_adder    #(.TREE(TR[t])) ul64 (.a(a), .b(b), .s(s64[3*t+1]));
    mod_p1_csei_adder           #(.TREE(TR[t])) uc64 (.a(a), .b(b), .s(s64[3*t+2]));
  end
  mod_p1_full_prefix_adder #(.N(8)) uf8  (.a(a[7:0]), .b(b[7:0]), .s(s8[ND-1]));
  mod_p1_full_prefix_adder          uf64 (.a(a), .b(b), .s(s64[ND-1]));

  task automatic check(input bit wide);
    logic [127:0] m, ta, tb_, sum, exp, got;
    m   = wide ? 128'h1_0000_0000_0000_0001 : 128'd257;
    ta  = (wide ? 128'(a) : 128'(a[7:0])) + 1;
    tb_ = (wide ? 128'(b) : 128'(b[7:0])) + 1;
    sum = (ta + tb_) % m;
    exp = (sum == 0) ? 0 : sum - 1;
    for (int d = 0; d < ND; d++) begin
      got = wide ? 128'(s64[d]) : 128'(s8[d]);
      checks++;
      if (got != exp) begin
        failures++;
        if (failures < 10) $display("FAIL dut=%0d N=%0d a=%h b=%h got=%h exp=%h", d,
                                    wide ? 64 : 8, a, b, got, exp);
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
      for (int y = 0; y < 256; y++) begin
        a = 64'(x); b = 64'(y);
        #1 check(1'b0);
      end
    for (int r = 0; r < 20000; r++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      case (r % 6)
        1: b = ~a;
        2: b = ~a ^ (64'd1 << (r % 64));
        3: b = ~a - 64'd1;          // true sum = 2^n, one below the modulus
        4: a = '1;
        5: b = -a;
        default: ;
      endcase
      #1 check(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
