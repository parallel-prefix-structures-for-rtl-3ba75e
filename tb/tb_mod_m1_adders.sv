// tb_mod_m1_adders -- self-checking test of the five modulo 2^n-1 adders:
// mod_m1_full_prefix_adder, mod_m1_reduced_prefix_adder, mod_m1_ling_prefix_adder,
// mod_m1_csei_adder and mod_m1_csei_nand_adder.
// Reference (independent of the end-around-carry equations): the result must be congruent to
// a + b modulo 2^n-1, must fit in n bits, and must be the all-zero word only when a = b = 0
// (the adders use the double-zero representation, so 0 + x keeps x).
// N = 8 is checked exhaustively for every tree family, N = 64 (default) with random operands
// and long carry-propagate patterns.
// Operand sizes, stimulus patterns and run lengths are this bench's own choice; expected values
// come from plain integer arithmetic, never from the adder equations of the design.
`timescale 1ns/1ps
module tb_mod_m1_adders;
  import ppa_pkg::*;
  localparam int    NT     = 7;
  localparam tree_e TR[NT] = '{TREE_BK, TREE_SK, TREE_KS, TREE_HC, TREE_KN, TREE_LF, TREE_HA};
  localparam int    ND     = 3 * NT + 2;   // tree-parameterised adders + the two fixed ones
  int checks = 0, failures = 0;
  logic [63:0] a, b;
  logic [7:0]  s8 [ND];
  logic [63:0] s64[ND];

  for (genvar t = 0; t < NT; t++) begin : g_t
    mod_m1_reduced_prefix_adder #(.N(8), .TREE(TR[t])) ur8 (.a(a[7:0]), .b(b[7:0]), .s(s8[3*t]));
    mod_m1_ling_prefix_adder    #(.N(8), .TREE(TR[t])) ul8 (.a(a[7:0]), .b(b[7:0]), .s(s8[3*t+1]));
    mod_m1_csei_adder           #(.N(8), .TREE(TR[t])) uc8 (.a(a[7:0]), .b(b[7:0]), .s(s8[3*t+2]));
    mod_m1_reduced_prefix_adder #(.TREE(TR[t])) ur64 (.a(a), .b(b), .s(s64[3*t]));
    mod_m1_ling_prefix_adder    #(.TREE(TR[t])) ul64 (.a(a), .b(b), .s(s64[3*t+1]));
    mod_m1_csei_adder           #(.TREE(TR[t])) uc64 (.a(a), .b(b), .s(s64[3*t+2]));
  end
  mod_m1_full_prefix_adder #(.N(8)) uf8  (.a(a[7:0]), .b(b[7:0]), .s(s8[ND-2]));
  mod_m1_csei_nand_adder   #(.N(8)) un8  (.a(a[7:0]), .b(b[7:0]), .s(s8[ND-1]));
  mod_m1_full_prefix_adder          uf64 (.a(a), .b(b), .s(s64[ND-2]));
  mod_m1_csei_nand_adder            un64 (.a(a), .b(b), .s(s64[ND-1]));

  task automatic check(input bit wide);
    logic [127:0] m, sum, got;
    m   = wide ? {64'd0, 64'hFFFF_FFFF_FFFF_FFFF} : 128'd255;
    sum = wide ? 128'(a) + 128'(b) : 128'(a[7:0]) + 128'(b[7:0]);
    for (int d = 0; d < ND; d++) begin
      got = wide ? 128'(s64[d]) : 128'(s8[d]);
      checks++;
      if ((got % m) != (sum % m) || ((got == 0) != (sum == 0))) begin
        failures++;
        if (failures < 10) $display("FAIL dut=%0d N=%0d a=%h b=%h got=%h", d, wide ? 64 : 8,
                                    a, b, got);
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
        3: b = -a;
        4: a = '1;
        5: begin a = 0; if (r % 12 == 5) b = 0; end
        default: ;
      endcase
      #1 check(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
