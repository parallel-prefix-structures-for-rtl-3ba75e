// tb_prefix_tree -- self-checking test of prefix_tree for all seven tree families, with and
// without carry-in column, plain and Ling leaves, at N = 8 (exhaustive over both operands and the
// carry-in) and N = 64 (random), plus the carry-save variant without the last row.
// Each configuration is compared with a ripple reference by tb_tree_checker.
// Operand sizes, stimulus patterns and run lengths are this bench's own choice; expected values
// come from plain integer arithmetic, never from the adder equations of the design.
`timescale 1ns/1ps
module tb_prefix_tree;
  import ppa_pkg::*;
  localparam int NT = 7;
  int checks = 0, failures = 0;
  logic [63:0] a, b;
  logic        cin;
  logic        ok8 [NT][4];
  logic        ok64[NT][4];
  logic        okd8 [4];
  logic        okd64[4];
  localparam tree_e DROP_T[4] = '{TREE_BK, TREE_HC, TREE_LF, TREE_HA};

  for (genvar t = 0; t < NT; t++) begin : g_t
    for (genvar c = 0; c < 4; c++) begin : g_c
      tb_tree_checker #(.N(8), .TREE(tree_e'(t)), .HAS_CIN(c[0]), .LING(c[1])) u8 (
        .a(a[7:0]), .b(b[7:0]), .cin(cin), .ok(ok8[t][c]));
      tb_tree_checker #(.N(64), .TREE(tree_e'(t)), .HAS_CIN(c[0]), .LING(c[1])) u64 (
        .a(a), .b(b), .cin(cin), .ok(ok64[t][c]));
    end
  end
  for (genvar d = 0; d < 4; d++) begin : g_d
    tb_tree_checker #(.N(8), .TREE(DROP_T[d]), .HAS_CIN(1'b1), .DROP_LAST(1'b1)) u8 (
      .a(a[7:0]), .b(b[7:0]), .cin(cin), .ok(okd8[d]));
    tb_tree_checker #(.N(64), .TREE(DROP_T[d]), .HAS_CIN(1'b1), .DROP_LAST(1'b1)) u64 (
      .a(a), .b(b), .cin(cin), .ok(okd64[d]));
  end

  task automatic check_all(input bit wide);
    for (int t = 0; t < NT; t++)
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (!(wide ? ok64[t][c] : ok8[t][c])) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d tree=%0d cfg=%0d a=%h b=%h cin=%b",
                                      wide ? 64 : 8, t, c, a, b, cin);
        end
      end
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (!(wide ? okd64[d] : okd8[d])) begin
        failures++;
        if (failures < 10) $display("FAIL drop-last N=%0d d=%0d a=%h b=%h", wide ? 64 : 8, d, a, b);
      end
    end
  endtask

  initial begin : watchdog
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a = {$urandom, $urandom}; b = {$urandom, $urandom};
          a[7:0] = x[7:0]; b[7:0] = y[7:0]; cin = ci[0];
          #1 check_all(1'b0);
        end
    for (int r = 0; r < 4000; r++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; cin = 1'($urandom);
      if (r % 4 == 1) b = ~a;                 // long propagate chains
      if (r % 4 == 2) b = ~a ^ (64'd1 << (r % 64));
      #1 check_all(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
