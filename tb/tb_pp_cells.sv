// tb_pp_cells -- exhaustive self-checking test of the prefix cells:
//   pp_white_cell (both XOR and OR propagate), pp_black_cell, pp_gray_cell,
//   ling_reduced_black_cell and ling_reduced_gray_cell.
// Each cell is checked for every input combination against its defining equation.
// Operand sizes, stimulus patterns and run lengths are this bench's own choice; expected values
// come from plain integer arithmetic, never from the adder equations of the design.
`timescale 1ns/1ps
module tb_pp_cells;
  int checks = 0, failures = 0;
  logic [3:0] v;
  logic wgx, wpx, wgo, wpo, bg, bp, gg, lh, li, lgh;

  pp_white_cell #(.XOR_P(1'b1)) u_wx (.a(v[0]), .b(v[1]), .g(wgx), .p(wpx));
  pp_white_cell #(.XOR_P(1'b0)) u_wo (.a(v[0]), .b(v[1]), .g(wgo), .p(wpo));
  pp_black_cell u_bk (.g_hi(v[3]), .p_hi(v[2]), .g_lo(v[1]), .p_lo(v[0]), .g(bg), .p(bp));
  pp_gray_cell  u_gy (.g_hi(v[3]), .p_hi(v[2]), .g_lo(v[1]), .g(gg));
  ling_reduced_black_cell u_lb (.g_hi(v[3]), .g_lo(v[2]), .p_hi(v[1]), .p_lo(v[0]),
                                .h(lh), .i_o(li));
  ling_reduced_gray_cell  u_lg (.g_hi(v[3]), .g_lo(v[2]), .h(lgh));

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s v=%b got=%b exp=%b", what, v, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      v = k[3:0];
      #1;
      expect_eq(wgx, v[0] & v[1],               "white g (xor)");
      expect_eq(wpx, v[0] ^ v[1],               "white p (xor)");
      expect_eq(wgo, v[0] & v[1],               "white g (or)");
      expect_eq(wpo, v[0] | v[1],               "white p (or)");
      expect_eq(bg,  v[3] | (v[2] & v[1]),      "black G");
      expect_eq(bp,  v[2] & v[0],               "black P");
      expect_eq(gg,  v[3] | (v[2] & v[1]),      "gray G");
      expect_eq(lh,  v[3] | v[2],               "ling reduced black H");
      expect_eq(li,  v[1] & v[0],               "ling reduced black I");
      expect_eq(lgh, v[3] | v[2],               "ling reduced gray H");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
