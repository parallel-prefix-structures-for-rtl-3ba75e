// tb_cse_incrementer -- self-checking test of the carry-select incrementer: s = s_in + inc
// (mod 2^n). N = 8 exhaustively, N = 64 (default) with random values, runs of trailing ones
// and the all-ones word.
// Operand sizes, stimulus patterns and run lengths are this bench's own choice; expected values
// come from plain integer arithmetic, never from the adder equations of the design.
`timescale 1ns/1ps
module tb_cse_incrementer;
  int checks = 0, failures = 0;
  logic [63:0] x, s64;
  logic [7:0]  s8;
  logic        inc;

  cse_incrementer #(.N(8)) u8  (.s_in(x[7:0]), .inc(inc), .s(s8));
  cse_incrementer          u64 (.s_in(x), .inc(inc), .s(s64));

  task automatic check();
    checks += 2;
    if (s8 != x[7:0] + 8'(inc)) begin
      failures++;
      $display("FAIL N=8 x=%h inc=%b got=%h", x[7:0], inc, s8);
    end
    if (s64 != x + 64'(inc)) begin
      failures++;
      if (failures < 10) $display("FAIL N=64 x=%h inc=%b got=%h", x, inc, s64);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      x = {$urandom, 24'd0, v[8:1]}; inc = v[0];
      #1 check();
    end
    for (int r = 0; r < 20000; r++) begin
      x = {$urandom, $urandom}; inc = 1'($urandom);
      if (r % 3 == 1) x = x | ((64'd1 << (r % 65)) - 1);   // trailing ones
      if (r % 101 == 0) x = '1;
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
