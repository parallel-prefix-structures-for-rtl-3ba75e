// tb_combined_adder -- self-checking test of combined_adder and combined_ling_adder.
// All three modes are checked against independent references:
//   MODE_BIN     {cout, s} = a + b + cin
//   MODE_MOD_M1  s congruent to a + b modulo 2^n-1, n bits, zero only for a = b = 0
//   MODE_MOD_P1  diminished-one: S* = ((A + B) mod 2^n+1) - 1 with A = a+1, B = b+1, and the
//                all-zero word when the true sum is 0
// (cin and cout are don't-care in the modulo modes.) N = 8 exhaustively for every tree family,
// operands, carry-in and mode; N = 64 (default) randomly.
// Operand sizes, stimulus patterns and run lengths are this bench's own choice; expected values
// come from plain integer arithmetic, never from the adder equations of the design.
`timescale 1ns/1ps
module tb_combined_adder;
  import ppa_pkg::*;
  localparam int    NT     = 7;
  localparam tree_e TR[NT] = '{TREE_BK, TREE_SK, TREE_KS, TREE_HC, TREE_KN, TREE_LF, TREE_HA};
  localparam int    ND     = 2 * NT;
  int checks = 0, failures = 0;
  logic [63:0] a, b;
  logic        cin;
  add_mode_e   mode;
  logic [7:0]  s8  [ND];
  logic        co8 [ND];
  logic [63:0] s64 [ND];
  logic        co64[ND];

  for (genvar t = 0; t < NT; t++) begin : g_t
    combined_adder      #(.N(8), .TREE(TR[t])) uc8 (.a(a[7:0]), .b(b[7:0]), .cin(cin), .mode(mode),
                                                    .s(s8[2*t]), .cout(co8[2*t]));
    combined_ling_adder #(.N(8), .TREE(TR[t])) ul8 (.a(a[7:0]), .b(b[7:0]), .cin(cin), .mode(mode),
                                                    .s(s8[2*t+1]), .cout(co8[2*t+1]));
    combined_adder      #(.TREE(TR[t])) uc64 (.a(a), .b(b), .cin(cin), .mode(mode),
                                              .s(s64[2*t]), .cout(co64[2*t]));
    combined_ling_adder #(.TREE(TR[t])) ul64 (.a(a), .b(b), .cin(cin), .mode(mode),
                                              .s(s64[2*t+1]), .cout(co64[2*t+1]));
  end

  task automatic check(input bit wide);
    logic [127:0] one, av, bv, got, m1, p1, sum, pexp;
    bit bad;
    one = 128'd1;
    av  = wide ? 128'(a) : 128'(a[7:0]);
    bv  = wide ? 128'(b) : 128'(b[7:0]);
    m1  = (one << (wide ? 64 : 8)) - 1;
    p1  = m1 + 2;
    sum = (av + 1 + bv + 1) % p1;
    pexp = (sum == 0) ? 0 : sum - 1;
    for (int d = 0; d < ND; d++) begin
      got = wide ? 128'(s64[d]) : 128'(s8[d]);
      case (mode)
        MODE_MOD_P1: bad = (got != pexp);
        MODE_MOD_M1: bad = ((got % m1) != ((av + bv) % m1)) || ((got == 0) != (av + bv == 0));
        default:     bad = ((got | ((wide ? 128'(co64[d]) : 128'(co8[d])) << (wide ? 64 : 8)))
                            != av + bv + 128'(cin));
      endcase
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL dut=%0d N=%0d mode=%0d a=%h b=%h cin=%b got=%h", d,
                                    wide ? 64 : 8, mode, a, b, cin, got);
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
    for (int md = 0; md < 3; md++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++)
          for (int ci = 0; ci < 2; ci++) begin
            mode = add_mode_e'(md); a = 64'(x); b = 64'(y); cin = ci[0];
            #1 check(1'b0);
          end
    for (int r = 0; r < 30000; r++) begin
      mode = add_mode_e'(r % 3);
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; cin = 1'($urandom);
      case ((r / 3) % 5)
        1: b = ~a;
        2: b = ~a ^ (64'd1 << (r % 64));
        3: b = -a;
        4: a = '1;
        default: ;
      endcase
      #1 check(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
