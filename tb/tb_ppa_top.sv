// tb_ppa_top -- end-to-end, full-size test of ppa_top at its default parameters (N = 64,
// Brent-Kung trees).
// Each operand set is applied to all adders at once and every result port is compared with a
// reference computed from plain integer arithmetic:
//   binary      {cout, s} = a + b + cin
//   mod 2^n-1   s congruent to a + b, zero only for a = b = 0 (double-zero representation)
//   mod 2^n+1   diminished-one: s = ((a+1 + b+1) mod 2^n+1) - 1, all-zero word for a zero sum
//   combined    the reference of the selected mode (mode 3 behaves as binary)
//   incrementer a + cin
//   classic     NOR ripple, ripple-carry, carry-select, carry-increment, carry-skip, carry-lookahead: binary
// Besides checking, the bench counts how often each mechanism of the design is really
// exercised; a mechanism that never occurs is counted as a failure:
//   binary carry-out, long carry-propagate chain (>= n/2 bits, crosses the sparse-tree and
//   carry-save boundaries), Ling pseudo-carry differing from the carry, mod 2^n-1 end-around carry,
//   mod 2^n-1 all-ones zero result, mod 2^n+1 injected inverted carry (c_out = 0),
//   mod 2^n+1 zero result, incrementer carry through every bit, each combined-adder mode, and a
//   carry that skips a whole 4-bit block of the carry-skip adder.
// Operand sizes, stimulus patterns and run lengths are this bench's own choice; expected values
// come from plain integer arithmetic, never from the adder equations of the design.
`timescale 1ns/1ps
module tb_ppa_top;
  localparam int N = 64;
  int checks = 0, failures = 0;

  logic [N-1:0] a, b;
  logic         cin;
  logic [1:0]   mode;
  logic [N-1:0] s_bin, s_ling, s_cs, s_nand;
  logic         cout_bin, cout_ling, cout_cs, cout_nand;
  logic [N-1:0] s_m1_full, s_m1_reduced, s_m1_ling, s_m1_csei, s_m1_csei_nand;
  logic [N-1:0] s_p1_full, s_p1_reduced, s_p1_ling, s_p1_csei;
  logic [N-1:0] s_comb, s_comb_ling, s_inc;
  logic         cout_comb, cout_comb_ling;
  logic [N-1:0] s_nor;
  logic         cout_nor;
  logic [N-1:0] s_rca, s_csel, s_cinc, s_cskip, s_cla;
  logic         cout_rca, cout_csel, cout_cinc, cout_cskip, cout_cla;

  ppa_top u_dut (.*);

  // mechanism counters
  localparam int NM = 12;
  int    seen[NM];
  string mname[NM] = '{"binary carry-out", "long carry chain", "Ling d != c",
                       "m1 end-around carry", "m1 all-ones zero", "p1 inverted carry in",
                       "p1 zero result", "incrementer full carry", "combined mode p1",
                       "combined mode m1", "combined mode binary", "carry skips a block"};

  function automatic void expect_eq(logic [N:0] got, logic [N:0] exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h cin=%b mode=%0d got=%h exp=%h", what, a, b,
                                  cin, mode, got, exp);
    end
  endfunction

  function automatic void expect_m1(logic [N-1:0] got, string what);
    logic [N:0] sum;
    logic [N:0] m;
    sum = {1'b0, a} + {1'b0, b};
    m   = {1'b0, {N{1'b1}}};
    checks++;
    if (({1'b0, got} % m) != (sum % m) || ((got == 0) != (sum == 0))) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h got=%h", what, a, b, got);
    end
  endfunction

  task automatic check_all();
    logic [N+1:0] bin, p1sum;
    logic [N:0]   p1exp;
    int           run, best;
    bin   = (N+2)'(a) + (N+2)'(b) + (N+2)'(cin);
    p1sum = ((N+2)'(a) + 1 + (N+2)'(b) + 1) % ((N+2)'(1) << N | (N+2)'(1));
    p1exp = (p1sum == 0) ? '0 : (N+1)'(p1sum - 1);

    expect_eq({cout_bin, s_bin},   bin[N:0], "prefix_adder");
    expect_eq({cout_ling, s_ling}, bin[N:0], "ling_prefix_adder");
    expect_eq({cout_cs, s_cs},     bin[N:0], "cs_prefix_adder");
    expect_eq({cout_nand, s_nand}, bin[N:0], "nand_adder");
    expect_eq({cout_nor, s_nor},     bin[N:0], "nor_adder");
    expect_eq({cout_rca, s_rca},     bin[N:0], "ripple_carry_adder");
    expect_eq({cout_csel, s_csel},   bin[N:0], "carry_select_adder");
    expect_eq({cout_cinc, s_cinc},   bin[N:0], "carry_increment_adder");
    expect_eq({cout_cskip, s_cskip}, bin[N:0], "carry_skip_adder");
    expect_eq({cout_cla, s_cla},     bin[N:0], "carry_lookahead_adder");
    expect_m1(s_m1_full,      "mod_m1_full_prefix_adder");
    expect_m1(s_m1_reduced,   "mod_m1_reduced_prefix_adder");
    expect_m1(s_m1_ling,      "mod_m1_ling_prefix_adder");
    expect_m1(s_m1_csei,      "mod_m1_csei_adder");
    expect_m1(s_m1_csei_nand, "mod_m1_csei_nand_adder");
    expect_eq({1'b0, s_p1_full},    p1exp, "mod_p1_full_prefix_adder");
    expect_eq({1'b0, s_p1_reduced}, p1exp, "mod_p1_reduced_prefix_adder");
    expect_eq({1'b0, s_p1_ling},    p1exp, "mod_p1_ling_prefix_adder");
    expect_eq({1'b0, s_p1_csei},    p1exp, "mod_p1_csei_adder");
    expect_eq({1'b0, s_inc}, {1'b0, a + N'(cin)}, "cse_incrementer");
    case (mode)
      2'd0: begin
        expect_eq({1'b0, s_comb}, p1exp, "combined_adder p1");
        expect_eq({1'b0, s_comb_ling}, p1exp, "combined_ling_adder p1");
      end
      2'd1: begin
        expect_m1(s_comb, "combined_adder m1");
        expect_m1(s_comb_ling, "combined_ling_adder m1");
      end
      default: begin
        expect_eq({cout_comb, s_comb}, bin[N:0], "combined_adder binary");
        expect_eq({cout_comb_ling, s_comb_ling}, bin[N:0], "combined_ling_adder binary");
      end
    endcase

    // mechanism coverage, from the operands only
    if (bin[N]) seen[0]++;
    run = 0; best = 0;
    for (int i = 0; i < N; i++) begin
      if ((a[i] ^ b[i]) && (i == 0 ? N'(cin) : ((a + b + N'(cin)) ^ a ^ b) >> i & 1) != 0) run++;
      else run = 0;
      if (run > best) best = run;
    end
    if (best >= N / 2) seen[1]++;
    for (int i = 1; i < N; i++)   // carry into bit i set while bit i kills it: d_(i+1) != c_(i+1)
      if ((((a + b + N'(cin)) ^ a ^ b) >> i & 1) != 0 && !a[i] && !b[i]) begin
        seen[2]++;
        break;
      end
    if ({1'b0, a} + {1'b0, b} > {1'b0, {N{1'b1}}}) seen[3]++;
    if (a + b == '1 && !({1'b0, a} + {1'b0, b} > {1'b0, {N{1'b1}}})) seen[4]++;
    if (!({1'b0, a} + {1'b0, b} > {1'b0, {N{1'b1}}})) seen[5]++;
    if (p1sum == 0) seen[6]++;
    if (a == '1 && cin) seen[7]++;
    if (mode == 2'd0) seen[8]++;
    if (mode == 2'd1) seen[9]++;
    if (mode >= 2'd2) seen[10]++;
    for (int k = 1; k < N / 4; k++)   // block k fully propagates and receives a carry
      if ((a[4*k +: 4] ^ b[4*k +: 4]) == 4'hF && ((((a + b + N'(cin)) ^ a ^ b) >> (4*k)) & 1) != 0) begin
        seen[11]++;
        break;
      end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 40000; r++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      cin = 1'($urandom); mode = 2'($urandom);
      case (r % 8)
        1: b = ~a;                            // all-propagate: m1 all-ones, p1 zero sum
        2: b = ~a ^ (N'(1) << (r % N));       // long propagate chain broken once
        3: b = -a;                            // carry through every bit
        4: a = '1;                            // incrementer carry through every bit
        5: begin a = a >> (r % N); b = b >> ((r / 8) % N); end  // small operands, no carry-out
        6: begin a = 0; if (r % 16 == 6) b = 0; end           // zero operands
        default: ;
      endcase
      #1 check_all();
    end
    for (int m = 0; m < NM; m++) begin
      $display("mechanism %-24s seen %0d times", mname[m], seen[m]);
      if (seen[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
