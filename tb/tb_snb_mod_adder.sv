// tb_snb_mod_adder: exhaustive self-check of the stored-negabit modulo 2^n-1 adder.
//
// Every valid stored-negabit code is applied as A and as B: a value v in [0, 2^n-2] coded
// as (v, 0), and every odd v <= 2^n-3 also as (v+1, 1). The reference is the integer
// (va + vb) mod (2^n-1). Per pair the testbench checks that s - s_neg equals it, that
// s[0] & s_neg is 0 and that zero has the single code 0/0. Exhaustive instances: n = 8
// with the parallel-prefix and the ripple-carry adder, n = 5 and n = 3 with the
// parallel-prefix adder; random: n = 16 (both architectures) and n = 32, with 50000
// random valid codes each. It also counts how often each path of the algorithm is taken (carry-out
// reduction, stored negabit result, unique-zero correction, negabit inputs, zero sum)
// and counts a failure for any that never occurs.
module tb_snb_mod_adder;
  import snb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // event counters
  int n_reduce = 0, n_store = 0, n_fix = 0, n_negin = 0, n_both_neg = 0, n_zero = 0;

  logic [7:0] a8, b8, s8p, s8r;
  logic       an8, bn8, sn8p, sn8r;
  logic [4:0] a5, b5, s5;
  logic       an5, bn5, sn5;
  logic [2:0] a3, b3, s3;
  logic       an3, bn3, sn3;
  logic [15:0] a16, b16, s16p, s16r;
  logic        an16, bn16, sn16p, sn16r;
  logic [31:0] a32, b32, s32;
  logic        an32, bn32, sn32;

  snb_mod_adder #(.N(8), .ARCH(ARCH_PREFIX)) dut8p (.a(a8), .a_neg(an8), .b(b8), .b_neg(bn8), .s(s8p), .s_neg(sn8p));
  snb_mod_adder #(.N(8), .ARCH(ARCH_RIPPLE)) dut8r (.a(a8), .a_neg(an8), .b(b8), .b_neg(bn8), .s(s8r), .s_neg(sn8r));
  snb_mod_adder #(.N(5)) dut5 (.a(a5), .a_neg(an5), .b(b5), .b_neg(bn5), .s(s5), .s_neg(sn5));
  snb_mod_adder #(.N(3)) dut3 (.a(a3), .a_neg(an3), .b(b3), .b_neg(bn3), .s(s3), .s_neg(sn3));
  snb_mod_adder #(.N(16), .ARCH(ARCH_PREFIX)) dut16p (.a(a16), .a_neg(an16), .b(b16), .b_neg(bn16), .s(s16p), .s_neg(sn16p));
  snb_mod_adder #(.N(16), .ARCH(ARCH_RIPPLE)) dut16r (.a(a16), .a_neg(an16), .b(b16), .b_neg(bn16), .s(s16r), .s_neg(sn16r));
  snb_mod_adder #(.N(32)) dut32 (.a(a32), .a_neg(an32), .b(b32), .b_neg(bn32), .s(s32), .s_neg(sn32));

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // number of valid codes for width n, and the code with a given index
  function automatic int ncodes(int n);
    return ((1 << n) - 1) + ((1 << (n - 1)) - 1);
  endfunction

  function automatic void code(int n, int idx, output int bin, output bit neg);
    if (idx < (1 << n) - 1) begin
      bin = idx; neg = 1'b0;
    end else begin
      bin = 2 + 2 * (idx - ((1 << n) - 1)); neg = 1'b1;
    end
  endfunction

  function automatic void check(string tag, int n, longint ab, bit an, longint bb, bit bn,
                                longint s, bit sn);
    longint m    = (longint'(1) << n) - 1;
    longint want = (ab - longint'(an) + bb - longint'(bn)) % m;
    longint got  = s - longint'(sn);
    checks++;
    if (got != want || (s[0] && sn) || got < 0 || got >= m) begin
      failures++;
      $display("FAIL %s A=%0d/%b B=%0d/%b -> %0d/%b want value %0d",
               tag, ab, an, bb, bn, s, sn, want);
    end
  endfunction

  // a random valid code of width n; every 97th call gives an edge value
  task automatic random_code(int n, int k, output logic [31:0] bin, output logic neg);
    longint m = (longint'(1) << n) - 1;
    longint v = (k % 97 == 0) ? 0 : (k % 97 == 1) ? m - 1 : ((longint'($urandom) << 32) | longint'($urandom)) % m;
    if (v % 2 == 1 && $urandom % 2 == 1) begin
      bin = 32'(v + 1); neg = 1'b1;
    end else begin
      bin = 32'(v); neg = 1'b0;
    end
  endtask

  initial begin
    int ab, bb, w;
    bit an, bn;
    // n = 8, both architectures, with path counting
    for (int i = 0; i < ncodes(8); i++) begin
      for (int j = 0; j < ncodes(8); j++) begin
        code(8, i, ab, an); code(8, j, bb, bn);
        a8 = 8'(ab); an8 = an; b8 = 8'(bb); bn8 = bn;
        #1;
        check("n8 prefix", 8, ab, an, bb, bn, s8p, sn8p);
        check("n8 ripple", 8, ab, an, bb, bn, s8r, sn8r);
        w = ab - int'(an) + bb - int'(bn) + 1;          // W = A + B + 1
        if (w >= 256) n_reduce++;
        else if (w % 2 == 1) n_fix++;
        else n_store++;
        if (an || bn) n_negin++;
        if (an && bn) n_both_neg++;
        if (s8p == 0 && !sn8p) n_zero++;
      end
    end
    for (int i = 0; i < ncodes(5); i++) begin
      for (int j = 0; j < ncodes(5); j++) begin
        code(5, i, ab, an); code(5, j, bb, bn);
        a5 = 5'(ab); an5 = an; b5 = 5'(bb); bn5 = bn;
        #1;
        check("n5", 5, ab, an, bb, bn, s5, sn5);
      end
    end
    for (int i = 0; i < ncodes(3); i++) begin
      for (int j = 0; j < ncodes(3); j++) begin
        code(3, i, ab, an); code(3, j, bb, bn);
        a3 = 3'(ab); an3 = an; b3 = 3'(bb); bn3 = bn;
        #1;
        check("n3", 3, ab, an, bb, bn, s3, sn3);
      end
    end
    // n = 16 and n = 32: random valid codes (value 2^n-2 and zero included)
    for (int k = 0; k < 50000; k++) begin
      random_code(16, k, a16, an16); random_code(16, k + 7, b16, bn16);
      random_code(32, k, a32, an32); random_code(32, k + 3, b32, bn32);
      #1;
      check("n16 prefix", 16, a16, an16, b16, bn16, s16p, sn16p);
      check("n16 ripple", 16, a16, an16, b16, bn16, s16r, sn16r);
      check("n32 prefix", 32, a32, an32, b32, bn32, s32, sn32);
    end
    $display("paths (n=8): carry-out reduction=%0d stored negabit=%0d unique-zero fix=%0d",
             n_reduce, n_store, n_fix);
    $display("negabit inputs=%0d both negabits=%0d zero sums=%0d", n_negin, n_both_neg, n_zero);
    if (n_reduce == 0) begin failures++; $display("FAIL carry-out reduction never seen"); end
    if (n_store == 0) begin failures++; $display("FAIL stored negabit never seen"); end
    if (n_fix == 0) begin failures++; $display("FAIL unique-zero fix never seen"); end
    if (n_both_neg == 0) begin failures++; $display("FAIL T = -1 never seen"); end
    if (n_zero == 0) begin failures++; $display("FAIL zero sum never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
