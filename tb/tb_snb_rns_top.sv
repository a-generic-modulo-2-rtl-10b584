// tb_snb_rns_top: end-to-end self-check of the modulo 2^n-1 channel at its default size
// (n = 8, parallel-prefix adder, 24-bit operands).
//
// Operands A and B are drawn in [0, M), M = 255 * 256 * 257. The testbench plays the two
// channels that are outside the design: it supplies x_sum = (A+B) mod 256 and
// z_sum = (A+B) mod 257. It checks that the channel's own sum residue y_sum - y_sum_neg
// equals (A+B) mod 255 in a code with y_sum[0] & y_sum_neg = 0, and that the
// reverse-converted output equals (A+B) mod M. Random operands are mixed with directed
// ones (multiples of 255, sums of exactly M, zero). It counts each mechanism of the
// design: carry-out reduction, stored negabit, unique-zero correction, zero residue,
// all-ones chunk sum in the forward converter, negabit and z_n = 1 at the reverse
// converter, wrap of A+B past M. A mechanism that never occurs is a failure.
module tb_snb_rns_top;
  localparam int  N = 8;
  localparam longint M = 255 * 256 * 257;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [23:0] op_a, op_b, i_sum;
  logic [7:0]  x_sum, y_sum;
  logic [8:0]  z_sum;
  logic        y_sum_neg;

  int n_reduce = 0, n_store = 0, n_fix = 0, n_zero = 0, n_allones = 0;
  int n_zn = 0, n_wrap = 0;

  snb_rns_top dut (
    .op_a, .op_b, .x_sum, .z_sum, .y_sum, .y_sum_neg, .i_sum
  );

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(longint a, longint b);
    longint sum  = a + b;
    longint want = sum % M;
    longint ya   = a % 255, yb = b % 255;
    longint w    = ya + yb + 1;                   // W of the stored-negabit adder
    int     yv;
    op_a  = 24'(a);
    op_b  = 24'(b);
    x_sum = 8'(want % 256);
    z_sum = 9'(want % 257);
    #1;
    yv = int'(y_sum) - int'(y_sum_neg);
    checks += 2;
    if (longint'(yv) != sum % 255 || (y_sum[0] && y_sum_neg)) begin
      failures++;
      $display("FAIL residue A=%0d B=%0d y=%0d/%b", a, b, y_sum, y_sum_neg);
    end
    if (longint'(i_sum) != want) begin
      failures++;
      $display("FAIL result A=%0d B=%0d got %0d want %0d", a, b, i_sum, want);
    end
    if (w >= 256) n_reduce++;
    else if (w % 2 == 1) n_fix++;
    else n_store++;
    if (y_sum_neg) begin
      if (w >= 256 || w % 2 == 1) begin
        failures++; $display("FAIL unexpected negabit A=%0d B=%0d", a, b);
      end
    end
    if (yv == 0) n_zero++;
    if ((a != 0 && a % 255 == 0) || (b != 0 && b % 255 == 0)) n_allones++;
    if (want % 257 == 256) n_zn++;
    if (sum >= M) n_wrap++;
  endtask

  initial begin
    longint a, b;
    apply(0, 0);
    apply(M - 1, M - 1);
    apply(M - 1, 1);
    for (int k = 1; k < 2000; k++) begin
      a = (longint'(k) * 255 * 97) % M;
      apply(a, (M - a) % M);
      apply(a, longint'($urandom) % M);
      apply(longint'(k) * 257 - 1, longint'(k) * 3);
    end
    for (int k = 0; k < 100000; k++) begin
      a = longint'($urandom) % M;
      b = longint'($urandom) % M;
      apply(a, b);
    end
    $display("carry-out reduction=%0d stored negabit=%0d unique-zero fix=%0d zero residue=%0d",
             n_reduce, n_store, n_fix, n_zero);
    $display("all-ones chunk sum=%0d z_n=1=%0d wrap past M=%0d", n_allones, n_zn, n_wrap);
    if (n_reduce == 0) begin failures++; $display("FAIL carry-out reduction never seen"); end
    if (n_store == 0) begin failures++; $display("FAIL stored negabit never seen"); end
    if (n_fix == 0) begin failures++; $display("FAIL unique-zero fix never seen"); end
    if (n_zero == 0) begin failures++; $display("FAIL zero residue never seen"); end
    if (n_allones == 0) begin failures++; $display("FAIL all-ones chunk sum never seen"); end
    if (n_zn == 0) begin failures++; $display("FAIL z_n = 1 never seen"); end
    if (n_wrap == 0) begin failures++; $display("FAIL wrap past M never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
