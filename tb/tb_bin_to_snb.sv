// tb_bin_to_snb: self-check of the binary to stored-negabit converter.
// Reference: the integer remainder I % (2^n-1). Checked for n = 8, 24-bit input (the
// defaults) and for n = 5 with a 17-bit input (last chunk partly filled), with random
// inputs plus multiples of 2^n-1 (where the all-ones code of zero must be avoided) and
// all-ones and zero inputs. The result must never be all ones and its negabit is 0.
module tb_bin_to_snb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [23:0] i8;
  logic [7:0]  r8;
  logic        rn8;
  logic [16:0] i5;
  logic [4:0]  r5;
  logic        rn5;
  int n_allones = 0;

  bin_to_snb dut8 (.bin(i8), .r(r8), .r_neg(rn8));
  bin_to_snb #(.N(5), .IN_W(17)) dut5 (.bin(i5), .r(r5), .r_neg(rn5));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(longint v8, longint v5);
    i8 = 24'(v8); i5 = 17'(v5);
    #1;
    checks += 2;
    if (r8 != 8'(longint'(i8) % 255) || rn8 || r8 == 8'hFF) begin
      failures++; $display("FAIL n=8 I=%0d r=%0d/%b", i8, r8, rn8);
    end
    if (r5 != 5'(longint'(i5) % 31) || rn5 || r5 == 5'h1F) begin
      failures++; $display("FAIL n=5 I=%0d r=%0d/%b", i5, r5, rn5);
    end
    // chunk sum is a nonzero multiple of 2^n-1: end-around result is all ones
    if (i8 != 0 && longint'(i8) % 255 == 0) n_allones++;
  endtask

  initial begin
    apply(0, 0);
    apply(24'hFFFFFF, 17'h1FFFF);
    for (int k = 1; k < 2000; k++) apply(longint'(k) * 255 * 37 % 16777216, longint'(k) * 31 % 131072);
    for (int k = 0; k < 20000; k++) apply($urandom, $urandom);
    $display("inputs that are nonzero multiples of 2^n-1: %0d", n_allones);
    if (n_allones == 0) begin failures++; $display("FAIL all-ones case never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
