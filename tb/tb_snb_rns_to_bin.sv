// tb_snb_rns_to_bin: self-check of the {2^n-1, 2^n, 2^n+1} reverse converter.
// For each I in the dynamic range M = (2^n-1) 2^n (2^n+1) the testbench forms
// X = I % 2^n, Z = I % (2^n+1) and Y = I % (2^n-1) in every stored-negabit code
// ((Y, 0), and (Y+1, 1) when Y is odd) and expects I back. n = 4 and n = 5 are checked
// exhaustively, n = 8 (the default) over 40000 random I plus the range ends.
module tb_snb_rns_to_bin;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] x4, y4;  logic yn4; logic [4:0] z4; logic [11:0] i4;
  logic [4:0] x5, y5;  logic yn5; logic [5:0] z5; logic [14:0] i5;
  logic [7:0] x8, y8;  logic yn8; logic [8:0] z8; logic [23:0] i8;
  int n_neg = 0, n_zn = 0;

  snb_rns_to_bin #(.N(4)) dut4 (.x(x4), .y(y4), .y_neg(yn4), .z(z4), .i_out(i4));
  snb_rns_to_bin #(.N(5)) dut5 (.x(x5), .y(y5), .y_neg(yn5), .z(z5), .i_out(i5));
  snb_rns_to_bin          dut8 (.x(x8), .y(y8), .y_neg(yn8), .z(z8), .i_out(i8));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply I to the instance of width n, with negabit code chosen by alt
  task automatic apply(int n, int i, bit alt);
    int y = i % ((1 << n) - 1);
    bit neg = 1'b0;
    int got;
    if (alt) begin
      if (y % 2 == 0) return;          // even residues have a single code
      y++; neg = 1'b1;
    end
    case (n)
      4: begin x4 = 4'(i); y4 = 4'(y); yn4 = neg; z4 = 5'(i % 17); end
      5: begin x5 = 5'(i); y5 = 5'(y); yn5 = neg; z5 = 6'(i % 33); end
      default: begin x8 = 8'(i); y8 = 8'(y); yn8 = neg; z8 = 9'(i % 257); end
    endcase
    #1;
    case (n)
      4: got = int'(i4);
      5: got = int'(i5);
      default: got = int'(i8);
    endcase
    checks++;
    if (neg) n_neg++;
    if (i % ((1 << n) + 1) == (1 << n)) n_zn++;
    if (got != i) begin
      failures++;
      $display("FAIL n=%0d I=%0d neg=%b got %0d", n, i, neg, got);
    end
  endtask

  initial begin
    int i;
    for (i = 0; i < 15 * 16 * 17; i++) begin apply(4, i, 1'b0); apply(4, i, 1'b1); end
    for (i = 0; i < 31 * 32 * 33; i++) begin apply(5, i, 1'b0); apply(5, i, 1'b1); end
    apply(8, 0, 1'b0);
    apply(8, 255 * 256 * 257 - 1, 1'b0);
    apply(8, 255 * 256 * 257 - 1, 1'b1);
    for (int k = 0; k < 40000; k++) begin
      i = int'($urandom % (255 * 256 * 257));
      apply(8, i, 1'b0); apply(8, i, 1'b1);
    end
    $display("negabit inputs=%0d z_n=1 inputs=%0d", n_neg, n_zn);
    if (n_neg == 0 || n_zn == 0) begin failures++; $display("FAIL a case never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
