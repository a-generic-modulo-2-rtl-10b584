// tb_snb_preproc: self-check of the negabit half-adder and carry-save row.
// For every operand pair the outputs must satisfy, as plain integers,
//   u + 2*cy - 2^n * t_n  ==  (a - A'0) + (b - B'0) + 1
// (T's sign bit -2^(n+1) t_n and t_n 2^n together weigh -2^n t_n). N = 4 is checked
// exhaustively over all a, b and negabits; N = 8 with random operands.
module tb_snb_preproc;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a4, b4, u4, cy4;
  logic       an4, bn4, tn4;
  logic [7:0] a8, b8, u8, cy8;
  logic       an8, bn8, tn8;

  snb_preproc #(.N(4)) dut4 (.a(a4), .a_neg(an4), .b(b4), .b_neg(bn4), .u(u4), .cy(cy4), .t_n(tn4));
  snb_preproc #(.N(8)) dut8 (.a(a8), .a_neg(an8), .b(b8), .b_neg(bn8), .u(u8), .cy(cy8), .t_n(tn8));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lhs, rhs;
    for (int v = 0; v < 1024; v++) begin
      {an4, bn4, a4, b4} = 10'(v);
      #1;
      lhs = int'(u4) + 2 * int'(cy4) - 16 * int'(tn4);
      rhs = int'(a4) - int'(an4) + int'(b4) - int'(bn4) + 1;
      checks++;
      if (lhs != rhs) begin
        failures++;
        $display("FAIL N=4 a=%0d/%b b=%0d/%b lhs=%0d rhs=%0d", a4, an4, b4, bn4, lhs, rhs);
      end
    end
    for (int k = 0; k < 20000; k++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); an8 = 1'($urandom); bn8 = 1'($urandom);
      #1;
      lhs = int'(u8) + 2 * int'(cy8) - 256 * int'(tn8);
      rhs = int'(a8) - int'(an8) + int'(b8) - int'(bn8) + 1;
      checks++;
      if (lhs != rhs) begin
        failures++;
        $display("FAIL N=8 a=%0d/%b b=%0d/%b lhs=%0d rhs=%0d", a8, an8, b8, bn8, lhs, rhs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
