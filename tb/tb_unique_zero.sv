// tb_unique_zero: exhaustive self-check of the unique-zero post-processor.
// Reference: the most significant sum bit is w_n = h ^ c and the two low-order output
// bits must carry the value u0 - ~w_n (the pending decrement), with s0 and S'0 never
// both 1. That value-level rule is checked for all 8 input combinations.
module tb_unique_zero;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic u0, h, c, s0, s_neg;

  unique_zero dut (.u0, .h, .c, .s0, .s_neg);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wn, want, got;
    for (int v = 0; v < 8; v++) begin
      {u0, h, c} = 3'(v);
      #1;
      wn   = (h != c) ? 1 : 0;
      want = int'(u0) - (1 - wn);
      got  = int'(s0) - int'(s_neg);
      checks += 2;
      if (got != want) begin
        failures++;
        $display("FAIL value u0=%b h=%b c=%b s0=%b s_neg=%b", u0, h, c, s0, s_neg);
      end
      if (s0 && s_neg) begin
        failures++;
        $display("FAIL double code u0=%b h=%b c=%b", u0, h, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
