// tb_pp_black_cell: exhaustive self-check of the prefix computing node.
// The expected values come from the meaning of the node: the merged group generates a
// carry if the upper group generates one, or propagates one generated below; it
// propagates only if both halves propagate. All 16 input combinations are applied.
module tb_pp_black_cell;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic g_hi, p_hi, g_lo, p_lo, g, p;

  pp_black_cell dut (.g_hi, .p_hi, .g_lo, .p_lo, .g, .p);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #1;
      checks++;
      // a carry entering below leaves the group iff (g_lo and p_hi) or g_hi
      if (g !== ((g_hi == 1'b1) || (p_hi == 1'b1 && g_lo == 1'b1)) ||
          p !== (p_hi == 1'b1 && p_lo == 1'b1)) begin
        failures++;
        $display("FAIL in=%b g=%b p=%b", v[3:0], g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
