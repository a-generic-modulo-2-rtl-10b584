// tb_nbit_adder: self-check of the generic n-bit adder in both architectures.
// Reference: the integer sum x + y. Its low n-1 bits must equal w, its bit n-1 must
// equal h_msb ^ c_msb, and c_msb must be the carry out of the low n-1 bits. N = 8 is
// checked exhaustively (65536 pairs) for the parallel-prefix and the ripple-carry
// instance; N = 5 and N = 13 (not powers of two) for the parallel-prefix instance.
module tb_nbit_adder;
  import snb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  x8, y8;
  logic [6:0]  w8p, w8r;
  logic        h8p, c8p, h8r, c8r;
  logic [4:0]  x5, y5;
  logic [3:0]  w5;
  logic        h5, c5;
  logic [12:0] x13, y13;
  logic [11:0] w13;
  logic        h13, c13;

  nbit_adder #(.N(8), .ARCH(ARCH_PREFIX)) dut8p (.x(x8), .y(y8), .w(w8p), .h_msb(h8p), .c_msb(c8p));
  nbit_adder #(.N(8), .ARCH(ARCH_RIPPLE)) dut8r (.x(x8), .y(y8), .w(w8r), .h_msb(h8r), .c_msb(c8r));
  nbit_adder #(.N(5), .ARCH(ARCH_PREFIX)) dut5 (.x(x5), .y(y5), .w(w5), .h_msb(h5), .c_msb(c5));
  nbit_adder #(.N(13), .ARCH(ARCH_PREFIX)) dut13 (.x(x13), .y(y13), .w(w13), .h_msb(h13), .c_msb(c13));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // n-bit check of one result against the integer sum
  function automatic bit ok(int n, int x, int y, int w, bit h, bit c);
    int sum  = x + y;
    int mask = (1 << (n - 1)) - 1;
    int low  = (x & mask) + (y & mask);
    return (w == (sum & mask)) && ((h ^ c) == bit'((sum >> (n - 1)) & 1)) &&
           (c == bit'(low >> (n - 1)));
  endfunction

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v);
      x5 = 5'(v); y5 = 5'(v >> 5);
      x13 = 13'($urandom); y13 = 13'($urandom);
      #1;
      checks += 4;
      if (!ok(8, x8, y8, w8p, h8p, c8p)) begin
        failures++; $display("FAIL prefix N=8 x=%0d y=%0d", x8, y8);
      end
      if (!ok(8, x8, y8, w8r, h8r, c8r)) begin
        failures++; $display("FAIL ripple N=8 x=%0d y=%0d", x8, y8);
      end
      if (!ok(5, x5, y5, w5, h5, c5)) begin
        failures++; $display("FAIL prefix N=5 x=%0d y=%0d", x5, y5);
      end
      if (!ok(13, x13, y13, w13, h13, c13)) begin
        failures++; $display("FAIL prefix N=13 x=%0d y=%0d", x13, y13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
