// nbit_adder: the generic n-bit binary adder inside the stored-negabit modulo 2^n-1 adder.
//
// It adds the two n-bit vectors left by the pre-processor, over bit positions 1..n of W:
// x = {t_n, u_{n-1..1}} and y = {c_n .. c_1}. Index i of x, y and the internal signals
// stands for position i+1 of W. There is no carry into the least significant position
// (u_0 bypasses the adder as w_0) and the carry out of the top position is not needed.
//
// Each position first forms g = x & y, p = x | y and the half sum h = x ^ y. The carry
// into every position is then produced by one of two interchangeable architectures:
//   ARCH_PREFIX  a Kogge-Stone parallel-prefix tree of ceil(log2 N) levels with spans
//                1, 2, 4, ...; pp_black_cell nodes where a less significant group
//                exists, plain wires (the buffer nodes) in the columns below the span.
//   ARCH_RIPPLE  a ripple-carry chain.
// Sum bits w_{n-1..1} are h ^ carry-in. The most significant position is not completed
// here: its half sum h_msb and incoming carry c_msb go to the unique-zero post-processor,
// which produces w_n only implicitly.
//
// The adder is deliberately generic: the algorithm only asks for some n-bit binary adder
// here. The parallel-prefix instance follows the published delay-optimised example
// (a node in every column at every level, spans 1, 2, 4, buffer nodes below the span);
// reading it as Kogge-Stone for any N, the AND/OR/XOR form of the g/p/h cells and the
// ripple-carry alternative are this design's choices.
// The group propagate signals of the last prefix level and the group generate of the top
// column are computed but not needed (nothing is left to merge); synthesis removes them.
// Timing: combinational. ARCH_PREFIX: 1 gate level for g/h/p, ceil(log2 N) prefix levels
// (2 unit gates each), one XOR level.
module nbit_adder #(
  parameter int                  N    = 8,                    // n
  parameter snb_pkg::adder_arch_e ARCH = snb_pkg::ARCH_PREFIX
) (
  input  logic [N-1:0] x,      // x[i] has weight 2^(i+1)
  input  logic [N-1:0] y,      // y[i] has weight 2^(i+1)
  output logic [N-2:0] w,      // w[i] = sum bit w_{i+1}
  output logic         h_msb,  // x[N-1] ^ y[N-1]
  output logic         c_msb   // carry into the most significant position
);

  localparam int LV = (N > 1) ? $clog2(N) : 1;   // prefix levels

  logic [N-1:0] g0, p0, h0;   // per-position generate, propagate, half sum
  logic [N-1:0] cin;          // carry into each position

  always_comb begin
    g0 = x & y;
    p0 = x | y;
    h0 = x ^ y;
  end

  if (ARCH == snb_pkg::ARCH_PREFIX) begin : g_prefix
    // gt[l][i], pt[l][i]: group signals of bits i down to max(0, i-2^l+1)
    logic [LV:0][N-1:0] gt, pt;

    assign gt[0] = g0;
    assign pt[0] = p0;

    for (genvar l = 0; l < LV; l++) begin : g_lvl
      for (genvar i = 0; i < N; i++) begin : g_col
        if (i >= (1 << l)) begin : g_black
          pp_black_cell u_node (
            .g_hi (gt[l][i]),
            .p_hi (pt[l][i]),
            .g_lo (gt[l][i-(1<<l)]),
            .p_lo (pt[l][i-(1<<l)]),
            .g    (gt[l+1][i]),
            .p    (pt[l+1][i])
          );
        end else begin : g_white
          // buffer node: the group already reaches position 0
          assign gt[l+1][i] = gt[l][i];
          assign pt[l+1][i] = pt[l][i];
        end
      end
    end

    // no carry enters position 0, so the group generate is the carry out
    assign cin = {gt[LV][N-2:0], 1'b0};
  end else begin : g_ripple
    always_comb begin
      cin[0] = 1'b0;
      for (int i = 1; i < N; i++) cin[i] = g0[i-1] | (p0[i-1] & cin[i-1]);
    end
  end

  always_comb begin
    w     = h0[N-2:0] ^ cin[N-2:0];
    h_msb = h0[N-1];
    c_msb = cin[N-1];
  end

endmodule
