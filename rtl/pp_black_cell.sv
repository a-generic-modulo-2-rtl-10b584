// pp_black_cell: the computing node of a parallel-prefix carry tree.
//
// It merges the (generate, propagate) pair of a more significant bit group with that
// of the adjacent less significant group:
//   g = g_hi | (p_hi & g_lo)      p = p_hi & p_lo
// This is the standard prefix operator; the port names follow the usual g_i, g_{i-1},
// p_i, p_{i-1} notation. Purely combinational (one AND-OR level plus one AND). The cell
// is the published design's computing node; nothing in it is a local choice.
module pp_black_cell (
  input  logic g_hi,  // generate of the more significant group
  input  logic p_hi,  // propagate of the more significant group
  input  logic g_lo,  // generate of the less significant group
  input  logic p_lo,  // propagate of the less significant group
  output logic g,     // generate of the merged group
  output logic p      // propagate of the merged group
);

  always_comb begin
    g = g_hi | (p_hi & g_lo);
    p = p_hi & p_lo;
  end

endmodule
