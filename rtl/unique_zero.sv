// unique_zero: post-processor of the stored-negabit modulo 2^n-1 adder.
//
// Algorithm: the sum is S = w_{n-1..0} - ~w_n, where ~w_n is kept as a stored negabit
// S'0 instead of being subtracted. Left alone, w_0 = 1 together with S'0 = 1 would give
// a second code for values such as zero (00..01 - 1). This box replaces the XOR that
// would form w_n: with h = t_n ^ c_n and c the carry into position n (so w_n = h ^ c),
//   s0  = u0 & w_n          S'0 = ~(u0 | w_n)
// When w_n = 0 and u0 = w_0 = 1 the decrement is absorbed by clearing bit 0; so
// s0 & S'0 is always 0. Both outputs are taken from a 2:1 multiplexer selected by the
// late-arriving carry c, whose data inputs depend only on u0 and h; they are ready one
// multiplexer delay after c, the same time as the other sum bits. Equations and the
// multiplexer structure follow the published design.
module unique_zero (
  input  logic u0,     // carry-save sum bit u_0 (= w_0)
  input  logic h,      // half sum t_n ^ c_n of the most significant position
  input  logic c,      // carry into the most significant position
  output logic s0,     // least significant sum bit s_0
  output logic s_neg   // stored negabit S'0
);

  logic s0_c0, s0_c1, neg_c0, neg_c1;

  always_comb begin
    // c = 0: w_n = h        c = 1: w_n = ~h
    s0_c0  = u0 & h;
    neg_c0 = ~(u0 | h);
    s0_c1  = u0 & ~h;
    neg_c1 = ~(u0 | ~h);
    s0     = c ? s0_c1  : s0_c0;
    s_neg  = c ? neg_c1 : neg_c0;
  end

endmodule
