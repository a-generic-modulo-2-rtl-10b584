// snb_preproc: constant-time pre-processor of the stored-negabit modulo 2^n-1 adder.
//
// The operands are A = a + (-A'0) and B = b + (-B'0): an n-bit unsigned number plus a
// stored negabit of weight -1 in position 0. The adder must form W = A + B + 1.
// A sign-extended negabit half-adder first forms T = A'0 + B'0 + 1 as a two's
// complement number: t0 = ~(A'0 ^ B'0) and t1 = ... = tn = A'0 & B'0 (T is 1, 0 or -1).
// An n-bit carry-save adder row then compresses a, b and t[n-1:0] into sum bits u and
// carries c, so that W = u + 2*c + 2^n*t_n (mod 2^(n+1); the sign bit of T cancels
// the carry out of position n, which is never needed).
//
// Interface: cy[i] is the carry c_{i+1} (weight 2^(i+1)); t_n is brought out because it
// becomes the most significant bit of one operand of the generic n-bit adder.
// The negabit half-adder and the carry-save row follow the published algorithm; writing
// the position-0 cell as an ordinary full adder fed with t0 (rather than as a merged
// gate network) is this design's choice.
// Timing: combinational, one AND/XNOR level followed by one full-adder level.
module snb_preproc #(
  parameter int N = 8               // residue width n
) (
  input  logic [N-1:0] a,           // binary part of A
  input  logic         a_neg,       // stored negabit A'0
  input  logic [N-1:0] b,           // binary part of B
  input  logic         b_neg,       // stored negabit B'0
  output logic [N-1:0] u,           // carry-save sum bits u_{n-1..0}
  output logic [N-1:0] cy,          // carry-save carries, cy[i] = c_{i+1}
  output logic         t_n          // sign-extension bit t_n of T
);

  logic [N-1:0] t;                  // t_{n-1..0}

  always_comb begin
    t    = {N{a_neg & b_neg}};
    t[0] = ~(a_neg ^ b_neg);
    t_n  = a_neg & b_neg;
    // one row of full adders
    u  = a ^ b ^ t;
    cy = (a & b) | (a & t) | (b & t);
  end

endmodule
