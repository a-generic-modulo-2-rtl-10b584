// snb_rns_top: the modulo 2^n-1 channel of a residue number system built on the
// stored-negabit adder, with conversion in and out.
//
// Two binary operands are converted to stored-negabit residues modulo 2^n-1
// (bin_to_snb), added modulo 2^n-1 by the one-step stored-negabit adder (snb_mod_adder)
// and the sum is converted back to binary together with its residues modulo 2^n and
// 2^n+1 (snb_rns_to_bin). Those two channels are not part of this design; their sum
// residues enter through x_sum and z_sum. With x_sum = (A+B) mod 2^n and
// z_sum = (A+B) mod (2^n+1), i_sum is (A+B) mod (2^n-1) 2^n (2^n+1).
// The three parts are published separately; joining them into one channel with these
// ports is this design's choice.
// Timing: combinational from all inputs to all outputs.
module snb_rns_top #(
  parameter int                   N    = 8,
  parameter snb_pkg::adder_arch_e ARCH = snb_pkg::ARCH_PREFIX
) (
  input  logic [3*N-1:0] op_a,       // binary operand A
  input  logic [3*N-1:0] op_b,       // binary operand B
  input  logic [N-1:0]   x_sum,      // (A+B) mod 2^n, from the mod 2^n channel
  input  logic [N:0]     z_sum,      // (A+B) mod (2^n+1), from the mod 2^n+1 channel
  output logic [N-1:0]   y_sum,      // binary part of (A+B) mod (2^n-1)
  output logic           y_sum_neg,  // its stored negabit
  output logic [3*N-1:0] i_sum       // reverse-converted sum
);

  logic [N-1:0] ya, yb;
  logic         ya_neg, yb_neg;

  bin_to_snb #(.N(N), .IN_W(3*N)) u_fwd_a (.bin(op_a), .r(ya), .r_neg(ya_neg));
  bin_to_snb #(.N(N), .IN_W(3*N)) u_fwd_b (.bin(op_b), .r(yb), .r_neg(yb_neg));

  snb_mod_adder #(.N(N), .ARCH(ARCH)) u_add (
    .a     (ya),
    .a_neg (ya_neg),
    .b     (yb),
    .b_neg (yb_neg),
    .s     (y_sum),
    .s_neg (y_sum_neg)
  );

  snb_rns_to_bin #(.N(N)) u_rev (
    .x     (x_sum),
    .y     (y_sum),
    .y_neg (y_sum_neg),
    .z     (z_sum),
    .i_out (i_sum)
  );

endmodule
