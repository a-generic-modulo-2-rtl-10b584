// snb_rns_to_bin: reverse converter for the moduli set {2^n-1, 2^n, 2^n+1} with a
// stored-negabit modulo 2^n-1 residue.
//
// Given X = I mod 2^n, Y = I mod (2^n-1) = y - Y'0 and Z = I mod (2^n+1) (n+1 bits),
// the number I in [0, (2^n-1) 2^n (2^n+1)) is I = 2^n I' + X with
//   I' = ( -(2^n X + Z) + 2^(n-1) (2^n+1) (Y + Z) ) mod (2^2n - 1).
// Modulo 2^2n-1 a negation is a one's complement and a multiplication by a power of two
// is a rotation, so I' is a 2n-bit six-operand sum (columns 2n-1 .. 0):
//   op1: ~x_{n-1..0} | ~z_{n-1..0}                      (= 2^n ~X + ~Z)
//   op2: z_n at 2n-1, y_{n-1..0} at 2n-2 .. n-1          (2^(n-1) Y, part of z_n term)
//   op3: y_0 at 2n-1, ~z_n at n, z_0 at n-1, y_{n-1..1} at n-2 .. 0
//   op4: z_0 at 2n-1, z_{n-1..1} at 2n-2 .. n, z_n at n-1, z_{n-1..1} at n-2 .. 0
//   op5: ~Y'0 at 2n-1 and at n-1                         (the stored negabit)
//   op6: constant 2^(2n-1) - 2^n - 2^(n-1) - 1
// (y here is the binary part; the negabit enters as ~Y'0 and its -1 sits in op6.) Without
// a negabit the sum would need five operands; the negabit costs one extra operand.
// The six operands pass three levels of end-around-carry carry-save adders (6 -> 4 -> 3
// -> 2) and a final end-around-carry adder whose all-ones result (a second code of zero)
// is mapped to 0. The carry-save arrangement and the final adder's form are this design's
// choices. The low n bits of I are X itself and pass straight through.
// Timing: combinational.
module snb_rns_to_bin #(
  parameter int N = 8
) (
  input  logic [N-1:0]   x,       // I mod 2^n
  input  logic [N-1:0]   y,       // binary part of I mod (2^n-1)
  input  logic           y_neg,   // stored negabit Y'0
  input  logic [N:0]     z,       // I mod (2^n+1)
  output logic [3*N-1:0] i_out    // I
);

  localparam int W = 2 * N;

  logic [W-1:0] op1, op2, op3, op4, op5, op6;
  logic [W-1:0] s1, c1, s2, c2, s3, c3, s4, c4;
  logic [W:0]   tsum;
  logic [W-1:0] ip_raw, ip;

  always_comb begin
    op1 = {~x, ~z[N-1:0]};

    op2 = '0;
    op2[W-1] = z[N];
    op2[W-2 -: N] = y;

    op3 = '0;
    op3[W-1]   = y[0];
    op3[N]     = ~z[N];
    op3[N-1]   = z[0];
    op3[N-2:0] = y[N-1:1];

    op4 = '0;
    op4[W-1]     = z[0];
    op4[W-2 -: N-1] = z[N-1:1];
    op4[N-1]     = z[N];
    op4[N-2:0]   = z[N-1:1];

    op5 = '0;
    op5[W-1] = ~y_neg;
    op5[N-1] = ~y_neg;

    // 2^(2n-1) - 2^n - 2^(n-1) - 1 = 0 1..1 0 0 1..1
    for (int k = 0; k < W; k++) op6[k] = (k != W - 1) && (k != N) && (k != N - 1);
  end

  // carry-save level 1
  csa_eac #(.W(W)) u_l1a (.x(op1), .y(op2), .z(op3), .sum(s1), .carry(c1));
  csa_eac #(.W(W)) u_l1b (.x(op4), .y(op5), .z(op6), .sum(s2), .carry(c2));
  // level 2
  csa_eac #(.W(W)) u_l2  (.x(s1),  .y(c1),  .z(s2),  .sum(s3), .carry(c3));
  // level 3
  csa_eac #(.W(W)) u_l3  (.x(s3),  .y(c3),  .z(c2),  .sum(s4), .carry(c4));

  // final modulo 2^2n-1 carry-propagate addition
  always_comb begin
    tsum   = {1'b0, s4} + {1'b0, c4};
    ip_raw = tsum[W-1:0] + W'(tsum[W]);
    ip     = (&ip_raw) ? '0 : ip_raw;
    i_out  = {ip, x};
  end

endmodule
