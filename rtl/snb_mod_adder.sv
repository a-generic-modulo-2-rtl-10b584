// snb_mod_adder: generic modulo 2^n-1 adder on stored-negabit residues.
//
// A residue is an n-bit unsigned number plus a stored negabit of weight -1 in bit
// position 0 (a "second lsb"): value = a - a_neg, with a[0] & a_neg = 0. The adder
// computes W = A + B + 1 and returns S = w_{n-1..0} - ~w_n: if W reaches 2^n the
// carry-out performs the modulo reduction (S = A + B + 1 - 2^n), otherwise the needed
// decrement is not carried out but stored as the negabit of S. Only one n-bit binary
// addition lies on the path:
//   snb_preproc  negabit half-adder (T = A'0 + B'0 + 1, sign-extended) and an n-bit
//                carry-save adder of a, b, T          (constant time)
//   nbit_adder   generic n-bit adder of {t_n, u_{n-1..1}} and c_{n..1}
//                (parallel prefix or ripple-carry, ARCH)
//   unique_zero  forms s_0 and S'0 from u_0, h and the top carry so that s_0 and S'0
//                are never both 1                    (constant time)
// Inputs must be residues in [0, 2^n-2] with a[0] & a_neg = 0 and b[0] & b_neg = 0;
// the result is in [0, 2^n-2] with s[0] & s_neg = 0 (zero has the single code 0/0).
// The datapath follows the published algorithm; keeping it purely combinational (no
// registers, no reset) and the default n = 8 (the published example width) are this
// design's choices.
// Timing: combinational; with ARCH_PREFIX about 2*ceil(log2 n) + 6 unit-gate delays.
module snb_mod_adder #(
  parameter int                   N    = 8,
  parameter snb_pkg::adder_arch_e ARCH = snb_pkg::ARCH_PREFIX
) (
  input  logic [N-1:0] a,
  input  logic         a_neg,
  input  logic [N-1:0] b,
  input  logic         b_neg,
  output logic [N-1:0] s,
  output logic         s_neg
);

  logic [N-1:0] u, cy;
  logic         t_n;
  logic [N-2:0] w_mid;      // w_{n-1..1}
  logic         h_msb, c_msb;
  logic         s0;

  snb_preproc #(.N(N)) u_pre (
    .a     (a),
    .a_neg (a_neg),
    .b     (b),
    .b_neg (b_neg),
    .u     (u),
    .cy    (cy),
    .t_n   (t_n)
  );

  nbit_adder #(.N(N), .ARCH(ARCH)) u_add (
    .x     ({t_n, u[N-1:1]}),
    .y     (cy),
    .w     (w_mid),
    .h_msb (h_msb),
    .c_msb (c_msb)
  );

  unique_zero u_post (
    .u0    (u[0]),
    .h     (h_msb),
    .c     (c_msb),
    .s0    (s0),
    .s_neg (s_neg)
  );

  assign s = {w_mid, s0};

endmodule
