// snb_pkg: shared types for the stored-negabit modulo 2^n-1 arithmetic blocks.
//
// adder_arch_e selects the architecture of the generic n-bit binary adder that sits
// between the constant-time pre-processor and the unique-zero post-processor. The
// adder is meant to be interchangeable: any binary adder with the same function may
// be used. ARCH_PREFIX is the delay-optimised parallel-prefix (Kogge-Stone style)
// instance, ARCH_RIPPLE the small ripple-carry one.
package snb_pkg;

  typedef enum logic [0:0] {
    ARCH_PREFIX = 1'b0,
    ARCH_RIPPLE = 1'b1
  } adder_arch_e;

endpackage
