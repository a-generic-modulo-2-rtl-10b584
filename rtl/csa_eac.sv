// csa_eac: one level of a modulo 2^W-1 carry-save adder.
//
// Three W-bit operands are compressed into a sum vector and a carry vector by a row of
// full adders. The carry vector is shifted left by one with the carry out of bit W-1
// rotated into bit 0 (end-around carry), which keeps the total unchanged modulo 2^W-1.
// A standard building block, used here for the reverse converter's carry-save levels.
// Timing: combinational, one full-adder delay.
module csa_eac #(
  parameter int W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x & y) | (x & z) | (y & z);
    carry = {maj[W-2:0], maj[W-1]};
  end

endmodule
