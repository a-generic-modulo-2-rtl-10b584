// bin_to_snb: binary to stored-negabit modulo 2^n-1 converter.
//
// The residue of a binary number I modulo 2^n-1 is found the conventional way: since
// 2^n = 1 (mod 2^n-1), I mod (2^n-1) is the modulo 2^n-1 sum of the n-bit chunks of I.
// The chunks are accumulated with end-around carry (a carry out of bit n-1 re-enters at
// bit 0) and an all-ones result, the second code of zero, is mapped to 0. The stored
// negabit of the result is 0. The chunk accumulation and the input width IN_W are
// choices of this design; the default 3n covers the dynamic range of the moduli set
// {2^n-1, 2^n, 2^n+1}.
// Timing: combinational, a chain of ceil(IN_W/n) end-around-carry additions.
module bin_to_snb #(
  parameter int N    = 8,
  parameter int IN_W = 3 * N
) (
  input  logic [IN_W-1:0] bin,    // binary number I
  output logic [N-1:0]    r,      // binary part of I mod (2^n-1), never all ones
  output logic            r_neg   // stored negabit, always 0
);

  localparam int K = (IN_W + N - 1) / N;   // number of n-bit chunks

  logic [K*N-1:0] padded;
  logic [N-1:0]   acc;
  logic [N:0]     tmp;

  always_comb begin
    padded = '0;
    padded[IN_W-1:0] = bin;
    acc = '0;
    for (int k = 0; k < K; k++) begin
      tmp = {1'b0, acc} + {1'b0, padded[k*N +: N]};
      acc = tmp[N-1:0] + N'(tmp[N]);        // end-around carry, cannot overflow again
    end
    r     = (&acc) ? '0 : acc;
    r_neg = 1'b0;
  end

endmodule
