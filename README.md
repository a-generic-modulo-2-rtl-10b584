# Stored-negabit modulo 2^n−1 adder

Modulo 2^n−1 addition is the workhorse of one channel of the popular residue number
system (RNS) moduli sets such as {2^n−1, 2^n, 2^n+1}. Its usual forms either add twice
(add, then an end-around-carry increment), or run two n-bit adders in parallel and pick one
result (the "compound" adder), or fold the end-around carry into a specially overloaded
parallel-prefix tree. This RTL implements a different approach. Each residue carries one
extra bit: a **stored negabit**, a bit of weight −1 that sits in bit position 0 next to
the ordinary least significant bit. With that bit the end-of-addition correction never
has to be carried out. It is simply stored. The result is a one-step modular adder built
from standard parts:

* a constant-time pre-processor: a small negabit half-adder and one n-bit carry-save row;
* **any** n-bit binary adder: parallel-prefix, ripple-carry, carry-select, ...;
* a constant-time post-processor of a few gates that keeps the code of zero unique.

The repository also holds the conversions around such a channel. One converts binary to
a stored-negabit residue. The other is a reverse converter for the moduli set
{2^n−1, 2^n, 2^n+1} that accepts the negabit. A top level joins them into one modulo
2^n−1 RNS channel. Every block is purely combinational.

## 1. The representation

A residue modulo 2^n−1 is the pair (a, A′₀):

    value = a − A′₀        a: n-bit unsigned, A′₀ ∈ {0, 1} (weight −1)

with the rule **a₀ · A′₀ = 0**: the negabit is only set when the binary part is even.
Valid values are 0 … 2^n−2. Zero has the single code (0, 0). The code (1, 1) would also
mean zero, and the rule forbids it. An odd value v ≤ 2^n−3 may appear in two forms,
(v, 0) or (v+1, 1). Both are legal inputs everywhere, and consumers must compare values,
not codes. Converting to the plain binary residue costs a decrement of a. That happens
only when the result leaves the RNS, and the reverse converter absorbs it for free.

For n = 8: (0x37, 0) is 55. (0x38, 1) is 56 − 1 = 55 as well. (0x00, 0) is the only zero.

## 2. The addition (`snb_mod_adder`)

The adder computes W = A + B + 1 and then

    S = w[n-1:0] − ~w_n

If W reaches 2^n, dropping the carry w_n subtracts 2^n, and the +1 turns that into a
subtraction of 2^n − 1. That is the modular reduction. If W < 2^n, the sum still holds
the extra +1, and it must be decremented. Instead of decrementing, ~w_n is kept as the
result's negabit S′₀. So no second carry-propagating operation ever follows the addition.

### 2.1 Pre-processor (`snb_preproc`)

The two input negabits (weight −1 each) and the constant 1 are first added into a small
two's-complement number T = 1 − A′₀ − B′₀ ∈ {1, 0, −1}, sign-extended to n+2 bits:

    t₀ = ~(A′₀ ^ B′₀)        t₁ = t₂ = … = t_n = (sign bit) = A′₀ & B′₀

A row of n full adders compresses a, b and t[n−1:0] into sum bits u[n−1:0] and carries
c[n:1]. The bit t_n does not go through a full adder. It becomes the top bit of one operand
of the binary adder. The sign bit of T weighs −2^(n+1). It exactly cancels the carry out
of position n, which is therefore never built. (W ≤ 2^(n+1)−1, so its bit n+1 is 0.)

Bit-column view (n positions plus the sign extension):

| weight   | 2^(n+1)  | 2^n | 2^(n−1) … 2^1 | 2^0 |
|----------|----------|-----|---------------|-----|
| a        |          |     | a_{n−1} … a₁  | a₀  |
| b        |          |     | b_{n−1} … b₁  | b₀  |
| T        | −t_n     | t_n | t_{n−1} … t₁  | t₀  |
| CSA sum  | −t_n     | t_n | u_{n−1} … u₁  | u₀  |
| CSA carry|          | c_n | c_{n−1} … c₁  |     |
| W        | 0        | w_n | w_{n−1} … w₁  | w₀  |

### 2.2 Generic n-bit adder (`nbit_adder`)

Positions 1 … n of W are the sum of x = {t_n, u_{n−1} … u₁} and y = {c_n … c₁}. There is
no carry into position 1, and w₀ = u₀ needs no adder at all. This is the only
carry-propagating part of the design, and the algorithm does not care how it is built.
The parameter `ARCH` chooses between two instances:

* `ARCH_PREFIX` (default): a parallel-prefix adder. Every column first forms g = x&y,
  p = x|y and h = x^y. Then ⌈log₂ n⌉ prefix levels follow with spans 1, 2, 4, …
  (Kogge–Stone). A column whose span already reaches position 1 holds a buffer node,
  which is a plain wire in RTL. The other columns hold a computing node,
  `pp_black_cell`: g = g_hi | p_hi & g_lo, p = p_hi & p_lo. The sum bits are h ^ carry.
* `ARCH_RIPPLE`: a ripple-carry chain. It is small, and it shows that the rest of the
  design is independent of the adder.

The most significant position is left open on purpose. The adder outputs its half sum
h = t_n ^ c_n and the carry c into it, not w_n. The post-processor uses both.

### 2.3 Unique-zero post-processor (`unique_zero`)

This is the least obvious part. Taken literally, S = w − ~w_n produces the forbidden code
(…1, 1) whenever W < 2^n and w₀ = 1. For W = 1 (A + B = 0), that code is a second zero.
But when w₀ = 1 the pending decrement can simply clear bit 0. This gives:

    w_n = h ^ c
    s₀  = u₀ & w_n
    S′₀ = ~(u₀ | w_n)

| w_n | u₀ = w₀ | s₀ | S′₀ | meaning                              |
|-----|---------|----|-----|--------------------------------------|
| 1   | x       | u₀ | 0   | reduced by the carry, nothing pending |
| 0   | 1       | 0  | 0   | decrement absorbed by clearing w₀     |
| 0   | 0       | 0  | 1   | decrement stored as the negabit       |

Hence s₀ & S′₀ = 0 always, and zero comes out only as (0, 0). The carry c is the latest
signal to arrive. So the box computes both outcomes from u₀ and h ahead of time
(c = 0: w_n = h; c = 1: w_n = ~h), and c only drives two 2:1 multiplexers. s₀ and S′₀
are therefore ready one multiplexer delay after c, the same time as the other sum bits
are ready after their XOR. The box replaces the XOR the top column would otherwise need.

### 2.4 Delay

In the unit-gate model (2-input AND/OR = 1, XOR and full-adder stages = 2), the
parallel-prefix version costs 3 units for the pre-processor to the critical carry.
The rest of the path is 2⌈log₂ n⌉ + 3, so the total is **2⌈log₂ n⌉ + 6**, with no extra
cost for the zero box. For n = 8 that is 12 units. This equals the fastest known
modulo 2^n+1 adders, so a {2^n−1, 2^n, 2^n+1} system gets channels of equal latency.
There are no long end-around wires, and the prefix tree is a standard one. This figure is
a structural estimate. The simulations here check function only, not delay.

## 3. Conversions

### 3.1 Binary to residue (`bin_to_snb`)

Since 2^n ≡ 1 (mod 2^n−1), I mod (2^n−1) is the modulo 2^n−1 sum of the n-bit chunks of
I. The converter adds the chunks one after another with end-around carry. It maps an
all-ones result (the other code of zero) to 0 and sets the negabit to 0. `IN_W` defaults
to 3n, the width of the {2^n−1, 2^n, 2^n+1} dynamic range. This is a plain conventional
converter. A multi-operand CSA tree could replace the chain when IN_W is large.

### 3.2 Residue to binary (`snb_rns_to_bin`)

For X = I mod 2^n, Y = I mod (2^n−1) = y − Y′₀ and Z = I mod (2^n+1) = z_n z_{n−1} … z₀:

    I  = 2^n · I′ + X
    I′ = ( −(2^n X + Z) + 2^(n−1)(2^n+1)(Y + Z) ) mod (2^2n − 1)

Modulo 2^2n−1 a negation is a bit-wise complement and a multiplication by 2^k is a
rotation. The negabit's −Y′₀ is written as ~Y′₀ − 1, and the −1 joins the constant.
So I′ is the modulo 2^2n−1 sum of six 2n-bit operands (column 2n−1 on the left):

| operand | bits                                                                          |
|---------|-------------------------------------------------------------------------------|
| 1       | ~x_{n−1} … ~x₀ · ~z_{n−1} … ~z₀                                               |
| 2       | z_n at 2n−1 · y_{n−1} … y₀ at 2n−2 … n−1                                      |
| 3       | y₀ at 2n−1 · ~z_n at n · z₀ at n−1 · y_{n−1} … y₁ at n−2 … 0                  |
| 4       | z₀ at 2n−1 · z_{n−1} … z₁ at 2n−2 … n · z_n at n−1 · z_{n−1} … z₁ at n−2 … 0  |
| 5       | ~Y′₀ at 2n−1 and at n−1                                                       |
| 6       | constant 2^(2n−1) − 2^n − 2^(n−1) − 1 = 0 1…1 0 0 1…1                         |

Without a negabit the sum would have five operands. The negabit costs one operand, which
still fits in three carry-save levels. The RTL uses end-around-carry CSA rows
(`csa_eac`, 6 → 4 → 3 → 2) and a final end-around-carry adder whose all-ones result is
mapped to 0. The low n bits of I are X itself.

## 4. The channel (`snb_rns_top`)

`snb_rns_top` converts two binary operands op_a and op_b (3n bits) to residues. It adds
them with `snb_mod_adder` and reverse-converts the sum. The modulo 2^n and modulo 2^n+1
channels of the RNS are outside this design. Their sum residues enter as x_sum and
z_sum, and the channel's own sum residue comes out as y_sum / y_sum_neg. With consistent
x_sum and z_sum, i_sum = (op_a + op_b) mod (2^n−1)·2^n·(2^n+1).

| module           | parameters (default)            | ports                                                     |
|------------------|---------------------------------|-----------------------------------------------------------|
| `snb_rns_top`    | N (8), ARCH (ARCH_PREFIX)       | op_a, op_b [3N], x_sum [N], z_sum [N+1] → y_sum [N], y_sum_neg, i_sum [3N] |
| `snb_mod_adder`  | N (8), ARCH (ARCH_PREFIX)       | a [N], a_neg, b [N], b_neg → s [N], s_neg                 |
| `snb_preproc`    | N (8)                           | a, a_neg, b, b_neg → u [N], cy [N] (cy[i] = c_{i+1}), t_n |
| `nbit_adder`     | N (8), ARCH                     | x [N], y [N] → w [N−1] (w_{n−1..1}), h_msb, c_msb         |
| `pp_black_cell`  | –                               | g_hi, p_hi, g_lo, p_lo → g, p                             |
| `unique_zero`    | –                               | u0, h, c → s0, s_neg                                      |
| `bin_to_snb`     | N (8), IN_W (3N)                | bin [IN_W] → r [N], r_neg                                 |
| `snb_rns_to_bin` | N (8)                           | x [N], y [N], y_neg, z [N+1] → i_out [3N]                 |
| `csa_eac`        | W (16)                          | x, y, z [W] → sum, carry [W] (one mod 2^W−1 CSA row)      |
| `snb_pkg`        | –                               | `adder_arch_e`: ARCH_PREFIX, ARCH_RIPPLE                  |

N must be at least 2. Other than that any N works, including values that are not powers
of two. The sizes simulated are listed in section 5.

## 5. Simulation

Each `tb/tb_<module>.sv` is self-checking. It prints `TB_RESULT checks=… failures=…`
and stops. With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/snb_pkg.sv tb/tb_snb_rns_top.sv --top-module tb_snb_rns_top
    ./obj_dir/Vtb_snb_rns_top

Substitute any other testbench name. Each one finishes in seconds.

| testbench            | what it establishes                                                                          |
|----------------------|----------------------------------------------------------------------------------------------|
| `tb_snb_mod_adder`   | every pair of valid codes for n = 3, 5 and 8 (n = 8 with both adder architectures), plus 50 000 random pairs at n = 16 (both) and n = 32: value, the s₀·S′₀ = 0 rule, unique zero. Counts the reduction, stored-negabit, zero-fix, T = −1 and zero-sum paths. |
| `tb_snb_preproc`     | u + 2c − 2^n·t_n = A + B + 1 exactly, all inputs at n = 4, random at n = 8                      |
| `tb_nbit_adder`      | against integer addition: all 65 536 pairs at n = 8 (both architectures), n = 5, random n = 13 |
| `tb_unique_zero`     | all 8 inputs against the value rule s₀ − S′₀ = u₀ − ~w_n                                      |
| `tb_pp_black_cell`   | all 16 inputs                                                                                |
| `tb_bin_to_snb`      | against I % (2^n−1), n = 8 / 24-bit and n = 5 / 17-bit, including multiples of 2^n−1          |
| `tb_snb_rns_to_bin`  | every I of the range, in both negabit codes, for n = 4 and 5; random for n = 8                  |
| `tb_snb_rns_top`     | 212 000 operand pairs at the default size (n = 8); counts every mechanism above plus z_n = 1 and wrap past M. The forward converter always emits a 0 negabit, so inside the channel the adder sees negabits only at its output; negabit inputs are covered by `tb_snb_mod_adder`. |

The unit-gate delay of section 2.4 is not simulated. The testbenches run in zero-delay
mode.

## 6. Choices made in this RTL

* **Combinational only.** No registers, clock or reset. Pipelining is left to the user.
* **Prefix tree.** A Kogge–Stone tree generalised to any n. Buffer nodes are wires, and
  fan-out buffering is left to synthesis.
* **Position 0 of the pre-processor** is an ordinary full adder of a₀, b₀ and t₀, not a
  hand-merged gate network. The function is the same.
* **Forward converter.** A chain of end-around-carry additions; any conventional
  binary-to-modulo-2^n−1 converter would do.
* **Reverse converter arithmetic.** The reduction is modulo 2^2n−1. The operand table of
  section 3.2 was derived from the I′ equation, including the constant and the polarity
  of each z_n bit, and is checked over every I of the range for n = 4 and 5. The CSA arrangement and the
  end-around-carry final adder are local choices.
* **Other channels.** The modulo 2^n and 2^n+1 channels are not included. Their residues
  are ports of the top.
* **Input rules are not checked in hardware.** Operands must satisfy a₀·A′₀ = 0 and
  represent a value in 0 … 2^n−2. The outputs of this design always do, so blocks can be
  chained freely.
