# LMS adaptive FIR filter on distributed arithmetic with offset binary coding

An adaptive FIR filter has to do two things every sample: compute
`y(n) = sum_i w_i x(n-i)` and then move every weight by the LMS rule
`w_i += mu * e(n) * x(n-i)`, with `e(n) = d(n) - y(n)`. Distributed
arithmetic (DA) removes the multipliers from the first part. It stores the
sums of weight combinations in a lookup table and walks through the input
samples one bit at a time, shifting and accumulating table words. The catch is
adaptation: each weight change would call for the whole table to be rebuilt.

This design keeps the table and adapts it directly. Each table word is a fixed
±1 combination of the weights, so under LMS it moves by `mu * e(n)` times the
same combination of the input samples. A second table holds those input
combinations. It is kept current with one cheap in-place update per sample,
and the update never reorders it: a rotating address takes care of the order.

Default configuration: 4 taps, 8-bit input and desired response, 16-bit output
and error. The RTL is parameterised in the number of taps and all widths.

## Offset binary coding and the primary LUT

With offset binary coding (OBC), each bit `b` of a two's complement sample
stands for a digit `d = +1` (b = 1) or `d = -1` (b = 0). The sign-bit plane
counts negatively. For a B-bit integer sample:

    x = 1/2 * ( sum_{j=0}^{B-1} d_j 2^j  -  1 ),   d_{B-1} taken with the opposite sign

Substituted into the filter sum:

    y = sum_j 2^j * P(j)  +  P_initial
    P(j)      = 1/2 sum_i w_i d_{i,j}        (the word for bit plane j)
    P_initial = -1/2 sum_i w_i

Each bit plane picks one of `2^N` signed weight combinations. Half of them are
the negatives of the other half. The **P-LUT** therefore stores only the
`2^(N-1)` combinations in which `w0` is positive. A '1' address bit means '+':

| address (A'1 A'2 A'3) | word                   |
|-----------------------|------------------------|
| 000                   | 1/2 (w0 - w1 - w2 - w3)|
| 001                   | 1/2 (w0 - w1 - w2 + w3)|
| ...                   | ...                    |
| 111                   | 1/2 (w0 + w1 + w2 + w3)|

The address comes from the current bit `A_k` of each older sample `x(n-k)`.
When the newest sample's bit `A0` is 0, the wanted combination is the mirror
image of another entry. That entry sits at the complemented address, and its
word is subtracted. So `obc_addr_gen` forms `A'_k = A_k XOR NOT A0` and
`negate = NOT A0 XOR s0`, where `s0` flags the sign-bit plane. `P_initial` is
just minus the last word. It has its own register, which is rewritten whenever
the last word changes.

`shift_acc` takes the bit planes LSB first. In the first cycle the feedback is
`P_initial` (control `s1`); after that it is the accumulator shifted right by
one. Each LUT word is added at bit position `B-1` of a `PW+B+1`-bit
accumulator, so the right shifts never drop a set bit. After `B` cycles the
accumulator holds the exact sum.

## Adapting the table instead of the weights

The LMS step moves word `a` by

    P_a(n+1) = P_a(n) + mu * e(n) * T_a(n),   T_a = 1/2 (x(n) ± x(n-1) ± ... ± x(n-N+1))

Here `T_a` takes the same signs as word `a`. The design splits it into
`T_a = R0 + s_a`:

* **R0** holds `1/2 x(n)`, the term whose sign is always '+'.
* The **S-LUT** holds the `2^(N-1)` signed combinations `s_a` of the `N-1`
  older samples, with the same address convention as the P-LUT (MSB ↔ x(n-1)).

`weight_update` computes `mu * e * (R0 + s_a)` with one multiplier. The
sequencer applies it to one P-LUT word per clock. `P_initial` follows
automatically when the last word is written.

## Keeping the S-LUT current: average, add R0, rotate the address

This is the least obvious part of the design.

After the words for time n are adapted, the S-LUT must move from
`{x(n-1), x(n-2), x(n-3)}` to `{x(n), x(n-1), x(n-2)}`. The update never
touches the samples themselves:

1. Take two words that differ only in the sign of the oldest sample.
   Averaging them cancels that sample.
2. Write `average - R0` into the word whose oldest-sample bit was 0 and
   `average + R0` into the other. The newest sample `x(n)` (R0 still holds it)
   now enters with '-' and '+'.

The results go back into **the same two locations**. The address bit that used
to carry the sign of the oldest sample now carries the sign of the newest one.
The table's physical order therefore rotates by one bit position per sample:

    physical address = logical address rotated left by rot,   rot = 0, 1, ..., N-2, 0, ...

After `N-1` samples the table is in plain binary order again. `s_lut` keeps
`rot` as a small counter. It rotates every read address, and it takes the pair
for averaging on physical bit `rot`. With 4 taps, `1` / `0` marking the sign
of each sample:

| location | time n: x(n-1) x(n-2) x(n-3) | n+1: x(n) x(n-1) x(n-2) | n+2: x(n+1) x(n) x(n-1) |
|----------|------------------------------|-------------------------|-------------------------|
| 0        | 000                          | 000                     | 000                     |
| 1        | 001                          | 100                     | 010                     |
| 2        | 010                          | 001                     | 100                     |
| 3        | 011                          | 101                     | 110                     |
| 4        | 100                          | 010                     | 001                     |
| 5        | 101                          | 110                     | 011                     |
| 6        | 110                          | 011                     | 101                     |
| 7        | 111                          | 111                     | 111                     |

The words are stored in two banks, EVEN and ODD, selected by the lowest
physical address bit. Each bank is `2^(N-2)` words deep, and a 2x1 mux picks
the read word. In this RTL the split does not change the cycle count; it is
kept as the storage organisation.

All S-LUT and R0 values are stored doubled: `r0_word = x(n)`,
`s_word = 2*s_a`. The halves are then only a binary point, and the averaging
is exact.

## Number formats

| quantity             | format                                                        |
|----------------------|---------------------------------------------------------------|
| `x_in`, `d_in`       | B = 8 and DW = 8 bit two's complement integers                |
| weights              | `W_i = 2^FRAC * w_i`, FRAC = 8 fractional bits                |
| P-LUT word `Q_a`     | `2^(FRAC+1) * P_a = sum_i ±W_i`, PW = 16 bits, wraps           |
| accumulator          | PW+B+1 = 25 bits, ends at `2^(FRAC+1) * y`                    |
| `y_out`              | `floor(sum_i w_i x(n-i))`, YW = 16 bits                       |
| `e_out`              | `d - y`, YW = 16 bits, wraps                                  |
| step size            | `mu = 2^-(MU_SHIFT+FRAC)`, default `2^-15`                    |
| P-LUT increment      | `floor(e * 2T_a / 2^MU_SHIFT)`, cut to PW bits                |

Because each increment is truncated, adaptation stops once
`|e * 2T_a| < 2^MU_SHIFT` for every word. The result is a small dead zone
around the optimum: with a constant input of 10, the error settles at 3 rather
than 0. Lower `MU_SHIFT` gives a larger step and a smaller dead zone. With
`MU_SHIFT = 0` the table update is exact and the filter matches the textbook
LMS recursion bit for bit, but that step size is only stable for small inputs.

## One iteration, cycle by cycle

`adf_ctrl` runs four phases:

| phase  | cycles   | what happens                                                              |
|--------|----------|---------------------------------------------------------------------------|
| IDLE   | 1        | `ready`; with `enable` the sample is taken: register bank, R0 and d       |
| FILTER | B        | one bit plane per cycle; `s1` in the first, `s0` in the last              |
| ERROR  | 1        | `y(n)` and `e(n)` registered                                              |
| ADAPT  | 2^(N-1)  | one P-LUT word adapted per cycle; in the last, the S-LUT moves to n+1     |

With `enable` held high, the filter takes one sample every
`1 + B + 1 + 2^(N-1)` cycles (18 at the defaults). `out_valid` pulses `B + 2`
cycles after the cycle that took the sample, and `y_out`/`e_out` hold their
values until the next pulse. Inputs are only taken while `ready` is high, and
an idle period (enable low) is allowed at any sample boundary. Reset is
synchronous and active high. It clears the sample history, both tables and
`P_initial`, so the filter starts from all-zero weights.

The input register bank (`input_reg_bank`) is a set of B-bit circular shift
registers. It rotates right once per filter cycle, so after B cycles every
sample is back in place. Its LSBs are the address lines `A0..A(N-1)`.

## Modules

    da_adaptive_fir          top: ports clk, rst, enable, x_in, d_in, ready, y_out, e_out, out_valid
    ├── adf_ctrl             phase sequencer (uses da_adf_pkg)
    ├── input_reg_bank       N bit-serial sample registers
    ├── obc_addr_gen         OBC address and add/subtract control
    ├── p_lut                primary LUT + P_initial register
    ├── shift_acc            shift-and-accumulate
    ├── s_lut                secondary LUT (EVEN/ODD banks), R0, address rotation
    └── weight_update        mu * e * (R0 + s_a)

`rtl/da_adf_pkg.sv` holds the phase enum. Every module's parameters default to
the configuration above. `N` must be at least 3.

## Simulation

Every module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=<n> failures=<m>`. With plain Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      --top-module tb_da_adaptive_fir \
      rtl/da_adf_pkg.sv tb/adf_ref_pkg.sv tb/tb_da_adaptive_fir.sv
    ./obj_dir/Vtb_da_adaptive_fir

Replace the testbench name for the others (`tb_input_reg_bank`,
`tb_obc_addr_gen`, `tb_p_lut`, `tb_shift_acc`, `tb_s_lut`, `tb_weight_update`,
`tb_adf_ctrl`, `tb_da_adaptive_fir_lms`, `tb_da_adaptive_fir_const`).
`tb/adf_ref_pkg.sv` is only needed by the testbenches that import it.

What the system-level testbenches establish:

* `tb_da_adaptive_fir` runs the default configuration on a system
  identification task: 600 random samples, `d` from a fixed 4-tap filter.
  Every `y(n)` and `e(n)` is compared with a reference model written from the
  arithmetic (`adf_ref_pkg`). The testbench also checks the latency and the
  18-cycle rate, and that the mean error drops by more than 4x (about 11 to
  about 1). It counts each mechanism and fails if one never occurs:
  `P_initial` entry, mirrored LUT entries, sign-bit plane, all three S-LUT
  rotations, reads from both banks, stalls, and errors of both signs.
* `tb_da_adaptive_fir_lms` sets `MU_SHIFT = 0` and checks the filter bit for
  bit against the per-weight LMS recursion with no tables at all. It also
  checks that the weights converge onto the unknown system. It runs at 4 taps
  with 8-bit input, and to exercise the parameters also at 3 taps with 6-bit
  input and at 5 taps with 8-bit input (helper `tb/adf_lms_check.sv`).
* `tb_da_adaptive_fir_const` applies the constant input `x = 10`, `d = 18`
  and checks that the error settles inside the truncation dead zone.

## How far this follows the published architecture, and where it does not

Taken from the architecture: the four-tap OBC DA filter with a `2^(N-1)`-word
P-LUT and its contents; the EXOR address stage and the S0/S1 controls; the
shift-accumulator with `P_initial`; adapting the P-LUT words directly through
`T_a = R0 + s_a`; the S-LUT contents, its average-and-add-R0 update, the
circularly shifted access instead of moving data, and the EVEN/ODD banks with
a 2x1 mux; `P_initial` as the negated last P-LUT word. The 8-bit input and
desired response and the 16-bit output and error match the published
simulation.

This design's own choices, since the source leaves them open:

* **Address polarity.** The source specifies an EXOR of each address line
  with the newest sample's bit. To index the table as listed (bit 1 = '+'),
  that bit has to be complemented first.
* **Update pairing.** The source states the S-LUT update as averaging
  consecutive entries. With the rotating address, the pair is taken on the
  rotated bit. The two agree in the first step, and the rotation tables match.
* **Word widths and formats.** All internal widths, the fixed-point format of
  the weights, the power-of-two step size and the rounding.
* **Adaptation hardware.** One multiplier forms `e * T_a`, and one P-LUT word
  is adapted per clock. The S-LUT update is done for all words in a single
  clock. The schedule of an iteration and the `enable`/`ready` handshake are
  also this design's own.
* **Storage and reset.** Tables are built from flip-flops, reset clears them,
  and arithmetic wraps on overflow.

Not included: the fixed-coefficient comparison filters (array multiplier and
plain DA) that the architecture is benchmarked against; splitting the LUT
into several smaller LUTs for long filters, which is only mentioned; and the
FPGA area, power and timing figures, which depend on the vendor flow.
