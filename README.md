# Programmable power-of-two scaler for residue number systems

In a residue number system (RNS) an integer is carried as its remainders
modulo a set of small co-prime moduli. Addition and multiplication then split
into independent narrow channels, which is why RNS datapaths are attractive
for large DSP systems such as filter banks. The weak spot is scaling. Dividing
by a power of two is only a right shift in two's complement. In RNS it has
no positional shortcut, yet a datapath needs it to keep its dynamic range
bounded.

This RTL divides a signed RNS number by `2^n` (`n = 1..7`, chosen at run time)
without leaving the residue domain. It has no conversion to binary and no
mixed-radix conversion. The scaler is a chain of identical divide-by-two
blocks. Each block needs only two bits of information about the number: its
parity and its sign. Most of the logic goes into finding those two bits.

Default configuration:

| item | value |
|---|---|
| RNS base | {13, 17, 29, 37, 41, 53} |
| dynamic range M | 515 290 009 (about 2^28.9) |
| signed range | -(M-1)/2 ... +(M-1)/2 |
| redundant modulus m_r | 5 |
| scale-by-2 blocks | 7 (n = 1..7) |
| latency | n + 2 clock cycles |
| throughput | one number per cycle |

## Number representation

A signed value `v` is held as the residues of its representative
`X = v mod M`, which lies in `[0, M)`. Values `0 ... (M-1)/2` are
non-negative, and `(M+1)/2 ... M-1` stand for negative values. This works
like two's complement with `M` in place of `2^k`. The residues are
`x_i = X mod m_i`, each 6 bits wide (type `rns_t`).

The scaler also carries a *redundant residue* `x_r = X mod 5`, 3 bits wide.
It is not part of the base. It exists only so the parity of `X` can be found
cheaply (see below). The scaler computes `x_r` at its input and keeps it
correct through every halving. The `x_r` of the result is an output as well.

## Halving in RNS

`2` is invertible modulo every odd modulus. So for an **even** `X`, `X/2` is
simply `x_i * 2^-1 mod m_i` in each channel. For an **odd** `X`, the block
halves `X + 1` instead: `(x_i + 1) * 2^-1 mod m_i`. That is division by two
with rounding up.

For a negative `v` the correct result is not `X/2`. It is the representative
of `v/2`, which is `(X + M)/2`. `M` is 0 in every base channel, so the base
residues of `X + M` equal those of `X`. Only the parity flips, because `M` is
odd. The parity of the number actually being halved is therefore

    odd = parity(X) xor sign(X)

and that one bit drives the multiplexers in all channels. No addition of `M`
is needed in the base channels.

The redundant channel is different. There, `M mod 5 = 4`, not 0. A negative
value therefore also adds the constant `<2^-1 * M>_5 = <(m_r+1)/2 * <M>_5>_5`
after halving.

There is one corner the plain scheme gets wrong: `v = -1` (`X = M - 1`).
Halving with rounding up gives `(2M - 1 + 1)/2 = M`. Its base residues are
those of 0, but its redundant residue would be `<M>_5` rather than 0. The
basic block detects `X = M - 1` (every `x_i = m_i - 1`) and forces the
redundant residue to 0. This check is an addition of this design.

`scale2_stage` implements this block, with one register at its output.

## Parity detection (`sk_parity_det`)

The Chinese remainder theorem (CRT) writes

    X = sum_i (M/m_i) * y_i - alpha * M,   y_i = <(M/m_i)^-1 * x_i>_{m_i}

where `alpha = floor(sum_i y_i/m_i)` is an integer from 0 to 5. Every
`M/m_i` is odd, and so is `M`. That gives

    X mod 2 = xor_i y_i[0]  xor  alpha[0]

so finding the parity comes down to finding `alpha`. The Shenoy-Kumaresan
method gets `alpha` from the redundant residue by evaluating the same CRT
equation modulo 5:

    <alpha>_5 = < M^-1 * ( sum_i <M/m_i>_5 * y_i - x_r ) >_5

This needs only a few 3-bit modular operations.

**Caveat, and a design addition.** With six base moduli, `alpha` can be 5.
Modulo 5, that reads as 0. It happens for about 1 in 720 uniformly random
inputs, and for those inputs the parity would be wrong. The block therefore
also sums the fractions `y_i/m_i`, each truncated to 3 bits (`COARSE_BITS`).
That sum is below 1 when `alpha = 0` and above 4 when `alpha = 5`, which
settles the choice. This logic is generated only when `M_R < N_MOD`. With a
redundant modulus of at least 6 it disappears.

The `y_i` are also outputs, because the sign detector uses the same values.

## Sign detection (`sign_det`)

`X/M` is the fractional part of `sum_i y_i/m_i`, and `X` is negative exactly
when that fraction is at least 1/2. This amounts to evaluating the CRT
divided by `M/2` and reading the integer bit. Each `y_i/m_i` comes from a
table with 34 fraction bits (`FRAC_BITS`). The sum then lives in a 37-bit
adder tree, and the sign is the bit of weight 1/2.

The fractions are **rounded up**, and the precision is set so that every
`X` is decided correctly:

- `X = 0` stays exact, so it never wraps to a fraction near 1.
- The total error is below `6 * 2^-34 = 3.5e-10`. That is less than
  `1/(2M) = 9.7e-10`, the distance from `(M-1)/2` or `(M+1)/2` to `M/2`.

If you change the base, `FRAC_BITS` must satisfy `N_MOD * 2^-FRAC_BITS < 1/(2M)`.

## Base extension at the input (`frac_crt_base_ext`)

The input arrives with base residues only. The first pipeline stage computes
the `y_i`. The second stage adds the same rounded-up fractions. With this
precision the integer part of that sum is exactly `alpha`. The stage then
evaluates the CRT modulo 5:

    x_r = < sum_i <M/m_i>_5 * y_i - alpha * <M>_5 >_5

The block has two cycles of latency.

## Rounding and the correcting last block (`scale2_last`)

A chain of blocks that all round up computes `ceil(v / 2^k)`. That result
can be almost a whole unit too large. The last block of the chain rounds
odd values **down** instead: `((x_i+1) * 2^-1 - 1) mod m_i`, which is
`(w - 1)/2`. Its redundant channel picks one of four precomputed values,
one for each combination of even or odd and positive or negative.

The scaler output is therefore

    v' = floor( ceil(v / 2^(n-1)) / 2 )

This is `v / 2^n` rounded to the nearest integer, with exact ties rounded
down. The error is at most 1/2, and reaches 1/2 only on ties. With `n = 1`,
every odd `v` is a tie.

## The programmable chain (`pow2_scaler`)

    in_res -> frac_crt_base_ext -> [mux] -> scale2_stage -> [mux] -> ... -> [mux] -> scale2_last -> out
             (2 cycles)            ^ (6 basic blocks, 1 cycle each)             ^   (1 cycle)
                                   '---- extended input, to the entry block ----'

A 2:1 multiplexer in front of every block chooses between the previous
block's output and the base-extended input. Block `N_STAGES - n` is the
entry point. So a number passes through exactly `n` blocks and always leaves
through the correcting one. The latency is `2 + n` cycles.

`shift` is a configuration input:

- Keep it constant while numbers are in flight.
- Change it only after the pipeline has drained. Otherwise numbers that are
  already inside get the wrong treatment or are lost.
- It is sampled when a number leaves the base extension, two cycles after
  `in_valid`.
- `n = 0` is not supported. An assertion flags a value outside `1..N_STAGES`.

### Ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous active-low reset; clears the valid bits only |
| `shift` | in | 3 | exponent n, 1..7 |
| `in_valid` | in | 1 | `in_res` holds a number |
| `in_res` | in | 6 x 6 | base residues, `in_res[i]` for modulus i of the base, each < m_i |
| `out_valid` | out | 1 | result valid, n + 2 cycles after `in_valid` |
| `out_res` | out | 6 x 6 | base residues of the result |
| `out_xr` | out | 3 | result mod 5 |

There is no back-pressure. Any input pattern is accepted, one number per
cycle. Data registers are not reset; only the valid bits are.

## Files

| file | contents |
|---|---|
| `rtl/rns_pkg.sv` | base, redundant modulus, widths, types; constant functions that build every modular look-up table |
| `rtl/sk_parity_det.sv` | parity detector (combinational) |
| `rtl/sign_det.sv` | sign detector (combinational) |
| `rtl/frac_crt_base_ext.sv` | extension to the redundant modulus, 2 cycles |
| `rtl/scale2_stage.sv` | basic divide-by-two block, 1 cycle |
| `rtl/scale2_last.sv` | correcting last block, 1 cycle |
| `rtl/pow2_scaler.sv` | top: base extension, routing multiplexers, 7 blocks |
| `tb/tb_rns_ref_pkg.sv` | whole-integer reference arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

Every modular operation by a constant is a small look-up table. It is
written as a loop over all 64 possible residue values that compares the
input with each one and returns a constant computed during elaboration. No
table data is stored in files.

## Verification

Each testbench builds its expected values from whole integers with the `%`
operator, independently of the design's tables. Each one prints
`TB_RESULT checks=N failures=M`.

- `tb_sk_parity_det` and `tb_sign_det` cover the edge values `0`, `1`,
  `(M-1)/2`, `(M+1)/2`, `M-1`, values near `M/2`, inputs with `alpha = 5`,
  and a few thousand random values.
- `tb_frac_crt_base_ext`, `tb_scale2_stage` and `tb_scale2_last` stream
  values with random gaps. They check every residue and the latency, and
  require all four combinations of even/odd and positive/negative to occur.
- `tb_pow2_scaler` runs the default-size design for every `n = 1..7`, with
  about 1500 values each. For every result it checks the residues, the
  residue mod 5, the rounding bound `|v' - v/2^n| <= 1/2` and the latency
  `n + 2`. It also requires each of these to occur: every exponent, negative
  inputs, `alpha = 5` inputs, odd and even values at the last block, and
  back-to-back inputs. It takes well under a minute.

To run, for example, the top-level test:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/rns_pkg.sv tb/tb_rns_ref_pkg.sv rtl/sk_parity_det.sv rtl/sign_det.sv \
        rtl/frac_crt_base_ext.sv rtl/scale2_stage.sv rtl/scale2_last.sv \
        rtl/pow2_scaler.sv tb/tb_pow2_scaler.sv --top-module tb_pow2_scaler
    ./obj_dir/Vtb_pow2_scaler

## How far the design follows the original scheme

These parts follow the published scaler:

- the base and the redundant modulus 5;
- the parity xor sign control of each halving block;
- the extra constant term in the redundant channel;
- Shenoy-Kumaresan parity detection;
- fractional-CRT sign detection and base extension;
- the correcting last block, with its four redundant-channel expressions;
- a chain of seven blocks with input-routing multiplexers;
- the `n + 2` latency.

These are choices of this implementation:

- residue widths, fraction precision and rounding direction;
- one register per block and two in the base extension;
- the valid/reset scheme;
- the encoding of the `shift` input;
- the multiplexer select polarity (1 = odd takes the "+1" path);
- the reading of the routing multiplexers as a per-block entry point.

These go beyond the original scheme, for correctness:

- the `alpha = 0/5` disambiguation in the parity detector;
- the `v = -1` fix in the basic block.

The scaler was designed for a QRNS (quadratic RNS, complex-valued)
polyphase filter bank, where it divides by `2^7`. That filter is not part of
this RTL, and neither is the mapping between QRNS channel pairs and the
real-valued RNS numbers the scaler works on. A QRNS datapath would need one
scaler per real-valued component.

## Changing the design

- **Base:** edit `MODULI`, `N_MOD` and `RW` in `rns_pkg`. The moduli must be
  odd and pairwise co-prime. Check the `FRAC_BITS` condition above.
  `N_MOD * 2^-COARSE_BITS < 1` must also hold.
- **Redundant modulus:** `M_R` must be odd and co-prime to the base, and
  `RRW` must hold it. With `M_R >= N_MOD` the coarse `alpha` correction is
  not generated.
- **Chain length:** `N_STAGES` is a parameter of `pow2_scaler`. The width of
  `shift` follows it.
