# Reconfigurable decimation filter

An oversampling analog-to-digital converter samples far faster than the
signal needs and produces few bits per sample. A decimation filter behind it
averages groups of samples: the sample rate drops by the group size M, and
the averaging buys resolution (every factor of four in M is worth one more
bit). This design is such a filter whose decimation factor is chosen at run
time from a select line: 2, 4, 8 or 16. Instead of one fixed multi-tap FIR
filter with multipliers, it uses a chain of four identical 2-fold decimators
and a small control block that decides how far along the chain the output is
taken. There are no multipliers; each stage is one adder and a few registers.

Default size: 10-bit signed input, four stages, 14-bit signed output, one
input sample per clock at most.

## The 2-fold stage and why a chain of them averages

Each stage (`decim2_stage`) is a 2-tap FIR filter with both coefficients
equal to one, followed by dropping every second output. The two steps are
merged: the stage holds the first sample of a pair and, when the second
arrives, outputs the pair's sum. The sum is one bit wider than its inputs, so
nothing is ever rounded or truncated.

Feeding the pair sums of one stage into the next gives sums of four, then
eight, then sixteen consecutive input samples. In z-transform terms the chain
of k stages is

    (1 + z^-1)(1 + z^-2)(1 + z^-4)...(1 + z^-(2^(k-1)))  =  1 + z^-1 + ... + z^-(2^k - 1)

followed by keeping one sample in 2^k: a 2^k-sample moving average (a boxcar
filter) evaluated once per group, with its groups back to back. That is the
plain oversample-and-average scheme, built so that every factor from 2 to 16
reuses the same hardware.

## Output format

The output of stage k is the sum of a group of M = 2^k samples and has
10 + k bits. The top shifts it left by 4 - k places, so for every factor

    out_data = (sum of the M samples of a group) * 16 / M  =  16 * group average

The most significant bit therefore always has the same weight and a
downstream consumer can ignore which factor is in force: out_data is the
average in signed fixed point with four fraction bits. At factor 16 all four
fraction bits carry information; at factor 2 only the first does and the
low three are zero. Full-scale inputs stay in range: sixteen samples of -512
give -8192, the most negative 14-bit value, and sixteen of +511 give +8176.

## Choosing the factor: the control block

`decim_control` registers `sel` and decodes it. `sel` is the index of the
last stage in use, so the factor is 2^(sel+1):

| sel | factor | stages running | output taken from |
|-----|--------|----------------|-------------------|
| 0   | 2      | 1              | stage 1           |
| 1   | 4      | 1-2            | stage 2           |
| 2   | 8      | 1-3            | stage 3           |
| 3   | 16     | 1-4            | stage 4           |

Stages past the tap are held idle by their enable, so they do not toggle. The
block also reports the factor in force on `factor` (its bit 0 is always 0).

Changing `sel` is the one delicate point. Each stage may be holding half of a
pair when the factor changes, and those partial groups would otherwise mix
samples from before and after the switch. The control block therefore
produces a one-cycle `clear` pulse the cycle the new setting takes effect;
every stage drops its half-pair and any pending output, and the output
register suppresses a strobe on that cycle. Concretely:

- `sel` presented before rising edge N is registered at edge N.
- At edge N+1 the chain is cleared; a sample presented for that edge is not
  taken.
- The first group at the new factor starts with the sample at edge N+2.
- A complete group is delivered only if its last sample was accepted at edge
  N-k or earlier (k = stages in use before the switch); a later one is still
  inside the chain when it is cleared and is lost. Holding `in_valid` low for
  k cycles before changing `sel` keeps every complete group.

`clear` is also high on the first cycle after reset.

## Interface and timing (`reconfig_decimator`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst`       | in  | 1     | synchronous reset, active high |
| `sel`       | in  | 2     | decimation factor select (table above) |
| `in_valid`  | in  | 1     | an input sample is present this cycle |
| `in_data`   | in  | 10    | input sample, signed two's complement |
| `out_valid` | out | 1     | an output sample is present this cycle |
| `out_data`  | out | 14    | 16 x average of the group, signed |
| `factor`    | out | 5     | decimation factor in force: 2, 4, 8 or 16 |

`in_valid` may be high on every cycle or with arbitrary gaps; a group is M
accepted samples, however spread out. With k stages in use, the output for a
group is registered and appears k cycles after the edge that accepted the
group's last sample: one register per stage, less one, plus the output
register. With an unbroken input stream there is exactly one output every M
cycles. There is no back-pressure: the consumer must take each output on the
cycle it is valid. Each stage asserts that it never produces outputs on two
cycles in a row.

All resets are synchronous. All arithmetic is exact, so there is no overflow
or rounding behaviour to configure.

## Files

| file | contents |
|------|----------|
| `rtl/decim_pkg.sv` | default sizes and the `dec_sel_e` select encoding |
| `rtl/decim2_stage.sv` | one 2-fold decimator |
| `rtl/decim_control.sv` | select decode, stage enables, clear on switch |
| `rtl/reconfig_decimator.sv` | top: control block, stage chain, output tap |
| `tb/tb_decim2_stage.sv` | stage against a pair-sum model, with random gaps, clears, disables |
| `tb/tb_decim_control.sv` | decode tables and clear pulse under random select changes |
| `tb/tb_reconfig_decimator.sv` | end to end at the default size (see below) |
| `tb/tb_oversampled_average.sv` | 1-bit oversampled source averaged at each factor |

## Verification

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`.

`tb_reconfig_decimator` runs the top with its default parameters. It steps
through every factor with an unbroken stream, a stream with random gaps and
full-scale streams, then makes 40 random factor changes with random
stimulus. Half of the factor changes use the shortest idle gap that the
rule above allows (one cycle less loses a group, which was confirmed by
shortening it). A model in the testbench groups the accepted samples and predicts
each output's value and the exact cycle it must appear on; outputs that come
early, late, not at all or unasked for are failures. It counts each
mechanism (outputs at each factor, switches, bypassed stages, discarded
partial groups, the sample dropped on a switch, gapped input, full-scale
groups) and fails if any never occurred.

`tb_oversampled_average` models the intended use. A first-order sigma-delta
modulator in the testbench turns constant levels between 0 and 1 into 1-bit
streams, and the filter averages them at each factor. For such a source the
average of M bits lies within 1/M of the level, and the test checks that
bound on every output, so doubling the factor is seen to halve the error.
The measured worst errors are 0.43, 0.20, 0.10 and 0.055 for factors 2 to 16.

Each testbench has been run against a copy of its module with one deliberate
bug (a wrong pair sum, an off-by-one stage enable, a misaligned output
shift) and fails on it.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        --top-module tb_reconfig_decimator rtl/decim_pkg.sv tb/tb_reconfig_decimator.sv
    ./obj_dir/Vtb_reconfig_decimator

Each finishes in well under a second. The simulator needs no x/z support:
everything the design reads is reset.

## Changing it

`IN_W` (input width) and `N_STAGES` (number of 2-fold stages) are parameters
of the top; the output width is `IN_W + N_STAGES` and the maximum factor
`2^N_STAGES`. `sel` has `clog2(N_STAGES)` bits; with a stage count that is not
a power of two, select values past the last stage are clamped to the full
chain. The package defaults and the `dec_sel_e` names describe the default
four-stage chain, and the testbenches are written for that size.

## Departures and limits

- Only power-of-two factors exist, because the filter is a cascade of 2-fold
  stages. A factor such as 3 or 10 is not available.
- The filter is a boxcar average, not a sharp low-pass: its first sidelobes
  are only about 13 dB down, so signal energy near multiples of the output
  rate aliases into the passband. It suits converters whose input is
  narrowband and slowly varying, which is the oversample-and-average setting
  it is meant for. A passband/alias budget tighter than that (for example
  half an output LSB at 14 bits) needs longer, designed FIR stages with
  non-unit coefficients; those would replace the body of `decim2_stage`
  without changing its interface.
- The input width (10 bits), the output scaling, the valid strobes, the
  select encoding and the clear-on-switch behaviour are this design's own
  choices. The overall organisation follows the published architecture: a
  reconfigurable decimator made of 2-fold decimation stages, factors up to 16
  chosen from a select line through a control block, and a 14-bit output.
- The published results (speed and area on an FPGA, and a layout) were not
  reproduced; no timing or area figures are claimed for this RTL.
