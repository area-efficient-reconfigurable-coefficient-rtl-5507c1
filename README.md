# Multiplier-free symmetric FIR filters in distributed arithmetic

An FIR filter computes `Y[n] = sum_k h[k] * x[n-k]`. Built directly, that takes one
multiplier per tap. Distributed arithmetic (DA) does without them. It takes one bit
position `b` of every sample at a time. The bits `x_b[0..N-1]` form an address, and
a look-up table (LUT) returns the precomputed partial sum `sum_k h[k] * x_b[k]`. A
shift-and-add accumulator then weights the partial sums by `2^b`. An output needs
as many cycles as a sample has bits, and the area is some small tables, a few adders
and one accumulator.

This repository holds two such filters. Both are written in synthesizable
SystemVerilog and use the same building blocks:

| filter | module | taps | sample | coefficients | LUTs | cycles per sample |
|---|---|---|---|---|---|---|
| fixed coefficients | `da_fir` | 32 | 12-bit signed | 12-bit, elaboration-time constants | 4 ROMs of 16 entries | 13 |
| reloadable coefficients (dynamic DA, "DDA") | `dda_fir` | 40 | 4-bit signed | 8-bit, loaded at run time | 5 RAMs of 16 entries | 5 |

`fir_top` places the two side by side, each with its own ports. They share only the
clock and the reset.

The method follows the paper *Area Efficient Reconfigurable Coefficient Based FIR
Filter*. The paper gives the structure: symmetric pre-addition, a bit-serial shift
register, the LUT divided into four-input tables, three levels of pipeline
registers and a +/- accumulator. It also gives the reloadable variant. The sizes
of the fixed filter (32 taps, 12-bit input) come from the paper's structure figure.
The sizes of the reloadable filter (40 taps, 4-bit input, 8-bit values) are read
from its simulation waveforms. Everything else is this design's own choice, listed
in [Design choices](#design-choices-beyond-the-method): coefficient values and
widths, the handshakes, how the LUTs are rewritten, and reset.

## From samples to an output

### 1. Pre-addition of symmetric pairs

A linear-phase low-pass has even-symmetric coefficients, `h[k] = h[TAPS-1-k]`. The
two samples that share a coefficient are therefore added first (`symmetric_preadd`):

    y[i] = x[i] + x[TAPS-1-i],   i = 0 .. TAPS/2-1,   Y = sum_i h[i] * y[i]

`x[0]` is the newest sample in the tap delay line (`input_buffer`). Each pair sum is
one bit wider than a sample, `W = DATA_W + 1` bits. That is 13 bits for 12-bit
samples and 5 bits for 4-bit samples. The pre-adder halves the number of LUT
address bits. The price is one extra bit position, so an n-bit input needs n+1
cycles.

### 2. Bit-serial LUT look-up

`bit_serializer` captures the `TAPS/2` pair sums. Over the next `W` cycles it
presents bit `b` of all of them at once, LSB first (`b = 0 .. W-1`). A tag goes
with each bit position. It marks the first position, where the accumulator
restarts, and the last one, the sign bit.

A single LUT addressed by all `TAPS/2` bits would need `2^16` or `2^20` entries.
The table is therefore divided. LUT `g` takes the bits of pair sums `4g .. 4g+3`
and holds 16 entries:

| address b3 b2 b1 b0 | entry |
|---|---|
| 0000 | 0 |
| 0001 | h[4g] |
| 0010 | h[4g+1] |
| 0011 | h[4g] + h[4g+1] |
| ... | ... |
| 1111 | h[4g] + h[4g+1] + h[4g+2] + h[4g+3] |

In general, entry `a` holds `sum_j a[j] * h[4g+j]`, stored in `COEF_W+2` bits. The
fixed filter has four such ROMs (`da_rom_lut`), computed at elaboration from the
coefficient parameter. The reloadable filter has five RAMs (`dda_ram_lut`). The
LUT outputs are summed by a pipelined adder tree (`lut_adder_tree`). The result is
the partial sum `s_b = sum_i h[i] * y_b[i]` for bit position `b`.

### 3. The scaling accumulator and the sign bit

The pair sums are two's complement numbers, so

    Y = -2^(W-1) * s_(W-1) + sum_(b < W-1) 2^b * s_b

The sign bit's partial sum is subtracted. `scaling_accumulator` does not shift
`s_b` left by a growing amount. It shifts the accumulator right by one before
every add, and always adds at the fixed weight `2^(W-1)`:

    acc <= (acc >>> 1) + s_b * 2^(W-1)      for b < W-1   (acc starts at 0 for b = 0)
    acc <= (acc >>> 1) - s_b * 2^(W-1)      for b = W-1

After the W-th step, `acc = Y`. The result is exact: after `k` steps the
accumulator is a multiple of `2^(W-k)`, so the bit shifted out is always zero.
The accumulator is `SUM_W + W + 1` bits wide. The output register holds the
`SUM_W + W` bits that `Y` can need. That is 29 bits for the fixed filter and 18
bits for the reloadable one. No rounding or scaling is applied.

## Pipeline and timing

The data flows through these stages, with one register at each:

    serializer -> LUT (registered read) -> adder level 1 -> adder level 2 [-> level 3] -> accumulator -> output register

With four LUTs there are two adder levels. The LUT output register and the two
adder registers are the three pipeline register levels of the method. With five
LUTs the tree needs a third level. The bit tags travel down a matching delay line
(`tag_pipe`) next to the data.

| event | fixed (W=13, 2 levels) | reloadable (W=5, 3 levels) |
|---|---|---|
| sample accepted (`in_valid && in_ready`) at cycle t | t | t |
| serializer loads the pair sums, if free | t+1 | t+1 |
| `out_valid` after that load | +W+LEVELS+2 = 17 | +10 |
| latency when idle | 18 | 11 |
| sustained rate | 1 sample / 13 cycles | 1 sample / 5 cycles |

One sample can wait in the delay line while the serializer is still busy with the
previous one. `in_ready` is low from the cycle after acceptance until the
serializer takes that sample. The serializer takes a new set on the same cycle it
shows its last bit. So, under a continuous stream, one sample is accepted every W
cycles and the serializer never idles.

## Reloading coefficients (`dda_fir`)

The reloadable filter swaps the ROMs for RAMs and adds two blocks:

* `coef_buffer` holds the `TAPS/2` distinct coefficients. They arrive as a stream
  on `coef_valid`/`coef_in`. Each write shifts `coef_in` in at `h[TAPS/2-1]`, so
  you write `h[0]` first and `h[TAPS/2-1]` last. A flag `changed` is set by any
  write that alters the stored set. A write that leaves every entry as it was does
  not set it.
* `lut_updater` rewrites all LUTs in one 16-cycle pass, one address per cycle. For
  address `a` it writes `sum_j a[j] * h[4g+j]` into every LUT `g` at once. It uses
  adders only.

The control rules:

1. While `changed` is set or a pass is running (`lut_updating`), no new set of pair
   sums enters the serializer. A sample that was already accepted waits, and
   `in_ready` stays low.
2. A pass starts when `changed` is set, the serializer is empty (no bit is reading
   the LUTs) and no coefficient is written in that cycle. A burst of back-to-back
   writes therefore costs one pass. A write during a pass sets `changed` again and
   causes another pass.
3. A set of pair sums that is already in the serializer finishes with the old
   coefficients. The delay line is kept, so the first outputs after a reload apply
   the new coefficients to samples that arrived earlier.

An assertion in `dda_fir` checks that no LUT is written while a bit reads it.

After reset, the buffer holds `COEF_INIT` and `changed` is set. The LUTs are
therefore built before the first sample is processed. A sample offered right after
reset waits up to about 17 cycles.

Reload cost: `TAPS/2` write cycles (20) plus one 16-cycle pass, plus the end of
the word set in flight.

## Interfaces

Both filters use the same sample interface (`clk`, active-low asynchronous
`rst_n`):

| port | dir | width | meaning |
|---|---|---|---|
| `in_valid` / `in_ready` | in / out | 1 | sample handshake. A sample is taken when both are high at a rising edge |
| `in_data` | in | `DATA_W` | signed sample |
| `out_valid` | out | 1 | one-cycle strobe per output |
| `out_data` | out | `COEF_W+2+log2(TAPS/8)+DATA_W+1` | signed, exact `Y[n]`. It holds its value until the next output |

`dda_fir` adds `coef_valid`, `coef_in` (`COEF_W`, signed) and `lut_updating`. In
`fir_top` the ports carry the prefixes `da_` and `dda_`.

Parameters: `TAPS` (even, and a multiple of 8, so that the pairs fill four-input
LUTs), `DATA_W` and `COEF_W`. The fixed filter also takes `COEFS` and the
reloadable one `COEF_INIT`. Both are `int` arrays of `TAPS/2` values, `h[0]` first.
The defaults are in `fir_pkg`. They are the first half of a Hamming-windowed sinc
low-pass with cut-off at a quarter of the sample rate, `h[k] ~ w[k] *
sin(pi (k - (TAPS-1)/2) / 2) / (pi (k - (TAPS-1)/2))` with `w[k] = 0.54 - 0.46
cos(2 pi k / (TAPS-1))`, scaled so the largest tap is `2^(COEF_W-1) - 1`.

## Design choices beyond the method

* **Tap counts.** The method's overview speaks of a 40th-order low-pass. Its
  pre-add equation `y[i] = x[i] + x[31-i]` and its structure figure describe 32
  taps. The fixed filter follows the equation: 32 taps. The 40-tap form is the
  same module with `TAPS = 40`, and is tested. An odd length (41 taps, read as
  order 40 strictly) would need an unpaired centre tap. That is not built.
* **Sign bit.** The two's complement formula subtracts the sign bit's term, and
  the +/- accumulator does exactly that. A sentence in the method's prose speaks
  of adding it. The formula is followed.
* **Coefficients.** No values or widths are given. 12 bits for the fixed filter
  and 8 bits for the reloadable one are assumed. The 8 bits match the byte-wide
  values in the reloadable filter's simulation.
* **Coefficient loading.** The rules for loading and rewriting the LUTs are this
  design's own: the serial shift-in, the change detection, the hold-and-rewrite
  policy and the updater's 16-cycle pass. The method only says that the LUTs are
  refreshed from the coefficient buffer whenever the coefficients change.
* **No `sel` input.** The reloadable filter's simulation also shows a 2-bit select
  input and parallel 4-bit sample inputs. Their function is not described. This
  design has a single sample stream and no select input.
* **Storage.** The serial word store is built from registers (`bit_serializer`),
  not from RAM-based shift registers.
* **Five LUTs in the reloadable filter.** It uses five four-input LUTs and a
  three-level adder tree, the same division as the fixed filter. The block
  diagram of the method draws it as a single LUT.
* **Not given by the method.** Handshakes, reset values and the output width are
  not specified. Full precision is chosen.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | `bit_tag_t`, `LUT_IN = 4`, default coefficient sets |
| `rtl/input_buffer.sv` | tap delay line |
| `rtl/symmetric_preadd.sv` | pair pre-adder |
| `rtl/bit_serializer.sv` | parallel-to-serial bit shifter with tags |
| `rtl/da_rom_lut.sv`, `rtl/dda_ram_lut.sv` | constant and writable 16-entry partial-sum LUTs |
| `rtl/lut_adder_tree.sv` | pipelined adder tree |
| `rtl/scaling_accumulator.sv` | +/- shift accumulator and output register |
| `rtl/coef_buffer.sv`, `rtl/lut_updater.sv` | coefficient store and LUT rewrite engine |
| `rtl/da_fir.sv`, `rtl/dda_fir.sv`, `rtl/fir_top.sv` | the two filters and the top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_workload_40tap.sv` | 40-tap fixed filter and constant `4'hF` input on the reloadable filter |

## Simulating

Every testbench checks the RTL against a model computed independently in the
testbench: a direct-form convolution for the filters, and per-block integer
models for the blocks. Each one ends with a line
`TB_RESULT checks=N failures=M`. A watchdog ends a run that hangs, and counts the
hang as a failure. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top -o sim
    ./obj_dir/sim

`tb_fir_top` runs the whole design at its default parameters. It counts each
mechanism and fails if one never occurs: input back-pressure, full-rate streaming,
a subtracted sign-bit term, the LUT build after reset, LUT rewrites after reloads,
a sample held during a rewrite, and a write that changes nothing and starts no
rewrite. `tb_dda_fir` also reloads coefficients while samples stream at full rate.
It checks that each output uses either the old or the new set, and never the old
set again once the new one has appeared. The filter testbenches check the latency
and the rate given above. All testbenches run in well under a second.

## Limits

* The coefficient values are placeholders. Any even-symmetric set that fits
  `COEF_W` can be used.
* Only even-length symmetric filters are supported. There is no centre tap and no
  anti-symmetric mode.
* The FPGA resource and speed figures of the original implementation are not
  reproduced here. Synthesis for a specific device has not been done.
