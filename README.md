# Low-power GPS down-conversion and correlation engine

A GPS receiver spends most of its digital power in three operations done on
every sample of the intermediate-frequency (IF) signal: multiplying the sample
by a local sine wave (down-conversion to baseband), multiplying the result by
the satellite's ±1 Gold code chip (code removal), and summing the products over
an integration period (despreading). This RTL implements that engine for a
2-bit IF sample, a 2-bit sine value and a 1-bit code, with a 22-bit result.

The engine exists in two organisations, one per signal class:

| signal | sample rate | organisation | why |
|---|---|---|---|
| 20.46 MHz wide | ~400 MHz | **parallel engine**: 16 copies of the path, each at 1/16 of the sample rate, then a shifter and a second-stage accumulator | each copy runs at 25 MHz. Slow paths allow a very low supply voltage. 16 paths was the power minimum of the evaluated 1/2/4/16/32 |
| 2.046 MHz wide | ~40 MHz | **sequential engine** with a **pipelined accumulator** | parallelism buys little at 40 MHz. The accumulator is the slowest and most variation-sensitive stage at low voltage, so its carry chain is cut into pipelined slices |

`gps_corr_top` puts both engines side by side, each with its own ports. Supply
voltage, power and delay are properties of the circuit that this RTL models
only through its structure: shorter adders and lower clock rates per path.

## The sequential path (`corr_path`)

One sample per clock passes three register stages:

1. **Mapper** (`gps_mapper`): the 2-bit sample and the 2-bit sine value form a
   4-bit address into a 16-entry table of 6-bit products.
2. **Code removal** (`gold_wipeoff`): a two's-complement negator and a 2:1 mux.
   The code bit picks the product or its negation.
3. **Accumulator** (`pipe_acc`): a 22-bit integrate-and-dump sum.

The 2-bit values use a sign/magnitude code. Bit 1 is the sign (1 = negative)
and bit 0 the magnitude (0 → 1, 1 → 3), so each value is one of −3, −1, +1,
+3. Products are therefore ±1, ±3 or ±9. This code, and hence the table, is a
choice made here. If your front end uses another 2-bit format, only the table
in `gps_mapper` and `smag2_value` in `gps_pkg` need to change. A code bit of 1
means chip value −1 and selects the negation.

Handshake: `in_valid` qualifies a sample. `in_last` marks the final sample of
an integration. If clock edge *e* takes that sample, `out_valid` (a one-cycle
pulse) and `out_sum` are set by edge *e* + 1 + `ACC_STAGES`. The next valid
sample starts a new sum from zero, so integrations can follow back to back
with no idle cycle. Sums wrap modulo 2^22.

## The pipelined accumulator (`pipe_acc`)

This is the least obvious block. A `WIDTH`-bit accumulator is cut into
`STAGES` slices of ⌈WIDTH/STAGES⌉ bits. The top slice takes what is left, so
22 bits in 3 stages are 8 + 8 + 6. For each sample:

* Slice 0 adds the sign-extended sample to its bits.
* Its carry-out, the sample's sign bit and the control flags are registered.
  One cycle later slice 1 adds them: the sign bit is widened to the slice
  width (the "1 bit to 8 bits extension") and the carry enters as carry-in.
* Each further slice works the same way, one cycle later again.

So no adder is longer than one slice. A slice's carry reaches the slice above
one cycle late, but it is always added there exactly once, so the sum is exact.
The drawn reference case is 16 bits as two 8-bit adders with a 6-bit input.

Two consequences need care:

* **Deskew.** The slices of one sum finish on different cycles, and the low
  slices may already be taking the next integration while the top slice is
  still finishing. Each finished slice value therefore travels up the pipeline
  with the carry. The output register loads all slices of one integration at
  once, from the top slice. The result appears `STAGES − 1` cycles later than
  with a single adder.
* **Clearing.** "Start a new sum" is a flag that travels with the sample.
  Each slice zeroes itself when the flag reaches it.

When the input is wider than a slice, its upper bits travel up with the carry.
This happens in a 2-slice 22-bit second-stage accumulator fed with 16-bit
words.

## The parallel engine (`par_engine`)

Each clock delivers a set of `PATHS` consecutive samples. Sample *i* of the
set goes to path *i*. Every path is a `corr_path` with a 16-bit accumulator.

**Blocks.** The paths integrate over blocks of `PATHS` sample sets. At the end
of a block every path hands its sum to `path_shifter` and restarts.

**Shifter.** `path_shifter` loads all `PATHS` words at once and moves them one
position toward its LSB end each cycle. The LSB word feeds the 22-bit
second-stage accumulator. Draining takes exactly `PATHS` cycles, as long as a
block takes to collect, so a load never finds the shifter busy. A load may
land on the cycle that presents the previous load's last word. An overrun flag
and an assertion guard the rule.

**Clock gating.** The second-stage accumulator advances only while the shifter
holds words. `comb_en` is that enable, and in silicon it would drive a clock
gate. It is low whenever input gaps make a block take longer than `PATHS`
cycles. It is also low before the first block and after the last.

**Ending an integration.** `dump` asks to close the integration. It takes
effect at the end of the current block: the set with `block_last` high. A dump
raised earlier in the block is remembered until then. A tag marks the closing
block and travels beside the paths and through the shifter to the last word.
From edge *e* that takes the closing set, `out_valid`/`out_sum` are set by
edge *e* + 1 + `PATH_STAGES` + `PATHS` + `ACC_STAGES`. This is 19 cycles at
the defaults. An integration is thus always a whole number of blocks (16 sets
× 16 samples = 256 samples at the defaults). A controller that needs finer
boundaries can watch `block_last`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `gps_corr_top` | `PATHS` | 16 | parallel paths (1 and above; 1, 2, 4, 16, 32 are tested) |
| | `PATH_STAGES` | 1 | slices of each 16-bit path accumulator |
| | `SEQ_STAGES` | 2 | slices of the sequential engine's 22-bit accumulator (1, 2, 3 tested) |
| `par_engine` | `PATH_W`, `ACC_W`, `ACC_STAGES` | 16, 22, 1 | path width, result width, second-stage slices |
| `corr_path` | `ACC_W`, `ACC_STAGES` | 22, 1 | result width, slices |
| `pipe_acc` | `IN_W`, `WIDTH`, `STAGES` | 6, 16, 2 | the drawn two-stage 16-bit accumulator |

Shared widths and the sample type are in `gps_pkg`. All registers reset
asynchronously on `rst_n` low.

## Capacity

* A 16-bit path sum holds a block easily: at most 32 × 9 = 288 at 32 paths.
* The 22-bit result holds ±2,097,151. That covers every possible 1 ms
  integration at 40 MHz: 40,000 × 9 = 360,000.
* At 400 MHz a 1 ms integration has 400,000 samples. Its worst case is
  3.6 million, which exceeds 22 bits. Real noise-dominated correlation sums
  stay far below that. Sums wrap silently on overflow.

## Where this RTL goes beyond or departs from its source description

Specified by the source description and followed here:

* the 2-bit/2-bit/1-bit inputs, the 4-to-6-bit mapper and the 22-bit result
* code removal by a negator and a mux
* the three pipeline stages of the sequential path
* parallel paths that copy it, with 16-bit adders, a shifter and a 22-bit
  second-stage adder
* the gating of that adder
* the two-stage accumulator: carry and extended sign registered into the upper
  half
* 16 paths for the 400 MHz signal

Chosen here:

* the sign/magnitude sample code and the code-bit polarity
* the integrate/dump handshake and reset
* the block length of `PATHS` sets, the sample-to-path order and the
  deferred dump
* the slice split beyond the drawn 2 × 8 bits, and the deskew scheme of the
  output register
* clock gating modelled as an enable
* `SEQ_STAGES = 2` (three stages are available by parameter)

Not included:

* The sine-wave and Gold-code generators. The sine and code are inputs, and
  the source gives neither generator's design.
* The RF front end, the tracking loops and the navigation processor.
* The multi-channel arrangement: the number of channels is not given.
  Instantiate one engine per channel.

One reading needs stating. The source says the gated second-stage adder, with
32 paths, "operates every 32 clock cycles". Here the combiner takes one word
per path-clock cycle, which is once per 32 sample-clock cycles. It idles
whenever the paths are not delivering.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
For example:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl rtl/gps_pkg.sv \
          tb/tb_gps_corr_top.sv --top-module tb_gps_corr_top
obj_dir/Vtb_gps_corr_top
```

| testbench | what it covers |
|---|---|
| `tb_gps_pkg` | sample-code values and widths |
| `tb_gps_mapper` | all 16 mapper entries |
| `tb_gold_wipeoff` | all 64 inputs × both code values |
| `tb_pipe_acc` | 16 bit/2 slices, 22/3, 22/1: random, wrapping, back-to-back and single-sample integrations, with exact latency |
| `tb_corr_path` | the sequential path with 1, 2 and 3 accumulator slices |
| `tb_path_shifter` | order, tag, back-to-back loads, N = 4 and 16 |
| `tb_par_engine` | 16-path and 4-path builds: gaps, deferred dumps, latency, enable count |
| `tb_path_sweep` (with `par_chk`) | 1, 2, 4, 16 and 32 paths |
| `tb_gps_corr_top` | both engines at default size on a synthetic spread signal. Matched codes must give at least 4× the correlation of an unrelated code. It counts aligned and deferred dumps, input gaps, gated cycles, loads on the last word, back-to-back integrations and carries between slices |
