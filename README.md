# Radar Signal Compender: a pipelined accumulator for backscatter radars

A backscatter (MST or incoherent-scatter) radar returns echoes that look like
noise. To measure anything, a processor must average a very large number of
samples, or products of samples, in real time. The work is simple and very
repetitive: for each range gate, add up a fixed list of samples, or of sample
pairs (lag products of an autocorrelation function, or pulse-decoding sums).
Which samples go into which sum depends only on the experiment, never on the
data. So the control can be a precomputed address program instead of a
general-purpose processor, and all of the hardware can be spent on memory
bandwidth and integer arithmetic.

This RTL implements that architecture, the Radar Signal Compender (RSC):

* several **Functional Modules** (FMs) process independent streams in
  parallel. Each is a fully pipelined "multiply, then add/subtract into
  memory" engine.
* **double-buffered input memories**, so that sampling and processing never
  compete for a memory cycle.
* a **Base + Displacement address program** per FM, which walks the samples
  as a nested loop: ranges outside, contributing terms inside.
* **integer arithmetic** on a 64-bit word. The word can be split into 48-bit,
  2 x 32-bit or 4 x 16-bit lanes, each with its own overflow flag.
* a **Master Control** that gives the host one command channel to program,
  start, single-step and read out every FM.

The default build is the six-FM machine (`NUM_FM = 6`), with every memory 2k
words deep.

## Top-level structure

```
 radar timing ──raster_start──► adc_sample_control ──adc_convert / restart──┐
                                                                            ▼
 ADC samples adc_data[i][0..1] ───────────────────────────► functional_module[i]  (i = 0..NUM_FM-1)
                                                                 ▲      │
 host ──cmd/rsp──► master_control ── FM bus, start, selects, ce ─┘      │
                        ▲                                               │
                        └──────────── h_rdata, busy, ovf ◄──────────────┘
```

| file | role |
|---|---|
| `rtl/rsc_pkg.sv` | shared types: configuration register, control tags, host targets, commands, pipeline timing |
| `rtl/rsc_top.sv` | the machine: Master Control, ADC sample control, `NUM_FM` FMs |
| `rtl/functional_module.sv` | one FM: sequencing, operand former, adder stage, forwarding, host access |
| `rtl/address_generator.sv` | Base/Displacement operand memories, their counters and the two address adders |
| `rtl/input_buffer_pair.sv` | one double-buffered pair of 2k x 16 Data Input Buffers, with the ADC counter |
| `rtl/pipelined_multiplier.sv` | 16 x 16 signed multiplier in two pipeline stages |
| `rtl/segmented_adder.sv` | 64-bit adder/subtractor with lane splits and per-lane overflow |
| `rtl/output_memory.sv` | double-buffered 2k x 64 output memory |
| `rtl/sram_1r1w.sv` | generic synchronous memory, used for every array |
| `rtl/master_control.sv` | host command decoder, with integer-to-float read-out |
| `rtl/int_to_float.sv` | signed 64-bit integer to IEEE single |
| `rtl/adc_sample_control.sv` | one raster of convert strobes after a raster start |

The ADC converters, the radar timing controller and the host are outside the
RTL. Their signals are ports of `rsc_top`.

## The Functional Module pipeline

Each FM takes one *term* every 5 master-clock cycles. A term is one sample
pair, or one sample, that contributes to one output word. Each term passes
through these stages:

```
address counters → operand memories → address adders → Data Input Buffers
   → multiplier (2 stages, skipped when by-passed) → output memory read
   → adder/subtractor → output memory write
```

With the multiplier the pipe has 9 stages, and a term takes 23 cycles from
issue to its output write. By-passed it has 7 stages and takes 18 cycles.
These three numbers (5, 23, 18) are the published ones. The cycle at which
each stage loads inside the latency is this design's own:

| stage | loads at cycle (multiplier / by-pass) |
|---|---|
| issue: counters latched as operand addresses | 0 |
| operand memories read | 2 |
| Base/Displacement counters updated | 3 |
| address adders (left, right) | 5 |
| Data Input Buffers read | 7 |
| multiplier partial products / sum | 10 / 13 (multiplier only) |
| output word read, operand latched | 15 / 10 |
| adder/subtractor, overflow flags | 18 / 13 |
| output word written | 22 / 17 (the write is in cycle 23 / 18 after issue) |

The stages are not separate clocked units. A shift register `sr` holds one
bit per cycle since each issue, and every stage register loads when its bit
reaches it. A stage never takes more than 5 cycles, so a register is always
read by the next stage before the next term overwrites it. Neither the data
path nor the control needs stall logic.

**Control tag.** The upper 5 bits of each operand word travel with the term
as a tag, and each stage uses the bits that concern it. This is how the
program controls the arithmetic without a separate instruction stream.

**Read-modify-write hazard.** The output word is read 7 cycles before it is
written back, but the next term arrives after only 5. When two consecutive
terms update the same word, as in pulse decoding, the second term would read
a stale value. The adder stage detects this by comparing addresses against
the write register, and takes the previous result directly instead. Only the
immediately preceding term can collide, so one forwarding path is enough.

**Clock enable.** `ce` gates the whole processing pipe: shift register,
counters and stage registers. Holding it low freezes the pipe, and pulsing it
advances one master-clock cycle. This gives single stepping for probing the
pipe. ADC input and host access are not gated.

## The address program

Every FM has three 2k x 16 operand memories:

* **Base** (one word per range gate)
* **First Displacement** and **Second Displacement** (one word per term,
  read at a common address)

For each term:

```
left  address = base[10:0] + disp1[10:0]   (mod 2048)
right address = base[10:0] + disp2[10:0]   (mod 2048)
```

The Base counter indexes ranges and the Displacement counter indexes terms.
The low 11 bits address the Data Input Buffers, as published. The meaning of
the 5 upper bits is this design's encoding:

| bit | word | name | effect |
|---|---|---|---|
| 11 | disp1 | `end_terms` | last term of this range: Base counter steps; Displacement counter restarts at 0 |
| 12 | disp1 | `out_next` | advance the output address counter after this term |
| 13 | disp1 | `sub` | subtract the operand instead of adding it |
| 14 | disp1 | `replace` | on a pass started with `clear`, write the operand instead of accumulating |
| 11 | base | `last_range` | with `end_terms`: end of the program |
| 12 | base | `hold_disp` | at the end of this range the Displacement counter continues instead of restarting |
| 15 / 15:13 / 15:11 | disp1 / base / disp2 | — | reserved, carried in the tag |

The output address starts at 0 on every pass and advances only on `out_next`.
Two examples of programs:

* **Lag products** (R ranges, L lags). Base word `r` is the first sample of
  range `r`; term `l` has `disp1 = 0` and `disp2 = l`. Every term has
  `out_next` and `replace`, so `out[r*L + l] += x[b_r] * y[b_r + l]`.
* **Pulse decoding** (code c0..cK-1). Term `k` has `disp1 = k` and `sub` where
  `c_k = -1`. Term 0 has `replace`, and the last term has `out_next`. So
  `out[r] += Σ ±x[b_r + k]`. Consecutive terms hit the same word, which is
  where forwarding is needed.

Because the program is just memory contents, a term list can be shared by
all ranges (restart at 0) or be different per range (`hold_disp`).

## Word splits, the multiplier and overflow

The configuration register of each FM (host target `T_CFG`) has two fields:
bits 1:0 select the word split and bit 2 by-passes the multiplier. The
operand handed to the adder depends on the split:

| split | operand | multiplier |
|---|---|---|
| `W64` | product, or the left sample when by-passed, sign-extended to 64 bits | optional |
| `W48` | same, in bits 47:0; bits 63:48 stay zero | optional |
| `W32X2` | left sample → lane 0, right sample → lane 1 (for example, I and Q sums) | always by-passed |
| `W16X4` | left, right, other-bank left, other-bank right | always by-passed |

The adder is four 16-bit chunks with carry cut at the lane boundaries. In
subtraction, each lane gets its own carry-in. A signed overflow in a lane
sets a sticky flag: `ovf[3]` for W64, `ovf[2]` for W48, `ovf[1]` and `ovf[3]`
for W32X2, and all four for W16X4. The flags clear when a pass starts with
`clear`.

`W16X4` reads both banks of both buffer pairs, so it is the one mode that is
not double buffered. Do not sample into an FM in this mode while it runs.
The published description says the buffers are double buffered "for most"
configurations. Which configuration is the exception is this design's
reading.

## Double buffering and a typical cycle of operation

Each side (left, right) has a pair of Data Input Buffers. The select line
`in_sel` gives one bank of each pair to the pipeline, which reads it at
program addresses. The ADC writes the other bank at sequential addresses,
from a counter that `adc_sample_control` resets at the start of each raster.
Output memory works the same way: `out_sel` gives one 2k x 64 bank to the
accumulator, and the host reads or loads the other.

A typical cycle of operation, all through Master Control commands:

1. `OP_ADC_CFG` (samples per raster, master cycles per sample). Then per FM:
   `OP_WRITE` to `T_CFG`, `T_BASE`, `T_DISP1` and `T_DISP2`.
2. Raster 1 is sampled into the free input banks.
3. `OP_SWAP_IN`, then `OP_START` with `clear` (addr[0] = 1) while raster 2 is
   being sampled.
4. Then `OP_SWAP_IN` and `OP_START` without `clear`, for each further raster.
5. `OP_SWAP_OUT` hands the finished sums to the host. The host reads them
   with `OP_READ` (raw) or `OP_READF` (as IEEE single, per lane).

Other commands: `OP_STATUS` returns `{busy, ovf[3:0]}` for each FM.
`OP_STEP_MODE` and `OP_STEP` single-step the pipe. Every memory can be
loaded and read back through `OP_WRITE` and `OP_READ`, for testing or to use
the machine as an off-line integer array processor. The full encoding is in
`rsc_pkg.sv` and at the head of `master_control.sv`. Host access to an FM is
meant for when it is idle, and `OP_START` skips FMs that are still busy.

## Capacity and rate

One FM completes one multiply-replace-add every 5 master cycles, so six FMs
give 6/5 of the clock rate. The six-FM machine is rated at 30 MHz, which
means a 25 MHz master clock. A ten-FM machine with faster memories (50 MHz)
would reach 100 MHz; set `NUM_FM = 10`.

Against typical experiment sizes:

* Each raster can hold up to 2048 heights.
* Each FM holds 2048 output words, 12288 in total.
* This covers MST work up to about 30 MHz of accumulations, E-region lag
  profiles (600 heights x 20 lags) and the protonosphere case (60 lags).
* F-region experiments with 1000 heights x 100 lags need more output memory
  than this.
* So do MST rates above 30 MHz, and the 200 MHz unbuffered protonosphere
  case.

`tb_rsc_workloads` runs four such experiments on the six-FM machine, each
integrated over two rasters, and checks every result word. The passes ran
at exactly 5 cycles per term plus the pipeline latency:

| experiment | split | terms per FM per pass | cycles per pass | words checked |
|---|---|---|---|---|
| MST: Barker-13 decoding of I and Q, 1000 heights, one channel per FM | W32X2, by-pass | 13000 | 65026 | 6000 |
| E region: 100 heights x 20 lags per FM | W64, multiplier | 2000 | 10025 | 12000 |
| protonosphere: 20 heights x 60 lags | W48, multiplier | 1200 | 6026 | 7200 |
| F region: 1002 heights x 12 lags of one channel, split over six FMs | W64, multiplier | 2004 | 10045 | 12024 |

## Departures from the published design, and what is not here

Following the published design:

* FM count
* memory depths and widths
* 5/23/18-cycle timing
* 9/7 stages
* Base + Displacement nested-loop addressing with 11 address bits and 5
  control bits
* left/right displacements for lag products
* double-buffered inputs and outputs, and sequential ADC addressing
* the 64/48/2x32/4x16 splits with overflow flags
* the multiplier by-pass
* host test access to every memory
* single stepping
* integer-to-float read-out

This design's own choices, where the published material gives no detail:

* the encoding of the 5 control bits, and the `replace`/`sub`/`out_next`
  semantics
* the output address counter
* which samples feed which lanes
* forwarding between consecutive terms
* the stage timing inside the latency
* the configuration register layout
* the Master Control command set (the original is a Z80 board, replaced here
  by a fixed decoder)
* IEEE single as the float format, with truncation
* the ADC sample-control registers
* active-low asynchronous reset of control state (memories are not reset)

Not built:

* the analog converters and the radar timing controller
* the host and its interfaces
* the Z80 and its firmware
* the PAL equations
* the clock generator
* the option of using the four 32-bit output memories separately rather than
  as two 64-bit banks
* chaining two machines

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_rsc_top` runs the whole six-FM machine at default size. Each FM has a
  different program and word split. It samples two rasters through the ADC
  path, one while the FMs process the previous one. It accumulates,
  single-steps, reads results raw and as floats, and checks every word and
  overflow flag against a term-by-term model. It also counts that each
  mechanism (swap, overlap, multiplier, by-pass, forwarding, each split,
  overflow, single step, float read-out) actually occurred.
* `tb_rsc_workloads` runs the four experiment-sized workloads listed under
  "Capacity and rate".
* `tb_functional_module` checks lag products, pulse decoding, both split
  modes, overflow and a randomly gated clock enable. It also checks the
  5-cycle issue interval and the 23/18-cycle latency of every term.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_rsc_top rtl/rsc_pkg.sv tb/tb_rsc_top.sv
./obj_dir/Vtb_rsc_top
```

Replace the top module and file to run any other testbench, for example
`tb_functional_module`. The testbenches read no files.

The simulator assumed here has only two signal states, with random initial
values. That is why the testbenches give the asynchronous reset an explicit
falling edge. It is also why no logic relies on a memory being cleared: a
pass started with `clear` and `replace`-tagged terms initialise every output
word the program uses.
