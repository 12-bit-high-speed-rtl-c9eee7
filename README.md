# 12-bit pipelined direct digital frequency synthesizer

A direct digital frequency synthesizer (DDFS) makes a sine wave from a fixed
clock. Each clock, a phase accumulator adds a frequency control word (FCW) to
a running phase. The upper phase bits address a sine table, and the table
words feed a DAC and a low-pass filter. The output frequency is

    f_out = FCW / 2^N * f_clk        (N = 12 here)

so FCW = 1 gives the finest step, f_clk / 4096, and FCW = 100 gives one sine
period every 40.96 clocks.

The accumulator is the speed-critical part: a plain 12-bit accumulator must
finish a 12-bit carry chain in every clock. This design cuts the adder into
three 4-bit slices. Each slice has its own carry-lookahead adder and
accumulator register. A carry leaving a slice is stored in a flip-flop and
enters the next slice one clock later. The longest combinational path is then
one 4-bit carry-lookahead add, whatever the total width. The price is
latency (three clocks) and a set of skew and deskew registers that keep the
slices consistent.

This repository holds synthesizable SystemVerilog for the digital part: the
pipelined phase accumulator and the sine table. The DAC and the analog filter
are not included; the table output is a port for an external DAC.

## Signal chain

```
fcw[11:0] ──► phase_acc ──phase[7:0]──► sine_lut ──lut_out[7:0]──► (external DAC ► LPF ► f_out)
c_in ──────►    (3 x 4-bit CLA slices)      (256 x 8 ROM, registered)
                 └──► c_out (phase is about to wrap)
```

All registers share one clock. The accumulator's output is bits [11:4] of
the phase. The least significant slice is used only internally, and its
carries still reach the upper slices. The table has 256 entries of 8 bits.

## The pipelined phase accumulator (`rtl/phase_acc.sv`)

### Structure

For slice `i` (0 = bits [3:0], 1 = bits [7:4], 2 = bits [11:8]):

| slice | FCW bits | input skew registers | carry in from | output deskew registers | output bits |
|-------|----------|----------------------|---------------|-------------------------|-------------|
| 0 | [3:0]  | 1 | `c_in` port | none (not output) | none |
| 1 | [7:4]  | 2 | carry flip-flop of slice 0 | 1 | `q[3:0]` = phase bits [7:4] |
| 2 | [11:8] | 3 | carry flip-flop of slice 1 | 0 | `q[7:4]` = phase bits [11:8] |

Each slice computes `acc_i <= acc_i + fcw_slice_i(delayed) + carry_in_i`. Its
4-bit carry-lookahead adder produces a sum and a carry out. The sum goes back
into `acc_i`. For the two lower slices the carry out goes into a one-bit
register that feeds the next slice.

### Why the skew and deskew registers are needed

A carry made by slice 0 on a given clock reaches slice 1 one clock later, and
slice 2 one clock after that. Slice `i` therefore performs a given
accumulation step `i` clocks after slice 0 does.

- **Input skew.** For slice `i` to add the right FCW bits at that step, its
  FCW slice is delayed by `i` extra registers. That gives 1, 2 and 3
  registers, counting the one register every slice has at its input. Without
  this skew, a change of FCW would reach the upper slices too early. The
  final phase would then never reach the value a plain accumulator would
  have.
- **Output deskew.** Slice 2 shows step `k` when slice 1 already shows step
  `k+1`. One extra register on slice 1's output lines them up. The lowest
  slice would need two, but it is not brought out.

With a constant FCW the skew only adds latency. With a changing FCW it keeps
the phase sequence equal to that of an ideal accumulator.

### Timing

Let `P(e)` be an ideal single-cycle accumulator cleared by reset, with
`P(e) = P(e-1) + fcw(e)`, where `fcw(e)` is the word sampled at rising edge
`e`. Then, after edge `e`:

    q(e)   = P(e-3)[11:4]                  (three clocks of latency)
    c_out  = 1  when the next step wraps the phase through 2^12

`c_in` sampled at edge `e` is added in the same step as `fcw(e-1)`.
`c_in` enters the lowest slice directly, without the input register the FCW
bits pass through. Tie it to 0 for a plain accumulator. `c_out` is the
combinational carry out of the top slice's adder, not a register output.

Example with `fcw = 100` (0x064) from reset, values after each edge:

| edge | acc0 | acc1 | acc2 | q (decimal) | P(e-3) |
|------|------|------|------|-------------|--------|
| 1 | 0 | 0 | 0 | 0  | 0   |
| 2 | 4 | 0 | 0 | 0  | 0   |
| 3 | 8 | 6 | 0 | 0  | 0   |
| 4 | C | C | 0 | 6  | 100 |
| 5 | 0 | 2 | 0 | 12 | 200 |
| 6 | 4 | 9 | 1 | 18 | 300 |
| 7 | 8 | F | 1 | 25 | 400 |

At edge 5, slice 0 wraps (C + 4 = 0x10). Its carry is added into slice 1 at
edge 6, which then shows 9 rather than 8.

### Register count

The input skew uses 1 + 2 + 3 = 6 four-bit registers. The slices have 3
accumulator registers, slice 1 has 1 deskew register, and there are 2 carry
flip-flops. That makes 24 + 12 + 4 + 2 = **42 flip-flops**. With 6-bit slices
(an 18-bit accumulator) the same structure has 62. Synthesis of the RTL gives
these counts for both configurations.

## The carry-lookahead slice (`rtl/cla_adder.sv`)

Per bit, generate `g = a & b` and propagate `p = a ^ b`. Each carry is
written out in full as a sum of products:

    c1 = g0 | p0·cin
    c2 = g1 | p1·g0 | p1·p0·cin
    c3 = g2 | p2·g1 | p2·p1·g0 | p2·p1·p0·cin
    c4 = g3 | p3·g2 | p3·p2·g1 | p3·p2·p1·g0 | p3·p2·p1·p0·cin

and `sum = p ^ c`. Each carry is one AND level and one OR level after the
`p`/`g` gates, with no chain through lower carries. The loop in the RTL
produces these terms for any width `W`. A synthesis tool may restructure
them, so the lookahead form is what the RTL states, not a guaranteed
netlist.

## The sine table (`rtl/sine_lut.sv`)

A 2^AW x DW ROM (256 x 8 by default) of one sine period in offset binary:

    amp(i) = floor(127.5 + 127.5 * sin(2*pi*i/256) + 0.5)

It reads 128 at phase 0 and 128, 255 at 64 and 0 at 192. The table is
computed while the design is elaborated from the formula above, scaled to
`AW` and `DW`, so there is no data file to keep in step. The output is
registered: `lut_out` after edge `e` is the sample of `phase` before that
edge. The register has no reset.

## Top level (`rtl/ddfs_top.sv`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | sample clock f_clk |
| `reset` | in | 1 | asynchronous, active high; clears every accumulator register |
| `fcw` | in | 12 | frequency control word |
| `c_in` | in | 1 | carry into the lowest slice (normally 0) |
| `phase` | out | 8 | accumulator bits [11:4] |
| `c_out` | out | 1 | high in the clock before `phase` wraps through zero |
| `lut_out` | out | 8 | offset-binary sine sample for the DAC |

`lut_out` follows `fcw` by four clocks: three in the accumulator and one in
the table. One sample is produced every clock.

Parameters: `STAGE_W` (bits per slice, 4), `STAGES` (slices, 3) and `LUT_DW`
(amplitude width, 8). The table address width is `STAGE_W*(STAGES-1)`.
`STAGE_W = 6` gives the 18-bit, 3-slice variant, with a 12-bit phase and a
4096-entry table. The shared defaults live in `rtl/ddfs_pkg.sv`.

## What is taken from the design and what is chosen here

Taken from the published design:
- the three 4-bit carry-lookahead slices and the lookahead equations
- the 1/2/3 input skew registers, the one deskew register and the carry
  flip-flops between slices
- the 12-bit FCW, the 8-bit phase output [11:4], `c_in` and `c_out`, and the
  42-register total
- a clocked sine table with 8-bit address and 8-bit output
- the 18-bit (6-bit slice) variant

Choices of this implementation:
- Reset is asynchronous, active high, and clears to zero.
- `c_in` is a port, not tied to ground.
- The table is a full-period sine in offset binary, rounded to nearest. Its
  output register has no reset.
- The slice count is a parameter.

Not included:
- The DAC and the analog low-pass filter.
- The ripple-carry accumulator, which serves only as a baseline in the
  published comparison.

The published comparison, on an FPGA, reports about 10.5 % (12 bits) and
13 % (18 bits) higher maximum clock frequency for this accumulator than for
the same pipeline built with ripple-carry slices. That claim is not checked
here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

- `cla_adder_tb`: all 512 input combinations of the 4-bit adder, plus random
  6-bit operands.
- `pipe_reg_tb`: load, hold between edges, and asynchronous reset.
- `phase_acc_tb`: 12-bit and 18-bit instances against an ideal accumulator
  model, checked every clock. It covers the three-clock latency, `c_out` and
  reset in mid-run. Stimulus: a constant word, random words every clock,
  random `c_in` and a full-scale word.
- `sine_lut_tb`: every entry against the formula, the quadrant points, the
  half-period symmetry and the one-clock read latency.
- `ddfs_top_tb`: the whole core at default parameters, checked every clock
  (phase, `c_out`, `lut_out`). With `fcw = 100` it counts exactly 100 output
  periods in 4096 clocks, and with `fcw = 1000` it counts 1000, as the
  frequency formula predicts. It then applies random words, random carry-in
  and a reset. It also counts carries passed from slice 0 and from slice 1,
  wraps, word changes, carry-ins and resets, and fails if any of these never
  happens.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module ddfs_top_tb \
    -y rtl -y tb +libext+.sv rtl/ddfs_pkg.sv tb/ddfs_top_tb.sv
./obj_dir/Vddfs_top_tb
```

Replace `ddfs_top_tb` with any other testbench name. Each one runs in well
under a second.

## Files

- `rtl/ddfs_pkg.sv`: shared widths and the f_out formula
- `rtl/pipe_reg.sv`: register with asynchronous reset (the 4-bit registers and
  the carry flip-flops)
- `rtl/cla_adder.sv`: carry-lookahead adder slice
- `rtl/phase_acc.sv`: pipelined phase accumulator
- `rtl/sine_lut.sv`: sine ROM
- `rtl/ddfs_top.sv`: accumulator plus table
- `tb/*_tb.sv`: the testbenches listed above
