# Mesochronous pipelined 8×8 multiplier

In an ordinary pipeline the clock period must cover the slowest stage's
full delay plus the register's clock-to-output, setup time and clock
uncertainty:

    Tclk >= Dmax + DR + ts + dclk

When stages are cut very thin, DR and ts become most of the period.
A **mesochronous pipeline** takes a different approach. Every register stage
receives the *same* clock, delayed on its way through a delay element that
matches the data delay of the logic stage before that register. The
clock travels alongside the data. The next register therefore samples each
wave when it arrives, however long the stage is, and a stage may hold
several data waves at once. The period is no longer bounded by a stage's
delay. It is bounded by the *spread* of that delay, meaning the difference
between the stage's slowest and fastest paths:

    Tclk >= dmax(j) - dmin(j) + ts + th + 2*dclk

Put the other way round, at a given period each stage may enclose as much
logic as it likes, as long as

    dmax - dmin <= Tclk - (ts + th + 2*dclk)

This repository implements that scheme for an 8×8-bit unsigned
multiplier. The numbers are those of a 180 nm implementation:

| quantity | value |
|---|---|
| full adder delay, min / max | 210 ps / 280 ps |
| full adder: fastest input rate | one every 175 ps |
| flip-flop setup / hold / clock-to-output | 10 / 130 / 295 ps |
| flip-flop minimum clock high time | 160 ps (so at least 320 ps period) |
| target clock period | 350 ps (2.86 GHz) |
| allowed spread per stage at 350 ps | 350 − (10 + 130 + 20) = 190 ps |
| conventional pipeline, one adder layer per stage | 280 + 295 + 10 + 10 = 595 ps |

The flip-flop, not the logic, limits the clock. The register placement
then follows from the 190 ps budget, and the result is four logic stages
and five register stages instead of 16 and 17.

## The arithmetic array

The multiplier is a carry-save array, 16 adder layers deep, with no carry
moving sideways inside any layer. Every layer therefore costs exactly one
adder delay. This keeps the delay spread of every stage small.

**Carry-save layers 0–7** (`csa_layer`). Layer *l* forms partial product
*l* with a row of AND gates, `x & y[l]` shifted left by *l*. A row of full
adders adds that row to the running (sum, carry) pair. At each bit
position *j*, the adder takes the sum bit, the partial-product bit and the
carry bit, and returns a new sum bit at *j* and a carry at *j+1*. After
layer 7, `sum + carry` equals `x*y`.

**Half-adder merge layers 8–15** (`ha_merge_layer`). A normal array
finishes with a carry-propagate adder. That adder would have the longest
delay and the largest spread of the whole array. Here the adder is
replaced by eight layers of half adders. Each layer computes
`s' = s ^ c` and `c' = (s & c) << 1`, so it moves every pending carry up
by one position. An exhaustive check over all 65,536 operand pairs shows
that eight layers always leave the carry vector at zero (66 pairs need all
eight). The sum vector is then the product. This adds latency and keeps
the throughput.

**MSB OR gates.** The product always fits in 16 bits, so the adder at the
top position (bit 15) can never produce a carry. At most one of its inputs
is 1, and the adder reduces to an OR gate. Both layer types use an OR there.

**The adder cell** (`full_adder`) is written in the multiplexer form of
the pass-gate cell. First `p = a ^ b`. Then `sum = p ? ~cin : cin` and
`cout = p ? cin : b`. The half adder is the same cell with the carry-in
tied to 0. In silicon the cells are differential (dual-rail), and `cin` and
`b` are delayed by inverter pairs so they arrive together with `p`. Those
are electrical measures with no logic function, and the RTL is single-rail.

## Stages, registers and clocks

| register stage | clock | holds | logic stage after it |
|---|---|---|---|
| 1 | `clk_reg[0]` = clock in | x, y | stage 1: layers 0–3 (partial products 0–3) |
| 2 | `clk_reg[1]` | x, y, sum, carry | stage 2: layers 4–7 (partial products 4–7) |
| 3 | `clk_reg[2]` | sum, carry | stage 3: merge layers 8–11 |
| 4 | `clk_reg[3]` | sum, carry | stage 4: merge layers 12–15 |
| 5 | `clk_reg[4]` = clock out | product m[15:0] | — |

As written the registers hold 16 + 48 + 32 + 32 + 16 = 144 bits.
Synthesis removes the bits that are always 0, such as carry bit 0 and high
bits that no partial product has reached yet, which leaves 108 flip-flops.

Each logic stage is `mpp_wave_stage`, a parameterised group of
consecutive layers. The operands travel alongside the array as long as a
later stage still forms partial products. The grouping of four layers per
stage is this design's choice. Four stages over 16 layers is the count
given for the original. Four layers of 210–280 ps at a 350 ps period also
matches its report of four data waves in the first stage.

`mpp_multiplier` has one clock input per register stage. `mpp_top` adds
the clock path: `clk_in` drives register stage 1 and then passes four
`mpp_clock_delay` elements, one per logic stage. The last one drives the
output register and leaves as `clk_out`. There is no clock tree.

**Timing contract of `mpp_top`.** Operands sampled on the *n*-th rising
edge of `clk_in` give `m = x*y` right after the *n*-th rising edge of
`clk_out`. A new operand pair can be given every clock period. Nothing has
a reset. The pipeline is a pure datapath. Because each register stage
catches the wave of its own edge, `m` is valid from the first rising edge
of `clk_out` that follows the first rising edge of `clk_in`. In simulation
the delay line starts at unknown levels, so let it settle for longer than
its total delay before the clock starts. With one common clock instead,
the first four results are left over from before the clock started.

### How to read the clock delays in a zero-delay simulation

In silicon each delay element matches the data delay of its stage. For the
first stage, with clock-to-output included, that delay is about four clock
periods. The RTL logic has no delay, though. For register stage *k+1* to
catch, on edge *n*, the wave that register stage *k* launched on edge *n*,
each delay in a zero-delay simulation must lie strictly between 0 and one
clock period. `mpp_top`'s default `CLK_DELAY_PS = 100` follows that rule. It
is a simulation value, not a circuit value. If all five clock bits of
`mpp_multiplier` are tied together, the same RTL is an ordinary pipeline
with a latency of four cycles. `tb_mpp_multiplier` checks both clockings.

### Timed model

To see the mesochronous behaviour itself, `tb/tb_mpp_wave_timing.sv` builds
a timed copy of the pipeline from the same RTL blocks. Each logic stage is
followed by `tb_bus_delay`, which gives every bit its own path delay
between a minimum and a maximum, with clock-to-output included. Every
register input is watched by `tb_timing_window`, which counts setup
(10 ps) and hold (130 ps) violations. The clock delays are realistic
(1400 ps per stage) and the clock period is 350 ps. Two configurations are
simulated:

* Path delays of 1195–1375 ps, a 180 ps spread that is inside the 190 ps
  budget. All products are correct, no setup or hold window is violated,
  and the first stage holds four data waves at once.
* A 300 ps spread, which is outside the budget. The hold monitors fire.

The path delays (about 900–1080 ps of logic per four-layer stage) are
assumed values. The original design reports only that each stage's spread
stays below 190 ps. Four layers of 210–280 ps would spread by up to 280 ps
if the worst cases added up, and they need not.

## Files

| file | what it is |
|---|---|
| `rtl/mpp_pkg.sv` | widths, stage count, cell and flip-flop timing, the two clock-period formulas |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | adder cells |
| `rtl/csa_layer.sv`, `rtl/ha_merge_layer.sv` | one carry-save layer, one merge layer |
| `rtl/mpp_wave_stage.sv` | a logic stage: consecutive layers |
| `rtl/mpp_register.sv` | a register stage (positive-edge D flip-flops) |
| `rtl/mpp_multiplier.sv` | the array, registers, one clock per register stage |
| `rtl/mpp_clock_delay.sv` | clock delay element, **behavioural model** (buffer chain with `#` delays) |
| `rtl/mpp_top.sv` | multiplier plus clock delay line (top) |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_mpp_wave_timing.sv` + `tb_timed_pipeline`, `tb_bus_delay`, `tb_timing_window` | timed simulation described above |

Everything in `rtl/` except `mpp_clock_delay` is synthesizable. Synthesis
of `mpp_top` treats the delay elements as wires, which is what a single
clock net would be.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends on its
own. A watchdog stops it if it hangs. For example:

    verilator --binary --timing -Irtl -Itb rtl/mpp_pkg.sv tb/tb_mpp_top.sv \
              --top-module tb_mpp_top -o sim
    ./obj_dir/sim

Replace `tb_mpp_top` with any other testbench name. `tb_mpp_top` runs the
top at its default parameters: all 65,536 operand pairs back to back at
350 ps. Besides the products, it checks that `clk_out` lags `clk_in` by
the four delays, and it counts the products that needed all eight merge
layers and the products with bit 15 set. `tb_mpp_wave_stage` and
`tb_mpp_multiplier` also run every operand pair. The timed testbench takes
a few minutes to build and about a minute to run.

Parameters worth changing: `N` (operand width; the array generalises to
`N` carry-save plus `N` merge layers) and `NUM_STAGES` (must divide
`2N`). These are on `mpp_multiplier` and `mpp_top`. Also `CLK_DELAY_PS`
on `mpp_top`.

## Verification

* `full_adder`, `half_adder`: all input combinations, and all 56 ordered
  transitions between different input combinations of the full adder.
* `csa_layer`, `ha_merge_layer`: random carry-save pairs. The
  arithmetic value must be kept (`s_out + c_out` equals the inputs plus
  the partial product), and the merge layer is also checked bit by bit.
* `mpp_wave_stage`: the four stages chained, all 65,536 operand pairs,
  with the value checked after each stage and a zero carry at the end.
* `mpp_multiplier`: all pairs under one common clock (four-cycle latency)
  and under skewed clocks (same-edge result).
* `mpp_top`: all pairs at the default parameters, with edge-for-edge
  latency and the `clk_out` lag.
* `tb_mpp_wave_timing`: the timed behaviour described above.

For every module, a deliberately broken copy (a swapped multiplexer input,
a missing carry shift, a wrong clock edge, a mis-wired clock chain) was
confirmed to make its testbench fail.

## Departures and limits

* The exact register positions and bit counts in the original schematic
  could not be read. Four layers per stage, and where the operands stop
  being carried, are this design's choices. The arithmetic does not
  depend on them.
* The role of the OR gates (MSB adders with a provably zero carry) is an
  interpretation. It is exact for all products.
* Differential signalling, the sense-amplifier flip-flop circuit and
  transistor sizing are not modelled. Their timing appears only as
  constants and in the timed testbench.
* The clock delay elements carry no values from the original. They are
  parameters.
* The conventional 16-stage super-pipeline used for comparison is not
  built. Only its 595 ps period is computed.
