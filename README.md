# A one-LUT-deep ASM controller

On a LUT-based FPGA, the clock rate of a state machine is set mostly by its
slowest next-state function. A 4-input LUT can compute any function of four
variables in one LUT delay. A transition whose condition needs more inputs
than that becomes a tree of LUTs, with more delay.

This controller runs an eight-input, eight-output ASM chart (Algorithmic
State Machine flowchart) as a one-hot Moore machine. Its transition
functions are kept one LUT deep by **adding states**. With one-hot coding, a
transition from state `a_m` uses one LUT input for the state bit `a_m`. That
leaves `n-1 = 3` inputs for its condition. Where a path through the chart
tests more than three inputs before it reaches the next state, an extra state
is placed partway along it. The path is then split into two transitions,
each with at most three condition inputs. The extra state repeats the
outputs of the state the path started from. The outputs therefore stay the
same; they are simply held for one more clock. So the machine trades one
extra clock on a few long paths for a shorter critical path, and so a higher
clock frequency, on every clock.

## The chart

States are `a1..a9`. `a1` is both the start and the stop state. Inputs are
`x1..x8` and outputs `y1..y8`. The table gives each state's Moore outputs and
its decision tree:

| state | outputs | successor |
|---|---|---|
| a1  | —      | x1=0 → a2; x1=1 → a6 |
| a2  | y1 y2  | → a3 |
| a3  | y2 y3  | x6=0 → a4; x6=1,x7=1 → a5; x6=1,x7=0 → *block X4* |
| a4  | y3 y4  | → a1 |
| a5  | y4 y5  | → a1 |
| a6  | y5 y6  | x2=0 → a7; x2=1,x3=0 → a3; x2=1,x3=1 → *block X4* |
| a7  | y6 y7  | → *block X4* |
| a8  | y7 y8  | → a1 |
| a9  | y1 y8  | → a1 |

*Block X4* is a decision subtree that three states share. It sends the
machine to a8 if x4=1 and x5=1, and to a9 if x4=1 and x5=0. It sends the
machine to a9 if x4=0 and x8=1, and to a7 if x4=0 and x8=0.

### Where the extra states go

Without changes, the four paths from a3 into block X4 each test four inputs:
x6, x7, x4, and then x5 or x8. The four paths from a6 into the block also
test four: x2, x3, x4, and then x5 or x8. With `n = 4`, none of these eight
transitions fits one LUT.

Both groups of paths meet at the entry of x4, so that is where the extra
states go. There are two of them, because the paths come from two states
with different outputs:

| extra state | reached from | outputs (copied) |
|---|---|---|
| a10 | a3 via x6=1, x7=0 | y2 y3 (= a3) |
| a11 | a6 via x2=1, x3=1 | y5 y6 (= a6) |

Both leave through block X4 exactly as a7 does. The path from a7 into block
X4 is not rerouted, because it already tests only x4, x5 and x8.

The result is 22 transitions, listed in `asm_pkg::TRANS`. Each depends on at
most three inputs. `tb_asm_transition_logic` measures this on the RTL by
flipping each input and seeing which next-state bits react.

### Cost in clocks

A full operation runs from a1 back to a1. Operations through a10 or a11
take one clock more than in the original chart:

| path | clocks |
|---|---|
| a1 a2 a3 a4 a1 | 4 |
| a1 a2 a3 a5 a1 | 4 |
| a1 a2 a3 **a10** a8 a1 | 5 (4 in the original chart) |
| a1 a6 **a11** a8/a9 a1 | 4 (3 in the original chart) |
| a1 a6 a7 a8 a1 | 4 |

## Structure

```
             +---------------------------+
 x[8:1] ---->| asm_transition_logic      |
             |  22 x lut_n (N=4)         |--next_state--+
        +--->|  OR per target state      |              |
        |    +---------------------------+              v
        |                                        +-------------+
        +-----------------state------------------| state reg   |<- clk, rst_n
        |                                        | one-hot, 11 |
        |    +---------------------------+       +-------------+
        +--->| asm_output_logic          |--> y[8:1]
             +---------------------------+
```

| file | contents |
|---|---|
| `rtl/asm_pkg.sv` | state enum `a1..a11` (bit `k-1` of the one-hot vector is `a_k`), output sets `y_of`, the transition list `TRANS`, and functions that derive the OR masks |
| `rtl/lut_n.sv` | `N`-input LUT: `out = INIT[in]` |
| `rtl/asm_transition_logic.sv` | one `lut_n` per transition, then an OR per target state |
| `rtl/asm_output_logic.sv` | `y_k` = OR of the state bits whose output set holds `y_k` |
| `rtl/asm_controller.sv` | top: state register plus the two logic blocks |

### How a transition becomes a LUT

Each entry of `TRANS` gives a source state, a target state, up to three input
numbers `v2 v1 v0`, and an 8-bit truth table `tt`. `tt[{c2,c1,c0}]` is the
condition for `c2 = x[v2]`, `c1 = x[v1]` and `c0 = x[v0]`. Input number 0
means "unused" and reads a constant 0.

The LUT for the transition is addressed by `{state[src], x[v2], x[v1], x[v0]}`.
Its contents are `{tt, 8'h00}`: the lower half is zero, so the LUT can fire
only while its source state is active.

For example, the two paths from a7, a10 or a11 into a9 (`x4 & ~x5` and
`~x4 & x8`) are a single transition over (x4, x5, x8). Its table is
`8'h3A`.

To run a different chart, refill `TRANS` and `y_of`, and set `NUM_STATES`,
`NUM_TRANS`, `NUM_X` and `NUM_Y`. Nothing else depends on the chart. Choosing
where extra states go (a short search over the chains of decision vertices
that break the three-input limit) is a design-time step. It is not part of
this RTL.

### What is not one LUT deep

The method bounds each *transition* function. This RTL then ORs all the
transitions that end in the same state. That OR is a second level: a1 and a7
each collect four transitions, and a8 and a9 collect three. A synthesis tool
will usually merge it into the LUTs. Still, the single-level property holds
per transition, not per next-state bit. Each output `y_k` is the OR of at
most three state bits, which is one LUT.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`   | in  | 1  | rising-edge clock |
| `rst_n` | in  | 1  | asynchronous, active-low reset to a1 |
| `x`     | in  | 8  | `x[k]` = input x_k, sampled at the rising edge |
| `y`     | out | 8  | `y[k]` = output y_k, a function of the state only (Moore) |
| `state` | out | 11 | one-hot state, bit `k-1` = a_k |

a1 has no wait condition. On the first clock after reset the machine tests
x1 and moves on, and each time it returns to a1 a new operation starts. To
hold the machine idle, keep it in reset. Two concurrent assertions in the
top check that both the state and the next state stay one-hot.

## Departures and choices

These follow the source method:

- the chart;
- the output sets;
- the position of a10 and a11 at the input of x4;
- one-hot coding;
- one LUT per transition;
- `n = 4`.

These are choices of this design:

- **Y(a6) = Y(a11) = {y5, y6}.** One description of the method gives
  a11's output set as {y3, y6}. The chart itself prints {y5, y6} for a6, and
  a11 must copy a6, so {y5, y6} is used.
- **Reset style.** Asynchronous and active low.
- **No idle wait in a1.**
- **OR merge.** The OR of transitions into each target state, described above.
- **LUT contents.** `INIT` is a parameter. There is no loading of LUT
  contents at run time.
- **Only this chart.** The method was also evaluated on larger benchmark
  charts with 9 to 18 inputs. Those charts are not available, so only the
  chart above is built.

How much faster the machine clocks depends on the device and the tool. It
has not been measured here. Published figures for this kind of
transformation on 4-LUT devices are roughly 22–30 % higher average clock
frequency than the same chart built without the extra states.

## Simulation

Every testbench compares the RTL with `tb/asm_ref_pkg.sv`. That reference
walks the chart vertex by vertex and does not use the RTL tables. Each
testbench prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/asm_pkg.sv tb/asm_ref_pkg.sv rtl/lut_n.sv rtl/asm_transition_logic.sv \
  rtl/asm_output_logic.sv rtl/asm_controller.sv tb/tb_asm_controller.sv \
  --top-module tb_asm_controller -o sim && ./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_lut_n` | every address of three LUTs with different contents |
| `tb_asm_output_logic` | the outputs in each of the 11 states; that a10 and a11 copy a3 and a6 |
| `tb_asm_transition_logic` | all 11 × 256 state/input pairs; that each transition depends on at most 3 inputs |
| `tb_asm_controller` | see below |

`tb_asm_controller` runs at the design's only size. It first runs seven
directed operations, checking each state sequence and clock count from the
table above. It then runs 200,000 clocks of random inputs with occasional
resets, checking state and outputs every clock. It fails if any of the
following never happens: one of the 22 transitions, entry into a10 or a11,
the a7 self-loop, the a6 → a3 back edge, or a reset mid-run.
