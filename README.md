# 32-bit carry select adder with clock gating and parallel pipelining

A ripple carry adder is slow because each bit must wait for the carry of the
bit below. A carry select adder cuts the operands into blocks and computes
every block except the lowest twice, once for a carry in of 0 and once for 1.
When the real carry arrives, it only selects one of the two ready results. The
carry then crosses one multiplexer per block instead of every full adder.

This RTL builds a 32-bit carry select adder and wraps it in four ways that
trade area, power and speed:

| variant      | module       | what it adds                                                   | latency            |
|--------------|--------------|----------------------------------------------------------------|--------------------|
| registered   | `csa32_reg`  | registers on A, B, cin and on the sum and carry out            | 2 edges            |
| common gating| `csa32_ccg`  | the same registers, clocked through latch + AND clock gates    | 2 edges            |
| enhanced gating | `csa32_ecg` | clock gates that also stop the clock when no bit would change | 2 edges          |
| parallel pipeline | `csa32_pipe` | two half-rate pipelines of 8-bit segment adders, output mux | 8 edges, 1 result/clock |

`csa32_top` puts all four side by side on one set of operand inputs, each
with its own outputs. Every ripple carry adder inside can be built from one
of two full-adder cells, chosen by the `FA` parameter.

## Full-adder cells

Both cells compute the same function. They differ only in structure, which
matters for area and power after synthesis.

- **Design 1, `fa_ha`** (`FA_HALF_ADDERS`). Two half adders are chained: the
  first adds a and b, the second adds that partial sum to the carry in. The
  carry out is the OR of the two half-adder carries. The half adder itself is
  `half_adder`.
- **Design 2, `fa_minority`** (`FA_MINORITY`, the default). The complemented
  carry out is the *minority* of the three inputs, meaning at most one of
  them is 1. The sum is then `abc + (a+b+cin)·cout'`: it is 1 when all three
  inputs are 1, or when at least one and at most one is 1. Both outputs are
  formed complemented and then inverted. Reusing the carry for the sum makes
  this the smaller cell, so it is the default.

`rca` chains `W` cells of the chosen kind.

## The carry select adder (`csa`)

`csa` has parameters `W` (default 32) and `BW` (block width, default 4). It
is purely combinational.

- **Block 0** is a single `BW`-bit ripple carry adder fed by `cin`. Guessing
  its carry gains nothing, because `cin` is already there.
- **Blocks 1 … W/BW−1** each hold two ripple carry adders. One has its carry
  in tied to 0 and the other to 1. Given `c_k`, the carry into block k:
  - `s = c_k ? s1 : s0`
  - `c_{k+1} = c0 | (c_k & c1)`

At the defaults this gives eight 4-bit blocks and fifteen 4-bit ripple carry
adders. The 4-bit block width comes from the 16-bit layout this design
extends; keeping 4 bits at 32 bits is a choice of this RTL. `W` must be a
multiple of `BW`, and elaboration stops with an error otherwise.

## Registered adder (`csa32_reg`)

The operands, including `cin`, are registered. They feed `csa`, and the sum
and carry out are registered again. The whole add therefore fits in one clock
period, register to register. Operands sampled at rising edge *t* appear on
`sum`/`cout` after edge *t+1*.

## Clock gating

### The gate cell (`clock_gate`)

A latch holds `en` while `clk` is low, and `gclk = clk & en_latched`. The
latch is closed while `clk` is high, so a change of `en` during the high phase
can neither cut a pulse short nor start a new one. `gclk` is either a whole
copy of the `clk` pulse or stays low. `en` must be settled before the rising
edge that it is meant to pass or block.

This cell contains an intended latch. Synthesis reports latch bits for it and
for every module that uses it.

### Common clock gating (`csa32_ccg`)

The operand bank is clocked through one gate driven by `en`. While `en` is
low, the operand registers get no clock edge, and so neither they nor the
adder behind them toggle.

The result bank is clocked through a second gate driven by `en` delayed one
cycle. It therefore takes the one new sum that a loaded operand set produces
and then stops as well.

Seen from outside, this is the registered adder with a load enable: operands
present with `en` = 1 at edge *t* appear after edge *t+1*, and the outputs
hold while `en` is low.

### Enhanced clock gating (`ecg_reg`, `csa32_ecg`)

Common gating still clocks a register that reloads the value it already
holds. `ecg_reg` XORs every bit of its input `d` with its output `q` and ORs
the results into one "something changed" flag. The clock gate is driven by
`en & changed`, so the register is clocked only when `en` is high **and** at
least one bit would actually change. Functionally this is still a register
with load enable `en`.

`csa32_ecg` uses two such registers:

- the operand bank `{cin, B, A}` (65 bits), gated by `en` and by change
  detection;
- the result bank `{cout, sum}` (33 bits), gated by change detection alone.
  It can only change after the operands have changed.

Its external behaviour is the same as `csa32_ccg`.

## Parallel pipelined adder (`csa32_pipe`)

This is the least obvious of the four variants, so it is described step by
step.

**One path.** The 32 bits are cut into `NS = W/SEG = 4` segments of 8 bits.
Each segment is added by its own 8-bit `csa` (4-bit blocks) in its own
pipeline stage. A path has `NS+1 = 5` register stages:

```
stage 0: operands a, b, cin                    (operand registers)
stage 1: a/b carried along, s[7:0],   carry    (after segment adder 0)
stage 2: a/b carried along, s[15:0],  carry    (after segment adder 1)
stage 3: a/b carried along, s[23:0],  carry    (after segment adder 2)
stage 4: s[31:0], cout                         (after segment adder 3)
```

The upper operand bits ride along one stage per segment. Segment k therefore
meets the carry out of segment k−1 in the same stage. Each stage register is
a packed struct `{v, c, a, b, s}`.

**Two paths.** `PATHS = 2` copies of the pipeline run side by side. A phase
counter deals the operand sets out in turn. Path *p* loads, and advances,
only on the edges where `phase == p`, so each path runs at half the clock
rate. This clock enable stands in for a separate divided clock per path.

**Output multiplexer.** The output mux switches at the full rate. In each
cycle it shows the path that was advanced at the last edge: `sel = phase − 1`
(mod `PATHS`). Each result is visible for exactly one cycle.

**Timing.**
- An operand set, with `in_valid`, is taken at every rising edge.
- Its result appears with `out_valid` = 1 after `PATHS × NS = 8` further
  edges. That is five edges of its own path's half-rate clock.
- Throughput is one addition per clock.
- `in_valid`/`out_valid` only mark which cycles carry a result. There is no
  back-pressure.

The lowest segment takes the registered `cin`, so the adder handles a carry
in like the other variants.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `W`       | 32      | operand width |
| `BW`      | 4       | carry-select block width |
| `SEG`     | 8       | pipeline segment width (`csa32_pipe`) |
| `PATHS`   | 2       | parallel pipeline paths (`csa32_pipe`) |
| `FA`      | `FA_MINORITY` | full-adder cell, from `csa_pkg::fa_design_e` |

`W` must be a multiple of `BW` and of `SEG`, and `SEG` must be a multiple of
`BW`.

## Reset and clocking

- All registers use an asynchronous, active-low reset `rst_n` that clears
  them, including the gated ones.
- There is one clock input. The gated registers are clocked from it through
  `clock_gate`. The pipeline's half rate is a clock enable, not a second
  clock.

## Where this RTL makes its own choices

The structure above follows the adder family this design is based on. The
following points are this RTL's own choices:

- 4-bit select blocks at 32 bits.
- `cin` and `cout` registered along with A, B and the sum.
- An `en` port as the source of the gating enable.
- The result bank of `csa32_ccg` gated with `en` delayed by one cycle.
- The two-bank grouping in `csa32_ecg`.
- Edge-triggered registers for the pipeline stages.
- The clock-enable model of the half-rate paths.
- `cin` fed into the lowest pipeline segment (a carry in of 0 there is the
  other possible reading).
- The valid flags.
- The reset.

No area, power or timing numbers are claimed for this RTL. Those depend on
the cell library and synthesis flow.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
compares against integer addition or a reference register model written in
the testbench, and prints
`TB_RESULT checks=<n> failures=<m>`.

- `fa_ha_tb`, `fa_minority_tb`: all 8 input combinations.
- `rca_tb`: all 512 combinations of two 4-bit operands and carry, for both
  cells.
- `csa_tb`: directed corner cases and 20,000 random sums. It runs at 32 bits
  with both cells and at 16 bits. It also checks that blocks took both their
  carry-in-1 and carry-in-0 results.
- `clock_gate_tb`:
  - `en` changes while `clk` is low and while it is high;
  - `gclk` must copy whole pulses only;
  - `gclk` must never rise off a `clk` edge.
- `ecg_reg_tb`: the internal gated clock must pulse exactly when `en` is high
  and `d != q`.
- `csa32_reg_tb`, `csa32_ccg_tb`, `csa32_ecg_tb`:
  - 5,000 cycles of random, repeated and carry-heavy operands;
  - `en` low about a quarter of the time;
  - the 7FFFFFFF + 7FFFFFFF + 1 = FFFFFFFF (carry 0) example.
- `csa32_pipe_tb`: every result must come out exactly 8 edges after its
  operands and be valid only then. Results from both paths and carries
  between segments are required.
- `csa32_top_tb`:
  - runs all four variants at the default parameters for 3,000 cycles;
  - requires every mechanism at least once: a clock stopped by `en`, an
    enhanced-gating skip for unchanged operands, an unclocked result bank,
    both select outcomes, a segment carry, results from both pipeline paths,
    and a carry out of 1;
  - `csa32_top_fa1_tb` is the same test with the design-1 cell.

To simulate with Verilator 5, for example the top:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/csa_pkg.sv \
    tb/csa32_top_tb.sv --top-module csa32_top_tb -o sim
./obj_dir/sim
```

Substitute any other `*_tb` for a single block. The asynchronous resets need
a real falling edge of `rst_n`. The testbenches start it high and pull it low
at time 1, so registers that a two-state simulator starts at random values
get cleared.

## Files

- `rtl/csa_pkg.sv`: the `fa_design_e` cell selector.
- `rtl/half_adder.sv`, `rtl/fa_ha.sv`, `rtl/fa_minority.sv`: one-bit cells.
- `rtl/rca.sv`, `rtl/csa.sv`: combinational adders.
- `rtl/clock_gate.sv`, `rtl/ecg_reg.sv`: clock gating.
- `rtl/csa32_reg.sv`, `rtl/csa32_ccg.sv`, `rtl/csa32_ecg.sv`,
  `rtl/csa32_pipe.sv`: the four variants.
- `rtl/csa32_top.sv`: all four side by side.
- `tb/`: one testbench per module, plus `csa32_top_fa1_tb.sv`.
