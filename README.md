# Glitch-free switching between two unrelated clocks

When a design has to move from one clock to another while it is running
(a fast and a slow clock, a test clock and a functional clock, two
oscillators), a plain multiplexer on the clock line is dangerous. If the
select input changes while the two clocks are at different levels, the
output can show a high or low phase far shorter than either clock's: a
glitch. Every flip-flop driven by that clock then sees a period that its
logic cannot meet, which is a timing error in the most direct sense, and
can go metastable.

This RTL implements a small circuit that removes that hazard. It chooses
between `clk0` and `clk1` under `select`, with no assumption about their
frequencies or phases, and guarantees that every high pulse on `out_clk`
is a complete high pulse of one of the two input clocks. It uses four
flip-flops and a handful of gates.

## How it works

The switch is built from two identical halves, one per clock
(`clk_sync_branch`), and an OR gate that merges their outputs.

```
 select ────────► AND ─► FF(rise clk1) ─► FF(fall clk1) ─┬─Q──► AND(clk1) ─┐
                   ▲ off0                                 └─QN─► off1       OR ─► out_clk
 select ─► NOT ─► AND ─► FF(rise clk0) ─► FF(fall clk0) ─┬─Q──► AND(clk0) ─┘
                   ▲ off1                                 └─QN─► off0
```

Each half works like this:

1. **Request.** The half's select term (`select` for the CLK1 half,
   `~select` for the CLK0 half) is ANDed with the *other* half's off flag.
   A half therefore asks for its clock only when the other clock is no
   longer being forwarded. This is what makes the switch *break before
   make*: there is never a moment when both clocks reach the OR gate.
2. **Synchronizer.** The request comes, through the other half's flag,
   from a foreign clock domain. A flip-flop on the rising edge of the
   half's own clock takes it in; a second flip-flop on the falling edge
   moves it on. The first stage gives any metastability half a clock
   period to settle.
3. **Gating on the low phase.** The second flip-flop's Q (`en_q`) is
   ANDed with the clock. Because `en_q` changes only on a falling edge,
   when the clock is already low, the gate never opens or closes during a
   high phase. The clock leaves and rejoins `out_clk` only in whole
   pulses.
4. **Cross-coupling.** The second flip-flop's inverted output goes to the
   other half's request AND (step 1).

### A switch, step by step

Say `clk0` is running and `select` goes high.

* At the next rising edge of `clk0` the CLK0 half samples `~select = 0`;
  at the following falling edge its `en_q` drops. `out_clk` stays low from
  there on. That takes 1/2 to 3/2 periods of `clk0`.
* The CLK0 half's off flag is now high, so the CLK1 half's request is
  high. It is sampled at the next rising edge of `clk1` and reaches the
  gate at the following falling edge: another 1/2 to 3/2 periods of
  `clk1`. The first high pulse of `clk1` after that passes to `out_clk`.

So a switch takes between `(P0 + P1)/2` and `3(P0 + P1)/2`, where P0 and P1
are the two periods, and during it `out_clk` is held low for at least one
low phase of each clock. After reset both halves are off, and the clock
named by `select` starts within 3/2 of its own period.

### The one rule for the user

Once `select` has changed, hold it until the new clock has started
(`clk0_active` or `clk1_active` rises). If it is reversed while the switch
is still in progress, both first-stage flip-flops can see the other half
off at the same time and both clocks can start together. The top module
has two concurrent assertions that flag this. Nothing else constrains
`select`: it may change at any time, asynchronously to both clocks.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/clk_sync_branch.sv` | `clk_sync_branch` | one half: request AND, rising-edge and falling-edge flip-flops, clock AND gate |
| `rtl/glitch_free_clk_mux.sv` | `glitch_free_clk_mux` | top: two halves, select inverter, output OR, exclusivity assertions |

Ports of `glitch_free_clk_mux`:

| port | dir | meaning |
|------|-----|---------|
| `clk0`, `clk1` | in | the two clocks; any frequencies and phases |
| `rst_n` | in | asynchronous reset, active low; stops `out_clk` at once |
| `select` | in | 0 selects `clk0`, 1 selects `clk1` |
| `out_clk` | out | the switched clock |
| `clk0_active`, `clk1_active` | out | which half is forwarding its clock (low for both during a switch) |

The modules have no parameters. After synthesis the top is 4
flip-flops with asynchronous reset, 4 two-input ANDs, 1 OR and inverters,
which maps to two slices of a small FPGA.

## Where this RTL goes beyond the source circuit

The circuit (the gates, the edge of each flip-flop, which output feeds
what) is the published logic diagram. These parts are choices of this
implementation:

* **Reset.** The diagram has none. `rst_n` clears all four flip-flops, so
  the switch starts with no clock forwarded and then brings up the
  selected one. Without it, the power-up state of the flip-flops, and so
  the first few output pulses, would be arbitrary.
* **Status outputs.** `clk0_active` and `clk1_active` bring out the two
  enable flip-flops, so a user can see when a switch has completed.
* **Assertions** for the select-hold rule above.

Gated clocks are the whole point of this circuit, so a lint tool's
warnings about logic on clock nets are expected. For an ASIC, the two
clock AND gates and the OR gate should be replaced by clock-tree cells
(a clock-gating cell and a clock mux or OR cell from the library) and kept
from being restructured by synthesis; on an FPGA, a dedicated clock
buffer with an enable serves the same purpose.

## Testbenches and how far they go

Both testbenches are self-checking and end with a line
`TB_RESULT checks=N failures=M`.

* `tb/tb_clk_sync_branch.sv` drives one half with a 10 ns clock and random
  request changes between clock edges. A reference model of the two
  flip-flops is compared with the outputs after every edge. It also checks
  that `en_q` only changes while the clock is low, that the gated clock
  carries only whole 5 ns pulses, that a request reaches `en_q` within
  1/2 to 3/2 periods, and that reset clears the half at once.
* `tb/tb_glitch_free_clk_mux.sv` runs the whole switch with clocks of
  unrelated, non-integer periods in three settings: `clk1` much faster
  than `clk0`, much slower, and nearly equal. It makes 90 switches in both
  directions, plus a reset in the middle of each setting. It checks that
  every output pulse coincides exactly with a source pulse, that low
  phases are never shorter than the shorter source low phase, that the
  old clock stops before the new one starts, the switch time bounds
  above, the restart time after reset, and that `out_clk` follows the
  selected clock in steady state. It fails if any of these mechanisms
  never happened.

Simulating with Verilator 5:

```
verilator --binary --timing --assert -Irtl tb/tb_glitch_free_clk_mux.sv \
  rtl/glitch_free_clk_mux.sv rtl/clk_sync_branch.sv --top-module tb_glitch_free_clk_mux
./obj_dir/Vtb_glitch_free_clk_mux
```

(and the same with `tb_clk_sync_branch.sv` and `rtl/clk_sync_branch.sv`).
Each runs in well under a second.

Limits of what simulation shows: a digital simulator cannot show
metastability, so the synchronizing role of the first flip-flop is
argued, not tested. How long its output needs to settle, and hence the
highest clock frequencies at which the switch is safe, depends on the
flip-flop cells and must be checked with the target library's
metastability data. In the testbench `select` changes at times unrelated
to either clock. If a change coincides with a sampling edge, the
simulator takes it one way or the other, as a settled flip-flop would,
and both outcomes lie within the checked time bounds.
