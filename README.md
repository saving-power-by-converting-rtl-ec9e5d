# Flip-flop designs rebuilt on three clock phases

Latches are smaller than flip-flops and draw less clock power. The usual way to
replace a flip-flop with latches is the master-slave pair, which costs two latches
per flip-flop. This design uses three non-overlapping clock phases instead, `p1`,
`p2` and `p3`. Most register positions of the original then need only one latch,
and an extra latch is inserted only where two neighbouring latches would otherwise
be open at the same time. Throughput, latency and cycle time are unchanged. On
top of that, the inserted latches get clock gates that only a three-phase clock
makes cheap.

The RTL here is a complete, small instance of the scheme: a 4-stage, 32-bit
pipeline converted to 3-phase latches, with a stall input, every kind of clock
gate the scheme uses, and a generator for the three phases. Next to it runs a
six-flip-flop circuit with feedback loops, whose latch assignment is chosen
at elaboration by an exhaustive search for the minimum. Each piece is also
usable on its own. For example, `tp_reg` converts any single flip-flop position,
and the gates work for any netlist converted by the same rules.

## The three phases

One clock cycle `Tc` holds three pulses that never overlap. They close in the
order p1, p2, p3, and p3 closes exactly at the end of the cycle. Every latch is
transparent while its phase (or a gated copy of it) is high.
`three_phase_clkgen` derives the phases from a reference clock. By default a
cycle is 6 reference ticks:

```
tick    0    1    2    3    4    5  | 0 ...
p1      _   ‾‾‾   _    _    _    _  |
p2      _    _    _   ‾‾‾   _    _  |
p3      _    _    _    _    _   ‾‾‾ |   <- p3 closes at the cycle boundary
```

`SLOT` (ticks per phase slot) and `HIGH` (high ticks per slot) set the widths. The
low ticks between pulses are a safety margin against overlap, and an assertion
fails the simulation if two phases are ever high together. The outputs come
straight from flip-flops, so they are free of glitches. After reset the first
pulses are **p2, p3**, for the reason given below.

How a flip-flop's edge `k` maps onto the phases is the key to reading the rest:

| original flip-flop | converted to | loads during | holds the value of edge k |
|---|---|---|---|
| single-latch position | p1 latch | p1 of cycle k | from p1 of cycle k |
| pair position, K=0 | p3 latch | p3 of cycle k-1 (closes at the boundary, which *is* edge k) | from p3 of cycle k-1 |
| | + p2 latch | p2 of cycle k | from p2 of cycle k |
| pair position, K=1 | p1 latch + p2 latch | p1 / p2 of cycle k | from p2 of cycle k |

Data launched by a p1 latch have the rest of cycle k to reach a p3 latch. Data
launched by a p3 latch pass the p2 latch in cycle k+1 and reach the next p1 latch
at the start of cycle k+2. Each original stage therefore still takes one cycle,
and a latch may lend unused time to the next stage.

## Which positions get one latch and which get two

Each flip-flop position gets two bits (see `tp_pkg`):

* `G` chooses the form. `G=0` means a single latch. `G=1` means a back-to-back
  pair: a main latch followed by an inserted p2 latch.
* `K` chooses the phase of the main latch: `K=1` is p1, `K=0` is p3.

The rules:

* A p3 latch always has a p2 partner (`K=0` forces `G=1`). As a result, no data
  path runs directly from a p3 latch to a p1 latch.
* A p1 latch may stand alone only if none of the positions it feeds is also a
  p1 latch. Otherwise two p1 latches would be open together and data would race
  through both, which is a hold problem.
* Primary inputs count as launched by p1. An input that feeds a p1 latch
  therefore gets an inserted p2 latch of its own.

The aim is to minimise the number of `G=1` positions, plus one if the inputs
need their own latch. For a general netlist this is an integer linear program,
solved offline. `tp_pkg` contains its objective (`g_from_k`, `ilp_cost`) and
an exhaustive solver (`ilp_min_cost`) for graphs of up to 16 flip-flops, both
evaluated at elaboration. A graph is given as a fanout matrix:
`fanout[u][v]` is set when flip-flop `v` is reached from `u` through logic
alone.

For a linear pipeline the answer is known in closed form, and
`tp_pkg::assign_linear` returns it. Single p1 latches and p3 + p2 pairs
alternate, counted from the output end, so the last position is always a
single p1 latch. A chain of `n` positions then costs `ceil(n/2)`. Starting an
even-length chain with p1 would cost one bank more. `tp_pipeline` checks its
assignment against the exhaustive minimum at elaboration. The default chain
has five positions:

```
 din -> [2] -> [1] -> f1 -> [3][2] -> f2 -> [1] -> f3 -> [3][2] -> f4 -> [1] -> dout
        in     pos0          pos1            pos2          pos3           pos4
```

Five flip-flop positions become 7 latch banks, where master-slave would need 10
(`tp_pkg::linear_latch_banks(n) = n + n/2`). The input p2 latch is one more
bank. Chains with an odd number of positions start on p1 and need it;
even-length chains start with a p3 pair and do not. `PI_LATCH=0` removes the
input latch. The bare chain then needs inputs that change only while p1 is
low, instead of inputs that behave like a flip-flop output.

## The converted pipeline (`tp_pipeline`)

Stage `s` (between positions `s-1` and `s`) computes `fb(fa_s(x))`:

* `fa_s(x) = x + C_s`, where `C_s` is the low `WIDTH` bits of `0x9E3779B97F4A7C15 * (s+1)`.
* `fb(x) = rotate_left(x, 1) ^ (x >> 3)`.

This datapath is only an example workload, and any combinational logic could take
its place.

**Moving the inserted latch.** An inserted p2 latch straight behind its p3 latch
would do nothing useful. With `RETIME=1` it sits between `fa` and `fb` of the
following stage instead, which splits that stage in two. This is where retiming
the inserted latches would put it; a real flow lets the synthesis tool choose
the split point. The function is the same for `RETIME=0` and `RETIME=1`. One
detail matters: a moved p2 latch resets to `fa(0)`, the value its logic makes of
the all-zero reset state. Otherwise a stall right after reset would leave the
pipeline in a state the flip-flop original never has.

**Reset.** Every latch has an asynchronous active-low reset, to zero unless
stated otherwise. After reset the clock generator first gives a p2 pulse,
which lets the input latch take the first word. The p3 pulse that follows lets
the p3 latches capture what the original's first clock edge would store. Full
cycles follow.

**Stall.** Positions `0 .. GATED_POSITIONS-1` load only while `en` is high, as a
flip-flop behind a gated clock would. The other positions load every cycle. In
the default top, positions 0–2 stall and positions 3–4 run free. During a stall
the free positions keep recomputing the same value, which is exactly the
low-activity case that data-driven gating exploits.

## A circuit with feedback (`tp_netlist`)

A pipeline never feeds a position back to itself, so its assignment is a simple
alternation. Loops are what make the general problem hard: a ring of three
flip-flops cannot alternate p1 and p3, and a flip-flop that feeds itself is a
pair whichever phase it takes. `tp_netlist` builds such a circuit from a fanout
matrix (`FANOUT`, plus `PI_FO` for the positions the input reaches). The default graph (`tp_pkg::example_fanout`) has these connections:

* a ring `0 -> 1 -> 2 -> 0`;
* `2 -> 3`, and position 3 feeds itself;
* `3 -> 4`, and a ring `4 <-> 5`;
* `din` reaches positions 0 and 3.

Position `v` computes `C_v + (din if it reaches v) + acc_v`. Here `acc_v`
folds the fanins `u` in ascending order as `acc = rotate_left(acc, 1) ^ q(u)`.
At elaboration, `tp_pkg::ilp_min_k` tries every `K` vector and keeps the
first cheapest one. `G` then follows from the rules. For the default graph the
minimum is four inserted p2 latches and no input latch, 10 banks where
master-slave would need 12:

* the ring of three needs two pairs;
* the self-loop on 3 needs one;
* the ring of two needs one.

The loops cost pairs that a pipeline of the same size would not need. A single
p1 latch here only feeds p3 latches, and every other position is read behind
its p2 latch, so no two latches on a path are open together. The pairs' p2
latches use data-driven gating, and nothing is retimed. Graphs of up to 12
positions are accepted. An elaboration check confirms that the assignment
reaches the exhaustive minimum.

## Clock gating on three phases

`tp_reg` picks a gate for each latch bank by these rules:

| latch | its enable starts at... | gate | what the gate is |
|---|---|---|---|
| p1 or p3, enable-gated | a latch of the **same** phase | `cg_orig` | latch transparent while the clock is low, then AND: the conventional clock gate |
| p1 or p3, enable-gated | only latches of **other** phases | `cg_m2` | AND only |
| p2, enable shared with its upstream latches | p1 or p2 latches (never p3) | `cg_m1` | enable latched by **p3**, then AND with p2 |
| p2, no common enable | – | `ddcg` | data-driven: pulse only if the data would change |

Why the cheaper gates are safe:

* **`cg_m2`.** When the enable comes only from latches of other phases, all of
  those latches are closed while this phase is high. The enable is therefore
  already stable and cannot glitch the clock, so the guarding latch of a
  conventional gate is redundant.
* **`cg_m1`.** The enable of a p2 latch also gates the p1/p3 latch in front of
  it, so it is valid before p3 closes. A latch that is transparent during p3
  holds it from the fall of p3 to the next rise of p3, which covers the whole p2
  pulse. No inverter is needed.

In this pipeline `en` is a primary input and counts as p1-launched. The p1
positions therefore get `cg_orig`, the p3 positions `cg_m2`, and their p2
partners `cg_m1`.

**Data-driven gating (`ddcg`).** Each latch XORs its `d` and `q`. The results are
ORed over a group of at most 32 latches (`GROUP`), and the group gets its p2
pulse only if some bit would change. Wider banks are split into several groups.
This design adds one thing to the bare XOR/OR/AND structure: each group's
decision passes through a conventional gate (`cg_orig`) whose latch holds the
decision while p2 is high. Without that latch, the decision would drop the
moment the opened latches copy `d` to `q`, and the pulse would be cut short.
Which banks get data-driven gating is a parameter here. In the scheme it is
chosen from measured toggle rates: banks whose inputs toggle in under 1 % of
cycles.

## Using `tp_top`

| port | dir | width | meaning |
|---|---|---|---|
| `ref_clk` | in | 1 | reference clock; one 3-phase cycle = `3*SLOT` ticks |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `en` | in | 1 | load enable of positions `0..GATED_POSITIONS-1` |
| `din` | in | `WIDTH` | input word |
| `dout` | out | `WIDTH` | output word |
| `p1`, `p2`, `p3` | out | 1 | the phases, for timing the environment |
| `main_clk`, `p2_clk` | out | `STAGES+1` | gated clock actually applied to each position (for observation) |
| `net_din` | in | `WIDTH` | input of the circuit with feedback, same timing as `din` |
| `net_q` | out | 6 x `WIDTH` | state of each position of the circuit with feedback, valid after p2 |
| `net_main_clk`, `net_p2_clk` | out | 6 | its applied latch clocks |

Parameters and defaults: `WIDTH=32`, `STAGES=4`, `GATED_POSITIONS=3`,
`RETIME=1`, `PI_LATCH=1`, `SLOT=2`, `HIGH=1`.

**Input timing.** `en` and `din` are treated as launched by p1. Change them just
after p1 rises and hold them until the next rise of p1, as a flip-flop output
behaves after a clock edge. A value launched at edge k-1 acts at edge k. This
works because of the input p2 latch and because the p1 positions keep the
conventional gate: their enable changes while p1 is high. With `PI_LATCH=0`,
change the inputs only while p1 is low, for instance on the rise of p2. `dout` then equals the original pipeline's last
register after p1 of each cycle, `STAGES` cycles after the word entered.

## Files

All RTL is in `rtl/`, one unit per file:

* `tp_pkg`: assignment types, `assign_linear`, `linear_latch_banks`, the program's functions (`g_from_k`, `ilp_cost`, `ilp_min_cost`, `ilp_min_k`), the example graph, the stage constants, `MAX_CG_FANOUT`.
* `tp_latch`: latch bank with reset value.
* `cg_orig`, `cg_m1`, `cg_m2`: the three clock gates.
* `ddcg`: multi-bit data-driven gating.
* `tp_reg`: one converted position.
* `tp_pipeline`: the converted pipeline.
* `tp_netlist`: the converted circuit with feedback.
* `three_phase_clkgen`: the phase generator.
* `tp_top`: the top.

The self-checking testbench of each unit is in `tb/tb_<unit>.sv`. Each prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_tp_top rtl/tp_pkg.sv tb/tb_tp_top.sv -o sim
./obj_dir/sim
```

Replace `tb_tp_top` with any other testbench. `-Wno-fatal` is needed because
Verilator warns about the latch loop explained below. The data latches are
reset, and the enable latches of the clock gates are loaded before their first
use, so the design also simulates correctly with two-valued logic.

What the testbenches establish:

* **`tb_tp_top`** runs the top at its defaults for 2000 cycles against a
  flip-flop model of the original pipeline. It checks `dout` every cycle and the
  6-tick cycle length. It also counts, and requires at least once, each of:
  stalls, p1 and p3 pulses suppressed by `cg_orig` and `cg_m2`, p2 pulses
  suppressed by `cg_m1`, and p2 pulses both suppressed and passed by `ddcg`.
  All six positions of the circuit with feedback are compared with their own
  flip-flop model every cycle.
* **`tb_tp_netlist`** runs two graphs against a flip-flop model, position by
  position, for 800 cycles:
  * the default graph;
  * three input-fed single p1 latches feeding a self-looped p3 pair, which
    needs the input p2 latch.
  It checks the chosen `K` and `G` against the rules and the expected minima.
* **`tb_tp_pipeline`** checks two configurations against the model and checks
  the latch-bank count:
  * the default one, with inputs launched just after p1;
  * 40 bits and 3 stages (`3 2 | 1 | 3 2 | 1`), with only position 0
    stalling, no moved latches, and data-driven groups of 32 + 8.
* **`tb_tp_ilp`** checks the assignment functions. On random graphs, the `G`
  derived from `K` must satisfy the program's inequalities and be the least
  such `G`. It also checks the minima of hand-worked graphs (chains, a
  self-loop, rings, a fanout) and the minimality of `assign_linear`.
* **`tb_tp_reg`** checks five position types, including their gated clocks.
* **The gate and generator testbenches** check their units pulse by pulse.

## Lint and synthesis notes

* **Latches.** Latches are intended throughout (`tp_latch`, and the enable
  latches of `cg_orig` and `cg_m1`).
* **Loop warning in `ddcg`.** Verilator reports a combinational loop through
  `ddcg`: `q -> XOR -> gate latch -> gclk -> bank latch -> q`. The loop passes
  through two latches that are never transparent together. The gate latch is
  open only while p2 is low, and the bank latch only while the gated p2 is high.
* **Unused ports.** In a single-latch position, `tp_reg` leaves `d2` and `p2`
  unused.
* **Loop warnings in `tp_netlist`.** Verilator reports its feedback rings
  as combinational loops. Each ring passes latches that are never open
  together: a p1 latch and a p3 latch, or a main latch and its p2 latch.
* **Unused parameter.** `NUM_LATCH_BANKS` in `tp_pipeline` and `tp_netlist`
  exists for inspection.

## Limits and departures

* **Not included: the conversion of an arbitrary netlist.** That step extracts
  the flip-flop connection graph, solves the program at full size and retimes
  the inserted latches with a synthesis tool. It is software. Included are
  the program's objective, a small exhaustive solver (applied in hardware to
  graphs of up to 12 flip-flops by `tp_netlist`) and the closed form for linear
  pipelines.
* **Timing is not modelled.** The RTL is functionally exact, but time
  borrowing, the setup and hold conditions, and the placement of moved latches
  are not checked. They depend on a cell library and on physical design,
  including three separate clock trees.
* **This design's own choices, not part of the scheme:**
  * pipeline width, stage logic and the choice of stalling positions;
  * the graph and next-state logic of the circuit with feedback;
  * the phase generator as a whole (tick counts, gaps, first pulses p2 and p3);
  * latch resets and the `fa(0)` reset of moved latches;
  * the enable latch inside each data-driven group;
  * grouping consecutive bits instead of grouping by measured toggle rate.
* **Not shown:** the power and area benefit of the scheme. It can only be
  measured after place and route, and no figure for it is claimed here.
