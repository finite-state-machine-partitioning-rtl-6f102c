# Partitioned low-power FSM with gated sub-machine clocks

A controller is usually clocked in every cycle, even though at any moment it
is only working in a small region of its state graph. This design splits one
finite-state machine into several interacting sub-machines, each owning a
block of the original states, and stops the clock of every sub-machine that is
not in use. Only one sub-machine runs at a time; the others sit in an extra
idle state with neither their flip-flops nor their next-state logic toggling.
Control moves from one sub-machine to another through one-cycle *go* signals.
The primary outputs match the original machine's outputs in every clock
cycle. The only cost is extra flip-flops and a little glue logic.

The RTL here implements this scheme for a four-state example machine split
into two sub-machines. The building blocks (activation function, clock gate,
output combiner) are generic. The two sub-machines are written out by hand
from the split state table.

## The example machine and its split

The original machine has states `st0..st3`, two input bits `in[1] in[0]` and
one output. Its state table, with `-` a don't-care:

| state | input | next | out |
|-------|-------|------|-----|
| st0   | `--`  | st1  | 1   |
| st1   | `00`  | st2  | 1   |
| st1   | `-1`  | st0  | 1   |
| st1   | `1-`  | st0  | 0   |
| st2   | `--`  | st3  | 0   |
| st3   | `00`  | st0  | 1   |
| st3   | `1-`, `-1` | st2 | 0 |

In `st1` the cubes `-1` and `1-` both cover input `11`, with different
outputs. This design ORs the outputs of overlapping cubes, so `st1` on `11`
gives output 1. That choice is stated in `sub_fsm1.sv` and easy to change
there.

The states are split into P1 = {st0, st1} and P2 = {st2, st3}. Only two
edges cross between the blocks: st1 → st2 and st3 → st0, both on input `00`.

## How one state table becomes two sub-machines

Each block becomes a sub-machine with one extra state, its **idle state**
(`s01` for F1, `s02` for F2). It is built by three rules:

* **Edge inside the block.** It is copied unchanged, with the same input and
  output.
* **Edge leaving the block** (source inside, destination outside). It becomes
  an edge into the local idle state. It keeps the original input condition and
  output, and it also raises the go signal named after the original edge. For
  example, st1 → st2 becomes `st1 --00/1--> s01` with `go_st1_st2 = 1`.
* **Edge entering the block.** It becomes an edge out of the idle state, taken
  when the matching go signal is high, with output 0. For example, F2 goes
  `s02 → st2` on `go_st1_st2`.

In its idle state a sub-machine outputs all zeros and ignores the primary
inputs. In any other state it ignores the go inputs. A go signal is high only
on the edge that hands control away. As a result, exactly one sub-machine is
outside its idle state in every cycle. The primary output is therefore the OR
of the sub-machine outputs (`out_or`).

| module     | states (code)                   | leaves idle on | raises |
|------------|---------------------------------|----------------|--------|
| `sub_fsm1` | s01 (0), st0 (1), st1 (2)       | `go_st3_st0`   | `go_st1_st2` |
| `sub_fsm2` | s02 (0), st2 (1), st3 (2)       | `go_st1_st2`   | `go_st3_st0` |

Each sub-machine uses a minimum-length (2-bit) state register. The code values
are arbitrary.

## Hand-over of control (the subtle part)

The point of the scheme is to stop a sub-machine's clock while it idles. For
each sub-machine *i* an **activation function** decides this, in negative
logic (1 = stop):

    fa_i = in_reset_i AND NOT (OR of the go signals entering F_i)

The machine's clock stops once it has reached its idle state. The clock keeps
running in a cycle in which a go addressed to the machine is high, even though
the machine is still idle. This is what makes the hand-over take zero extra
cycles. Take F1 in `st1` with input `00`:

| cycle | F1 state | F2 state | `go_st1_st2` | F1 clocked | F2 clocked | out |
|-------|----------|----------|--------------|------------|------------|-----|
| n     | st1      | s02      | 1 (Mealy, from st1 and input 00) | yes | yes (go keeps it on) | 1 (from F1) |
| n+1   | s01      | st2      | 0            | no         | yes        | F2's |

On the rising edge that ends cycle n, both local clocks tick: F1 falls into
`s01` and F2 leaves `s02` for `st2`. The original machine goes st1 → st2 on the
same edge. Cycle n is the only cycle in which both clocks run. From cycle n+1
on, F1 is idle with `fa_1 = 1` and its clock stays stopped until
`go_st3_st0` arrives.

Note that go is a Mealy output. It depends on the current primary inputs, so
the path from input → go → `fa` must settle within the low phase of the clock.

## Clock gate

`clock_gate` is the usual glitch-free cell:

* A latch is transparent while `clk` is low and captures `NOT fa`.
* The local clock is `gclk = clk AND latched_enable`.

Because the enable cannot change while `clk` is high, a late change of `fa`
cannot clip or create a pulse. The enable that `fa` had at the end of the low
phase decides whether the next rising edge passes. The latched enables of both
sub-machines are brought out on `clk_en` for observation.

## Top level: `lp_fsm_top`

```
CLK ─┬─ clock_gate(fa1) ── clk1 ── sub_fsm1 ──go_st1_st2──┬─► sub_fsm2.go_in
     │      ▲ activation_fn(in_res1, go_st3_st0)          └─► activation_fn 2
     └─ clock_gate(fa2) ── clk2 ── sub_fsm2 ──go_st3_st0──┬─► sub_fsm1.go_in
            ▲ activation_fn(in_res2, go_st1_st2)          └─► activation_fn 1
INPUT, RESET ─► both sub-machines            out = out1 | out2
```

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1     | free-running clock |
| `rst`         | in  | 1     | asynchronous, active high; F1 → st0, F2 → s02 |
| `in_bits`     | in  | 2     | primary inputs `in[1] in[0]` |
| `out`         | out | 1     | primary output (Mealy) |
| `go_st1_st2`, `go_st3_st0` | out | 1 each | hand-over signals (observation) |
| `in_res`      | out | 2     | `{F2 idle, F1 idle}` (observation) |
| `clk_en`      | out | 2     | latched clock enables `{F2, F1}` (observation) |

The reset is asynchronous because an idle sub-machine gets no clock edges, so
a synchronous reset could not reach it. The top carries two assertions:

* Exactly one sub-machine is outside its idle state at every clock edge.
* A go signal only comes from the active sub-machine.

## Choices made by this design

* The initial state is taken to be `st0`, so reset starts F1 in `st0` and F2
  idle.
* Input labels are read with the left character as `in[1]`.
* The overlap of `-1/1` and `1-/0` in `st1` resolves to output 1 (outputs of
  overlapping cubes are ORed).
* The activation function inverts the OR of the go signals. Written without
  the inversion, the clock would stop exactly when a go arrives, which
  contradicts the intended wake-up.
* The latch polarity and AND gate of the clock gate are the standard cell
  choice.
* The observation ports on the top are extra. The scheme itself needs only
  `clk`, `rst`, `in_bits` and `out`.

## What is not here

The split into blocks (P1, P2) is an input to this design, not something the
hardware computes. Choosing a partition is an offline optimisation run before
synthesis. The goal is a partition with few hand-overs and few go signals, for
example by weighting each sub-machine's hardware cost by the probability that
it is active. Generating the sub-machine state tables is also done offline. No
RTL is given for either step. To apply the scheme to another machine, write
one sub-machine module per block by the three rules above. Then instantiate
one `activation_fn` (with `N_GO` set to the number of go signals entering that
machine) and one `clock_gate` per sub-machine, and an `out_or` with
`N_SUB` inputs.

## Verification

Each module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`:

* `tb_activation_fn`: exhaustive, with 1 and 3 go inputs.
* `tb_out_or`: exhaustive for 2×1 bits, random for 3×4 bits.
* `tb_clock_gate`: `fa` changes randomly within both clock phases. The bench
  checks that every gated edge matches the enable of the preceding low phase,
  that no pulse appears while `clk` is low, and that no edge appears anywhere
  except at a rising `clk` edge.
* `tb_sub_fsm1`, `tb_sub_fsm2`: 2000 random cycles against a model of each
  sub-machine, including hand-over, wake-up, idle waiting and reset.
* `tb_lp_fsm_top`: 20,000 random cycles, with a reset half way through,
  against a model of the original four-state machine. In every cycle the
  bench checks:
  * the output, cycle by cycle;
  * which sub-machine is idle;
  * that go is high exactly on the cross-block edges;
  * that both clocks are enabled exactly in hand-over cycles and one clock is
    stopped in all other cycles;
  * the number of gated clock ticks of each sub-machine.

  It fails if any of the following never happens: hand-over in either
  direction, double-clocked cycle, stopped F1 clock, stopped F2 clock. A
  typical run has about 2,500 hand-overs each way, and each sub-machine is
  clocked in about 62% of cycles.

Running a bench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/lp_fsm_pkg.sv \
    tb/tb_lp_fsm_top.sv --top-module tb_lp_fsm_top -o sim
./obj_dir/sim
```

## Files

* `rtl/lp_fsm_pkg.sv`: input type, sub-machine state enums, the exit-input
  test.
* `rtl/sub_fsm1.sv`, `rtl/sub_fsm2.sv`: the two sub-machines.
* `rtl/activation_fn.sv`: the `fa_i` function (parameter `N_GO`).
* `rtl/clock_gate.sv`: the latch-based clock gate.
* `rtl/out_or.sv`: the output OR (parameters `N_SUB`, `W`).
* `rtl/lp_fsm_top.sv`: the complete network.
* `tb/tb_*.sv`: one testbench per module above.
