# Gated pulse generator: an asynchronous state machine with three SR latches

This circuit watches a free-running clock `clk` and an enable `gate`, and
produces active-low pulses on `y` that are aligned to the clock phases. How
many pulses it produces depends on *when* `gate` rises:

* **`gate` rises while `clk` is high:** `y` goes low for the next clock-low
  phase, returns high for one clock-high phase, and goes low again for the
  following clock-low phase. That makes a double pulse.
* **`gate` rises while `clk` is low:** `y` goes low for the next clock-high
  phase. That makes a single pulse.
* After the pulses, and whenever `gate` is low, `y` stays high. A new burst
  needs `gate` to fall and rise again.

```
           gate rises at clk high: 2 pulses      gate rises at clk low: 1 pulse
clk   ___‾‾‾___‾‾‾___‾‾‾___‾‾‾___          ___‾‾‾___‾‾‾___‾‾‾___
gate  ____‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾          _‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
y     ‾‾‾‾‾‾___‾‾‾___‾‾‾‾‾‾‾‾‾‾‾‾          ‾‾‾___‾‾‾‾‾‾‾‾‾‾‾‾‾‾
```

The machine is *asynchronous*: `clk` is not used as a clock. It is an
ordinary input of the flow table, just like `gate`. The state lives in three
set/reset latches, and the only timing is the settling of their feedback
loop. Choosing the state encoding is therefore the hard part of the design,
and most of this document explains it.

## From behaviour to a flow table

Each combination of the inputs and of the machine's history is one state.
Ten such primitive states describe the behaviour (`c` = clk, `g` = gate):

| state | meaning                                        | y |
|-------|------------------------------------------------|---|
| P0    | clk low, gate low                              | 1 |
| P1    | clk high, gate low                             | 1 |
| P2    | gate rose during clk high, waiting for clk     | 1 |
| P3    | first pulse (clk low)                          | 0 |
| P4    | gap between the pulses (clk high)              | 1 |
| P5    | second pulse (clk low)                         | 0 |
| P6    | clk high, gate high, pulses done               | 1 |
| P7    | clk low, gate high, pulses done                | 1 |
| P8    | gate rose during clk low, waiting for clk      | 1 |
| P9    | the single pulse (clk high)                    | 0 |

Transitions (inputs `cg`). "–" means that change is not allowed in that state:

| state | 00 | 01 | 11 | 10 |
|-------|----|----|----|----|
| P0    | P0 | P8 | –  | P1 |
| P1    | P0 | –  | P2 | P1 |
| P2    | –  | P3 | P2 | –  |
| P3    | –  | P3 | P4 | –  |
| P4    | –  | P5 | P4 | –  |
| P5    | –  | P5 | P6 | –  |
| P6    | –  | P7 | P6 | P1 |
| P7    | P0 | P7 | P6 | –  |
| P8    | –  | P8 | P9 | –  |
| P9    | –  | P7 | P9 | –  |

Compatible states are merged, giving seven states:
{P0,P8}→0, {P1,P2}→1, {P6,P7}→2, P3→3, P4→4, P5→5 and P9→6.

## State encoding without critical races

In an asynchronous machine, a transition that flips two state bits at once
is a race: the two latches never switch at exactly the same instant, so the
machine passes through an intermediate code. Nothing guarantees where it then
ends up. This design avoids races altogether: **every transition flips
exactly one bit.** The seven states are placed on the corners of a
3-cube. Wherever two states that must be connected are not neighbours on
the cube, the transition is routed through a third state that is adjacent to
both. That third state must be one whose own row in the flow table leads
onward in the same input column.

| state | q2 q1 q0 | y | role |
|-------|----------|---|------|
| 0     | 000      | 1 | idle, clk low |
| 1     | 011      | 1 | idle, clk high |
| 2     | 110      | 1 | gate high, pulses done |
| 3     | 001      | 0 | first pulse |
| 4     | 101      | 1 | gap |
| 5     | 100      | 0 | second pulse; transit for 2→0 |
| 6     | 010      | 0 | single pulse; transit for 0↔1 and 2→1 |
| –     | 111      | 0 | unused |

Final flow table, including the transit steps (inputs `cg`):

| state | 00 | 01 | 11 | 10 |
|-------|----|----|----|----|
| 0     | 0  | 0  | 6  | 6  |
| 1     | 6  | 3  | 1  | 1  |
| 2     | 5  | 2  | 2  | 6  |
| 3     | –  | 3  | 4  | –  |
| 4     | –  | 5  | 4  | –  |
| 5     | 0  | 5  | 2  | –  |
| 6     | 0  | 2  | 6  | 1  |

The rerouted transitions are these:
0→6→1 (clk rises, gate low), 1→6→0 (clk falls, gate low), 2→5→0 (gate falls
at clk low) and 2→6→1 (gate falls at clk high).

## Excitation and output logic

Each state bit is a set/reset latch. The set and reset functions come from
the flow table, with its don't-cares used to minimise them:

```
S0 = c·~g·~q2·q1              R0 = ~c·~g + ~c·q2
S1 = c·~q0                    R1 = ~c·(~g ⊕ q0)
S2 = c·~q1·q0 + ~c·g·q1·~q0   R2 = c·~g + ~g·~q1
y  = q2 ⊕ q1 ⊕ ~q0
```

S and R of a latch are never both 1 in any specified state and input.

## Operating rules and known behaviour

* **Fundamental mode.** Change only one input at a time, and only after the
  loop has settled (two latch steps at most). `clk` and `gate` must not
  switch together.
* **Gate must stay high through a pulse sequence.** A falling `gate` in
  states 3, 4, 5 (double pulse) or 6 (single pulse) is unspecified.
* **Output glitches.** States 5 and 6 have `y = 0` and also serve as transit
  states. In real hardware, `y` therefore dips low for about one latch delay
  during the four rerouted transitions. The design does not filter this.
  Register `y` or sample it mid-phase if a clean signal is needed.
* **Unused code 111.** It is reachable only at power-up without a reset.
  With `clk` high and `gate` low the machine goes to 011 (state 1). With both
  inputs high it stays in 111, with `y = 0`, until `clk` falls. With `clk`
  low and `gate` low it goes to 110 and from there to state 0. With `clk`
  low and `gate` high, two latches are reset at once. The machine then lands
  in state 2 or, through 101, in state 5, and in both cases it is back on
  the normal path by the next clock edge. Use `rst` to avoid this.

## RTL structure

| file | module | content |
|------|--------|---------|
| `rtl/gpf_pkg.sv` | `gpf_pkg` | `state_t` enum of the seven codes |
| `rtl/sr_latch.sv` | `sr_latch` | one level-sensitive set/reset latch with an extra clear `rst` |
| `rtl/excitation_logic.sv` | `excitation_logic` | the six S/R equations above |
| `rtl/output_logic.sv` | `output_logic` | `y = q2 ^ q1 ^ ~q0` |
| `rtl/gated_pulse_fsm.sv` | `gated_pulse_fsm` | top level: excitation logic → three latches → output decoder, with `q` fed back |

Top-level ports of `gated_pulse_fsm`: `clk`, `gate`, `rst` (inputs), `y`
and `q[2:0]` (outputs). `q` is brought out for observation. The design has
no parameters.

Choices made in this implementation:

* The state bits can equally be built as flip-flops with asynchronous
  preset and clear, with the clock and data inputs tied low. Here they are
  written as plain `always_latch` SR latches. Reset has priority over set,
  as the clear input has on such a flip-flop.
* `rst` is an addition that clears all three latches to state 0. It stands in
  for the power-on value the flip-flop version gets.
* Lint tools report a combinational loop through the latches, and synthesis
  infers three latches. Both are the circuit, not mistakes.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M`. With plain Verilator 5, run from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/gpf_pkg.sv tb/tb_gated_pulse_fsm.sv --top tb_gated_pulse_fsm
./obj_dir/Vtb_gated_pulse_fsm
```

`-Wno-fatal` is needed because Verilator warns about the intended latch
loop. Replace the testbench name to run the others.

| testbench | what it checks |
|-----------|----------------|
| `tb_sr_latch` | set, reset, hold, reset-over-set and `rst`, in directed and 500 random steps |
| `tb_output_logic` | `y` for all seven codes, against the state table |
| `tb_excitation_logic` | For every state and every allowed input: one latch step gives the next code of the final flow table, with no S=R=1 and at most one flipped bit. Iterating the step reaches the right stable state, covering all four rerouted paths. |
| `tb_gated_pulse_fsm` | End to end, against an independent model of the ten-state primitive flow table. The test first replays a burst pattern (clk period 2 ns, gate high 5.5–15.5 ns and 30.5–40.5 ns), which must give two pulses and then one. Then it applies 4000 random single-input changes. |

In simulation the latches switch with zero delay, so the transit states of
the rerouted transitions never show on the top's `q`. `tb_gated_pulse_fsm`
therefore also builds a copy of the same netlist with a 20 ps delay in the
state feedback. On that copy it checks that each rerouted transition walks
through its transit state (e.g. 000→010→011) and that every step flips
one bit. The test also counts double bursts, single bursts and each of the
four rerouted transitions, and fails if any of them never occurs.
