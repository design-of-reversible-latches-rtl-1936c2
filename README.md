# Reversible latches: SR, gated SR, D, T and JK from Peres, Fredkin and Feynman gates

A reversible gate maps every input vector to a distinct output vector, so no information
is lost. Reversible circuits are the building material of quantum computing and of
proposed ultra-low-power logic. They bring three costs that ordinary logic does not have:

- **Quantum cost (QC).** This is the number of 1x1 and 2x2 quantum primitives (NOT, CNOT,
  controlled-V, controlled-V+) needed to build a gate.
- **Delay.** This is the logic depth of that primitive cascade, counted in units of Δ, one
  primitive time step.
- **Garbage outputs (GO).** These are outputs that exist only to keep the mapping one-to-one.

Reversible logic also forbids fan-out, so every copy of a signal has to come out of a
gate.

This repository holds SystemVerilog for a set of reversible latches, each made of two to
five 3x3 and 2x2 reversible gates. The gates are chosen to keep all three costs low:

| latch | gates | QC | delay | GO |
|---|---|---|---|---|
| SR, no enable | 2 Peres | 8 | 8 Δ | 2 |
| gated SR | 4 Peres | 16 | 12 Δ | 5 |
| D, output Q | Fredkin + Feynman | 6 | 6 Δ | 2 |
| D, outputs Q and Q' | Fredkin + 2 Feynman | 7 | 7 Δ | 2 |
| T, output Q | Peres + Feynman | 5 | 5 Δ | 2 |
| T, outputs Q and Q' | Peres + 2 Feynman | 6 | 6 Δ | 2 |
| JK, output Q | NOT + 2 Fredkin + Feynman | 12 | 12 Δ | 3 |
| JK, outputs Q and Q' | NOT + 2 Fredkin + 2 Feynman | 13 | 13 Δ | 3 |

The RTL reproduces every number in this table on the running circuit (see
*Verification*).

## The gates

All gates are in `rtl/`. Each has inputs `a b c` and outputs `p q r`, or `a b` and
`p q` for the Feynman gate.

| gate | mapping | QC | depth |
|---|---|---|---|
| Feynman (CNOT) `feynman_gate` | P = A, Q = A ⊕ B | 1 | 1 |
| Peres `peres_gate` | P = A, Q = A ⊕ B, R = AB ⊕ C | 4 | 4 |
| Fredkin `fredkin_gate` | P = A, Q = A'B + AC, R = AB + A'C | 5 | 5 |
| Toffoli `toffoli_gate` | P = A, Q = B, R = AB ⊕ C | 5 | 5 |

The latches use each gate in a few fixed ways:

- **Feynman gate.** With B = 0 it copies A, which is the reversible form of fan-out. With
  B = 1 it gives A and A'.
- **Peres gate.** With C = 1 its R output is NAND(A, B). It is the cheapest 3x3 gate.
- **Fredkin gate.** It is a controlled swap. With A as the select input, its R output is
  the 2:1 multiplexer A ? B : C.
- **Toffoli gate.** No latch here uses it. It is included as the remaining member of the
  basic gate set and appears on its own ports in the top level.

### How the quantum cascades are evaluated

The Peres, Fredkin and Toffoli modules are not written from their Boolean mapping. Each
is its quantum cascade of CNOT, controlled-V and controlled-V+ steps, evaluated one step
at a time. This is the least obvious part of the code.

A controlled-V rotates the target line by a quarter of a NOT (V·V = NOT). In between
steps, a line can therefore hold V|0> or V|1> as well as 0 and 1. `rev_pkg` encodes a line
as a 2-bit phase in quarter turns: 0 = |0>, 1 = V|0>, 2 = |1>, 3 = V|1>. The operations
on this encoding are:

- V adds 1.
- V+ subtracts 1.
- NOT and CNOT add 2.

A control line must hold 0 or 2, and all three cascades only ever use binary controls.
Each gate asserts that all of its output lines are binary again. An assertion failure
therefore means the cascade is wrong, not merely the result.

The cascades, one step per line of code:

- **Peres:** V+(A→C), V+(B→C), CNOT(A→B), V(B→C). C turns by (A⊕B) − A − B = −2AB
  quarter turns, so C is inverted exactly when AB = 1.
- **Toffoli:** V(A→C), CNOT(B→A), V(B→C), V+(A→C), CNOT(B→A). Step 4 uses the line A,
  which holds A⊕B at that point. C turns by A + B − (A⊕B) = 2AB.
- **Fredkin:** the steps are grouped in five time steps:
  1. CNOT(A→C)
  2. CNOT(B→C), then V+(C→B)
  3. CNOT(A→C)
  4. V(A→B)
  5. V(C→B), then CNOT(B→C)

  Steps 2 and 5 each act twice on the same pair of lines. Each such pair counts as one
  2x2 gate, which is why the quantum cost is 5 and not 7.

Because these modules are combinational, they also synthesize. Yosys turns the phase
arithmetic into small adders.

## The Δ clock: how the loops are timed

A latch is a reversible gate network with a feedback loop. If the loop is written as
zero-delay logic, it is only well defined while it holds a value. A T latch with E = T = 1
has no stable state at all. This design therefore makes time explicit:

- Every latch has a `clk` input. One clock period stands for one Δ.
- Every gate instance passes all of its outputs through `gate_delay`, a shift register
  whose length is the gate's logic depth: Feynman and NOT 1, Peres 4, Fredkin 5. A signal
  takes as many clock periods to cross a gate as the gate has time steps.
- A feedback loop of total depth L is then an L-stage ring. The delay from an input to an
  output is the sum of the gate depths on its path. That is how the "delay" column of the
  table is measured.

The ring model exposes the timing rules that any real implementation of these loops has
to obey. The testbenches check each of them:

- **Minimum enable width.** A D latch only holds the new value cleanly once every stage
  of its ring has been rewritten. That takes an enable pulse of at least one loop time
  (6 periods). A shorter pulse leaves a ring that holds a mix of old and new values, and
  Q then alternates with the ring's period.
- **Race-around of the T latch.** With E and T high, Q inverts once per trip round the
  5-period loop. A single toggle needs an enable pulse of exactly 5 periods. A 10-period
  pulse toggles twice.
- **Toggle window of the JK latches.** With J = K = 1, the new value reaches the
  selecting Fredkin gate again 11 periods after E rises (12 for the Q/Q' version). Its
  hold loop is 6 periods. A pulse of 6 to 11 periods (6 to 12) toggles exactly once.
- **Skew in the gated SR latch.** E reaches the R input gate through the S input gate's
  pass-through output, 4 periods late. R must therefore be held for 4 periods after E
  falls.
- **Setup of the JK latches.** J and K pass a NOT gate and a Fredkin gate before the
  selecting gate sees them. They should be steady for 6 periods before E rises.

**Power-up.** The latches have no set or reset input. Every delay stage starts at 0, using
an initial value of the kind FPGA flip-flops support, so every line powers up at 0. The T
latch needs this most: its inputs can only invert what circulates, so a ring of arbitrary
contents could never be cleared. Verilator warns (`PROCASSINIT`) that `gate_delay`
assigns a variable that has an initial value. The warning is expected: the initial value
is this power-up state.

Synthesized, each `gate_delay` becomes a small register array: yosys reports it as memory
bits. The resulting netlist is a cycle-accurate model of the reversible circuit. It is not
a transistor-level latch.

## The latches

Every latch has a `garbage` port that carries its garbage outputs. Its width is the GO
count. These outputs are real gate outputs, so a test can observe them.

### SR latch without enable (`sr_latch`)

This is the cross-coupled NAND latch, with each NAND replaced by a Peres gate whose C input
is tied to 1. Its inputs `s_n` and `r_n` are active low.

- The upper gate computes Q = NAND(Q', S').
- The lower gate computes Q' = NAND(Q, R').

Each R output drives the other gate's A input. A gate's pass-through P output repeats its
A input, so it provides the external copy without any fan-out:

- `q` is the lower gate's P output.
- `q_n` is the upper gate's P output.

The garbage outputs are the two Peres Q outputs, S'⊕Q' and R'⊕Q.

When S' falls, Q rises after 8 periods and Q' falls after 12. R' acts the same way on Q'
and then Q. When both inputs are low, both outputs go to 1, as in any NAND latch.

### Gated SR latch (`gated_sr_latch`)

This is the four-NAND gated latch, with every NAND replaced by a Peres gate (C = 1):

- Input gate S computes NAND(E, S). Its P output passes E on to input gate R.
- Input gate R computes NAND(E, R).
- The two storage gates are connected as in `sr_latch`.

The five garbage outputs are:

- E⊕S (S gate),
- E and E⊕R (R gate),
- NAND(E,S)⊕Q' and NAND(E,R)⊕Q (storage gates).

Set with E = S = 1 and reset with E = R = 1. E = 0 holds.

With E high, Q rises 12 periods after S, which is three Peres gates. Q' falls 16 periods
after S.

### D latches (`d_latch`, `d_latch_qn`)

The D latch follows the equation Q⁺ = D·E + E'·Q.

- A Fredkin gate takes E as its select input, D on B and the fed-back Q on C. Its R
  output is the new Q.
- A Feynman gate with B = 0 splits that value into the output and the feedback line.
- The Fredkin gate's P (= E) and Q (= E'D + EQ) outputs are the garbage.

The `_qn` version adds a second Feynman gate with B = 1 after the first. That gate gives Q
and Q' at a cost of one more unit of QC and delay, with no extra garbage.

With E high, D reaches `q` in 6 periods (7 for `d_latch_qn`). Enable pulses must be at
least 6 periods long.

### T latches (`t_latch`, `t_latch_qn`)

The T latch follows the equation Q⁺ = (T·E) ⊕ Q.

- A Peres gate takes E on A, T on B and the fed-back Q on C. Its R output is T·E ⊕ Q.
- A Feynman gate with B = 0 copies that value to the output and back to C.
- The garbage outputs are the Peres P (= E) and Q (= E⊕T) outputs.

The `_qn` version adds the B = 1 Feynman gate. The loop takes 5 periods in both versions;
the outputs appear after 5 and 6 periods.

### JK latches (`jk_latch`, `jk_latch_qn`)

The JK latch follows the equation Q⁺ = (J·Q' + K'·Q)·E + E'·Q. It has two parts.

**Next-state function.** K passes a NOT gate. A first Fredkin gate then takes the fed-back
Q as its select input, J on B and K' on C. Its Q output is Q'·J + Q·K'.

**Storage.** The next-state value feeds the D latch structure above: a second Fredkin gate
selects it under E, and a Feynman gate copies the result.

The Feynman gate's two copies go to two places:

- one back to the second Fredkin gate,
- one to the first Fredkin gate's select input.

The latch output `q` is the first Fredkin gate's P output, which repeats its select input.
The garbage outputs are the first Fredkin gate's R output and the second Fredkin gate's P
and Q outputs.

`jk_latch_qn` inserts the B = 1 Feynman gate. Its P output is the line fed back to the
first Fredkin gate, and its Q output is `q_n`.

The quoted delays, 12 Δ and 13 Δ, are the depth of the chain from K: NOT, Fredkin,
Fredkin, Feynman, and for the `_qn` version one more Feynman. In this model:

- in `jk_latch_qn`, K reaches `q_n` in exactly 13 periods;
- in `jk_latch`, K reaches the Feynman output that closes the loop in 12 periods.

`q` sits behind the first Fredkin gate's pass-through, so it follows 5 periods later: K to
`q` takes 17 periods (18 for the `_qn` version).

### Top level (`reversible_latches_top`)

The latches are independent circuits. The top places one of each side by side. Each has
its own inputs, outputs and garbage bus, with these port prefixes:

- `sr_` and `gsr_` for the two SR latches,
- `d_` and `dqn_` for the two D latches,
- `t_` and `tqn_` for the two T latches,
- `jk_` and `jkqn_` for the two JK latches,
- `tg_` for the stand-alone Toffoli gate.

All of them share `clk`. The top has no parameters. The gate depths are those of
`rev_pkg`, and each latch can override them through its own `*_DELAY` parameters. A depth
must be at least 1, and `gate_delay` stops elaboration otherwise.

## How far to trust it, and where it departs from the source

These parts follow the published designs:

- the gate mappings;
- the three quantum cascades, which were checked exhaustively against the mappings;
- the netlists of all eight latches;
- the quantum costs, delays and garbage counts in the table above.

These parts are choices made for this RTL:

- **The Δ clock and `gate_delay`.** They are a modelling device that makes the loops
  simulate and synthesize. The source designs are asynchronous gate networks with no
  clock.
- **The output taps.** Where a figure of the source labels the same signal in two places,
  the output is taken from the pass-through line, which avoids fan-out. As a result, the
  complementary output of the SR latches arrives 4 periods after the main one, and `q` of
  the JK latches arrives 5 periods after the chain that the quoted delay counts.
- **Power-up at 0 and no reset.** The source leaves asynchronous set and reset to future
  work.
- **The forbidden inputs.** S' = R' = 0, or S = R = E = 1, produce Q = Q' = 1. They are
  left as they are.
- **The control of the Fredkin cascade's step-5 controlled-V.** It is taken to be line C,
  the only line it connects to.

## Files

- `rtl/rev_pkg.sv`: gate costs and depths, and the quarter-turn line algebra.
- `rtl/feynman_gate.sv`, `rtl/peres_gate.sv`, `rtl/fredkin_gate.sv` and
  `rtl/toffoli_gate.sv`: the gates.
- `rtl/gate_delay.sv`: the per-gate delay line.
- `rtl/sr_latch.sv`, `rtl/gated_sr_latch.sv`, `rtl/d_latch.sv`, `rtl/d_latch_qn.sv`,
  `rtl/t_latch.sv`, `rtl/t_latch_qn.sv`, `rtl/jk_latch.sv` and `rtl/jk_latch_qn.sv`: the
  latches.
- `rtl/reversible_latches_top.sv`: all of them side by side.
- `tb/<module>_tb.sv`: a self-checking testbench for each module.
- `tb/latch_metrics_tb.sv`: reproduces the cost table.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog counts a
failure if a testbench hangs. For example, with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl rtl/rev_pkg.sv \
    tb/jk_latch_tb.sv --top-module jk_latch_tb -Mdir obj_jk
./obj_jk/Vjk_latch_tb
```

Replace `jk_latch` with any other module name. For the whole design, use
`reversible_latches_top_tb` or `latch_metrics_tb`. `rev_pkg.sv` must come first on the
command line. Lint a module with
`verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/rev_pkg.sv rtl/<module>.sv`.
The lint run reports three kinds of warning, all expected:

- unused constants, because the cost constants are there for reference and for
  `latch_metrics_tb`;
- the unused lower bit of control lines;
- the initial value in `gate_delay`.

## Verification

- **Gates.** All input vectors are compared with the Boolean mapping, and a further check
  confirms that the mapping is one-to-one.
- **`gate_delay`.** Random data is compared with a record of the input, at depths 1 and 5.
- **Each latch.** The testbench checks:
  - set, reset, write, toggle and hold against a one-bit reference model;
  - the exact input-to-output delay in clock periods;
  - that Q' is the complement of Q;
  - the garbage outputs in steady state against their formulas;
  - the ring effects described above: the short enable pulse, the T latch's race-around,
    and the JK toggle window at both of its edges.
- **`reversible_latches_top_tb`.** It runs every latch and the Toffoli gate at default
  depths. It counts each mechanism it exercises (set, reset, hold, toggle, race-around,
  forbidden input, delay) and fails if any count stays zero.
- **`latch_metrics_tb`.** It reads each latch's `QUANTUM_COST` constant and garbage width,
  and measures the eight delays on the running design.
