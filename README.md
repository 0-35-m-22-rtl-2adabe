# Programmable multiphase clock for a circular memory SC FIR filter

A switched-capacitor (SC) FIR filter built as a *circular memory* has one
analog memory cell per tap. Each new input sample overwrites the oldest cell,
and the coefficients rotate past the cells, so the samples never move. Such a
filter needs one pair of clock phases per cell, and the phases of adjoining
cells must meet cleanly. If two phases overlap, the filter is briefly shorted
and loses stored charge. If a gap is left between them, the op amp loops open
for a moment and the output shows spikes.

This design generates those phases and makes them programmable in two ways:

* **Division into sections.** Five D flip-flops form a *self-correcting
  counter*, and S cells reconfigure its feedback loop. The counter then runs
  either as one 5-stage loop (10 phases, one 5-tap filter) or as two
  independent 3- and 2-stage loops (6 + 4 phases, a 3-tap and a 2-tap filter
  running side by side). Short sections need a smaller spread of coefficient
  capacitors, which saves area and power.
* **Crossing points set from outside.** The flip-flop outputs are not used as
  phases. Each phase is *cut* out of a flip-flop output by a NAND gate with
  one of two external clocks, `clk` or `clk1`. Every phase edge is therefore
  an edge of `clk` or `clk1`. The overlap or dead time between adjoining
  phases is set only by the pulse widths of those two clocks, not by gate
  delays inside the generator.

The RTL contains the generator, the digital coefficient ring that rotates
the coefficients, and a behavioural (real-valued) model of the analog filter.
The three are wired together in `sc_fir_clk_top`.

## Slots and phases

One *slot* is one period of the external two-phase clock. In each slot, one
flip-flop of each loop holds the single 1. Two phases are cut from it:

```
            |<------------- slot i ------------->|<--- slot i+1 ---
clk      ___/‾‾‾‾‾‾‾‾‾‾\________________________/‾‾‾‾‾‾‾‾‾‾\______
clk1     ________________/‾‾‾‾‾‾‾‾‾‾‾\___________________________/‾‾
q_i      ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________________________   (steps at clk1 fall)
q_i+1    ______________________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
p[2i]    ___/‾‾‾‾‾‾‾‾‾‾\___________________________________________   = q_i & clk
p[2i+1]  ________________/‾‾‾‾‾‾‾‾‾‾‾\_____________________________   = q_i & clk1
p[2i+2]  ________________________________________/‾‾‾‾‾‾‾‾‾‾\______   = q_i+1 & clk
                      gap          gap2
```

`p[0..9]` are the phases p1..p10, and `n = ~p` are their complements n1..n10.
The counter steps on the **falling edge of `clk1`**. At that moment both
clocks are low, so `q` never changes while a gate is open, and the phases are
glitch free. The timing needs two gaps:

* `gap`: from the fall of `clk` to the rise of `clk1`. This is the crossing
  between the two phases of one slot. It may be positive (dead time), zero
  (edges coincide, which is the ideal crossing) or negative (the phases
  overlap, which is not acceptable in the filter).
* `gap2`: from the fall of `clk1` to the next rise of `clk`. This is the
  crossing between slots. It must be **positive**, because the counter steps
  inside it.

In one-section mode, phase p1 repeats every 5 slots. In two-sections mode,
p1..p6 repeat every 3 slots and p7..p10 every 2 slots. Both sections run at
the same time from the same `clk`/`clk1`.

## The self-correcting counter and its reconfiguration

`sc_ring_counter` is a shift chain `q0 → q1 → q2 → (s4) → q3 → q4`. The first
flip-flop of each loop is loaded with the NOR of all the loop's stages except
the last. It therefore receives a 1 only when the loop has been empty long
enough, so the loop carries a single 1. Any other state, such as the state
after power-up or after a reconfiguration, is purged within **L − 1 clocks**
for a loop of length L. The argument for this bound is short. Two 1s entering
the loop must be at least L clocks apart. If no 1 enters for L − 1 clocks,
the stage that blocked entry has shifted to the end of the loop and is then
the only 1. The testbenches check this bound from hundreds of scrambled
states.

The feedback network is a tree of three S cells. An S cell computes
`out = sx ? (in1 & in2) : in1`. It either merges a second term into the
feedback or drops it:

```
a  = S(s3; ~q0, ~q1)
b  = S(s1; ~q3, ~q2)
D0 = S(s2; a, b)
D3 = s4 ? q2 : b
```

| mode | s1 | s2 | s3 | s4 | loops | feedback |
|---|---|---|---|---|---|---|
| one section (`CFG_ONE_SECTION`) | 1 | 1 | 1 | 1 | q0..q4 | D0 = ~(q0\|q1\|q2\|q3) |
| two sections (`CFG_TWO_SECTIONS`) | 0 | 0 | 1 | 0 | q0..q2 and q3..q4 | D0 = ~(q0\|q1), D3 = ~q3 |

No other setting produces a usable phase sequence, and `mp_clkgen` asserts
that none is used outside reset. A mode can be changed on the fly: the
counter corrects itself within a few slots. The coefficient ring does not,
so to reprogram the filter, hold it in reset and reload the coefficients
(see below).

The asynchronous reset `rst_n` clears all stages. The counter works without
it; the reset exists only to start every loop at a known slot. The first
falling `clk1` edge after reset starts slot 0, with q0 set, and q3 also set
when there are two sections.

## Coefficients and the filter

In a circular memory filter, cell j of a section of length L, at the slot
that writes cell c, holds the sample x[t − ((c − j) mod L)]. To form
y[t] = Σ h[k]·x[t − k], cell j must therefore see coefficient h[(c − j) mod L].
`coef_ring` keeps one 8-bit two's-complement word per cell and rotates the
words one cell "down" per slot, with the last word wrapping to the first.
A load places them for slot 0: cell 0 gets h0, cell 1 gets h(L−1), and so on,
with the last cell getting h1. In two-sections mode the ring is cut after
word 2 into a 3-word and a 2-word ring. This corresponds to closing switches
m2 instead of m1.

`sc_fir_analog` is a behavioural model of the analog part. It is not
synthesizable. Voltages are `real`. In slot i, the first phase `p[2i]`
samples the section's input (`in1`, or `in2` for cells 3..4 in two-sections
mode) into cell i. The second phase `p[2i+1]` forms the section output
Σ (word_j / 128) · cell_j. The second output amplifier is off in one-section
mode, so `out2 = 0` there. Capacitors and op amps are ideal: the model does
not reproduce the charge loss of overlapping phases. Overlap is visible only
on the phases themselves.

## Using `sc_fir_clk_top`

```
ports: clk, clk1          external two-phase clock (see timing above)
       rst_n              asynchronous, active low
       two_sections       0: one 5-tap filter  in1 -> out1 (10 phases)
                          1: 3-tap in1 -> out1 and 2-tap in2 -> out2 (6 + 4 phases)
       coef_load, coef_in[5]   coefficients h0.. per section (8-bit signed, gain w/128)
       in1, in2, out1, out2    real-valued filter signals (behavioural model)
       q[5], p[10], n[10]      basic signals and phases, brought out
```

Programming sequence:

1. Hold `rst_n` low.
2. Set `two_sections`.
3. Apply `coef_in` with `coef_load` = 1 across one falling edge of `clk1`.
4. Release `rst_n`.

The ring steps at every falling `clk1` edge at which a counter stage was
set, so it skips the start-up edge and stays aligned with the counter.
`out1`/`out2` are valid from the rise of each slot's second phase until the
next one.

## Files

| file | contents |
|---|---|
| `rtl/clkgen_pkg.sv` | sizes (5 stages, 10 phases, split after stage 3, 8-bit words), `clk_cfg_t` (s1..s4) and the two configurations |
| `rtl/s_switch.sv` | S cell |
| `rtl/sc_ring_counter.sv` | self-correcting counter with S-cell feedback |
| `rtl/phase_cutter.sv` | NAND + inverter phase gating |
| `rtl/mp_clkgen.sv` | clock generator = counter + cutter, configuration assertion |
| `rtl/coef_ring.sv` | circular coefficient memory, splittable |
| `rtl/sc_fir_analog.sv` | behavioural model of the SC filter |
| `rtl/sc_fir_clk_top.sv` | everything wired together |
| `tb/two_phase_src.sv` | behavioural external clock with adjustable widths and gaps |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`. Run one with Verilator 5, for example the
end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb rtl/clkgen_pkg.sv tb/tb_sc_fir_clk_top.sv \
    --top-module tb_sc_fir_clk_top --Mdir obj_dir -o sim && ./obj_dir/sim
```

(`-Wno-fatal` keeps lint warnings, such as those about variable delays in the
clock source, from stopping the build.) The testbenches check the following:

* `tb_s_switch` and `tb_phase_cutter` check their modules exhaustively.
* `tb_sc_ring_counter` checks the exact slot sequence in both modes, and
  recovery within L − 1 clocks from states scrambled by unsupported
  settings and by mode changes without reset.
* `tb_mp_clkgen` checks every phase pulse in both modes and with three clock
  timings (coinciding, dead time, overlap): its order, width, period, its
  crossing with the previous phase (which must equal the programmed gap) and
  n = ~p.
* `tb_coef_ring` checks the word at every cell against the slot number,
  including steps with the shift disabled.
* `tb_sc_fir_analog` and `tb_sc_fir_clk_top` compare the filter outputs with
  a direct FIR sum over the input history. The top-level test runs at the
  design's full size. It covers both modes, all three crossing types, a mode
  change without reset, and ring wrap-around, and counts each of them.

The design is small, and every test finishes in well under a second.

## What is fixed and what was chosen

These parts follow the published description of the generator:

* five flip-flops, the self-correcting counter, and the reconfigurable
  feedback built from S cells and the s4 switches;
* the controls s1..s4;
* phases cut by NAND gates from the flip-flop outputs with the external
  `clk`/`clk1`;
* 10 phases in one section, and 6 + 4 phases in two;
* the circular coefficient ring split by m1/m2;
* the second output amplifier switched off in one-section mode.

The following are choices made in this RTL. Each could reasonably be done
differently:

* which inverted outputs feed which S cell, and the AND function of the cell;
* the counter stepping on the falling edge of `clk1`, and the added reset;
* `clk` cutting the first phase of a slot and `clk1` the second;
* the two supported s1..s4 settings, and deriving s1..s4 and m1/m2 from one
  mode bit;
* the coefficient width (8 bits), its load port and order, and its gain
  scale;
* which phase samples and which evaluates in the filter model.

The following are not modelled:

* charge loss and op-amp saturation caused by bad crossings, because the
  filter model is ideal;
* the 0.35 µm layout and its power (22 µW at 100 MHz from 2 V);
* the electrical waveforms of the phases.

The RTL itself sets no frequency limit.
