# Octa-phase clock corrector (8 GHz, coprime phase comparison)

A serial link transmitter that runs at one eighth of its bit rate needs eight
clock phases spaced exactly T/8 apart, each with a 50 % duty cycle. At 8 GHz
T/8 is 15.6 ps, and a few picoseconds of skew from the clock distribution
already close the data eye. This design corrects the eight phases locally with
a digital delay-locked loop that measures every phase with **one** shared
bang-bang phase detector. Because the same detector judges all pairs, its
offset is common to every measurement and cancels out.

The key idea is the **coprime comparison**. The loop does not compare
neighbouring phases T/8 apart, which would need a 15.6 ps reference delay and a
very tight race in the detector. It compares CK(i) with CK(i+3), three phases
apart, against a 3T/8 (46.9 ps) reference delay. Three is coprime to eight, so
the chain CK0 -> CK3 -> CK6 -> CK1 -> ... visits all eight phases before it
returns. Forcing every 3-step gap to 3T/8 therefore forces every 1-step gap to
T/8.

The RTL holds two correctors, side by side in `clock_corrector_top`:

| | phase-only corrector `oec_prototype1` | phase and duty corrector `octa_clock_corrector` |
|---|---|---|
| per-phase cell | delay line, 5 bit, 0.5 ps/LSB | clock control cell: delay 6 bit at 0.25 ps; duty 6 bit at 0.325 ps (falling edge only) |
| selector | 8:2 MUX: two 5-bit 8:1 slices | three 5-bit 8:1 MUXes (shared, phase, duty) |
| detectors | one BBPD | two BBPDs, plus an edge converter |
| deserializer | 1 lane (8-bit word) | 2 lanes (16 bits: phase word and duty word) |
| loop filters | phase filter with lock detection and clock gating | phase filter, plus a duty filter at 1/8 of the phase-filter rate |

## Signal path and the selection loop

Each input phase `ck_in[k]` passes its own delay cell and becomes `ck_out[k]`.
Everything else is the calibration loop. It taps the corrected outputs through
a glitch-free clock gate (`clk_gate`).

1. **Selection.** `mux_sel_gen` holds a pair index `idx` that counts backwards,
   7, 6, ..., 0, 7, ... For pair `idx` the first MUX passes CK(idx) (CK_MUX0)
   and the second passes CK(idx+3) (CK_MUX1). Each 8:1 MUX (`mux8_5b`) has an
   even path and an odd path behind a final 2:1 stage. The 5-bit select code
   is `{sel4, odd index, even index}` with `sel4 = idx[0]`. The idle path
   always holds the next phase, idx-1. So a step of the rotation changes only
   the final stage, and no intermediate clock reaches the output. The idle
   path's own select bits may change while it is idle.
2. **Divided clocks.** A full-rate 125 ps selection loop has no timing margin.
   The index therefore steps on CK_MUX0 divided by four (`div4`, a two-flop
   twisted ring). Each pair is then compared during four clock cycles.
3. **Comparison.** CK_MUX0 passes the octa-delay line: a `dcdl` with 6 bits,
   0.2 ps/LSB and a 40 ps intrinsic delay, which covers 3T/8. The resulting
   CK_D races CK_MUX1 in the BBPD (`bbpd`), an arbiter latch that remembers
   which rising edge came first.
4. **Sampling and power-up.** The BBPD latch is sampled on CK_MUX1 divided by
   four. The phase of that second divider decides which race is sampled, so
   `pwrup_seq` starts it at a fixed point: CK0/4 runs through a four-flop chain
   on CK_MUX1, and the second divider is released on the edge after that. Its
   rising edge then falls on the third CK_MUX1 edge of every selection slot:
   - the first edge of a slot still races the previous pair's delayed clock;
   - the second edge is the first true race of the new pair;
   - the third edge samples the latch holding that result.
5. **Deserializer.** `bbpd_des` writes each sampled bit to position `idx` of a
   word. It registers `idx` and `sel4` one slot late, to match the detector
   latency. It also checks that the index steps backwards and that `sel4`
   equals the index parity. A clean round yields one word with a `valid`
   pulse. A broken round is dropped and pulses `seq_err`.

Bit `i` of a word is 1 when CK(i), delayed by the octa line, arrived after
CK(i+3).

## The phase loop filter (`oec_dlf`)

This is the least obvious part of the design. Every clock k takes part in two
pairs:
- as the leader of pair k;
- as the follower of pair k-3.

From one 8-bit word the filter derives:

- **down candidate** k: `err[k] = 1` and `err[k-3] = 0`. CK(k) is late against
  both neighbours in the 3-step chain, so its delay should shrink.
- **up candidate** k: `err[k] = 0` and `err[k-3] = 1`.
- **all eight bits equal**: the gaps are all too long (all ones) or all too
  short (all zeros). This is a common-mode error, so only the octa code moves:
  down for all ones, up for all zeros.

The filter moves at most one main code per word. This keeps the correction
steps small, and so keeps the jitter the loop adds low. The rules are:

- Down candidates come before up candidates. This is minimum-total-delay
  tracking: the loop removes delay where it can instead of adding it.
- Among candidates of one kind, the highest clock index wins (CK7 first).
- If the chosen code is already at its limit, the same *relative* correction
  is made by moving the other seven codes one step the opposite way. Only the
  differences between codes matter. This step is skipped if one of those seven
  codes is at its own limit.

A consequence worth knowing: on a ring of eight pairs spaced three apart, every
word that is not all-equal contains at least one down candidate. With
down-first priority, a main code therefore never rises directly. Codes rise
only through the limit rule. The loop settles with its smallest code at 0,
which is the minimum total delay. The common spacing is then set by the octa
code.

A bang-bang loop never stops moving. It settles into a dither of one or two
steps. `locked` rises when every code has stayed within `LOCK_BAND` (2) steps
of its value at the start of an observation window for `LOCK_LEN` (64) words
in a row. That is about 0.26 us at 8 GHz. The two numbers are tuned against
each other:
- A one-step band never locks when a code sits at 0. The limit rule then moves
  seven codes at once, and the dither spans two steps.
- A two-step band over only 16 words locks while the loop is still converging.

In the phase-only corrector, `locked` gates the calibration clocks off, and the codes
hold. Dropping `cal_en` clears the lock and restarts the loop from the held
codes.

## Duty-cycle correction (`octa_clock_corrector`)

Once the phase loop has made every gap T/8, CK(i+4) rises exactly T/2 after
CK(i). Comparing the **falling** edge of CK(i) with the **rising** edge of
CK(i+4) therefore measures CK(i)'s high time against T/2, without a second
reference delay line.

- The shared MUX passes CK(i) to both paths.
- The phase MUX passes CK(i+3) to the phase comparison, as in the phase-only
  corrector.
- The duty MUX passes CK(i+4).
- All three MUXes use the same select code.
- The edge converter (`edge_converter`) inverts CK(i), turning its falling edge
  into a rising edge. CK(i+4) takes a matched non-inverting path. The model
  keeps a 0.05 ps mismatch between the two paths.
- A second BBPD compares the two outputs.

The clock control cell moves only the falling edge with its duty code. If duty
correction moved both edges, it would disturb the rising-edge spacing that the
phase loop is holding, and the two loops could push a code to overflow.

The two detector bits of each slot share the deserializer as two lanes.
`dcc_dlf` steps all eight duty codes once every 8 words (`DCC_DIV`): down where
the falling edge was late, up where it was early. The duty loop's gain is thus
one eighth of the phase loop's, so the duty loop follows a phase loop that has
already settled. There is no lock detector here. `cal_en = 0` is the
calibration-disable mode: the loop clocks stop and the codes hold.

## Analog cells are behavioural models

The delay lines, the clock control cell, the edge converter and the BBPD
arbiter are analog circuits. Their models (`dcdl`, `clock_control_cell`,
`edge_converter`, `bbpd`) are marked as behavioural in their headers:

- Delays are linear in the code.
- Edges use transport delay, so no pulse is swallowed.
- The arbiter decides on the first rising edge after a 5 ps resolution time.
- Intrinsic delays are this design's assumptions: 20 ps for the cells, 40 ps
  for the octa line, 10 ps for the edge converter.
- There is no jitter, no metastability and no supply sensitivity.
- Thermometer coding and the split into coarse and fine stages are folded
  into one linear step per code.

All other blocks are synthesizable logic. The models need `timeunit 1ps` and
`timeprecision 1fs`, which every file declares.

## Where this design departs from or adds to the original

- **Power-up sequence** (`pwrup_seq`): the need for it is given; the exact step
  sequence is this design's.
- **5-bit select code**: the bit assignment and the backward rotation order of
  the even/odd paths are this design's.
- **Lock criterion and the limit rule** in `oec_dlf`: both are this design's.
  A limit rule is needed because a code stuck at 0 would otherwise stall the
  loop.
- **Duty MUX wiring**: input j of the duty MUX is CK(j+4), the complement of
  what the shared MUX passes. The original states only that the duty MUX
  follows the same CK7-to-CK0 sequence as the phase loop.
- **Duty filter**: the update rule (all eight codes stepped together every
  8 words, saturating) is the simplest one that matches the stated 8:1 gain
  ratio.
- **Deserializer check**: it checks the whole index sequence, not only `sel4`,
  and drops a broken round instead of passing it on.
- **Resets**: all codes reset to mid-scale. The loop logic is reset by
  `rst_n & cal_en`. Each `div4` has an asynchronous clear so that the two
  dividers start in a known phase.
- **Duty step**: 0.325 ps is the measured 0.26 % of a 125 ps period.
- **Delay step of the clock control cell**: the design value 0.25 ps is used.
  The chip measured 0.5 ps.
- **Not modelled**: the eight-phase test clock generator, the skew-programming
  cells, the output phase interpolator and the CML output driver are
  measurement circuits. The testbenches replace them with an ideal skewed
  eight-phase source (`tb/octa_clk_src.sv`).

## Results in simulation

All runs use 8 GHz with the default parameters.

- **Phase-only corrector.** Input skews up to 5 ps (7 ps worst initial gap
  error). It locks after about 0.6 us. Worst neighbour-gap error after lock is
  0.5 ps, i.e. one LSB. After lock the loop clocks stop.
- **Largest input errors** (`tb_oec_max_skew`). Four cases: one phase 11.8 ps
  late, one phase 11.8 ps early, two phases ±5.9 ps, and a mixed pattern up to
  6 ps. All lock within 1 us, with 0.5 ps worst gap error.
- **Phase and duty corrector.** Input skews up to 5 ps and duty errors up to
  3 %. After 3 us the gap error is 0.25 ps and the high-time error is 0.5 ps.
  Counts: 773 phase words and 97 duty updates.

Ranges at the defaults:
- Main delay line: 15.5 ps.
- Clock control cell: 15.75 ps of delay and ±10.4 ps of falling-edge shift.
- Octa line: 40.0 to 52.6 ps around 3T/8.

## Files and simulation

`rtl/`:
- `occ_pkg.sv`: shared constants and types.
- `clock_corrector_top.sv`: top level.
- `oec_prototype1.sv`, `octa_clock_corrector.sv`: the two correctors.
- Building blocks: `mux8_5b`, `mux_sel_gen`, `div4`, `pwrup_seq`, `clk_gate`,
  `bbpd_des`, `oec_dlf`, `dcc_dlf`.
- Behavioural models: `dcdl`, `bbpd`, `clock_control_cell`, `edge_converter`.

`tb/`:
- One self-checking testbench per module, `tb_<module>.sv`.
- `octa_clk_src.sv`: the programmable eight-phase source.
- `tb_oec_max_skew.sv`: the phase-only corrector against the largest input
  phase errors it is sized for.
- `tb_clock_corrector_top.sv`: runs both correctors end to end at full size.
  It counts each mechanism: octa updates, code decreases and increases,
  duty-code moves in both directions, the 8:1 update ratio, lock, clock
  gating, the monitor MUX and the sequence check. A mechanism that never
  happens is a failure.

Every testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  +libext+.sv rtl/occ_pkg.sv tb/tb_clock_corrector_top.sv --top-module tb_clock_corrector_top -o sim
./obj_dir/sim
```

The top-level run simulates 3 us of both correctors in a few seconds. The
testbenches expect registers to start at arbitrary values, as in a two-state
simulator with random initialisation, so they apply reset as a real falling
edge on `rst_n`. The models are only transport delays, so the whole design
simulates in event time with `--timing`.
