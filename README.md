# SET pulse-width test structure

When an ion strikes a CMOS circuit it can leave a single event transient (SET): a
voltage pulse, tens to hundreds of picoseconds wide, that travels through the
logic behind it. Radiation-hardening schemes such as double sampling and TMR need
to know how wide these pulses get. This design measures that width on the die. It
has two parts:

* a **target (capture) chain**, 600 stages that are exposed to the beam. An ion hit
  on one of its NOR2 gates launches a pulse. A hit on one of its inverters is masked.
* a **measurement row**, 100 flip-flops that freeze the passing pulse as a run of
  ones and then shift it out. The pulse width is read to about 10 ps.

The SystemVerilog models both parts, the skewed clock that drives the row, and the
100-stage delay chains used to study how a pulse widens or narrows with depth. The
control of the row is synthesizable logic. Everything whose function *is* its
timing (delay stages, the clock skew, the struck gates) is a behavioural timing
model in picoseconds. These models simulate with `verilator --timing` but are not
meant for synthesis.

## How a pulse becomes a run of ones

The row is a chain of 100 identical stages. Each stage holds a balanced inverter
pair and a scan flip-flop (`set_dff_stage`):

```
 d0 ─►[pair]──┬─►[pair]──┬─►[pair]──┬─► ...  ─► d_fwd_out
              D          D          D
            FF 0       FF 1       FF 2   ...
              ▲          ▲          ▲
 clk_in ─► clk[0] ─20ps─ clk[1] ─20ps─ clk[2] ...
```

* The pulse moves along the data path at **9.337 ps per stage**.
* Flip-flop *n* is clocked by `clk[n]`, which arrives **20 ps** after `clk[n-1]`.
  A clock edge therefore travels along the row as a wavefront that is slower than
  the data.

If the wavefront leaves stage 0 shortly before the pulse does, the pulse catches up
with it. From then on each flip-flop samples the pulse
`T_EFF = 20 − 9.337 = 10.663 ps` later, measured from the pulse's own leading edge,
than the flip-flop before it did. The flip-flops that sample while the pulse is
passing store 1. A pulse of width W therefore leaves about `W / 10.663` ones, for
example:

| pulse | ones | estimate (ones × 10.663 ps) |
|------:|-----:|---------:|
| 50 ps | 4 | 42.7 ps |
| 200 ps | 18 | 191.9 ps |
| 400 ps | 38 | 405.2 ps |

The values in the table come from `tb_set_dff_chain`. The estimate is always within
one stage (±10.7 ps) of the true width. The whole method depends on the pulse
keeping its width as it travels. That is why every stage is a matched, balanced
inverter pair, and why the chains in the last section exist.

SETs are asynchronous, so the tester cannot know where the wavefront meets the
pulse. Two truncated cases can happen:

* If the wavefront leaves too late, only the tail of the pulse is caught (a run
  that starts at stage 0).
* If the wavefront leaves too early, the run hits the end of the row.

Truncated runs still count as hits, but their length means nothing.

## Modes: start, stop and scan

Every flip-flop has a scan enable `se = NAND(start, stopn)`. Two latches, the
**start circuit** and the **stop circuit** (`sr_nor_latch`, each a pair of
cross-coupled NOR2 gates), drive `start` and `stopn` for the whole row:

| start | stopn | se | mode | flip-flop clock / input |
|:-:|:-:|:-:|---|---|
| 0 | 1 | 1 | armed, scan | `shift_clk` / `si` |
| 1 | 1 | 0 | functional (capture) | `clk[n]` / data path |
| 1 | 0 | 1 | frozen, scan (read-out) | `shift_clk` / `si` |

Operation:

1. **Re-arm.** Pulse `rst_n` low. Both latches clear, so the row is in scan mode.
   Shift at least 100 zeros in through `si` on `shift_clk` (50 MHz nominal). The
   flip-flops have no reset; shifting zeros is how they are cleared. Then hold
   `shift_clk` low and let the capture clock run.
2. **Start.** The pulse reaching `d0` sets the start latch. The row switches to
   functional mode at once, without outside help.
3. **Stop.** The pulse reaching the tap after stage 90 sets the stop latch, and
   `stopn` falls. The row returns to scan mode and holds what it caught. Later
   capture edges are ignored.
4. **Read-out.** Apply 100 `shift_clk` pulses. `scan_out` gives stage 99 first,
   then 98, and so on, for example `000001111111111000000...`.

The capture clock period should be longer than the functional window (about
850 ps, see below), so that each stage sees at most one capture edge. A second edge
would overwrite what the first one caught. The testbenches use 2 ns.

**Clock selection is this design's own choice.** The stage picks its flip-flop clock
with `se` (`ff_clk = se ? shift_clk : clk`): the stage is clock-gated and sees only
the clock of its current mode. This is a plain multiplexer, so `shift_clk` must be
low whenever the mode changes. Otherwise the switch can make a false edge.

## The capture window and its limit

The functional window opens when the pulse enters the row. It closes when the
pulse's leading edge reaches the stop tap, `91 × 9.337 ≈ 850 ps` later. After that,
capture edges are ignored. The wavefront needs 20 ps per stage to get to where it
meets the trailing edge of the pulse. So a pulse is captured whole only if

```
0.876·x + 1.876·W ≤ 832 ps        (x = how far the wavefront leads the pulse)
```

This gives **W ≤ about 440 ps** with the stop at stage 90. The row itself has enough
stages for 790 ps (74 stages), but such a pulse is cut to 41 ones by the stop.
The original characterisation covered 50–790 ps, but it drove `start` and `stopn`
from outside the circuit. With the self-timed stop, the RTL reproduces the range up
to about 440 ps. To measure longer pulses, move the stop tap, shorten the skew, or
drive the latches from outside.

In the model the latches and the scan-enable gate switch with no delay. In silicon,
the delay from the stop tap to the scan enable is matched to the 9 stages the pulse
still has to travel to reach the end of the row. That delay shifts the window's end
by about 84 ps but does not change the argument above.

`tb_pw_sweep` repeats the characterisation with the latches driven from outside:
75 widths from 50 to 790 ps in 10 ps steps. Every width is read to within one stage
(10.7 ps). The relative error runs from −14.7 % at 50 ps, where one stage is a large
fraction of the pulse, to +6.6 %. The original reported −4 % to +5 %, or within
10 ps.

## Target chain and strike masking

A capture stage (`set_capture_stage`) is a high-drive NOR2 with one input grounded,
so it acts as an inverter. It drives four minimum-size inverters whose outputs are
tied together. The stage is non-inverting. Six stages make a unit cell
(`set_capture_unit`), and 100 unit cells in series make the chain
(`set_capture_chain`). The chain's output drives `d0` of the row.

Strikes are inputs of the model: `nor_strike[u*6+s]` hits the NOR2 of stage *s* in
unit *u*, and `inv_strike[u*6+s][i]` hits its inverter *i*. A strike flips the
struck gate's output for as long as the strike input is high.

* **NOR2 hit.** The stage output flips, and a pulse of the strike's length runs to
  the row. This is how an SET is generated.
* **One inverter hit.** The three healthy inverters overpower the struck one, and
  the tied node does not move. The model resolves the node by count: 3 or 4
  inverters driving a level set it.
* **Two against two.** The node keeps its previous level (a latch, intended). This
  is this design's choice. The layout keeps the four inverters of a stage apart so
  that one ion cannot hit two of them.

The delay of a capture stage was not published. 10 ps is assumed
(`CAP_STAGE_DELAY_PS`). The SET therefore reaches the row `(600 − s) × 10 ps` after
a strike at stage *s*.

## Keeping the pulse width: the delay-chain models

A stage whose rise and fall delays differ changes the width of every pulse that
passes, by `t_fall − t_rise` for a high pulse. Over 100 identical stages this adds
up. `inv_pair_stage` and `set_capture_stage` model each stage with separate rise
and fall delays. `pw_test_chain` strings N stages together and exposes every tap.
The published 100-stage results, with a 205 ps pulse, convert to these per-stage
mismatches:

| chain | corner | per-stage mismatch | output width |
|---|---|---:|---:|
| inverter pairs, unmodified cells | FS | +370 fs | 242 ps (+18.05 %) |
| NOR2 pairs, unmodified | SF | +828 fs | 288 ps (+40.39 %) |
| NOR3 pairs, unmodified | FS | −554 fs | 150 ps (−27.02 %) |
| any chain, balanced (skewed transistor sizes) | — | ≈ 0 | ≈ 205 ps |

`tb_pw_test_chain` checks these numbers. The top carries one 100-stage chain of each
type beside the main path, with its own input `pw_in[g]` and output `pw_out[g]`.
These chains use the balanced delays. A NOR with grounded spare inputs is
logically an inverter, so one chain model serves all three gate types. Only the
delays differ. The row's own stage uses equal delays (9.337 ps), as the balanced
design intends. Setting `T_RISE_PS` and `T_FALL_PS` apart lets you study how an
unbalanced row would misread pulses.

## What is logic and what is a model

| module | kind | role |
|---|---|---|
| `set_test_structure` | structural top | capture chain → row, clock distribution, study chains |
| `set_dff_chain` | logic | 100-stage row, start/stop latches, scan chain |
| `set_dff_stage` | logic (+ delay model) | scan flip-flop, NAND2 scan enable, clock select |
| `sr_nor_latch` | logic (latch) | start and stop circuits |
| `set_pkg` | package | sizes and delays |
| `inv_pair_stage` | timing model | balanced inverter pair |
| `pw_test_chain` | timing model | pulse-width study chains |
| `skewed_clock_tree` | timing model | 20 ps per stage clock skew |
| `set_capture_stage/_unit/_chain` | timing model | target chain and strike masking |

The timing models use `timeunit 1ps; timeprecision 1fs;` and transport-style
delayed assignments. Each model is meant for pulses wider than its own stage delay.
Verilator drops a pulse that is shorter than the delay it passes through. Another
simulator may carry it instead. Every module sets its own time unit, so no
`` `timescale `` is needed.

Not modelled:

* Analog pulse shaping: slew, amplitude, the SOI history effect, and corner
  dependence beyond the rise/fall parameters.
* Gate delays inside the latches and the scan-enable logic.
* The hold-fix buffer on the scan path.
* The configurable thick-gate TID (total ionising dose) structure. It is a
  transistor array biased into INV, NAND2, NOR2 or pass-gate form for leakage
  measurement, and has no logic function that could be written without guessing
  its wiring.
* The full array. The original plans about 40,000 flip-flops in independent rows,
  but describes only one 100-stage row, which is what is built. `N` and `N_UNITS`
  are parameters.

## Parameters

| parameter | default | where |
|---|---:|---|
| `N_STAGES` / `N` | 100 | row stages |
| `STOP_TAP` / `STOP_AT` | 90 | stop tap (after stage 90) |
| `STAGE_DELAY_PS` | 9.337 | row stage delay |
| `CLK_SKEW_PS` | 20.0 | clock skew per stage |
| `CAP_UNITS` / `N_UNITS` | 100 | capture unit cells |
| `CAP_STAGES_PER_UNIT` | 6 | stages per unit cell |
| `CAP_INVS` | 4 | parallel inverters per stage |
| `CAP_STAGE_DELAY_PS` | 10.0 | capture stage delay (assumed) |

## Simulating

Each testbench checks itself and prints one line,
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -y rtl rtl/set_pkg.sv tb/tb_set_dff_chain.sv \
          --top-module tb_set_dff_chain
./obj_dir/Vtb_set_dff_chain
```

| testbench | what it shows |
|---|---|
| `tb_set_test_structure` | full size: strikes at several places and widths → row content bit for bit against a timing model, masked inverter strikes, truncation of a 790 ps pulse, the three study chains; counts every mechanism (about 1 min) |
| `tb_pw_sweep` | 75 widths, 50–790 ps, with start/stopn driven from the bench |
| `tb_set_dff_chain` | row alone: 50–440 ps captured within one stage, 790 ps truncated, front-truncated capture |
| `tb_set_dff_stage` | mode switching, sampling after the inverter pair, 9.337 ps delay |
| `tb_sr_nor_latch` | set, hold, reset priority |
| `tb_skewed_clock_tree` | every tap exactly n × 20 ps late |
| `tb_inv_pair_stage`, `tb_pw_test_chain` | rise/fall delays and pulse-width growth per stage |
| `tb_set_capture_stage/_unit/_chain` | delays, strike-launched SETs, masking, 2-against-2 hold |

Verilator is a two-state simulator, and the designs do not rely on x. All state
that the tests read is either initialised in the models or cleared by the scan
sequence.
