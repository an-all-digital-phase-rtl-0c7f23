# All-digital PLL with TDC-based frequency acquisition

This is an all-digital phase-locked loop (ADPLL) that locks a ring oscillator to a
reference clock in two separate steps:

1. **Frequency acquisition.** It does not nudge the oscillator "faster/slower" one
   step at a time. Instead a time-to-digital converter (TDC) measures how much longer
   or shorter one oscillator period is than one reference period, in 20 ps units. The
   coarse control word is then corrected by that amount in one step. The oscillator is
   close to linear, so a single correction lands within a step or two of the target.
2. **Phase acquisition.** The oscillator is stopped and restarted on a reference rising
   edge, so the two clocks start aligned. A bang-bang loop with a step that doubles every
   cycle then moves the fine control word to keep the edges together.

The target is a 700 MHz clock from a 570–800 MHz oscillator with 6 coarse and 6 fine
control bits. At 700 MHz the model below reaches frequency lock 3–4 reference cycles after
reset, and phase lock 2–8 cycles after that. The original transistor-level circuit
reports 5 and 10 cycles.

The synthesizable logic is in `adpll_digital`. The oscillator, the TDC delay chain and one
clock buffer are analog cells, so they appear here as behavioural models. `adpll_top`
joins the two and is a simulation model of the complete loop.

```
 ref_clk ─┬─► tdc_delay_line ─taps─► tdc_fractional ─T1,T2─┐
          │        │ tap0                  │ first-block   ▼
          │        └────► integer_counter ◄┘ XOR     algorithm_unit ─dT─┬─► coarse_control ─coarse─┐
          │                  ▲  (reg2 on buffered DCO clock)            └─► lock_indicator          │
          │                  │                                                │ lock                │
          ├─► control_unit ◄─┘───────────────────────────────────────────────┘                     │
          │     │ hold (freezes coarse)   │ dco_rst (restart on ref edge)                           ▼
          ├─► edge_detector ─behind─► fine_phase_unit ─fine─► dco_code_converter ─lines─► dco ─► dco_clk
          │                            (shift register, ±, fine register)                          │
          └──────────────────────────────────── dco_clk clocks all loop logic ◄──────────────────┘
```

## Measuring the period error

This is the least obvious part of the design.

On every rising DCO edge, 128 flip-flops sample a chain of 128 buffers. The reference
clock runs through that chain, and each buffer is 20 ps. The sampled word is a picture
of the reference waveform over the last 2.56 ns: tap *i* holds the reference as it was
about (*i*+1)×20 ps ago. The chain is split into 16 blocks of 8 buffers, and decoding
happens in two parts:

* **Block decoder** (`tdc_decoder1`). It looks only at the last tap of each block. It
  finds the first block, counted from the chain input, in which the picture changes
  0→1, and the first in which it changes 1→0. These block numbers are counted from 1
  and form bits 6:3 of the TDC words.
* **In-block decoder** (`tdc_decoder2`, one per block). It counts how many leading
  taps of its block still equal the value before the block. This gives the position of
  the change inside the block, in bits 2:0. A selector picks the in-block results of the
  two blocks the block decoder named.

Example: the picture 10 zeros, 35 ones, 35 zeros gives these words:

| | block bits | in-block bits | word |
|---|---|---|---|
| 0→1 change | 0010 (block 2) | 010 (2 zeros) | T1 = 0010_010 |
| 1→0 change | 0110 (block 6) | 101 (5 ones) | T2 = 0110_101 |

Each word carries the same +1 block offset, so differences between words are exact tap
counts. Here T2 − T1 = 35 taps.

Two facts then give the period error. Let T1 be the smaller word, the time since the
latest reference edge of either kind. Let T2 be the larger one; T2 − T1 is half a
reference period. Let N be the number of reference transitions (both edges) during the
last DCO period. The time since the latest edge advances by one DCO period, minus N
half reference periods:

    T1 = T1' + P_dco − N·(T2 − T1)        (T1' = T1 one DCO period earlier)

so

    dT = P_dco − P_ref = (T1 − T1') + (N − 2)·(T2 − T1)

`algorithm_unit` computes exactly this, with a comparator (to order T1 and T2), two
subtractors, a multiplier and an adder. dT > 0 means the DCO is too slow.

N comes from `integer_counter`. This is a free-running 4-bit count of reference
transitions, sampled on each DCO edge; N is the difference of successive samples. A
reference edge that arrives just before the DCO edge could miss the sampling register's
setup window. A second register is therefore clocked by the DCO clock after one buffer
delay. The XOR of the first delay block's end taps shows that an edge happened just
before the DCO edge, and then selects the second register. Otherwise the first register
is used, because the second one might already have counted the next edge.

## Timing of an update

Every logic block in the loop is clocked by the oscillator it controls.

* **Rising DCO edge:** the TDC flip-flops, both counter registers and the phase
  detector sample.
* **Falling DCO edge:** T1', the previous count, the coarse word, the lock flag and the
  fine word are updated. This half-cycle offset stands in for the clock buffer that
  the original circuit puts in front of these registers. It means a new control word
  is in place before the oscillator's next rising edge.

In a ring oscillator an edge picks up the delay of each cell as it passes through. The
model copies this: each half period uses the code in force just after the edge that
starts it. A word written on a falling edge therefore already sets the low half of that
same cycle.

This is why a coarse correction takes two DCO cycles. In the first cycle the period is
part old code and part new. At the end of the second cycle dT describes a full period of
the new code, and it is applied. T1' is stored on every falling edge.
`algorithm_unit.upd` marks the update slot.

The coarse word moves by 2·dT, because one TDC step (20 ps) equals two coarse steps
(10 ps). The result is clamped to 0..63. When |dT| ≤ 1 TDC step, `lock_indicator` raises
`freq_lock`. That word stays in the coarse register.

## From frequency to phase: the control unit

`control_unit` is a 2-bit counter clocked by the reference. It counts only after
`freq_lock` and stops at 11:

| state | meaning | `hold` | `dco_rst` |
|---|---|---|---|
| 00 | frequency acquisition | 0 | 0 |
| 01 | one reference cycle: DCO stopped while Ref is low | 1 | not Ref |
| 10 | DCO restarted on Ref's rising edge, fine loop running | 1 | 0 |
| 11 | stopped; the fine loop keeps tracking | 1 | 0 |

The oscillator restarts one gate delay (5 ps in the model) after the reference edge
that releases it, so phase tracking starts almost aligned.

## Phase tracking: the doubling-step loop

`edge_detector` samples Ref on each DCO rising edge. If Ref is already high, the DCO is
*behind*. `fine_phase_unit` then applies this rule on every DCO cycle:

* **Same polarity as the last cycle:** fine ± step (+ when behind, because a higher code
  means a shorter period). The step is then shifted left: 1, 2, 4, 8, 16, 32, and it
  stays at 32.
* **Polarity changed:** fine returns to 32 and the step to 1. The first such change
  raises `phase_lock`.

The original description steps the shift register once per reference cycle. Here it is
clocked by the DCO, like the rest of the loop. Once the frequency is locked the two rates
are the same.

A steady "ahead" gives the fine sequence 32, 31, 29, 25, 17, …, and a flip then returns
it to 32. The fine word is not an integrator: after each flip it restarts from mid-scale.
The loop therefore settles into a limit cycle around the reference edge rather than a
fixed word. Its size depends on the frequency error left at mid-scale fine, which is up
to one TDC step.

In simulation at 700 MHz, after phase lock the DCO edge stays between −38.6 ps and
+19.6 ps of the reference edge (58 ps peak-to-peak) for three of four reset phases, and
spans 76 ps for the fourth. The original work reports 53 ps peak-to-peak for its
transistor-level circuit. The model has no device noise, so its numbers come only from
the loop's own limit cycle.

## The oscillator and its code

`dco_code_converter` splits the 12-bit word into 2-bit groups:

* `coarse[1:0]` and `coarse[3:2]` become 3-line thermometer codes for the two coarse
  delay cells.
* `coarse[5:4]` selects, through a 4:1 mux, how much of a 3-stage fixed delay chain is
  in the ring.
* `fine[5:0]` becomes the nine fine-cell lines D(0)..D(8).

Thermometer lines switch one equal load at a time, which keeps the cell linear and
avoids glitches. The `dco` model turns the lines back into a period:

    P = 1912 ps − 10 ps × coarse − 1 ps × fine

With fine = 32 this spans 532–800 MHz. 700 MHz lies at coarse ≈ 45. The 10 ps and 1 ps
steps are the original circuit's. The 1912 ps offset is chosen for this model so that
the whole 570–800 MHz range can be reached with the fine word at mid-scale.

## Where this RTL fills gaps

The original description gives the block diagram, the TDC structure and decoding, the
integer counter, the algorithm datapath, the control unit and the phase loop rule. This
RTL adds the following choices of its own:

* **Lock test:** |dT| ≤ 1 TDC step on a single measurement, sticky
  (`LOCK_TOL`, `LOCK_COUNT`).
* **Coarse gain:** the gain as a shift (`GAIN_SHIFT = 1`), and clamping of both words.
* **Register clocking:** update registers on the falling DCO edge. The output register
  of the algorithm block is merged into the coarse register.
* **Transition counting:** both edges are counted, with two edge counters summed modulo
  16. The counter runs freely rather than being cleared each period. It is fed from the
  first TDC tap, so the counter and the chain see each edge at the same moment.
* **Control unit:** the constants on the mux inputs and the reset polarity.
  `phase_en` holds the fine loop off until the DCO has restarted.
* **Phase detector:** a single flip-flop.
* **TDC decoders:** block numbers counted from 1, as in the original decoding example.
  The in-block position is counted against the value just before the block.
* **Coarse cells:** each gets 3 thermometer lines.
* **DCO model:** a linear period law, with P_MAX = 1912 ps, the code read per half
  period, and a 5 ps restart delay.
* **Lock signal:** it crosses into the reference domain without a synchronizer. It rises
  once and stays high.

## Files

| file | contents |
|---|---|
| `rtl/adpll_pkg.sv` | widths, reset values, control-state enum |
| `rtl/adpll_top.sv` | complete loop, synthesizable logic plus models |
| `rtl/adpll_digital.sv` | all synthesizable logic |
| `rtl/tdc_fractional.sv`, `tdc_decoder1.sv`, `tdc_decoder2.sv` | TDC sampling flip-flops and decoders |
| `rtl/integer_counter.sv` | transition counter, two sampling registers, select mux |
| `rtl/algorithm_unit.sv` | dT datapath and measure/update slot |
| `rtl/lock_indicator.sv`, `coarse_control.sv` | lock decision, coarse word |
| `rtl/control_unit.sv` | mode counter, DCO restart, hold |
| `rtl/edge_detector.sv`, `fine_phase_unit.sv` | phase loop |
| `rtl/dco_code_converter.sv` | binary to thermometer lines |
| `rtl/dco.sv`, `tdc_delay_line.sv`, `delay_buffer.sv` | behavioural models of analog cells (not synthesizable) |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

`tb_adpll_top` runs the complete loop at 700 MHz with all defaults, four times from
different reset phases. It checks lock times, the locked coarse word, the DCO restart, phase tracking and the mean frequency. It also
checks that every mechanism occurred (coarse update, hold, restart, step doubling,
increments, decrements, polarity flips, use of the second counter register).
`tb_adpll_digital` runs the same loop at 570, 700 and 800 MHz.

## Simulating

All files use `timeunit 1ps; timeprecision 1fs`. The models need `--timing`. From the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/adpll_pkg.sv tb/tb_adpll_top.sv \
          --top-module tb_adpll_top -o tb_adpll_top
./obj_dir/tb_adpll_top
```

Replace `tb_adpll_top` with any other testbench name. Each one prints
`TB_RESULT checks=N failures=M`. The whole-loop runs take well under a second.

Lint warnings that remain, with the reason for each:

* `ref_clk` is both a clock and sampled data. This is how the phase detector works.
* The DCO model's delay is computed at run time.
* Some package constants are unused in some files.
