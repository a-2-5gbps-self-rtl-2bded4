# Self-calibrating 4-PAM receiver: a TIQ flash ADC with duty-cycle calibration

A 4-PAM link sends two bits per symbol as one of four voltage levels. The
receiver must compare the input against three thresholds, one midway between
each pair of adjacent levels. This design gets those comparators cheaply. It
uses plain CMOS inverters whose switching points are set by transistor sizing
("threshold inverter quantization", TIQ). Such thresholds drift with process
and temperature. So the design builds **sixteen** comparators with thresholds
spread over the input range and lets a small digital circuit **choose** the
best three.

The choice rests on one observation. For a random 4-PAM signal, a comparator
placed exactly between the lowest two levels outputs 1 three quarters of the
time. The middle one outputs 1 half the time, and the top one a quarter of the
time. The calibration circuit measures the duty cycle of each candidate
comparator by **undersampling** its output 128 times with a slow clock. It
then keeps, for each threshold, the candidate closest to 75 %, 50 % or 25 %.
The slow clock is what keeps calibration power low. The original design
chose 128 samples from a normal approximation. For a 300 mV input swing and
a 40 mV threshold spacing, that approximation puts each duty-cycle estimate
within 13 % of the true value with 99.35 % confidence.

This repository has synthesizable RTL for all the digital parts. The analog
comparator bank and the test DAC are behavioural models.

## Signal path: comparators and channel MUXes

```
 vin ──► 16 threshold comparators V0..V15 (600 mV + 40 mV·i, i = 0..15)
          │ V0..V7 ──► 8:1 MUX 0 ──► D0  (threshold 0, wants 75 %)
          │ V4..V11 ─► 8:1 MUX 1 ──► D1  (threshold 1, wants 50 %)
          │ V8..V15 ─► 8:1 MUX 2 ──► D2  (threshold 2, wants 25 %)
          ▼
       D[2:0] ──► to clock/data recovery (thermometer code of the symbol)
       D[2:0] ──► flip-flops on the sampling clock ──► Q[2:0] ──► calibration
```

* **Comparators** (`tiq_comparator_array`, behavioural). In silicon each one
  is a tri-state inverter sized for its own switching point, so an unused one
  can be switched off. The model compares a millivolt code against
  `VTH0_MV + i*VGAP_MV` and outputs 1 when the input is above the threshold.
  A comparator that is switched off reads 0.
* **Channel MUXes** (`channel_mux`). Each is a tree of three 2:1 stages made
  of tri-state inverters, and each stage also amplifies. Only the cells on
  the selected path are enabled. Each MUX also reports which comparator it
  needs. `tiq_adc` ORs these requests into `cmp_en`, so at most three of the
  sixteen comparators draw power.
* **Overlap.** The three MUXes share comparators. MUX *L* reaches comparators
  4L .. 4L+7, giving 24 MUX inputs for 16 comparators. Channel *c* of MUX *L*
  is comparator 4L+c. The overlap lets a threshold be found even when process
  spread pushes the thresholds far from their nominal places.

There is no binary encoder. The three-bit thermometer code D[2:0] is the
output: 000 for the lowest level, 001, 011, 111 for the highest.

## Calibration

`calibration_unit` holds all of the calibration circuit:

| part | module | what it does |
|---|---|---|
| duty-cycle estimator | `duty_cycle_estimator` | 8-bit stimulus timer, T_up = bit 7, so 128 samples; a 7-bit counter counts the sampled ones |
| absolute offset | `abs_offset_comparator` | \|count − target\|, using a one's complement below the target; compares it with the minimum |
| minimum register | `minimum_register` | smallest offset found so far in this level; preset to all ones |
| channel select counter | `channel_select_counter` | channel 0..7 being measured; CH_END on channel 7 |
| channel select registers | `channel_select_registers` | best channel of each MUX; all start at channel 3 |
| level select counter | `level_select_counter` | level 0..2 (3 = done); one-hot decode picks the MUX, the register and the target |
| controller | `calibration_controller` | eight-state sequencer |

The targets are 96, 64 and 32 ones out of 128 samples (75 %, 50 %, 25 %).

**The offset.** When the count is below the target, the offset is the bitwise
inverse of `count − target`. That equals `target − count − 1`, one less than
the true distance. This saves an incrementer. The result is that a channel
one count below the target ties with a channel exactly on it. The
minimum-register update uses a strict "less than", so among equal offsets
the first channel scanned (the lowest threshold) wins.

**The sequence** (the state codes are what the State[2:0] pins show):

| state | code | outputs | next |
|---|---|---|---|
| S0 idle / normal | 000 | – | S1 if Mode = 1 |
| S1 init | 001 | Reset, Reset_CH | S2 |
| S2 start channel | 010 | Reset_T, CK_SW | S3 |
| S3 sample | 011 | CK_SW | S4 when T_up |
| S4 compare | 100 | CMPR | S5 |
| S5 next channel | 101 | CH_in | S6 if CH_END, else S2 |
| S6 next level | 110 | Reset_CH, Lev_in | S7 if Lev_END, else S2 |
| S7 done | 111 | – | S0 if Mode = 0 |

Mode = 0 sends the controller to S0 from any state. What each output does:

* Reset: clears the level counter and loads channel 3 into all three channel
  registers.
* Reset_CH: clears the channel counter and presets the minimum register.
* Reset_T: clears the timer and the ones counter.
* CK_SW: lets the sampling clock reach the estimator. In RTL it is a clock
  enable.
* CMPR: loads the minimum register and the current level's channel register
  when the new offset is smaller.

**Timing.** A channel takes 132 clocks: S2 for 1, S3 for 129 (128 counting
clocks plus the clock that sees T_up), then S4 and S5 for 1 each. A level
takes 8 × 132 + 1 = 1057 clocks, and the whole calibration takes
1 + 3 × 1057 = **3172 clocks** from S1 to S7. At a 345 MHz sampling clock
that is 9.2 µs. With a different `TIMER_W` the time is
1 + 3·(8·(2^(TIMER_W−1) + 4) + 1).

**What drives each MUX select** (`channel_switch`):

* During states S2..S6, the MUX of the level being calibrated follows the
  channel counter.
* The other MUXes, and all three MUXes outside calibration, use their stored
  registers.
* With the Auto pin low, all three selects come from the manual pins
  MS[8:0] instead. MUX *L* uses MS[3L+2:3L].

Lev[2:0] shows the stored channel of the level picked by LS[1:0].

The estimator reads Q, the flip-flopped MUX output, so a channel's samples
start one clock after its MUX select changes (in S2).

## Pins of the receiver (`pam4_receiver`)

| pin | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | sampling clock (also clocks the calibration), asynchronous active-low reset |
| `vin_mv[10:0]` | in | input voltage in millivolts |
| `mode` | in | 1: calibrate, 0: normal operation |
| `auto_sel` | in | 1: calibrated selects, 0: manual MS selects |
| `ms[8:0]`, `ls[1:0]` | in | manual channels; level shown on `lev` |
| `d[2:0]` | out | MUX outputs (combinational from `vin_mv`) |
| `q[2:0]` | out | `d` sampled on `clk` |
| `lev[2:0]`, `state[2:0]` | out | stored channel of level `ls`; controller state |
| `cmp_en[15:0]`, `upd` | out | comparator power enables; minimum register updated this clock |

`mode` is assumed to be synchronous to `clk`.

## On-chip test source

`pam_signal_gen` and `current_mode_dac` make a test input without external
equipment:

* A 16-bit LFSR (`lfsr16`, taps 16/14/13/11) gives random bits.
* SW = 0 sends two LFSR bits per clock as a random 4-PAM symbol.
* SW = 1 sends one LFSR bit through a pattern selector {S1, S0}:

| S1 S0 | pattern | levels toggled |
|---|---|---|
| 00 | PRBS_0 | 600 / 800 mV (lowest eye) |
| 01 | PRBS_1 | 800 / 1000 mV |
| 10 | PRBS_2 | 1000 / 1200 mV |
| 11 | PRBS_F | 600 / 1200 mV |

The 2-bit symbol goes through a clocked binary-to-thermometer decoder. The
decoder drives the gates G[3:1] of a current-steering DAC with a 50 Ω pull-up.
Each gate that is on sinks more current and lowers the output by one step.
The DAC model is ideal: 1200, 1000, 800 and 600 mV.

## Top level (`pam4_rx_chip`)

The top holds the receiver and the test source side by side. Each has its own
pins; the source has `gen_*`. The top does not connect the source output to
the receiver input; the end-to-end testbench makes that connection, as the
board would. All parameters default to the published values: 16 comparators,
600 mV base threshold, 40 mV gap, 8-bit timer (128 samples) and 7-bit
counter.

## Where this RTL departs from, or fills in, the original design

* **Analog parts are models.** The tri-state inverter cells, the inductive
  peaking loads, the gain of the MUX stages and all speed effects are not
  modelled. Comparators are ideal threshold tests. A process corner is
  imitated only by moving the base threshold and the gap.
* **Polarity.** Every inverter stage inverts. The RTL is written so that D is
  1 when the input is above the threshold. This matches the published duty
  cycles: a higher threshold gives a lower duty.
* **Counting stops at T_up.** The stimulus timer and the ones counter stop
  once T_up is set, so exactly 128 samples count. The ones counter wraps if
  all 128 samples are 1, as a plain 7-bit counter does.
* **Timer width.** The timer has 8 flip-flops, the eighth being T_up, and
  the ones counter has 7. Sample-count tables that speak of an "N-bit timer"
  for 2^N samples mean the counting bits without T_up. Their N is
  `TIMER_W − 1`.
* **Gated clocks become enables.** The gated sampling clock (CK_SW) and the
  minimum register clocked by "Less" are written as clock enables on one
  clock.
* **Choices of this design.** The original design does not specify these:
  * Reset_CH presets the minimum register at the start of each level.
  * The level counter holds at 3 ("done"), so no MUX stays in calibration.
  * The MS bit order, and LS = 3 showing 0.
  * The LFSR taps and seed.
  * Which binary pattern toggles which levels.
  * Ideal, equal DAC steps. The published sink sizes (54/19/21/32 units on a
    0.24 mA reference) are not used to compute levels.
* **D and Q.** D[2:0] here is the MUX output and Q[2:0] its sampled copy, as
  the pin list of the original describes. Its block diagram draws the
  flip-flops just before the D labels.
* **Not built.** The following have no logic function and are not built:
  transistor sizing, the inductive peaking cells, pads, decoupling, and the
  off-chip resistor-ladder 4-PAM generator with its commercial analog MUX.

## How far it has been checked

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each compares the module with an independent model and prints
`TB_RESULT checks=N failures=M`. The notable ones:

* `tb_calibration_controller` checks every transition and output against the
  state table above.
* `tb_calibration_unit` feeds synthetic channels with known duty cycles. It
  checks the chosen channels, the 3172-clock duration and the abort by
  Mode = 0.
* `tb_pam4_receiver` repeats the published calibration experiment: an 80 MHz
  triangle from 0.6 to 1.2 V, sampled at 345 MHz. Three receivers run at
  nominal, fast-like and slow-like thresholds. The testbench predicts each
  choice from the recorded input.
  * Nominal: comparators 4, 8 and 11. The published result is 4, 7 and 11;
    on an ideal triangle 7 and 8 are equally far from 50 %.
  * Slow-like: 3, 8, 12. The published result is 3, 7, 12.
  * The fast-like corner chooses channels closer together and the slow-like
    one channels further apart, as published. The exact fast-corner channels
    (published 4, 7, 8) depend on device behaviour the model lacks.
* `tb_pam4_rx_chip` runs the whole chip at its default size with the test
  source looped back to the input. It checks:
  * decoding of random 4-PAM and of all four binary patterns;
  * a full calibration on the 4-PAM source, with its outcome predicted from
    the recorded input;
  * error-free decoding afterwards;
  * an aborted calibration, the manual override and comparator power-down.

* `tb_sample_count_sweep` varies the samples per estimate from 32 to 2048.
  Each size calibrates 40 times on a 300 mV triangle strobed at random
  instants, so every sample is an independent coin toss. The ideal comparator
  is chosen in 65, 95, 102, 114 and 120 of 120 level calibrations for 32, 64,
  128, 512 and 2048 samples. In this test the nearest wrong comparator is
  only 6.6 percentage points further from the target. That is a harder case
  than the 13 % spacing used in the original confidence estimate.
* `tb_rc_channel_4pam` sends the chip's random 4-PAM source at 400 ps per
  symbol through a first-order RC channel (time constant 120 ps, ±8 mV
  noise). Two chips sample it at 2.9 ns, one at the default 128 samples and
  one at 2048. A manual scan of all 24 channels, sampled at the end of each
  symbol, finds 4 or 5 error-free comparators per MUX. The 2048-sample chip
  chooses comparators 3, 7 and 12, all error-free, and must decode 3000
  symbols without error. The 128-sample chip chooses 5, 8 and 11, and 5 is
  wrong on about 13 % of symbols. Comparator 5 sits exactly on the 800 mV
  signal level, so the slow edges keep it near 75 % duty. Its 128-sample
  count was 91 against 90 for the correct comparator 4, a difference well
  inside the ±5-count spread of the estimate. Where a threshold coincides
  with a signal level, 128 samples are not always enough. This is the same
  trade-off the sample-count sweep shows.
* `tb_binary_test_flow` follows the bench procedure for testing without a
  4-PAM source. For each eye it calibrates on that eye's PRBS, reads back the
  stored channel, and then scans the MUX by hand. The input passes through
  the same RC channel as above. The calibrated choices match the prediction,
  and each scan finds 4 error-free channels. The calibrations chose:
  * PRBS_1 (800/1000 mV): comparator 7, at the eye centre, with no errors.
  * PRBS_0 (600/800 mV): comparator 0, whose threshold sits on the 600 mV
    level. It is wrong on about 34 % of bits.
  * PRBS_2 (1000/1200 mV): comparator 14 (1160 mV). It is error-free here
    only because the comparators are ideal.

  The cause is the input, not the calibration logic. A binary signal spends
  half its time above any threshold inside its eye, but the targets stay at
  75 % and 25 % for the outer levels. So in this procedure the manual scan,
  not the calibration, picks the channel for the outer eyes.

Not shown by any of this: the 2.5 Gb/s speed, eye openings, jitter, power,
and the statistical confidence figures. These are analog or statistical
properties.

## Simulating

Every file holds one module or package. `rtl/pam4_pkg.sv` must be read first.
For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pam4_pkg.sv tb/tb_pam4_rx_chip.sv --top-module tb_pam4_rx_chip -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl`. Any testbench runs the
same way. All of them finish in well under a second.

To change the design:

* Thresholds: `VTH0_MV` and `VGAP_MV`.
* Sample count: `TIMER_W`. Samples = 2^(TIMER_W−1), and `CNT_W` follows it.
* Number of channels and levels: `pam4_pkg`. The MUX tree in `channel_mux` is
  written for 8 inputs.
