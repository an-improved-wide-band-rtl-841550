# Control core of a wide-band referenceless CDR with UP pulse selection

A referenceless clock and data recovery circuit has no reference clock. It must find the bit rate
of the incoming data by itself and then lock on its phase. This design handles data from 0.3 to
3.2 Gb/s. It is half-rate, so the VCO runs at half the bit rate: 150 MHz to 1.6 GHz. No single
VCO tuning curve covers that range, so the VCO has three bands. Acquisition runs in three steps:

1. **Band selection.** The VCO is forced to the edges of its bands to find the right one.
2. **Frequency acquisition.** A frequency-locked loop (FLL) runs a coarse and a fine frequency
   detector together. It pulls the VCO to half the data rate.
3. **Phase tracking.** Once the frequency error is small, a lock detector hands the loop filter
   from the FLL charge pump to the phase detector's charge pump.

A loss-of-lock detector watches for a change of the data rate afterwards and starts it all over.

The main idea is the **UP pulse selector**. At high data rates the fine detector's UP pulses are
narrow, so pulling the VCO upward is slow. The selector halves the frequency of the pulse train
with a toggle flip-flop. The result, UP_F2, stays high from one UP pulse to the next, which gives
the charge pump roughly twice the charge per beat. Widening like this would overshoot near lock.
So the selector also measures the frequency error: it counts UP pulses in a fixed window, and it
goes back to the raw pulse once the count drops below a threshold for the band.

This repository holds the synthesizable digital part of that CDR in SystemVerilog. It also holds a
behavioural model of the analog part, used only to close the loop in simulation.

## What is digital and what is not

| Part | Here |
|---|---|
| UP pulse selector | RTL, `rtl/up_pulse_selector.sv` |
| Coarse/fine combiner with the STOP flip-flop | RTL, `rtl/fd_combiner.sv` |
| Frequency band selector logic | RTL, `rtl/freq_band_selector.sv` |
| Lock and loss-of-lock detector | RTL, `rtl/lock_detector.sv` |
| Power-on pulse generator (EN) | RTL, `rtl/pulse_generator.sv` |
| Two-flop synchroniser (helper) | RTL, `rtl/sync2.sv` |
| Top: reset OR, switch control, wiring | RTL, `rtl/cdr_fll_ctrl_top.sv` |
| Shared types (band code, VC override) | `rtl/cdr_pkg.sv` |
| Coarse and fine frequency detectors | not built; modelled in `tb/cdr_analog_model.sv` |
| Charge pumps, loop filter, switches S1/S2 | not built; FLL charge pump and capacitor modelled |
| Triple-band ring VCO | not built; piecewise-linear model |
| Bandgap references VC1max, VC3min | not built; constants in the model |
| Half-rate binary phase detector, decision circuit | not built, not modelled |

The frequency detectors are mixed-signal circuits that work on the data and the quadrature clocks.
Their internal circuits are not given here. The RTL starts where their UP/DN pulses arrive.

## Clocking and reset

All logic runs on `ck`, the VCO clock. The four detector pulses (`up_c_a`, `dn_c_a`, `up_f1_a`,
`dn_f_a`) are asynchronous, and each goes through a two-flop synchroniser first. So the pulses
reach the logic two `ck` cycles late. The `UP_FD`/`DN_FD` outputs to the charge pump are
combinational from the synchronised pulses. A pulse must last at least one `ck` period to be seen.

`por_n` (active low) is the power-on input of the pulse generator. EN is high while `por_n` is
low, and for 16 `ck` edges after it rises. The reset of everything else is `R = EN | LLD`,
synchronous and active high. A loss of lock therefore resets the core through the same path as
power-up.

## Band selection (`freq_band_selector`)

| D1 D0 | band | VCO range |
|---|---|---|
| 0 0 | 1 | 150-820 MHz |
| 0 1 | 2 | 0.8-1.24 GHz |
| 1 0 | 3 | 1.22-1.6 GHz |
| 1 1 | unused | |

After R, `vc_force = VC_3MIN` and D1 = 1: the analog side puts the VCO at the bottom of band 3.
If the coarse detector reports UP_C (the data is faster still), band 3 is chosen. If not,
`vc_force = VC_1MAX` with D1 = 0 puts the VCO at the top of band 1. Then UP_C selects band 2
(D0 = 1), and its absence selects band 1. After that `vc_force = VC_LOOP` and `fbs_done` rises. The
loop filter starts from the voltage that was last forced.

A check decides "no UP_C" after one of two events:

- 4 rising edges of DN_C without an UP_C. DN_C serves as the time base.
- 1024 cycles with no decision. This covers a rate inside the coarse detector's dead zone, where
  neither pulse comes.

The first 16 cycles of each check are ignored so the VCO can settle. These three numbers are this
design's choices (`FBS_DN_WIN`, `FBS_TIMEOUT`, `FBS_SETTLE`).

## Frequency acquisition

### Combining coarse and fine detectors (`fd_combiner`)

Both detectors drive the charge pump at the same time. STOP is a flip-flop with its data input
tied high. The first UP_C sets it, and only R clears it. STOP high means the VCO has to go *up*.

| | UP_FD | DN_FD |
|---|---|---|
| STOP = 0 (going down) | UP_F | DN_F or DN_C |
| STOP = 1 (going up) | UP_F or UP_C | DN_F |

UP_F here is the output of the UP pulse selector, not the raw fine-detector pulse.

### The UP pulse selector (`up_pulse_selector`)

This block is hardest to follow, so here it is step by step:

- **Window.** CLK/8 clocks a 5-bit window counter. Its bit B4, called SL1, rises after 16 ticks,
  which is 128 VCO cycles.
- **Pulse count.** A second 5-bit counter counts the rising edges of UP_F1. This count is N_UP.
- **Enable.** Both counters count only while `E = STOP & ~SL1`: in upward tracking, and only until
  a window has run out.
- **Threshold.** The counter reset RS is `R | (D1 & B3) | (D0 & B4 & B2)`. So N_UP = 8 in band 3,
  or 20 in band 2, clears both counters and starts a new window. The counter bits go to AND gates:
  the threshold is reached when all the bits set in the constant are set in the count.
- **Outcome.** A large error gives many UP pulses per window, so the threshold is hit first, again
  and again, and SL1 never rises. Once the error is small, a window runs out first. SL1 rises and
  freezes both counters, and `SL_UP = (D0 | D1) & SL1` goes high.
- **Output mux.** `UP_F = UP_F2` while SL_UP is low in bands 2 and 3. `UP_F = UP_F1` once SL_UP is
  high, and always in band 1.

A window restarted by RS lasts 121 to 128 cycles, because the divide-by-8 is not reset by RS. The
first window after R lasts exactly 128. UP_F2 toggles one cycle after each UP_F1 rising edge. The
pulse counter saturates at 31, which matters only in band 1, where nothing reads it.

In cycles, the thresholds are 8/128 in band 3 and 20/128 in band 2. A detector that issues one
UP pulse per beat period therefore stops widening at a relative frequency error of about 6 % in
band 3 and 16 % in band 2.

### Lock and loss of lock (`lock_detector`)

After band selection, LOCK rises once UP_FD and DN_FD have both stayed low for 256 cycles in a
row (`LD_WIN`). A detector with one correction per beat is quiet that long only when the error is
below about 1/256, roughly 0.4 %. LOCK then turns S1 off and S2 on (`s1_on`, `s2_on`), and stays
high until R. S1 is also held off while the band selector forces VC.

While locked, any rising edge of UP_C or DN_C gives a one-cycle LLD pulse. The coarse detector
fires only on a large error, so this means the data rate has changed. LLD feeds R, and
acquisition restarts from band selection.

## Where this departs from the reference description, and why

- **Synchronous logic.** The gate-level drawing of the selector clocks its counters with the
  pulses themselves, and clocks STOP with UP_C. Here everything is sampled on `ck` and pulses are
  counted by edge detection. The cost is two cycles of latency on the detector inputs, plus a
  minimum pulse width of one cycle.
- **Band 1 is never widened.** The drawing feeds the selector mux from `(D0 | D1) & SL1`. Read
  literally, that would pass the widened pulse forever in band 1. The written description says
  widening is only for bands 2 and 3, and that is what is built.
- **Which threshold belongs to which band.** One flowchart pairs D0 with 8 and D1 with 20. The
  prose and the band table say band 2 (D0 = 1) uses 20 and band 3 (D1 = 1) uses 8. The latter is
  built.
- **FBS inputs.** The block diagram labels the band selector's inputs UP_FD/DN_FD. The text says
  UP_C/DN_C from the coarse detector, and that is what is used.
- **Own choices.** The lock detector, the loss-of-lock rule, the band selector's window, timeout
  and settling time, the EN width, and the gating of S1 during band selection are this design's
  own choices. The reference describes what these parts do, not how. The divide-by-2 is given a
  reset.

## Parameters (`cdr_fll_ctrl_top`)

| name | default | meaning |
|---|---|---|
| `DIV_CK` | 8 | clock divider ahead of the window counter (window = 16 x `DIV_CK` cycles) |
| `TH_BAND2` | 20 | UP pulses per window that keep widening in band 2 |
| `TH_BAND3` | 8 | same for band 3 |
| `EN_CYCLES` | 16 | power-on pulse width |
| `FBS_SETTLE` | 16 | cycles ignored after each forced VC |
| `FBS_DN_WIN` | 4 | DN_C edges that end a band check with "no UP" |
| `FBS_TIMEOUT` | 1024 | cycles after which a band check ends with "no UP" |
| `LD_WIN` | 256 | quiet cycles before LOCK |

The thresholds are matched as bit patterns, as the AND gates do. Another threshold works as long
as it is the first count at which all of its bits are set. That holds for any value reached by
counting up from zero.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/cdr_pkg.sv tb/tb_cdr_fll_ctrl_top.sv --top-module tb_cdr_fll_ctrl_top
./obj_dir/Vtb_cdr_fll_ctrl_top
```

Replace the top name with `tb_up_pulse_selector`, `tb_fd_combiner`, `tb_freq_band_selector`,
`tb_lock_detector` or `tb_pulse_generator` to run a unit test. `tb_up_pulse_selector` compares
every output, every cycle, against an integer reference model. It also checks that the first
window is exactly 128 cycles.

`tb_cdr_fll_ctrl_top` runs the core at its default parameters, closed around
`tb/cdr_analog_model.sv`. It powers up at 3.0, 3.2, 2.0, 1.0 and 0.3 Gb/s. At each rate it checks
the band chosen, LOCK, a final error below 0.5 %, and the S1-to-S2 hand-over. It also switches
3.0 to 1.0 Gb/s while locked, to exercise LLD and reacquisition. Every mechanism must occur at
least once: each band, STOP, widening, RS restarts, SL_UP, LOCK and LLD. The run takes well under
a second.

With the model, a 3 Gb/s run looks like this:

- The VCO starts at 1.22 GHz.
- The control voltage reads 563, 608, 657, 713 and 738 mV at 100, 300, 500, 700 and 900 ns.
- LOCK comes at 1495.6 MHz, 1.49 us after reset.

These figures come from the model's assumptions, not from a circuit:

- VCO bands are straight lines through the band edges.
- The charge pump is 500 uA into 1 nF, scaled per band.
- The detectors are rotational: one pulse per beat, a quarter beat long, at most 8 cycles. The
  coarse detector has a 2 % dead zone.

They show that the logic does its job. They are not a prediction of silicon acquisition time. In
particular, the threshold rule stops widening at about 6 % error in band 3. Where exactly that
happens in VCO frequency depends on the real detector's pulse rate.

## Not covered

- The phase-tracking loop is not modelled. After LOCK the model simply holds VC.
- Data patterns, PRBS7 included, are not simulated bit by bit. The model's detectors assume
  enough transitions to see every beat.
- Jitter cannot be judged from this RTL.
