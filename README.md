# Digital controller for a 4-phase hysteretic buck converter

A hysteretic (ripple-regulated) buck converter responds to a load step within
one comparator delay. It needs no compensation network. It has three weak points,
though:

* Its switching frequency drifts with input voltage, output voltage and load.
* Its comparator offset goes straight into the output voltage.
* If several phases run in parallel, nothing makes them share the current or
  keep their phase spacing.

This RTL is the digital half of a 4-phase converter that addresses all three:

* **One master phase with three slaves.** Only the master has a hysteretic
  comparator. The three slave phases are copies of the master's switching
  signal, delayed by 90°, 180° and 270°. Their on-times are then trimmed so
  that each slave carries the same average current as the master.
* **Frequency lock.** A digital PLL compares the master's switching frequency
  with an external reference. It widens or narrows the hysteresis window
  until the two frequencies match.
* **Auto-zero.** The comparator's pre-amps are auto-zeroed once per switching
  period, in the part of the period where the high side is off. The RS latch
  after them is blanked while this happens.
* **Light-load modes.** Under light load the controller first turns off the
  slaves (phase shedding). Then it turns off three quarters of the master's
  FETs and lets the master run in burst mode, turning the low side off at
  zero inductor current.

The analog parts stay outside and connect through ports. These are the
comparators, the DACs, the current sensors, the zero-cross detector and the
power stage.

## One clock, and what a tap costs

Everything runs on one clock, `clk`. That includes the delay lines, which in
the converter this design follows are chains of current-starved inverters. Here
each delay line is a shift register, so one tap delay `t_d` is one `clk`
period. The DLL "current" becomes an integer delay code in `clk` cycles.

This shapes every timing number in the design:

* **Quarter period.** The DLL code is a quarter of the switching period,
  counted in `clk` cycles. Its range is 34 to 255 (`DLL_W = 8`; the lower
  limit leaves room for the 32 early taps). That range spans `f_clk/1020` to
  `f_clk/136` in switching frequency. For example:
  * A 2 GHz clock covers 2 MHz to 14.7 MHz.
  * A 3–9.5 MHz switching range needs a clock between about 1.3 GHz and
    3 GHz.
* **Trim step.** Each duty-cycle trim step is `t_d/T_s`: 1/600 of the period
  at 5 MHz and a 3 GHz clock. How much current one step moves depends on the
  phase's resistance: `ΔI ≈ V_IN · (t_d/T_s) / R_phase`. With very low
  resistances the sharing loop dithers by one step around the balance point.
  The end-to-end test shows this on purpose: its 2.5 mΩ phase moves by more
  than 1 A per step.
* **Frequency resolution.** The DFS loop measures time with the same
  resolution, so `clk` sets its accuracy too.

At silicon switching frequencies this is therefore a functional model of the
delay-line behaviour, or a controller for a scaled-down converter (for
example on an FPGA with a much slower power stage). It is not a drop-in
replacement for the inverter chain. Moving to an analog line changes
`dcc_delay_line` and `dll` only: the code outputs keep their meaning and the
rest does not change.

## Phase generation: DLL and the calibrated delay line

`dcc_delay_line` holds three sub delay lines in series. The master signal
`p1` enters the first one, and its output is `p2`. The second line gives `p3`
and the third gives `p4`. Each sub line has three parts:

* a duty-cycle-addition (DCA) section of 32 taps;
* a raw section;
* a duty-cycle-subtraction (DCS) section of 32 taps.

The whole sub line is `code` cycles long. The nominal output of slave `k`
therefore lags `p1` by `k·code` cycles. Around that output the block exposes:

* `b[k][j]`: early copies, `j+1` taps before the nominal output;
* `a[k][j]`: late copies, `j+1` taps after it.

`dll` sets `code`. It runs a replica of one sub line, clocked by the
reference at `2·f_sw`. The output of the replica is inverted and compared
with the reference in a bang-bang phase detector, and an integrator moves
the code one step per decision. The loop settles when the inverted output's
rising edge lines up with the reference's. That happens when the delay
equals half a reference period, which is a quarter of a switching period:
exactly 90°. After lock the code dithers by ±1.

## Current sharing: moving only the falling edge

`duty_cycle_cal` trims one slave. A 64-way choice (MUX64 plus MUX2) selects
one of two operations:

* **Subtract.** The nominal slave signal is ANDed with an early copy. The
  output goes low `j+1` taps sooner.
* **Add.** It is ORed with a late copy. The output goes low `j+1` taps later.

In both cases the rising edge is the nominal one, so the 90° grid is never
disturbed.

`current_share_ctrl` chooses the setting for each slave:

* **Inputs.** Once per switching period (at the start of the auto-zero
  sampling phase) it reads one external comparison bit per slave: is this
  slave's average current above the master's?
* **Accumulator.** It counts down when the bit says yes and up otherwise.
  It has `CS_FRAC = 2` extra low bits, so the selected tap moves only after
  the same answer has come four times in a row.
* **Code to setting.** The signed integer part `c` selects the setting:
  * `c ≥ 0` adds with late tap `c`;
  * `c < 0` subtracts with early tap `-c-1`.

  There is no neutral setting. In balance the code toggles between two
  neighbouring settings.

When current sharing is off (`cs_en_i = 0`) or the slaves are shed, every
code is reset to −1, which is the smallest subtraction.

## Frequency synchronization (DFS)

`dfs_loop` works as follows:

1. It divides the `2·f_sw` reference by two.
2. It compares the result with the master's turn-on edges in `bbpfd`.
3. It feeds the decisions to `pi_filter`, a proportional-integral filter:
   * the accumulator moves by 1 per decision;
   * a feed-forward term adds `Kz` times the current decision (`Kz = 4`).
4. The resulting 10-bit code drives the hysteresis-window DAC. A larger code
   means a wider window, which means a lower switching frequency.

In lock, the decisions alternate. The code then swings between two values
`2·Kz + 1 = 9` LSB apart, and the switching period dithers around the
reference period. In the end-to-end test the mean period matches the
reference exactly, and single periods stay within ±2.3 %.

`bbpfd` pairs reference and feedback rising edges:

* It makes one decision per pair: feedback first means "too fast".
* If the same input rises twice before the other rises once, it decides for
  that input. This is how a frequency error is caught.
* If both inputs rise in the same cycle, the decision is the opposite of the
  previous one. This keeps the dither symmetric.
* After reset it waits for a feedback edge before it starts.

## Hysteretic latch and auto-zero

`hyst_latch` is the RS latch after the two sub comparators. Its inputs are
active low:

* `V_S` (`V_FB` below the lower threshold) turns the high side on.
* `V_R` (`V_FB` above the upper threshold) turns it off. Reset wins over
  set.

Two OR gates hold both inputs high while `blank` is active. The comparator
outputs are meaningless during auto-zero sampling, and blanking keeps them
from toggling the latch.

Two load-transient flags override everything:

* `under_i` forces the high side on;
* `over_i` forces it off.

`az_clkgen` starts a sequence at the falling edge of the master signal, or at
its rising edge if `az_in_d_i` is set, for converters whose on-time is the
longer part of the period. The sequence runs through these states:

| State | Length (cycles) | P2 | P1 | P1d | blank |
|---|---|---|---|---|---|
| wait | `T_WAIT` = 2 | on | off | off | off |
| gap | `T_NOV` = 2 | off | off | off | on |
| sample | `T_P1` = 24 | off | on | on | on |
| hold | `T_P1D` = 4 | off | off | on | on |
| gap | `T_NOV` = 2 | off | off | off | on |
| settle | `T_SETTLE` = 8 | on | off | off | on |

The phases do the following:

* **P1** connects the reference to the offset-storage capacitors.
* **P1d** shorts the pre-amp outputs and closes the loop that stores the
  offset.
* **P2** connects the signal inputs.

P1d opens later than P1, so the stored charge is not disturbed. Assertions
check that P1/P1d never overlap P2.

The length of each phase is this design's choice. The sequence is 42 cycles,
so at the default values the interval must be at least 42 clock cycles long.

## Drivers and light-load modes

`bbm_driver`, one per phase, turns the latch output into gate enables:

* **Dead time.** A gate may turn on only after the opposite gate has been off
  for `DT = 3` cycles. An assertion checks that the two never overlap.
* **Segments.** The FETs are split 1:3. The 75 % segment is held off when
  `light` is set.
* **Zero cross.** In burst mode the low side is turned off when the
  zero-cross input reports reverse current. It stays off until the next
  high-side request.

`mode_ctrl` takes two current-threshold flags from the current sensors and
moves between three modes:

* `MULTI`: all four phases.
* `SHED`: the master only. The slaves, the delay line and current sharing
  are off.
* `BURST`: the master only, with 25 % of its FETs and zero-cross turn-off.

A heavier mode is taken at once. A lighter mode is taken one step at a time,
and only after its flag has held for `N_DEB = 64` cycles.

`soft_start` ramps the reference code from 0 to `vref_target_i`, by one LSB
every `SS_STEP = 16` cycles, after enable. The DFS loop starts once the ramp
is done.

## Top-level interface (`multiphase_buck_ctrl`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock and asynchronous active-low reset |
| `en_i` | in | 1 | converter enable |
| `ref2x_i` | in | 1 | reference clock at twice the switching frequency |
| `cmp_s_n_i`, `cmp_r_n_i` | in | 1 | sub comparators, active low: `V_FB` below `V_L` or above `V_H` |
| `under_i`, `over_i` | in | 1 | load-transient undershoot or overshoot detected |
| `zc_i` | in | 1 | master switch node above 0 V while the low side is on |
| `below_shed_i`, `below_burst_i` | in | 1 | load current below the shedding or burst threshold |
| `ishare_gt_i` | in | 3 | slave `k` average current above the master's |
| `cs_en_i` | in | 1 | enable current-sharing calibration |
| `az_in_d_i` | in | 1 | run auto-zero in the on-time instead of the off-time |
| `vref_target_i` | in | 10 | final reference code |
| `vref_code_o`, `ss_done_o` | out | 10, 1 | soft-started reference code, ramp done |
| `dfs_code_o` | out | 10 | hysteresis-window DAC code |
| `dll_code_o` | out | 8 | quarter period in clock cycles |
| `az_p1_o`, `az_p1d_o`, `az_p2_o`, `az_blank_o` | out | 1 | auto-zero switch phases and latch blanking |
| `pwm_o` | out | 4 | master signal and the three calibrated slave signals |
| `hs_m_seg_o`, `ls_m_seg_o` | out | 2 | master high- and low-side enables, bit 0 = 25 % segment, bit 1 = 75 % segment |
| `hs_s_o`, `ls_s_o` | out | 3 | slave high- and low-side enables |
| `mode_o` | out | `mode_e` | `MODE_MULTI`, `MODE_SHED` or `MODE_BURST` |
| `cs_code_o` | out | 3 × 6 | signed current-sharing code per slave |

Timing:

* All asynchronous inputs pass through two-flop synchronizers. This adds two
  cycles to every loop.
* The latch output is registered, and the drivers add a dead time on top.
* Shared types and sizes are in `buck_pkg`.

## Files

| Module | Role |
|---|---|
| `buck_pkg` | sizes, `mode_e`, `dcc_sel_t` |
| `multiphase_buck_ctrl` | top level |
| `hyst_latch` | RS latch with blanking and transient override |
| `az_clkgen` | auto-zero phase generator |
| `dfs_loop`, `bbpfd`, `pi_filter` | frequency lock |
| `dll` | quarter-period delay lock |
| `dcc_delay_line` | three sub delay lines with early and late taps |
| `duty_cycle_cal` | per-slave duty adder/subtractor |
| `current_share_ctrl` | per-slave sharing accumulators |
| `bbm_driver` | dead time, segmentation, zero-cross turn-off |
| `mode_ctrl` | multi-phase, shed and burst modes |
| `soft_start` | reference ramp |
| `sync2` | two-flop synchronizer |

## Simulating

Every block has a self-checking testbench `tb/<module>_tb.sv`. Each one ends
by printing `TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module multiphase_buck_ctrl_tb \
  -y rtl -y tb +libext+.sv -Irtl rtl/buck_pkg.sv tb/multiphase_buck_ctrl_tb.sv
./obj_dir/Vmultiphase_buck_ctrl_tb
```

For any other testbench, replace the top module name and the file name.

### The end-to-end testbench

`multiphase_buck_ctrl_tb` runs the top at its default parameters against
`buck_plant_model`, a behavioural stand-in for the analog side:

* **Ripple node.** `V_FB` ramps up while the master's high side is on and
  down while it is off.
* **Window.** The hysteresis window is proportional to the DFS code.
* **Comparators.** The comparator outputs are random while the pre-amps are
  being auto-zeroed.
* **Phase currents.** Each phase current is `(D·V_IN − V_OUT)/R`, from a
  smoothed duty cycle and a per-phase resistance.

The test sets these conditions:

* The reference period is 600 cycles.
* The phase resistances are 5, 50, 10 and 2.5 mΩ, echoing a 5 mΩ / 50 mΩ
  mismatch case.
* One slave's power stage stretches its on-time by 4 cycles.

The test checks the following:

* the lock and accuracy of the DFS and the DLL;
* 90° spacing of the slave turn-ons, to within 2 cycles;
* the current balance, with sharing off and then on;
* blanking during every auto-zero sequence;
* both transient overrides;
* shedding, burst with zero-cross turn-off, and the return to four phases;
* auto-zero in both intervals: each sampling phase must start while the high
  side is off, and, with `az_in_d_i` set, while it is on; the loop must stay
  locked in both cases.

It counts each mechanism, and counts a failure for any that never happened.
It finishes in about a second.

### The frequency sweep

`buck_sync_sweep_tb` uses the same plant and the top at its defaults. It
steps the reference through switching frequencies from 3 MHz to 9.5 MHz,
taking the clock to be 2 GHz. That gives these reference periods:

| Switching frequency | Reference period (cycles) |
|---|---|
| 3.0 MHz | 667 |
| 3.5 MHz | 571 |
| 4.0 MHz | 500 |
| 4.17 MHz (60 ns between neighbouring phases) | 480 |
| 4.5 MHz | 444 |
| 9.5 MHz | 211 |

After each step, the test checks four things:

* the mean switching period is within 1.5 % of the reference (in practice
  it matches exactly);
* the DLL code is within two cycles of a quarter period;
* the slave turn-on positions are correct;
* the DFS code is not pinned at either end of its range.

The mean period is exact at every step, because the loop integrates the
phase error. Single periods spread by the PI dither: about ±4 % at 3–4.5 MHz
and about ±10 % at 9.5 MHz. The spread grows at high frequency because one
window code step is a larger fraction of a short period. How much one code
step moves the frequency depends on the analog window gain.

## Where this design departs from, or fills in, its source

* **Clocked delay lines** replace current-starved inverter chains and their
  DAC (see above).
* **Filter step.** The source's design equation gives a lock dither of
  `2·Kz + 2` LSB. The filter here, with a unit integrator step, gives
  `2·Kz + 1`.
* **Gate types.** The source describes duty-cycle addition and subtraction
  once with the gate types swapped. This design uses OR with late copies to
  add and AND with early copies to subtract. Only that combination moves the
  falling edge in the intended direction and leaves the rising edge alone.
* **Own choices.** The source does not specify the following, so they are
  this design's choices:
  * the auto-zero phase lengths and non-overlap gaps;
  * the dead time;
  * the mode debounce;
  * the soft-start rate;
  * the sharing accumulator's extra bits and its code-to-tap mapping;
  * the DLL code range;
  * the BB-PFD edge-pairing rules.
* **DLL filter.** The DLL filter is a pure integrator (`Kz = 0`). The
  source only says it uses the same kind of filter as the frequency loop.
* **Slave phases.** The slave drivers are not segmented and have no burst
  mode. Light-load operation is done by the master alone, with the slaves
  shed.
* **Load transients.** Detecting an undershoot or overshoot, and shorting a
  comparator output to speed recovery, are analog. Only the resulting
  gate-forcing is here.
* **Not included.** The following are analog and not part of this RTL:
  * the power stage and gate drivers;
  * the ripple-emulation RC network;
  * the pre-amp and comparator circuits;
  * the window generator and both DACs;
  * current sensing and averaging;
  * the zero-cross comparator;
  * the LDO and bias circuits.
