# Continuous-time digital controller for a buck converter

A voltage-mode digital PWM loop reacts to a load step slowly. The error is
sampled once per switching period, the compensator has to stay stable for
small signals, and the output capacitor loses a lot of charge before the
inductor current catches up with the new load. This controller adds a second
path for large transients. It recovers the output in a single on/off action
of the switch, computed from capacitor charge balance. All the information it
needs comes from a few voltage comparators and from timing their edges.
There is no current sensor and no fast ADC.

- **Steady state.** A PID compensator drives a counter-based DPWM. The
  error comes from a small windowed flash ADC: eight comparators at
  Vref ± k·Vq, with k = 1..4 and Vq = 25 mV.
- **Large transients.** The output leaves the window by two steps. The
  switch is then forced on (after a dip) or off (after an overshoot) at once.
- **Measurement.** A continuous-time signal processor (CT-DSP) finds when
  the voltage reached its extreme and how deep it went. It gets both from
  the comparator edges.
- **The action.** From these it computes the two intervals t_on and t_off
  that bring the inductor current to the new load current just as the lost
  capacitor charge is replaced. It then plays that one switching sequence
  and hands control back to the PID.

The RTL is synthesizable SystemVerilog. Its defaults match a 5 V → 1.8 V,
5 W, 400 kHz converter. The clock is 50 MHz, each delay cell lasts 40 ns,
and each comparator has a 64-cell time-to-digital line.

## The idea: one switching action from charge balance

Take a load step from I1 to I2 during a dip.

1. The inductor current ramps up while the switch is on.
2. The capacitor keeps discharging until iL reaches the new load current.
   That moment is the valley of the output voltage.
3. Let the switch stay on for t_on past the valley, then turn it off for
   t_off. The current overshoots the load, then falls back.
4. With the right pair of times, the current lands exactly on I2 as the
   charge taken from the capacitor is returned. Both current and voltage
   are then in their new steady state at the same moment.

For an ideal buck stage with Vout ≈ Vref, the pair depends only on the depth
of the valley Δv and on the steady-state duty ratio D:

    t_on  = k1 · sqrt(Δv) · D / sqrt(1 − D)
    t_off = k1 · sqrt(Δv) · sqrt(1 − D)          k1 = sqrt(2·L·C / Vout)

The input voltage does not appear, so no input-voltage ADC is needed.
D is the low-pass-filtered duty command of the PID loop. An overshoot is
handled symmetrically: the switch goes off first and t_off is the interval
that starts at the peak.

## How the blocks fit together

```
 comp[7:0] ─► 2-flop sync ─┬─► error_encoder ─► e ─┬─► pid_compensator ─► duty ─► dpwm ─► c(t) ─┐
 (async)                   │                       │          │                                 │
                           │                       │          └─► duty_filter ─► D              │
                           │                       └─► mode_control ─► m(t), enter, dip         ├─► gate
                           ├─► tdc_delay_line ×8 ─► y_i                  │                       │
                           └─► peak_detector ◄──────┘ ◄──────────────────┘                       │
                                   │ st, level, N_max                                           │
                                   ▼                                                            │
                           optimal_time_calc (sqrt_lut, duty_lut) ─► t_on, t_off                │
                                   ▼                                                            │
                           optimal_sequence_gen ─► u(t) ───────────────────────────────────────┘
```

`gate = m ? u : c`. The modules, all in `rtl/`:

| module | role |
|---|---|
| `ctdc_pkg` | shared sizes (4 thresholds per side, 8 comparators), error and time types, integer square root used to fill the tables |
| `error_encoder` | thermometer code of the comparator window → signed error e = (Vref − v)/Vq in steps, −4..+4 |
| `tdc_delay_line` | one per comparator: 64-cell delay line plus a population-count adder, giving y_i = cells the comparator has been set |
| `peak_detector` | follows the comparators of the transient's side; when the deepest one resets, latches N_max and the level, and pulses st |
| `optimal_time_calc` | error correction, then the t_on/t_off formulas; uses `sqrt_lut` and `duty_lut` |
| `sqrt_lut`, `duty_lut` | tables of k1·√Δv and of the duty factors, computed at elaboration |
| `optimal_sequence_gen` | switching selector, SR latch, and ON/OFF step delay lines tapped at t_on/t_off |
| `mode_control` | enters dynamic mode at \|e\| ≥ 2, leaves when the sequence is done, re-arms once back inside the window |
| `pid_compensator` | incremental PID, once per switching period, held in dynamic mode |
| `dpwm` | 125-count trailing-edge PWM with a phase jump for the hand-back |
| `duty_filter` | first-order IIR of the duty, giving D |
| `ct_digital_controller` | top level |

## Finding the extreme point from comparator edges

This is the part of the design that is least obvious.

**Time-to-digital lines.** Each comparator output b_i feeds its own
chain of delay cells, with an adder counting the cells that hold a 1.

- After b_i rises, the count y_i climbs by one per cell time T = 40 ns.
- It saturates at 64 cells, which is 2.56 µs, just over one switching
  period.
- After b_i falls, the zeros propagate in and y_i decreases.

So y_i read at any moment is the time, in cells, that the comparator has
been set.

**Which comparator matters.** In a dip the low-side comparators set one
after another as the voltage falls. The last one to set has its threshold
closest to the valley. The voltage near the valley is close to a parabola,
so this comparator resets as the voltage comes back up, symmetric about the
valley in time.

- The deepest comparator is the first to reset. That edge means the
  valley has passed.
- Its y value at that edge is N_max, the time it was set.
- The valley lies N_max/2 cells before that edge.

`peak_detector` tracks the deepest comparator set on the transient's side
while m(t) is high. At the clock where that comparator falls, it registers:

- `level`: how many thresholds were crossed;
- `n_max`: the chosen line's y value;
- a one-clock `st` pulse.

Only one peak is reported per entry into dynamic mode.

**Error correction.** The thresholds are coarse (25 mV), which causes two
errors:

1. *Late detection.* Detection comes Δt = N_max·T/2 after the valley.
   The first interval of the sequence was already running since the
   valley, because the switch was forced on at entry. So Δt is subtracted
   from t_on after a dip, or from t_off after an overshoot.
2. *Underestimated depth.* `level·Vq` is the last threshold crossed, not
   the true valley. The missing part is the excursion in Δt beyond that
   threshold. Around the valley the capacitor current rises linearly with
   slope (Vg − Vout)/L, which gives

       Δv_error = (Vg − Vout)/(2LC) · Δt² = k2 · (1 − D)/D · Δt²,   k2 = Vout/(2LC)

   The corrected Δv = level·Vq + Δv_error is what the square-root table
   sees. For an overshoot the slope is the off-state −Vout/L, so the term
   becomes k2·Δt², with no duty factor.

**Synchronous realisation.** In the original controller the cells are
asynchronous delay elements and the logic reacts without a clock. Here every
cell is a flip-flop advanced by a tick every two clocks, and the comparators
pass a two-flop synchroniser. Time resolution is therefore the same 40 ns
cell. The fixed pipeline latency from comparator edge to `st` and the
computed times is about five clocks. It is removed by subtracting
`LAT_CELLS` = 2 further cells from the first interval.

## From measurement to t_on and t_off

`optimal_time_calc` is two register stages; `valid` follows `st` by two
clocks.

| quantity | format |
|---|---|
| Δv | 8 bits, unit Vq/16 = 1.5625 mV (0..0.4 V), saturating |
| D | DPWM counts, 0..125 |
| k1·√Δv (`sqrt_lut`) | delay cells, Q8.8: `K1_Q8·floor(sqrt(Δv·2¹⁶))/2⁸` |
| D/√(1−D) (`duty_lut`) | Q4.8 |
| √(1−D) (`duty_lut`) | Q0.8 |
| k2·(1−D)/(4D) (`duty_lut`, dip error term) | Q0.16, includes the ¼ of Δt² = N_max²/4 |
| t_on, t_off | 8-bit cells, saturating (max 10.2 µs) |

The constants and their default values:

- `K1_Q8` = k1·√(Vq/16)/T·256 = 1886.
- `K2_Q16` = k2·T²/(Vq/16)·2¹⁶ = 1208.
- Both assume L = 2.5 µH, C = 20 µF and Vout = 1.8 V.

Retarget the controller to another power stage by changing these two
parameters. The tables follow automatically; there are no data files.

## Playing the sequence and handing control back

- **Entry.** `mode_control` watches e continuously, not once per period.
  When |e| reaches `ENTER_LEVEL` = 2 it raises m(t) and records the
  direction. On the same clock edge the sequence generator's latch turns
  the switch on (dip) or off (overshoot).
- **Sequence.** When the times arrive, a step is launched into the ON or
  OFF delay line. These are 256-cell chains advanced every cell time and
  tapped at t_on/t_off. When the step reaches the tap, the latch toggles
  and a step goes into the other line. When that one reaches its tap,
  `done` pulses.
- **Return to PID.** At `done`, m(t) falls and the PID resumes:
  - The PID was frozen during dynamic mode, so it restarts from the
    pre-transient duty. The PID then removes the small remaining error.
  - The DPWM counter jumps to the point of its period where a steady PWM
    waveform's inductor current crosses its average. That is mid-off after
    a dip, which ends with the switch off, and mid-on after an overshoot.
    This way the first PWM period does not kick the current.
- **Re-arm.** The CT-DSP re-arms only after |e| is back below 2, so one
  transient gives one sequence.
- **Timeout.** A 2048-clock timeout (41 µs) returns to PID mode if a
  sequence never completes.

The steady-state loop:
- **PID.** Once per 2.5 µs period it applies
  d[n] = d[n−1] + A·e[n] + B·e[n−1] + C·e[n−2]. The gains are Q8, on a duty
  kept with 8 fractional bits and clamped to 0..125 counts. It samples in
  the last clock of a period, so the new duty acts in the next period.
- **Duty filter.** A first-order IIR with a 16-period time constant turns
  the duty into D.

## Parameters of `ct_digital_controller`

| parameter | default | meaning |
|---|---|---|
| `PERIOD` | 125 | clocks per switching period (2.5 µs = 400 kHz at 50 MHz) |
| `CELL_DIV` | 2 | clocks per delay cell (T = 40 ns) |
| `CELLS` | 64 | cells per time-to-digital line |
| `SEQ_CELLS` | 256 | cells per ON/OFF sequence line |
| `ENTER_LEVEL` | 2 | error steps that trigger dynamic mode |
| `K1_Q8` | 1886 | k1 scaling, see above |
| `K2_Q16` | 1208 | k2 scaling, see above |
| `PID_A`, `PID_B`, `PID_C` | 2800, −4300, 1800 | PID gains, Q8 |
| `D_INIT` | 45 | reset duty (1.8 V / 5 V) in counts |
| `TAU_ESR_CELLS` | 0 | ESR compensation: cells added back to the first interval (0 = off) |

Ports:

- Inputs:
  - `clk`, `rst_n`: asynchronous active-low reset.
  - `comp[7:0]`: raw comparator outputs. Bit i (i = 0..3) is set while
    v < Vref − (i+1)·Vq; bit 4+i while v > Vref + (i+1)·Vq.
  - `ctdsp_en`: 0 gives the plain PID regulator.
- Outputs:
  - `gate`: the switch drive.
  - `mode`: m(t).
  - `st`: the peak-detection pulse.
  - `err`, `duty`, `duty_lp`: the error code, the duty and the filtered
    duty D.
  - `t_on`, `t_off`: the last computed times.
  - `timed_out`: pulses if dynamic mode was abandoned by the timeout.

## Verification and how to simulate

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Run one with plain Verilator (5.x), for
example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
  rtl/ctdc_pkg.sv tb/tb_ct_digital_controller.sv --top-module tb_ct_digital_controller
./obj_dir/Vtb_ct_digital_controller
```

**Closed-loop test fixtures.** These are behavioural and live only in
`tb/`:
- `buck_model` is a real-valued buck stage integrated every clock.
- `comparator_window_model` gives the eight thresholds.
- `converter_system` wraps a plant, the comparators and a controller, and
  measures one transient.

**Unit testbenches.** They compare against independently computed values:
- `tb_optimal_time_calc` checks 800 random cases against the formulas in
  real arithmetic, to within ±2 cells.
- `tb_pid_compensator` checks against a reference model.
- `tb_tdc_delay_line`, `tb_dpwm` and `tb_optimal_sequence_gen` also check
  cycle counts.

**`tb_ct_digital_controller`.** The end-to-end test, at default parameters:
- Two converters run side by side, one with the CT-DSP and one PID-only.
- Load steps 0.2 → 1.2 A and back.
- For each step it checks:
  - one entry, one peak detection, one sequence and one on/off action;
  - inductor current at the end of the sequence within 0.3 A of the new
    load;
  - output within 50 mV;
  - smaller deviation and faster recovery than PID.
- It also counts each mechanism: dip and overshoot entries, delay
  correction, depth correction, PID updates and timeouts.

**`tb_load_transient_workloads`.** Runs the evaluated cases. Typical
results, with the plant described below:

| case | peak deviation | recovery beyond ±50 mV | actions |
|---|---|---|---|
| PID only, 0.2 → 1.2 A | 150 mV | 22 µs | – |
| CT-DSP, 0.2 → 1.2 A | 74 mV | 2.7 µs | 1 |
| PID only, 1.2 → 0.2 A | 124 mV | 27 µs | – |
| CT-DSP, 1.2 → 0.2 A | 73 mV | 2.7 µs | 1 |
| CT-DSP, 0.2 → 1.5 A | 80 mV | 2.7 µs | 1 |
| CT-DSP, 1.5 → 0.2 A | 141 mV | 18 µs | 2 |
| CT-DSP, C = 16 µF (tables for 20 µF), 0.2 → 1.2 A | 101 mV | 3.5 µs | 1 |
| CT-DSP, C = 16 µF, 1.2 → 0.2 A | 110 mV | 37 µs | 4 |
| CT-DSP, ESR 35 mΩ | 197 / 273 mV | not recovered | re-triggers every period |

**`tb_step_phase_sweep`.** Steps the load at eight instants spread over
one switching period. Each instant has its own CT-DSP loop and its own
PID-only loop, stepped at the same instant.

| step | one action | two or three actions | deviation below PID's |
|---|---|---|---|
| 0.2 → 1.2 A | 4 of 8 | 4 of 8 | 8 of 8 (65–101 mV vs 98–152 mV) |
| 1.2 → 0.2 A | 3 of 8 | 5 of 8 | 6 of 8 |

Every instant ends with the inductor current within 0.3 A of the new load,
and no instant times out. The single-action behaviour of the end-to-end
test is the favourable case, not the only one. The causes are listed under
the limitations below.

## Test plant assumptions

The controller's numeric constants come from an assumed power stage:
- L = 2.5 µH, C = 20 µF (ceramic, ESR 0).
- 0.05 Ω series loss.
- 5 V in, 1.8 V out.

These set k1, k2 and the PID gains. With a larger inductor such as 5 µH,
the 1.2 → 0.2 A overshoot lasts longer than the 64-cell lines can time, and
N_max saturates. With 2.5 µH this still happens at some step instants. A different power stage needs new `K1_Q8`, `K2_Q16` and PID
gains.

## Where this design departs from the original, and known limitations

- **Synchronous cells.** Delay cells are clocked flip-flops (40 ns at a
  50 MHz clock), not asynchronous delay elements. The comparators are
  synchronised. The resulting fixed latency is compensated by `LAT_CELLS`.
  Resolution is therefore tied to the clock. Faster cells need a faster
  clock, or a real asynchronous line, which is not modelled here.
- **One line per comparator** (eight lines of 64 cells), as in the
  prototype. A single shared line, suggested for on-chip area, is not
  built.
- **Overshoot error term.** The depth-correction term for an overshoot
  (k2·Δt²) is derived the same way as the dip term but is this design's
  extension.
- **Own choices.** The PID hold during dynamic mode, the DPWM phase jump at
  hand-back, the re-arm rule and the timeout are this design's choices for
  a clean hand-back.
- **ESR.** A capacitor ESR makes the voltage extreme come τ = C·R_esr
  before the capacitor current crosses zero, which is the real charge-balance
  reference. `TAU_ESR_CELLS` moves the reference τ later by lengthening
  the first interval. It is off by default and was unit-tested but not tuned
  in closed loop. With the assumed 2.5 µH inductor the current
  ripple is about 1.15 A peak-to-peak. A 35 mΩ capacitor ESR then adds about
  40 mV of ripple to the output. That ripple reaches the entry threshold, so
  the controller keeps re-entering dynamic mode and does worse than the PID
  alone. Use this controller with low-ESR capacitors, or with lower ripple.
- **No auto-tuning.** There is no automatic tuning of k1 against L and C
  variations. With C 20 % low, the first response is still better than the
  PID, but the times come out too long and extra corrective actions can
  follow.
- **Hand-back sensitivity.** About half of the load-step instants need a
  second or third action:
  - The PID restarts from its pre-transient duty.
  - That duty misses the change in steady-state duty that conduction
    losses cause at the new load: about 1.5 counts for 1 A with the assumed
    0.05 Ω.
  - The output then drifts back over the two-step entry threshold before
    the PID catches up.

  Each extra action is itself correct, and the current ends at the load.
  But recovery is then slower, and in some cases the total deviation is no
  better than the PID's.

  Restarting the PID from the filtered duty D instead was tried. It was
  worse, because D lags.
- **64-cell lines.** For the heavy-to-light step with this plant, some
  instants produce an overshoot longer than the 64-cell lines can time.
  N_max saturates at 64 and the sequence is mis-sized. A larger `CELLS` or
  a longer `CELL_DIV` removes this, at the cost of area or resolution.
