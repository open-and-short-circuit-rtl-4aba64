# Fast switch fault diagnosis for a boost converter

A power switch in a DC-DC converter can fail in two ways. It can fail open, so
it no longer conducts although it is commanded on. Or it can fail short, so it
conducts although it is commanded off. Either fault has to be found within
microseconds, so that a protection or reconfiguration scheme can act before
more damage is done.

This RTL detects both faults in a non-isolated, single-ended converter (buck,
boost, buck-boost, Ćuk, SEPIC). It uses only two signals that the converter
control already has: the sampled inductor current `i_L` and the switching
command `q`. No sensor is added.

The idea rests on one fact about continuous conduction. The inductor current
rises while the switch is on and falls while it is off, in every switching
period. A switch that has failed open makes the current fall all the time. A
switch that has failed short makes it rise all the time.

The design also contains the cascade voltage/current controller of the boost
converter, which produces `q`. Control and diagnosis share the same device,
the same 1 MHz sample clock and the same current samples.

## Block structure

```
                 +---------------------------- fd_top ----------------------------+
  v_oref ------->| boost_ctrl                                                     |
  v_o    ------->|  energy_calc x2 -> pi_ctrl (energy) -> pi_ctrl (current) -> pwm_gen --+--> q
  i_l    ---+--->|                                                                |  |
            |    | fault_diag                                                     |  |
            +--->|  slope_sign --+--> fd1_detector ----------------- fd1_out --+  |  |
                 |               +--> fd2_fsm <-- edge_detect (trig) <-- q ----|--+  |
                 |                    fd2_out ---------------------------------OR--> fault
                 +----------------------------------------------------------------+
```

| file | what it is |
|---|---|
| `rtl/fd_pkg.sv` | fixed-point formats and the FD2 state enum |
| `rtl/slope_sign.sv` | sign of the current slope, `sgn(i_L[n] - i_L[n-5])` |
| `rtl/edge_detect.sv` | `trig`: one-clock pulse on each rising edge of `q` |
| `rtl/fd1_detector.sv` | FD1: sign comparison plus a time criterion of N samples |
| `rtl/fd2_fsm.sv` | FD2: four-state machine over one switching period |
| `rtl/fault_diag.sv` | FD1 and FD2 in parallel, `fault = fd1_out \| fd2_out` |
| `rtl/energy_calc.sv` | `e = 0.5 C v^2` |
| `rtl/pi_ctrl.sv` | PI controller with limiter and anti-windup |
| `rtl/pwm_gen.sv` | sawtooth-carrier PWM |
| `rtl/boost_ctrl.sv` | energy loop, current loop and PWM |
| `rtl/fd_top.sv` | top: controller and diagnosis |
| `tb/boost_plant.sv` | behavioural converter model for simulation only |

## The slope sign

The derivative of `i_L` is not formed sample by sample. Over one 1 µs sample
the current changes by only a few LSBs, and noise would flip the sign. Instead
`slope_sign` compares each sample with the one five samples older:
`sgn(i_L (1 - z^-5))`.

- `sgn_pos = 1` means the current is rising (+1); `sgn_pos = 0` means it is falling (-1).
- An exactly equal pair keeps the previous sign.
- The window adds about 2.5 samples of delay. This adds to the delay of the
  driver, switch, sensor and A/D converter.

## FD1: the fast detector

The command predicts the slope: `S_q' = sign(q - 0.5)` is +1 while the switch
is commanded on and -1 while it is off. `error` is 1 whenever the measured
slope sign disagrees with this prediction.

Even a healthy converter gives short error pulses at every switching edge,
because the current only turns some microseconds after the command does. So
FD1 applies a time criterion:

- A counter runs while `error = 1` and clears as soon as `error = 0`.
- FD1 flags a fault when the count exceeds `N = 20`, i.e. after 21 consecutive
  disagreeing samples (21 µs).

`N·T_c` must exceed the total loop delay `T_d` of the hardware. For the
reference converter `T_d` was about 10 µs, so `N·T_c = 20 µs` leaves a factor
of two.

FD1 is fast but has blind spots:

- **Open switch.** It can only act while `q = 1`, so it needs `D·T_s > N·T_c`.
  The fault must also strike early enough in the on-time for N samples to fit
  before `q` falls.
- **Short switch.** It needs `(1-D)·T_s > N·T_c`.
- **Consequence.** With `T_s = 67 µs`, FD1 misses an open switch below roughly
  D = 0.31 and a short switch above roughly D = 0.69. It catches them only
  later, if the controller moves D out of that range.
- **Timing.** In its good range it flags between `N·T_c - T_d` and
  `T_s + (N-1)·T_c` after the fault.

`fd1_out` is latched until reset. `fd1_detect` is the raw comparator.

## FD2: the robust detector

FD2 checks that the current rises and then falls once between two rising edges
of `q` (`trig`):

| state | meaning | leaves on |
|---|---|---|
| S0 switch off | waiting for a new period | `trig` → S1 |
| S1 check for fault | switch commanded on, waiting for the rise | `trig` → S3 (the current never rose: open switch); else slope +1 → S2 |
| S2 switch on | current seen rising, waiting for the fall | `trig` → S3 (the current never fell: short switch); else slope -1 → S0 |
| S3 fault | `fd2_out = 1` | reset only |

- In a healthy converter the state is back in S0 before the next `trig`.
- Any stuck current reaches S3 at the second `trig` after the fault, within
  two switching periods whatever D and the switching frequency are.
- The limit is that the on-time and the off-time must each be longer than the
  sensing delay, here about 7 clocks. Otherwise the sign cannot follow the
  command within the period.

**The S2 exit.** S2 is left on the slope turning negative, not on `q`
returning to 0. Leaving on `q` would let a shorted switch pass every period
unnoticed. The S2 row of the table is what makes short-circuit detection work.

`fault = fd1_out | fd2_out`. FD1 usually answers in about 20–30 µs. FD2 covers
the cases FD1 cannot see, within two periods (≤ 134 µs here).

## Converter control

The outer loop regulates the energy in the output capacitor,
`e_o = 0.5·C·v_o^2`, instead of `v_o`. It compares it with
`0.5·C·v_oref^2` and sets the inductor current reference `i_Lref`. The inner
loop sets the duty cycle D from `i_Lref - i_L`.

- **Gains.** `K_p = 22.5`, `K_i = 112.5` (energy loop) and `K_p = 0.0895`,
  `K_i = 0.8953` (current loop), in SI units, for C = 2200 µF.
- **Discretisation.** Forward Euler, integrating once per 1 µs clock. The
  integrator stops while the output sits at a limit.
- **Limits.** `i_Lref` is limited to 0..40 A and D to 0.15..0.85.
- **Why D is limited.** 0.15·T_s = 10 µs, which matches the total
  sensing-plus-switching delay the diagnosis has to live with. The diagnosis
  relies on the current visibly rising and falling in every period. If a
  reference step pins D near 0 or 1, the on-time or off-time becomes shorter
  than that delay, and FD2 would flag a healthy converter. With D allowed up
  to 0.95, a 10 V reference step did exactly that.
- **PWM.** A 67-clock sawtooth gives 14.93 kHz, the nearest a 1 MHz clock
  gets to 15 kHz. `q` is high for the first `round(D·67)` clocks of each
  period. D is taken up once per period.

With these gains the current loop is almost purely proportional. In steady
state `i_Lref` therefore sits several amperes above `i_L`, and the energy
loop's integrator supplies the difference. This is expected.

The controller matters for the diagnosis. After an open-switch fault the
current falls, so the controller raises D. That moves FD1 out of its blind
spot, and FD1 eventually fires even at small D. A short-circuit fault at large
D works the same way in the other direction.

## Number formats and timing

| quantity | format | range |
|---|---|---|
| `i_l`, `i_lref` | signed 16 bit, 8 fraction bits (A) | ±128 A |
| `v_o`, `v_oref` | unsigned 16 bit, 6 fraction bits (V) | 0..1024 V |
| `e_o`, `e_oref` | signed 24 bit, 12 fraction bits (J) | ±2048 J |
| `duty` | unsigned 16 bit, 16 fraction bits | 0..1 |

- One clock is one sample (`T_c = 1 µs`, 1 MHz clock). All registers reset
  asynchronously on `rst_n` low.
- `fault`, `fd1_out` and `fd2_out` hold until reset.
- Scaling the A/D converter codes into these formats is left to the board
  interface. So is what to do once `fault` rises.

## Parameters

| parameter | default | where |
|---|---|---|
| `N` | 20 | FD1 observation length in samples |
| `LAG` | 5 | slope window in samples |
| `PWM_PERIOD` | 67 | switching period in clocks |
| `C_F`, `KP_*`, `KI_*`, `TS`, `I_LREF_MAX`, `D_MIN`, `D_MAX` | see above | `boost_ctrl` |

- **Faster clock.** At a faster sample clock, scale `N`, `LAG` and
  `PWM_PERIOD` together. A faster clock buys resolution, not speed: detection
  is bounded by the converter's own delay.
- **Slower hardware.** `N·T_c` must stay above that delay on the target
  hardware. Otherwise normal switching edges are flagged as faults.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fd_pkg.sv tb/tb_fd_top.sv --top-module tb_fd_top
./obj_dir/Vtb_fd_top
```

Replace `tb_fd_top` with any other testbench name.

**End-to-end test.** `tb_fd_top` runs `fd_top` with its default parameters in
closed loop with `tb/boost_plant.sv`. The model has:

- the reference converter values (50 V, 3 mH, 0.1 Ω, 2200 µF, 50 Ω);
- a six-pulse rectified input with no smoothing capacitor;
- a 3 µs sensor delay;
- open- or short-switch injection.

It runs five scenarios and takes well under a second:

| scenario | D | FD1 | FD2 |
|---|---|---|---|
| healthy | 0.50 | no alarm | no alarm |
| open switch | 0.47 | 29 µs | 130 µs |
| short switch | 0.46 | 50 µs | 63 µs |
| open switch | 0.15 | 419 µs, after the controller raised D | 130 µs |
| short switch, 250 V into 500 Ω | 0.78 | 194 µs | 63 µs |

The testbench counts these mechanisms and fails if any of them never happened:

- tolerated delay pulses of `error`;
- a detection by each detector;
- each detector being first at least once;
- each fault type;
- each FD2 state.

**Reference-hardware cases.** `tb_fd_experiments` repeats the cases measured
on the reference hardware, again at the default parameters:

| case | D | FD1 | FD2 |
|---|---|---|---|
| 100 → 110 V reference step, open switch 60 ms later | 0.55 | 29 µs | 130 µs |
| open switch, 83 V | 0.44 | 84 µs | 130 µs |
| open switch, 62.5 V | 0.21 | 486 µs | 130 µs |
| short switch, 125 V | 0.55 | 55 µs | 63 µs |
| short switch, 250 V into 500 Ω | 0.79 | 197 µs | 63 µs |

- The step case checks that the control transient raises no alarm.
- At D = 0.44 the open switch struck 4 µs into the on-time. After the roughly
  7 µs sensing delay, fewer than 21 samples of on-time were left, so FD1 caught
  it one period later.
- The published measurements are in the same order: FD1 in about 20 µs when
  D allows it, FD2 in 90–110 µs, and FD1 after 160–260 µs in the blind-spot
  cases.

**Unit tests.** The unit testbenches compare each block with an independent
model:

- random stimulus for the slope sign, FD1 counter, FD2 diagram, PI and PWM;
- exact timing of FD1 (detection on the 21st error sample, no alarm for runs
  of 1..20);
- FD2 detection within two periods for a fault at every position in the
  period, at D = 0.2, 0.5 and 0.8;
- FD1's worst case, `T_s + (N-1)·T_c` plus the sensing delay, for an open
  switch struck at every clock of the period at D = 0.5. The worst case seen
  is 78 µs, against 86 µs before the delay is added;
- the controller settling after a 100 V → 120 V reference step.

## How far to trust it, and where it departs from the method

- **Diagnosis structure.** The slope estimate, FD1 with `N = 20`, the four FD2
  states and their transitions, and the OR follow the published method.
- **FD1 comparator.** `count > N` means detection after N+1 samples (21 µs),
  not exactly 20.
- **FD1 latch.** `fd1_out` is latched, where the method draws FD1's output
  straight from the comparator.
- **FD2 priority.** In S2 a `trig` takes priority over a simultaneous slope
  of -1.
- **Slope sign ties.** A slope of exactly zero keeps the previous sign.
- **Controller details of this design's own:** the fixed-point formats, the
  Euler discretisation at the sample rate, the limiter values and the
  anti-windup. The gains are the reference converter's, and the controller
  regulates the model converter. At 250 V into 50 Ω (D near 0.8) this loop
  limit-cycles against its current limit, so the high-duty test uses a lighter
  load.
- **Not included:** the sensors, the A/D converters and their latches, the
  IGBT and its driver, and the rectifier. These are analog or bought-in parts.
  `boost_plant.sv` is a simulation model only.
- **Not verified:** no response to a detected fault, and no hardware test.
  The design has only been checked in simulation against a behavioural
  converter. Detection times on real hardware depend on its actual delays.
