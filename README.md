# Hybrid-control all-digital buck converter controller

This is the controller of a single-phase buck converter meant for an
integrated voltage regulator that supplies a digital voltage domain. It
has two ideas:

* **No voltage reference.** The controller does not compare the output
  voltage with a reference. It measures how much timing slack a replica
  of the load's critical path has left in each core-clock period. A
  critical-path monitor (CPM) turns the supply voltage into a delay. A
  time-to-digital converter (TDC) turns the slack into a code. The set
  point is a slack code, so the loop holds "just enough voltage for the
  logic to meet timing". That tracks temperature and process, with no
  regulator offset to margin for.
* **Hybrid control.** In steady state a PID compensator and a digital
  PWM regulate the output (linear mode). When a large load step pushes
  the output out of a window, the bridge is held at Vin or at ground
  (direct-drive mode). The inductor current then ramps as fast as it
  can. Linear control takes over again as soon as the slope of the
  output reverses, which means the inductor current has caught up with
  the load.

Everything from the TDC code to the bridge drive signal is synthesizable
SystemVerilog. The CPM and the TDC are analog delay circuits. They are
modelled behaviourally (`real` arithmetic) so that the whole loop can be
simulated. The power bridge, inductor and capacitor are outside the
controller. A model of them is provided for the closed-loop testbenches.

## Signal flow

```
 vout ──► cpm_model ──delay──► tdc_vernier_model ──code──► tdc_code_manager
                                                          │ code_cur/up/down │ coarse_err
                    ┌─────────────────────────────────────┤                  │
                    ▼                                     ▼                  ▼
           control_law_select ◄── pwm ── dpwm ◄── dsm_dither ◄── pid_controller ◄── deriv_unit
                    │                                                 ▲ freeze
                    └──► bridge_drive (1 = switching node to Vin) ────┘ (dd_active)
```

| Module | Role |
|---|---|
| `buck_pkg` | Widths, fixed-point formats, `mode_e` |
| `cpm_model` | Behavioural CPM: 16 programmable delay cells |
| `tdc_vernier_model` | Behavioural vernier TDC: slack → 8-bit code |
| `tdc_code_manager` | Current/previous code, step flags, truncated PI error |
| `deriv_unit` | Time-between-code-changes derivative with a 16-entry reciprocal table |
| `pid_controller` | PI on the coarse error plus D term; 10-bit duty command per period |
| `dsm_dither` | First-order residue accumulator: 10-bit command → dithered 7-bit code |
| `dpwm` | 0..127 ramp advancing on both clock edges |
| `control_law_select` | Linear / direct-drive mode selection and the bridge multiplexer |
| `hybrid_buck_top` | The whole controller, including the CPM and TDC models |

## Rates and timing

| Quantity | Value | How it arises |
|---|---|---|
| Core clock | 1 GHz (`T_CLK_PS` = 1000) | Chosen so that 64 clocks make one switching period |
| Switching period | 64 core clocks = 15.625 MHz | 128 ramp steps of half a clock |
| DPWM resolution | 7 bits (half-clock steps) | Double-edge ramp 0..127 |
| Effective duty resolution | 10 bits | 3-bit residue dither over 8 periods |
| TDC LSB | 2.6 ps | About 6 mV of output per code at 1.2 V (all-gate CPM) |
| PID and dither update | Once per period | PID at the period's first clock, dither one clock later |
| Duty-command latency | About 1 period | The DPWM takes the new code at the next period start |
| Mode decision | Every core clock | Registered one clock after the code step |

A higher output voltage gives a shorter CPM delay, more slack and a
larger code. With the default all-gate-dominated CPM at 1 GHz, codes are
about 19 at 0.8 V, 101 at 1.0 V and 144 at 1.2 V. The code is 0 below
about 0.757 V.

## Two resolutions of one TDC

The same TDC code is used at two resolutions:

* **Coarse code, for PI.** The code is shifted right by one bit
  (`COARSE_SHIFT`). A digital loop limit-cycles unless its sensor is
  coarser than its actuator. The coarse code (about 12 mV at 1.2 V) is
  well above the dithered DPWM step (about 2 mV at 2 V in). The PI error
  is `(target >> 1) - (code >> 1)`. It is positive when the output is
  low.
* **Full code, for the derivative and the direct-drive comparators.**
  Fine resolution makes transients visible early and makes slope
  reversals detectable.

## Direct drive: entering and leaving

`control_law_select` compares the current code with the previous one and
with two thresholds, on every core clock:

| From | Condition | To | Bridge |
|---|---|---|---|
| LINEAR | `code < tdc_min` and the code fell this clock | DD_HIGH | Held at Vin |
| LINEAR | `code > tdc_max` and the code rose this clock | DD_LOW | Held at ground |
| DD_HIGH | The code rose | LINEAR | DPWM |
| DD_LOW | The code fell | LINEAR | DPWM |
| Any | `dd_enable = 0` | LINEAR | DPWM |

The entry condition needs the output to be outside the window *and* still
moving outward. While the output is falling, the inductor current is
below the load current. The exit condition is current-based, not
voltage-based. When the output turns around, the inductor current has
just crossed the load current. At that moment the output is at its
extreme, and handing over to the PID gives a smooth recovery. While
direct drive is active, the PID integrator is frozen (`freeze` =
`dd_active`). The PID therefore resumes from its pre-transient operating
point and does not wind up.

Points to know when using or changing this block:

* Direct drive can be entered several times during one transient. A
  single code step of ripple can end direct drive, and the next dip
  below `tdc_min` starts it again. The integrator still has to supply
  the new DC duty. In the 5 A test this gives about 60 short
  direct-drive episodes while the output recovers. There is no dwell
  time or hysteresis beyond the window itself.
* The window (`tdc_min`, `tdc_max`) is in slack codes. Around the set
  point, a code is worth about 6 mV at 1.2 V but only about 2 mV at
  0.8 V. A window of a fixed number of codes is therefore narrower in
  volts at low voltages.
* `dd_entries` counts entries into direct drive, for monitoring.

## The time-based derivative

Within one switching period, the output rarely moves by even one TDC
code. Differencing the code once per period therefore gives a derivative
that is mostly zero, with occasional ±1 spikes. `deriv_unit` instead
measures the time between code changes, in core clocks. It counts 64
clocks per switching period, so the measurement is far finer. When the
code changes by `delta` after `c` quiet clocks, the estimate is:

```
deriv = delta * RECIP[bucket(c)]      (clamped delta: -7..+7)
```

`RECIP` is a 16-entry table of `DK/c` with `DK` = 256. It is indexed by
the position of the interval's leading one plus the next bit:

| bucket | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| clocks | 1 | 2 | 3 | 4–5 | 6–7 | 8–11 | 12–15 | 16–23 | 24–31 | 32–47 | 48–63 | 64–95 | 96–127 | 128–191 | 192–255 | 256–383 |
| value | 256 | 128 | 85 | 57 | 39 | 27 | 19 | 13 | 9 | 6 | 5 | 3 | 2 | 2 | 1 | 1 |

For bucket `i > 0`, with `p = (i+1)/2` and `m = (i+1)%2`:
`lo = 2^p + m·2^(p-1)`, `hi = lo + 2^(p-1) - 1`, and
`RECIP[i] = round(2·DK/(lo+hi))`. Bucket 0 is the interval 1. The table
is computed at elaboration by a constant function.

If the code stays quiet for longer than the last interval, the true rate
can be no higher than one step per `age` clocks. The estimate then decays
to `last_delta * RECIP[bucket(age)]`. After 384 quiet clocks it reads 0.
A positive `deriv` means a rising output. The PID subtracts `KD*deriv`,
so the D term opposes motion.

## Compensator, dither and DPWM

**`pid_controller`.** Once per period it computes, in fixed point with 8
bits below one duty LSB:

```
u = KP*e + I - KD*deriv;   I <= clamp(I + KI*e)   (unless frozen)
duty_cmd = clamp(u >> 8, 0, 1023)
```

The defaults are `KP` = 2048, `KI` = 128 and `KD` = 256: 8 LSB per
coarse code, ½ LSB per code per period and 1 LSB per derivative unit. The
integrator resets to `INIT_DUTY` = 512 (duty 0.5). The gains were
chosen by closed-loop simulation with the plant model below. With
`KI` = 512 the loop is unstable, so the default leaves a factor of
about 4.

**`dsm_dither`.** The low 3 bits of `duty_cmd` go into a residue
accumulator each period. Its carry adds one step to that period's 7-bit
code. Over 8 periods the codes average to the full 10-bit command. The
code saturates at 127.

**`dpwm`.** A 6-bit counter counts clocks within the period. The ramp
value is `2*cnt` in the high phase of the clock and `2*cnt+1` in the low
phase. The output is high while `ramp < duty_code`, so the pulse is
`duty_code` half-clocks long and starts at the period start. The
double-edge output is a pair of flip-flops combined by XOR. The rising-edge
flop stores `d ^ qn` and the falling-edge flop stores `d ^ qp`, so
`qp ^ qn` takes the new value after either edge, and no clock reaches a
data path. `duty_code` is sampled at the period start. `period_start`
is high for the first clock of each period.

## Behavioural models

**`cpm_model`.** The chain has `N_CELLS` = 16 cells. `cell_sel[i]`=1
makes cell *i* gate-dominated: its delay follows the alpha-power law
`V/(V-Vth)^α` (Vth 0.35 V, α 1.3). A 0 makes it wire-dominated: 85% of
its delay is independent of the supply. Both types take 59.375 ps at
0.8 V, so the chain takes 950 ps at 0.8 V whatever the mix. The mix sets
only the voltage sensitivity, which lets the monitor be trimmed to the
critical path it stands for. These curves are a plausible model, not
silicon data.

**`tdc_vernier_model`.** It counts vernier stages `k` (1..255) with
`k·(τslow − τfast) ≤ T_clk − delay`, using τslow = 20 ps and τfast =
17.4 ps. It registers the count on the rising clock edge.

**`tb/buck_plant_model.sv`** models the power stage: an ideal bridge
(2 V or 0 V), 13 nH with 40 mΩ, 10 µF with 2 mΩ ESR, and a current-source
load. It integrates with forward Euler on every clock edge (0.5 ns
steps).

## Verification

Each synthesizable block has a self-checking testbench with an
independent reference model. A watchdog ends any run that hangs.

| Testbench | What it establishes |
|---|---|
| `tb_cpm_model` | Delays at 0.8/1.0/1.2 V for three mixes; monotonic; sensitivity grows with gate cells |
| `tb_tdc_vernier_model` | `floor((1000 ps − delay)/2.6 ps)` clamped, one-clock latency, no missing codes |
| `tb_tdc_code_manager` | Code registers, step flags and truncated error over 3000 random steps |
| `tb_deriv_unit` | All 16 table values, bucket edges, decay rule and clamping against a cycle model |
| `tb_pid_controller` | Output against a reference; saturation at both ends; freeze |
| `tb_dsm_dither` | Every command: codes are floor or floor+1, 8-period sums, saturation, exact sequence |
| `tb_dpwm` | Pulse length and shape for every code in half-clock samples; 64-clock period; strobe |
| `tb_control_law_select` | 100 000 clocks of code trajectories; every transition type; bridge mux |
| `tb_hybrid_buck_top` | Closed loop at default parameters (below) |
| `tb_workload_vout_points` | Regulation at 0.8/1.0/1.2 V × 1.5/3.0/4.5 A, with a load step at each voltage; regulation at 1.0 V with the CPM set to half wire-dominated cells |

Closed-loop results at the default parameters, 1.0 V set point, 5 A step
in 10 ns:

| | Droop | Overshoot on release |
|---|---|---|
| Linear control only (`dd_enable` = 0) | ~109 mV | ~113 mV |
| Hybrid control | ~29 mV | ~31 mV |

`tb_hybrid_buck_top` checks several things:

* The output settles within 2 codes of the set point.
* The output toggles at 15.6 MHz.
* The loop recovers into the window after every step and release.
* Hybrid control reduces droop and overshoot.
* Each mechanism happens at least once: both direct-drive modes,
  integrator freeze, dither carries, a nonzero derivative and odd
  (half-clock) DPWM codes.

These numbers depend on the plant model and on gains chosen here. They
show that the mechanisms work, not that a circuit will reach these
values. The published design reports about 25 mV with hybrid control and
60 mV with linear control alone. The hybrid result here is close to
that. The linear-only droop is larger, because these gains favour low
steady-state ripple (about ±4 mV).

## Simulating

Every testbench is self-contained and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/buck_pkg.sv \
    tb/tb_hybrid_buck_top.sv --top-module tb_hybrid_buck_top
./obj_dir/Vtb_hybrid_buck_top
```

For a block testbench, replace the testbench file and the top module
name. The closed-loop run covers 209 µs of converter time and takes
about a second. With `verilator --lint-only -Wall` the only warnings are style
warnings. Some package constants are unused in a given module. The
reset also appears in an assertion's `disable iff`. One unneeded output
of `tdc_code_manager` is left unconnected in the top.

## Where this design makes its own choices

The architecture, the two TDC resolutions and the time-based derivative
with its 16-entry table follow the published design. So do the
direct-drive entry and exit rules, the dither with 3 extra bits and the
127-step double-edge ramp. The following are choices made here:

* 8-bit TDC code; 1-bit truncation for PI; 1 GHz core clock.
* The CPM and TDC delay models and all their numbers.
* The derivative table's bucket scheme, the decay while quiet, and the
  ±7 clamp on `delta`.
* PID gains, fixed-point format, one update per period, integrator
  clamp and freeze during direct drive, and reset duty.
* A first-order delta-sigma. The DPWM period counter wraps rather than
  saturates; the ramp it produces is the same.
* Trailing-edge modulation and the XOR double-edge register.
* A single `bridge_drive` output, with no dead time: pre-drivers and
  dead time belong to the power stage.
* The `dd_enable` input and the `dd_entries` counter.
* The controller is not mapped to a cell library. The published
  controller uses 211 standard cells. This RTL's coarse synthesis gives
  about 190 word-level cells and about 140 flip-flop bits, plus the
  derivative table.

Multi-phase operation is not implemented. The architecture allows it,
but the published design is single-phase as well.
