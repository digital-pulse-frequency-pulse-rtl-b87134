# DPFM/DPAM: a digital pulse-frequency / pulse-amplitude controller for light-load buck converters

At light load a buck converter runs in discontinuous conduction (DCM): each
switching cycle pushes one packet of charge into the output and the inductor
current returns to zero before the next one. A conventional pulse-frequency
modulator (PFM) keeps the switch on-time fixed and regulates the output only
by how often it fires. That wastes energy, because the best on-time depends
on the operating point: a long on-time means few cycles (low switching loss)
but high peak current (high conduction loss), a short one the reverse.

This controller regulates with two knobs at once:

* **pulse frequency** — a PI compensator sets the switching frequency from the
  output-voltage error, as in PFM;
* **pulse amplitude** — an on-time optimizer sets the switch on-time, and with
  it the inductor peak current, to the value that minimises the sum of
  switching and conduction losses.

Both are turned into switch pulses by a modulator that produces long,
programmable intervals without a fast counter: a short pulse races round a
ring of delay cells and shrinks on every cell until it vanishes. The whole
controller acts only once per switching cycle.

```
  e[n] (from the converter's error ADC)
    │
    ├──► pi_lut ───── f_sw[n] ───────────────┐
    │                                        ▼
    └──► ton_opt ──── t_on[n] ───────► dpfm_dpam ───► gate (high-side switch)
              ▲            ▲                 │
              └────────────┴──── f_clk ◄─────┘  (one pulse per switching cycle)
```

The top module is `dpfm_dpam_ctrl`. The error ADC and the power stage are
analog and not part of the RTL: the top takes the error word `e` as an input
and brings out the switch drive `gate`.

## Timing base

Everything runs on one clock, `clk`. One clock period is the delay of one
delay cell. The constants assume 12.5 ns (80 MHz), chosen so that 32 cells
give a 400 ns maximum on-time. All times below are in clock periods. The
controller's "switching-rate clock" `f_clk` is a one-period enable on this
clock, not a separate clock domain.

## The modulator (`dpfm_dpam`)

A switching cycle begins with a one-period **trigger**. The trigger does three
things:

1. It sets the switch-on latch, so `gate` goes high.
2. It starts **delay line A** (`delay_line`: 32 register cells and a tap
   multiplexer). The tap selected by `t_on` returns the trigger `t_on + 1`
   periods later and resets the switch-on latch.
   So the on-time is `(t_on + 1)` cells: 12.5 ns to 400 ns.
3. It starts the **frequency regulator** (`freq_regulator`), whose end-of-race
   output starts the next trigger.

The control words are registered at the trigger and stay fixed for the rest
of the cycle. The trigger is also brought out as `f_clk`.

### The race (`freq_regulator`, `ring_osc`, `eor_detect`)

Getting a 50 µs interval out of 12.5 ns cells without a 4000-step counter is
the central trick, and it goes like this.

* An injection latch is set by the trigger and reset by **delay line B**,
  which repeats the trigger `W = dlb_sel + 1` periods later. This gives a
  pulse of width `W`. Its rising edge is the "slow" signal and its falling
  edge the "fast" one.
* The pulse enters a **ring of 5 delay cells** (`ring_osc`). Each cell delays
  a rising edge by `T_RISE` = 128 periods. It delays a falling edge by only
  `T_RISE − D` periods, with `D = f_sw + 1`. So in every cell the falling
  edge gains `D` periods on the rising edge, and the pulse gets `D` narrower.
  The pulse is at most 32 periods wide and one lap is 640 periods, so a
  single pulse can go round the ring many times without meeting itself.
* In cell number `ceil(W / D)` the falling edge reaches the rising edge and
  the pulse disappears.
* Each cell has an **S-R latch** (`eor_detect`). The latch is set when the
  rising edge enters the cell. It is reset when the falling edge leaves the
  cell, or when the pulse vanishes there. While the pulse lives, at least
  one latch is high. When all latches are low, the race is over.
  `eor` pulses for one period, and that starts the next trigger.

The switching period that results is exact:

```
T_sw = 1 + W + ceil(W / D) · (T_RISE − D)        W = dlb_sel + 1,  D = f_sw + 1
```

With `W = 32`, the period runs from 4097 periods (`f_sw` = 0, the pulse
crosses 32 cells, about 6½ laps) down to 129 periods (`f_sw` = 31, the pulse
dies in the first cell). At 12.5 ns per period that is 19.5 kHz to 620 kHz.

Two control words set the period. On its own, the number of cells crossed,
`ceil(W / D)`, moves in coarse steps. The pulse width `W` enters the period
twice (the `W` term and the ceiling), so the two words together reach many
periods between those steps.

In the top, `dlb_sel` is wired to `t_on`, so the on-time word drives both
delay lines and `f_sw` programs the ring cells. As a result a longer on-time
also lengthens the period. That is the direction the converter needs: more
charge per pulse means fewer pulses are needed.

Start and stop: when `en` rises and the modulator is idle, it triggers
itself. When `en` falls, the running cycle finishes and no new one starts.

## Frequency loop (`pi_lut`)

This is a PI compensator in velocity form, updated at each `f_clk`:

```
u[n] = clamp( u[n-1] + LUT_A[e[n]] + LUT_B[e[n-1]],  0, 32·16 − 1 )
LUT_A[e] = (KP + KI)·e      LUT_B[e] = −KP·e
```

The error word has only 16 values (4-bit two's complement), so both products
come from two 16-entry tables. The tables are computed at elaboration from
`KP_Q` and `KI_Q`, in units of 1/16, so no multiplier is needed. `u` carries
4 fraction bits, and its integer part is `f_sw[n]`.

A positive error means the output is low. It raises `f_sw`, which shortens
the period.

## On-time optimizer (`ton_opt`)

In DCM, at a fixed load and output voltage, the losses behave like
`a·T_on + b/T_on²`:

* conduction loss grows with the on-time;
* the switched charge `Q_r·V_g` is paid once per cycle, and a longer on-time
  needs fewer cycles.

Setting the derivative to zero gives

```
T_on,opt³ = 6·Q_r·V_g·L² / ( R_on,h·(V_g − V)² + R_on,l·(V_g − V)³ / V )
```

Here `R_on,l = 0` for a low-side diode (the default).

The input voltage `V_g` is not measured. It is estimated from the DCM
conversion ratio:

```
V_g = V/2 · (1 + sqrt(1 + 8·L·T_sw / (R·T_on²)))
```

The load resistance is taken as proportional to the switching period,
`R = R_PER_TSW · T_sw`, because at light load the frequency follows the load
current. With that estimate `T_sw` cancels out. The estimate, and so the
optimum, depends on the present on-time alone. The whole chain is therefore
evaluated at elaboration into a 32-entry table that maps the present `t_on`
code to its optimal code.

Every `UPDATE_CYCLES` (16) switching cycles, `t_on` steps one code toward its
table entry. This keeps the on-time loop much slower than the frequency loop.
It comes to rest at the code that the table maps to itself: 28 (362 ns) with
the default converter values.

With `opt_en` low, `t_on` is held at `TON_FIXED` (15, i.e. 200 ns). That is a
conventional fixed-on-time PFM, useful for comparison.

The converter values in the table are parameters: `VOUT`, `L_H`, `QR`,
`RON_H`, `RON_L` and `R_PER_TSW`. They are example values (1.8 V, 1 µH, 1 nC,
0.3 Ω, diode), not those of a particular board. Set them for your power
stage.

## How far to trust it, and where it is this design's own

What follows the original architecture:

* the two 5-bit control words and the 32-cell delay lines with tap
  multiplexers;
* the two time-shifted edges from delay line B racing through a ring of
  programmable cells;
* the S-R latches, with end-of-race declared when all are low, and the
  retrigger;
* the look-up-table PI setting the frequency;
* the on-time optimisation from the DCM loss model and the `V_g` estimate.

What is this implementation's choice:

* **Delay cells are register stages of a timing clock**, not analog gate
  delays. Intervals are exact and do not depend on process or temperature,
  but the circuit needs an 80 MHz clock. It does not have the
  microamp-level supply current that free-running analog cells could reach.
* **Ring-cell timing.** The rising edge takes a fixed 128 periods per cell.
  `f_sw` sets how much faster the falling edge is. The ring has five cells,
  closed through an OR gate with the injection latch.
* **Where the latches sit.** They are set at a cell's input and reset at its
  output. Arming the detector and the one-period `eor` pulse are also this
  design's own.
* **`t_on` drives delay line B as well as delay line A**, so the period
  depends on both words.
* **On-time range** is 12.5–400 ns. The 32 equal cells cannot also reach down
  to 10 ns.
* **PI details:** the error width (4 bits), the gains (KP = 6/16,
  KI = 2/16), the fraction bits and the start value.
* **Optimizer details:** the converter values, the load-estimate constant, and
  the one-code-per-16-cycles step.
* **Synchronous low side.** With `RON_L > 0` the optimizer uses the
  low-side term `R_on,l·(V_g − V)³ / V`, as derived from the same loss
  model.
* **The degenerate `V_g` estimate.** As described above, the estimate reduces
  to a function of the on-time. The optimizer therefore settles at one
  on-time whatever the true input voltage. This is a property of
  proportional load estimation. A design that needs a true `V_g` dependence
  must measure one of `V_g` or the load.

## Checked behaviour

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_delay_line` | delay of `sel + 1` for all 32 codes, no spurious pulses |
| `tb_ring_osc` | cell-0 edge times and width `W − D`, number of cells entered `ceil(W/D)`, time the last falling edge disappears, quiet ring afterwards |
| `tb_eor_detect` | latch hand-over between cells, single `eor` one period after the last reset, none while any latch is high |
| `tb_freq_regulator` | trigger-to-`eor` time against the period formula, injected width `W` |
| `tb_dpfm_dpam` | every period and every on-time while the words change, stop and restart with `en` |
| `tb_pi_lut` | against an arithmetic PI model, including both clamps and cycles with `ce` low |
| `tb_ton_opt` | one-code steps toward an independently computed optimum, fixed point, fixed-on-time mode; diode and synchronous-MOSFET low side |
| `tb_table1_ranges` | full on-time and frequency sweeps at default parameters (12.5–400 ns; 19.5–620 kHz at `t_on = 31`), open-loop on-time step |
| `tb_dpfm_dpam_ctrl` | closed loop with a behavioural DCM buck (3.6 V → 1.8 V, 1 µH, 10 µF) and error ADC (10 mV per step) at default parameters |

The closed-loop test applies load steps (90 → 45 → 200 → 60 Ω), switches the
optimizer on and off, steps the input to 4.5 V, and stops and restarts the
converter. It checks:

* every period and on-time against the formulas above;
* the mean output within 25 mV of 1.8 V after each step;
* the on-time settling at the optimizer's fixed point.

It also counts frequency-word changes, on-time changes, races that wrap
round the ring, and races that end in the first cell, and fails if any of
them never happens. The fixed-on-time PFM gives about 22 mV of output ripple.
The optimized 362 ns on-time gives 35–80 mV, because each pulse carries
about four times the charge.

The behavioural models `buck_dcm_model` and `adc_err_model` in `tb/` use
real arithmetic and are for simulation only.

## Simulating

The modules find each other by file name. Compile from the project root, for
example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/dpfm_pkg.sv tb/tb_dpfm_dpam_ctrl.sv --top-module tb_dpfm_dpam_ctrl -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The closed-loop test simulates
about 27 ms of converter time and runs in a few seconds.

## Parameters worth changing

* `T_RISE` (`ring_osc`, `freq_regulator`, `dpfm_dpam`, `dpfm_dpam_ctrl`)
  scales every switching period. It must be at least `2^CTRL_W + 2`.
* `TCELL_PS` (`dpfm_pkg`) is the clock period that the optimizer's table
  assumes. Change it together with the clock.
* `KP_Q`, `KI_Q`, `U_INIT` (`pi_lut`) set the frequency-loop dynamics.
* `VOUT`, `L_H`, `QR`, `RON_H`, `RON_L`, `R_PER_TSW`, `UPDATE_CYCLES` and
  `TON_FIXED` (`ton_opt`) describe the power stage and the on-time loop.
