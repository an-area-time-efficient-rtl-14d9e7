# Pipelined finite-set model predictive controller for a 4-level flying-capacitor inverter

A flying-capacitor inverter builds its intermediate output voltages by putting
floating capacitors in series with the load. Every leg of an n-level converter
has n-1 complementary switch pairs and n-2 flying capacitors, and the
controller has two jobs at once: make the phase currents follow a sinusoidal
reference, and keep every flying capacitor at its share of the bus voltage.
Finite-set model predictive control does both with one rule. Once per update
period it predicts, with a model of the converter and its RL load, where every
possible switch state would take the currents and capacitor voltages, scores
each prediction with a quadratic cost, and applies the cheapest state.

For three coupled phases that is expensive. The three legs share the load star
point, so one phase's state changes the voltage across the others. The
controller therefore has to score all 2^(3(n-1)) joint states: 512 for the
4-level converter this RTL is built for. The central idea of this design is to
evaluate them in a fully pipelined datapath that takes one switch state per
clock cycle. The three phases are computed side by side. The whole search then
costs 512 cycles plus the pipeline depth, about 5.4 us at 100 MHz, inside a
50 us (20 kHz) update period.

The RTL is generic in the number of levels (`NLEV` = 3, 4 or 5). The
4-level build is the default and is tested in closed loop. The 3-level and
5-level builds are checked open loop against a bit-exact reference.

## One update period

A central counter (`enable_counter`) divides the 100 MHz clock into periods
of 5000 cycles. It starts each block at a fixed cycle. The blocks do not
handshake with each other: each one is known to finish before the next one
starts.

| cycles of the period | block | what happens |
|---|---|---|
| 0 – ~497 | `adc_measure`, `ref_gen` | read the 9 serial ADCs (3 currents, 6 capacitor voltages) and scale them; compute the references for k+2 |
| 500 – 511 | `estimation` | model step k → k+1 with the measurements and the switch state that is being applied now |
| 512 – 1044 | `prediction` | model step k+1 → k+2 for all 512 switch states, one per cycle, 21-cycle pipeline |
| 533 – 1046 | `optimization` | cost of each prediction as it leaves the pipeline, running minimum (2-cycle latency) |
| 4998 – 4999 | `gate_output` | latch the winner, apply it at the period boundary, with dead time per switch pair |

The busy part is 1049 of 5000 cycles. The window lengths (500, 12, 533, 514,
2) are those of the original design. Placing the windows back to back from
cycle 0 is a choice made here. The output is placed at the end of the period,
because the state chosen during period k is meant to be applied at k+1.

Why there is an estimation step: the state applied during [k, k+1] was fixed
one period earlier and can no longer be changed. So the controller first
estimates where that state will take the converter by k+1. It then chooses
the state to apply from k+1 to k+2.

## The model the datapath evaluates

For each phase x, with switch bits S_1 … S_(n-1) (S_(n-1) is the outermost
switch on the positive rail) and d_j = S_(j+1) − S_j ∈ {−1, 0, +1}:

```
v_xn  = S_(n-1)·V_DC − Σ_j d_j·v_cj            pole voltage from the negative rail
v_on  = (v_an + v_bn + v_cn) / 3               star-point voltage (couples the phases)
v_xo  = v_xn − v_on                            voltage across the RL load
i'    = a·i + b·v_xo                           a = exp(−Δ·R/L),  b = (1 − a)/R
v_cj' = v_cj + c·(i + i')·d_j                  c = Δ/(2C), trapezoidal charge
```

Δ is the update period (50 us). The coefficients a, b and c are run-time
inputs, so the same hardware serves any RL load and capacitor size. Measuring
the pole voltage from the negative rail instead of the DC midpoint only adds
a common-mode term, and subtracting v_on removes it. **Sign note:** the load
voltage must be the pole voltage *minus* the star-point voltage. A formulation
that adds v_on would double the common mode instead of cancelling it.

The cost of one candidate is

```
g = Σ_x [ (i_ref,x − i_x)² + Σ_j W_j·(v_ref,j − v_cx,j)² ]
```

Here i_ref is the sinusoidal reference at k+2, and v_ref,j = j·V_DC/(n−1).
For n = 4 the setpoints are V_DC/3 and 2V_DC/3, the usual 1:2:3 ratio. There
is one weight per flying capacitor. `W[0]` belongs to the innermost capacitor
C1. The reference experiment used 10 and 2.16.

## The prediction pipeline (`fcc_model_step`)

`fcc_model_step` is the core of the design. It takes one sample per cycle: a
switch state, three phase currents and 3×(n−2) capacitor voltages. After `LAT`
cycles it returns the next state for that sample. The switch state travels
with the sample, so the optimizer knows which state each result belongs to.

| stage | cycles | operation |
|---|---|---|
| 1 | 1 | v_xn for each phase (select ±v_c by d_j, add V_DC) |
| 2 | 1 | v_an + v_bn + v_cn |
| 3 | MULT_LAT | × 1/3 → v_on |
| 4 | 1 | v_xo = v_xn − v_on |
| 5 | MULT_LAT | a·i and b·v_xo (parallel) |
| 6 | 1 | i' = a·i + b·v_xo |
| 7 | 1 | i + i' |
| 8 | MULT_LAT | c·(i + i') |
| 9 | 1 | v_c' = v_c ± c·(i + i') |

`LAT = 6 + 3·MULT_LAT`. With `MULT_LAT = 5` (prediction) this gives the
21-cycle latency of the original design. With `MULT_LAT = 2` (estimation) it
gives its 12-cycle estimation time. The multiplier stages are one
combinational product followed by `MULT_LAT` registers (`pipe_delay`), so
synthesis can retime the registers into the DSP multipliers. Side data (switch
state, input currents and voltages, intermediate results) follows in matching
delay lines. The coefficients and V_DC are not pipelined: they must not change
while samples are in flight.

`prediction` wraps the pipeline with a counter. The counter value is itself the
switch state: phase a in bits [2:0], b in [5:3], c in [8:6], and bit j of a
phase is S_(j+1). Combination 0 goes in during the `start` cycle and the rest on
the next 511 cycles. The first result comes out 21 cycles after `start`, and
`out_last` marks combination 511 (all ones). `optimization` squares the errors
in its first cycle. In its second cycle it applies the weights, sums, and
compares with the running minimum, so `done` follows `out_last` by 2 cycles.
When two costs are equal, the lower combination wins.

## Number formats (`fcc_pkg`)

| quantity | format |
|---|---|
| currents, voltages | signed 18 bit, 8 fractional bits (1/256 A or V, range ±512) |
| a, b, c, 1/3 | signed 18 bit, 16 fractional bits (range ±2) |
| weights | unsigned 16 bit, 8 fractional bits |
| cost | unsigned 56 bit, 16 fractional bits |

Each arithmetic result is truncated (arithmetic shift) and saturated to 18
bits. The 18-bit words suit 18×18 hardware multipliers. All of these widths
are choices of this implementation. For the test load (R = 10 Ω, L = 10 mH,
C = 220 µF, Δ = 50 µs) the coefficients are a = 62340, b = 320, c = 7447.

## Around the core

**Measurements (`adc_measure`).** Nine 12-bit serial ADCs share one chip
select and one serial clock, and each has its own data line, so all channels
are read in one frame. The frame follows the ADCS7476 convention: chip select
low starts the conversion, 16 clocks follow, then 4 leading zeros and the code
MSB first, each bit changing on a falling clock edge. The serial clock runs at
100 MHz/30. One frame takes about 497 cycles, which fills the 500-cycle
measurement window. A faster clock (the part allows 20 MHz) would shorten it.
Each code is scaled as `((code − offset) · gain) >>> 10`, with per-channel
calibration inputs. Channel 3x is the current of phase x, and channels 3x+1
and 3x+2 are its capacitors C1 and C2.

**References (`ref_gen`).** A 32-bit phase accumulator advances once per
period. The default step gives 50 Hz at 20 kHz. The reference is read two
periods ahead and taken from a quarter-wave sine table of 256 entries. The
table is computed at elaboration time by a fixed-point Taylor series, so the
design reads no data files. Phases b and c lag a by 120° and 240°. The default
amplitude is 2 A. The error is at most about 2.3/256 A.

**Output (`gate_output`).** An `update` pulse two cycles before the period
boundary latches the selected state, and the state is applied at the boundary
(`sw_now`). `sw_now` also feeds the estimator in the next period. Each of the
9 switch pairs drives an upper gate and a complementary gate. When a pair's
state changes, both of its gates are off for `DEAD_CYCLES` (default 100 =
1 µs) before the new one turns on. After reset all gates stay off until the
first update.

## Top level (`fcc_mbpc_top`)

Parameters: `NLEV` (4), `PERIOD` (5000), `ADC_HALF` (15), `DEAD_CYCLES` (100).

Inputs held stable by the system:
- `vdc`, the bus voltage;
- `coef`, the a/b/c struct;
- `w_vc[NLEV-2]`, the capacitor weights;
- `adc_offset[9]` and `adc_gain[9]`.

I/O: the ADC bus (`adc_cs_n`, `adc_sclk`, `adc_sdata[9]`), and
`gate_hi`/`gate_lo` indexed [phase][switch].

Status outputs: `sw_now`, `opt_done` and `best_cost`.

An assertion checks that the prediction pass has finished before the output
update.

Files in `rtl/`: `fcc_pkg`, `pipe_delay`, `fcc_model_step`, `estimation`,
`prediction`, `optimization`, `adc_measure`, `ref_gen`, `gate_output`,
`enable_counter`, `fcc_mbpc_top`.

## Simulation

Every testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=N failures=M` line. For example, the closed-loop test of the
whole controller:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/fcc_pkg.sv tb/tb_fcc_mbpc_top.sv --top-module tb_fcc_mbpc_top -o sim
./obj_dir/sim
```

Replace the testbench name to run the others.

| testbench | what it checks |
|---|---|
| `tb_fcc_mbpc_top` | Full-size closed-loop test: 800 periods (two 50 Hz cycles), plant model in floating point, ADC models. Every decision and cost is recomputed bit for bit. Checks the optimizer finishing at cycle 1046, current tracking and capacitor balance. |
| `tb_fcc_mbpc_sizes` | The 3-level and 5-level controllers side by side, open loop. Random ADC codes every period. Checks each decision and cost bit for bit, the optimizer finishing at cycle 598 or 4630, and that the gates never overlap. |
| `tb_fcc_model_step` | random samples streamed with gaps, saturation corners, latency 21 |
| `tb_estimation` | 12-cycle latency, values, hold |
| `tb_prediction` | 512 results in order, first after 21 cycles, `out_last`, back-to-back passes |
| `tb_optimization` | minimum and cost over random sets, 2-cycle latency |
| `tb_gate_output` | 2-cycle update, exact dead time, no shoot-through |
| `tb_enable_counter` | enable positions over three periods |
| `tb_ref_gen` | one 50 Hz cycle against floating-point sine, setpoints |
| `tb_adc_measure` | frames against ADC models, scaling, 16 clocks of 30 cycles |

`tb/fcc_ref.svh` contains the scalar reference arithmetic the testbenches use.
`tb/adc_model.sv` is the behavioural ADC model.

In the closed-loop test the capacitors start at 80 % of their setpoints. After
settling, the RMS current error is about 0.05 A on a 2 A peak reference, and
the capacitor voltages stay within 0.1 V of 20 V and 40 V.

## Limits and departures

- **Other sizes.** For n = 3 and n = 5 the RTL keeps the 21-cycle pipeline.
  A pass then takes 64 + 23 or 4096 + 23 cycles, while the original design
  reported 84 and 4120 cycles in total. With `NLEV = 5` the optimizer
  finishes at cycle 4630, before the output update at 4998. These sizes are
  only tested open loop, with random measurements, over a few periods.
- **Own choices.** The number formats, the split of the pipeline into stages,
  the ADC framing and channel order, the dead-time length and the tie rule are
  all choices of this implementation. So are the weight-to-capacitor
  assignment, the gates staying off until the first update, and the window
  placement in the period.
- **Outside the RTL.** There is no interface for setting the weights at run
  time (they are plain inputs). The design contains no precharge sequence, no
  observer, no timing closure and no resource figures for a particular FPGA.
- **Plant model.** The closed-loop test neglects the dead time in the plant
  model.
- **Prediction horizon.** The design only uses a horizon of one period. The
  original work compared longer horizons and a decoupled per-phase model, and
  did not keep them.
