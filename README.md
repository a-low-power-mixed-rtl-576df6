# Dual-mode peak current-mode controller with a one-bit delta-sigma DAC

A buck converter under peak current-mode control turns its high-side switch
off when the inductor current reaches a command level. That gives
cycle-by-cycle current protection and a simple, robust voltage loop. This
design keeps that analog mechanism (a comparator and an RS latch) and makes
everything around it digital:

- a windowed ADC turns the output voltage into a nine-level error;
- a small PI compensator built from lookup tables computes the current command;
- a second-order **one-bit delta-sigma DAC**, followed by a passive RC filter,
  turns the command back into the comparator's threshold voltage.

A one-bit DAC is linear by construction and draws no quiescent current.
Its accuracy comes from oversampling, so its clock rate trades power against
bandwidth. The controller escapes that trade-off by running in **two modes**:

- In **steady state**, a slow compensator, a slow modulator and a low filter
  corner give tight regulation at low power.
- On a load transient, the controller switches to fast clocks, a higher filter
  corner and more aggressive gains until the error is small again.

Current limiting costs one saturation block on the command.

The RTL targets the published prototype: a 5 V to 1.5 V buck at f_s = 1 MHz,
with L = 2.5 µH, C = 36 µF, a 31.3 mV ADC bin and 8 or 16 MHz modulator clocks.

## Signal path

```
 v_fb ──► window_adc ──e[n]──► mode_selector ──mode/sel──────────────┐
 (H1·vout)   ▲ vref                │                                  │
             │                     ▼                                  ▼
             │               pi_compensator ──i_c──► ds_modulator ──bit──► dac_lpf ──v_c──┐
             │               (LUT PI + clamp)   │     (2nd order)         (R1 or R1‖R2)   │
             │                                  └──► light_load_detect                    ▼
 v_isense ───┼───────────────────────────────────────────────────────► current_comparator
             │                                                                  │ comp
             │       timing_gen (one 16·f_s clock) ──set/blank/dlimit──► pwm_latch ──► gate_hs
```

| Module | Role | Kind |
|---|---|---|
| `cpm_pkg` | error type `err_t` (−4..+4), `mode_t`, the threshold 2 | package |
| `timing_gen` | every rate in the controller, as clock enables | synthesizable |
| `mode_selector` | \|e\| > 2 → transient, \|e\| ≤ 2 → steady state | synthesizable |
| `pi_gain_lut` | A·e and B·e tables, one pair per mode | synthesizable |
| `pi_compensator` | i_c[n] = i_c[n−1] + A·e[n] − B·e[n−1], clamped to 0..i_sat | synthesizable |
| `ds_modulator` | second-order one-bit modulator | synthesizable |
| `pwm_latch` | set at period start, cleared by comparator or 50 % limit, with blanking | synthesizable |
| `light_load_detect` | flags a small current command (a light-load indicator) | synthesizable |
| `window_adc` | windowed ADC and error subtraction | behavioural model |
| `dac_lpf` | switched RC reconstruction filter | behavioural model |
| `current_comparator` | v_s > v_c | behavioural model |
| `cpm_dcdc_top` | everything above, wired together | simulation top |

The top level has `real` ports (`v_fb`, `v_isense`, `v_c`) because it contains
the three analog models. To put the controller in silicon or an FPGA, take
every synthesizable module above. Replace the models with a real ADC, RC
network and comparator.

## One clock, many rates

The whole controller runs from one master clock at 16·f_s (16 MHz). The
slower clocks are one-cycle enables that `timing_gen` decodes from a 16-step
period counter:

| Position in the period (cycle 0..15) | Event |
|---|---|
| 15 | `set_en`: the latch sets on the next edge (start of the period) |
| 15, 0 | `blank`: comparator ignored (turn-on spike) |
| 0..7 | `clk_s` high (switching clock) |
| 8 | `adc_sample`: e[n] is captured |
| 8..14 | `dlimit`: the latch is held cleared, so the duty cycle is at most 50 % |
| 9 | `mode_upd`: mode selector looks at the new e[n] |
| 10 | `pi_en`: compensator update (every period or every 4th) |
| every cycle / every other | `dac_en`: modulator clock (16·f_s or 8·f_s) |

### The two modes

| | Steady state (mode 0) | Transient (mode 1) |
|---|---|---|
| Entered when | \|e[n]\| ≤ 2 | \|e[n]\| > 2 |
| Compensator clock | f_s/4 (every 4th period) | f_s (every period) |
| Modulator clock | 8·f_s | 16·f_s |
| Oversampling ratio | 32 | 16 |
| Filter | R1·Cc (corner ≈ 20 kHz) | (R1‖R2)·Cc (corner ≈ 100 kHz) |
| PI gains A, B | 8, 7 | 28, 27 |

The oversampling ratio is the number of modulator clocks per compensator
update. Transient mode assumes the command may change every switching
period. The mode selector re-decides once per switching period, right after
each ADC sample.

## The one-bit DAC

This is the part that makes the controller cheap. `ds_modulator` holds two
integrators, `w1` and `w2`, and emits one bit per enabled clock:

```
y   = (w2 >= 2^(M-1))            registered output bit
w1 <= w1 + x - y·2^M
w2 <= w2 + w1 - 2·y·2^M          the 2 is a shift
```

Solved in z, this gives `Y = z^-2·X + (1 − z^-1)^2·E`. The input passes with
two cycles of delay. The quantisation error E is pushed to high frequencies
by a second-order difference. The in-band noise falls by 9 dB, about 1.5 bits,
for each doubling of the oversampling ratio.

Because y is one bit, the terms y·2^M and 2·y·2^M only touch the top bits of
each sum. The loop costs two registers and two adders. The mean of the bit
stream is x/2^M, with M = 10.

Two properties of one-bit second-order loops shape the implementation:

- **Overload.** With the input at 0 or at full scale, the loop cannot balance
  and its integrators would grow without bound. Both integrators are
  clamped at ±4·2^M (width M+5). With input 0 the stream goes silent. When
  the input returns into range, the loop recovers within a few hundred clocks.
  This matters here because the compensator often drives the command to 0 or
  to the current limit during transients.
- **Linearity near the rails** degrades, as for any such loop. Over the
  5 %–95 % range, the filtered output of a slow 10-bit ramp stays within
  2.5 LSB (8 mV) of the ideal line.

The reconstruction filter is a single RC. In transient mode a second resistor,
selected by `sel`, is switched in parallel, which moves the corner up about
five times. A first-order filter passes more quantisation ripple than a
second- or third-order one. The converter's own LC output filter removes
most of what is left.

`dac_lpf` advances the exact RC solution once per master clock:
`v_c ← v_t + (v_c − v_t)·e^(−T/τ)`. This is exact because its input only
changes on clock edges.

## Compensator and current limit

`pi_compensator` evaluates `i_c[n] = i_c[n−1] + A·e[n] − B·e[n−1]` on each
`pi_en`, using two table lookups and two adders. It registers B·e[n] for the
next update, so only one table pair is needed.

The sum is clamped to `0..i_sat`, and the clamped value is what is stored, so
the integrator does not wind up. `sat_hit` reports an update that hit the upper
limit. Since the comparator threshold is the DAC output, the clamp is a peak
current limit:

```
i_peak = i_sat / 2^M · V_swing / (Ks·Rs)
```

With the testbench values (V_swing = 3.3 V, Ks·Rs = 1 V/A), one command LSB
is 3.2 mA. The `i_sat` of 620 used in the end-to-end test limits the peak to
2.0 A.

For tuning, note that the loop's proportional action is B and its integral
action is A − B per update. Keeping A − B small (1) places the integral zero
well below crossover. The gains live in `pi_gain_lut`, which builds its tables
from the parameters `A_SS`, `B_SS`, `A_TR` and `B_TR`. To get non-linear
tables, edit its fill loop.

`light_load_detect` uses the same command as a load-current estimate. It
raises `light_load` below `th_enter` and clears it above `th_exit`. The
flag is produced here; a light-load mode (for example pulse-frequency
modulation) that would use it is not part of this design.

## The switch latch

`pwm_latch` is a flip-flop that sets on the clock edge starting each period.
It has an asynchronous clear:

```
clr = !rst_n | dlimit | (comp & !blank)
```

The comparator clear is asynchronous on purpose. The switch must turn off
when the current reaches the command, not at the next 62.5 ns clock edge.
Otherwise the duty cycle would be quantised to 1/16 of the period and the
loop would limit-cycle.

- `blank` covers the set edge and the first master cycle. During that time the
  turn-on current spike cannot end the pulse.
- `dlimit` holds the latch cleared for the second half of the period. There is
  no slope compensation, so the duty cycle must stay below 50 % to keep the
  current loop stable.

## Verification

Each module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=… failures=…`:

| Testbench | What it checks |
|---|---|
| `tb_timing_gen` | every enable, cycle by cycle, in both modes; 8/16 DAC clocks per period; 1 PI update per 4 periods / per period |
| `tb_mode_selector` | all nine errors, the update strobe, `sel` |
| `tb_pi_gain_lut` | all 36 table entries |
| `tb_pi_compensator` | 3000+ random updates against a reference model; both clamps; `sat_hit` |
| `tb_ds_modulator` | bit density at 39 DC inputs; bound on the doubly summed error (second-order shaping); ramp; zero input and recovery; enable |
| `tb_dac_lpf` | charge and discharge curves for both time constants; 25 % duty average |
| `tb_current_comparator` | random and ramp inputs |
| `tb_pwm_latch` | blanked spike ignored; comparator turn-off between edges; 50 % limit; reset |
| `tb_light_load_detect` | random commands against a hysteresis reference |
| `tb_window_adc` | random voltages against a nearest-bin search; window clamping; hold |
| `tb_ds_resolution` | error of the bit stream after a triangular (sinc²) average at OSR 16 and 32; requires at least 7 dB gain per doubling (measured 11.4 dB, 0.98 LSB RMS of 10 bits at OSR 32; second-order theory gives 9 dB) |
| `tb_dac_counter_ramp` | modulator plus filter driven by a slow 10-bit counter |
| `tb_cpm_dcdc_top` | the closed loop, at the default parameters (below) |

`tb_cpm_dcdc_top` closes the loop around `tb/buck_stage_model.sv`. That model
is a 5 V to 1.5 V buck with a diode freewheel, the 2.5 µH and 36 µF parts,
a resistive load, Ks·Rs = 1 V/A and a 2 V, 30 ns turn-on spike on the current
sense. H1 is taken as 1.

The test runs 3 ms of converter time in well under a second. It goes through
soft start, light load (0.1 A), the 0.46 A ↔ 1.1 A load steps, a 3 A
overload into the current limit, recovery, and a 1.5 V → 2.0 V → 1.5 V
reference step that runs into the 50 % duty limit. It requires:

- the output to be within two bins of the reference after each phase;
- each load step to settle within 50 µs;
- every mechanism to occur at least once: both mode switches, compensator
  updates in both modes, comparator turn-off, 50 % limit, blanked spikes,
  saturation, and the light-load flag both ways;
- the clock rates to match the mode table at all times.

The load steps settle in 46 µs going up and 48 µs going down. In a quiet
400 µs stretch at 0.46 A every error sample falls in the zero-error bin: the
DAC ripple does not disturb regulation.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/cpm_pkg.sv tb/tb_cpm_dcdc_top.sv --top-module tb_cpm_dcdc_top
./obj_dir/Vtb_cpm_dcdc_top
```

## Where the RTL makes its own choices

The architecture, the clock plan, the nine-level error, the |e| > 2 mode rule,
the PI equation with saturation, the modulator order and structure, the
switched RC filter, blanking and the 50 % limit all follow the published
controller. The following are this implementation's choices:

- **Clocking.** All rates come from one 16·f_s clock as enables. The ADC
  samples at mid-period; the mode decision follows one cycle later and the PI
  update two cycles later.
- **Latch details.** Blanking is one master cycle (62.5 ns) after the set edge.
  The duty limit is implemented as a forced clear in the second half-period.
- **Modulator.** The loop arrangement (two delaying integrators), the
  integrator width and the integrator clamp are this design's.
- **Gains.** A = 8, B = 7 in steady state and A = 28, B = 27 in transient.
  They are tuned for the testbench power stage. Other power stages need
  retuning.
- **Compensator details.** The command clamps at 0, and the clamped value is
  fed back (no wind-up). At a mode change, B·e[n−1] keeps the gain of the
  mode it was produced in. The command resets to 0, which gives a soft start.
- **Analog values.** The filter time constants (8 µs and 1.6 µs), the 3.3 V
  DAC swing, Ks·Rs and H1 are assumed.
- **Window ADC model.** The windowed ADC is modelled only by its result:
  quantise to the nearest bin, subtract from `vref`, clamp to ±4.
- **Light-load flag.** Two thresholds form a hysteresis band.
- **Switch outputs.** Only the high-side switch command is produced. Low-side
  drive and dead time are left to the power stage.

## Changing it

- **Switching frequency.** Keep the master clock at 16·f_s, or change
  `CYC_PER_TSW` (an even count, at least 12). The filter model derives its
  step from it, assuming f_s = 1 MHz.
- **DAC resolution.** `M` is the command width (default 10). The modulator
  scales its integrators with it.
- **Gains and tables.** Change the `pi_compensator` / `pi_gain_lut`
  parameters.
- **Other settings.** `i_sat`, `th_enter`, `th_exit` and `vref` are ports and
  can change at run time.
