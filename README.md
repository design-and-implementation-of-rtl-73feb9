# Single-input fuzzy logic voltage controller for a boost converter

A fuzzy controller for a DC-DC converter normally takes two inputs, the
voltage error `e` and its change `de`. It fuzzifies both, evaluates a
two-dimensional rule table and defuzzifies the result. That takes p² rule
evaluations for p fuzzy levels. Voltage-loop rule tables are usually
*Toeplitz*: the output is constant along every diagonal of the (e, de) table
and grows with the distance from the main diagonal `de + λe = 0`. So the
output depends on one number only, the **signed distance**

    d = (de + λ·e) / sqrt(1 + λ²)

and the two-dimensional table shrinks to a one-dimensional one. Use
triangular input membership functions, singleton outputs and
centre-of-gravity defuzzification, and that one-dimensional rule table
becomes a **piecewise-linear (PWL) function of d**. The whole fuzzy engine is
then one table look-up.

This RTL applies that idea to a single voltage loop on an FPGA. It is written
for a 10 V → 15-20 V, 50 W boost converter (L = 250 µH, C = 100 µF, 10 Ω
load, 100 kHz switching) and runs from a 200 MHz clock.

```
 Vo ─ divider ─► ADC comparator ──► sd_adc ──► error_differentiator ──► signed_distance
                 RC ◄── feedback ◄──┘  (valid = sample enable)  e, de          │ d
                                                                               ▼
 MOSFET ◄── pwm_gen ◄── duty_integrator (×Ku, ∫, 0 ≤ D < 0.8) ◄── pwl_surface (look-up)
          100 kHz, 5 ns        duty counts                      uo = surface(d)
```

## Files

| file | what it is |
|---|---|
| `rtl/siflc_pkg.sv` | widths, fixed-point scalings, `surface_e` and `pwl_region_e` |
| `rtl/sd_adc.sv` | digital half of a first-order sigma-delta ADC; issues the sample enable |
| `rtl/error_differentiator.sv` | `e = vref − vo` and `de = e[n] − e[n−1]`, registered per sample |
| `rtl/signed_distance.sv` | `d = (KE·e + KDE·de) / 256`, clipped to the table index range |
| `rtl/pwl_surface.sv` | the two control surfaces as look-up tables, chosen at run time |
| `rtl/duty_integrator.sv` | output gain Ku, integrator, duty limiter |
| `rtl/pwm_gen.sv` | 2000-count PWM counter with a shadow duty register |
| `rtl/siflc_top.sv` | the controller: all of the above, wired as one loop |
| `tb/tb_*.sv` | self-checking testbenches, one per block, the closed loop, the disturbance tests |
| `tb/boost_plant_model.sv`, `tb/adc_frontend_model.sv` | behavioural (real-number) models of the power stage and of the ADC's analog half |

## Number formats and timing

All blocks run on one 200 MHz clock.

* **Sample rate.** `sd_adc` counts its bit stream over a 2000-clock window.
  That gives one code (0 to 2000) per 10 µs, the same rate as the PWM. The
  code is the ones density times 2000. With the 25 V full-scale divider
  assumed by the testbenches, one code is 12.5 mV and `vref_i` = 80 × volts.
* **Pipeline.** The ADC `valid` pulse is the enable. On that clock
  `error_differentiator` registers `e` and `de`. The next clock,
  `duty_integrator` registers the new duty cycle (`sample_o`). `pwm_gen` uses
  it from its next period start. A sample therefore reaches the switch within
  one PWM period. The path through `signed_distance` and `pwl_surface` is
  combinational. It is exercised once per 2000 clocks, so constrain it as a
  multicycle path; at 200 MHz it will not close timing as a one-cycle path.
* **Distance and surface codes.** `d` and `uo` are 10-bit signed numbers at
  four codes per unit of the universe of discourse (UoD), which spans ±100
  units. The UoD edge is therefore code ±400, and the table covers −128 to
  +127.75 units.
* **Duty cycle.** The duty cycle is a count of 5 ns clocks in the 2000-count
  period. The integrator carries 16 more fraction bits, so Ku·uo can make
  changes far finer than one count. The limiter clamps the state to
  0…1599 counts, the largest value below D = 0.8. Clamping the state itself
  also stops integrator wind-up.

## The control surfaces

`pwl_surface` holds two 1024-entry tables, each entry `{region, uo}`. Both are
computed during elaboration by a constant function that interpolates between
breakpoints, so no data file is needed. Changing a breakpoint parameter
rebuilds the table. Both surfaces are odd-symmetric and saturate at ±100
beyond the UoD edge:

| surface (`surface_i`) | points (d, uo) in UoD units | slopes |
|---|---|---|
| `SURF_SYM` | (0,0) – (100,100) | 1 |
| `SURF_ASYM` | (0,0) – BP1 (20,20) – BP2 (60,40) – (100,100) | 1, 0.5, 1.5 |

The symmetrical surface is what equally spaced membership functions with
singletons at 0, ±33.3, ±66.7 and ±100 produce. The asymmetrical surface has a
gentle middle section that damps the reaction to mid-size errors. Beyond BP2
it is steep, so it still reaches saturation at the UoD edge. Both breakpoints
are module and top-level parameters (`BP1_D`, `BP1_U`, `BP2_D`, `BP2_U`, in
codes, i.e. units × 4). Use them to tune the surface for a real converter.
`region_o` reports which segment served the last sample.

The surface's output is a *change* of duty cycle. The integrator turns it into
the duty cycle, so in its linear range the loop acts like a PI controller:

* integral gain: `Ku·KE / 2^24` counts per error code per sample (0.005 by default);
* proportional gain: `Ku·KDE / 2^24` counts per error code (0.05 by default).

The surface's shape makes both gains depend on the size of the error.
Saturation at the UoD edge bounds the slew of the duty cycle.

## Choosing λ, the input gains and Ku

`KE` and `KDE` combine λ with the scaling gains of the two inputs:
`KE = Ge·λ/sqrt(1+λ²)·256` and `KDE = Gde/sqrt(1+λ²)·256`. The defaults are
KE = 512 (2.0), KDE = 5120 (20.0) and KU = 164. With them, a 2.5 V error
alone reaches the UoD edge. They give a stable, well-damped loop with the
power stage above. They were found by closed-loop simulation; they are not
values measured on hardware. A converter with a different LC product or load
range needs them retuned, mainly KU. Keep the integral crossover well below
the LC resonance (about 670 Hz at D = 1/3 with the values above).

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. Build one with, for
example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/siflc_pkg.sv tb/tb_siflc_top.sv --top tb_siflc_top
./obj_dir/Vtb_siflc_top
```

* **Block testbenches** compare each block with a model that is independent
  of it:
  * `sd_adc`: codes for constant voltages to within 2 codes, the window timing
    and exact counting of a known bit pattern;
  * `error_differentiator`: e, de and hold behaviour;
  * `signed_distance`: the exact integer result, and a real-number check of
    `d = (de+λe)/sqrt(1+λ²)` at λ = 0.75;
  * `pwl_surface`: all 2 × 1024 entries against a real-valued surface;
  * `duty_integrator`: a reference accumulator, driven into both limits;
  * `pwm_gen`: period length, pulse width and the shadow register.
* **`tb_siflc_top`** runs the whole controller at its default parameters in a
  closed loop with the switched boost-stage model. It covers 315 ms of
  simulated time in about half a minute:
  * start-up from 10 V to 15 V;
  * load steps 10 ↔ 5 Ω;
  * reference steps 15 ↔ 12.5 V on both surfaces;
  * an input sag to 2.5 V, which forces the 0.8 duty limit;
  * a reference below the input voltage, which drives the duty cycle to zero.

  It checks regulation after each phase, the 2000-clock PWM period, the pulse
  width against the applied duty cycle, the limit and the two-clock latency.
  It also counts that every PWL region, distance clipping and both duty
  limits occurred.
* **`tb_siflc_workloads`** repeats the load-step and reference-step tests
  with 30 ms and 120 ms intervals, about one minute of run time. It reports
  the peak deviation and the settling time into a ±2 % band. Typical results:

| test | symmetrical | asymmetrical |
|---|---|---|
| load 10 → 5 Ω at 15 V | 2.69 V dip, 2.9 ms | 2.68 V dip, 2.9 ms |
| load 5 → 10 Ω at 15 V | 3.17 V, 5.1 ms | 3.17 V, 5.1 ms |
| reference 15 → 12.5 V | 6.6 ms | 7.8 ms |
| reference 12.5 → 15 V | 5.9 ms | 6.8 ms |

Two immediate assertions in the RTL check invariants during any simulation
built with `--assert`:

* in `duty_integrator`, the integrator state stays inside its limits;
* in `sd_adc`, the sample enable lasts one clock.

The models are ideal. The ADC front end is a perfect first-order loop and the
power stage has no diode drop or switch resistance. Treat the numbers as a
check of the loop, not as a prediction for a board.

## How far this follows the original design, and where it departs

Taken from the design description:

* the signal chain, and which blocks are clocked and enabled per sample and
  which are combinational;
* the signed-distance formula and the PWL look-up replacing fuzzy inference;
* the two surfaces and their breakpoints, and saturation outside ±100;
* the output gain followed by an integrator and a D < 0.8 limiter;
* the 200 MHz PWM with 5 ns steps and 100 kHz switching;
* an ADC built inside the FPGA;
* the power-stage values used in the tests.

Choices made here, because the description leaves them open:

* the sigma-delta ADC and its 2000-clock window;
* every word width and code scaling;
* the values of λ, the input gains and Ku (the description gives none);
* the sign of the error, and de = 0 on the first sample;
* the lower duty limit of zero, and clamping the integrator state;
* the shadow register in the PWM;
* holding both surfaces at once with a run-time select;
* the monitor ports.

Known differences:

* **Breakpoints.** The breakpoints used on the original hardware were tuned
  by trial and error and are not known. The defaults are the design-time
  breakpoints. On real hardware, tune them together with KE, KDE and KU.
* **Transient speed.** The original hardware settled a 12.5 → 15 V reference
  step in about 0.75 ms (symmetrical) and 2.5 ms (asymmetrical). With the
  default gains here, the simulated loop takes about 6-8 ms. The ordering is
  the same, with the asymmetrical surface slower.
* **Load steps.** The original reported a smaller overshoot for the
  asymmetrical surface on load steps. With these gains the two surfaces
  respond almost identically: the error after a load step stays mostly inside
  BP1, where the two surfaces coincide.
* **Memory use.** The original implementation used about 213 kbit of memory.
  Here the two tables total 24.6 kbit (2 × 1024 × 12). Its breakdown was not
  given.
* **Surfaces with more breakpoints.** Only two breakpoints per side are
  provided. Surfaces with more breakpoints, built from more membership
  functions, would need more segments in `pwl_surface`'s `build` function.
* **Not digital, so not built.** The two-input fuzzy controller used only for
  comparison is not built. The power stage and the ADC's resistor/capacitor
  network are not digital; they exist only as testbench models.
