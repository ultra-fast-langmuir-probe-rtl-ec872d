# Ultra-Fast Langmuir Probe (UFLP) FPGA logic

A Langmuir probe is a small electrode in a plasma. Sweep its voltage, record
the current, fit the exponential I-V curve, and you get the ion saturation
current `Isat`, the electron temperature `Te` and the floating potential `Vf`.
A conventional sweep takes far too long to resolve turbulent structures such
as edge filaments in a tokamak or rotating "spokes" in a magnetron discharge.
Those need a few hundred kHz or more.

This logic uses the *mirror Langmuir probe* idea instead of a full sweep. The
probe is driven through only three bias levels (negative, positive, zero). The
levels are set from the most recent `Te` estimate, so each iteration samples
the part of the I-V curve that carries the most information. Each of the
three states yields one unknown, solved in closed form with the previous
values of the other two. One pass through the three states is one
iteration, and each iteration produces a new (`Isat`, `Te`, `Vf`) triple.
At 125 MHz with 83 clocks per state this gives about 500 kHz.

The target is a Red Pitaya STEMlab 125-14 (Zynq-7010, 125 MHz, dual 14-bit
ADC and DAC). All plasma quantities are 14-bit fixed-point words.

## The iteration

The probe connects to the bias amplifier through a series capacitor, so it
floats at the plasma floating potential. The applied bias is relative to
`Vf`, and the voltage measured at the tip is `V = bias + Vf`. Ion current
counts as positive, and the probe follows

    I = Isat * (1 - exp((V - Vf) / Te))

The states always run in the same order. Iteration *k+1* uses the results of
iteration *k*:

| state | bias | solved for | equation (RTL form) |
|---|---|---|---|
| negative | `-3.325 * Te[k]` | `Isat[k+1]` | `a = (Vf[k] - V) / Te[k]`, `Isat = I / (1 - exp(-a))` |
| positive | `+0.675 * Te[k]` | `Te[k+1]` | `r = -I / Isat[k+1]`, `Te = (V - Vf[k]) / ln(1 + r)` |
| zero | `0` | `Vf[k+1]` | `r0 = -I / Isat[k+1]`, `Vf = V - Te[k+1] * ln(1 + r0)` |

The levels -3.325 Te and +0.675 Te are 4 Te apart. They are placed so that the
ion current in the negative state and the electron current in the positive
state are about equal in size. The zero state draws almost no current, so
its `ln` term is only a small correction to the measured voltage.

Starting values come from reset: `Te = 10 eV` (deliberately large, so the first
sweep is wide), `Isat = 19.5 mA`, `Vf = 0 V`. In simulation the loop settles
to within a few percent in 3 to 5 iterations.

Two guards keep the loop from collapsing:

* If `Te` comes out below 50 LSB (about 0.1 eV), it is replaced by the initial
  10 eV guess. The same happens when the positive-state data has no solution
  (no electron current, or `V` not above `Vf[k]`). Otherwise a too-small `Te`
  shrinks the bias range into the noise, and the loop never recovers.
  `sts.te_fallback` flags such iterations.
* If the negative state is not below `Vf[k]`, `Isat` keeps its value. Results
  below 1 LSB are raised to 1 LSB, so later divisions by `Isat` stay defined.

## Number formats

All quantities are signed 14-bit words (`uflp_pkg`):

| quantity | LSB | range |
|---|---|---|
| current, `Isat` | 2^-17 A | ±62.5 mA |
| `Te` | 2^-9 eV | ±16 eV |
| voltage, `Vf`, bias | 2^-7 V | ±64 V |

These fit a low-temperature magnetron plasma. A tokamak edge (about 2 A,
50 eV, -150 V) needs LSBs of 2^-12 A, 2^-7 eV and 2^-5 V. The solver
arithmetic depends only on the ratio between the `Te` and voltage LSBs. That
ratio is 4 in both sets, so the same RTL serves both. You only reinterpret the
words and set the ADC calibration gains to match. In the tokamak set, the
50-LSB temperature floor becomes 0.39 eV.

Calibration gains are Q4.12. Table outputs are Q.11.

## Timing of an iteration

`fet_switch` counts `ctl.state_cycles` clocks per state (16-bit, minimum 64).
It produces these strobes:

* `state_first` and `state_last` for each state;
* `avg_window`, covering the last 64 clocks of each state;
* `change_bias` on the first clock of the negative state;
* `cycle_done` on the last clock of the zero state.

`state_averager` sums current and voltage over the window and shifts right by
6. The window sits at the end of the state, so the current spike from the bias
step through the capacitor has decayed by then.

The averages are ready one clock after `state_last`. The solver core for that
state then starts, and its result follows **39 clocks** later (divider 34,
table and multiply 5). Each result is needed no earlier than the end of the
next state, so 64 clocks per state is the hard minimum. The rate is
`125 MHz / (3 * state_cycles)`:

| state_cycles | rate |
|---|---|
| 64 | 651 kHz (fastest) |
| 83 | 502 kHz |
| 379 | 110 kHz |
| 521 | 80 kHz |
| 833 | 50 kHz |

A rate of 1 MHz (42 clocks per state) needs a 32-sample window
(`AVG_LOG2 = 5`, `MIN_CYCLES = 41`). The 39-clock solvers still finish in
time, and `tb_uflp_1mhz` runs this build at 992 kHz. Halving the window
doubles the noise variance of each average.

`bias_set` latches one `Te` per iteration on `change_bias`. It takes the solver
result if `ctl.dynamic_en` is set, otherwise `ctl.static_te` (fixed-range
operation). The bias of each state is `(Te * mult) >>> 14` with Q4.12
multipliers `-13619` and `2765`. With `ctl.ramp_step` non-zero, the output
moves toward the new level by at most that many LSBs per clock. This softens
the current spike the step drives through the capacitor. Keep the ramp well
inside the state: at 83 clocks per state, 128 LSB/clock works and 16 is too slow.

## Division and look-up tables

Each solver needs one true division, `|x| / y`, done by `gold_div`, a
Goldschmidt divider:

1. Shift the denominator into [0.5, 1) with a leading-one detector, and apply
   the same shift to the numerator.
2. Iterate `F = 2 - D; N = N * F; D = D * F`. Each iteration takes two clocks
   (compute the factor, then the two products), with 24 fractional bits.
3. After 16 iterations, round the quotient to `QF` fractional bits and
   saturate it to 16 bits. A zero denominator gives all ones.

Latency is `2 + 2 * ITER` clocks, i.e. 34 clocks at the default. Sixteen
iterations is far more than quadratic convergence needs after normalisation.
The count is kept at 16 as a fixed 32-clock budget. It can be lowered through
`DIV_ITER` when the state must be shorter.

The quotient indexes a 1024-entry table directly. The tables are computed
at elaboration from `$exp`/`$ln`/`$sin` in a constant function, so no data file is
involved:

| table (`func_lut FUNC`) | index i means | stores |
|---|---|---|
| 0, Isat | `a = (i + 0.5) / 64`, a < 16 | `1 / (1 - exp(-a))` |
| 1, Te | `r = (i + 0.5) / 128`, r < 8 | `1 / ln(1 + r)` |
| 2, Vf | `r0 = -1 + (i + 0.5) / 256`, -1 <= r0 < 3 | `ln(1 + r0)` (signed) |
| 3, emulator | `x = -12 + (i + 0.5) / 64`, -12 <= x < 4 | `1 - exp(x)` (signed) |
| 4, emulator | phase `i / 1024` of a period | `sin` (signed) |

Entries are Q.11, saturated to 18 bits. Storing `1/ln` turns the second
division of the `Te` equation into a multiplication. Index values past the
end are clamped. The Vf core builds its index from the sign of `I`: `255 - q`
for positive current and `256 + q` for negative current.

## Offset correction and capacitor selection

The series capacitor cannot pass DC. Any DC error current in the measurement
(amplifier offset, leakage, coupling imbalance) therefore appears as a current
in the zero state, where the true current should be zero. `vfloat_core` reports
that state's average current every iteration. When `ctl.zero_corr_en` is set,
`data_acquire` adds it to an accumulated offset and subtracts the offset from
every current sample. This works as an integrator that drives the zero-state
current to zero. Clearing `zero_corr_en` resets the accumulated offset.

The capacitor must be large enough to pass the probe current without
attenuation, and small enough to follow the bias steps. `cap_switch` drives
seven relay outputs, so 127 capacitance values are available:

    cap_code = clamp((Isat >> ctl.cap_shift) + 1, 1, 127)

A non-positive `Isat` gives code 1. Reset selects 127, the largest
capacitance, so nothing is attenuated before the first result. Reed relays
switch at about 1 kHz, so a new code is applied at most once every
`HOLD_CYCLES` (125000 clocks = 1 ms).

## Data stream and acquisition

`data_collect` writes 32-bit words to an AXI4-Stream port (`m_axis_*`). Four
layouts are selected by `ctl.out_mode`:

| mode | when | word |
|---|---|---|
| 0 `MODE_VI` | every clock | `{v_cal[15:0], i_cal[15:0]}`, sign-extended |
| 1 `MODE_PARAMS` | per iteration | `{isat[13:3], te[13:3], vf[13:5], 1'b0}` |
| 2 `MODE_CURRENTS` | per iteration | `{i_cal[15:0], zero-state offset[15:0]}` |
| 3 `MODE_ISAT_CAP` | per iteration | `{isat[15:0], 9'd0, cap_code}` |

In mode 1, `Isat` and `Te` keep their top 11 bits and `Vf` its top 9 bits.
The LSBs become 2^-14 A, 2^-6 eV and 2^-2 V.

The stream has one output register. A word that arrives while the previous
word is still waiting for `tready` is dropped and counted in
`sts.words_dropped`. Mode 0 at one word per clock therefore needs a sink that
never stalls.

Acquisition starts on a rising edge of `ctl.sw_trigger | gpio_trigger`. It
stops after `ctl.acq_cycles` clocks, or, with `ctl.acq_gated` set, when the
trigger falls. `sts.timestamp` counts clocks from the start of the acquisition
(saturating, 32 bit). A HiPIMS pulse recorded at 500 kHz for 200 µs therefore
gives 100 parameter words from a 25000-clock count-mode acquisition.

## Module map

| module | role |
|---|---|
| `uflp_top` | connects everything; the ports are the ADC/DAC, relays, trigger, stream and control/status structures |
| `uflp_pkg` | formats, `ctl_t` / `sts_t` register structures, enums |
| `reset_gen` | power-up and button/software reset pulse (16 clocks); LED hold 0.1 s |
| `fet_switch` | state sequencer and strobes |
| `data_acquire` | ADC calibration `((adc - offset) * scale) >>> 12`, zero-state offset removal (2 clocks) |
| `state_averager` | 64-sample averages of current and voltage per state |
| `isat_core`, `temp_core`, `vfloat_core` | the three solvers (divider + table + multiply) |
| `gold_div` | Goldschmidt divider |
| `func_lut` | the function tables |
| `bias_set` | bias levels, static/dynamic Te, slew limit |
| `data_out` | DAC calibration `((x * scale) >>> 12) + offset` for the bias and an auxiliary channel (`aux_sel`: Isat, Te, Vf or measured current) |
| `cap_switch` | relay code |
| `data_collect` | stream word packing, acquisition window, counters |
| `time_stamp` | clock and iteration counters |
| `pcr_top` | plasma emulator for a second board (separate top, see below) |

`ctl_t` and `sts_t` are packed structs. In the full instrument, their fields
map onto the memory-mapped control and status registers seen by the ARM
processor. The host must set the gains (`i_scale`, `v_scale`, `dac_scale` =
4096 for unity), `state_cycles` and `cap_shift` before use. An all-zero
control word gives zero gains.

Top-level parameters (defaults): `AVG_LOG2 = 6`, `MIN_CYCLES = 64`,
`DIV_ITER = 16`, `TE_INIT = 5120` (10 eV), `TE_MIN = 50`, `ISAT_INIT = 2560`
(19.5 mA), `CAP_HOLD = 125000`, `RST_CYCLES = 16`, `HANG_CYCLES = 12500000`.

Synthesis (generic Yosys) of the top gives about 910 flip-flop bits and
three 1024 x 18 ROMs, plus 16 multiply-accumulate cells.
`func_lut` has two more tables, `1 - exp(x)` and `sin`, which only the
emulator uses. The widest products
are the divider's 40-bit multiplies.

## What is not in the RTL

These parts of the instrument are outside this logic and appear only as
ports:

* ADC/DAC interface and register bank from the board's FPGA framework
  (`adc_*`, `dac_*`, `ctl`, `sts`);
* the stream clock converter and RAM writer (`m_axis_*`);
* the ARM software;
* the analog chain: amplifier, relay capacitor bank, current/voltage sensing.

## Bench testing without a plasma: the emulator

`pcr_top` (plasma current response) is a second, independent top for a
second board. Its ADC takes the UFLP bias, and its two DACs feed back what a
probe would measure:

    dac_i = Isat * (1 - exp(bias / Te)) + noise
    dac_v = bias + Vf

This models an ideal coupling capacitor. `Isat`, `Te` and `Vf` are host-set
base values (`isat0`, `te0`, `vf0`). One sinusoid from a 32-bit phase
accumulator and a sine table can sweep all three, each with its own
amplitude. `bias / Te` comes from the same Goldschmidt divider, with 8
fractional bits, which gives 64 table steps per unit of `x` because of the 4:1
LSB ratio. It addresses a `1 - exp(x)` table over [-12, 4). Noise is uniform
with peak `Isat * 2^-noise_shift`, from a 16-bit LFSR with a fixed seed, so
runs repeat exactly. The parameters in use are output (`isat_now`, `te_now`,
`vf_now`) for comparison with the UFLP results.

The emulator has to divide, so it is slow. It takes a new bias sample every
35 clocks, and its outputs follow 37 clocks later. A bias change therefore
shows up at its outputs 37 to 72 clocks after the change. The UFLP averages
the last 64 clocks of each state, so with the emulator attached a state needs
about 140 clocks. That limits the rate to roughly 300 kHz. 200 kHz works;
500 kHz does not, because the averages then mix in the previous state. This
is a limit of the emulator, not of the UFLP. Also note that the emulator
output changes only every 35 clocks. A 64-sample average therefore contains
only about two noise draws, and single results scatter far more than they
would with a noise source at the full ADC rate.

## Choices that depart from, or fill gaps in, the original design description

* **Sign convention.** The probe equation is used with ion current positive
  throughout. The solver formulas above follow from it. Some forms of the
  source equations are written for the opposite sign.
* **Positive bias multiplier.** 0.675 Te is used, so the levels span exactly
  4 Te. Some published measurements of this kind of instrument quote 0.64 Te.
  Change `MULT_POS` in `bias_set` (Q4.12) to get that.
* **Divider seed.** The divider first normalises the denominator with a
  leading-one shift. A fixed seed of `D / 2^10` diverges for large
  denominators and loses accuracy for small ones. Normalisation makes 16
  iterations exact to 1 LSB for every 16-bit operand. The iteration count and
  the two-clocks-per-iteration structure are kept.
* **Tables.** There is one uniform Q.11 scale per table, not several scaled
  regions. Holding `1/ln(1+r)` instead of `ln(1+r)` for the temperature saves
  a second division.
* **Averaging.** The window is the last 2^6 samples of each state, not a
  moving average over the whole state. The voltage is averaged in the same
  way.
* **Capacitor code.** The code is linear in `Isat`, with a host-set shift.
  Reset selects all relays. The 1 ms hold is this design's reading of the
  relay speed.
* **Ramp.** "Ramp time" is implemented as a per-clock slew limit.
* **Stream mode 0** sends a word every clock, not once per iteration, so that
  the bias waveform itself can be recorded.
* **Guards, reset values, lengths.** The `Isat` guards, the reset values of
  `Isat` and `Vf`, the reset and LED lengths, the timestamp width, word
  dropping, the Q4.12 calibration format and the `aux_sel` choices are all
  this design's own.

## Verification

Each module has a self-checking testbench in `tb/` that compares it against a
behavioural model. Every testbench ends by printing
`TB_RESULT checks=N failures=M`:

| testbench | covers |
|---|---|
| `tb_gold_div` | random and corner operands against exact integer division (±1 LSB), zero denominator, overflow |
| `tb_func_lut` | every entry of all five tables against `$exp`/`$ln`/`$sin` |
| `tb_fet_switch`, `tb_state_averager` | sequence, strobes and averages for several state lengths |
| `tb_isat_core`, `tb_temp_core`, `tb_vfloat_core` | solver results against real-valued equations over random plasmas; guards and fallbacks |
| `tb_bias_set`, `tb_cap_switch`, `tb_data_acquire`, `tb_data_out`, `tb_data_collect`, `tb_reset_gen`, `tb_time_stamp` | the respective rules, including slew, hold, accumulation, all stream layouts, drops, count/gated acquisition |
| `tb_uflp_top` | the whole design at default parameters against `plasma_model` (20 mA, 2.7 eV, -9 V, 0.5 mA offset, 2 % noise) at 500 kHz: convergence, offset correction, capacitor code, stream layouts and spacing, static mode, ramp, trigger modes, reset button |
| `tb_pcr_top` | emulator: current and voltage against the probe equation, delay and update rate, noise bounds and repeatability, sinusoid amplitude and period |
| `tb_uflp_pcr` | UFLP and emulator connected as two boards: at 80 kHz with Te 2.7 ± 0.5 eV, Isat 20 ± 5 mA and 6 % noise, 16-iteration means track within 0.2 eV and 5 %, and the capacitor code steps with Isat; 200 kHz converges; 500 kHz is shown to be beyond the emulator |
| `tb_uflp_1mhz` | the top built with a 32-sample window, at 42 clocks per state (992 kHz): convergence, word rate, a 32 µs filament |
| `tb_uflp_workloads` | the whole design in five operating cases: DC plasma at 50 kHz; 110 kHz with a density step; 80 kHz with a sinusoidal Te; a 200 µs HiPIMS-like pulse at 500 kHz with a triggered acquisition (100 words); a 32 µs filament at 500 kHz |

`plasma_model` (tb only) returns the ideal probe current for the DAC bias,
with an ideal coupling capacitor, a 3-clock delay, an optional offset current
and uniform noise. It does not model capacitor charging, sheath dynamics or
the amplifier. The end-to-end results therefore show that the arithmetic and
control are right. They do not show how the instrument behaves on a real
plasma.

Known limit: after a step change the loop needs 3 to 5 iterations to settle
in these tests. Structures that pass the probe faster than that are not
resolved, whatever the word sizes. A spoke crossing the probe in 4.5 µs is
one example: that is about two iterations at 500 kHz.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/uflp_pkg.sv \
        tb/tb_uflp_top.sv --top-module tb_uflp_top -Mdir obj -o sim
    ./obj/sim

Replace `tb_uflp_top` with any other testbench name. Modules are found
through `-Irtl -Itb`, and the package must be listed first.

## Changing the design

* **Rate:** set `ctl.state_cycles` at run time. For below 64 clocks per state,
  lower `AVG_LOG2` and `MIN_CYCLES` together (as `tb_uflp_1mhz` does), and
  `DIV_ITER` if needed. Keep the solver latency (`2 * DIV_ITER + 7`) below
  the state length.
* **Range:** reinterpret the formats as described above and set the
  calibration gains. If the `Te`/V LSB ratio changes, update the shifts in
  `temp_core` (`>>> 9`), `vfloat_core` (`>>> 13`) and `bias_set` (`>>> 14`).
* **Bias levels:** `MULT_NEG` and `MULT_POS` in `bias_set`. The Isat and Te
  tables cover `a < 16` and `r < 8`. Both are comfortably above the
  `a = 3.325` and `r ≈ 0.96` that the default levels produce.
