# Digital current controller for a 1 MHz three-phase VIENNA rectifier

A VIENNA rectifier draws sinusoidal current from the three-phase mains and
boosts it to a split DC bus. Each phase has one bidirectional switch built
from two transistors, S+ and S−, and a boost inductor. At 1 MHz switching, the
controller must do all of this within one 1 µs period:

- sample the inductor current,
- compute a new duty cycle,
- load it into the PWM,

for three phases at once.

A processor cannot do this in time. This design does it in FPGA logic:

- The three phase controllers run in parallel.
- Every product goes through a pipelined 18×18 hardware multiplier.
- The PWM reaches 4 ns (8-bit) resolution with a 250 MHz clock. It uses two
  modulators that run half a clock cycle apart.

The RTL covers the FPGA part of the system. The converters, the power stage,
the current sensors, the PLLs and the voltage-controller DSP are outside it.
The testbenches model the converters and the power stage.

Two build configurations of the same top, `vr_current_ctrl_top`, exist:

| | C2 (default) | C1 |
|---|---|---|
| converters | serial LVDS (ADS5240-type, 25 MSa/s, 12 bit, 300 Mbit/s per line) | SPI (AD7274-type, 31.25 MHz serial clock) |
| PWM | 8 bit, steps of 4 ns | 7 bit, steps of 8 ns |
| parameters | `ADC_IF = ADC_LVDS`, `HIRES = 1` | `ADC_IF = ADC_SPI`, `HIRES = 0` |
| sample → duty ready (simulated) | 466 ns | 754 ns |

## The switching period

Everything is tied to the counter of the phase-1 S+ modulator. It counts up and
down, so every pulse is centred on the instant the counter turns around at
zero. At that instant the inductor current equals its average over the period.
A current sampled there needs no filtering against the switching ripple. So
the counter-zero instant does three things:

- it starts the A/D conversion (`soc`),
- it loads the duty that was computed during the previous period,
- it is the centre of every gate pulse.

One period, in order:

1. **Counter zero.** `soc` is brought from the 250 MHz PWM clock into the
   125 MHz system clock.
2. **Conversion.** Six channels are converted: currents on channels 0–2 and
   phase voltages on channels 3–5. The interface hands all six words to the
   system clock together, with one `valid` pulse.
3. **Controllers.** Three controllers, one per phase, compute the S+ and S−
   duties in exactly 16 system clocks (128 ns).
4. **Hand-over.** The six duties cross into the PWM clock as one word. They wait
   there until the next counter zero.

So every duty acts one period after its sample. It must be ready within one
period. The end-to-end tests measure 466 ns (C2) and 754 ns (C1).

The C1 figure includes two extra steps beyond the converter's own 448 ns and
the 128 ns controller:

- synchronising `soc` into the 31.25 MHz converter clock,
- the hand-over into the PWM clock.

## The per-phase control law (`current_controller`, `pi_lag`, `vff_divider`)

For phase *i*, with current sample *i* and voltage sample *u_N*:

```
i_ref = g_e · u_N                       (conductance set by the voltage controller)
e[n]  = i_ref − i
u[n]  = K·(e[n] − k1·e[n−1]) + k2·u[n−1]     P + lag
d_ff  = (u_N − v3harm) · 8000 / v_o          voltage feedforward
x     = u + i_0 − d_ff
d_p   = clamp(x + POS_OFFSET − I_ff, 0, 4000) >> 4     duty of S+
d_n   = clamp(x + NEG_OFFSET + I_ff, 0, 4000) >> 4     duty of S−'s PWM
```

The main term is the voltage feedforward. For the switch of the active half
wave, the duty must be roughly 1 − |u_N|/(V_o/2). The P+lag term only corrects
the remaining error.

- **Offsets.** `POS_OFFSET` = full scale and `NEG_OFFSET` = 0 (the reset
  values) make that formula come out of the sums:
  - S+ modulates during the positive half wave and saturates at full duty
    (always on) during the negative one.
  - S−'s PWM does the mirror image. It is driven through an inverter, so a
    zero duty means S− is always on.
- **Zero-sequence current `i_0`.** A DC offset on all phases. The voltage
  controller uses it to balance the two halves of the output.
- **Third harmonic `v3harm`.** Added to widen the modulation range.
- **Current feedforward `I_ff`.** A per-phase correction for switch turn-off
  delay. It shortens S+ and lengthens S−'s PWM by the same amount.

### Number formats

- **Datapath.** Every signal is an 18-bit two's complement word, the width of
  the hardware multipliers. The converters deliver binary-offset codes, which
  become two's complement by inverting the MSB.
- **Gains.** `g_e`, `K`, `k1` and `k2` are Q6.12: 4096 means 1.0. The
  prototype gains are K = 0.25, k1 = 0.96 and k2 = 0.99, so the reset values
  are 1024, 3932 and 4055.
- **Products.** After each product the 12 fraction bits are dropped (a floor)
  and the result is saturated to 18 bits.
- **Duties inside the controller.** These are counted in sixteenths of a PWM
  step, so full duty is 4000. `POS_OFFSET`, `NEG_OFFSET`, `i_0`, `I_ff` and
  `u` all use this unit. The last step drops the four fraction bits and gives
  the 8-bit duty of 0..250 that the PWM needs.

  The fraction bits are not decoration. With `u` in whole PWM steps, the floor
  after `k2·u[n−1]` takes a full step off `u` every period. The lag then stops
  integrating, and the current settles with a large offset in one half wave.
  The closed-loop test showed this.
- **Voltages.** `v_o` (the full output voltage) and `v3harm` use the same LSB
  as the voltage samples.

### Pipeline (16 system clocks)

| cycle | work |
|---|---|
| 0 | `start`: samples present. The divider registers its operands straight away. |
| 1 | convert samples, latch settings |
| 2 | `i_ref = g_e·u_N` |
| 3 | `e = i_ref − i` |
| 4–8 | P+lag, five register stages |
| 2–14 | feedforward divider |
| 15 | two sums |
| 16 | clamp, cut to 8 bits, `valid` |

**P+lag (`pi_lag`).** It has three multipliers, each behind its own input
register:
- K at the output,
- k1·e[n−1] and k2·u[n−1] side by side.

The stages are: input registers → products → difference → K product → sum and
output register. The result appears 5 clocks after `start`. e[n−1] and u[n−1]
are stored at that moment. The inputs must be held for those 5 clocks, and an
assertion checks this.

**Divider (`vff_divider`).** A restoring divider that produces one quotient
bit per clock for 12 bits. It uses no multiplier blocks. The quotient
saturates at 4095, and also when `v_o ≤ 0`.

A new sample may arrive at most once every 16 clocks, and an assertion
checks this as well.

## Converter interfaces

### SPI converters (`adc_spi_if`, C1)

- All six converters share chip select and the 31.25 MHz serial clock. Each
  has its own data line.
- `soc` is moved into the serial-clock domain with a toggle and two
  flip-flops. Chip select then falls, which starts the conversion.
- Chip select stays low for 14 clocks (448 ns): two leading zeros, then 12 bits
  MSB first.
- A shift register per channel, clocked by the serial clock, collects the bits.
- On the clock where chip select rises, the six words cross into the system
  clock through a toggle handshake with two flip-flops. `valid` follows
  within 32 ns.

### Serial LVDS converters (`adc_lvds_if`, C2)

This is the hardest part of the design.

**What the converter sends.** The converter runs freely at 25 MSa/s. Each
12-bit word comes out serially at 300 Mbit/s on both edges of a 150 MHz bit
clock. A frame signal is high for the first six bits and low for the last six.

**Two-edge capture.** Each data line is sampled by two input registers:
- one on `lvds_clk0`,
- one on `lvds_clk180`, the inverted bit clock.

Each edge feeds its own 6-bit shift register. Once a word is complete, each
half is copied into a parallel register. `ena0` and `ena180` enable the copy.
They are derived from the frame signal as seen on the same edge.

**Ena_Mux.** The FPGA cannot know in advance whether a word's MSB lands on
the rising or the falling edge. Both cases occur, depending on how the frame
lines up. `ena_mux` records which edge saw the frame rise first. The data
multiplexer then interleaves the two halves in that order into the 12-bit
output register.

**Word selection.** Complete words cross into the system clock. Because the
converter is not started by `soc`, the interface picks a word: the
`PICK_WORD`-th word (default 7) that completes after `soc`. That is the word
sampled closest to the counter-zero instant, given the converter's pipeline
delay of about 300 ns.

**When to retune.** `PICK_WORD` is the knob to retune if a converter with a
different pipeline depth is used.

## High-resolution centre-aligned PWM (`dpwm`, `pwm_modulator`)

**The 7-bit limit.** An up/down counter at 250 MHz makes a centred pulse. Both
edges move when the duty changes, so the width changes in steps of 8 ns. At
1 MHz that is only 125 steps, i.e. 7 bits.

**The counter.** It runs 0, 0, 1, …, 124, 124, …, 1. That is 250 clocks per
period. The output is high while the counter is below the compare value `d`,
which gives a pulse of 2·d clocks centred on counter zero.

**The 8th bit.** A second, identical modulator runs on the 180° clock, half a
clock later:
- Both modulators get `d[7:1]`.
- While counting down, the 180° modulator compares with `d + 1`. Its pulse is
  then one half-clock longer on the trailing side and still centred: exactly
  4 ns longer.
- `d[0]` chooses which modulator drives the pin, through a plain 2:1
  multiplexer.

So the pin carries a pulse of `duty` × 4 ns for any duty 0..250, and always
centred on the same instant.

**No register after the multiplexer.** Each modulator's output is registered
in its own clock domain, and the multiplexer itself has no register. This is
deliberate: a register after the multiplexer would force both paths back onto
one clock edge.

In an FPGA the two paths into the multiplexer must be matched by placement.
A short glitch can appear when the selection changes; the slow gate-drive
chain absorbs it.

The select bit is taken at the update and applied one clock later. At that
point both modulators already produce the new pattern.

**Updates.** The duty is loaded at counter zero. `DOUBLE_UPDATE = 1` also loads
it at the counter maximum. This is meant for lower switching frequencies,
where halving the PWM delay is worth it.

**Reset.** Reset is released on `clk_pwm0` through two flip-flops, then once
more on `clk_pwm180`. This guarantees that the 180° counter lags by half a
clock, not by one and a half.

## Clock domains

| clock | rate | used by |
|---|---|---|
| `clk_sys` | 125 MHz | controllers, DSP link, word hand-over |
| `clk_pwm0` / `clk_pwm180` | 250 MHz, 180° apart | modulators, `soc` |
| `clk_spi_adc` | 31.25 MHz | SPI converter interface (C1) |
| `lvds_clk0` / `lvds_clk180` | 150 MHz bit clock and its inverse | LVDS capture (C2) |

Every crossing of a multi-bit word uses the same helper, `cdc_word_sync`:
- The source holds the word and flips a toggle.
- The destination synchronises the toggle through two flip-flops and takes
  the held word on the edge.

Single pulses cross the same way. All clocks are inputs, since they come from
the FPGA's PLL or DCM. `rst_n` is asynchronous, and each domain sees it
through its own flip-flops.

## Settings link (`dsp_spi_slave`)

The voltage controller runs on a DSP and sends its outputs over SPI (mode 0,
MSB first). The SPI lines are oversampled by `clk_sys`, so `dsp_sclk` must
stay below a quarter of the system clock, about 31 MHz (the test uses
10 MHz).

A frame is 24 bits while `dsp_cs_n` is low: a 4-bit address, 2 unused bits
and 18 data bits. Frames of any other length are ignored.

| addr | register | reset value |
|---|---|---|
| 0 | `g_e` (Q6.12) | 0 |
| 1 | `v_o` | 2047 |
| 2 | `i_0` | 0 |
| 3 | `v3harm` | 0 |
| 4 | `POS_OFFSET` | 4000 (full duty) |
| 5 | `NEG_OFFSET` | 0 |
| 6, 7, 8 | `I_ff` of phases 1, 2, 3 | 0 |
| 9 | `K` (Q6.12) | 1024 (0.25) |
| 10 | `k1` (Q6.12) | 3932 (0.96) |
| 11 | `k2` (Q6.12) | 4055 (0.99) |

The controllers latch the settings when a sample arrives, so a write never
lands in the middle of a computation.

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| `ADC_IF` | `ADC_LVDS` | converter interface; `ADC_SPI` selects C1 |
| `HIRES` | 1 | 8-bit PWM with the 180° modulator; 0 gives 7 bit |
| `DOUBLE_UPDATE` | 0 | also load duties at the counter maximum |
| `N_PH` | 3 | phases; there are 2·`N_PH` converter channels |
| `CNT_MAX` | 125 | counter values. The period is 2·`CNT_MAX` PWM clocks and the duty range is 0..2·`CNT_MAX`. |
| `PICK_WORD` | 7 | LVDS word that belongs to a start of conversion |

Other switching frequencies come from the clock (250 MHz / 250 = 1 MHz) or
from `CNT_MAX`. For example, `CNT_MAX = 62` gives a 496 ns period. The C2
sample-to-duty time of 466 ns still fits in it. `tb_vr_top_2mhz` runs the
closed loop in that configuration.

The PWM needs the same 250 counts per period at any frequency. So 150 kHz
needs a 37.5 MHz PWM clock.

## Verification

Each block has a self-checking testbench in `tb/`. Each one:
- prints `TB_RESULT checks=… failures=…`,
- has a watchdog,
- checks values against models written independently in the testbench.

| testbench | what it checks |
|---|---|
| `tb_pi_lag` | u[n] against a 64-bit reference recursion, with saturation cases; latency of exactly 5 clocks |
| `tb_vff_divider` | quotient and saturation for random operands; latency of 14 clocks |
| `tb_current_controller` | both duties against the control law above, with settings that change; latency of exactly 16 clocks; clamping at both ends |
| `tb_dpwm` | measured pulse widths: d·4 ns for 8 bit, 2⌊d/2⌋·4 ns for 7 bit. Also pulse centre fixed for odd and even d, `soc` period of 1000 ns (500 ns with the double update), 0 and full duty |
| `tb_adc_spi_if` | words equal the sampled codes; chip select low for 14 clocks; `valid` within 32 ns of chip select rising |
| `tb_adc_lvds_if` | gap-free word stream for words starting on either edge (both `ena_mux` values); the picked word |
| `tb_dsp_spi_slave` | full register file after every write; bad frame lengths ignored |
| `tb_vr_top` | closed loop at default parameters (see below) |
| `tb_vr_top_c1` | the same with SPI converters and the 7-bit PWM |
| `tb_vr_top_2mhz` | the same at 2 MHz (`CNT_MAX = 62`, 496 ns period) |

### The end-to-end tests

These close the loop with an averaged inductor model. Once per period, each
phase current moves by 0.2·(v_N − v_conv), where v_conv follows from the
measured gate on-time. The run covers two cycles of a 2.5 kHz three-phase
mains, 800 periods in all. Half-way through, `g_e` is stepped up and `i_0`,
`v3harm` and two `I_ff` values are written.

Every period the tests check:
- each of the six gate signals' high time, to the exact nanosecond, against a
  reference model fed with the previous period's samples,
- that the samples equal the converter inputs,
- that the sample-to-duty time stays below one period.

They also require that each of these happened at least once:
- an odd duty,
- S+ held on,
- S− held on,
- modulated duties,
- the DSP writes and the `g_e` step.

The tests write `K = 4.0` over the link. K = 0.25 belongs to the prototype's
current scaling, and this test plant's scale is arbitrary. With that gain the
RMS tracking error settles at about 24 LSB, and the limit is 40.

### Running

With plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_vr_top \
  rtl/vr_pkg.sv $(ls rtl/*.sv | grep -v vr_pkg) \
  tb/vr_ref_pkg.sv tb/ads5240_model.sv tb/ad7274_model.sv tb/tb_vr_top.sv
./obj_dir/Vtb_vr_top
```

Other testbenches work the same way: change `--top-module` and the last file.
`tb_vr_top_c1` and `tb_vr_top_2mhz` use the same support files. The unit
testbenches need only the RTL, plus `ad7274_model.sv` for `tb_adc_spi_if` and
`ads5240_model.sv` for `tb_adc_lvds_if`.

Each top-level run takes a few seconds.

## Where this design makes its own choices

The source describes the structure, the arithmetic widths, the gains, the
timing budget and the PWM scheme. The following are this design's own:

- **Duty units in the controller.** Sixteenths of a PWM step, and the
  resulting scaling of `d_ff` (× 8000 / v_o). The source does not say how `u`
  is scaled.
- **Feedforward divider.** A restoring divider, one bit per clock. The source
  only shows a divider block.
- **Settings link.** The frame format and register map. The source leaves the
  DSP link undescribed. It also does not say where `v3harm`, the offsets and
  `I_ff` come from; here they sit in the same register file.
- **LVDS frame convention.** Frame high for the first six bits, MSB first.
  Also the rule that derives `ena_mux`, and the `PICK_WORD` selection.
- **Counter sequence.** Each end value is held for two clocks, so a duty of 50
  gives 200 ns with 125 counter values.
- **`soc` synchronisation in C1.** Moving `soc` into the SPI clock domain adds
  up to ~100 ns to the budget.
- **Reset and clock-domain crossings.** The reset scheme and the toggle-based
  crossings.
- **Clamping.** Duties are clamped, and products and sums are saturated to
  18 bits.

Beyond these, other things remain to be verified:

- **Clock constraints.** The design is simulated only. Placement and the
  matched multiplexer paths are not covered, and neither are the asynchronous
  timing constraints that a real build needs.
- **Converter models.** They follow the converters' published frames, not
  bit-accurate vendor models.
- **Untested configurations.** The reduced-clock configurations (150 kHz,
  500 kHz with the double update in the full loop) have not been simulated.
  Of the `CNT_MAX` values, only 125 and 62 have.
