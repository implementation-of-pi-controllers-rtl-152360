# Cascaded PI / sliding-mode speed drive for a DC motor

This is synthesizable SystemVerilog for an all-digital speed controller for a
permanent-magnet DC motor. It uses the classic cascade of two loops:

* **Outer loop: speed.** A PI controller turns the speed error `w* - w` into a
  current reference `i*`. It is discretised with the bilinear (Tustin) rule and
  updated at 40 kHz. Two equivalent datapaths are provided: the *parallel* form
  and the *direct form I* form.
* **Inner loop: current.** A sliding-mode controller switches the full link
  voltage across the motor, `u = +u0` when `i < i*` and `u = -u0` otherwise.
  It drives the four switches of an H-bridge directly, so no separate PWM
  modulator is needed.

All arithmetic uses 16-bit two's complement words. The three analog signals
(speed reference `w*`, measured speed `w`, armature current `i`) share one
10-bit A/D converter through an external analog multiplexer. The logic
sequences that multiplexer and sorts the samples back into three channels.

```
 analog w*, w, i
      |
  [MAX310 mux] --> [A/D] --ad_data[9:0]--> adc_demux ---- w*, w (16 b) --> sub16bit --e--+
      ^                                      ^   |                        (w* - w)       |
      | max_a2, max_a1 (a0, en = 1)          |   |                                       v
      +---------------- mux_control ---------+   |         pi_parallel (kp, ki) -----+  both on e,
                     tap0..tap2 / frame=tap3     |         pi_direct_form1 (b0, b1) -+  pi_sel picks
                                                 |                                   |
                                                 +-- i (16 b) --> sm_current_control <-- i*
                                                                  |
                                                                  +--> sw[3:0] = SW4..SW1 (H-bridge)
```

## Files

| file | content |
|---|---|
| `rtl/pi_drive_pkg.sv` | widths (16-bit data, 10-bit A/D), `sample_t`, slot numbering |
| `rtl/mux_control.sv` | slot counter: mux address and per-slot capture strobes |
| `rtl/dff16bit.sv` | register with load enable (capture latches, PI delay elements) |
| `rtl/conv_10_16bit.sv` | 10-bit offset-binary code to 16-bit two's complement |
| `rtl/adc_demux.sv` | three capture latches and three converters |
| `rtl/sub16bit.sv` | saturating subtractor: the speed comparison |
| `rtl/mul16bit.sv` | 16 x 16 signed multiplier with a 16-bit fixed-point result |
| `rtl/add16bit.sv` | saturating 16-bit adder |
| `rtl/pi_parallel.sv` | PI controller, parallel form |
| `rtl/pi_direct_form1.sv` | PI controller, direct form I |
| `rtl/sm_current_control.sv` | comparator, 40 kHz flip-flop, H-bridge switch mapping |
| `rtl/pi_speed_drive.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/dc_motor_model.sv` | behavioural H-bridge, motor, analog mux and A/D, used by the closed-loop test |

## Sampling: one A/D, three channels

`mux_control` divides time into frames of four slots: `w*`, `w`, `i` and one
idle slot. Each slot lasts `SLOT_CYCLES` clocks (default 1). At the default, a
160 kHz clock therefore gives each channel a 40 kHz sample rate.

| slot `sel` | channel | mux address `{a2,a1,a0}` | strobe at the slot's last cycle |
|---|---|---|---|
| 0 | `w*` | 001 | `tap[0]`: latch A/D word as `w*` |
| 1 | `w` | 011 | `tap[1]`: latch as `w` |
| 2 | `i` | 101 | `tap[2]`: latch as `i` |
| 3 | idle | 111 | `tap[3]` = `frame`: run the control step |

The two slot bits drive the multiplexer's `A2` and `A1` pins. `A0` and `EN` are
tied high, so the signals must sit on the mux's even-numbered inputs (S2, S4,
S6; S8 is read in the idle slot and ignored).

The A/D word must be valid in the last cycle of its slot. With
`SLOT_CYCLES = 1` that means the converter has one clock period (6.25 us)
after the address changes. A slower converter needs a faster clock and a larger
`SLOT_CYCLES`, keeping `clk = 4 * SLOT_CYCLES * 40 kHz`.

`conv_10_16bit` takes the converter to be bipolar with offset-binary output
(code 512 = 0 V). It inverts the MSB and **left-justifies** the value, so a
sample is `(code - 512) * 64`. Every signal then spans the full 16-bit range.
The six bits below the A/D LSB give the PI arithmetic finer resolution than
the converter has (see "Integrator resolution" below). `OFFSET_BINARY = 0`
accepts a converter that already outputs two's complement.

## Number formats and overflow

* **Samples** (`w*`, `w`, `i`, `e`, `i*`): signed 16-bit. One A/D step is 64 LSB.
* **Gains** (`kp`, `ki`, `b0`, `b1`): signed 16-bit with `GAIN_FRAC = 12`
  fraction bits. The range is -8 to +8 and one LSB is 2^-12 = 0.000244.
* **Multiplier:** the 32-bit product is rounded to nearest (halves upward),
  shifted right by `GAIN_FRAC` and clipped to 16 bits. Rounding matters: with
  truncation, any small negative error would add a steady -1 LSB to the
  integrator every sample.
* **Adders and subtractor** saturate at +32767 and -32768 instead of wrapping.
  This is the only protection against integrator windup. `sat` on the top
  level shows when the speed comparison or a stage of the selected PI
  controller is clipping.

## The two PI datapaths

Discretising `Kp + Ki/s` with `s = (2/T)(z-1)/(z+1)`, `T` = 25 us, gives two
equivalent forms:

**Parallel** (`pi_parallel`). Inputs are `kp` and `ki = Ki*T/2`:

```
x[n]  = ki * e[n]
I[n]  = I[n-1] + x[n-1] + x[n]          trapezoidal integrator
i*[n] = kp * e[n] + I[n]
```

It uses two multipliers, three adders and two registers (`x[n-1]` and
`I[n-1]`).

**Direct form I** (`pi_direct_form1`). Inputs are `b0 = Ki*T/2 + Kp` and
`b1 = Ki*T/2 - Kp`:

```
i*[n] = b0 * e[n] + b1 * e[n-1] + i*[n-1]
```

It uses two multipliers, two adders and two registers (`e[n-1]` and
`i*[n-1]`). The coefficients come in as inputs; the host computes them from
`Kp` and `Ki`.

In both forms `i*` is combinational from the present error and the two
registers. The registers load on `frame`. So the `i*` seen in the frame cycle
is `i*[n]`, and the current controller samples it in that same cycle.

The top level runs **both** controllers on the same error. `pi_sel` (0 for
parallel, 1 for direct form I) chooses which one drives `i*`. With matching
coefficients the two outputs differ only by rounding (a few LSB in the
block test), so `pi_sel` can be changed during operation. The closed-loop test
switches structures while running.

### Integrator resolution

This is the main property to understand before choosing gains. The integrator
state is a 16-bit word, and each sample adds `round(ki * e / 4096)`. For
typical speed-loop gains, `Ki*T/2` is tiny. At a 40 kHz sample rate and a
zero at `Ki/Kp` = 39 rad/s, it is `Kp/2048`. So `ki` is only a few LSB, and the
integrator input rounds to zero whenever

```
|e| < 2048 / ki   (in 16-bit LSB)   =   32 / ki   A/D codes
```

Inside that band the integrator stops and only the proportional term acts.
The steady-state speed error is therefore not zero. It can rest anywhere up to
that band. Some numbers from the closed-loop test (speed scaled at 4 rpm per
A/D code):

* `ki = 1`: band ±32 codes = ±128 rpm. The speed settled 122 rpm from the
  reference after 300 ms.
* `ki = 2`: band ±64 rpm. The speed settled within 14 rpm.

Left-justifying the samples already makes this band 64 times smaller than
right-justified 10-bit samples would. Removing it entirely needs a wider
integrator register, which is outside the 16-bit datapath this design keeps.

### No anti-windup, no current limit

The integrator is limited only by 16-bit saturation, and `i*` is not limited
below the current measuring range. Two consequences follow:

* **Large steps overshoot.** A speed step large enough to saturate the
  proportional path winds the integrator up during acceleration, and the speed
  overshoots. In the test, a -1000 to +1000 rpm step with `kp = 0.5`, `ki = 1`
  peaked at about 1600 rpm.
* **The current loop can run away.** If `i*` reaches the top of the current
  A/D range, the measured current clips and `i* > i` stays true. The bridge
  then stays at `+u0` and the current rises towards the stall value `u0/R`.
  A deployment should pick gains and the current sensor range so that this
  cannot happen, or add a limit on `i*`.

## Sliding-mode current loop

`sm_current_control` evaluates `s = i* - i` with a signed comparator. Once per
frame a flip-flop stores `s > 0`, and the stored bit drives the bridge:

| stored bit | +PWM / -PWM | switches on | motor voltage |
|---|---|---|---|
| 1 (`i* > i`) | 1 / 0 | SW1, SW4 | +u0 |
| 0 (`i* <= i`) | 0 / 1 | SW2, SW3 | -u0 |

`sw[0..3]` on the top are SW1..SW4. The decision is made only on the 40 kHz
grid, so the switches change at most once per 25 us (20 kHz at most). The
current ripple follows from the motor: about `(u0 - back-EMF)/L * 25 us`, which
is 0.2 A for the motor in the test. An assertion checks that the two diagonals
are never on together.

The sliding mode only exists while `u0 > |L di*/dt + R i + λ0 w|`:

* The link voltage must exceed the resistive drop plus the back-EMF at the
  highest speed.
* `i*` must not change faster than the available voltage can drive the current.

This is one reason the speed controller is a continuous PI and not a second
switching law.

After reset all four switches are **off** until the first decision. The
control law has no off state, and otherwise reset would apply `-u0`.
**No dead time is inserted** between opening one diagonal and closing the
other. Real power stages need one; it belongs either in the gate drivers or in
an extra counter stage after the flip-flop.

## Timing of one frame (default `SLOT_CYCLES = 1`)

| clock | `sel` | strobe | what happens at the end of the cycle |
|---|---|---|---|
| 0 | 0 | `tap[0]` | A/D word latched as `w*` |
| 1 | 1 | `tap[1]` | latched as `w` |
| 2 | 2 | `tap[2]` | latched as `i` |
| 3 | 3 | `frame` | `i*[n]` is formed from this frame's `w*`, `w`; the PI registers load; the current decision is stored |
| 4 | 0 | `tap[0]` | `sw` shows the new decision |

The switches therefore change one clock (6.25 us at 160 kHz) after the `i`
sample is latched, and two clocks after the `w` sample.

## Top-level interface (`pi_speed_drive`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | slot clock, `4 * SLOT_CYCLES * 40 kHz` |
| `rst` | in | 1 | synchronous, active high |
| `ad_data` | in | 10 | A/D output, offset binary |
| `pi_sel` | in | 1 | 0: parallel PI drives `i*`, 1: direct form I |
| `kp`, `ki` | in | 16 | parallel-form gains (`ki` = `Ki*T/2`), Q4.12 |
| `b0`, `b1` | in | 16 | direct-form-I coefficients, Q4.12 |
| `max_a2`, `max_a1`, `max_a0`, `max_en` | out | 1 each | analog mux address and enable |
| `sw` | out | 4 | H-bridge gate commands, `sw[0]` = SW1 |
| `pwm_pos`, `pwm_neg` | out | 1 each | +PWM (+u0, SW1/SW4) and -PWM (-u0, SW2/SW3) |
| `w_ref`, `w_meas`, `i_meas` | out | 16 | received samples |
| `i_ref` | out | 16 | current reference from the selected controller |
| `frame` | out | 1 | 40 kHz control strobe |
| `sat` | out | 1 | a stage is clipping |

| parameter | default | meaning |
|---|---|---|
| `SLOT_CYCLES` | 1 | clocks per mux slot |
| `GAIN_FRAC` | 12 | fraction bits of the gains |

Gains are plain inputs, so they can be changed while running. They take
effect at the next frame.

## Closed-loop results in simulation

`tb/pi_speed_drive_tb.sv` runs the top at its default parameters against
`tb/dc_motor_model.sv`. The motor model uses L = 4.01 mH, R = 1.51 Ω,
J = 4.73e-5 kg m², kt = 0.0832 Nm/A, λ0 = 0.0833 V s/rad, viscous friction
2.69e-5 Nm s/rad and u0 = 40 V. The test scales speed at 4 rpm per A/D code
(±2048 rpm full scale) and current at 51.2 codes per amp (±10 A).

Two gain sets were tried. Gains A are `kp = 0.5`, `ki = 1 LSB` (Ki/Kp ≈ 39 1/s);
gains B double both. Each phase lasts 120 ms, and the speed shown is the mean
over the last 20 ms:

| phase | reference | settled speed | speed range | peak current |
|---|---|---|---|---|
| parallel, gains A | +1000 rpm | 1046 | 0 .. 1281 | 2.7 A |
| parallel, gains A | -1000 rpm | -1112 | -1579 .. 1012 | 5.3 A |
| direct form I, gains A | +1000 rpm | 1130 | -1023 .. 1617 | 5.6 A |
| direct form I, gains A | -1000 rpm | -1129 | -1619 .. 1034 | 5.5 A |
| parallel, gains B | +1000 rpm | 998 | -1032 .. 1446 | 12.9 A |
| direct form I, gains B | -1000 rpm | -993 | -1425 .. 992 | 10.1 A |
| direct form I, gains A | +1300 rpm (error saturates) | 1445 | -987 .. 1947 | 5.8 A |

In every phase the current followed `i*` to within about 0.09 A on average.
With gains A the settled speeds stay inside the ±128 rpm integrator band
described above. With gains B the current briefly left the ±10 A measuring
range; control was kept, but it shows the missing current limit.

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Use Verilator 5 with timing support:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pi_drive_pkg.sv tb/pi_speed_drive_tb.sv --top-module pi_speed_drive_tb
./obj_dir/Vpi_speed_drive_tb
```

Swap in any other `tb/<module>_tb.sv` and its top module name. The closed-loop
run covers 840 ms of motor time and takes well under a second.

What the testbenches check:

* **Arithmetic blocks:** exhaustive or random operands against 64-bit integer
  references, including every overflow corner.
* **`mux_control`:** address and strobe every cycle, and the per-channel
  strobe rate, for 1 and 3 clocks per slot.
* **`adc_demux`:** every latch against a model, with random strobes.
* **PI controllers:** closed-form step responses, a stage-by-stage model under
  random inputs and gains, saturation, and agreement between the two forms.
* **`sm_current_control`:** both polarities, the `i* = i` tie, hold between
  strobes, and the off state after reset.
* **Closed-loop test:** frame spacing, received `w*` against the commanded
  code, legal switch states on the frame grid, absence of shoot-through,
  current bound and settled speed. It also counts captures per channel, `+u0`
  and `-u0` decisions, frames per PI structure, structure switches and
  saturation events, and fails if any of them never happens.

## Relation to the original design

These parts follow the original design:

* the cascade structure;
* the two PI datapaths (adder, multiplier and register arrangement);
* the sliding-mode law with its flip-flop and switch assignment;
* the 40 kHz rate, 16-bit two's complement data and 10-bit A/D;
* the mux-control outputs (`tap0..3`, two address bits, `A0` and `EN` tied
  high).

These are choices of this implementation:

* one clock with load enables instead of derived clocks;
* the slot order and idle slot;
* offset-binary input and left-justification in the converter;
* the Q4.12 gain format, round-to-nearest and saturation everywhere;
* running both PI forms side by side behind `pi_sel`;
* synchronous reset, with the bridge off until the first decision.

The original was reported at a few hundred gates for acquisition and current
control, and about 20k gates for each PI form. Those gate counts are
technology-specific and were not used as targets. The gain values quoted with
the original measurements are in units that are not defined, so they were not
copied as register values. The test gains keep their Ki/Kp ratio of about
39 1/s and the doubling between the two sets.
