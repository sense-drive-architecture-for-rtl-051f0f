# Relaxation-oscillator / TDC front-end for capacitive MEMS accelerometers

A capacitive accelerometer's proof mass sits between two electrodes, so an
acceleration turns into a change in the ratio of two capacitances. This
front-end reads that ratio as a frequency and does almost everything after
it in digital logic. It does not use a charge amplifier followed by an ADC.

1. A relaxation oscillator uses the MEMS half-bridge as its timing element.
   Its frequency is `f = F0 * d0 / (d0 + x)`, where `x` is the proof-mass
   displacement and `d0` the electrode gap. That is about 38.85 MHz at rest,
   and it falls as the mass moves toward the top electrode.
2. A coarse–fine time-to-digital converter (TDC) measures `f` over a fixed
   sensing time `T_sns` (5 us). A counter counts the whole oscillator
   periods, `n`. A 144-tap delay line, locked by a DLL so that `M` taps span
   exactly one period, gives the fraction of the last period, `m / M`.
3. The output is `dout = M*n + m`. This is the average frequency in units
   of `1 / (M * T_sns)`. With M = 128 and T_sns = 5 us one LSB is 1.5625 kHz,
   about 0.009 % of the resting frequency. For the modelled sensor, with
   the ideal oscillator law, that is about 5.8 mg of acceleration per LSB.
   A real oscillator with a flatter frequency-versus-displacement slope gets
   proportionally less, around 7.6 mg per LSB.
4. Sensing alternates with a drive slot of the same length. In that slot
   the oscillator is stopped and electrostatic force pulses (PWM or PDM) are
   applied to one electrode. They are used for self-test, or by an external
   controller to close a force-feedback loop.

The RTL covers the whole digital part, which is synthesizable. The sensor,
the oscillator and the delay line with its DLL are analog. They are given as
behavioural SystemVerilog models (real numbers and `#` delays), so the whole
chain can be simulated from acceleration to `dout`.

## One frame

At the defaults, `clk` runs at 200 MHz and a frame lasts 2000 cycles (10 us):

```
cycle  0 ........ 999 | 1000 ............. 1979 | 1980 .. 1999
mode   SENSE          | DRIVE                   | RESET
rst    0              | 0                       | 1
stop   0              | 1                       | 1
osc    running        | held low                | held low
force  none           | fu or fd for duty cycles| none (all at Vdd/2)
```

- **Sense.** Releasing `rst` starts the oscillator and lets the counter
  run. The oscillator always starts low, so its first rising edge comes half
  a period later.
- **Rise of `stop`.** This edge ends `T_sns`. It freezes the counter and
  latches all 144 delay-line taps at the same moment.
- **Drive.** The result is read out and decoded during this slot, while the
  force pulse is applied.
- **Reset.** The short reset at the end of the frame clears the counter. It
  also clamps every MEMS terminal to mid-supply, which drains the charge
  that builds up on the floating mid electrode.

Holding `en` low parks the design in reset, which is the oscillator's
shut-down mode.

Because the first edge comes half a period after the start, every counted
edge credits one full period, and

```
dout / M = f * T_sns + 1/2
```

At rest with M = 128 this gives 128 × 194.75 ≈ 24929. The ½ is a constant
offset that later processing can remove.

## Making the counter and the delay line agree

The counter runs on `osc`. The decoder runs on `clk`, which has no phase
relation to `osc`. `n` and `m` must describe the same oscillator edge,
otherwise `dout` is off by a whole period (`M` LSBs). This design keeps them
together as follows:

- **Counter freeze.** The counter increments on an `osc` rising edge only
  if `stop` is still low at that edge (`osc_counter`). After `stop` rises
  the count cannot change.
- **Same edge in the delay line.** The latches catch the most recent rising
  edge that was counted, and `m` measures the time since that edge.
- **Safe copy.** `sample_sync` passes `stop` through a 2-flop synchroniser
  and copies the count on the detected rising edge. By then the count has
  been stable for at least one `clk` period.

`done` comes SYNC + 4 = 6 `clk` cycles after the first `clk` edge that sees
`stop` high. `cnt` and `dec` are valid together at that point.

The original design uses a "result-consistent" sampling circuit that it
does not describe. The freeze-then-copy scheme above is this design's own.

## Reading the delay line (`tdl_decoder`)

This is the least obvious part of the design.

**Tap order.** Each delay cell has a D-latch on its input. Bit `k-1` of the
144-bit word is the latch in front of cell `k`, so bit 0 holds `osc`
itself. At the stop edge,

```
tdl[k-1] = osc(t_stop - (k-1) * tau)
```

Reading from bit 0 upward therefore goes back in time. The most recent
rising edge of `osc` shows up as the first place where a run of ones is
followed by zeros. The decoder returns `m`, the 1-based position of the last
one in that run. The edge has passed `m-1` cells but not `m` cells, so
`m ≈ ceil(elapsed / tau)`.

Real delay lines have bubbles: single wrong bits near metastable latches or
mismatched cells. For that reason the decoder correlates the word with a
mask rather than looking for the first 1→0 pair:

- A candidate transition at bit `i` needs `tdl[i-1] = 1` and `tdl[i] = 0`
  exactly.
- Against a mask of `MASK_W` = 8 ones followed by 8 zeros around it, the
  candidate may have at most `MAX_ERR` = 1 other mismatching bit.
- The mask windows are clipped to the active length: 144 taps in 128-cell
  mode, 72 taps in 64-cell mode. Bits beyond that are ignored.
- The lowest qualifying candidate wins. If none qualifies, `out` is 0.

This mask rule handles several awkward cases:

- **Stray one among zeros.** The ones window in front of it is all zeros,
  so the candidate is rejected.
- **Stray zero inside the ones.** The zeros window after it is mostly ones,
  so it is rejected too.
- **Delay offset.** If the DLL leaves `M*tau` slightly short of a period,
  the transition can lie beyond tap `M`. The extra taps (up to 144, or 72)
  still catch it, and `m` can exceed `M`. The shift-and-add in
  `dout_combine` handles this without wrap-around.
- **Known limit.** Within the first 8 taps the ones window is cut off by
  the start of the line. A bubble there cannot be told from an edge that
  has only just arrived.

The decoder is pipelined: capture the word, form all 143 candidates in
parallel, then priority-encode them. The result is out 3 `clk` cycles after
`start`.

## The DLL and the 64/128 switch

The phase detector compares `osc` with tap 128, or with tap 64 when `sel64`
is high. A charge pump moves the cell delay until that tap lags by exactly
one period. The cells are current-starved inverters. Two gate voltages set
their delay, and a higher voltage means a shorter delay:

- **`vctrl`**, the charge-pump output, is what the loop moves.
- **`vcal`**, the calibration voltage, is set from outside. It fixes the
  longest delay the loop can reach, i.e. the delay at the bottom of the
  `vctrl` range.

- **128-cell mode** needs 0.20 ns per cell at 38.85 MHz. With `vcal` =
  0.8 V the loop settles at `vctrl` ≈ 0.62 V.
- **64-cell mode** doubles the cell delay, to 0.40 ns at the same
  frequency. This makes lower oscillator frequencies reachable, at half the
  resolution. `dout` then uses a shift of 6 instead of 7. At 0.8 V of
  `vcal` the longest delay is only about 0.24 ns, so `vcal` must come down
  as well, to about 0.5 V (`vctrl` ≈ 0.57 V). If it does not, `vctrl`
  stays pinned at its lower limit and the results are wrong.

Change `sel64` and `vcal` only while the oscillator is stopped. The loop
relocks within about 1 us of the next sensing slot.

`tdl_dll` models the loop as follows:

- **Delay law.** The two transistor pairs add their currents, each taken as
  a square law above `VTH` = 0.1 V:
  `tau = TAU_K_NS / ((vcal - VTH)^2 + (vctrl - VTH)^2)`.
  With `TAU_K_NS` = 0.1536 it gives 0.48 ns with both voltages at 0.5 V and
  about 0.1 ns with both at 1 V. Between those ends it is only a rough fit
  to transistor-level curves.
- **Charge pump.** Once per oscillator period, a current `ICP_UA` = 5 uA
  flows into `CDLL_PF` = 1 pF for as long as the phase error. Its sign
  follows the error: up when the line is slow, down when it is fast. That
  moves `vctrl` by 5 mV per ns of error. In 128-cell mode this corrects
  about 18 % of the error per period.
- **Clamp.** `vctrl` stays within 0.5–1 V.
- **Stopped oscillator.** It ignores pairs of edges that are too far apart
  to be consecutive, for example across the drive slot.
- **Latch snapshot.** It builds the latched word by looking up a short
  history of `osc` edge times.

## Force feedback (`fb_drive`)

In the drive slot the mid electrode is grounded (`f` = 1). Either the top
electrode (`fu`) or the bottom electrode (`fd`) is raised to `V_fb` = 3.3 V
for `duty` cycles. The other electrode stays grounded.

The controls are sampled `START_DLY` + 1 = 11 cycles into the slot, and the
pulse starts on the next cycle. The result of the sensing slot that has
just ended is out 7 cycles into the slot, so a controller can react to it
within the same frame.

- **PWM** (`pwm_npdm` = 1): `dir` picks the electrode and `duty` sets the
  width. A `duty` of 100 cycles is 5 % of the frame. The equivalent
  acceleration is proportional to the duty cycle (`a = K · C0 · V_fb² /
  (2 m d0)`, with `K` the duty cycle, `C0` the rest capacitance and `m` the
  proof mass). For the modelled sensor this is about −4.5 g at 5 %. The
  drive slot caps the duty cycle at 50 %.
- **PDM** (`pwm_npdm` = 0): every drive slot carries one pulse of width
  `duty`. The bit `dfb` picks its direction: 1 for top, 0 for bottom. An
  external sigma-delta controller sets the density of each direction.
  Alternating bits give zero net force.

Assertions check that `fu` and `fd` never overlap and never fire outside the
drive slot.

`tb_closed_loop` closes the loop with the simplest controller:
`dfb = (dout > rest value)`, decided every frame. The result is a mechanical
sigma-delta modulator. Over 150 frames the density of top pulses settles at
`1/2 + a / (2 · 4.55 g)` within 0.02 (the test allows 0.05) for inputs from
−1.5 g to +2.2 g. The output stays within 150 LSB of the rest value.

## Modules

| module | kind | role |
|---|---|---|
| `accel_frontend` | top (contains models) | sensor + oscillator + TDC + sequencing, wired as one front-end |
| `accel_pkg` | package | widths (11-bit count, 144 taps, 8-bit code, 19-bit dout), `osc_mode_e` |
| `sense_drive_seq` | RTL | frame timing: reset / sense / drive, `rst`, `stop`, `drive_start` |
| `fb_drive` | RTL | PWM/PDM force pulses `fu`, `fd`, drive-mode flag `f` |
| `tdc` | wrapper (contains model) | counter + delay line/DLL + sampler + decoder |
| `osc_counter` | RTL | 11-bit counter clocked by `osc`, async clear, freezes on `stop` |
| `sample_sync` | RTL | synchronises `stop`, copies the count, starts the decoder |
| `tdl_decoder` | RTL | mask-correlation search for the phase `m` |
| `dout_combine` | RTL | `dout = cnt << K + dec`, registered, with `dout_valid` |
| `tdl_dll` | behavioural | 144 latched taps, DLL-controlled delay |
| `relax_osc` | behavioural | capacitance-ratio oscillator, reset and drive modes |
| `mems_accel` | behavioural | mass-spring-damper, half-bridge capacitances, electrostatic force |

Top-level ports of `accel_frontend`:

- **Clock and control:** `clk` (200 MHz nominal), `rst_n` (asynchronous,
  active low), `en`, `sel64`, and `vcal_mv[9:0]` (the
  delay-line calibration voltage in mV).
- **Stimulus:** `accel_mg`, a signed 16-bit acceleration in milli-g.
- **Drive control:** `pwm_npdm`, `duty[9:0]`, `dir`, `dfb`.
- **Results:** `dout[18:0]` with a one-cycle `dout_valid`, plus its parts
  `cnt[10:0]` and `dec[7:0]`.
- **Monitors:** `osc`, `fu`, `fd`, `rst`, `stop`.

Parameters:

- **`accel_frontend`:** `SENSE_CYC`, `DRIVE_CYC`, `RST_CYC`, `DUTY_W`.
- **`tdl_decoder`:** `MASK_W` and `MAX_ERR` tune its error tolerance.
- **`fb_drive`:** `START_DLY` sets where the force pulse starts in the
  drive slot.

The sensor defaults are a 1 um gap, k = 1.1 N/m, m = 0.78 ug (5.9 kHz
resonance) and C0 = 128 fF.

## Where the models simplify

- **Oscillator frequency.** The oscillator follows the ideal formula.
  Comparator delay and parasitics are not modelled. They flatten the
  frequency-versus-displacement curve of a transistor-level oscillator: at
  30 nm it gives about 37.97 MHz, where the ideal formula gives 37.72 MHz.
  Both half periods are equal.
- **Electrostatic force in sense and reset.** It is taken as zero during
  sensing and reset. Only drive pulses apply force.
- **Damping.** No damping value is available. Critical damping (`ZETA` =
  1) is assumed.
- **DLL.** The phase detector and charge pump are reduced to one
  proportional step of `vctrl` per period. The delay law is a two-constant
  fit, not a transistor model. The model
  always pairs the tap-M edge with the next oscillator edge, so it cannot
  show the false or harmonic lock that a real phase detector must be kept
  out of.
- **Single channel.** One oscillator feeds one TDC. A chip may carry
  several oscillators for different sensors.

## Design choices not fixed by the architecture

These are this design's own choices:

- the placement (end of the drive slot) and length (100 ns) of the reset
- the pulse position (11 cycles into the drive slot) and PDM coding in
  `fb_drive`
- the synchroniser depth and freeze-then-copy consistency scheme
- the decoder's mask width, error tolerance and 3-cycle pipeline
- the 19-bit `dout` register
- the counter wrapping at 2^11 rather than saturating; a 5 us window at
  38.85 MHz uses about 194 counts

The architecture also has a configuration unit and a serial output for
`dout`. Their formats are not part of this RTL. Configuration is the set of
top-level inputs, and `dout` is a parallel output.

## Simulating

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/accel_pkg.sv \
          tb/tb_accel_frontend.sv --top-module tb_accel_frontend
./obj_dir/Vtb_accel_frontend
```

For a block test, replace the testbench name with `tb_<module>`.

`tb_accel_frontend` runs the top with all defaults, about 3.3 ms of
simulated time in a few seconds. It checks every `dout` against the
oscillator edges it observes, within 1 LSB, and then goes through:

- zero force in 128-cell mode
- +1 g on the acceleration input: the output rises by about 175 LSB
- 5 % PWM on the top electrode: the output drops by about 816 LSB for a
  33.6 nm displacement
- 5 % PWM on the bottom electrode
- balanced PDM
- shut-down
- 64-cell mode, with the calibration voltage lowered to 0.5 V

It counts each of those mechanisms and fails if one never happened.

The block tests compare against values the testbench works out on its own:

- an ideal oscillator for the TDC and DLL, plus the inverted delay law for
  the DLL control voltage
- closed-form displacement and resonance for the sensor
- a pattern generator with bubbles and delay offset for the decoder
- cycle-exact latencies for the sampler, decoder and sequencer

All files use `timescale 1ns/1ps`. The simulator is two-state, so every
register has a reset and every model variable is initialised.
