# Delta-modulated trigger controller for a single-phase matrix converter

A single-phase matrix converter connects an AC supply to a load through four
bidirectional switches, S1 to S4, arranged as an H-bridge. Each switch is two
IGBTs, "a" and "b", that conduct in opposite directions. By choosing which
diagonal of the bridge conducts, and in which direction, during each half
cycle of the supply, the same hardware works as a **cyclo-converter** (output
frequency lower than the supply) or a **cyclo-inverter** (output frequency
higher than the supply). Switched this way the output is a train of raw supply
segments, rich in low-order harmonics. This controller therefore also chops
every conduction interval with a **delta-modulated pulse train**. The pulse
train comes from comparing a stepped sine reference with a triangular carrier.

The controller is small, synchronous logic on one 50 MHz clock. It drives the
eight IGBT gate lines through an external isolation and driver stage, which is
not part of this RTL.

```
             x1,x2,x3                trig[4]              gates[8]
 pulse_generator ──────▶ logical_operator ─────▶ trigger_multiplier ─────▶ to isolation /
                              ▲ mode                      ▲ dm                driver stage
                                                          │
 delta_modulator: carrier_gen ─▶ dm_pulse_gen ◀─ sine_reference
                   (triangle)     (compare,        (ROM + memory
                                   sample)          counter)
```

## Switch pairs

At any instant exactly one diagonal pair of the bridge is allowed to conduct.
Which pair depends on the supply half cycle and the output polarity wanted:

| pair      | supply half | output polarity |
|-----------|-------------|-----------------|
| S1a, S4a  | positive    | positive        |
| S2a, S3a  | positive    | negative        |
| S2b, S3b  | negative    | positive        |
| S1b, S4b  | negative    | negative        |

The "a" devices carry current when the supply is positive and the "b"
devices when it is negative. The diagonal (1-4 or 2-3) sets the direction of
current through the load.

## Basic waves: `pulse_generator`

Three square waves carry all of the timing:

* **X1**, at the supply frequency (50 Hz). It is high in the positive supply half.
* **X2**, at Nr × 50 Hz. It is the cyclo-inverter output polarity.
* **X3**, at 50 / Nr Hz. It is the cyclo-converter output polarity.

Each wave comes from its own counter (`square_wave_gen`). The counter counts N
clocks and then flips the output, so f = f_clk / 2N. X1 uses N = 500 000, X2
uses N = 500 000 / Nr and X3 uses N = 500 000 × Nr. The default Nr = 5 gives
250 Hz and 10 Hz. All three counters leave reset together with their outputs
high, and their half periods divide one another. Their edges therefore stay
aligned: every X1 edge is also an X2 edge, and every X3 edge is an X1 edge. Nr
is a build-time parameter. Nr must divide 500 000 exactly, and an elaboration
assertion checks this.

## Choosing the pair: `logical_operator`

Call Xo the output-polarity wave: X2 in cyclo-inverter mode, X3 in
cyclo-converter mode. The four pair triggers are then the four AND terms of X1
and Xo:

| pair     | term        | cyclo-inverter | cyclo-converter |
|----------|-------------|----------------|-----------------|
| S1a, S4a | X1 · Xo     | X1 · X2        | X1 · X3         |
| S2a, S3a | X1 · Xo'    | X1 · X2'       | X1 · X3'        |
| S2b, S3b | X1' · Xo    | X1' · X2       | X1' · X3        |
| S1b, S4b | X1' · Xo'   | X1' · X2'      | X1' · X3'       |

The outputs are one-hot by construction. `mode` (`spmc_pkg::mode_t`) is a
run-time input, and the triggers follow it combinationally.

Cyclo-converter example at Nr = 5: for 50 ms X3 is high. In that time S1a/S4a
conduct in each positive supply half and S2b/S3b in each negative one, so the
load sees five positive-going supply half cycles in a row. For the next 50 ms
the negative-output pairs take over.

Cyclo-inverter example: X2 flips five times per supply half cycle. The bridge
therefore reverses the load's polarity five times within each supply half
cycle.

## The delta modulator

The modulator is the part that needs most care to understand. It makes **one**
pulse train, `dm`, that is shared by all four pairs.

### Carrier: `carrier_gen`

The carrier is an n-bit up/down counter (n = 4) with a direction flag. Counting
up, the flag clears when the count reaches the peak. Counting down, the flag
sets again when the count reaches 0. With peak 15 this gives the staircase
triangle 0, 1, …, 15, 14, …, 1, 0, … of 30 steps per period:

    f_c = f_step / (2 · (2^n − 1))

A step divider advances the counter once every 833 clocks. At 50 MHz this puts
the carrier at 50e6 / (833 · 30) = 2000.8 Hz, the 2 kHz carrier of the
original controller. `step` is a one-clock pulse on each step.

`peak` is a run-time input and sets the modulation index (see below). If the
peak is lowered below the count while counting up, the counter turns at once.
A peak of 0 holds the carrier at 0.

### Reference: `sine_reference`

A 32-word ROM holds one **half cycle** of a sine, scaled to the carrier's full
range 0…15. Each sample is taken at the middle of its interval, at angle
π(2i+1)/64:

    1 2 4 5 6 8 9 10 11 12 13 14 14 15 15 15 | 15 15 15 14 14 13 12 11 10 9 8 6 5 4 2 1

The values are computed at elaboration, not read from a file. The function
rounds `AMP·16p / (5b² − 4p)` with a = 2i+1, b = 2·SAMPLES and p = a(b − a).
This is Bhaskara's rational sine approximation, within 0.2 % of full scale. A
binary memory counter addresses the ROM and advances every 15 625 clocks, so
the half sine repeats every 32 × 15 625 = 500 000 clocks = 10 ms. This is
exactly one half cycle of X1, in step with the supply from reset on. The ROM
output is registered, so `v_ref` follows `addr` by one clock.

Because the reference is a rectified sine locked to the supply half cycles, the
pulses are widest in the middle of every supply half cycle whatever the output
frequency. This shapes each chopped supply segment, not the output envelope.

### Pulse: `dm_pulse_gen`

On every carrier step the comparison "reference above carrier" is sampled into
the `dm` register. Within one carrier period of 30 steps, a reference value v
(1 ≤ v ≤ peak) is above the carrier on 2v − 1 steps. The pulse therefore has
duty (2v − 1) / (2·peak), one pulse per carrier period. That is 20 pulses per
10 ms half cycle at the defaults, with duty rising from 1/30 at the zero
crossings to 29/30 at the crest.

**Modulation index.** The table is always full scale, so lowering the carrier
peak raises the index to 15 / peak. Reference values above the peak then keep
the pulse high for the whole carrier period.

### Multiplier: `trigger_multiplier`

Each pair trigger is ANDed with `dm`, and the product drives both gates of its
pair. The gate vector is `spmc_pkg::gates_t`, ordered
`{s1a, s1b, s2a, s2b, s3a, s3b, s4a, s4b}`. An assertion in the top checks that
no two pairs are ever gated together.

## Timing at a glance (defaults, 50 MHz)

| signal       | period                   | changes                                      |
|--------------|--------------------------|----------------------------------------------|
| X1           | 1 000 000 clocks (20 ms) | register, on counter terminal count          |
| X2           | 200 000 clocks (4 ms)    | same                                         |
| X3           | 5 000 000 clocks (100 ms)| same                                         |
| carrier      | 24 990 clocks (0.5 ms)   | one step every 833 clocks                    |
| v_ref        | 500 000 clocks (10 ms)   | new sample every 15 625 clocks, +1 clock     |
| dm           | —                        | one clock after each carrier step pulse      |
| gates        | —                        | combinational from X1/X2/X3, dm and `mode`   |

All registers are reset by a synchronous, active-low `rst_n`. The gate outputs
are combinational. If glitch-free pins are needed, register them (or the four
triggers) outside this design.

## Parameters of `spmc_controller`

| parameter    | default | meaning                                             | origin |
|--------------|---------|-----------------------------------------------------|--------|
| `X1_HALF`    | 500000  | clocks per half period of X1 (50 Hz at 50 MHz)      | original design |
| `NR`         | 5       | frequency ratio: X2 = 50·Nr Hz, X3 = 50/Nr Hz       | original design (250 Hz / 10 Hz) |
| `N_BITS`     | 4       | carrier counter and ROM word width                  | original design |
| `STEP_DIV`   | 833     | clocks per carrier step (2 kHz carrier)             | chosen here, from the 2 kHz carrier |
| `SAMPLES`    | 32      | ROM samples per half cycle                          | chosen here |
| `SAMPLE_DIV` | 15625   | clocks per ROM sample (10 ms half cycle)            | chosen here, from the 10 ms period |

Other operating points the hardware was tried at can be reached through `NR`:

* 25 Hz cyclo-converter output: `NR = 2`.
* 1 Hz output: `NR = 50`.
* 10 kHz cyclo-inverter output: `NR = 200`.

At 10 kHz one output half cycle is 2 500 clocks, shorter than one 2 kHz carrier
period, so the modulation there is coarse. A wider `N_BITS` with a smaller
`STEP_DIV` gives a finer carrier.

## Departures and choices

The original controller gives the counters, the flowcharts of the X1 counter
and the carrier counter, the switching terms and the block structure. The
following points are this design's own, or readings of unclear points:

* **Initial level of X1.** One description says the output is reset after the
  first count; the flowchart sets it. This design follows the waveform diagram:
  X1 is high for the first 10 ms.
* **Carrier rate.** The formula f_c = f_clk / (2(2^n − 1)) taken with the
  50 MHz clock would give 1.67 MHz. The measured carrier was 2 kHz. The formula
  is read here as applying to the counter's step rate, and a step divider was
  added.
* **Mode input.** The original builds one configuration per operating mode. Here
  `mode` selects cyclo-inverter or cyclo-converter at run time.
* **Modulation index input.** The original changes the carrier's count range to
  change the index. Here that range is the run-time `carrier_peak` input.
* **Comparator.** The original describes the comparison as "within a
  hysteresis band" but gives no band. Here it is a plain strict compare,
  sampled on each carrier step.
* **Sine table.** The sample count, the scaling and the registered ROM output
  are chosen here.
* **Phase alignment.** The shared reset keeps X1, X2, X3 and the sine reference
  aligned. The original shows aligned waveforms but does not say how.
* **Not built.** The closed-loop delta and sigma-delta modulators (integrator in
  the feedback or forward path, two-level quantizer, sample-and-hold) explain
  the principle of the method. The digital realization is the table-versus-
  carrier comparison above, and that is what is implemented. The opto-coupler
  isolation, the gate drivers and the IGBT power stage are analog and outside
  this RTL.

## Files

| file                          | content |
|-------------------------------|---------|
| `rtl/spmc_pkg.sv`             | types (`mode_t`, `trig_t`, `gates_t`) and default constants |
| `rtl/square_wave_gen.sv`      | N-clock half-period square wave |
| `rtl/pulse_generator.sv`      | X1, X2, X3 |
| `rtl/logical_operator.sv`     | switch-pair terms |
| `rtl/carrier_gen.sv`          | up/down counter carrier with step divider |
| `rtl/sine_reference.sv`       | half-sine ROM and memory counter |
| `rtl/dm_pulse_gen.sv`         | sampled comparator |
| `rtl/delta_modulator.sv`      | carrier + reference + comparator |
| `rtl/trigger_multiplier.sv`   | AND with the pulse, fan-out to eight gates |
| `rtl/spmc_controller.sv`      | top level |
| `tb/spmc_ref_pkg.sv`          | closed-form reference model used by the testbenches |
| `tb/tb_*.sv`                  | self-checking testbenches, one per block, plus the system tests below |

## Verification

Every testbench is self-checking. Each compares the outputs on every clock with
a closed-form model: modular arithmetic for the counters, `$sin` for the table,
the switching terms for the gates. Each has a watchdog, and each prints
`TB_RESULT checks=N failures=M`.

* `tb_pulse_generator`: a small instance is checked per clock. A default
  instance is timed over one 100 ms X3 period: half periods of 500 000,
  100 000 and 2 500 000 clocks.
* `tb_logical_operator`, `tb_trigger_multiplier`: exhaustive.
* `tb_carrier_gen`: exact triangle, flag and step pulse. Peak lowered to 7
  (14-step period) and to 0. Default period 24 990 clocks.
* `tb_sine_reference`: exact table at 4 bits, within one LSB at 8 bits.
  Default wrap every 500 000 clocks.
* `tb_dm_pulse_gen`: random operands and sample pulses.
* `tb_delta_modulator`: per-clock model at peaks 15 and 10. The pulse must be
  wider near the crest and wider at the lower peak.
* `tb_spmc_controller`: end to end at about 1/156 of the default clock counts, with
  per-clock checks. It covers a full cyclo-converter cycle, a switch to
  cyclo-inverter and back, and a run with a lowered peak. It counts mode
  switches, gates fired, carrier turns, ROM wraps, pulse edges and lowered-peak
  cycles, and fails if any of them never happened.
* `tb_spmc_full`: the same checks at the default sizes. It runs 100 ms in
  cyclo-converter mode, 20 ms cyclo-inverter and 10 ms back, then 20 ms at
  peak 12. That is 7.5 M clocks and takes a few seconds.
* `tb_spmc_workloads`: three default-clock instances at Nr = 2 (25 Hz), 50
  (1 Hz) and 200 (10 kHz), timed edge to edge, with the gate lines checked
  against the terms on every clock.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/spmc_pkg.sv tb/spmc_ref_pkg.sv tb/tb_spmc_controller.sv \
    --top-module tb_spmc_controller
./obj_dir/Vtb_spmc_controller
```

Substitute any other `tb_*` name. Verilator finds the remaining modules
through `-Irtl -Itb`. The RTL is synthesizable. The ROM is a constant array
that a synthesis tool maps to LUTs or a block ROM.
