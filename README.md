# Analog ↔ digital conversion lab: DACs, ramp, SAR and flash ADCs

This design converts signals both ways with a small FPGA and a handful of
analog parts. A 6-bit R-2R resistor ladder turns FPGA codes into voltages.
Two ADCs are built on top of that ladder. Each puts trial codes on the DAC
and compares the DAC voltage with a held sample. They differ only in which
codes they try, and so in how many clock cycles a conversion takes:

| converter | search | clocks per 6-bit conversion | rate at a 68 kHz clock |
|---|---|---|---|
| single-slope ("Wilkinson") | linear: 0, 1, 2, … 63 | 68 | 1 kHz |
| successive approximation (SAR) | binary: one bit per clock | 10 | 6.8 kHz |
| flash | none: 7 comparators at once | 0 (combinational) | limited by the analog parts |

The design follows the analog/digital conversion lab of an undergraduate
electronics course. It contains four independent systems, side by side in
`lab12_top`:

1. **Waveform generators.** A sawtooth counter, a folded triangle counter and a
   phase-accumulator synthesizer each drive an R-2R DAC.
2. **Single-slope ADC.** `adc_ramp` with a sample & hold, a ramp DAC, a
   comparator and a display DAC that shows the result.
3. **SAR ADC.** `adc_sar` in the same analog loop.
4. **3-bit flash ADC.** A resistor string, 7 comparators and a 74F148-style
   priority encoder.

The digital blocks are synthesizable SystemVerilog. The analog parts are
behavioural models with `real`-valued ports, so each converter can be
simulated end to end in Verilator.

## Codes and voltages

The ramp and SAR converters and all the DACs use the same scale. The DAC
output is 3.3 V × code / 64, so 1 LSB = 51.6 mV. Code 63 gives 3.248 V.
A converter returns the largest code whose DAC voltage is not above the held
sample:

    code = min(63, floor(Vin × 64 / 3.3))      for Vin ≥ 0

This is the floor rule of an ideal ADC, with 3.3 V full scale. The comparator
reports `1` when the sample is **at or above** the DAC voltage. A sample exactly
on a step boundary therefore reads as the upper code.

The flash converter has its own scale. It runs from a 10 V reference in 8 codes
spaced 10/7 V = 1.43 V apart. Its thresholds sit half a step above each
code's nominal voltage, at (k − 0.5) × 10/7 V for k = 1 … 7. It therefore
rounds to the nearest code instead of truncating: code = min(7, round(Vin × 0.7)).

## The single-slope converter (`adc_ramp`)

A step counter runs modulo 2^BITS + 4 (68 for 6 bits). Every output is a
decode of that counter or a register loaded on one of its steps:

| step | `dac` | what happens on the clock edge that ends the step |
|---|---|---|
| 0 … 63 | = step | if `cmp` = 1, the running-code register `newadc` takes `dac` |
| 64 | 0 | `adc` ← `newadc` (the result) |
| 65 | 0 | — (`conv_done` = 1 during this step; `adc` already holds the new result) |
| 66 | 0 | — (`sample_hold` = 1: the switch is closed and the capacitor takes the next sample) |
| 67 | 0 | — |

The DAC rises by one LSB per clock. While the held sample is at or above the
DAC voltage, `cmp` stays 1 and `newadc` keeps following the ramp. Once the
ramp passes the sample, `cmp` stays 0 and `newadc` freezes on the last code
below the sample. The result register `adc` therefore changes only once per
conversion. `conv_done` marks the clock in which it has just changed.

Things to know when reusing it:

- The path from `dac` through the DAC and comparator back to `cmp` must settle
  within one clock. `dac` is combinational from the counter.
- `newadc` is never cleared. If the sample is below 0 V, `cmp` never goes to 1
  and the previous result is repeated. This behaviour comes from the lab
  circuit and is kept.
- The first conversion after reset uses whatever the hold capacitor held,
  because the first `sample_hold` pulse comes after the first ramp.
- Each extra bit doubles the conversion time, since the ramp is 2^BITS steps
  long.

## The successive-approximation converter (`adc_sar`)

A step counter runs modulo BITS + 4 (10 for 6 bits). Here `dac` is a register
that carries out a binary search, MSB first. On each step one bit is *tried*
(set to 1). On the next step that bit is *decided*: it is replaced by `cmp`,
and the next bit is tried in the same clock.

| step | bit set to 1 (trial) | bit replaced by `cmp` (decision) | other |
|---|---|---|---|
| 0 | 5 | — | |
| 1 | 4 | 5 | |
| 2 | 3 | 4 | |
| 3 | 2 | 3 | |
| 4 | 1 | 2 | |
| 5 | 0 | 1 | |
| 6 | — | 0 | |
| 7 | | | `adc` ← `dac`, `dac` ← 0 |
| 8 | | | `conv_done` = 1 |
| 9 | | | `sample_hold` = 1 |

The table lists what is written on the clock edge that ends each step. For a
held sample of 13 LSB, the `dac` register reads 32, 16, 8, 12, 14, 13, 13
during steps 1 … 7, and then `adc` = 13. Trials 32 and 16 are too high and
are dropped. Trial 8 is kept, then 12 (8+4) and 13 (12+1) are kept, while
14 (12+2) is dropped. Adding a bit adds one clock to the conversion, where
the single-slope converter would need twice as many.

The steps are generic in `BITS`: trials on steps 0 … BITS−1, decisions on
1 … BITS, load and clear on BITS+1, done on BITS+2, sample on BITS+3.

## Waveform generators

- **`sawtooth_counter`**: a 6-bit counter played on the DAC. It rises 0 … 63
  and wraps, with a period of 64 clocks.
- **`triangle_counter`**: a 7-bit counter. While its top bit is 0, the low six
  bits go out unchanged. While it is 1, they are mirrored (63 − value). The
  period is 128 clocks, and the codes 0 and 63 each last two clocks. The
  folding rule is `wave_pkg::tri_fold`.
- **`phase_acc_synth`**: a 10-bit accumulator adds the 6-bit `freq` input
  (DIP switches in the lab) every clock. Its top 7 bits are folded into a
  triangle as above. The period is 1024 / `freq` clocks, so at a 68 kHz clock
  `freq` = 1 … 63 gives 66 Hz … 4.2 kHz. `freq` = 8 reproduces the plain
  triangle counter, and `freq` = 0 holds the output still.

## Flash converter (`flash_ladder`, `flash_encoder`)

`flash_ladder` models the resistor string and comparator bank. The string is
0.5 kΩ, six 1.0 kΩ and 0.5 kΩ between +10 V and ground. Each tap feeds a
comparator's + input, and Vin feeds every − input. A comparator output goes
low once Vin rises above its tap, so the outputs form an active-low
thermometer code.

`flash_encoder` is the priority encoder, synthesizable and generic in `BITS`.
Its inputs and outputs are active low, as on a 74F148:

- Input 0 is tied low, because the bottom code needs no comparator.
- The enable `ei_n` is tied low.
- `code_n` is the inverted index of the highest low input.

`lab12_top` inverts `code_n` back into `flash_code`. An N-bit flash needs
2^N − 1 comparators and a 2^N-input encoder. The default is 3 bits.
`BITS = 6` gives the 6-bit version (63 comparators, 64 encoder inputs), which
the encoder's testbench also exercises.

## Analog models

All of these are ideal, and none is synthesizable:

- **`r2r_dac`**: output 3.3 V × code / 2^BITS, which is what the 2K/1K ladder
  with a 2K termination and a unity-gain follower produces. The ladder
  schematic has input flip-flops, so by default (`REGISTERED = 1`) the output
  follows the code one clock later. The ADC loops use `REGISTERED = 0`, as
  when FPGA pins drive the ladder directly, so the DAC settles within the
  clock in which the controller presents the code. The display and generator
  DACs keep the register.
- **`sample_hold`**: an analog switch and capacitor (a DG403 in the lab). The
  output follows the input while `close` = 1 and holds it afterwards. It has
  no droop or charge injection.
- **`comparator`**: `out` = (vplus ≥ vminus). It models an open-collector part
  pulled up to the 3.3 V logic supply, with no offset or hysteresis.

The lab's 555 timer clock, the LED bar graph, the anti-aliasing filter and a
sine table or CORDIC option for the synthesizer are not modelled. `clk` and
the ADC outputs are ports of the top.

## Where this RTL departs from the lab circuit

- **Reset.** The lab relies on FPGA registers powering up at 0. Here every
  register has a synchronous, active-high `rst` that clears it to 0.
- **Parameters.** Widths are parameters with the lab's numbers as defaults:
  6-bit DACs and converters, 4 processing steps after each ramp or search,
  a 10-bit accumulator with a 6-bit increment, and a 3-bit flash.
- **Comparator sense.** Equality counts as "sample above DAC". The lab's
  comments describe `cmp` as "sample > DAC", but its own simulations use ≥;
  this design follows ≥.
- **Comparator count.** The flash converter uses 2^N − 1 comparators, as in
  its schematic. The lab's text counts 2^N.
- **74F148 pins.** The encoder's disabled behaviour (all outputs high) is an
  assumption. The 74F148's GS and EO pins are not modelled.
- **Structure.** Placing the lab's successive exercises in one top, each
  converter with its own analog input, is a choice of this design.
  `lab12_fpga` groups what goes into the FPGA: the generators and both ADC
  controllers.

## Files

Module hierarchy:

    lab12_top
    ├── lab12_fpga            synthesizable FPGA logic
    │   ├── sawtooth_counter ── dffe_nbit
    │   ├── triangle_counter ── dffe_nbit, wave_pkg
    │   ├── phase_acc_synth ─── dffe_nbit, wave_pkg
    │   ├── adc_ramp ────────── dffe_nbit
    │   └── adc_sar ─────────── dffe_nbit
    ├── r2r_dac ×7            (3 generator, 2 ramp, 2 display)
    ├── sample_hold ×2, comparator ×2
    ├── flash_ladder
    └── flash_encoder

Every RTL module `X` is in `rtl/X.sv`, and its testbench is in `tb/X_tb.sv`.
The exceptions are `lab12_fpga`, which `lab12_top_tb` covers, and the
package `wave_pkg`.
`dffe_nbit` is the enabled register all the counters and converters are built
from.

## Simulating

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl rtl/wave_pkg.sv \
        tb/lab12_top_tb.sv --top-module lab12_top_tb
    ./obj_dir/Vlab12_top_tb

Swap in another testbench name to run it. Everything finishes in well under a
second.

- **`lab12_top_tb`** runs the whole design at its default sizes for 4760
  clocks. The ADC inputs are sine waves with noise, and the flash input is
  random. Reference models predict every generator code and DAC voltage,
  every ramp and SAR result, the conversion spacing (68 and 10 clocks), the
  display DACs and the flash code. It also counts that each mechanism occurs:
  sawtooth wrap, triangle top and bottom, increment change, sample & hold
  with a moving input, full-scale clipping, zero code, SAR bits kept and
  dropped, and all 8 flash codes.
- **`notes_sequence_tb`** replays the lab's reference sequence. The held
  sample steps by 13 codes modulo 64 (0, 13, 26, 39, 52, 1, …) through both
  ADC loops for 66 conversions each. Conversion k must arrive at clock
  65 + 68k (single-slope) or 8 + 10k (SAR).
- **`aliasing_tb`** feeds both ADCs with sines at 0.1, 0.4, 0.6, 0.9, 1.1
  and 1.45 times their sample rate fs. From the number of mid-scale crossings
  in 200 samples it checks that the signal appears at the folded frequency
  |f − round(f/fs)·fs|. For example, 0.9 fs shows up as 0.1 fs.
- **`adc_scaling_tb`** runs both controllers at 4, 7 and 8 bits. It checks
  that a single-slope conversion takes 2^BITS + 4 clocks and a SAR conversion
  BITS + 4 clocks.
- **The unit testbenches** check each block against an independent model:
  - `adc_sar_tb` compares the DAC code on every search step with worked
    binary searches.
  - `r2r_dac_tb` solves the resistor ladder node by node.
  - `flash_encoder_tb` tries every input pattern of the 3-bit encoder and
    every thermometer code of a 6-bit one.
