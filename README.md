# Digital pass-through with non-uniform-sampling noise injection

A testbed for closed-loop power control in CDMA must be able to reach into
the radio channel between a base station and a phone: pass traffic
untouched, or damage it in a controlled way and watch how the power-control
loop reacts. This design is the digital core of such a testbed. Each link
(forward: base station to phone; reverse: phone to base station) is brought
down by an RF front end to a 10 MHz wide intermediate-frequency signal with
separate I and Q components. Those are sampled by 14-bit ADCs, passed through
an FPGA, and regenerated by 14-bit DACs toward the other side. Inside the
FPGA every sample can be sent through unchanged, so that the testbed looks
like a piece of cable. It can also be sent through a **non-uniform sampler**,
which adds noise by taking each output word from a randomly chosen point of
a short history of the signal.

The RTL here covers the FPGA part: the four sample lanes, the noise
injectors with their PN generators, interpolation and rate conversion, and
the status displays. The converters, the RF modulators and demodulators,
the oscillators and the PLL are outside it.

## Lanes and rates

```
  cell ADC I --[link_channel]--> base DAC I      reverse link
  cell ADC Q --[link_channel]--> base DAC Q
  base ADC I --[link_channel]--> cell DAC I      forward link
  base ADC Q --[link_channel]--> cell DAC Q
```

Everything runs on one processing clock `clk`, 250 MHz in the intended
build. `access_top` derives two strobes from it:

| strobe       | period (clocks) | rate at 250 MHz | meaning                                |
|--------------|-----------------|-----------------|----------------------------------------|
| `adc_clk_en` | `ADC_DIV` = 4   | 62.5 Msps       | ADC sampling instant; inputs taken now |
| `dac_wr_en`  | `DAC_DIV` = 2   | 125 MHz         | new word on every DAC output           |

A board would run the ADC and DAC clocks from a PLL phase-locked to `clk`.
Here the rates are clock enables, so the whole design is one clock domain.

Samples are 14-bit two's complement. In pass-through (`sw[3]` low) a lane
registers the ADC word and the DAC shows it 2–3 clocks later.

## The noise injectors

With `sw[3]` high, `nus_mode` picks one of three injectors. All four lanes
use the same setting. Each injector is a shift register of past samples plus
a multiplexer. Its select comes from a maximal-length PN generator that
advances every clock. Output words therefore come from slightly wrong
instants in time: this is sampling-time jitter, which shows up as a raised
noise floor.

### PN generators (`pn_generator`)

These are Fibonacci LFSRs of order 3 to 10. The state is a chain a→b→…→last.
On every step, stage a takes the XOR of the last stage and the middle taps
of the polynomial. The polynomials, with their periods (2ⁿ−1):

| order | polynomial              | period |
|-------|-------------------------|--------|
| 3     | x³+x+1                  | 7      |
| 4     | x⁴+x+1                  | 15     |
| 5     | x⁵+x²+1                 | 31     |
| 6     | x⁶+x+1                  | 63     |
| 7     | x⁷+x+1                  | 127    |
| 8     | x⁸+x⁴+x³+x²+1           | 255    |
| 9     | x⁹+x⁴+1                 | 511    |
| 10    | x¹⁰+x³+1                | 1023   |

The tap masks live in `access_pkg::pn_taps`. A middle term xᵏ of an order-n
polynomial taps stage n−k. Reset loads 1 into the last stage. The whole
state word, never zero, is the random number. Each lane holds all eight
generators.

### 6-register sampler (`nus_mode = MODE_BUFF6`, `jitter_buff6`)

Six registers a…f shift once per ADC sample. The output is one of seven
sources: the incoming sample `din`, or a…f. The 6th-order PN value (1…63)
picks the source through a fixed 64-entry table, so the table sets how often
each source is used. `dist_sel` chooses between four tables:

| `dist_sel`    | din | a | b  | c  | d  | e | f |
|---------------|-----|---|----|----|----|---|---|
| `DIST_NORMAL` | 4   | 5 | 10 | 26 | 10 | 5 | 4 |
| `DIST_TIGHT`  | 2   | 4 | 10 | 32 | 10 | 4 | 2 |
| `DIST_EVEN`   | 9   | 9 | 9  | 10 | 9  | 9 | 9 |
| `DIST_SINGLE` | 0   | 0 | 0  | 64 | 0  | 0 | 0 |

The numbers are how many of the 64 table entries map to each source. Entry 0
is never reached, because the PN state is never zero. The PN runs at the full
clock, so one ADC sample is read about four times from differently delayed
registers. `DIST_SINGLE` is a fixed delay of three samples, with no noise. It
is the reference case.

### Multi-PN sampler (`MODE_MULTIPN`, `jitter_multi_pn`)

This injector works on a finer time grid. `sinc_interp` stuffs three zeros
after each ADC sample (×4 upsampling to the clock rate) and smooths the
result with a 15-tap windowed-sinc FIR:

    h[n] = round(4096 · sinc(n/4) · (1 + cos(πn/8)) / 2),   n = −7 … 7
         = −20 −127 −228 0 850 2226 3547 4096 3547 2226 850 0 −228 −127 −20

The output is a 32-bit Q12 word. Each of the four polyphase branches has a
DC gain within 2.5 % of 1. The filter adds 8 clocks of delay.

Three registers a, b, c hold the interpolated stream and shift every clock.
PN value 1 picks a, 2 picks c, and every other value picks b. The PN order
is 3 + `pn_order_sel`, so the outer registers are used 2 out of 2ⁿ−1
clocks. Longer PN sequences give rarer jumps that are spread over a longer
period. The chosen word is shifted right by 12 and saturated to 14 bits.

### Uniform sampler (`MODE_UNIFORM`, `jitter_uniform`)

A 25-register chain a…y holds raw ADC samples and shifts once per sample,
with a the newest. The 9th-order PN value (1…511) advances every clock. It
is divided into nearly equal ranges over the first 3, 5, 13 or 25 registers,
as set by `sw[1:0]`. The output is therefore the sample 0 to n−1 places back,
chosen uniformly and redrawn every clock. The range tables:

| window | ranges of PN values                                           |
|--------|---------------------------------------------------------------|
| 3      | 1–170 a, 171–341 c, 342–511 b                                  |
| 5      | 1–102 a, 103–204 b, 205–307 c, 308–409 d, 410–511 e            |
| 13     | a…m in order, upper bounds 39 78 117 156 196 236 275 315 355 394 433 472 511 |
| 25     | 1–231 h…r (21 each), 232–371 a…g, 372–511 s…y (20 each)        |

At 62.5 Msps a 10 MHz tone has 6.25 samples per period. Three registers
then hold about half a period, five just under one period, and 25 exactly
four periods.

### Back to the DAC rate

The selected word is registered and passed to `downsample`, which keeps one
clock in `DAC_DIV`. That gives 125 MHz for the DACs. The lane's `tap` output
reports which register produced the current DAC word (31 in pass-through).
It exists only for observation and tests.

## How much noise the samplers add

A window of n registers one sample apart, with the register drawn
uniformly, turns a tone A·sin(θs) into an output whose noise power is

    N = (A²/2) · (1 − |c|²),   c = (1/n) · Σ_{k<n} e^(−jθk),   θ = 2π·f/fs

Here |c| is the fraction of the tone that survives coherently. For
f = 10 MHz and fs = 62.5 MHz, simulating the full design gives these
results (`tb_noise_levels`):

| window | tone power left | noise power, relative to A²/2 |
|--------|-----------------|-------------------------------|
| 3      | 48 %            | −2.81 dB                      |
| 5      | 6 %             | −0.27 dB                      |
| 13     | 0.2 %           | −0.01 dB                      |
| 25     | ≈ 0             | 0 dB (the tone is gone)       |

The measurements agree with the formula to within 0.1 %. The noise rises by
2.5 dB from 3 to 5 registers. A small-jitter estimate uses the variance of
the sampling offset (2/3 against 2 sample², a factor of 3, or 4.8 dB). That
estimate only holds when θ·n is small, and at 10 MHz with whole-sample
spacing it is not.

The same formula covers the 6-register sampler, with weights w_k taken from
its distribution table. k = 0 is the incoming sample, and the weights are
counted over the 63 PN values that occur:

| distribution | tone power left | noise power, relative to A²/2 |
|--------------|-----------------|-------------------------------|
| normal       | 16.4 %          | −0.78 dB                      |
| tight        | 33.3 %          | −1.76 dB                      |
| even         | 0.6 %           | −0.03 dB                      |
| single       | 100 %           | none (a fixed delay)          |

With a 10 MHz tone, all three random tables already spread the output over
most of a signal period. The differences between them are therefore
within 2 dB.

The multi-PN sampler uses its outer registers, one 250 MHz clock away from
the middle, once each per PN period. Its noise therefore halves with each
step in PN order:

| PN order          | 3     | 4     | 5     | 6     | 7     | 8     | 9     | 10    |
|-------------------|-------|-------|-------|-------|-------|-------|-------|-------|
| noise below tone  | 18.4 dB | 21.7 dB | 24.9 dB | 28.0 dB | 31.0 dB | 34.1 dB | 37.1 dB | 40.1 dB |

These figures are about 1 dB lower than the small-offset estimate, because
the 15-tap filter is not an ideal fractional delay at 10 MHz.
Neighbouring interpolated values therefore differ a little less than a
perfect 4 ns step would.

These figures are total noise power. On a spectrum analyser, the short PN
sequences put their noise into a few strong lines spaced 250 MHz / (2ⁿ−1)
apart, and leave the floor between the lines low. The long sequences spread
a smaller total into a denser set of lines. Comparing the floors can
therefore show the opposite trend to this table.

## Status outputs

- `ledr` and `ledb` show, from bit 7 down: the external 10 MHz reference,
  three constant-on bits, the PLL lock flag (bit 3), one more on bit, then
  the inverted out-of-range flags of ADC channel A (`ledr`) or B (`ledb`)
  for the base (bit 1) and cell (bit 0) boards.
- `ledg[7]` is the inverted ADC strobe.
- `hex1` (base) and `hex0` (cell) show the digit `{otr_a,0,0,otr_b}`. The
  seven segments are active low; bit 0 is segment a. The decimal points are
  held off.
- `dac_mode` is held at 1 (dual-port DAC mode).

## Files

| file                   | contents                                                |
|------------------------|---------------------------------------------------------|
| `rtl/access_pkg.sv`    | widths, mode/distribution/window enums, PN tap masks    |
| `rtl/access_top.sv`    | top: strobes, four lanes, LEDs, displays                |
| `rtl/link_channel.sv`  | one lane: pass-through plus the three injectors         |
| `rtl/pn_generator.sv`  | LFSR of order 3..10                                     |
| `rtl/jitter_buff6.sv`  | 6-register sampler with four distribution tables        |
| `rtl/jitter_multi_pn.sv` | 3-register sampler                                    |
| `rtl/jitter_uniform.sv`| 25-register sampler with 3/5/13/25 windows              |
| `rtl/sinc_interp.sv`   | ×4 zero-stuffing and windowed-sinc FIR                  |
| `rtl/downsample.sv`    | keep one sample in LENGTH, with a valid strobe          |
| `rtl/seg7_decode.sv`   | hex digit to active-low seven-segment pattern           |
| `tb/tb_<module>.sv`    | self-checking testbench for each module                 |
| `tb/tb_noise_levels.sv`| noise power of each injector setting, full design      |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Each has a watchdog that fails the run if it hangs. For example,
with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/access_pkg.sv tb/tb_access_top.sv --top-module tb_access_top
./obj_dir/Vtb_access_top
```

Replace `tb_access_top` with `tb_<module>` for any module's bench, or with
`tb_noise_levels`.

What the benches check:

- **`tb_access_top`**: the full design at its default parameters, end to
  end. Four distinct input signals (a tone and three DC levels) catch swapped
  lanes. It checks that pass-through is bit-exact and that the ADC and DAC
  strobes come every 4th and every 2nd clock. It runs every injector setting
  (4 distributions, 8 PN orders, 4 windows), then pass-through again, then
  the out-of-range displays. It counts how often each mechanism acted
  (register jumps per setting) and fails any that never did. About 78 000
  checks.
- **`tb_link_channel`**: compares every DAC word with an independent model of
  the lane (real-valued sinc formula, own shift chains) and checks the
  register statistics of each mode.
- **`tb_pn_generator`**: for every order, checks the output bits against the
  polynomial's recurrence, the period, and that all non-zero states are
  visited.
- **`tb_noise_levels`**: measures the noise of each uniform window, each
  6-register distribution and each multi-PN order on a 10 MHz tone, at the
  default parameters.
  Each setting is measured over whole joint periods of PN and tone, so the
  averages are exact. It compares the result with the formula above, to
  within 2 %. For multi-PN it checks that the noise halves from one order
  to the next.
- **Per-sampler benches**: check every PN value against tables rebuilt
  independently, including the register counts of the distribution table
  above.

## Choices and departures

- **One build, run-time selection.** The injectors are meant to be tried one
  at a time. Here all of them sit in every lane behind `nus_mode`, and they
  share one set of PN generators. Area is roughly four times what a
  single-injector build needs.
- **I and Q treated alike.** Both components of both links get the same
  processing. An original build that injects noise only on I would leave Q
  unassigned.
- **6-register sampler rates.** This injector uses a 6th-order PN, since its
  tables have 64 entries. The PN runs at the processing clock (250 MHz). The
  output goes out at the 125 MHz DAC rate like the other modes. Earlier
  experiments with this injector ran its PN at 125 or 200 MHz, with output at
  62.5 MHz.
- **13-register window.** Its ranges are 39 or 40 PN values each; register
  e covers 157–196.
- **Uniform windows share one chain.** The 3/5/13/25-register windows are
  the first 3/5/13/25 registers of one 25-register chain. This behaves
  exactly like four separate chains.
- **Uniform sampler on raw samples.** The later experiments are described
  as working on the ×4 interpolated stream at 250 MHz. The same description
  also says that 3 registers held about half a period of the 10 MHz tone
  and 25 registers four periods, which needs one whole ADC sample per
  register. The uniform sampler here follows the second description. With
  registers one 250 MHz clock apart, the 3→5 noise step would be about
  4.7 dB instead of 2.5 dB, and 25 registers would hold one period.
- **Interpolation filter.** Its length and window are this design's choice;
  only "×4 zero-padding followed by a sinc filter" is given. Output scaling
  back to 14 bits (Q12, saturating) is also a choice.
- **Reset.** An asynchronous active-low `rst_n` clears all registers and
  seeds the PN generators with 1.
- **Seven-segment decoder.** It uses standard hexadecimal shapes, active low.

Not part of the RTL: the PLL, the I/O-voltage setup of the board, the ADCs and
DACs, the I/Q modulators and demodulators, the bias-T board, the oscillators,
the amplifier and the RF splitters and combiners. Their signals appear as top
ports: ADC words and out-of-range flags in, DAC words and strobes out, PLL
lock and reference in.
