# Two-channel sigma-delta audio ADC: digital decimator

A sigma-delta audio converter samples its analog input with a coarse
(1-bit) modulator running far above the audio rate and leaves the rest to
digital filters: they remove the modulator's shaped quantisation noise,
which sits mostly above the audio band, and lower the sample rate. This RTL
is that digital half for two channels. Each channel takes the 1-bit
modulator output at 6.144 MHz (128 x 48 kHz), decimates by 128 and delivers
18-bit words at 48 kHz. The two channels leave the chip as an I2S serial
stream. Test logic can feed the filters from an internal bit generator and
put any intermediate stage on the output.

The architecture follows a published design: a 4th-order comb that
decimates by 16, then three half-band FIR filters of 12, 22 and 116 taps,
each decimating by 2. The comb can be built in three different ways; all
three are here. The half-band coefficient values, the test-mode map, the
I2S framing and several word widths are this implementation's own choices.
They are listed under [Departures and own choices](#departures-and-own-choices).

## Signal chain

```
           128 fs          32 fs           16 fs          8 fs        4 fs        2 fs        fs
 1-bit ──> H1 comb ─↓4─> H2 (1+z^-1)^5 ─↓2─> H3 (1+z^-1)^7 ─↓2─> HBF1 ─↓2─> HBF2 ─↓2─> HBF3 ─↓2─> 18-bit ─> I2S
           13 taps         comb_filter (x16)                    12 taps     22 taps     116 taps
```

fs = 48 kHz, and MCLK = 128 fs = 6.144 MHz is the only clock. Per channel:

| stage | module | rate out | word out | clocks per output |
|---|---|---|---|---|
| H1, 4th-order comb, ↓4 | `comb4_rom` + `decim` | 32 fs | 10 bit, ±256 | 4 |
| H2, (1+z⁻¹)⁵, ↓2 | inside `comb_filter` | 16 fs | 15 bit, ±2¹³ | 8 |
| H3, (1+z⁻¹)⁷, ↓2 | inside `comb_filter` | 8 fs | 22 bit, ±2²⁰ | 16 |
| HBF1, 12 taps, ↓2 | `hbf_decim` (STAGE 1) | 4 fs | 24 bit | 32 |
| HBF2, 22 taps, ↓2 | `hbf_decim` (STAGE 2) | 2 fs | 24 bit | 64 |
| HBF3, 116 taps, ↓2 | `hbf_decim` (STAGE 3) | fs | 24 bit → 18 bit | 128 |

Rates appear as one-cycle `valid` strobes that travel with the data, not as
divided clocks. Every down-sampler counts the samples it has seen since
reset and keeps samples M−1, 2M−1, …. Because all stages share the same
reset, the decimation phase is fixed. This is also what makes the three comb
structures produce bit-identical words.

## The comb decimator

The comb is the only part that runs at the full 6.144 MHz, so it sets most
of the power. Its transfer function is

```
H(z) = ((1-z^-4)/(1-z^-1))^4 · ((1-z^-8)/(1-z^-4))^5 · ((1-z^-16)/(1-z^-8))^7
```

It is split into three factors, each followed by a down-sampler. After ↓4,
the second factor becomes (1+z⁻¹)⁵ at 32 fs. After a further ↓2, the third
becomes (1+z⁻¹)⁷ at 16 fs. The DC gain is 4⁴·2⁵·2⁷ = 2²⁰. The usual 1/2²⁰
normalisation is kept as a binary point: a stream of all ones gives exactly
+2²⁰ and all zeros gives −2²⁰. Bit 1 stands for +1 and bit 0 for −1.

**H1 without multipliers (`comb4_rom`).** (1+z⁻¹+z⁻²+z⁻³)⁴ has 13
coefficients, 1 4 10 20 31 40 44 40 31 20 10 4 1, and every input is ±1. The
last 13 bits sit in a shift register. The six bits x[n]..x[n−5] address a
64 × 8 ROM that holds every possible ±c₀ … ±c₅ partial sum. The coefficients
are symmetric about x[n−6], so the same table serves x[n−12]..x[n−7] when the
address bits are taken in mirrored order. A ±44 term for the centre tap and
two adders (8+8 → 9 bits, 9+9 → 10 bits) complete the output. The ROM
contents are computed at elaboration by `sdadc_pkg::comb_rom_word`. Reset
loads the pattern 1010…, whose filter output is 0.

**H2·H3 in three structures (`comb_filter`, parameter `COMB_ARCH`):**

1. `COMB_INTDIFF`, module `comb_intdiff`. Five integrators run at 32 fs,
   then ↓2, two more integrators at 16 fs, then ↓2, then seven
   differentiators at 8 fs. By the noble identities this equals
   (1+z⁻¹)⁵ followed by (1+z⁻¹)⁷. The integrators overflow on purpose. All
   stages are 32-bit two's complement, and the differentiators cancel the
   wrap-around exactly because the true result fits in 22 bits. Every stage
   must be at least as wide as the output for this to hold. A narrower first
   group (15 bits is the textbook minimum for a stand-alone 5-stage filter)
   would not cancel, and the testbench's fault case shows it.
2. `COMB_FIR`, module `binom_fir`. Direct-form FIRs with the binomial
   coefficients 1 5 10 10 5 1 and 1 7 21 35 35 21 7 1, using constant
   multipliers. There is no wrap-around, at the cost of the multipliers.
3. `COMB_CASCADE`, module `binom_cascade`. This is the default. It uses
   5 + 7 sections of y = x[n] + x[n−1]: one register and one adder each, with
   no multipliers and no integrators that can overflow.

Within one sample, each group of stages is an adder chain with no pipeline
registers. The latency from the clock edge that takes the 16th input bit to
`out_valid` is 4 cycles (FIR, cascade) or 5 cycles (integrator/differentiator).

## Half-band filters (`hbf_decim`)

Each filter computes only every second output, because the other half would
be discarded by the down-sampler. The structure is:

- **Front:** a shift register of the last N input samples, a ROM with the
  first half of the symmetric impulse response, and a pre-adder. The
  pre-adder forms x[n−i] + x[n−N+1+i], so each coefficient is used once per
  output.
- **`mac`:** one multiplier and accumulator. It is 32 × 24 with a 48-bit
  accumulator in HBF3, and 25 × 16 with a 42-bit accumulator in HBF1 and
  HBF2. It takes one coefficient pair per clock.
- **Output:** the sum is rounded (add half, shift right by CW−1) and
  saturated to 24 bits.

An output therefore takes ⌈N/2⌉ clocks: 6, 11 and 58. It appears ⌈N/2⌉+2
cycles after every second input. The clock budgets are 16, 32 and 64 cycles
between inputs, so the filters are idle most of the time. An assertion
(`ap_no_input_while_busy`) checks that no input ever arrives mid-computation.

Coefficients (in `sdadc_pkg`, first half only) are equiripple low-pass
designs. Their band edges sit symmetrically about a quarter of each filter's
input rate, and they are quantised to the stated coefficient width:

| filter | taps | input rate | passband | stopband | coeff. bits | stopband after quantisation |
|---|---|---|---|---|---|---|
| HBF1 | 12 | 384 kHz | 0–20 kHz | 172–192 kHz | 16 | −89 dB |
| HBF2 | 22 | 192 kHz | 0–20 kHz | 76–96 kHz | 16 | −93 dB |
| HBF3 | 116 | 96 kHz | 0–20.5 kHz | 27–48 kHz | 24 | −120 dB |

To change a filter, replace its table in `sdadc_pkg` and set `N_TAPS`/`CW`
at the instance in `adc_channel`. The tables hold ⌈N/2⌉ values.

### Short coefficients

The same filters can be built with 8-bit coefficients, a cheaper
alternative that trades rejection for smaller multipliers (25 × 8 and
32 × 8 instead of 25 × 16 and 32 × 24). Set `HBF1_CW`, `HBF2_CW` and
`HBF3_CW` on `sdadc_top` or `adc_channel` to 8. The function
`sdadc_pkg::hbf_coef_q` then rounds every stored coefficient to the nearest
multiple of 2^(stored width − 8), ties upwards, so no second table is kept.
The output scaling follows `CW` automatically. Measured through the whole
chain:

| | 16/16/24-bit | 8-bit |
|---|---|---|
| gain at 1 kHz | −0.001 dB | +0.23 dB |
| 30 kHz tone, aliased to 18 kHz | about −111 dBFS | −44.9 dBFS |
| HBF3 response at 30 kHz (computed) | −89.6 dB | −38.0 dB |

At 8 bits the stopband rejection of HBF3 collapses. Out-of-band signal
and modulator noise between 24 and 48 kHz then fold into the audio band.

Nothing compensates the comb's passband droop. At 18 kHz it is −0.20 dB
(|H| = 0.977), and the testbench checks the output against that figure.

## Number format and the output word

Between stages, samples are 24-bit integers with full scale 2²⁰. The
half-band filters have unity DC gain within a few parts in 10⁴. The 18-bit
output word is the 24-bit sample shifted right by 3 and saturated, so full
scale becomes 2¹⁷. An exact full-scale comb output (+2²⁰) saturates to
+131071.

## Output interface (`i2s_tx`, `clk_div`)

The I2S stream is produced as follows:

- `bclk` = MCLK/2 = 3.072 MHz, which gives 64 bit clocks per frame.
- `lrclk` = 48 kHz: low for the left word, high for the right.
- Each word is sent MSB first, starting one bit clock after the `lrclk`
  edge, in a 32-bit slot padded with zeros.
- `sdata` changes on the falling edge of `bclk`.

The pair of words is captured in the last MCLK cycle of a frame and sent
during the next one. The same pair is also available in parallel on
`pcm_l`/`pcm_r`, with a one-cycle `pcm_valid` per frame.

## Test logic (`test_ctrl`, `tv_gen`)

`test_mode[3:2]` chooses what feeds both channels' filters, and
`test_mode[1:0]` chooses what reaches the output. That gives 16 modes:

| `[3:2]` | input | `[1:0]` | observed stage |
|---|---|---|---|
| 0 | external modulators | 0 | HBF3 (normal output) |
| 1 | internal generator | 1 | comb output |
| 2 | constant +1 | 2 | HBF1 |
| 3 | constant −1 | 3 | HBF2 |

An observed stage that runs faster than fs is sampled at the frame rate.
The generator `tv_gen` is a first-order digital sigma-delta modulator of the
DC level `gen_level`. Its stream has mean `gen_level`/2¹⁵, so the expected
output is known exactly. For example, level 2¹⁴ gives the word 65536.

## Departures and own choices

- **Half-band coefficients:** the original gives only plots of the
  responses, so the coefficient values above are new designs with the
  original's tap counts and coefficient widths.
- **No zero coefficients:** a symmetric filter with an even tap count (12,
  22, 116) cannot have every other coefficient zero, as a true half-band
  filter does. These filters have no zero coefficients, so there is no
  half-band multiplier saving.
- **HBF1 and HBF2 structure:** they reuse the serial multiply-accumulate
  structure that the original shows only for HBF3.
- **Single clock:** the original draws divided clocks (1.536 MHz, 768 kHz,
  384 kHz). Here everything runs on MCLK with clock enables.
- **Integrator width:** the integrator/differentiator comb uses 32 bits in
  every stage. The original gives 15 bits as the first integrators' minimum
  word length.
- **Binomial FIR taps:** the FIR comb filters have 6 and 8 taps (orders 5
  and 7). The block diagram labels them "5 tap" and "7 tap".
- **Own choices where the original is silent:** the test-mode assignment,
  the generator's function, the I2S slot format, the 24-bit inter-stage
  word, rounding and saturation, the decimation phase, the reset values and
  the meaning of bit 1 = +1.
- **8-bit coefficients:** the original also studied 8-bit coefficient
  versions of the filters, for comparison, without giving their values. The
  8-bit versions here are the 16/24-bit tables rounded to 8 bits.
- **Outside the RTL:** the analog third-order modulators are external and
  not part of this RTL. Neither is anything physical: pads, clock tree or
  layout.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The expected
values come from `tb/ref_pkg.sv`: plain convolutions of whole recorded
sequences with the filter equations, independent of the hardware
structures.

| testbench | what it checks |
|---|---|
| `tb_comb4_rom` | every output against the 13-tap equation; latency 1; full scale |
| `tb_decim` | kept sample indices and values, ↓4 and ↓2 |
| `tb_comb_intdiff` | wrap-around under full-scale input; every output exact; latency |
| `tb_binom_fir`, `tb_binom_cascade` | K = 5 and 7 against direct convolution |
| `tb_comb_filter` | all three structures side by side, bit-exact to the reference; ±full scale; latency |
| `tb_hbf1`, `tb_hbf2`, `tb_hbf3` | each filter built with full-width and with 8-bit coefficients: every output exact (via `tb_hbf_common`, which rounds the taps itself for 8 bits); latency ⌈N/2⌉+2; DC gain |
| `tb_mac` | random and extreme operands, clear, enable |
| `tb_clk_div`, `tb_i2s_tx` | clock ratios; an I2S receiver decodes every word |
| `tb_tv_gen`, `tb_test_ctrl` | exact ones density; all 16 muxing modes and saturation |
| `tb_adc_channel` | every output of all four stages of a channel fed by a modulator model; output periods 16/32/64/128 clocks |
| `tb_sdadc_top` | whole design at default parameters (details below) |
| `tb_tone_response` | frequency response of the whole chain (results below) |
| `tb_coef_width` | full-width against 8-bit coefficients: passband gain and 30 kHz leak, each against the response computed from the rounded taps |

`tb_sdadc_top` feeds two sines through the modulator model. The I2S words
must match the reference chain exactly. It then steps through all 16 test
modes with settled expectations, and it counts that every mechanism was
used: decimation stages, saturation, generator, every input source and
observation point, and the mode switches.

`tb_tone_response` measured these results:

- 1 kHz at half scale: 0.49993.
- 18 kHz at half scale: 0.48863, against a droop-predicted 0.48852.
- 30 kHz tone: the output stays below −86 dBFS peak.
- 60 kHz tone: the output stays below −90 dBFS peak.

The modulator model (`tb/sdm_model.sv`) is a behavioural second-order loop,
not the third-order analog modulator the design expects. Its noise floor,
not the filters, limits the rejection figures.

## Simulating

Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sdadc_pkg.sv tb/ref_pkg.sv tb/tb_sdadc_top.sv --top-module tb_sdadc_top
./obj_dir/Vtb_sdadc_top
```

Replace the testbench name to run any other test. `tb_tone_response` and
`tb_coef_width` do not need `tb/ref_pkg.sv`. The full-size top-level test takes a few seconds.

Synthesis (yosys) of the top gives about 700 flip-flops of control and
output state. The half-band delay lines map to about 15 kbit of memory for
the two channels. The delay lines are shift registers in the RTL; a RAM
with a circular address would be the natural change for a real
implementation.
