# Two-channel sigma-delta audio ADC/DAC digital block

This is the digital half of a stereo oversampling audio codec, written in SystemVerilog.

- **ADC side.** It takes the 1-bit streams of two analog sigma-delta modulators at
  128·fs (6.144 MHz for fs = 48 kHz). A chain of decimation filters turns them into
  48 kHz samples. These come out in parallel and on a serial audio bus (I²S,
  left-justified or right-justified; 16, 20 or 24 bits).
- **DAC side.** It receives 48 kHz serial audio, either from an external source or looped
  back from its own ADC. Three half-band filters, which share one multiplier, and a 16×
  hold raise the rate to 128·fs.
  A fifth-order digital sigma-delta modulator per channel then reduces each sample to a
  single bit or to a 4-bit code, with the quantisation noise pushed out of the audio band.

The architecture follows the block diagram of a published 0.35 µm design: S.-B. Park,
Y. D. Lee, K. Watanabe, *The Implementation of Sigma-Delta ADC/DAC Digital Block*,
IJIBC 13-2. That description gives the filter orders, tap counts, multiplier sizes, rates,
modulator structure and interface modes. It gives no filter coefficients, no modulator
coefficients, no clocking scheme and no number formats. Those parts are this design's own.
The section "Relation to the published design" lists each of them.

```
ADC, per channel (both channels share each half-band engine)
 bit @128fs ─► comb4_dec4 ─► noaccum_dec2(5) ─► noaccum_dec2(7) ─► hbf_dec ─► hbf_dec ─► hbf_dec ─► serout_ad ─► bclk/lrclk/sdata
               ↓4, 32fs      ↓2, 16fs           ↓2, 8fs            12 taps    22 taps    116 taps
                                                                   ↓2, 4fs    ↓2, 2fs    ↓2, fs        ─► adc_l/adc_r (parallel)
DAC
 ext / ADC serial ─► mux_sel ─► interface_in ─► (fs tick) ─► hbf_int ─► hbf_int ─► hbf_int ─► hold16 ─► dsm5_cifb ×2 ─► 1 bit / 4 bit
                                 48 kHz, 32 bit               116 taps   22 taps    12 taps    ×16
                                                              ×2, 2fs    ×2, 4fs    ×2, 8fs    128fs
                                                              └──── dac_interp: one shared 32×24 multiplier ────┘
```

## Clock and rate plan

Everything runs on one master clock, `clk` = 512·fs (24.576 MHz at 48 kHz). Nothing in
the design needs a second clock domain:

| point in the chain                | rate    | master clocks per sample |
|-----------------------------------|---------|--------------------------|
| modulator bits, comb input, DSM   | 128·fs  | 4 (clock enable `ce128`) |
| comb output                       | 32·fs   | 16                       |
| after (1+z⁻¹)⁵ and ↓2             | 16·fs   | 32                       |
| after (1+z⁻¹)⁷ and ↓2             | 8·fs    | 64                       |
| after ADC HBF 1 / 2 / 3           | 4·fs / 2·fs / fs | 128 / 256 / 512 |
| DAC serial frame                  | fs      | 512 (bclk = 64·fs = clk/8) |
| after DAC HBF 1 / 2 / 3           | 2·fs / 4·fs / 8·fs | 256 / 128 / 64 |

The master clock is 512·fs rather than 128·fs for one reason: the half-band filters
multiply serially. Each ADC half-band filter has a single multiplier, shared by both
channels and all taps. The three DAC stages share one multiplier among them. The work
must fit between two input samples:

| filter           | MACs per output pair | clocks available |
|------------------|----------------------|------------------|
| ADC HBF 1 (12 taps)  | 2·12 = 24         | 64 between inputs  |
| ADC HBF 2 (22 taps)  | 2·22 = 44         | 128                |
| ADC HBF 3 (116 taps) | 2·116 = 232       | 256                |
| DAC stage 1 (116 taps) | 2·(58+58) = 232 per input | 512  |
| DAC stage 2 (22 taps)  | 44 per input      | 256                |
| DAC stage 3 (12 taps)  | 24 per input      | 128                |
| all DAC stages on one multiplier | 232 + 2·44 + 4·24 = 416 per fs | 512 |

At 128·fs the 116-tap stage would get 64 clocks for 232 products. The shared DAC
multiplier is busy 81 % of the time.

The ADC chain is data-driven: every stage starts on the `valid` pulse of the stage before
it. The DAC chain is driven by a local fs tick from a frame counter in the top, because:

- The serial receiver finishes a frame at a point that depends on the format and word
  length.
- The interpolators must get exactly periodic inputs so that their two output phases are
  evenly spaced.

The top keeps the latest received pair and hands it to the first interpolator on each
tick. An external serial source must therefore run at fs = clk/512. A source at a
different rate still works, but samples are repeated or dropped.

## ADC decimation: comb and "no-accumulator" sections

The 16× front decimation filter is

    H(z) = ((1−z⁻⁴)/(1−z⁻¹))⁴ · ((1−z⁻⁸)/(1−z⁻⁴))⁵ · ((1−z⁻¹⁶)/(1−z⁻⁸))⁷

It is split so that each factor runs at the lowest possible rate:

1. **`comb4_dec4`: the first factor, a 4th-order CIC with R = 4.** It has four wrapping
   integrators at 128·fs, a ↓4 sampler and four combs at 32·fs. The input bit counts as
   +1 or −1, and the gain is 4⁴ = 256. This gives a 10-bit output in −256…256.
2. **`noaccum_dec2` with ORDER = 5.** At 32·fs, (1−z⁻⁸)/(1−z⁻⁴) = 1+z⁻⁴ becomes 1+z⁻¹.
   This block is five cascaded (1+z⁻¹) sections, each one register and one adder, then ↓2.
   The gain is 32, giving 15 bits.
3. **`noaccum_dec2` with ORDER = 7.** The same at 16·fs with seven sections, then ↓2 to
   8·fs. The gain is 128, giving 22 bits with full scale ±2²⁰. This is the 22-bit operand
   of the first half-band multiplier.

**Response of the whole chain.** A test sends sine tones of 0.5 of full scale through a
behavioural modulator and the full design. It compares the 48 kHz output with the
response predicted from the filter formulas and coefficients:

| input tone | appears at | measured | predicted |
|------------|------------|----------|-----------|
| 984 Hz     | 984 Hz     | −0.009 dB | −0.010 dB |
| 20.0 kHz   | 20.0 kHz   | −0.269 dB | −0.268 dB |
| 28.1 kHz   | 19.9 kHz (alias) | −60.3 dB | −60.3 dB |
| 47.0 kHz   | 984 Hz (alias)   | −103.5 dB | −103.5 dB |

The droop at 20 kHz comes mostly from the comb and binomial sections. Alias rejection just
above fs/2 is about 60 dB. It is set by the 116-tap last stage, whose coefficients are this
design's own. Longer or optimised coefficient sets drop in through `hb_coef_table`.

## Half-band filters (`hbf_dec`, `hbf_int`, `sdm_pkg::hb_coef_table`)

Each half-band stage is one engine with three parts:

- **Front:** a circular sample buffer per channel and the tap counter.
- **Multiplier:** one per ADC stage; the three DAC stages share one (see below).
- **Accumulator:** with round-half-up and saturation.

It performs one multiply-accumulate per clock (per granted clock in the DAC), left channel
first, then right.

**Decimators (`hbf_dec`).** Every input pair is stored; after every second one the engine
computes y = Σₖ cₖ·x[n−k] for both channels and pulses `out_valid` after 2·NTAPS+1
clocks. The three ADC instances are:

| stage | taps | data × coef | accumulator shift | output |
|-------|------|-------------|-------------------|--------|
| HBF 1 | 12   | 22 × 16     | 5                 | 32 bit, full scale 2³⁰ |
| HBF 2 | 22   | 32 × 16     | 15                | 32 bit, full scale 2³⁰ |
| HBF 3 | 116  | 32 × 24     | 23                | 32 bit, full scale 2³⁰ |

**Interpolators (`hbf_int`).** These work in polyphase form, so the stuffed zeros cost no
products:

    y[2m+p] = 2 · Σⱼ c₂ⱼ₊ₚ · x[m−j]     for p = 0, 1

The factor 2 restores the gain lost to zero stuffing. All data is 32 bits wide and all
coefficients are 24 bits. The stages run in the order 116, 22, 12 taps, so the long,
sharp filter works at the lowest rate.

**Sharing one multiplier among the DAC stages (`dac_interp`).** An `hbf_int` stage owns its
sample buffers, coefficient table and accumulator, but not a multiplier. It borrows one
through a small port:

- `mul_req`: the stage has a product to form;
- `mul_a`, `mul_b`: the sample and the coefficient for it;
- `mul_gnt`: the stage may use the multiplier in this clock;
- `mul_p`: the product, which the stage adds to its accumulator only when granted.

`dac_interp` holds the three stages, the single 32×24 multiplier and a fixed-priority
arbiter. The stage with the shortest input period wins: stage 3 (input every 128 clocks),
then stage 2 (256), then stage 1 (512). Stage 1 is therefore held off whenever a later
stage has work, and finishes its 232 products in the gaps.

Because a stage's finishing time depends on the arbitration, a stage does not present a
result when it finishes. Each stage has two fixed output slots, measured from its input:

- phase 0 at OUT_DELAY = IN_PERIOD/2 − 8 clocks (248, 120 and 56 clocks for the three stages);
- phase 1 at OUT_DELAY + IN_PERIOD/2.

Results wait in registers until their slot. So every stage's output, and the 8·fs stream
into the hold, is strictly periodic, whatever the arbiter did. From the fs tick to the
first 8·fs output is 248 + 120 + 56 + 3 = 427 clocks.

The schedule depends only on the fs tick, not on the data, so it repeats exactly in every
frame. Assertions in `hbf_int` check that:

- each result is ready before its slot;
- no input arrives while a stage is still busy;
- a grant comes only with a request.

The two whole-design tests together run about 3,000 frames without tripping them. If
you change tap counts or `CE_DIV`, the assertions show whether the schedule still fits.

**Coefficients** are computed at elaboration time by a constant function. No table file is
involved. They form a Hamming-windowed sinc low-pass with its cutoff at a quarter of the
filter's input rate (the half-band point), normalised to a DC gain of 1 and rounded to
CW−1 fraction bits:

    tₖ = k − (N−1)/2
    hₖ = sin(π·tₖ/2)/(π·tₖ) · (0.54 − 0.46·cos(2πk/(N−1)))
    cₖ = round(hₖ / Σh · 2^(CW−1))

The tap counts are even (12, 22, 116), so the filters are linear-phase but have no exactly
zero taps. Every tap is multiplied, and the cycle budgets above include every tap.

## Serial audio (`serout_ad`, `interface_in`, `mux_sel`)

Each frame has 64 bit clocks, two 32-bit slots. `lrclk` and `sdata` change after the
falling edge of `bclk` and are sampled on the rising edge.

| format | left slot when | MSB position in slot |
|--------|----------------|----------------------|
| I²S (`fmt`=0) | lrclk low  | bit 1 (one bclk after the lrclk edge) |
| LJ (`fmt`=1)  | lrclk high | bit 0 |
| RJ (`fmt`=2)  | lrclk high | bit 32−W (the LSB is the last bit of the slot) |

The word length W is 16, 20 or 24 (`wlen` = 0, 1, 2). Unused bits are sent as 0.

**Transmitter (`serout_ad`).** It generates `bclk` = clk/8 and `lrclk` = fs itself. It
sends bits [30 −: W] of the 32-bit ADC result, so the ADC's full scale equals serial full
scale. A result beyond that, which only filter overshoot can produce, is clipped. A new
frame always carries the pair that was complete when the frame began. `fmt` and `wlen`
are sampled at the frame start.

**Receiver (`interface_in`).**
- The three lines pass through two-flop synchronisers. Each bclk phase must last at least
  two master clocks.
- A change of `lrclk` starts a slot. For LJ and I²S the word is taken once its last bit
  has arrived. For RJ it is taken from the last W bits when the next slot starts.
- After reset nothing is taken until the first lrclk edge.
- The output has the W-bit word sign-extended, with its MSB on bit 30 of a 32-bit word.
  Serial full scale is 2³⁰, which leaves one bit of headroom for interpolation overshoot.

**Source select (`mux_sel`).** This is a plain 2:1 select of the three bus lines. Set
`dac_src_sel` = 0 to loop the ADC's own bus into the DAC, or 1 to take the `ext_*` pins.

## The fifth-order CIFB modulator (`dsm5_cifb`)

This is the most involved block. It is a chain of five delaying integrators 1/(z−1),
updated once per 128·fs tick:

- The input x reaches every integrator through b₁…b₅, and the quantiser through b₆.
- The output y is fed back into every integrator through −a₁…−a₅.
- Two local feedbacks form resonators that put two pairs of noise-transfer zeros inside
  the band: −g₁ from integrator 3 into integrator 2, and −g₂ from integrator 5 into
  integrator 4.

The updates are:

    s1 += b1·x − a1·y
    s2 += s1 + b2·x − a2·y − g1·s3
    s3 += s2 + b3·x − a3·y
    s4 += s3 + b4·x − a4·y − g2·s5
    s5 += s4 + b5·x − a5·y
    v   = s5 + b6·x ;  y = Q(v)          (all right-hand sides use the old state)

The design chooses bᵢ = aᵢ (i ≤ 5) and b₆ = 1. This makes the signal transfer function
exactly 1, and every integrator input becomes aᵢ·(x − y). With a single-bit quantiser,
y = ±1, so the feedback amounts to adding or subtracting a scaled constant.

**Coefficients** are parameters in Q1.15. Their defaults come from the following
derivation:

1. Take a 5th-order noise transfer function for OSR = 128 with a maximum out-of-band gain
   of 1.5 (Lee's rule).
2. Place its zeros at DC and at 0.539 and 0.906 of the 24 kHz band edge (the optimal
   spread for order 5).
3. Place its poles as a maximally flat high-pass, scaled until the gain limit is met.
4. Solve the loop filter 1 − 1/NTF for a₁…a₅, with gᵢ = 2(1 − cos ωᵢ).

| a₁ | a₂ | a₃ | a₄ | a₅ | g₁ | g₂ |
|----|----|----|----|----|----|----|
| 22 | 333 | 2420 | 10346 | 26456 | 6 | 16 |
| 0.00066 | 0.0102 | 0.0738 | 0.316 | 0.807 | 0.00017 | 0.00049 |

**Number format.**
- Only the 24 MSBs of the 32-bit input are used, with 2²³ = 1.0.
- The states keep full products (2³⁸ per unit) in 48 bits. They saturate instead of
  wrapping, so an overloaded loop recovers after the overload ends instead of oscillating.
- In single-bit mode the loop is stable up to about 0.6 of full scale in a floating-point
  model. The serial-to-DSM scaling (serial full scale = 0.5 here) keeps every legal input
  inside that range.

**Quantiser.**
- `multibit` = 0: y = ±1. `y_bit` carries the bit, and `y_code` is 15 or 0.
- `multibit` = 1: 16 uniform levels y = (2k−15)/16, with k on `y_code` and its MSB on
  `y_bit`. The same coefficients are used. The loop has been simulated stable with sine
  inputs up to 0.8 of full scale.

**Measured noise shaping.** With a −6 dBFS sine (0.5 of full scale, the largest level the
serial input produces), the RTL gives an in-band SNR of 139.9 dB with the single-bit
quantiser and 140.3 dB with the 4-bit one. The audio band is 1/128 of the output Nyquist
band. The measurement uses a 16384-point Hann-windowed DFT. A floating-point model of the
same loop gives 139.8 dB. The gain in the audio band is 1.000.

## Signal levels end to end

- A modulator bit density d (−1…1) gives an ADC result of d·2³⁰.
- That value appears at full scale d on the serial bus.
- The receiver and the interpolators keep it at d·2³⁰.
- The DSM reads d·2³⁰ as d/2 of its own full scale.

So in loopback the DAC output density is half the ADC input density (−6 dB).

## Top level (`sdm_codec_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | 512·fs master clock, asynchronous active-low reset |
| fmt, wlen | in | 2, 2 | serial format and word length for both serial ports |
| dac_src_sel | in | 1 | 0: DAC plays the ADC (loopback), 1: external input |
| multibit | in | 1 | DSM quantiser: 0 single bit, 1 four bit |
| adc_bit_l, adc_bit_r | in | 1 | analog modulator outputs, sampled every 4th clock |
| adc_bclk, adc_lrclk, adc_sdata | out | 1 | ADC serial output (the block is bus master) |
| adc_valid, adc_l, adc_r | out | 1, 32, 32 | ADC result at fs, full scale 2³⁰ |
| ext_bclk, ext_lrclk, ext_sdata | in | 1 | external serial input (the block is slave) |
| dac_bit_l/r, dac_code_l/r | out | 1, 4 | modulator outputs at 128·fs |

The only parameter is `CE_DIV` = 4, the number of master clocks per 128·fs tick. Changing
it scales every period consistently. The filter MAC budgets need CE_DIV ≥ 4.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:

- compares the module against values computed independently inside the testbench;
- prints `TB_RESULT checks=N failures=M`;
- has a watchdog.

The shared reference arithmetic, including a separate implementation of the coefficient
formula, is in `tb/tb_ref_pkg.sv`.

| testbench | what it checks |
|-----------|----------------|
| tb_comb4_dec4 | every output against direct convolution with the 13-tap CIC impulse response; ratio 1:4; full-scale runs |
| tb_noaccum_dec2 | ORDER 5 and 7 against binomial convolution; ratio 1:2; full-scale input |
| tb_hbf_dec | HBF 1 and HBF 3 configurations bit-exact, latency 2·NTAPS+1, saturation |
| tb_hbf_int | 116- and 12-tap stages bit-exact, with the multiplier granted in a random 60 % / 75 % of clocks; both phases, fixed output slots, saturation |
| tb_dac_interp | three-stage cascade on the shared multiplier bit-exact against a cascaded reference; output n exactly 427 + 64·n clocks after the first input; contention seen; exactly 2·NTAPS grants per stage input |
| tb_hold16 | 16 pulses per sample, 4 clocks apart, correct values |
| tb_dsm5_cifb | cycle-exact against an integer model in both quantiser modes; DC output density within 1 %; saturation under overload |
| tb_adc_response | whole design: ADC chain amplitude response at four tones (passband, band edge, two aliases) against the response predicted from the filter formulas |
| tb_dsm5_snr | in-band SNR ≥ 130 dB and unity gain for a −6 dBFS sine, both quantisers, by a windowed DFT inside the testbench |
| tb_serout_ad / tb_interface_in | all nine format × word-length modes; clipping; slot length; bclk period; two bclk speeds on the receiver |
| tb_mux_sel | all 128 input combinations |
| tb_sdm_codec_top | full design at default parameters (see below) |

**End-to-end test (`tb_sdm_codec_top`).** It runs the design at its default parameters.
Behavioural second-order modulators with DC inputs stand in for the analog front end. The
test goes through four phases:

1. I²S / 24 bit, 1-bit DSM.
2. LJ / 20 bit, 4-bit DSM.
3. RJ / 16 bit, 1-bit DSM, new ADC levels.
4. External LJ / 24-bit source, 4-bit DSM.

It checks that:
- ADC results arrive every 512 clocks and settle within 0.3 % of the analog level;
- every pair the receiver delivers matches the sent words;
- the DSM output density settles within 1 % of its expected level.

It also counts that each format, word length, source and quantiser mode was exercised, and
that the DAC stages competed for their shared multiplier. It simulates about 540 frames
(11 ms of audio) in under a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sdm_pkg.sv tb/tb_ref_pkg.sv tb/tb_sdm_codec_top.sv \
    --top-module tb_sdm_codec_top -o sim
obj_dir/sim
```

For another test, replace the testbench file and the top module name. The RTL also lints
clean of errors with `verilator --lint-only -Wall`. The remaining warnings are:

- `rst_n` is used both as an asynchronous reset and in assertion `disable iff`;
- the DSM ignores the 8 LSBs of its input, by design.

## Relation to the published design

**Taken from it:**
- the block structure and names;
- two channels;
- 128× oversampling at 6.144 MHz to 48 kHz;
- the comb transfer function and its split into 4th-order comb, 5 and 7 non-recursive
  sections;
- three half-band stages with 12, 22 and 116 taps and 22×16, 32×16 and 32×24
  multipliers;
- the DAC's 32-bit data and 24-bit coefficients, 2× per stage and a 16× hold;
- one 32×24 multiplier shared by all three DAC interpolation stages;
- the 5th-order CIFB structure with b₁…b₆, a₁…a₅, g₁ and g₂, using the 24 MSBs of a
  32-bit input and 16-bit coefficients;
- single-bit and 4-bit outputs;
- I²S / LJ / RJ with 16/20/24 bits on both sides;
- the ADC-or-external DAC source.

**This design's own choices:**
- the 512·fs master clock and the fs re-timing of the DAC input;
- the DAC multiplier's arbitration and the fixed output slots;
- all filter and modulator coefficient values;
- the DAC filter lengths (the ADC's filters reused in mirror order);
- every number format, rounding, saturation and headroom choice;
- the 4-bit quantiser levels;
- the serial slot size and bit clock ratio;
- the reset behaviour.

**Differences from the published block diagram:**
- The published DAC draws one front end for all three interpolation stages and two
  accumulators (stage 1 and stages 2+3) around its shared multiplier. Here each stage
  keeps its own sample buffer and accumulator, and only the multiplier is shared. This
  costs one accumulator more, but no stage has to wait for another stage to finish.
- The published diagram draws one hold block per channel. Here one `hold16` holds both
  channels.
- The published text describes the half-band filters as saving work through zero-valued
  taps. With the even tap counts used here there are no zero taps. The single shared
  multiplier per stage is where the area saving comes from instead.

**Not included:**
- the analog third-order modulators that feed `adc_bit_l/r`;
- the analog reconstruction stage after the DSM outputs;
- pads and layout.

## Files

`rtl/` holds one module or package per file:

- `sdm_pkg.sv`: formats and the coefficient function;
- `comb4_dec4.sv`, `noaccum_dec2.sv`, `hbf_dec.sv`: the ADC filters;
- `serout_ad.sv`, `mux_sel.sv`, `interface_in.sv`: the serial interfaces;
- `hbf_int.sv`, `dac_interp.sv`, `hold16.sv`, `dsm5_cifb.sv`: the DAC path;
- `sdm_codec_top.sv`: the top level.

`tb/` holds one testbench per module, plus `tb_ref_pkg.sv`.
