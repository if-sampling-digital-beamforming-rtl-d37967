# Bit-stream digital beamformer for IF-sampling receivers

This is a receive beamformer for an antenna array. It has no multipliers and
only one decimation filter per beam output. Each antenna element's IF signal is
digitised directly by a band-pass delta-sigma modulator. The modulator is
clocked at four times the IF and gives a five-level output (-2, -1, 0, +1, +2).
The beamformer works on these coarse, fast streams as they arrive, before any
decimation:

* Down-conversion to I/Q becomes a 3:1 multiplexer. At fs = 4·fIF the LO
  samples are only +1, 0 and -1.
* The complex-weight phase shift becomes 5:1 multiplexers. A five-level sample
  times a weight W can only be -2W, -W, 0, +W or +2W.
* The I/Q recombination inside the phase shifter becomes a 2:1 multiplexer. At
  any sample, one of I and Q is zero.
* Only after all elements are summed does each beam output go through a
  cascaded-sinc decimator.

The architecture and its numbers come from the thesis *IF-Sampling Digital
Beamforming with Bit-Stream Processing*, which describes two chips built this
way. The default parameters give its second, larger configuration: 8 elements,
2 simultaneous and independently steered beams, 6-bit weighting factors, and
decimation by 4 (1.04 GS/s in, 260 MS/s out, 13-bit I/Q). Its first
configuration (4 elements, 1 beam, 7-bit weights, decimation by 8) is the same
RTL with other parameters. The RTL is a re-implementation from the published
description, not the authors' code.

## Signal path

```
 IF_k ──► ΔΣ modulator ──T[3:0]──► summer ──x──► DDC (2× 3:1 MUX) ──i,q──┐
 (k = 0..N_ELEM-1, fs = 4·fIF)                                          │
                                                                        ▼
        for every beam b:  phase shifter (4× 5:1 MUX + 2× 2:1 MUX), weight C_bk + jS_bk
                                   │ I'_bk, Q'_bk  (W_BITS+1 bits)
                                   ▼
                     Σ over k  (I and Q separately, 10 bits, at fs)
                                   ▼
                     CIC decimator, L = 5, ÷DEC_M  (13 bits, at fs/DEC_M)
                                   ▼
                           beam_i[b], beam_q[b]
```

| module | role |
|---|---|
| `bsp_beamformer` | top level: `N_ELEM` modulator models feeding `dbf_core` |
| `dbf_core` | the synthesizable digital beamformer |
| `ctbpdsm_model` | behavioural model of one band-pass ΔΣ modulator (simulation only) |
| `therm2bin` | quantizer summer: thermometer code to signed level |
| `lo_gen` | shared LO sequencer, n mod 4, with its cos/sin values |
| `ddc_mux` | MUX down converter of one element |
| `mux5_mult` | 5:1 MUX multiplier, W·X for X in -2..+2 |
| `phase_shifter` | complex weight multiplication of one element for one beam |
| `beam_summer` | adder of all elements of one beam component |
| `cic_decimator` | order-L cascaded-sinc decimator |
| `weight_regs` | complex weight registers and their write port |
| `bsp_pkg` | five-level sample type, LO phase encoding, helpers |

## Down-conversion with the LO at fs/4

For sample index n, the LO values are cos[nπ/2] = 1, 0, -1, 0 and
sin[nπ/2] = 0, 1, 0, -1, repeating. The down converter forms

    i[n] =  cos[nπ/2] · x[n]
    q[n] = -sin[nπ/2] · x[n]

so that i + jq = e^{-jnπ/2}·x. This moves the fs/4 carrier to DC. Each product
is a 3:1 multiplexer, selected by the LO value, that outputs x, 0 or -x. Both
streams therefore stay five-level. On even n, q is zero. On odd n, i is zero.
`ddc_mux` passes this fact on as `q_phase`.

The sign of q is a choice. The thesis writes q = -sin·x in its equations, but
"multiplied by sin" in its prose. The equations are followed here. With them,
the weight e^{jkθ} cancels a phase lag of kθ at element k.

## The phase shifter: multiplying without multipliers

A beam applies the weight C + jS ≈ A·e^{jθ} to each element:

    I' = C·i − S·q
    Q' = S·i + C·q

A plain implementation needs four multipliers and two adders. Here:

1. **Four 5:1 multiplexers** (`mux5_mult`) form C·i, S·i, C·q and S·(−q). Each
   one picks among −2W, −W, 0, +W and +2W. Doubling is a wire shift and
   negation is applied to a stored constant. The −q term negates the
   five-level sample itself (a relabelling of levels), so no subtractor is
   needed after the multiplexer.
2. **Two 2:1 multiplexers** stand in for the two adders. One of i and q is
   always zero, so each sum equals just one of its two terms:
   * even samples: I' = C·i and Q' = S·i
   * odd samples: I' = S·(−q) and Q' = C·q

   `q_phase` makes the selection. An assertion in `phase_shifter` flags any
   sample on which the supposedly zero stream is not zero.

The product is one bit wider than the weight. This holds because weights are
kept in the symmetric range −(2^(W_BITS−1)−1) … +(2^(W_BITS−1)−1), for example
±31 for 6 bits: 2·31 = 62 still fits in 7 bits. This is the range the thesis
counts when it gives (2^b − 1)² weight vectors. `weight_regs` stores a written
−2^(W_BITS−1) as −(2^(W_BITS−1)−1), so the range cannot be left.

The resolution is set by the weight width. The thesis gives 240 usable phase
steps for 6-bit factors and 496 for 7-bit factors, when only weights of nearly
constant amplitude are used.

## Word widths

| point | prototype II (default) | prototype I |
|---|---|---|
| modulator output / DDC output | 3 bit (five levels) | 3 bit |
| weighting factor C or S | 6 bit | 7 bit |
| phase shifter output I', Q' | 7 bit | 8 bit |
| beam sum at fs | 7 + log2(8) = 10 bit | 8 + log2(4) = 10 bit |
| decimator accumulators | 10 + 5·2 = 20 bit | 10 + 5·3 = 25 bit |
| beam output at fs/DEC_M | 13 bit | 13 bit |

## Summation and the single decimator

`beam_summer` adds the element words of one beam component. Its output is wide
enough that it never overflows. Each beam has one summer and one decimator for
I, and one of each for Q. Decimation by `DEC_M` uses a cascade of `CIC_L` = 5
sinc filters:

    H(z) = ((1 − z^{−M}) / (1 − z^{−1}))^L / M^L

It is built in the efficient order:

1. `L` integrators run at fs.
2. The integrator output is down-sampled by `M`.
3. `L` differentiators with a one-sample delay run at fs/M.

The integrators are allowed to wrap: two's-complement arithmetic makes the
differentiated result exact as long as the accumulators are
IN_W + L·log2(M) bits wide.

The thesis gives only the 10-bit input and 13-bit output widths. This design
rounds the exact result (half up) to its 13 most significant bits. Truncation
would be cheaper, but it leaves a −½ LSB DC offset that sits in the middle of
the baseband and dominates the in-band noise of a strong beam. The rounding
constant is smaller than the filter gain M^L, so rounding cannot overflow.
So the output is the filtered input, multiplied by 2^(OUT_W − IN_W) = 8 at DC,
with three fractional bits of the extra resolution the filter creates.

The filter's zeros at multiples of fs/M remove the double-frequency image that
the down-conversion leaves at fs/2. With M = 4 they also remove the image at
fs/4. No further channel filter is included, so modulator noise between those
zeros reaches the outputs. Measured as a mean magnitude over the full output
rate, this noise limits a null to about −28 dB below the main lobe at M = 4.
At M = 8 the null is clean. Within a 10 MHz channel the noise is far lower
(see the array SNR test below).

## Complex weights

Each beam b and element k has its own register pair `(C, S)`. It is loaded
through a parallel port: hold `wr_en` high for one clock with `wr_beam`,
`wr_elem`, `wr_cos` and `wr_sin`. The new value acts from the next clock on.
Reset sets every weight to C = max, S = 0 (no steering). The thesis does not
describe how weights are loaded, so this port is this design's own.

* **Steering a beam.** For a uniform linear array whose neighbouring elements
  see a phase step θ, use C_k = round(A·cos kθ) and S_k = round(A·sin kθ),
  with A = 2^(W_BITS−1) − 1. For spacing d and incidence angle ψ,
  θ = 2π·d·sin ψ / λ. For example, half-wavelength spacing and ψ = 30° give
  θ = 90°.
* **Two main lobes.** Use (e^{jkθ1} + e^{jkθ2}) / 2 as the weight. This costs
  6 dB of array gain.
* **Amplitude tapering.** The same registers support it. Phase resolution gets
  coarser as the amplitude drops.

## Timing

One register stage each follows:

1. the input summer,
2. the down converter,
3. the phase shifter,
4. the beam summer.

So a modulator sample reaches the decimator four clocks after it is applied.
The decimator output of clock t is the filter result for its input t − L.
`beam_valid` pulses once every `DEC_M` clocks, starting `DEC_M` clocks after
reset is released. All beam outputs update together on that pulse and hold
between pulses.

The LO sequence starts at n = 0 (cos = +1) on the first clock after reset. Only
the phase of the beam output depends on this start; its magnitude does not.
Reset is synchronous and active low. The thesis does not describe a reset or
any pipelining, so both are this design's choices.

## The modulator model

`ctbpdsm_model` stands in for the analog 4th-order continuous-time band-pass
modulator. It is simulation-only and uses `real` arithmetic.

What the model keeps from the real modulator:

* the sample rate of one sample per clock,
* a 4th-order noise transfer function with its zeros at fs/4,
* a five-level flash quantizer with thresholds ±0.5 and ±1.5,
* the thermometer output T3..T0.

Its loop is the simplest that has these properties: discrete-time error
feedback with NTF = (1 + z^{−2})² and a flat signal transfer function.

An ideal loop would be far quieter than a real modulator: about 75 dB in-band
SNR for a 0.7-step tone in 10 MHz. So each instance adds its own white input
noise with an rms of `NOISE_RMS` steps, 0.0068 by default. The noise is
approximately Gaussian, a sum of twelve uniform draws, and it is uncorrelated
between instances. This gives about 55 dB per element, close to the 54 dB the
real chip's modulators reach on average. This level is a calibration, not a
measured circuit value. Set `NOISE_RMS` to 0 for the ideal loop. The
real modulator's resonators, feed-forward path, RZ/HZ DACs and tuning controls
are not modelled. Inputs are in units of one quantizer step, and the model
stays stable up to an amplitude of about 1.

To use the synthesizable `dbf_core` with real modulators, connect their
thermometer codes to `therm`.

## Configurations

| parameter | default (prototype II) | prototype I |
|---|---|---|
| `N_ELEM` | 8 | 4 |
| `N_BEAM` | 2 | 1 |
| `W_BITS` | 6 | 7 |
| `DEC_M` | 4 | 8 |
| `CIC_L` | 5 | 5 |
| `OUT_BITS` | 13 | 13 |

`DEC_M` must be a power of two. The beam sum width follows from `W_BITS` and
`N_ELEM`.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_therm2bin` | all five thermometer codes map to −2..+2 |
| `tb_lo_gen` | cos/sin sequence against rounded real cos/sin for 40 clocks |
| `tb_ddc_mux` | 400 random samples against i = cos·x, q = −sin·x |
| `tb_mux5_mult` | every weight and level, for 6 and 7 bits, against W·X |
| `tb_phase_shifter` | 2000 random samples and weights against the complex product |
| `tb_beam_summer` | 8×7-bit and 4×8-bit sums, including full-scale extremes |
| `tb_cic_decimator` | M = 4 and M = 8 against a direct-form FIR of the same response, bit for bit; strobe spacing |
| `tb_weight_regs` | reset values, random writes, clipping of the most negative code |
| `tb_ctbpdsm_model` | legal codes, recovered tone amplitude and phase, in-band error |
| `tb_beam_pattern` | beam patterns at the default size: six steering angles (−60°, −30°, 0°, 15°, 30°, 60°), incidence swept from −90° to +90° in 2.5° steps, single- and two-lobe weights |
| `tb_array_snr` | in-band SNR of a beam against single elements, at 8 and 4 elements: 9 dB and 6 dB improvement |
| `tb_dbf_core` | whole digital core at both prototype sizes against an integer reference model, bit for bit, with weights rewritten while running |
| `tb_bsp_beamformer` | end to end at the default size: see below |
| `tb_proto1` | end to end at the prototype I size, plus beam patterns for four steering angles (−45°, −15°, 15°, 45°) |

The end-to-end tests drive the model modulators with IF tones that carry a
fixed phase step between elements, as a plane wave would. They then measure the
mean beam magnitude over 256 to 512 decimated outputs, in several phases:

* a beam steered at the wave,
* a beam steered to a null,
* the two beams swapped while data flows,
* two-lobe weights,
* a single element.

Each magnitude is compared with G·(A/2)·|Σ_k W_k e^{−jkθ}| within 5 %, where
G = 8 is the decimator's DC gain. The array gain over one element comes out at
8.00 (18.1 dB) for 8 elements and 4.00 (12.0 dB) for 4 elements. Every
mechanism (weight write, strobe, constructive sum, null, re-steering, two-lobe
weights) is counted and must occur. `tb_bsp_beamformer` uses the top's default
parameters.

`tb_beam_pattern` plots the array response the same way at 73 incidence
angles, for a half-wavelength array. Every point must match the ideal array
factor within 10 % of the main lobe; that margin is set by the noise floor. The
maximum must lie at the steering angle, within one step. The two beams are
swept together, in three pairs of steering angles.

`tb_array_snr` applies a tone to all elements, at both prototype sizes. Beam
0 is first steered at it with all elements, then given a weight on one element
only, for each element in turn. A Hann-windowed DFT gives the SNR within
±5 MHz; each phase is recorded several times and its SNR is taken over all its
records, because a single record varies by a few dB. The window matters:
without it, the strong shaped noise outside the band leaks into the band bins.
The tone adds coherently (+20·log N) and the modulator noise adds as power
(+10·log N), so the beam must gain 10·log N ± 1.5 dB. At the decimated outputs
it gains 9.6 dB with 8 elements and 6.9 dB with 4 elements. The real chips
were measured at 8.9 dB and 5.7 dB.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bsp_pkg.sv tb/tb_dbf_core.sv \
          --top-module tb_dbf_core -o sim
./obj_dir/sim
```

Every testbench finishes within a few seconds.

## How far to trust it, and where it departs from the thesis

* **Follows the thesis:**
  * the architecture and block order,
  * fs = 4·fIF and five-level streams,
  * the 3:1, 5:1 and 2:1 multiplexer scheme,
  * per-beam phase shifters behind a shared down converter per element,
  * a multi-bit summer,
  * order-5 sinc decimation in integrator/down-sampler/differentiator form,
  * every width and ratio in the tables above.
* **This design's own choices:**
  * the five-level encoding (3-bit two's complement),
  * the pipelining,
  * the reset,
  * the weight write port and its clipping of the most negative code,
  * the decimator's output scaling and rounding,
  * the q = −sin·x and e^{+jθ} sign conventions where the thesis is
    inconsistent,
  * the modulator model's loop and its noise level.
* **Not included:** everything analog, which is not digital logic:
  * resonators and their capacitor tuning,
  * the transimpedance amplifier,
  * comparators and offset trims,
  * feedback DACs and the loop-delay adjustment.

  The thesis's comparison design, with a decimator for every element, is also
  not included.
* **Not verified:** timing at the 1.04–1.06 GHz sample rate and the behaviour
  with real modulators. The top level is simulation-only because of the
  `real`-valued model inputs, and `dbf_core` is the part to synthesize.
