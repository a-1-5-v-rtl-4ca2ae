# Direct digital synthesizer with a tunable 1-bit delta-sigma D/A converter

A direct digital synthesizer (DDS) normally ends in a multibit D/A converter.
At high output frequencies that converter limits the spectral purity, because
its glitches and level mismatches create spurs that cannot be filtered. This
design ends instead in a **1-bit** D/A converter driven by a delta-sigma
modulator. A 1-bit converter has only two levels, so mismatch becomes only a
gain or offset error.

An ordinary delta-sigma modulator keeps its quantization noise away from one
fixed band, usually near dc. A synthesizer needs a clean band that moves with
the carrier. Here the modulator is a **tunable band-pass** loop. One 6-bit
word, `cos_k`, places the noise notch anywhere between about 0.04·f_s and
f_s/2. You set that word so the notch sits on the synthesizer's output
frequency. The design targets a 200 MHz clock and a band about 2.5 MHz wide
around the carrier.

The synthesizer can modulate the carrier in three ways:
- frequency, through the phase increment;
- phase, through an adder after the accumulator;
- amplitude, through a multiplier after the sine converter.

Together, the phase adder and the multiplier act as a quadrature modulator: I/Q
data converted to polar form (A, P) gives `A(n)·sin(ω n + P(n))`.

## Signal chain

```
 delta_p(32) ─► phase_accumulator ─14─► phase_adder ─14─► sine_converter ─12─► am_multiplier ─12─► tunable_dsm ─1─► one_bit_dac ─► (off-chip filter)
                 acc += delta_p          + phase_mod        quarter-wave,        × amp_mod          band-pass ΔΣ       latch, driver,
                 (mod 2^32)              (mod 2^14)         16 parabolas         (keep 12 bits)     notch at acos(c)   current switch
                                                                                                     c = cos_k / 32
```

| Module | Latency | What it does |
|---|---|---|
| `phase_accumulator` | 1 | `acc <= acc + delta_p`. Outputs the 14 MSBs. f_out = delta_p·f_s/2^32, with a resolution of f_s/2^32 (0.047 Hz at 200 MHz). |
| `phase_adder` | 1 | Adds `phase_mod` modulo 2^14 (one turn). |
| `sine_converter` | 2 | 14-bit phase to a 12-bit signed sine, range ±2047. |
| `am_multiplier` | 1 | `floor(sine·amp/4096)`. `amp` is an unsigned fraction. |
| `tunable_dsm` | 0 | `dout` comes straight from a register; a new input affects it one clock later. |
| `one_bit_dac` | model | Takes the bit on the rising clock edge and steers 11.5 mA to one of two outputs (NRZ). |
| `dds_top` | | Wires the chain together. Also brings out the sine and the modulator input for observation. |

A change on `delta_p` shows up on `sine` 4 clocks later and on `dsm_in` 5
clocks later. All registers reset synchronously when `rst_n` is low.
`dds_pkg` holds the shared widths and types.

## Phase-to-amplitude converter: parabolic segments

Only the first quadrant of the sine is computed, using the two phase MSBs:
- The second MSB mirrors the phase inside the quadrant by taking the one's
  complement of the lower 12 bits.
- The MSB selects the sign.

The stored curve contains a half-LSB phase offset:

    mag(P) = 2047 · sin( π/2 · (P + ½) / 4096 ),   P = 0 … 4095

Because of this offset, the one's complement is an exact mirror, and no
adder is needed to negate the phase.

The quadrant is split into 16 equal segments. The top 4 bits `u` of P choose
the segment; the low 8 bits `x` are the position inside it:

    sum = a0(u) + ((a1(u) · x) >> 7) − q(u, x[7:4])      (12 bits, half-LSB units)
    mag = sum >> 1                                       (11 bits)
    out = MSB ? {1, two's complement(mag)} : {0, mag}    (12 bits)

- **a0**: 16 × 12 bits. The value at the segment start, in half-LSB units,
  plus one half LSB so that the final shift rounds.
- **a1**: 16 × 8 bits. The slope; it drives an 8 × 8 multiplier.
- **q**: 256 × 5 bits, addressed by `u` and the top 4 bits of `x`. Holds the
  size of the quadratic term, |a2(u)|·(16·x[7:4] + 7.5)², evaluated at the
  middle of each 16-step slice. This term adds at most 19 half-LSBs. The
  quadrant sine is concave, so the term is subtracted.

The coefficients come from a least-squares fit per segment. The fit uses the
basis {1, x/128, (16·x[7:4]+7.5)²}, which is exactly what the hardware can
form. The results are then rounded to the ROM widths, and a small search over
a0 and a1 keeps the worst error low. Over all 16384 phases the largest error
against the ideal sine is **1.05 LSB**. The smallest magnitude is 1, so the
two's complement of the magnitude is an exact negation, and the output is
exactly odd-symmetric. The spurious-free dynamic range of one full output
period is 88.9 dBc. The tables are written out as `case` statements in
`rtl/sine_converter.sv`. To change the amplitude or the segment count, redo
the fit with the formula above.

## Tunable band-pass delta-sigma modulator

### From low-pass to band-pass

The loop starts from a third-order low-pass modulator: three delaying
integrators in cascade, with 1-bit feedback into each stage and one
resonator feedback. Its noise-transfer function has a peak out-of-band gain of
1.52 and zeros placed for an oversampling ratio of 64. Each delay `z⁻¹` is
then replaced by the all-pass

    G(z) = −z⁻¹ (z⁻¹ − c) / (1 − c z⁻¹) = (c z⁻¹ − z⁻²) / (1 − c z⁻¹),   c = cos θ₀

This substitution maps dc to the frequency θ₀. The loop becomes sixth-order,
with its noise notch at f₀ = f_s·θ₀/2π, and its shape and stability match the
prototype's. If c is quantized coarsely, the notch only moves slightly; the
loop does not break.

`allpass_section` builds G(z) with two registers, one multiplier and two
adders:

    a(n)   = x(n) + y(n)
    y(n+1) = c·a(n) − x(n−1)

`c = cos_k/32`, where `cos_k` is a signed 6-bit word with range −1 … 31/32.
The product is truncated and the result saturates.

### The loop

Stage k has word length W_k = 14, 12, 10 and feedback level D_k = 1843, 533, 102:

    w_k  = sat( in_k + fb_k + y_k )        y_k = all-pass output, fed back locally
    y_k <= G(w_k)
    fb_k = −D_k if dout = 1, +D_k if dout = 0
    in_1 = din·2⁻²,  in_2 = y_1·2⁻² − y_3·2⁻⁷,  in_3 = y_2·2⁻²
    dout = (y_3 ≥ 0)

**The key point for fixed point:** each word is read as a fraction of its own
full scale. A scale of 2⁻² between a 14-bit word and a 12-bit word is then an
arithmetic shift right by 4: 2 bits for the change in word length and 2 for
the gain. The values in the loop are:

| Quantity | Operation |
|---|---|
| din (12 bits) · 2⁻² into a 14-bit word | sign extension only |
| y_1 → stage 2 | `y1 >>> 4` |
| y_2 → stage 3 | `y2 >>> 4` |
| y_3 · 2⁻⁷ → stage 2 | `y3 >>> 5` |

With this reading, and with the quantizer gain normalized out, the prototype
coefficients are 1 : 0.327 : 0.071 and the resonator is 2⁻⁹. This is the
shape of a standard third-order loop with out-of-band gain 1.5. If the
integers are instead aligned at their LSBs, the loop does not stabilize.

**Behaviour that follows from the design (measured in simulation):**
- A sine at the notch comes out of the bit stream with amplitude
  `din/1843`, in units of ±1.
- In a 16384-point Hann-windowed measurement, a bin 24 bins (about
  0.3 MHz) from the tone is 70–100 dB below the tone, depending on the
  tuning word.
- The loop is stable for input amplitudes up to about **1000 LSB**, about half
  of the 12-bit range. It overloads near 1400 LSB. Keep `amp_mod` at or below
  about 2000 when the sine is at full scale.

### Choosing the tuning word

A side note on `delta_p`: an odd `delta_p` makes the output sequence repeat only
every 2^32 clocks. This spreads the sine converter's rounding errors into
noise instead of spurs. The cost is a frequency offset of at most f_s/2^32.


    cos_k = round( 32 · cos(2π · delta_p / 2^32) ),  clipped to −32 … 31

Some carriers at f_s = 200 MHz:

| Carrier | cos_k | Notch |
|---|---|---|
| 50 MHz | 0 | 50.00 MHz |
| 60 MHz | −10 | 60.12 MHz |
| 63.33 MHz | −13 | 63.32 MHz |
| 76.8 MHz | −24 | 76.99 MHz |
| 100 MHz | −32 | 100.00 MHz |

The 64 possible notch positions bunch together near f_s/4 and spread apart
near dc and near f_s/2. About 86 % of 0–100 MHz lies within ±1.25 MHz of a
notch. Carriers below about 6.7 MHz and between 93.3 and 98.7 MHz do not get
a notch that close. A dc notch (c = 1) cannot be represented in this coefficient
format.

## 1-bit D/A converter (behavioural model)

The real converter is analog:
- A clocked latch of cross-coupled inverters.
- A driver that lowers the gate swing and sets where the two gate signals
  cross.
- A differential pair that steers a tail current into one of two load
  resistors.

The point of the crossing-point design is that the two switches are **never
both off**. That way the tail current never stops, and glitches stay small.

`one_bit_dac` models this with delays:
- It samples `vin` on the rising edge of `clk`.
- It turns one switch on `T_ON` after the change and the other off `T_OFF`
  later, with T_ON < T_OFF < clock period.
- It reports the currents `iout_p` and `iout_n` in µA: 11500 on one side, or
  5750/5750 while both switches conduct.

The model is not synthesizable. It needs a simulator with timing support
(`verilator --timing`). It does not model the load resistors, the
reduced-swing bias or the bias filter. The reconstruction filter after the
converter is off-chip and is not modelled.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl \
          rtl/dds_pkg.sv tb/tb_dds_top.sv --top-module tb_dds_top -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_phase_accumulator` | A software accumulator with random increments, and the overflow rate for a fixed increment. |
| `tb_phase_adder` | Random operands, and the one-clock latency. |
| `tb_sine_converter` | All 16384 phases against `2047·sin(2π(p+½)/16384)` within 1.1 LSB; odd symmetry; two-clock latency; SFDR of one period of at least 87 dBc, by direct DFT. |
| `tb_am_multiplier` | Random and extreme operands against `floor(s·a/4096)`; latency. |
| `tb_allpass_section` | The all-pass recursion in floating point for c = 0, ±½, 31/32 and −1, within the truncation bound `1/(1−|c|)+1`; saturation. |
| `tb_tunable_dsm` | Bit-exact against a reference model written from the stage equations, for every tuning word from −31 to 31, each with a tone at its notch; tone amplitude at the notch within 3 %; in-band versus out-of-band noise. |
| `tb_one_bit_dac` | NRZ latching, the current on the correct side, overlap at every transition and never both off, constant total current. |
| `tb_dds_top` | The whole chain at default sizes. Checks the sine and the modulator input every clock against a model of the phase path. Runs carriers at 50, 60, 63.33 and 76.8 MHz with the notch tuned to each. Then runs a segment with frequency hops, quarter-turn phase steps and amplitude changes. Counts overflows, retunings, quadrants and D/A overlaps. Runs in well under a second. |
| `tb_dds_modulated` | Modulated carriers through the whole chain, with the notch tuned: two tones 200 kHz apart at 76 MHz, 16-QAM at 390.625 kBd with root-raised-cosine pulses (roll-off 0.22) at 76.8 MHz, and 8-PSK at about 270.8 kBd at 50 MHz. The bit stream is mixed down and filtered, then compared with the ideal modulated carrier after one complex gain is fitted. The reference is delayed by 10 clocks: 5 for the pipeline and about 5 for the modulator's group delay. The residual must be at least 40 dB below the signal. |

## Where this RTL goes beyond the published description

The published description fixes the block structure, the word lengths (32,
14, 12 and 1 bits along the chain; 12/8/5/9/11 bits inside the sine
converter; 14/12/10 bits in the modulator stages), the feedback levels
1843/533/102, the 2⁻² and 2⁻⁷ scalings, the 6-bit cos θ₀ and the 11.5 mA
full-scale current. The following are choices made here:

- **Pipelining and reset.** The register stages and the synchronous reset are
  choices made here.
- **Sine converter.** The ROM coefficient values, the amplitude scale (2047),
  the half-LSB units and the subtracted quadratic term are choices made here.
  The resulting SFDR of 88.9 dBc is close to the published 87.1 dBc.
- **Modulator fixed point.** The fixed-point reading of the modulator words,
  the `cos_k/32` format, truncation and saturation are choices made here. The
  stable input range that results, about half scale, is smaller than the
  "full-scale" drive the measurements mention.
- **Tuning.** The tuning word is an input. The source does not say how the
  chip derives it from `delta_p`.
- **Modulation inputs.** The I/Q-to-polar conversion, the pulse shaping for
  QAM and EDGE signals, and any frequency-offset adder for FM all sit outside
  this design. It takes `delta_p`, `phase_mod` and `amp_mod` every clock.
- **Not verified.** Spectral performance at the analog output, such as the
  −85 dBFS noise floor, the 83 dBc in-band SFDR and the IMD, was not
  reproduced. The testbenches only check the digital bit stream.
