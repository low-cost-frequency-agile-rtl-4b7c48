# Two-stage filter-bank transceiver for the 40 UHF TV white space channels

This RTL converts all forty 8 MHz TV white space (TVWS) channels of the UK
UHF band, 470-790 MHz, to and from RF at once. The receiver samples RF
directly at fs = 2.048 GHz and delivers 40 baseband channels at 16 MHz each.
The transmitter does the reverse. The spectral mask around each channel is
very tight, so the design uses filter-bank multicarrier (FBMC) processing
rather than plain OFDM. The conversion has two stages:

* **Stage 1** is a polyphase complex bandpass centred on 630 MHz. It cuts the
  320 MHz TVWS band out of the RF spectrum and changes the rate by K1 = 4
  (2.048 GHz <-> 512 MHz). A complex exponential then moves the band so that
  it starts at DC.
* **Stage 2** is a DFT-modulated filter bank with K2 = 64 bands of 8 MHz,
  oversampled by two. Each band runs at 16 MHz. Bands 0..39 carry the TVWS
  channels and bands 40..63 are not used.

Converting 40 channels costs little more than converting one. The filter bank
filters every band with the same prototype polyphase network, and a single
64-point FFT does the modulation.

The configuration built is the one with K1 = 4, a 44-tap stage-1 filter, 64
bands and a 320-tap stage-2 prototype. Every block processes one 512 MHz
sample per clock, so the RTL is meant to run at 512 MHz. The ADC and DAC are
outside the RTL and must have built-in multiplexers: the ADC delivers, and
the DAC takes, four consecutive 2.048 GHz samples per clock.

```
 TX  ch[40] @16 MHz -> fbmc_synthesis -> freq_shift(+) -> ppf_interp -> 4 x 16 bit -> DAC
 RX  ch[40] @16 MHz <- fbmc_analysis  <- freq_shift(-) <- ppf_decim  <- 4 x 12 bit <- ADC
       16 bit           16 bit            16 / 13 bit        13 bit
```

## Frequency plan

This part needs the most care. Ignoring small edge effects, it explains every
sign and offset in the RTL.

1. The complex bandpass passes 470-790 MHz of the 2.048 GHz spectrum and
   rejects the negative-frequency image. After decimation by 4 (new rate 512
   MHz) the band folds to -42...278 MHz, because 470 - 512 = -42.
   The filter's transition bands are 192 MHz wide (2048/4 - 320). Aliasing
   inside them is harmless because it only lands where the band is empty.
2. To move 470 MHz to DC the receiver multiplies by e^{-jΩn} with
   Ω = 2π·470·K1/fs = 2π·235/256. This shifts by -470 MHz, which is the same
   as +42 MHz at a 512 MHz rate. The transmitter multiplies by e^{+jΩn}. The
   period is exactly 256 samples, so a 256-entry cosine/sine table holds every
   value exactly.
3. Stage 2 centres band k on k·8 MHz with a flat passband of ±4 MHz. With
   the default shift of 470 MHz, band k therefore covers RF 466+8k ... 474+8k
   MHz. That is centred on the **boundary** between two official 8 MHz TVWS
   channels, not on a channel. Set `SHIFT_MHZ = 474` on `tvws_tx` and
   `tvws_rx` to centre the bands on the TVWS channels. The phase increment
   stays a multiple of 256, so the table remains exact. Tx and Rx must use the
   same value: the loopback works with either.
4. In the transmitter, a baseband tone at f becomes images at f + 512q after
   expansion by 4. Only the image inside 470-790 MHz survives the bandpass.
   The real part of the analytic signal goes to the DAC.

The exponentials have the opposite sign to a common drawing of this
architecture, in which the transmitter uses e^{-jΩn} and the receiver e^{+jΩn}.
With Ω as defined above, those signs would move the band away from DC rather
than onto it. `freq_shift` has a `NEG` parameter if the opposite convention
is needed, for example with a spectrally inverted RF front end.

## Stage 2: the oversampled DFT filter banks

The prototype p[n] (L = 320 taps) is shared by all bands. Band k is p
modulated to k·8 MHz. The bands are decimated by M = K/2 = 32, not by K, so
the 8 MHz bands are sampled at 16 MHz. This twofold oversampling lets the
prototype have a wide transition band (passband edge 4 MHz, stopband edge
12 MHz). It also leaves room for synchronisation or matched filtering
downstream.

**Analysis (`fbmc_analysis`).** For the block that ends with input sample
x[e], band k is

    y_k = Σ_{n<L} p[n] e^{+j2πkn/K} x[e-n] = Σ_r e^{+j2πkr/K} u_r,
    u_r = Σ_{l<L/K} p[r+Kl] x[e-r-Kl]          (r = 0..K-1).

The hardware keeps one tapped delay line of L + M samples. In the M clocks
after a block ends, the line moves on by t samples, and clock t computes
u_{2t} and u_{2t+1} from taps r + Kl + t. That takes two lanes of five
complex-by-real multiplies. The 64 sums are written to the FFT frame at index
(-r) mod K, so a forward FFT gives y_k with band k at +k·8 MHz.

**Synthesis (`fbmc_synthesis`).** This is the dual of the analysis bank.
Every 32 clocks a channel vector is inverse-transformed. The last L/M = 10
transformed frames are kept, and each output sample is the overlap-add
Σ_j p[t+jM] U_{m-j}[(t+jM) mod K]. Ten complex-by-real multiplies run per
clock. This overlap-add is the parallel-to-serial conversion of the
transmitter.

**Block-phase correction.** Because M = K/2, the modulation e^{j2πk(n-mM)/K}
seen from block m differs from absolute time by (-1)^{km}. Without a
correction, a constant symbol on an odd channel would flip sign every block,
which shifts it by 8 MHz, onto the boundary of the band. Both banks therefore
negate odd channels in alternate blocks:

* The synthesis bank negates them in odd input blocks.
* The analysis bank negates them in even output frames, counting the first
  frame as 0.

Every channel is then modulated in absolute time. A steady tone at k·8 MHz
gives a constant output on channel k, up to a fixed phase of e^{j2πk/K} per
channel.

**FFT (`fft_r2`).** The FFT is a radix-2 decimation-in-time design that takes
and returns whole frames in parallel. Each of the six stages owns a 64-entry
register buffer and performs one in-place butterfly per clock, 32 per frame.
When a new frame arrives, every buffer moves one stage on. The butterfly of
that clock is applied to the data as it moves, so a frame can enter every 32
clocks, which is exactly the block rate. Every butterfly halves its result,
so the output is the transform divided by 64.

## Stage 1: polyphase bandpass filters

Both filters use the same complex coefficients h1[n] = lowpass[n] ·
e^{j2π·630/2048·(n-21.5)}. The lowpass is a Blackman-windowed sinc with
cutoff fs/8 and unity DC gain.

* `ppf_decim` forms only the decimated outputs,
  y[m] = Σ h1[n] x[4m+3-n]. It uses 88 real multiplies per clock, on the
  four new samples and 40 stored ones.
* `ppf_interp` computes the four polyphase branches
  z[4m+p] = Re Σ_l h1[4l+p] u[m-l] in parallel, with 11 taps per branch. It
  computes only the real part.

Complex filtering followed by a single shift costs 4·L1/K1 + 4 real MACs per
RF sample. The alternative (shift, real lowpass, shift back) only pays off
when L1 > 2·K1² = 32 for K1 = 4. That option is not built.

## Word lengths and scaling

| point | width | scaling |
|---|---|---|
| coefficients, exponential, twiddles | 16 bit | Q1.15 (value·32767) |
| Tx channel input, Tx baseband, DAC words | 16 bit | channel symbol A → baseband tone ≈ 0.88·A → RF tone of the same amplitude |
| Tx IFFT frame | 24 bit | input << 8, output = IDFT/64 |
| ADC words | 12 bit | |
| Rx after stage 1 / after shift | 13 bit | real tone amplitude A → analytic amplitude A in half-LSB units |
| Rx FFT frame | 20 bit | polyphase sums >> 8, output = DFT/64 |
| Rx channel outputs | 16 bit | FFT output >> 3 |

Accumulators are kept at full precision and rounded once (round half up),
with saturation at every narrowing. The receiver therefore gains one bit in
stage 1 and three in stage 2. This matches the resolution that filtering
2.048 GHz down to 8 MHz can deliver: about half a bit per halving of the
bandwidth, four bits in all.

The 16-bit channel inputs are not scaled down by the number of active
channels. If all 40 are driven at full scale the DAC words saturate, and the
loopback testbench does this on purpose.

## Interfaces and timing

One clock is one 512 MHz sample. All resets are synchronous and active low.

* `tvws_tx`: `ch_take` pulses every 32 clocks, and `ch_re/ch_im[40]` are
  sampled in that clock. `dac_valid/dac_smp[4]` then run without gaps;
  `dac_smp[0]` is the earliest RF sample of the clock.
* `tvws_rx`: `adc_valid/adc_smp[4]` go in, with `adc_smp[0]` the earliest.
  `ch_valid` pulses every 32 clocks, and `ch_re/ch_im[40]` hold until the
  next pulse. The input may pause, because `fbmc_analysis` counts samples,
  not clocks.
* `tvws_transceiver` places both chains side by side. The two share only
  clock and reset.

The FFT pipeline adds 6·32 + 1 clocks (about 377 ns) per direction. The
analysis bank adds one more frame for its polyphase pass. Both come on top of
the group delay of the filters: L1/(2fs) ≈ 11 ns for stage 1 and
L2·K1/(2fs) ≈ 313 ns for the stage-2 prototype.

The filter sums and butterflies are single-cycle combinational logic. Closing
timing at 512 MHz on an FPGA would therefore need pipeline registers inside
them. Only the latency would change.

## How far it can be trusted

Every block has a self-checking testbench in `tb/`. Each compares the block
against an independent floating-point or direct-form model and runs at the
default sizes:

* `tb_fft_r2`: both directions against a direct DFT, with random,
  impulse and full-scale frames. It also checks the latency of 6·32 + 1
  clocks.
* `tb_freq_shift`: both signs against e^{±jΩn} computed in floating point,
  with pauses in the input.
* `tb_ppf_decim` and `tb_ppf_interp`: bit-exact against a direct
  convolution at the full 2.048 GHz rate. They also check in-band gain within
  5 %, and that the out-of-band tone or the unwanted image is at least 40 dB
  lower.
* `tb_fbmc_analysis` and `tb_fbmc_synthesis`: every channel and sample
  against the filter-bank formulas, within 2 LSB plus 0.1 %. They also check
  the 32-clock cadence and an odd channel, which needs the block-phase
  correction. The analysis test uses channel 5 and checks that the
  next-adjacent channels are at least 40 dB lower. The synthesis test uses
  channel 11 and checks for a steady tone at 88 MHz.
* `tb_tvws_tx` and `tb_tvws_rx`: single channels at 470 MHz, at 606 MHz
  (Tx) or 630 MHz (Rx), and at 782 MHz. They check gain within 6 % and that
  bands two or more away are at least 40 dB lower.
* `tb_tvws_transceiver`: transmitter into receiver at full size with four
  active channels.
  * Received levels are within 1 % of the loop gain predicted from the
    coefficient sums. The test allows 8 %.
  * Measured reconstruction error is -65 to -71 dB. The test requires
    -35 dB or better.
  * Channels two or more bands away stay more than 40 dB lower.
  * A full-scale phase exercises saturation.
  * It counts every mechanism at least once: FFT frames, oscillator wraps,
    block-phase corrections and saturation.

What is not verified:

* Spectral-mask compliance with realistic 5.33 MHz channel signals.
* The alternative configuration with K1 = 2, 128 bands and a 640-tap
  prototype. The modules take these as parameters, but it has not been
  simulated.
* Any FPGA mapping or timing.

The coefficients are this design's own and are computed at elaboration time
by `fbmc_pkg`:

* **Stage 1:** a windowed sinc rather than a minimax design.
* **Stage 2:** a truncated root-raised-cosine, symbol period 32 and roll-off
  0.5, as the root-Nyquist prototype.

They meet the ±4/12 MHz and 470-790 MHz band edges. The stage-2 prototype
is 3 dB down at 8 MHz, about 30 dB down at 12 MHz, and at least 50 dB down
from 16 MHz onwards. That is well short of a mask-grade design. To
reach a mask-grade figure, replace `p2_coef` and `h1_re/h1_im` with optimised
coefficients of the same lengths; nothing else changes.

Multipliers per direction, real:

* stage 1: 88
* shift: 4
* polyphase network: 20
* FFT: 6 butterflies × 4 = 24

That is about 136 per direction and 272 for the transceiver.

## Simulating

All files are plain SystemVerilog-2017. The package must come first. Example
for the full loopback test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_tvws_transceiver rtl/fbmc_pkg.sv tb/tb_tvws_transceiver.sv
./obj_dir/Vtb_tvws_transceiver
```

Each testbench ends with `TB_RESULT checks=N failures=M`. All testbenches
finish in seconds.

To change the configuration, use the parameters:

* `K1`, `L1`, `K2`, `L2`, `NUM_CH` on `tvws_tx` and `tvws_rx`, plus
  `SHIFT_MHZ`.
* The scaling shifts on the individual blocks.

The constants in `fbmc_pkg` are the defaults.
