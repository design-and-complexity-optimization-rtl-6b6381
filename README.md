# Multiplier-light digital IF for a multi-standard software-radio receiver

This RTL implements the digital IF section of a software-radio receiver. It takes real
IF samples from a fast ADC (80 Msps, 14 bits, in the reference system) and returns one
user channel at a rate suited to the baseband processor. The overall decimation ratio
is arbitrary and set at run time:

    M* = M_CIC * M_SRC * 2^k
         M_CIC in {1, 2, 4, 8, 16}   (CIC decimator, or bypassed)
         M_SRC in [1, 2)              (fractional sampling-rate converter, or bypassed)
         k     in {1, 2, 3, 4}        (0..3 low-pass 2:1 stages + the final 2:1 stage)

so any ratio from just above 2 up to nearly 512 can be reached. One design therefore
serves GSM, W-CDMA, CDMA2000 and Hiperlan/2 (see [Configurations](#configurations)).
An 8-channel DFT filter bank on the output can also split a block of eight adjacent
channels into eight separate baseband channels
(see [Multichannel output](#multichannel-output-the-dft-filter-bank)).

The main architectural idea is the order of the stages. A conventional receiver
decimates by an integer, cleans up the channel with a programmable FIR, and only then
resamples by the fractional ratio. Here the fractional resampler comes straight after
the integer decimators and is limited to ratios between 1 and 2. The final channel
filter can then be a fixed-coefficient half-band-style filter that decimates by 2,
instead of a programmable FIR full of general multipliers. Every fixed filter uses
sum-of-power-of-two (SOPOT) coefficients, so it is built from shifts and adders. The
only general multipliers in the whole chain are the three in the resampler's
polynomial interpolator.

## Signal chain

```
          <1/13>                 <5/16>                    <6/18>               <7/18>                  <9/19>
 in_data ---+--> CIC (M_CIC) --> compensator --+--> multistage -+--> Farrow SRC --+--> 48-tap LPF --> v2 --> out_data
            |    cic_dec          cic_comp     |   decimator    |   farrow_src    |    hbf
            +-------------- bypass ------------+   ms_decimator +---- bypass -----+
                             (cfg.cic_en)          (cfg.dec_stages)    (cfg.src_en)

 out_data --> 8-channel DFT filter bank (v4) --> ch_re[0..7], ch_im[0..7]   (dft_channelizer)
```

The multistage decimator has the same bypass pattern inside it:

```
 <5/16> -+-> LPF#1 v2 -<5/17>-+-> LPF#2 v2 -<6/18>-+-> LPF#3 v2 -<6/18>-+--> <6/18>
         |                    |                    |                   |
         +---- input ---------+---- input ---------+---- input --------+
```

The multiplexer after each LPF selects either that filter's output or the decimator
input. With `dec_stages` = k-1 stages, the input enters in front of the last k-1 filters:
LPF#3 alone, then LPF#2 and LPF#3, then all three. A filter that is not used gets no
valid strobes.

Everything runs on one clock at the input sample rate. Each block has an
`in_valid`/`in_data` and an `out_valid`/`out_data` pair, and a decimating block raises
`out_valid` only on the samples it keeps. The later, slower blocks are therefore just the
same logic enabled less often. There is no back-pressure: every block can accept a sample
on every clock.

## Number formats

`<I/F>` means two's complement with I integer bits (sign included) and F fractional bits.
The formats at the stage boundaries are fixed by the wordlength plan of the reference
design:

| point                        | format  | width |
|------------------------------|---------|-------|
| ADC input                    | <1/13>  | 14    |
| CIC output                   | <4/25>  | 29    |
| compensated CIC output       | <5/16>  | 21    |
| LPF#1 output                 | <5/17>  | 22    |
| LPF#2, LPF#3, decimator out  | <6/18>  | 24    |
| SRC output                   | <7/18>  | 25    |
| receiver output              | <9/19>  | 28    |

All of these live in `srr_pkg`. When a stage is bypassed, its input is sign-extended and
padded with zero fractional bits, so the next stage sees the format it expects.

Inside each filter the products and sums are exact. Each filter rounds once
(half-up) to its output format. The wordlength-optimisation method this design is based
on goes further and trims individual internal nodes to meet a 96 dB (16 fractional bit)
output accuracy target. Those per-node widths are not available, so they are not
reproduced here. The integer bits of every output format are wide enough that signals
from a <1/13> input cannot overflow. Outputs are not saturated; an assertion in
`fir_dec2` and `farrow_src` reports an output that does not fit.

## The CIC decimator and its wrap-around arithmetic

`cic_dec` is a 3-stage CIC filter: integrators at the input rate, a downsampler by
M_CIC, then three combs. A plain CIC has a gain of M_CIC^3, normally removed by a shift
at the end. Here the scaling is spread out instead: a programmable right shifter in
front of every integrator divides that integrator's input by M_CIC. To keep the shifts
lossless, each integrator carries 4 more fractional bits than the one before it (17, 21
and 25 with a <1/13> input), so a shift of up to 4 bits never drops a bit. The whole
filter is exact.

This is the subtle part. Integrators overflow whenever the input has a DC component, and
a CIC relies on two's complement wrap-around to cancel that in the combs. That only works
if a wrap is a multiple of the range of every later register. Dividing by M_CIC after an
integrator breaks this unless the integrator has log2(M_CIC) more integer bits than the
next one. So the integrators here are <9/17>, <5/21> and <1/25>, all 26 bits wide, and the
combs work modulo 2. The filter's DC gain is 1, so the true output lies in [-1, 1). That
makes the mod-2 result exact, and it is sign-extended to the <4/25> output format. A
register-exact reference model in `tb_cic_dec` confirms this for every M_CIC, including
long full-scale runs that wrap every integrator. The fault copy with a 1-integer-bit
first integrator fails it.

`cic_comp` follows the downsampler and corrects the CIC's passband droop with
P(z) = a + b z^-1 + a z^-2, where a = -(2^-4 + 2^-5) and b = 2^0 + 2^-3 + 2^-4. Forming
t = x*2^-4 + x*2^-5 once gives a*x = -t and b*x = x + 2t, so the two constant products
cost two adders.

## Fixed SOPOT filters

`sopot_fir` is the shared filter core. It is a transposed-form FIR: the input is
multiplied by all the constants at once, and the partial sums travel down a register
chain to the output. Each coefficient is a pair of bit masks marking its +2^-e and -2^-e
terms, and each product is the sum of the shifted input copies that those terms select.
The impulse responses are (anti)symmetric, so each distinct product is formed once and
used by both mirrored taps. `fir_dec2` adds the 2:1 downsampler, which keeps outputs
y(0), y(2), ... counted from reset, plus the output rounding.

| filter | taps | edges (pass / stop, x pi) | coefficient grid | coefficients |
|--------|------|---------------------------|------------------|--------------|
| LPF#1  | 8    | 0.05 / 0.925              | 2^-14            | published SOPOT terms |
| LPF#2  | 12   | 0.1 / 0.85                | 2^-14            | published SOPOT terms |
| LPF#3  | 18   | 0.2 / 0.7                 | 2^-16            | published SOPOT terms |
| HBF    | 48   | 0.4 / 0.6                 | 2^-16            | own equiripple design, CSD-coded |

The LPFs have even length, which puts a zero at pi and suppresses the component that
would alias onto DC. The stopband of each one starts where the previous stages' first
alias band begins. That is why LPF#1 can have such a wide transition band.

The HBF's published length is 48, which is even. A true half-band filter (odd length,
every other tap zero) cannot have that length, so here it is a general linear-phase
filter whose band edges are symmetric about pi/2. Its coefficients are an equiripple
design for those edges, rounded to 2^-16: about 0.005 dB passband ripple and 86.8 dB
stopband attenuation. `srr_pkg::csd_pos/csd_neg` recode them as canonical signed digits
during elaboration.

## The Farrow sampling-rate converter

`farrow_src` resamples by M_SRC in [1, 2). It uses a variable fractional-delay filter in
Farrow form:

    H(z, phi) = C0(z) + C1(z) phi + C2(z) phi^2 + C3(z) phi^3,   group delay 17.5 + phi, phi in [-0.5, 0.5]

The four length-36 subfilters are `sopot_fir` instances that share the input. C0 and C2
are symmetric and C1 and C3 antisymmetric, so each stores 18 coefficients. Horner's rule
((v3 phi + v2) phi + v1) phi + v0 needs three general multipliers.

Timing control. Output j belongs at input time t_j = j * M_SRC. A phase register `d`
holds t_j - n, where n is the index of the arriving input:

* if d < 0.5, this input produces output j with phi = -d, so the interpolated sample lands
  exactly on t_j, delayed by 17.5 input samples; then d += M_SRC - 1;
* otherwise this input produces no output and d -= 1.

Because M_SRC >= 1, one input never yields two outputs. Because M_SRC < 2, no two inputs
in a row are skipped. M_SRC is an unsigned <2/24> word, so a ratio is off by less than
6e-8. phi is rounded to 16 fractional bits. The subfilter outputs (<9/18>) and each Horner
product are rounded to 18 fractional bits, and the output is <7/18>. An output appears two
clocks after the input that produced it.

The Farrow coefficients are this design's own weighted least-squares design for a
0.4 pi passband and a 0.7 pi stopband, rounded to 2^-16 and CSD-coded. The complex error
over the passband and the whole phi range is about -57 dB, and stopband attenuation is
84 dB. `tb_farrow_src` checks the fractional delay directly: a resampled sine must match
the ideal sine at t_j - 17.5 within 2e-3.

Spurs from the resampler. The interpolator's error depends on phi, and phi changes from
output to output. An input tone is therefore not only scaled by the filter's response:
the part of it that the interpolator gets wrong is spread over the output band as
spurs. In the passband that error is about -57 dB and does no harm. In the
interpolator's transition band (0.4 pi to 0.7 pi at its input) the error is large, and
the half-band filter cannot remove spurs that land in its passband. `tb_srr_response`
measures this on the whole receiver:

* Tones that the interpolator rejects (0.7 pi to pi at its input) come out more than 87 dB
  down.
* A tone exactly at the half-band stopband edge comes out 68 dB down with M_SRC = 1.5,
  and 43.5 dB down with M_SRC = 1.017. With M_SRC close to 1, that edge falls inside the
  interpolator's transition band.
* Tones just above the edge that also lie in the transition band come out only 29 dB
  down.

Fixed-phi frequency responses do not show these spurs. If strong interferers can sit
there, the interpolator needs a narrower transition band, which means a longer filter.

## Multichannel output: the DFT filter bank

`dft_channelizer` processes the receiver output all the time. Set the chain up so that
its output holds eight adjacent channels of spacing f_s, at a rate of 8 f_s. The bank
then returns each of those channels at baseband, as a complex stream at 2 f_s. Channel k
is centred on 2 pi k / 8. The bank decimates by 4, which is half the channel count. This
2x oversampling lets the prototype filter have a wide transition band (pass edge pi/8,
stop edge pi/4) with no aliasing in the kept band.

It is a polyphase DFT filter bank. Let h(n) be the 72-tap low-pass prototype. Every
fourth input, the block forms eight branch sums from a 72-sample delay line:

    u_p(m) = sum_q h(8q + p) x(4m - 8q - p),          p = 0..7, q = 0..8

It then takes an 8-point inverse DFT of them, and a sign per channel moves each channel
to baseband:

    y_k(m) = (-1)^(k m) * sum_p exp(j 2 pi k p / 8) u_p(m)

The sign is exp(-j 4 m 2 pi k / 8), the frequency shift that belongs to decimating by 4.
The 8-point DFT needs no general multiplications: its twiddles are 0, +-1, +-j and
+-sqrt(2)/2 (1 +- j). The terms that take sqrt(2)/2 are added first and then multiplied
once, by a CSD constant. The prototype coefficients are CSD constants too, so the bank
is built from adders alone.

The prototype is this design's own equiripple design, rounded to 2^-18. Its passband
deviation is 0.00084 and its stopband attenuation 86 dB (stopband deviation 4.9e-5). The
targets it meets are 0.00173 and 1e-4. The branch sums and the DFT are exact, and each
output is rounded once to <9/19>. The input is real, so channel 8-k is the mirror image
of channel k, and channels 0 and 4 are real (`ch_im[0]` and `ch_im[4]` are always zero).
Outputs appear two clocks after inputs 0, 4, 8, ... counted from reset.

## Configurations

`srr_top` takes a static `srr_pkg::srr_cfg_t`:

| field        | meaning |
|--------------|---------|
| `cic_en`     | 1: use the compensated CIC, 0: bypass it |
| `cic_log2m`  | log2(M_CIC), 0..4 |
| `dec_stages` | number of LPF stages, 0..3 (k = dec_stages + 1) |
| `src_en`     | 1: use the SRC, 0: bypass it (M_SRC = 1) |
| `m_src`      | M_SRC as unsigned <2/24>, 1 <= M_SRC < 2 |

Set `cfg` while `rst_n` is low and hold it while the receiver runs; a new configuration
needs a reset. The reference settings (80 Msps input) are:

| standard   | output rate | M*       | cic_en / M_CIC | dec_stages | src_en / M_SRC |
|------------|-------------|----------|----------------|------------|----------------|
| GSM        | 270.833 k   | 295.3849 | 1 / 16         | 3          | 1 / 1.153847   |
| W-CDMA     | 3.84 M      | 20.83    | 0              | 3          | 1 / 1.302083   |
| CDMA2000   | 1.2288 M    | 65.1041  | 1 / 4          | 3          | 1 / 1.01725    |
| Hiperlan/2 | 20 M        | 4        | 0              | 1          | 0              |

All four run in `tb_srr_top`.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops with a failure if its watchdog expires.

| testbench         | what it checks |
|-------------------|----------------|
| `tb_cic_dec`      | bit-exact against an exact triple-boxcar model for M_CIC = 1..16, full-scale runs, output rate and 1-clock latency |
| `tb_cic_comp`     | bit-exact against a direct-form model with rounding |
| `tb_lpf1/2/3`, `tb_hbf` | bit-exact against direct-form convolution with integer coefficients, 2:1 rate, 1-clock latency |
| `tb_ms_decimator` | bit-exact against a software chain of the filters for 0..3 stages, output counts |
| `tb_farrow_src`   | real-valued Farrow model within 4 LSB, output instants and 2-clock latency for M_SRC from 1 to 1.999, output counts, sine fractional-delay accuracy |
| `tb_dft_channelizer` | every channel of every output against a real-valued filter-bank model within 1 LSB, with gaps in `in_valid`; output instants and 2-clock latency; a tone at a channel centre appears only in that channel and its mirror, at the right level and (after the baseband shift) constant |
| `tb_srr_top`      | whole receiver at default sizes in eight configurations (the four standards, SRC-only, CIC+2-stage, and the range ends M* = 2 and M* = 511.7): unity DC gain within 0.5 %, passband tone RMS within 2 %, stopband tone rejected by more than 60 dB (measured about 110 dB, down to the output rounding floor), output count against M*, the DFT filter bank's output count and DC response, and that every multiplexer setting, SRC skip and filter-bank output occurred |
| `tb_srr_response` | whole receiver, one configuration per M* range (2-4, 4-8, 8-16, 16-32, >= 32): passband deviation within 0.015 dB (measured 0.005 to 0.007 dB), 80 dB attenuation for tones the resampler and the front-end filters reject (measured 87 to 102 dB); reports the spur level at the half-band stopband edge |
| `tb_srr_accuracy` | whole receiver in the four standard configurations with a white-noise input: output round-off noise power against a real-valued model of the chain (same coefficients, exact SRC interval) must stay below 2.512e-10 (96 dB). Measured: GSM -114.7 dB, W-CDMA -115.1 dB, CDMA2000 -113.8 dB, Hiperlan/2 -120.7 dB |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_srr_top rtl/srr_pkg.sv tb/tb_srr_top.sv
./obj_dir/Vtb_srr_top
```

Replace `tb_srr_top` with any other testbench name. Each runs in a few seconds at most.

## Departures and limits

* **Coefficients of the SRC and the HBF** are this design's own, made to the published
  lengths, band edges and coefficient grids. They are not the reference coefficients.
  The LPF and compensator coefficients are the published SOPOT values.
* **Rounding points.** There is one rounding per stage, at the stage-boundary formats.
  The per-node wordlengths that meet the 96 dB accuracy target with minimum adder count
  are not reproduced, so this design spends more adder bits than it needs. Its output is
  rounded to 19 fractional bits, and the measured round-off noise is 18 to 25 dB below
  the target (see `tb_srr_accuracy`).
* **CIC integer bits** are 9 and 5 in the first two integrators instead of 1, so that the
  per-integrator scaling stays exact under wrap-around (see above). The combs are 26 bits
  wide, modulo 2.
* **Multiplier block.** The common subexpressions shared between different coefficients
  are not factored out by hand. The RTL adds each coefficient's SOPOT terms directly, and
  synthesis may share adders. Results are bit-identical either way.
* **Farrow multipliers.** Three, one per Horner step.
* **DFT filter bank.** The prototype filter, its length (72) and the wordlengths are this
  design's own choices; only the channel count, decimation, band edges and ripple
  targets are given. The bank always runs; it has no enable.
* **Not included.** The ADC, the offline tools that find SOPOT coefficients and
  wordlengths, and any gain control or clocking beyond a single input-rate clock.
* The configuration is static. Changing it without a reset leaves stale samples in the
  delay lines.

## Files

* `rtl/srr_pkg.sv`: formats, configuration struct, SOPOT/CSD helper functions
* `rtl/srr_top.sv`: the receiver
* `rtl/cic_dec.sv`, `rtl/cic_comp.sv`: compensated CIC
* `rtl/ms_decimator.sv`, `rtl/lpf1.sv`, `rtl/lpf2.sv`, `rtl/lpf3.sv`: multistage decimator
* `rtl/farrow_src.sv`: Farrow sampling-rate converter
* `rtl/hbf.sv`: output filter
* `rtl/dft_channelizer.sv`: 8-channel DFT filter bank
* `rtl/fir_dec2.sv`, `rtl/sopot_fir.sv`: shared filter cores
* `tb/tb_*.sv`: testbenches
