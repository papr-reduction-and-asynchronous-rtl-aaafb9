# CCK-OFDM with non-maximally decimated filter banks

OFDM signals have a high peak-to-average power ratio (PAPR): the IFFT adds
many independent carriers, and now and then they line up. This design sends
OFDM symbols whose frequency bins are not free data but complementary code
keying (CCK) codewords. A CCK codeword is a complementary sequence, so its
transform has a PAPR of exactly 2 (3 dB) whatever the data. Several short
codewords share one OFDM symbol without losing that bound, because they are
interleaved in frequency so that after the IFFT they sit on interleaved time
samples instead of overlapping.

The second half of the design is the multiplexing side: a 64-channel DFT
filter bank (a channelizer) in its non-maximally decimated form, which
decimates by M/2 = 32 instead of 64. Each channel is then sampled at twice
its spacing. Independent packets can sit on separate channels with arbitrary
timing, and the receiver splits them apart with the matching analysis bank.
A single 64-path polyphase interpolator of the same prototype filter
up-samples the transceiver's baseband.

Everything is complex fixed point, Q1.14 (16 bits per rail, 1.0 = 16384),
written in synthesizable SystemVerilog with elaboration-time constant tables.

## Block map

```
cck_ofdm_top
 ├─ cck_ofdm_tx        phases -> cck_encoder -> cck_interleaver -> fft_serial (IFFT) -> cp_insert
 ├─ polyphase_fb x2    I and Q interpolation by 64 of the transmit baseband
 ├─ cck_ofdm_rx        frame_detector, cp_remove -> fft_serial -> cck_interleaver (de-interleave) -> cck_decoder
 │                     preamble bins -> channel_estimator
 ├─ nmdfb_synth        64 channels -> one composite (IFFT, 64x12 polyphase, 2 commutators)
 ├─ nmdfb_analysis     composite -> 64 channels (serpentine buffer, 64x12 polyphase, IFFT)
 └─ channel_prefilter  order-37 low-pass on the analysis channel selected by an_sel
shared: cck_pkg (types, rounding, CCK sign pattern, prototype filter), twiddle_rom
```

The transceiver and the two channelizers have separate ports in the top.
The testbench closes two loopbacks, transmit baseband to receiver and
composite to analysis bank.

## CCK codewords

A codeword carries four QPSK phases φ1..φ4, which is 8 bits. Chip i
(i = 0..7, bits i0 i1 i2) has the phase

    θ_i = φ4 + i0·φ1 + i1·φ2 + i2·φ3 + π·s_i

The fixed sign pattern s inverts chips 2, 3, 4 and 6 (`CCK_SIGN = 8'b0101_1100`).
With this pattern every one of the 256 codewords is a complementary sequence,
and its DFT has a peak power of exactly twice its mean. The testbench of
`cck_encoder` checks this for all 256 codewords. The code rate is 1/2: 8 bits
ride on 8 QPSK chips.

`cck_decoder` is the fast-Walsh style decoder. It removes the sign pattern.
Each of φ1, φ2 and φ3 is then the phase of a sum of products of chip pairs
that differ in one index bit, z_i·conj(z_{i xor 2^k}), snapped to the nearest
axis. φ4 follows from the chips after those three rotations are taken out.
Latency is 2 clocks.

## Frequency interleaving

An OFDM symbol of N = 64 bins holds M = N/8 = 8 codewords C_r. Each codeword
is repeated across the whole band and rotated by a linear phase that stands
for a time shift of r samples:

    X[k] = (1/M) · Σ_r C_r[k mod 8] · e^{-j2πkr/N}

After the IFFT, codeword r sits on samples r, r+8, r+16, … and on no others.
The codewords never add in time, so the symbol keeps the 3 dB PAPR of one
codeword (checked in `tb_cck_ofdm_tx`). The receiver runs the dual:

    C_r[k0] = Σ_q X[8q+k0] · e^{+j2π(8q+k0)r/N}

Both directions share `cck_interleaver`, which has one complex MAC. It loads
64 words, spends N·M = 512 clocks computing, then drains 64 words.

## FFT

`fft_serial` is a radix-2 decimation-in-frequency FFT with one butterfly per
clock on a 64-word register file. A transform takes 6 × 32 = 192 butterfly
clocks between the last input and the first output. Input is in time order
and output in natural order, read at bit-reversed addresses. The twiddles
are e^{-j2πk/N}, computed at elaboration with `$cos`/`$sin` in
`twiddle_rom`. The inverse transform conjugates them.

With `scale` set, every stage divides by 2 (overall 1/N). The transmitter
uses this setting, and so do both channelizers. The receiver runs unscaled.
The butterfly keeps full precision up to one rounding per stage (round half
up, then saturate).

## Polyphase interpolator and prototype filter

The prototype is a 768-tap Kaiser-windowed sinc with cutoff at half the
channel spacing (β = 7.857, about 80 dB stop band):

    h[n] = sinc((n−383)/64) · I0(β·sqrt(1 − ((n−383)/383)²)) / I0(β),  h[767] = 0

It is a Nyquist filter: every 64th tap around the centre is zero. The
function `proto_coef` in `cck_pkg` computes it, and every filter bank builds
its coefficient table from it at elaboration.

`polyphase_fb` splits it into 64 paths of 12 taps. Each input sample enters
a 12-deep delay line. The 64 outputs that follow, one per clock, are dot
products with path 0, 1, …, 63, using 12 multipliers. Path 63 is a pure
delay of 5 samples, which is the Nyquist property.

## M/2 channelizers

This is the hardest part of the design to follow.

`nmdfb_synth` turns a frame of 64 channel samples X_k[m] into 32 composite
samples:

    y[n] = ½ Σ_m g[n − 32m] · v_m[n mod 64],    v_m = IFFT(X[m]) / 64

For output n = 32m + d, the taps that contribute are g[32j + d] for
j = 0..23. These are polyphase paths d and d+32 of the 64×12 matrix, which
are the two commutator positions. The IFFT output of the newest frame is
read with a circular offset of 32 on odd frames. That offset is the phase
correction: it keeps every channel's carrier continuous in absolute time,
so channel k is exactly X_k·e^{j2πkn/64}. The block keeps the last 24 IFFT
frames and forms each output with 24 parallel real-by-complex products.

`nmdfb_analysis` is the inverse. Every 32 input samples it forms the 64
path outputs

    w[p] = Σ_{q=0}^{11} h[64q+p] · x[t − 64q − p]

from a circular buffer of the last 1024 samples. This is the serpentine
shift: 32 new samples move the data half a column. On odd frames w is fed
with a circular offset of 32. A scaled 64-point IFFT then gives

    Y_k[m] = (−1)^{km}/64 · Σ_l h[l] · x[t − l] · e^{j2πkl/64}

so a tone at the centre of channel k comes out as a constant. Its fixed
phase is (−1)^k·e^{−j2πk/64}. As a result, odd channels come out with the
opposite sign.

Loop gain, synthesis into analysis, is 1/64 because both IFFTs are scaled.
A constant 16000 on one channel comes back as about 250 with the phase
above. The neighbouring channels stay within 1–2 LSB of zero.

## Cleaning up a channel: the pre-filter

The analysis side samples each channel at twice its spacing. A channel's
samples therefore also carry the band edges of its two neighbours, in the
outer half of its spectrum. This does no harm while all channels arrive with
the same delay. It does harm when a neighbour is shifted in time, which is
the normal case for asynchronous packets.

`channel_prefilter` is a 38-tap (order 37) linear-phase low-pass. Its
cutoff is a quarter of the channel rate, it removes the outer half, and it
delays the channel by 18.5 samples. The coefficients are a Kaiser-windowed
sinc (β = 5), normalised to unit DC gain. The testbench measures about
78 dB of rejection at 0.4 cycles/sample. The top filters the one channel
selected by `an_sel`.

## Frames and detection

A frame starts with a preamble symbol. Its even bins carry QPSK points and
all other bins are zero, so the preamble is two identical halves of 32
samples. NSYM data symbols follow, and every symbol has a 16-sample cyclic
prefix.

`frame_detector` computes the Schmidl–Cox correlation
P = Σ r[n]·conj(r[n−32]) and the energy R over the same 32-sample window.
It declares a frame while |P|²/R² > 1/2, evaluated without division as
2|P|² > R², with exact wide arithmetic. The receiver is told the first
sample of the frame by `in_sof`. From there `cp_remove` drops the prefixes.
The first FFT output, the preamble, does not go on to the data path.

Instead it goes to `channel_estimator`. This block divides each preamble
bin by the known transmitted bin to give the channel response H[k]. Because
the known bins are QPSK points of one amplitude, the division is a
quarter-turn rotation and a constant gain. Over an ideal link every estimate
is 1.0 (16384). The estimates come out on `rx_est_*`. They are not applied
to the data.

## Interfaces and timing

- **Streaming ports:** valid/ready, where a word moves when both are high.
  The interpolator and the synthesis channelizer output have no ready: they
  produce one sample per clock for a fixed number of clocks.
- **Reset:** `rst_n`, active low and synchronous.
- **Transmit pacing:** the polyphase interpolators take one baseband sample
  every 64 clocks, so they pace the transmitter through backpressure.
- **Analysis channelizer input:** it holds the composite off during its
  64-clock feed phase. A small FIFO in front of it absorbs this.

## Departures from the document

- The OFDM symbol is 64 points with 8 codewords, where the document uses
  128 points. 64 is the size of its FPGA FFT. N is a parameter.
- A frame holds 4 data symbols instead of 50 (parameter NSYM).
- The document's own frame, 128-point symbols with 50 per frame, runs in
  `tb_cck_ofdm_frame128`. It sends one full frame of 800 codewords through
  the transmitter and receiver built with N = 128 and NSYM = 50, and checks
  the decoded data and the PAPR of every symbol.
- The CCK sign pattern is chosen so that every codeword has a PAPR of
  exactly 2.
- Both channelizers and the interpolator use the Kaiser prototype above.
  The document designs the synthesis prototype with a modified Remez method
  whose coefficients are not available.
- The channel is estimated on the 31 QPSK bins of the short preamble. The
  document specifies a separate long preamble, and setting STEP = 1
  estimates on every bin. No equaliser applies the estimate, so data
  decoding assumes an ideal channel.
- The order-37 pre-filter is a Kaiser design rather than an equiripple
  one. The top filters one selectable channel, not every channel.
- The receiver gets the frame start as a strobe. The detector only reports
  that a frame is present.
- Only QPSK is used: there is no 16-QAM or 64-QAM mapping.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. Each compares against a real-arithmetic
model written independently of the RTL; `tb/cck_ref_pkg.sv` holds the
shared parts. For example, with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/cck_pkg.sv tb/cck_ref_pkg.sv \
          tb/tb_cck_ofdm_top.sv --top tb_cck_ofdm_top -o sim
./obj_dir/sim
```

`tb_cck_ofdm_top` runs the whole design at its default parameters. It sends
two CCK-OFDM frames through the interpolators and the receiver, and checks
every decoded codeword and every interpolated sample. It also sends 100
frames through the channelizer loopback and checks channel gain, phase and
isolation, the pre-filtered channel and the channel estimates. It counts
each mechanism as it happens: detections, FFT and interleaver runs, stalls,
discarded preambles, odd-frame phase corrections, analysis hold-offs,
pre-filtered samples and channel estimates. Each block's testbench also
checks its latency or rate: 192 clocks for the FFT, 64 outputs per input
for the interpolator, 32 outputs per frame for the synthesis channelizer
and one clock for the estimator and the pre-filter.

Two more testbenches run the document's test cases. `tb_cck_ofdm_frame128`
sends one frame at its full OFDM size. `tb_nmdfb_five_channels` puts five
packets on channels 1, 5, 6, −3 and −5, with 5 and 6 adjacent, and loops
them through both channelizers. It checks that each active channel returns
only its own packet and that the other 59 channels stay empty.
