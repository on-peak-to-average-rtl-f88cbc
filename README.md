# Low-complexity SLM PAPR reduction for an 802.11n-style MIMO-OFDM transmitter

An OFDM symbol is the sum of many independently modulated subcarriers.
Now and then those subcarriers add up in phase, and the time signal
gets a peak far above its average power. A high peak-to-average power
ratio (PAPR) forces the power amplifier of every transmit antenna to run
with a large back-off. *Selected mapping* (SLM) reduces the PAPR. The
transmitter forms several versions ("candidates") of the same symbol,
each with its subcarriers multiplied by a different phase vector. It
sends the candidate with the lowest PAPR, plus a few bits of side
information that tell the receiver which phase vector was used.

Plain SLM with M candidates needs M IFFTs per antenna. This design uses
one IFFT per antenna and derives the other three candidates in the time
domain with *conversion matrices*. Because of the chosen phase vectors,
these matrices need only additions, sign changes, real/imaginary swaps and
one-bit shifts. This SLM unit sits in each of the four transmit chains of
a 20 MHz, 64-subcarrier 802.11n-style transmitter. The SystemVerilog
includes that transmitter's scrambler, encoder parser, convolutional
encoders, stream parser, QAM mapping, pilot insertion and guard-interval
insertion.

## Transmitter structure

```
data bits -> scrambler -> encoder parser -> N_ES conv. encoders -> stream parser -> cs_bits[N_TX]
                                                                                      |
                                                     (bit interleaver: not included)  v
sc_bits[a] -> QAM mapping -> pilot insertion / subcarrier placement -> SLM chain -> guard interval -> td_data[a]
                 (one such chain per transmit antenna a = 0..N_TX-1)
```

The top module `slm_mimo_tx` has two halves. The bit interleaver belongs
between them but is not included. Its place is marked by ports: the stream
parser's output `cs_valid/cs_bits` and the mapper's input
`sc_valid/sc_ready/sc_bits`. Spatial mapping is direct: stream `a` feeds
antenna `a`. The side-information decoder of the receiver (`si_decoder`)
is in the top as a separate combinational block with its own ports.

Defaults: `N_TX = 4` antennas (= spatial streams) and `N_ES = 2`
encoders. These are the largest 20 MHz configuration of 802.11n.

## The SLM chain and the conversion matrix (`slm_tx_chain`, `conv_matrix`)

Each phase vector `b` here repeats every four subcarriers. The three used
besides the all-ones vector are `[1, j, 1, j]`, `[1, j, 1, -j]` and
`[1, j, -1, j]`. A frequency-domain product with a period-4 sequence is a
circular convolution in time, and that sequence's inverse DFT is non-zero
only at lags 0, 16, 32 and 48. So with `x = IFFT(X)`, candidate `i` is

```
s_i[n] = sum_{l=0..3} g_l * x[(n - 16 l) mod 64],   g_l = (1/4) sum_{p=0..3} b_p j^(p l)
```

For the three vectors, the coefficients `(g_0, g_1, g_2, g_3)` are:

| phase vector      | g_0      | g_1  | g_2      | g_3 |
|-------------------|----------|------|----------|-----|
| `[1, j, 1, j]`    | (1+j)/2  | 0    | (1-j)/2  | 0   |
| `[1, j, 1, -j]`   | 1/2      | -1/2 | 1/2      | 1/2 |
| `[1, j, -1, j]`   | j/2      | 1/2  | -j/2     | 1/2 |

Each candidate sample is therefore a sum of at most four
quarter-scaled, possibly rotated samples of `x`. `conv_matrix` computes
the coefficients from its `PVEC` parameter at elaboration. Another
period-4 vector of quarter turns can be put in without changing code.
The 64×64 conversion matrix is never stored.

`slm_tx_chain` handles one symbol at a time:

| phase | clocks | what happens |
|-------|--------|--------------|
| LOAD  | 64 | bins X[0..63] are taken on `in_valid/in_ready`; the five side-information bins are written as zero |
| FFT   | 7  | `ifft64` runs its 6 stages |
| SCAN  | 64 | for each n, the plain sample and the three converted samples are formed; `papr_select` accumulates peak and energy of each |
| PICK  | 1  | the index of the lowest PAPR and the side-information level are registered |
| OUT   | 64 | the chosen candidate plus the side-information waveform, one sample per clock (saturated to Q2.14) |

`out_first` comes 74 clocks after the clock edge that takes the last bin.
Fed at full rate, a chain handles one symbol per 203 clocks. The output
has no back-pressure.

PAPR selection (`papr_select`) needs no divider. Candidate `i` beats `b`
when `peak_i * energy_b < peak_b * energy_i`. On a tie the lower index
wins, so the unrotated symbol is preferred. The PAPR is measured on the
64 transmitted (Nyquist-rate) samples, not on an oversampled signal.

## Side information (`si_encoder`, `si_tone_gen`, `si_decoder`)

The receiver needs the 2-bit candidate index. It is protected by a (5,2)
shortened Hamming code with minimum distance 3. The code comes from a
(7,4) Hamming generator matrix: two of its rows are kept and two of the
columns are dropped. As `cw[4:0]`, the codewords for index 0..3 are
`00000, 01111, 10101, 11010`. The five bits go out as BPSK on five reserved
subcarriers: bins 3, 15, 27, 39, 51 (subcarriers +3, +15, +27, -25,
-13). Those bins carry no data. Their level `a` is the `si_level` input in
Q2.14 (1.0 = 16384; 0 turns the side information off).

The tones are not rotated by the phase vector, because the receiver must
read them before it knows the vector. They are therefore added in the
time domain after the selection. `si_tone_gen` forms `(a/64) * sum_t ±exp(j 2π k_t n / 64)`
from a cosine/sine table. A higher level makes the side information more
robust and raises the PAPR a little, because the tones are not part of
the minimisation.

`si_decoder` picks the nearest codeword to a received hard-decided word.
It corrects one bit error (`corrected`) and flags words at distance ≥ 2
from every codeword (`detected`).

## The IFFT (`ifft64`)

The 64-point inverse FFT does one radix-2 stage per clock, so the
transform takes 6 clocks. All 64 samples sit in registers. It uses
constant-geometry decimation in frequency. In every stage, butterfly `i`
reads positions `i` and `i+32` and writes `2i` and `2i+1`. Only the
twiddle changes between stages: exponent `(i >> s) << s` of
`exp(+j2π/64)` in stage `s`. The result ends in bit-reversed order;
`x_out` is wired back to natural order. Each stage halves its outputs, so
the transform includes the 1/64 factor. The price of one stage per clock
is 32 butterflies in parallel, with 17-bit twiddles from tables computed
at elaboration.

## Front end

- `scrambler`: additive scrambler with the generator x^7 + x^4 + 1. It is
  loaded with a 7-bit seed on `init`.
- `encoder_parser`: deals the scrambled bits out to the `N_ES` encoders in
  turn.
- `conv_encoder`: rate-1/2, constraint length 7, generators 133 and 171
  (octal). It takes one bit and gives two coded bits per clock. There is
  no puncturing, so the only code rate is 1/2.
- `stream_parser`: sends blocks of `s = max(1, N_BPSC/2)` coded bits to
  the spatial streams in turn. Input is one coded pair per clock; a pair
  may be split across two streams.
- `qam_mapper`: Gray-mapped BPSK, QPSK, 16-QAM and 64-QAM, scaled to unit
  average power (factors 1, 1/√2, 1/√10, 1/√42).
- `pilot_insert`: builds the 64 bins in bin order. Bin 0 and bins 29..35
  are zero. Pilots sit at subcarriers -21, -7, +7, +21 with values
  1, 1, 1, -1. The five side-information bins are left empty. The other
  **47** bins take data points, against 52 in standard 802.11n: reserving
  tones for the side information costs bit rate.
- `gi_insert`: repeats the last 16 samples in front of the 64, giving 80
  samples per 4 µs symbol at 20 MHz.

The modulation input `mod` (0 = BPSK … 3 = 64-QAM) drives both the mapper
and the stream parser. Change it only together with `init`, while the
chains are idle.

Timing at the top: the first guard-interval sample (`td_first`) appears
139 clocks after a chain has taken its last bin. The data half takes one
bit per clock. At 203 clocks per symbol, a chain keeps up with 802.11n
symbol timing (one symbol per 4 µs) only with a clock of at least about
51 MHz.

## Number format

Samples are complex with 16-bit two's-complement parts in Q2.14 (range
[-2, 2), 1.0 = 16384). A unit-power constellation point has a magnitude
of about 16384. After the 1/64 scaling of the IFFT, time samples are
roughly 64 times smaller. That leaves plenty of headroom and about 8
effective bits for a typical sample. Arithmetic truncates (floor) after
each IFFT stage and after the conversion matrices. The final sum with the
side-information tones saturates. Twiddles and tone tables are 17-bit
with 1.0 = 16384.

## Departures and limits

What follows the design this RTL implements:
- the SLM structure with one IFFT and conversion matrices;
- M = 4 and the three phase vectors;
- the 2-bit side information, coded with the (5,2) shortened Hamming
  code and sent as BPSK on reserved tones at an adjustable level;
- the 16-bit word length;
- the 64-point transform with a 16-sample guard interval;
- the transmitter's block order;
- an IFFT that does one stage per clock and an encoder that takes one bit
  per clock.

Taken from 802.11 practice, because the design names these blocks without
detailing them:
- the scrambler polynomial;
- the encoder generators;
- the stream-parser block size;
- the Gray constellations;
- the pilot positions.

This design's own choices:
- the Q2.14 format;
- the sequential chain schedule and the handshakes;
- the side-information tone positions;
- adding the tones after selection;
- the cross-multiplied PAPR comparison.

Not built, and other limits:
- The bit interleaver, cyclic-shift insertion, spatial
  expansion, space-time block coding, beamforming, optional windowing and
  puncturing (code rates 2/3, 3/4, 5/6).
- 20 MHz only (N = 64). The 40 MHz mode would need a 128-point IFFT.
- The standard 802.11 interleaver assumes 52 data subcarriers. Here there
  are 47, so an interleaver for this design would need its own
  permutation.
- Pilots carry fixed values, without the per-symbol polarity sequence.
- PAPR is measured at the Nyquist rate (64 samples). An oversampled
  measurement would catch peaks between samples.
- The side-information tone positions, the phase-vector ordering (index
  1..3 = the three vectors above) and the level encoding are this
  design's choices.
- Both the data half and the per-antenna half have no output
  back-pressure: consumers must take samples as they come.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.
`tb/slm_ref_pkg.sv` is a floating-point reference that computes every
candidate with a full inverse DFT (an "IFFT bank"). It therefore shares no
arithmetic with the conversion-matrix hardware. The end-to-end test
`tb_slm_mimo_tx` runs the top at its default size:

- four modulation phases;
- random bit groups with stalls on all four antennas;
- random data bits through the whole coding path;
- a side-information level that cycles through 1, 0.7, 0.4 and 0.

It checks every output sample, the chosen candidate, the codeword, the
139-clock latency and every coded bit. It fails if any candidate,
modulation, side-information setting, stall, split pair or reseed never
occurs.

`tb_slm_papr_ccdf` measures the statistics that motivate the design. It
sends 300 random QPSK symbols through one SLM chain at each
side-information level and measures the PAPR of what comes out:

| threshold | P(PAPR > x), no SLM | P(PAPR > x), SLM M = 4 |
|-----------|---------------------|------------------------|
| 6 dB      | 0.76                | 0.35                   |
| 7 dB      | 0.32                | 0.027                  |
| 8 dB      | 0.083               | 0                      |
| 9 dB      | 0.013               | 0                      |

The mean PAPR rises from 5.81 dB without side information to 5.85, 5.94
and 6.05 dB at a = 0.4, 0.7 and 1. These are Nyquist-rate numbers. An
oversampled measurement gives higher absolute values.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/slm_pkg.sv tb/slm_ref_pkg.sv tb/tb_slm_mimo_tx.sv \
    --top-module tb_slm_mimo_tx -o sim
./obj_dir/sim
```

Another testbench, for example that of the IFFT:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/slm_pkg.sv tb/tb_ifft64.sv --top-module tb_ifft64 -o sim
```

Only `tb_slm_mimo_tx` needs the floating-point reference package
`tb/slm_ref_pkg.sv`. The full-size end-to-end test builds and runs in
well under a minute. The code is plain IEEE 1800-2017 with no
simulator-specific constructs. Assertions check the handshake rules:
no IFFT writes while it is busy, a new symbol into the guard-interval
buffer only once it has room, bin 0 marked by the placer, one encoder
fed per clock.
