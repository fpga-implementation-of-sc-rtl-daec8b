# SC-FDE timing synchronizer

This is RTL for the receiver block of a single-carrier frequency-domain-equalization
(SC-FDE) link that finds where a frame starts in a stream of complex baseband samples.
Timing is found in two stages, both driven by the frame's preamble:

* **Coarse stage.** A Schmidl–Cox style delay autocorrelation. It detects the periodic
  short preamble and wakes the rest of the receiver.
* **Fine stage.** A cross-correlation of the one-bit quantized signal with the known long
  training symbol. It counts the four correlation peaks of the long preamble. It then
  releases the stream from the first long training sample on: the long preamble for
  channel estimation, then the data.

Every stage is reshaped for cheap hardware:

* sliding-window sums instead of wide adders;
* a three-multiplier complex product;
* |a|+|b| in place of a square root;
* a shift in place of the divider;
* ±1 quantization, so the 64-tap correlator needs no multiplier.

The whole synchronizer uses five small real multipliers, all in the coarse stage.

The algorithm, its constants (D = 32, L = 32, threshold 0.5, hold of 50 samples, M = 64,
four peaks) and the block structure follow the published FPGA design that this RTL
implements. Word lengths, the fine threshold, the buffer depth, the replay store, the pipelining
and the restart behaviour are choices made here. They are listed in "Choices and departures" below.

## The preamble it looks for

```
| A | A | A | A | A | A | A | A |   C   |   C   |   C   |   C   | data blocks ...
  8 x 32-sample short symbols         4 x 64-sample long symbols
```

Both training symbols are CAZAC chirps, `c_n = exp(j*pi*n^2/N)`, with N = 32 for A and
N = 64 for C. The chirp with even N repeats with period N, so a run of repeated symbols
is periodic. Its cyclic autocorrelation is zero away from lag 0, so the long symbol gives
one sharp correlation peak per repetition.

## Coarse stage (`coarse_sync`)

For every sample the stage forms

```
C_n = sum_{k=0}^{31} r_{n-k} * conj(r_{n-k-32})      (delay correlation)
P_n = sum_{k=0}^{31} |r_{n-k-32}|^2                   (energy of the delayed samples)
decision: |Re C_n| + |Im C_n|  >  P_n >> 1            (m_n = |C_n|/P_n > 0.5)
```

A 50-bit shift register collects the decisions. The frame is found when all 50 bits are
ones, so the decision must have held for 50 consecutive samples. During the 32-periodic
short preamble m_n sits near 1. In steady noise it stays well below 0.5.

The parts, in the order the data flows:

| module | role |
|---|---|
| `delay_corr_energy` | 32-sample delay line, conjugation, `cmult3` product, two `sliding_window_acc` (Re, Im), `amp_reduce` |
| `cmult3` | `Zr = Ar(Br+Bi) − Bi(Ar+Ai)`, `Zi = Ar(Br+Bi) − Br(Ar−Ai)`: three multipliers, three pre-adders |
| `sliding_window_acc` | 32-deep shift RAM; `sum += new − oldest`, exact because everything starts at zero |
| `corr_window_energy` | `Re²+Im²` of the delayed sample, sliding sum, 3-stage alignment buffer |
| `frame_search` | divider-free comparison and the 50-bit hold register |
| `coarse_control` | SEARCH → OUTPUT when the frame is found; `restart` goes back |
| `coarse_data_buffer` | 64-entry circular RAM; the stream leaves it 64 samples late, and only in OUTPUT |

**Why the hold length matters.** P_n measures only the *delayed* half of each pair. When
a strong signal follows weak noise, |C_n| is large compared with P_n even though nothing
repeats. A burst of interference therefore lifts m_n above 0.5 for about as long as the
burst lasts. The 50-sample hold rejects such runs. The end-to-end testbench checks this
with a 20-sample burst four times stronger than the noise. The start of a real preamble
also drives m_n up at once, for the same reason. In the accuracy sweep below, from 3 dB
up, detection came 43 to 213 samples into the 256-sample short preamble. It never came in
the noise ahead of the preamble. At 0 to 2 dB it came as late as 285 samples, 29 samples
into the long preamble. Because of the buffer described next, the fine stage still
received the whole long preamble.

**Why there is a buffer.** Detection happens well after the preamble starts. The buffer
keeps the last 64 samples, so the fine stage receives the stream from a point inside the
short preamble, ahead of the long preamble it needs. The buffer must not be deeper than
the shortest possible detection latency (D + 50 = 82 samples). Otherwise the released
stream could begin with samples from before the frame.

## Fine stage (`fine_sync`)

| module | role |
|---|---|
| `quantizer` | I and Q to ±1 by sign (zero counts as +1), coded as the sign bit |
| `matched_filter` | 64-bit shift registers of signs, correlation with the local long symbol, `amp_reduce`, threshold peak count |
| `symbol_output` | 256-sample replay store and output gate; releases the stream once four peaks are counted |

With the sample quantized to `qr + j·qi` (each ±1), each tap's product with a coefficient
`a + jb` reduces to additions:

```
conj(a + jb) * (qr + j qi) = (a*qr + b*qi) + j(a*qi − b*qr)
```

The 64 coefficients are `2047·exp(j·pi·m²/64)`. Because `m² mod 128` fixes the phase, the
package holds only the 33 values `round(2047·cos(pi·k/64))`, k = 0..32. It rebuilds the
rest of the circle by symmetry (`sc_fde_pkg::lts_coef`). The oldest sample in the window
meets coefficient 0, so the correlation peaks on the *last* sample of each long training
symbol.

There is no search for a maximum. A peak is a rise of `|Re|+|Im|` above `THRESH`. An ideal
quantized peak is about 64·2047·4/π ≈ 167,000. Random ±1 input stays mostly below
100,000; the highest value seen in testing was about 102,000. The default threshold is
105,000, about 0.63 of the ideal peak. Four rises make `peak_found`. After that the
counter holds until `restart`.

**Getting the first sample right.** The fourth peak is only known after the whole long
preamble has gone past, yet the output must begin with that preamble. `symbol_output`
therefore keeps the last `LEAD` = 256 samples in a circular RAM. Each write first reads
the entry it overwrites, so the store's output is the stream 256 samples late. It counts
samples, not clocks, so input gaps do not matter. A 3-clock pipeline follows.

The peak decision for a sample becomes visible 4 clocks after the sample leaves the
quantizer. Take the sample right after the fourth peak. Its stand-in from the store, the
sample 256 places earlier, reaches the output gate in the very clock in which the
fourth-peak decision appears. The first sample released is therefore 256 samples before
the first data sample. That is the first
sample of the first long training symbol. The long preamble and the data then follow in
order, with no gaps added. `out_first` marks that first sample, and the data starts 256
samples after it.

Both the coarse buffer and the replay store are delay lines. When the input stops, the
last 64 + 256 samples of a frame are still inside them. They leave only as later input
pushes them out. To flush them, keep feeding samples (noise will do) before asserting
`restart`, which stops the coarse buffer's output. With `OUT_LEAD = 0` the store
is left out and the output starts at the first data sample. Nothing is released before
the store has been filled once after reset.

## Interface and timing (`sc_fde_timing_sync`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `restart` | in | 1 | re-arm both stages for the next frame |
| `in_valid`, `din` | in | 1, `sample_t` | one received sample (8-bit signed I and Q) when `in_valid` |
| `coarse_found` | out | 1 | coarse stage has found a frame (level) |
| `c_mag`, `p_sum`, `m_above`, `det_buf` | out | 23, 21, 1, 50 | \|C_n\| estimate, P_n, last decision, hold register |
| `fd_valid`, `fd_out` | out | 1, `sample_t` | coarse buffer output (input of the fine stage) |
| `corr_mag`, `peak_count` | out | 20, 3 | fine correlation magnitude, peaks counted |
| `fine_found` | out | 1 | four peaks found (level) |
| `out_valid`, `out_first`, `dout` | out | 1, 1, `sample_t` | synchronized stream: the four long training symbols, then the data |

There is no back-pressure. At most one sample is accepted per clock, and `in_valid` may
have gaps. The sliding windows, delay lines and shift registers advance only on valid
samples. The pipeline registers advance every clock and carry a valid bit, so every
latency below is fixed in clocks.

| path | latency |
|---|---|
| `din` → \|C_n\| and P_n at the frame search | 6 clocks |
| sample completing the 50-sample hold → `coarse_found` | 8 clocks |
| accepted `din` → `fd_out` (while enabled) | 1 clock, carrying the sample from 64 samples earlier |
| `fd_out` → fine peak decision | 5 clocks |
| `fd_out` → `dout` | 256 samples (`OUT_LEAD`) plus 5 clocks |

Default parameters: `D = 32`, `L = 32`, `HOLD = 50`, `BUF_DEPTH = 64`, `M = 64`,
`N_PK = 4`, `FINE_THRESH = 105000`, `OUT_LEAD = 256`. Word lengths carry full precision: products are 17
bits, correlation sums 22 bits, magnitude 23 bits, energy sum 21 bits and fine
correlation 19 bits. Nothing saturates for 8-bit input.

## Measured behaviour

`tb_sync_accuracy` sends 2,000 frames at each SNR through a three-path channel. The path
delays are 0, 1 and 2 samples (0, 0.4 and 0.9 µs at 2.5 Msample/s), the powers 0, −5 and
−10 dB, and each path gets a random phase per frame. SNR is the total received signal
power over the noise power. A frame counts as correct only if the first released sample
is the first sample of the long preamble:

| SNR (dB) | −10 … −6 | −4 | −2 | 0 | 2 | 3 | 4 | 6 | 8 | 10 |
|---|---|---|---|---|---|---|---|---|---|---|
| correctly timed (%) | 0 | 0 | 3.0 | 42.2 | 84.9 | 94.2 | 98.0 | 99.8 | 100.0 | 99.9 |
| unquantized reference (%) | 0 … 0.1 | 0.9 | 20.9 | 84.3 | 99.8 | 100.0 | 100.0 | 100.0 | 100.0 | 100.0 |

Below 0 dB most frames are never detected by the coarse stage. At those SNRs the short
preamble's m_n seldom stays above 0.5 for 50 samples in a row. From 2 dB up every frame
is detected, and almost every miss is a fine search that found fewer than four peaks.
A few are a false peak. No frame at any SNR was detected in the noise before its
preamble.

The reference row scores a full-precision correlator in the testbench on the same stream
from the coarse buffer. It correlates the unquantized samples with the exact long
training symbol and divides the magnitude by the window energy, so an ideal peak is 1.
It counts rises above 0.4. The gap between the two rows is the price of the one-bit
quantizer. It is large around 0 dB (42 % against 84 %), a few points at 3 to 4 dB, and
gone from about 6 dB up. Below −2 dB both are limited by the coarse stage, which they
share.

The original design shows the same shape: about 0.5 against 0.93 at 0 dB, and both
near 1 from 8 dB. It reports above 85 % at 3 dB and almost 100 % from 8 dB. The
testbench requires those figures (85 % at 3 dB, 99 % at 8 and 10 dB). It also requires
the two rows to agree within 1 point from 8 dB up, and the quantized search never to
beat the reference by more than 2 points. The original design's unquantized curve stays
high down to −3 dB. That suggests its reference did not pass through a coarse stage
like this one.

The fine threshold sets the balance between the two kinds of fine miss. In an earlier
sweep at 3 dB, 100,000 gave 97.1 % but let false peaks through even at 10 dB. 110,000
gave 87.8 %, and 120,000 gave 69.7 %, with almost all of those misses from peaks that
fell short.

Two more 10 dB runs add a carrier frequency offset. At 1 kHz (0.4·10⁻³ cycles per sample)
all 2,000 frames were timed correctly. At 5 kHz, 1,999 were. Over one 64-sample long symbol
a 5 kHz offset turns the phase by 0.8 rad. That lowers the fine peak, but the peak still
clears the threshold at this SNR.

## Choices and departures

* **Output after the fourth peak.** The long training symbols and the data leave in
  order, as the original design describes. The 256-sample replay store that makes this
  possible is this implementation's; the original design does not show how it keeps the
  long preamble. One of its published waveform snapshots instead shows the output equal
  to the input at the same moment, a plain pass-through. `OUT_LEAD = 0` gives that
  behaviour, with the output starting at the first data sample.
* **Fine threshold** 105,000 and **coarse buffer depth** 64 are this implementation's
  values. The threshold was picked from the sweep above.
* **Peak counting** counts threshold crossings. It does not check that the peaks are 64
  samples apart. A false crossing before the long preamble would end the search early.
* **Restart.** After a frame, both stages stay locked until `restart`. No automatic frame
  end or timeout exists.
* **Conjugation side.** `C_n` conjugates the older sample of each pair. Conjugating the
  newer one instead gives the complex conjugate of `C_n`, with the same magnitude.
* **No frequency-offset correction.** The correlation relies on a small carrier offset,
  as the original design does.
* **Resources.** The five real multipliers are three in `cmult3` (8×9 bits) and two for
  the energy (8×8). The 64-tap fine correlator is adders only. The coarse buffer is a
  1,024-bit RAM and the replay store a 4,096-bit RAM. Generic synthesis of the top at
  default parameters gives 3,293 flip-flop bits. About 2,100 of them are the three
  32-deep sliding-window shift registers, which an FPGA tool can map to RAM instead. For
  comparison, the original design reports 1,027 ALMs, 1,272 registers, 3,262 memory bits
  and 4 DSP blocks on a Cyclone V 5CGXFC5. No FPGA mapping was done here.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_sc_fde_pkg.sv` holds the shared stimulus
helpers: chirps built with real arithmetic, noise, and 16-QAM. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sc_fde_timing_sync \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/sc_fde_pkg.sv tb/tb_sc_fde_pkg.sv \
  tb/tb_sc_fde_timing_sync.sv
./obj_dir/Vtb_sc_fde_timing_sync
```

The main testbenches:

* `tb_sc_fde_timing_sync` runs two frames at default parameters. The first has an
  interference burst that the hold length must reject. The second arrives with input gaps
  after a `restart`. It checks every released sample and counts each mechanism.
* `tb_coarse_sync` compares |C_n| and P_n with a direct computation on every sample, and
  checks the exact clock of detection.
* `tb_sync_accuracy` runs the 28,000-frame accuracy sweep (about 45 s), including the two
  frequency-offset runs. It prints the accuracy, the kinds of miss and the unquantized
  reference's accuracy for each run.

To change the operating point, override `FINE_THRESH`, `BUF_DEPTH`, `HOLD` or `OUT_LEAD` on
`sc_fde_timing_sync`. The sample width and the coefficient scale are constants in
`rtl/sc_fde_pkg.sv`.
