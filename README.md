# Frequency-domain CWT processor for radar vital-sign signals

A continuous-wavelet-transform (CWT) engine that takes one 4096-sample segment
of a radar Doppler signal and returns its Morlet CWT at 25 scales. The goal is
to find body movements, which show up as bursts of energy at roughly 4 to 20 Hz
in a signal that otherwise carries only breathing and heartbeat. Rather than
convolving in time, the processor works in the frequency domain:

    X = FFT(x)                      one forward transform of the segment
    P_s[k] = X[k] * Psi_s[k]        per scale s, only where Psi_s[k] != 0
    W_s = IFFT(P_s)                 one inverse transform per scale

The main idea is that the band-pass Psi_s of each Morlet scale is non-zero on
only a short run of FFT bins. If you keep just those bins, the work and storage
shrink by about two orders of magnitude:

* Only scales 26..50 are computed (25 scales), the band where movements show.
* For each scale, only the bins where its 8-bit wavelet sample is non-zero are
  stored and multiplied. Across all 25 scales that is 6144 words.
* So only FFT bins 40..709 are ever needed, which gives 670 words per part
  (real and imaginary).
* The wavelet table and the real half of the products share one memory. Each
  wavelet word is read, multiplied, and overwritten in place by its product.
* Two multipliers, one for the real part and one for the imaginary part, make
  the whole product pass take 6144 cycles.
* Multiplication starts while the FFT is still delivering bins.
* The inverse transforms take the packed products, with zeros inserted in
  front of and behind each scale's bins. The 25 inverse transforms follow each
  other without gaps.

One run takes 125,164 clock cycles from the first input sample to the last
coefficient.

## Data flow and memories

```
 x_data ──► FFT (4096, 20 bit) ──bins 40..709──► RAM1 (re) 670x20
                                                 RAM2 (im) 670x20
                                                      │ bin of scale j
                         RAM4 6144x28 ──wavelet──►  Mult1 (re x psi) ──► RAM4 (same word)
                         (wavelets,                 Mult2 (im x psi) ──► RAM3 6144x28
                          then re products)
   RAM4 / RAM3 ──► zero insertion ──► IFFT (4096, 28 bit) x 25 ──► cwt_re / cwt_im
```

| Memory | Words x bits | Contents |
|---|---|---|
| RAM1, RAM2 | 670 x 20 | real and imaginary FFT bins 40..709, at address bin-40 |
| RAM4 | 6144 x 28 | at power-up: the wavelet samples (8 bit, zero-extended); after a run: the real products |
| RAM3 | 6144 x 28 | the imaginary products |

These four memories hold 370,864 bits. The two FFT cores hold their own delay
lines and reorder buffers on top of that.

### Scale table and packing

The wavelets of scales 26..50 are packed one after another in RAM4. Scale `j`
(0..24, meaning scale 26+j) starts at word `SCALE_OFF[j]`, the sum of the
lengths of the scales before it. Its words hold bins `SCALE_START[j]`,
`SCALE_START[j]+1`, and so on. The first bins run 204, 191, 178, …, 43, 40 and
the lengths 506, 472, 440, …, 102, 20. Both tables are in `rtl/cwt_pkg.sv`.

The full ranges add up to 6220 words, but the memory has 6144. The last 76
bins of scale 50 are therefore left out: that scale keeps bins 40..59 instead
of 40..135. This cut keeps three things unchanged:

* the lowest bin in use (40);
* the highest bin in use (709, the end of scale 26);
* bin 204, the one that starts the multiplication.

The cost is that scale 50 loses most of its band. Its coefficients are a
narrow-band, low-amplitude version of the full scale.

### Wavelet samples

`morlet_sample(j, k)` in `rtl/cwt_pkg.sv` computes the stored values:

    psi = 2 * exp(-(6*k/c - 6)^2 / 2),   c = (first bin + last bin) / 2 of scale j

This is the frequency-domain Morlet with centre frequency 6, placed so that its
peak sits in the middle of the scale's bin range. Values are unsigned Q1.7
(128 = 1.0), saturated at 255 and rounded to nearest. With this choice the
value at the first and at the last bin of every range is about one LSB. So the
stored ranges are where the 8-bit wavelet is really non-zero.

RAM4 is loaded with these values by an `initial` block at elaboration; on an
FPGA, this becomes the memory's power-up contents. No data file is needed.

## The multiplication pass and RAM4 in place

The FFT delivers bins in natural order, one per cycle. Bins 40..709 are
written to RAM1/RAM2 as they appear. Scale 26 is the first to be multiplied,
and it needs bins 204..709. The pass therefore starts one cycle after bin 204
has been written, and it then reads one word per cycle:

* the captured bin `SCALE_START[j] + l` from RAM1/RAM2;
* RAM4 word `i = SCALE_OFF[j] + l`.

Since scale 26 reads bin b one cycle after it was written, and each later
scale starts at a lower bin, the reader never overtakes the writer. An
assertion in `cwt_control` checks this.

The pipeline is:

| Cycle | Stage |
|---|---|
| t | memory read |
| t+1 | operand registers |
| t+2 | multiplier register |
| t+3 | Mult1 writes word i of RAM4, Mult2 writes word i of RAM3 |

A word is always written three cycles after it was read, and RAM4 reads and
writes on every cycle of the pass. Because the write address trails the read
address, no wavelet sample is overwritten before it has been used. Another
assertion checks the three-cycle distance.

Because a run replaces the wavelets in RAM4 with products, RAM4 must be
reloaded before the next run. This is done through the `wav_*` port while the
processor is idle, 6144 writes. The test bench does this between its two runs.

## The FFT/IFFT core (`fft_stream`)

Both transforms use one streaming core, a radix-2 decimation-in-frequency
single-path delay-feedback pipeline:

* There are 12 stages (`fft_sdf_stage`), with delay lines of 2048, 1024, … 1
  words.
* A two-bank bit-reversal buffer (`fft_reorder`) follows, so bins leave in
  natural order.

Timing:

* One sample per clock goes in and one bin per clock comes out.
* Frames may follow each other back to back.
* From the first input sample to bin 0 takes 2N + log2(N) + 1 = 8205 cycles.
* After the last frame the core drains by itself.

All stages move in lockstep under one enable, and each knows its place in the
frame from a shared sample counter. This keeps the control small. It also
means the sink side has to be contiguous: `sink_sop` only when `sink_ready`,
then N samples without a gap. Assertions check both rules.

Scaling:

* Every butterfly halves its outputs, with round-half-up.
* The twiddled difference is saturated. The twiddles are 16 bit, with
  14 fraction bits.
* The forward core therefore returns DFT(x)/N and never overflows.
* The inverse core (`INVERSE=1`) swaps real and imaginary parts at its input
  and output. It returns the exact inverse DFT, sum(X)/N.

Input samples are 20 bit. The forward FFT works at 20 bit and the IFFT at
28 bit, the product width. A coefficient therefore comes out as

    W_s[t] = (1/N) * sum_k  (DFT(x)[k]/N) * psi_s[k] * e^{+j 2 pi k t / N}

in the same units as `x` times 128/N. With a full-scale input the outputs stay
well inside 28 bits. Only the bins of positive frequency are used, so the
result is the complex (analytic) CWT: `cwt_re` and `cwt_im` together give its
magnitude and phase.

## Sequencing and timing (`cwt_control`)

| State | What happens | Cycles |
|---|---|---|
| IDLE | wait for `start`; RAM4 may be reloaded | – |
| LOAD | 4096 samples into the FFT, one per cycle while `x_ready` is high | 4096 |
| MULT | FFT latency to bin 0, then bins 0..204, then one cycle | 4109 + 205 |
| | 6144 products, plus the 3-cycle pipeline and 2 cycles to the IFFT | 6149 |
| FEED | 25 frames of 4096 to the IFFT, back to back, zeros around each scale's bins | 102,400 |
| OUT | from the end of the feed to the last coefficient: the IFFT latency (2N+13) less the frame just fed, plus that frame's 4096 outputs | 8205 |
| total | first FFT sample to last coefficient | **125,164** |

The feed of the IFFT begins only when the last product has been written. The
IFFT output therefore overlaps the feed: coefficients of scale 26 appear while
later scales are still being fed. `cycle_count` holds the cycle total after
each run, and the end-to-end test checks it exactly.

The published total for the original implementation is 125,307 cycles. Most
of the difference comes from the transform core: this core needs N+13 cycles
from its last input sample to its first bin, where the original core is given
N+84.

## Interface (`cwt_processor`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse in idle starts a run |
| `busy`, `done` | out | 1 | run in progress; one-cycle pulse after the last coefficient |
| `cycle_count` | out | 32 | cycles from the first FFT sample to the last coefficient of the last run |
| `x_valid`, `x_ready`, `x_data` | in/out/in | 1/1/20 | signal samples, signed; a sample is taken when both are high; the 4096 samples must follow each other without a gap |
| `wav_we`, `wav_addr`, `wav_data` | in | 1/13/8 | reload of RAM4 (packed layout above), idle only |
| `cwt_valid` | out | 1 | a coefficient is on the bus |
| `cwt_scale` | out | 5 | 0..24 = scale 26..50 |
| `cwt_time` | out | 12 | time index 0..4095 |
| `cwt_re`, `cwt_im` | out | 28 | signed coefficient |

Coefficients leave one per cycle. Scale 26 comes first, in time order, and
each scale follows the previous one without gaps.

## Files

| File | Contents |
|---|---|
| `rtl/cwt_pkg.sv` | sizes, scale table, packing offsets, Morlet generator, state type |
| `rtl/cwt_processor.sv` | top level: wires the blocks below |
| `rtl/cwt_control.sv` | sequencer, address generators, zero insertion, output tags, cycle counter |
| `rtl/fft_stream.sv`, `rtl/fft_sdf_stage.sv`, `rtl/fft_reorder.sv` | streaming FFT/IFFT |
| `rtl/sdp_ram.sv` | simple dual-port RAM (RAM1, RAM2, RAM3) |
| `rtl/wavelet_ram.sv` | RAM4 with its wavelet power-up contents |
| `rtl/cwt_mult.sv` | registered 20 x 8 signed-by-unsigned multiplier (Mult1, Mult2) |
| `tb/tb_*.sv` | self-checking test benches, one per block, plus `fft_harness.sv` |

## Verification

Each test bench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* `tb_cwt_processor` is the full design at its default size, with no
  parameter overrides. It makes two complete runs on a synthetic Doppler-like
  signal: breathing at 0.3 Hz, a movement burst of 9 or 13 Hz, and noise. It
  reloads RAM4 between the runs. All 2 × 25 × 4096 complex coefficients are
  compared with a floating-point model: a DFT of the input, then the same
  8-bit wavelets, then an exact inverse DFT. The tolerance is 0.2 % of the
  peak plus 16 LSB; the largest error seen is about 15 LSB on a peak of about
  2800. The test also checks the exact cycle count. It counts that each
  mechanism happens: capture and multiplication overlapping, RAM4 read and
  written in the same cycle, zeros fed, back-to-back IFFT frames, and reload
  writes.
* `tb_fft_stream` tests a 64-point forward core, a 64-point inverse core and
  the full 4096-point forward core. It uses random back-to-back frames,
  compares every bin with a DFT, and checks the latency.
* `tb_cwt_control` drives the controller with behavioural models of the FFT,
  the multipliers and the IFFT. It checks every address, enable, zero-insertion
  decision and output tag.
* `tb_sdp_ram`, `tb_wavelet_ram` and `tb_cwt_mult` check the memories, the
  stored wavelet table (against a separate model), and the multiplier.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    --top-module tb_cwt_processor rtl/cwt_pkg.sv tb/tb_cwt_processor.sv
./obj_dir/Vtb_cwt_processor
```

Other modules are found through `-Irtl -Itb`. The full-size test builds in
about half a minute and runs in a few seconds.

## Departures from the original design, and what is left out

* **Transform core.** The original design uses a vendor FFT/IFFT core with
  valid/start/end framing. This one is written here, with the same kind of
  framing. Its scaling is halving per stage: forward DFT/N, exact inverse. Its
  latency is N+13 after the last input, where the original core is given N+84.
  Absolute coefficient levels therefore differ from the original by a constant
  factor.
* **Multipliers.** The original uses vendor multipliers. These are plain
  registered multipliers with a clock enable.
* **Wavelet values.** The scale table gives each scale's first and last
  non-zero bin. The wavelet is placed so that it peaks in the middle of that
  range. Its exact amplitude format (Q1.7) is a choice made here.
* **Scale 50** keeps only its first 20 bins (see above).
* **Reset and handshakes.** One global asynchronous reset replaces separate
  reset pulses to the two transform cores. `start`, `x_ready`, `done` and the
  RAM4 reload port are this design's.
* **Data transfer.** In the original, test data moved between a PC and the
  FPGA through co-simulation. Here the input is a plain sample stream and the
  output a tagged coefficient stream.
* **Not included:** the steps that happen on the host around the processor.
  These are the preparation of the input segment, the post-processing that
  turns the coefficients into a movement mask (maximum over scales, binary
  mask, moving average, comparison), and the radar front end itself.

## Changing it

* The sizes are in `cwt_pkg`. A different segment length or scale set needs
  new `SCALE_START`, `SCALE_LEN` and `SCALE_END` tables, `PROD_DEPTH` equal to
  their total, `BIN_LO`/`BIN_HI`, and `MULT_START_BIN` set to the first bin of
  the first scale multiplied.
* The capture-before-read rule needs every later scale to start at a lower or
  equal bin. The `a_capture_first` assertion reports it if a new table breaks
  this.
* `fft_stream` works for any power-of-two length. Its test bench uses 64
  points for quick runs.
