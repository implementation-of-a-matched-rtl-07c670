# Matched filter for BOK chirp-spread-spectrum links

A chirp-spread-spectrum (CSS) link with binary orthogonal keying (BOK)
sends each bit as a linear-FM pulse: a `1` as an up-chirp (frequency rising),
a `0` as a down-chirp (frequency falling) over the same band. The receiver
has to correlate the incoming baseband stream with both chirps and see
which correlation peaks. This RTL does that correlation by fast convolution
in the frequency domain:

    Y_up = IFFT( FFT(u) * conj(S_up) )        Y_dn = IFFT( FFT(u) * conj(S_dn) )

One forward 1024-point FFT of each received frame feeds two complex
multipliers and two inverse FFTs, so both correlation functions come out at
the same time. A peak search on each branch and a comparison of the two
peaks give one bit per frame, plus the position of the peak (the symbol's
timing offset within the frame). The spectra of the reference chirps are
stored in a table rather than computed, so no transform of the references
is needed in hardware.

The transmit side, a memory-based BOK chirp generator, is included in the
same top level with separate ports. Looped back through a testbench, it
drives the receiver end to end.

The intended platform is an SDR transceiver (AD9361/AD9364 class)
that delivers 12-bit I/Q at 61.44 MS/s to an FPGA SoC. The transceiver, the
processor system and any display software are outside this RTL.

## The signal

| quantity | value |
|---|---|
| sample rate at the FPGA input | 61.44 MHz |
| samples per chirp = FFT length `N` | 1024 |
| chirp duration | 1024 / 61.44 MHz = 16.6667 us |
| band | 1 MHz to 26 MHz (25 MHz) |
| slope | 1.5 MHz/us |
| sample format | 12-bit signed I and Q |

The up-chirp is the complex baseband sequence

    s_up[n] = exp( j*2*pi*( f0*n + b/(2*(N-1)) * n^2 ) ),   n = 0 .. N-1,
    f0 = 1 MHz / 61.44 MHz,   b = 25 MHz / 61.44 MHz.

`mf_pkg::chirp_phase` computes the phase term. All tables in the design are
generated from this formula when the memories are initialised. No data
files are involved.

## One table, two chirps: the reversed read

This is the idea that holds the design together, and the least obvious part
of it.

The down-chirp is not stored. It is defined as the up-chirp read backwards
**modulo N**:

    s_dn[n] = s_up[(N - n) mod N]      (sample order 0, N-1, N-2, ..., 1)

Apart from its first sample, this is the up-chirp played in reverse, so it
sweeps 26 MHz down to 1 MHz. The DFT has the property that reversing a
sequence modulo N reverses its spectrum modulo N:

    S_dn[k] = S_up[(N - k) mod N]

So one dual-port memory serves both references, in both domains, if its two
ports are addressed by two counters of the same modulus:

* an up-counter `0, 1, 2, ..., N-1`
* a down-counter `0, N-1, N-2, ..., 1`, always equal to `(N - up) mod N`.

`ref_addr_counters` is that pair of counters. An assertion checks that they
stay mirror images. The design uses the pair twice:

* `bok_chirp_gen`: `chirp_rom` holds the 12-bit up-chirp samples. Port A
  gives the up-chirp and port B the down-chirp in the same cycle. The data
  bit drives a multiplexer that picks one of them, so switching between
  symbols costs nothing.
* `spectral_mult`: `ref_spectrum_rom` holds `conj(S_up[k])` as 16-bit
  values. Port A gives `conj(S_up[k])` and port B gives `conj(S_dn[k])`, in
  step with the bin stream leaving the forward FFT.

The down-counter starts at 0 rather than N-1 on purpose. A plain reversal
(`N-1-n`) would make the spectrum pick up a linear phase ramp. With the
modular reversal, the stored spectrum is exact for both chirps.
`tb_ref_spectrum_rom` checks this against a DFT of a separately built
down-chirp.

## Receive pipeline

    rx (12-bit I/Q, one per clock)
      -> fft_r2sdf  forward, 24-bit, bins in natural order (via bitrev_reorder)
      -> spectral_mult  U*conj(S_up), U*conj(S_dn), >>10, 40-bit
            (ref_addr_counters + ref_spectrum_rom)
      -> fft_r2sdf  inverse, 40-bit, up branch      -> corr_peak_detect --+
      -> fft_r2sdf  inverse, 40-bit, down branch    -> corr_peak_detect --+-> bok_decision
                                                                         sym_bit, sym_offset

### Streaming FFT (`fft_r2sdf`, `fft_sdf_stage`, `bitrev_reorder`)

The transform is a radix-2 single-path delay-feedback (SDF) pipeline. It
has log2(N) = 10 stages with feedback memories of N/2, N/4, ..., 1 samples.
Each stage works on blocks of 2D samples:

* During the first half of a block, the stage stores the incoming samples.
  It also outputs the differences left over from the previous block, each
  multiplied by its twiddle factor.
* During the second half, it outputs the sums `x[m] + x[m+D]` and stores
  the differences `x[m] - x[m+D]`.

The pipeline takes one sample per clock, delivers one transformed frame per
N input samples, and needs no control beyond one counter per stage.

Points to know when reusing it:

* **Sample-driven.** Every register in the transform moves only when
  `in_valid` is high. The stream may pause, and latency is counted in input
  samples. The results of frame `f` are pushed out by the samples of frame
  `f+1`. A stream that simply stops leaves its last frame inside the
  pipeline, so feed one more frame (zeros will do) to flush it.
* **Frames start at reset.** Input samples 0..N-1 after reset are frame 0.
  The first N-1 pipeline outputs come from uninitialised feedback memory.
  They are dropped, and `out_valid` rises only for real data.
* **Order.** The SDF pipeline produces bins in bit-reversed order. With
  `NATURAL_OUT = 1`, a double-buffered reorder memory restores natural
  order at the cost of one more frame of delay. The forward transform uses
  it so that the reference memory can be read with plain counters. The
  inverse transforms skip it: the peak search does not care about order,
  and `out_idx` gives the time index of each sample.
* **No scaling.** Neither direction divides by 2 per stage or by N. The
  word width `W` must leave room for the growth. For 12-bit input, 24 bits
  is enough (|X| <= 2^11 * 1024 * sqrt 2 < 2^23). Twiddles are 16-bit with
  14 fraction bits and are rounded. `INVERSE = 1` conjugates them.

### Spectral products (`spectral_mult`)

The multiplier has two register stages: a memory read, then two complex
multiplies. Each product `U[k] * C[k]` (24 x 16 bits) is rounded and
shifted right by `PROD_SHIFT = 10` into 40 bits. An assertion checks that
the reference counter matches the bin index of every sample.

### Correlation, peak and decision

The inverse transform gives the **circular** correlation of the frame with
each chirp, scaled by a fixed gain:

    y[m] = G * sum_n r[(n + m) mod N] * conj(s[n]),   G = N * K / 2^10,

where K is the table scale (largest spectral component mapped to 32767).
A full-scale matched chirp peaks near 2^30, well inside the 40-bit
datapath.

`corr_peak_detect` forms |y|^2 from the top 24 bits of each component and
keeps the largest value of the frame and its index. On a tie, the first
sample in arrival order wins. `bok_decision` picks the branch with the
larger peak: `sym_bit = 1` for the up-chirp and 0 for the down-chirp, with
a tie going to 0. It reports that branch's peak index as `sym_offset`.
`sym_detect` says whether the winning peak exceeds `MIN_MAG`, which
defaults to 0, so only an all-zero frame reports no symbol. Because the
cross-correlation of the two chirps is low, the losing branch is typically
more than an order of magnitude below the winner. The testbench requires a
factor of at least 10.

How to read `sym_offset`:

* A frame aligned with a symbol peaks at index 0.
* A frame that starts `d` samples before a symbol peaks at `d`, if the
  symbols on both sides of the boundary are equal.
* If the two symbols differ, each branch sees only part of its chirp. The
  bit is then decided by whichever symbol fills more of the frame.

The design has no symbol-timing loop. `sym_offset` is the measurement such
a loop would use.

## Timing

With a continuous stream, one sample per clock:

* one decision every 1024 clocks;
* the decision for the frame starting at input sample `s` appears
  `4N - 3` input samples after `s`, plus `2*log2(N) + 6` clocks of pipeline
  registers. For N = 1024 that is 4,119 clocks after the frame's first
  sample, or about 67 us at 61.44 MHz;
* the correlation samples of frame `f` leave on `corr_*` while input frame
  `f + 3` is entering, in bit-reversed time order with `corr_idx`.

The sample-driven latency breaks down as follows: forward SDF N-1,
reorder N, inverse SDF N-1, plus the last N-1 samples of the frame itself.

## Top level: `matched_filter`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `rx_valid`, `rx` | in | 1, 24 | received sample strobe; `iq_sample_t` {12-bit I, 12-bit Q} |
| `corr_valid`, `corr_idx` | out | 1, 10 | correlation sample strobe and its time lag |
| `corr_up_re/im`, `corr_dn_re/im` | out | 40 | correlation with the up- and down-chirp |
| `sym_valid`, `sym_bit`, `sym_detect` | out | 1 | per-frame decision |
| `sym_offset`, `sym_mag` | out | 10, 48 | winning peak position and energy |
| `up_peak_mag`, `dn_peak_mag` | out | 48 | peak energy of each branch |
| `tx_en`, `tx_bit` | in | 1 | generator sample enable; data bit |
| `tx_bit_take` | out | 1 | the bit is taken (first sample of a symbol) |
| `tx_valid`, `tx_sof`, `tx` | out | 1, 1, 24 | generated chirp samples, start-of-chirp flag |

Parameters, with their defaults: `N = 1024`, `FFT_W = 24`, `REF_W = 16`,
`PROD_SHIFT = 10`, `IFFT_W = 40`, `MAG_SHIFT = 16`. `N` must be a power of
two. If you change the widths, keep the headroom arguments above.

`bok_chirp_gen` produces one sample per enabled clock, one clock after the
enable. At the first sample of each symbol it takes `tx_bit` and pulses
`tx_bit_take`.

## Files

| file | content |
|---|---|
| `rtl/mf_pkg.sv` | constants, `iq_sample_t`, chirp phase, bit reversal, rounding |
| `rtl/matched_filter.sv` | top level |
| `rtl/fft_r2sdf.sv` | streaming FFT/IFFT |
| `rtl/fft_sdf_stage.sv` | one SDF butterfly stage with its twiddle table |
| `rtl/bitrev_reorder.sv` | double-buffered bit-reversal memory |
| `rtl/spectral_mult.sv` | reference read and the two complex products |
| `rtl/ref_addr_counters.sv` | up/down read counters |
| `rtl/ref_spectrum_rom.sv` | dual-port table of conj(S_up) |
| `rtl/chirp_rom.sv` | dual-port table of up-chirp samples |
| `rtl/corr_peak_detect.sv` | per-frame peak search |
| `rtl/bok_decision.sv` | bit decision |
| `rtl/bok_chirp_gen.sv` | memory-based BOK chirp generator |
| `tb/tb_*.sv` | one self-checking testbench per block, and `tb_matched_filter` end to end |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. Each has a watchdog. With Verilator 5, run from the folder that
holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -yrtl rtl/mf_pkg.sv \
        tb/tb_matched_filter.sv --top-module tb_matched_filter -Mdir obj
    ./obj/Vtb_matched_filter

Replace `tb_matched_filter` with any other testbench name. All of them run
in seconds. The tables are computed in `initial` blocks with integer
arithmetic only (an exact rational chirp phase and fixed-point sine and
cosine series), so elaboration needs no files and a synthesis front end
can evaluate them.

The testbenches compare against values they compute themselves, not
against the RTL's tables:

* `tb_matched_filter` runs at full size with no parameter overrides. The
  generator is looped back into the receiver.
  * Run A sends 20 symbols, matching the bench sequence of alternating
    up/down chirps.
  * Run B starts 100 samples early, so frames straddle symbols, and puts
    one-clock gaps in the stream.
  * It checks every decided bit and peak offset, the separation between
    the branches, and the constant decision rate and latency. Zero frames
    must report no symbol.
  * For every symbol frame, it checks correlation samples at the peak, its
    neighbours and random lags against a direct O(N^2) circular
    correlation. Agreement must be within 1 % of the peak, after one common
    real gain.
  * It counts up decisions, down decisions, offset peaks, stream gaps and
    no-symbol frames, and fails if any of them never happened.
* `tb_fft_r2sdf` runs 64-point forward (natural order) and inverse
  (bit-reversed) transforms on impulses, a tone and random full-scale data.
  It compares them with a direct DFT and checks latency.
* `tb_ref_spectrum_rom` checks all 1024 entries of both ports against a
  DFT.
* `tb_bok_chirp_gen` checks 12 random symbols sample by sample, including
  the handshake.
* The remaining testbenches check the counters, the products (bit-exact),
  the peak search (including ties) and the decision.

## How far to trust it, and where it departs from the original

* **Simulation only.** The RTL is verified in simulation only. Nothing has
  been synthesised for an FPGA or timed, so running at 61.44 MHz is a
  target, not a result. The multipliers in `fft_sdf_stage` and
  `spectral_mult` are not pipelined internally. The Yosys slang front end
  elaborates the whole design, including the table initialisers; no FPGA
  mapping was attempted.
* **Transform core.** The original uses a vendor FFT core. Here it is
  replaced by the SDF pipeline described above. The reorder memory is an
  addition that the vendor core would make unnecessary.
* **Memory footprint.** The footprint is larger than the original's.
  Chirp table, reference table, reorder memory and feedback memories total
  about 368 kbit, against roughly 90 kbit reported for the original.
  Generic Yosys synthesis of the top infers 311 kbit of RAM (the two
  constant tables become logic) and 2,926 flip-flops. Most
  of it is the unscaled 40-bit inverse transforms. Scaling inside the
  transforms would shrink it.
* **Circular correlation.** The correlation is circular within each
  1024-sample frame. A linear correlation over 2N would need overlap
  processing, which is not implemented. Frames are counted from reset.
  There is no frame synchronisation, so alignment must come from outside or
  from `sym_offset`.
* **Decision rule.** The decision rule (larger peak energy, zero
  threshold), the energy measure, and all word widths, scalings and
  handshakes are this design's choices. The source gives none of them.
* **Overflow.** There is no saturation in the transforms. The headroom is
  sized for 12-bit inputs and the stored reference. A different reference
  table or a larger `PROD_SHIFT`/width change must keep the bounds given
  above.
* **Down-chirp start.** The first sample of the down-chirp equals that of
  the up-chirp, because of the modular reversal. The reversal makes the
  stored spectrum exact. Transmitter and receiver use the same definition,
  so the two match.
