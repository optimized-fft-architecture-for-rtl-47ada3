# One FFT pipeline for four antennas: a samplewise-multiplexed radix-2² SDF FFT

A 4x4 MIMO OFDM receiver has to transform four antenna streams, each an OFDM
symbol of 2048 samples arriving at the full sample rate. The usual choices are
four independent FFT pipelines (four times the arithmetic), or one FFT running
four times faster that takes the antennas one whole symbol at a time (which
needs a symbol buffer per antenna in front of it, plus overlap space).

This design takes a third route. The four streams are interleaved **sample by
sample** (a0 b0 c0 d0 a1 b1 c1 d1 ...) into a single radix-2² single-path delay
feedback (R2²SDF) pipeline whose feedback FIFOs are simply made four times
longer. Because every butterfly then combines only samples that are a multiple
of four slots apart, each stream is transformed on its own and the streams
never mix. The result:

| Approach | Complex multipliers | Memory (complex words) |
|---|---|---|
| four separate R2²SDF pipelines | 4 (log4 N − 1) | 4 (N − 1) |
| one 4x-rate FFT fed symbol by symbol | log4 N − 1 | 4 N + (3·4 + 8)/8 · N |
| **this design (samplewise interleaving)** | log4 N − 1 | 4 (N − 1) |

So the arithmetic of one FFT with the memory of four, and no input buffering.
For N = 2048 and four streams the FIFOs hold 4096 + 2048 + ... + 4 = 8188
words. The pipeline takes one sample per clock, so for four streams at
100 MS/s it needs a 400 MHz clock.

## Data path

```
 a(n) ─┐                                                                     ┌─ A(k)
 b(n) ─┤ stream_mux ─ x'(n) ─ BF2I ─ BF2II ─ ×W1 ─ BF2I ─ BF2II ─ ×W2 ─ ... ─ BF2I ─ X'(k) ─ stream_demux ├─ B(k)
 c(n) ─┤                     4096   2048          1024   512                   4             ├─ C(k)
 d(n) ─┘                                                                     └─ D(k)
```

For N = 2048 (11 = 2·5 + 1 stages) there are five BF2I/BF2II pairs, each
followed by a twiddle multiplier except that the last pair's multiplier feeds
a final lone BF2I (a radix-2 stage with no multiplier after it). The numbers
under the butterflies are the feedback FIFO depths: 4 · 2^(11−s) for stage s.

- **`stream_mux`** holds one sample of every stream and sends them out in
  stream order over M_R clocks.
- **`r22sdf_core`** is the shared pipeline: `bf2i` / `bf2ii` butterflies, each
  with an `sdf_delay` feedback FIFO, and `twiddle_mult` complex multipliers.
- **`stream_demux`** collects the M_R results of one frequency bin and
  presents them in parallel.
- **`mimo_fft_top`** wires the three together.

## How the interleaved pipeline is controlled

This is the part to understand before changing anything.

**One counter.** The core counts accepted input samples in a counter `cnt` of
log2(N) + log2(M_R) bits, which is one frame of all streams (8192 for the
defaults). The low log2(M_R) bits are the stream slot; the bits above them are
the sample number n within the symbol. Every stage derives its control from
`cnt` minus the number of samples of delay in front of it, so the control
always describes the sample currently at that stage's input.

**Butterfly phase.** A butterfly stage with FIFO depth D works on blocks of
2D samples. During the first D it fills its FIFO with the input and passes on
what the FIFO returns (the differences left from the previous block). During
the second D it forms a + b from the FIFO output a and the input b, passes it
on, and writes a − b back into the FIFO. The phase bit is bit log2(D) of the
stage's counter. With D = M_R · 2^(L−s) this is bit L − s + log2(M_R): every
control bit of a single-stream R2²SDF simply moves up by the stream bits.
That is why quadrupling the FIFOs is all it takes.

**The −j in BF2II.** The radix-2² decomposition turns half of the twiddle
factor of a radix-2 stage into the trivial factor −j, applied inside BF2II by
swapping real and imaginary parts and negating one. It applies to the second
input of a pair when the sample belongs to the difference half of the
preceding BF2I, which is the counter bit one above BF2II's phase bit.

**Twiddle factors.** After each BF2I/BF2II pair that handles sub-transforms
of size NK (2048, 512, 128, 32, 8 per stream for the defaults), a sample at
position q = k1·NK/2 + k2·NK/4 + n3 of its block is multiplied by
W_NK^(n3·(k1 + 2·k2)), W_NK = exp(−j2π/NK). The position is taken from the
counter **without** the stream bits, so each factor is used for M_R
consecutive samples, one per stream. Each multiplier has its own table of NK
entries, computed when the design is elaborated:
`W[q] = round(2^(TW_W−2) · exp(−j2π · e(q)/NK))`.

**Latency.** A butterfly stage delays its stream by D + 1 samples (FIFO plus
output register), a multiplier by 2. For the defaults the core's latency is
4 · 2047 + 11 + 2 · 5 = 8209 input samples, slightly more than one frame
(8192). The mux and demux each add one clock.

**Stalls.** `in_valid` of the core is the clock enable of every register and
FIFO in it. A gap in the input freezes the whole pipeline, and nothing is
lost. The flip side: the last symbol only leaves when further samples (the
next symbol, or zeros) are pushed in behind it. In a receiver running
continuously this is the normal state.

## Interfaces and timing

`mimo_fft_top` (all signals on the rising edge of `clk`; `rst_n` is
synchronous, active low):

| Port | Width | Meaning |
|---|---|---|
| `in_valid`, `in_ready` | 1 | a group (one sample per stream) is taken when both are high |
| `in_re[M_R]`, `in_im[M_R]` | IN_W, signed | sample n of every stream |
| `out_valid` | 1 | one-clock pulse: one bin of every stream is present |
| `out_re[M_R]`, `out_im[M_R]` | IN_W + log2 N + 1, signed | X(k) of every stream |
| `out_bin` | log2 N | the bin index k of this output |

- `in_ready` is high while the mux is idle and during the last clock of a
  group. So if groups are offered back to back, x'(n) runs without gaps at one
  sample per clock. A group offered while `in_ready` is low must be held until
  it is taken; an assertion checks this.
- Bins leave in **bit-reversed order** (k = bitrev(0), bitrev(1), ...), which
  is the natural order of a decimation-in-frequency pipeline. `out_bin` carries
  the true index. No reorder buffer is included.
- With continuous input, one group leaves every M_R clocks.

## Number format

Inputs are signed IN_W-bit integers (default 16). The core sign-extends them
to DW = IN_W + log2(N) + 1 bits (28 by default) and keeps that width through
every stage. That is enough for the full growth of the transform (at most one
bit per butterfly plus a factor of √2 from the multipliers), so nothing is
scaled or saturated and the output is the unscaled DFT. Twiddle factors are
TW_W-bit signed numbers (default 16) with 1.0 = 2^(TW_W−2). Products are
rounded half up. At the defaults, with full-scale random input, the largest
deviation from a floating-point DFT seen in the end-to-end test is about 750
output LSB, on outputs whose typical magnitude is about 10⁶ LSB. The tests
allow 10⁻⁴ of the sum of the input magnitudes, about ten times that. The error
comes mostly from the 16-bit twiddle factors: with TW_W = 20 the largest
deviation falls to about 50 LSB.

## Parameters

| Parameter | Default | Where | Notes |
|---|---|---|---|
| `N_FFT` | 2048 | top, core | power of two, at least 4 |
| `M_R` | 4 | top, core, mux, demux | number of streams; a power of two, at least 2 |
| `IN_W` | 16 | top, core, mux | input width |
| `TW_W` | 16 | top, core, multiplier | twiddle width |

The package `mimo_fft_pkg` holds these defaults, plus the bit-reverse and
twiddle-exponent functions.

## Files

| File | Contents |
|---|---|
| `rtl/mimo_fft_pkg.sv` | defaults, `bit_reverse`, `twiddle_exp` |
| `rtl/mimo_fft_top.sv` | mux + core + demux |
| `rtl/stream_mux.sv` | samplewise multiplexer |
| `rtl/r22sdf_core.sv` | shared R2²SDF pipeline and its control counter |
| `rtl/bf2i.sv`, `rtl/bf2ii.sv` | the two butterfly types |
| `rtl/sdf_delay.sv` | feedback FIFO (RAM with a circular pointer and registered read) |
| `rtl/twiddle_mult.sv` | twiddle ROM and complex multiplier |
| `rtl/stream_demux.sv` | demultiplexer |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/r22sdf_core_check.sv` | test harness used by `tb_r22sdf_core` |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
They need Verilator 5 with timing support:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/mimo_fft_pkg.sv tb/tb_mimo_fft_top.sv --top-module tb_mimo_fft_top
./obj_dir/Vtb_mimo_fft_top
```

Replace the testbench name to run another one.

What the tests establish:

- `tb_mimo_fft_top` runs the **full default configuration** (2048 points,
  four streams). It sends four symbols per stream. Symbol 0 is full-scale
  random data. Symbol 1 is a different tone in each stream plus noise. Symbols
  2 and 3 are zeros that flush the pipeline. Every bin of symbols 0 and 1 in
  every stream is compared with a floating-point DFT. The test also checks the
  bin order and that results leave at one group per four clocks, and that the
  first multiplier's table position only moves once per group of four
  samples. It counts stalls (random input gaps, both before and while results
  leave), overlap of an entering and a leaving symbol, −j applications in the
  first BF2II and non-unit factors used by the first multiplier; a failure is
  counted if any of these never happens. It runs in well under a second.
- `tb_r22sdf_core` runs the core at 32 points / 4 streams (odd stage count,
  like 2048) and at 64 points / 2 streams (even stage count), with random
  gaps, against a DFT.
- The unit tests check each butterfly bit-exactly against its defining
  equations, the FIFO against a recorded history (depths 1, 2 and 12), the
  multiplier against floating point, and the mux and demux against the
  expected stream order.

## Scope and departures

- Only the FFT is provided. In the intended receiver it sits between channel
  estimation and the blocks that use its output (channel transfer function,
  phase tracking, MIMO decoding). Those blocks are not part of this RTL.
- The radix-2² butterfly and twiddle scheme is the standard one for this
  pipeline class. The interleaving, the 4x FIFO depths, the 4x-slower twiddles
  and the mux/demux around the pipeline are the architecture proper.
- This design's own choices: all widths, the rounding, the register stages
  (registered butterfly outputs, two-stage multipliers, registered RAM read),
  the valid/ready group handshake, the stall-by-clock-enable scheme,
  bit-reversed output with an index instead of a reorder buffer, and twiddle
  ROMs instead of CORDIC rotators (either would do).
- A single-stream configuration (M_R = 1) is not supported by this
  parameterisation.
- Timing closure at 400 MHz, the rate four 100 MS/s streams need, has not
  been examined. The RTL is written for it (registered stages, block-RAM-style
  FIFOs), but no synthesis to a device was done.
