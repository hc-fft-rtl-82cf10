# HC-FFT: a run-time configurable 4-parallel pipelined FFT

This is a streaming FFT core that takes four complex samples per clock and
gives four per clock back, and whose transform can be changed between frames
without rebuilding the hardware. One build (K = 16) serves:

* every size N = 2^n from 16 to 65536 points (13 sizes),
* one, two or four independent streams transformed at once (S·N ≤ 65536),
* forward or inverse transform,
* output in natural or in bit-reversed order.

That gives 2 modes × 2 orders × 36 size/stream pairs = 144 configurations.

The core is a radix-2 decimation-in-frequency pipeline of the
*multipath delay commutator* (MDC) kind: four lanes, sixteen stages, with
shuffle buffers between the stages. Two observations make it configurable
at low cost:

* **Smaller sizes skip stages.** A transform of 2^n points needs stage 1 and
  the last n−1 stages. A multiplexer in front of stage 18−n feeds it from
  stage 1 instead of from stage 17−n. The stages that follow never need to
  know N: their twiddle factors and shuffle lengths are the same for every
  size.
* **More streams just lengthen the buffers.** Streams are interleaved sample
  by sample. With S streams every stage sees each of its operand pairs S
  times in a row. Every shuffle buffer is therefore S times as long as for
  one stream, and each twiddle is held for S clocks.

An input rearrangement network puts natural-order input into the order the
first stage needs. An eight-bank reorder buffer at the end returns the
results in natural or bit-reversed order.

## Interface

`hcfft_top` (parameters `K = 16` for the largest size 2^K, `GAP = 64`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `cfg` | in | `cfg_t` | requested configuration: `log2n` (5 bits), `log2s` (2 bits), `inverse`, `natural` |
| `in_valid` / `in_ready` | in / out | 1 | input handshake; a word is taken when both are high |
| `in_data` | in | `lanes_t` | four complex samples (`cplx_t`, 32-bit signed fixed-point real and imaginary parts) |
| `out_valid` | out | 1 | output word valid |
| `out_first`, `out_last` | out | 1 | first and last clock of an output frame |
| `out_data` | out | `lanes_t` | four complex results |
| `cfg_active` | out | `cfg_t` | the configuration currently in force (after clamping) |
| `gap_stall`, `cfg_stall` | out | 1 | `in_ready` is low because of the inter-frame gap, or because the pipeline is draining before a configuration change |

**Input order.** A frame is M = S·N samples. Sample q is on lane q mod 4 at
the (q/4)-th accepted clock of the frame. With several streams, q = S·n + s
for sample n of stream s. Once a frame has started, `in_valid` must stay high
until the frame ends, because all the buffers shift on every clock. An
assertion in the controller checks this.

**Output order.** Output word r is on lane r mod 4 at clock r/4 of the output
frame.
* Natural order: r = S·k + s for bin k of stream s.
* Bit-reversed order: r = S·bitrev_n(k) + s.

A forward transform returns X[k]/N. An inverse transform returns the exact
inverse DFT, (1/N)·Σ X[k]·W^(−nk).

**Timing.**
* Latency from the first input clock to the first output clock is
  3·M/4 − S + 2·log2n + 2 clocks. For one 64K-point stream that is
  49 185 clocks.
* A frame occupies M/4 clocks. The next frame can start GAP = 64 clocks
  later, so frames overlap in the pipeline.
* For one 64K stream the sustained rate is 4·16384/(16384 + 64)
  ≈ 3.98 samples per clock.

## How the indices move through the pipeline

This bookkeeping is the hardest part of the design. Every block depends on
it.

**Stage 1 order.** The first stage needs, at clock i (per stream), the four
samples x[i], x[i+N/2], x[i+N/4] and x[i+3N/4] on lanes 0..3. Stage 1
contains two radix-2 butterflies:
* the lane 0/1 butterfly combines samples N/2 apart;
* the lane 2/3 butterfly does the same for the other quarter pair.

The lower output of each butterfly is rotated:
* lane 1 by W_N^i;
* lane 3 by W_N^(i+N/4).

**Later stages.** After stage 1, lanes 1 and 2 swap. From then on, each later
stage butterflies on one lower index bit. The buffers between stages ensure
that the two operands of every butterfly arrive together.

**Between two stages.** Stage k−1 and stage k are joined by two shuffle
blocks:
* one on lanes 0/1;
* one on lanes 2/3.

Each shuffle has length S·2^(K−k). It swaps the "late half" of one lane with
the "early half" of the other. Stage k rotates its lower outputs by
W_(2^(K+1−k))^(i mod 2^(K−k)). Stage K never rotates.

**Output of the last stage.** At stage-K clock t, lane {l1,l0} holds:
* stream t mod S;
* bin bitrev_n(l1·2^(n−1) + (t >> log2s)·2 + l0).

The reorder buffer computes these positions exactly.

## Shuffle blocks (`shuffle`, `delay_line`)

A shuffle of length L takes two lanes (upper and lower) and outputs two
lanes. It is built from two delay buffers of length L and two multiplexers:
* The lower input always passes through the input buffer.
* The upper output is always the output of the output buffer.
* A select bit alternates every L clocks. With select 0, the upper input
  enters the output buffer and the lower output is the buffered lower input.
  With select 1 the paths cross: the buffered lower input enters the output
  buffer and the upper input leaves at once on the lower output.

Over 2L clocks, the second half of the upper stream and the first half of
the lower stream change places. Everything leaves L clocks late.

In this design the select bit is a free-running phase counter that restarts
at the first word of each frame: `sel = |(count & L)`.

`delay_line` is a circular buffer of `DEPTH` words whose active length is set
at run time. One physical buffer per position can therefore serve every
length that any configuration needs there. It also carries the valid and
first flags. After reset, or after a length change, these flags read as zero
until the buffer has been refilled. This keeps stale flags from the previous
configuration from creating phantom frames.

Buffer depths:
* Between stage k−1 and stage k the depth is min(2^(K−3), 2^(K+2−k)). This is
  the longest length S·2^(K−k) that a legal configuration can ask for there.
* In the input network the depths are fixed.

## Input rearrangement (`input_rearrange`)

Natural-order input is turned into stage-1 order by a chain of shuffle pairs.
* The pairs have lengths 1, 2, 4, …, 2^(K−3): 14 pairs, 28 shuffle blocks
  for K = 16.
* Between successive pairs, lanes 1 and 2 swap.
* After the pair of length L, lanes 0..3 carry x[i], x[i+4L], x[i+2L] and
  x[i+6L]. That is the stage-1 order for a transform of M = 8L samples.
  For example, the pair of length 2 produces the 16-point order.

The network therefore has one tap per size. A multiplexer picks the tap
after the pair of length S·N/8:
* 16-point, 1 stream: tap after the shuffle of length 2;
* 16-point, 2 streams: length 4;
* 16-point, 4 streams: length 8;
* 64K-point: length 8192.

Stream interleaving needs no extra logic. The streams simply ride along in
time order.

Links behind the tap get no valid flags. Latency is M/4 − 1 clocks.

## Variable size and multistream (`fft_pipeline`, `fft_stage`)

`fft_pipeline` holds K `fft_stage` instances. Stage 1's output, after the
1↔2 lane swap, enters stage `second = K + 2 − log2n` through a multiplexer.
Stages before `second` are bypassed and get no valid flags. A stage takes
two clocks:
* one for the butterfly register;
* one for the rotator register.

Each stage keeps a frame counter t. The twiddle index for the current stream
is i = t >> log2s, so each twiddle repeats S times.

## Twiddle ROMs (`twiddle_rom`)

Each stage has its own ROM and stores only the factors that stage can use.

**Stage 1** has the largest ROM: W_(2^K)^0 … W_(2^K)^(2^(K−1)−1), which is
32 768 entries. Every smaller size's stage-1 factor appears among them:
W_N^i = W_(2^K)^(i·2^(K−n)). The ROM is addressed at i << (K − n) and has
two read ports:
* one for W_N^i (lane 1);
* one for W_N^(i+N/4) (lane 3).

**Stage k ≥ 2** has 2^(K−k) entries: W_(2^(K+1−k))^j. They are the same for
every size, because a stage at a given position always butterflies the same
index bit. Stage K needs none.

All ROMs together hold about 2^K entries.

**Format and initialisation.**
* Factors are 25-bit signed values with 23 fraction bits, so 1, −1, j and −j
  are exact, and a factor fits the 25-bit input of a typical FPGA
  multiplier.
* Contents are computed at elaboration time with `$cos`/`$sin`, so no table
  files are needed.

For the inverse transform the rotator conjugates the factor.

## Output reorder buffer (`output_reorder`, `bank_ram`)

The last stage delivers four results per clock in the scrambled order given
above. The reorder buffer must:
* write four results per clock;
* read four per clock in natural or bit-reversed order;
* accept the next frame while the current one is being read.

**Structure.**
* It has eight `bank_ram` blocks of 2^(K−2) words, each with one write port
  and one read port.
* The blocks form two halves of four banks, used ping-pong: one half is
  written while the other is read.

**Addressing.** Each result gets a linear address a = k·S + s, its position
in natural-order output.

**The difficulty.** The four results written in one clock, and the four read
in one clock, must always land in four different banks. The addresses of one
write clock differ in their top bits and in bit 0 or 1, depending on the
stream count. The addresses of one read clock differ in bits 0..1 (natural
order) or in the top bits (bit-reversed order).

**Bank mapping.** The bank is a[1:0] XOR g(a):

| streams | g(a) |
|---|---|
| 1 | {a[n−1], a[n−2]} |
| 2 | {a[n], a[n]} |
| 4 | {a[2], a[n+1]} |

The word address is a >> 2. With this mapping all four access patterns are
conflict-free, and each bank needs one write and one read port.

**Read addresses.**
* Natural order: a = r.
* Bit-reversed order: a = bitrev_n(r >> log2s)·S + (r mod S).

Bit-reversed results still pass through the RAM, so latency is the same in
both orders.

**Timing.** A frame's read begins on the clock after its last write. If the
previous frame is still being read, it begins on that read's last clock.
Back-to-back frames therefore stream out without a gap in between, and
latency is the same for every frame.

## Arithmetic (`r2_butterfly`, `rotator`)

**Butterfly.** Computes (a+b)/2 and (a−b)/2. It rounds to nearest with ties
to even, then saturates to 32 bits. The halving at every stage keeps the
words from overflowing and makes the forward output X[k]/N. Ties-to-even
matters: plain round-half-up adds a bias of up to half an LSB per stage, and
in a 64K transform that bias accumulates to several LSB in the DC bin.

**Rotator.**
* Multiplies by the factor (32×25-bit products) and rounds half up.
* Saturates.
* Conjugates the factor in inverse mode.

**Accuracy.** Results match a double-precision DFT scaled by 1/N to within
4 LSB plus the twiddle quantisation, about log2n · 2^-23 of full scale, per
part, over all sizes, streams, modes and orders. With random full-scale input
the average relative error is 1e-7 for small sizes and 4e-7 for 64K points.
The original design's acceptance limit was 1e-5, and the testbenches check
that limit too.

## Control and reconfiguration (`hcfft_ctrl`)

The controller counts accepted clocks into frames of M/4 and raises `first`
on a frame's first word.

**Inter-frame gap.** After every frame it lowers `in_ready` for GAP clocks
and shows this on `gap_stall`. The datapath itself would also take frames
back to back; `GAP = 0` is allowed.

**Configuration changes.** A configuration request that differs from the
active one takes effect only between frames, and only after every frame in
flight has left the output. While that drain lasts, `in_ready` stays low and
`cfg_stall` is high. Frames with an unchanged configuration follow each other
without draining.

**Illegal requests** are clamped:
* log2n is limited to 4..K;
* log2s is limited to 0..2;
* log2n is then lowered until S·N ≤ 2^K.

## Sizes, latency and throughput

| case | latency (clocks) | frame period (clocks) |
|---|---|---|
| 64K points, 1 stream | 49 185 | 16 384 + 64 |
| 4K points | 3 097 | 1 024 + 64 |
| 1K points | 789 | 256 + 64 |
| 16K points × 4 streams | 49 178 | 16 384 + 64 |

**Throughput.** At a 339 MHz clock, 64K frames back to back give
4 × 339 MHz × 16384/16448 ≈ 1350 Msamples/s. This design does not claim a
clock frequency; that depends on the target device and on how the multiplier
and RAM stages are pipelined for it.

**Larger sizes.** Larger transforms need a larger K. For example, K = 17
gives 128K points with a latency of 98 339 clocks. Every buffer and ROM
scales with the parameter.

## Where this design departs from the original HC-FFT

* **Reorder RAM size.** The original reorder buffer uses eight RAMs of 8192
  words, 64K words in all. Here each RAM is 16 384 words (128K in all)
  because two frames are held ping-pong. This lets a frame be written while
  the previous one is read, at the 64-clock frame spacing.
* **Reorder bank mapping.** This mapping is this design's own. The original
  assigns address-bit fields to "RAM group / RAM / word". Taken literally,
  that places all four words of a write clock in one group. The XOR mapping
  here needs only one write port and one read port per RAM.
* **Last-stage order.** The order in which the last stage delivers results
  differs in detail from the plain bit-reversed listing the original gives
  for 16 points. The reorder addressing is derived from this pipeline's own
  order, so the output order on the ports is exactly as specified above.
* **One buffer per shuffle position.** Between stages, one buffer with a
  run-time length replaces the original's separate shuffle blocks chosen by a
  multiplexer.
* **Two-stream shuffle lengths.** For two streams every shuffle is twice its
  one-stream length. The original text states this explicitly only for four
  streams.
* **Not specified in the original; chosen here:**
  * the handshake (valid/ready, frames must not pause);
  * draining before a configuration change;
  * the inverse transform by conjugated twiddles;
  * scaling by 1/2 per stage with rounding;
  * 25-bit twiddles.
* **Data width.** The original calls its data 32-bit fixed point. This
  design reads that as 32 bits per real and per imaginary part. That reading
  matches the original's 87 Gbit/s (1350 Msamples/s × 64 bits). `DW` and
  `TW` in `hcfft_pkg` set the widths. The testbenches scale their stimulus
  and tolerances from them.
* **Latency.** The original reports about 49k, 3k and 858 clocks for 64K, 4K
  and 1K. This design gives 49 185, 3 097 and 789. The 1K and 4K figures here
  are for the 64K build run at the smaller size.

## Verification

Each testbench is self-checking. Every output is compared against values
computed independently in the testbench (floating-point DFTs, reference
rounding and index formulas), and each prints
`TB_RESULT checks=… failures=…`.

| testbench | what it covers |
|---|---|
| `tb_r2_butterfly` | extreme and random full-range operands against reference rounding and saturation |
| `tb_rotator` | random data and angles, forward and conjugated |
| `tb_twiddle_rom` | ROM contents for several stages against cos/sin |
| `tb_shuffle` | every length 1..8 on one buffer, with and without idle gaps |
| `tb_input_rearrange` | sample indices at the first-stage tap for all sizes and stream counts (K = 7) |
| `tb_fft_stage` | butterfly and twiddle of stages 1, 3 and 6 |
| `tb_fft_pipeline` | whole pipeline against a DFT, including size changes 64 → 16 → 64 (K = 6) |
| `tb_output_reorder` | exact output positions in both orders, all sizes and stream counts, back-to-back frames (K = 6) |
| `tb_hcfft_ctrl` | framing, gap, drain and clamping (K = 6) |
| `tb_hcfft_top` | end to end at K = 8; see below |
| `tb_hcfft_full` | default build: one 64K forward natural frame, then 4 × 16K inverse bit-reversed |
| `tb_hcfft_workloads` | default build: 1K, 4K, then two back-to-back 64K frames |

**`tb_hcfft_top`** runs every legal size and stream count of its K = 8
build: 16..256 points with one stream, 16..128 with two, 16..64 with four.
It covers both modes and both orders, back-to-back frames with an unchanged
configuration, and switches that force a drain. It checks:
* every output word against a DFT;
* the latency of each frame;
* the frame spacing.

It counts each mechanism and fails if any never happens: gap stall, drain,
stage bypass, full size, 2 and 4 streams, inverse, bit-reversed and natural
order, back-to-back frames.

**`tb_hcfft_full`** and **`tb_hcfft_workloads`** check 256 output positions
per frame against a DFT, plus latency and frame spacing. Each runs in a few
seconds.

**Not verified:**
* The RTL has not been synthesized for an FPGA, so clock rate and resource
  use are unknown.
* Yosys cannot elaborate the ROM initialisation, because it uses real-valued
  math.

## Simulating

With Verilator 5 from the top directory:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/hcfft_pkg.sv tb/tb_hcfft_top.sv --top-module tb_hcfft_top -Mdir obj
./obj/Vtb_hcfft_top
```

Substitute any testbench name from the table above. `-Irtl` lets Verilator
find each module in the file of the same name.

To try other sizes, change `K` on `hcfft_top`. Every buffer, ROM and counter
is derived from it. The testbenches for the smaller blocks set their own
reduced `K`.

## Files

| file | content |
|---|---|
| `rtl/hcfft_pkg.sv` | types (`cplx_t`, `twid_t`, `lanes_t`, `cfg_t`), widths, saturation, bit reversal, lane swap |
| `rtl/hcfft_top.sv` | top level |
| `rtl/hcfft_ctrl.sv` | handshake, framing, gap, reconfiguration |
| `rtl/input_rearrange.sv` | input shuffle network with size/stream tap |
| `rtl/fft_pipeline.sv` | the K stages, inter-stage shuffles and bypass multiplexer |
| `rtl/fft_stage.sv` | two butterflies, twiddle addressing, two rotators |
| `rtl/r2_butterfly.sv`, `rtl/rotator.sv` | arithmetic |
| `rtl/twiddle_rom.sv` | per-stage twiddle ROM |
| `rtl/shuffle.sv`, `rtl/delay_line.sv` | shuffle block and its run-time-length delay buffer |
| `rtl/output_reorder.sv`, `rtl/bank_ram.sv` | reorder buffer and its RAM banks |
| `tb/` | testbenches listed above |
