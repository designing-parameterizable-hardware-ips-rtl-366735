# A pipelined FFT whose concurrency is a parameter

This is an N-point radix-2 FFT core in SystemVerilog in which one parameter,
`CONCURRENCY`, trades area for throughput over a range of 8x without changing the
arithmetic. The same stage description builds every point of that range:

* **fully pipelined** (`CONCURRENCY = log2(N)`): every butterfly stage has its own
  butterfly unit, its own delay buffer and its own twiddle table, and the core takes one
  complex sample per clock;
* **fully shared** (`CONCURRENCY = 1`): one butterfly unit, one memory of N-1 words and one
  twiddle table serve all stages in turn, and the core takes one sample every log2(N) clocks;
* anything in between that divides log2(N) (for 256 points: 1, 2, 4 or 8).

At 200 MHz a 256-point, 16-bit core runs at 25, 50, 100 or 200 Msample/s for concurrency 1,
2, 4 or 8. The output of every configuration is the same bit for bit.

For comparison, the same core can also be built as a classic memory-based FFT
(`SHARED_BF > 0`). That variant keeps a whole frame in two memories and runs each stage on a
set of parallel butterflies. Its spectra are identical too.

The arithmetic is bit-accurate fixed point, with selectable rounding (truncate, floor, ceil,
round) and overflow handling (wrap, saturate). Word widths are parameters: the testbenches
run the core with 4-, 5-, 12-, 14- and 16-bit samples.

## The stage: a delay line folded over a butterfly

A radix-2 FFT of N = 2^L points has L butterfly stages. In this core every stage is a
*single-path delay-feedback* stage. The input is a stream of samples in natural order, frame
after frame. Stage `s` (counted from 1 at the input) pairs samples that are
`D = N/2^s` apart, so it needs a buffer of `D` complex words. The buffers of all stages add up
to N/2 + N/4 + ... + 1 = N-1 words.

The stage sees its input in blocks of `2D` samples:

| samples of the block | what the stage stores              | what the stage passes on                         |
|----------------------|------------------------------------|--------------------------------------------------|
| first `D`            | the incoming sample (operand `X1`) | the word in the buffer: last block's `Y1`        |
| second `D`           | `Y1 = X1 - W*X0`                   | `Y0 = X1 + W*X0`                                 |

In the second half, `X0` is the incoming sample and `X1` the one stored `D` samples earlier.
Each stage therefore delays the stream by exactly `D` samples. The whole chain turns a
natural-order frame into its spectrum in **bit-reversed order**: output position `p` holds
frequency bin `bitrev(p)`. The core gives that bin index with each word on `out_bin`.

The algorithm is decimation in time with natural-order input. Stage `s` multiplies by
`W_N^e`, where `e = j * N/2^s`, `W_N^e = cos(2*pi*e/N) - i*sin(2*pi*e/N)`, and `j` is the
number of the current 2D-block, taken modulo 2^(s-1) and written with its bits reversed.
Stage 1 only ever uses `W^0`. The last stage uses N/2 different factors.

The state each stage keeps is one log2(N)-bit counter of the samples it has absorbed
(`fft_stage_ctrl`). Its bit `L-s` is the phase (first half or second half of the block). Its
low bits are the buffer pointer. The bits above give `j`. A stage's output is valid once it has
absorbed its first `D` samples.

## Merging stages into threads

`fft_stage_group` holds G = log2(N)/CONCURRENCY consecutive stages. `fft_hls_ip` chains
CONCURRENCY such groups; each group is one "thread". Inside a group:

* **one butterfly unit** runs the stages one after the other. When the group takes a sample,
  stage `FIRST` runs in the next clock, stage `FIRST+1` in the clock after, and so on. The
  result of one stage is the input of the next. The group takes its next sample in the clock
  in which its last stage runs. So it takes one sample every G clocks;
* **one memory** holds all the stage buffers in consecutive regions. Stage `FIRST+k` starts
  at offset `sum_{i<k} N/2^(FIRST+i)`. The memory has one read and one write port. In each
  clock, only the active stage reads its word and writes it back;
* **one twiddle table** holds the tables of all its stages end to end. Stage `s` contributes
  2^(s-1) entries.

Each stage keeps its own counter. A group with G = 1 is exactly one pipelined stage.

All groups have the same G, so they accept samples at the same rate. When a group has a
result, the next group is always idle or in its last clock, so the groups never stall each
other; an assertion in `fft_hls_ip` checks this. The only flow control is `in_ready`
towards the source.

Resources scale as follows. The buffer storage is always N-1 words, whether it is split or
merged. The butterfly count is CONCURRENCY. The twiddle storage is always N-1 entries in total.

## Fixed-point arithmetic

`fxp_pkg`, `fxp_add` and `fxp_mul` model fixed-point operators in three steps:

1. **Core operation.** For add and subtract, the binary points are first aligned to the
   longer fraction. A multiply needs no alignment.
2. **Rounding manager.** It drops fractional bits using one of four modes:
   * `RND_TRUNC`: toward zero;
   * `RND_FLOOR`;
   * `RND_CEIL`;
   * `RND_ROUND`: to nearest, with ties rounded up.
3. **Overflow manager.** It fits the result into the output width using one of two modes:
   * `OVF_SAT`: saturate;
   * `OVF_WRAP`: keep the low bits and sign-extend them.

   An `ovf` flag shows when this step changed the value.

A `DEFAULT_MODE` operator skips steps 2 and 3 and keeps the exact result. Formats, modes and
shifts are all elaboration-time constants, so each operator is sized to the bits it really
uses. Intermediate values must fit in 64 bits.

The butterfly (`fft_butterfly`) uses these operators as follows:

* It forms `W*X0` with four exact multipliers and two exact adders:
  `Pr = X0r*Wr - X0i*Wi` and `Pi = X0r*Wi + X0i*Wr`.
* It rounds only in the four output adders.
* Twiddle factors are `TW` = 16 bits with 14 fractional bits, so that +1.0 is exact.

Word growth across stages is selected by `GROW`:

* **`GROW = 0` (default).** Every stage keeps the word width and rounds away one more bit,
  which halves the result. A Q1.15 input comes out as `X[k]/N` in Q1.15. A stage saturates
  only when `|X1 + W*X0|` exceeds twice full scale in one component. This can happen, because
  a 45-degree twiddle turns a corner value into a value of magnitude `sqrt(2)` on one axis.
  `ovf` pulses when a stage saturates.
* **`GROW = 1`.** Every stage widens the word by one bit and keeps the binary point. The
  output is `X[k]` with `DATA_W + log2(N)` bits. For example, a 64-point FFT turns 5-bit
  samples into 11-bit results.

In a merged group with `GROW = 1`, the shared butterfly is sized for the widest stage of the
group. Each stage then saturates to its own width.

## Interface and timing of `fft_hls_ip`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | the core takes no input until it has seen `start` high once after reset |
| `in_valid`, `in_ready` | in / out | 1 | a sample is taken in a clock where both are high |
| `in_re`, `in_im` | in | `DATA_W` | sample, natural order, `DATA_W-1` fractional bits |
| `out_valid` | out | 1 | one-clock pulse per output word |
| `out_re`, `out_im` | out | `DATA_W + log2(N)*GROW` | spectrum word |
| `out_bin` | out | log2(N) | frequency bin of this word (bit-reversed output order) |
| `ovf` | out | 1 | a stage saturated (or wrapped) a result |

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 256 | FFT length, a power of two, at least 4 |
| `DATA_W` | 16 | input word width |
| `CONCURRENCY` | 8 | number of stage groups; must divide log2(N) |
| `SHARED_BF` | 0 | 0: the threaded pipeline above; > 0: the memory-based architecture with this many butterflies (see below) |
| `GROW` | 0 | 0: halve per stage at constant width; 1: one bit of growth per stage |
| `TW` | 16 | twiddle width (TW-2 fractional bits) |
| `RND`, `OVF` | `RND_ROUND`, `OVF_SAT` | rounding and overflow modes of the butterflies |

* **Throughput.** The core takes CONCURRENCY/log2(N) samples per clock. When `in_valid` is
  held high, `in_ready` is high once every G clocks.
* **Latency.** Bin 0 of a frame appears `CONCURRENCY*(G+1)` clocks after the frame's last
  sample is taken; that is 16 clocks at the defaults. The other N-1 bins follow at the input
  rate.
* **Flushing.** The pipeline holds N-1 samples, so a frame's spectrum leaves while the next
  frame streams in. To drain the last frame, feed N-1 more samples (for example zeros).
* **Output order.** A frame's spectrum leaves in bit-reversed order. A reorder buffer, if
  natural order is needed, is not part of the core.

These timing rules hold for `SHARED_BF = 0`. The memory-based architecture works frame by
frame and has its own timing, given in the next section.

## The memory-based alternative: `fft_resource_shared`

The usual low-area alternative to a pipeline is a memory-based FFT. `fft_resource_shared`
builds it, and `fft_hls_ip` selects it when `SHARED_BF > 0`, behind the same ports. It is
built from the same butterfly, twiddle values and scaling, so the two can be compared like for
like. It has a controller, `NBF` butterfly units working in parallel, one twiddle
look-up table per butterfly holding W^0 .. W^(N/2-1), and two frame memories of N words.

A frame is processed in three phases that do not overlap:

1. **Load.** N samples are written into memory 0. `in_ready` is high only in this phase.
2. **Compute.** There are log2(N) stages of N/(2*NBF) clocks each. In clock `t` of stage `s`,
   butterfly `j` takes pair number `m = t*NBF + j`. With `D = N/2^s` and block `b = m / D`,
   it reads `X1 = src[p]` and `X0 = src[p+D]`, where `p = 2*D*b + (m mod D)`. It uses the
   twiddle `W^bitrev_{L-1}(b)`. It writes `X1 + W*X0` to `dst[p]` and `X1 - W*X0` to
   `dst[p+D]`. Source and destination swap after every stage.
3. **Read-out.** The result is read at bit-reversed addresses, so the bins leave in natural
   order, one per clock, with `out_bin = k`.

These are exactly the pairs, factors and roundings of the pipelined core, so the spectra agree
bit for bit. Only the output order differs: natural here, bit-reversed in the pipeline.

The timing is as follows:

* One frame takes `2*N + log2(N)*N/(2*NBF)` clocks.
* Bin 0 appears `log2(N)*N/(2*NBF) + 2` clocks after the frame's last sample.

For example, at 256 points with one butterfly the frame period is 1536 clocks, about 6 clocks
per sample. The fully shared pipelined core needs 8 clocks per sample, but it keeps only N-1
words where this design keeps 2N. The template's cost is memory bandwidth: each memory needs
2*NBF read and 2*NBF write ports, which is why in practice the butterfly count is bounded by
the memories.

## Where this departs from, or adds to, the architecture it implements

* **Signal flow graph.** The published model names a constant-geometry flow graph with
  bit-reversed input and natural-order output. Its pipelined architecture, however, has the
  N/2 buffer at the input. The pipeline was followed. With that pipeline the input is in
  natural order and the output in bit-reversed order.
* **Handshake and stage schedule.** The published design gives only "a streaming protocol
  with a handshake to start". The valid/ready handshake, `out_bin`, the reset, and the exact
  clock schedule inside a group are this implementation's own.
* **Default concurrency.** `CONCURRENCY = 8` (fully pipelined) is the default. The published
  design presents 1, 2, 4 and 8 as equals.
* **Twiddle tables.** They are computed at elaboration with `$cos`/`$sin`, not read from a
  generated file.
* **Rounding details.** The tie rules of the rounding modes and the full-precision products
  are this implementation's own choices.
* **Applications not included.** The source's applications are an audio detector, GPS
  acquisition, a radar front end and an OFDM receiver. Only their FFT is provided here. Their
  sizes can be set with the parameters: 256 points at 14 bits; 1024 points at 4 bits;
  2048 points; 64 points with 5-bit input grown to 11 bits. The other blocks of those chains
  are not described in enough detail to build.

## Files

| file | contents |
|------|----------|
| `rtl/fxp_pkg.sv` | rounding and overflow managers, mode enums |
| `rtl/fxp_add.sv`, `rtl/fxp_mul.sv` | fixed-point adder/subtractor and multiplier |
| `rtl/fft_pkg.sv` | buffer and twiddle table layout, twiddle values, bit reversal |
| `rtl/fft_butterfly.sv` | radix-2 butterfly |
| `rtl/fft_twiddle_rom.sv` | twiddle table of a stage group |
| `rtl/fft_delay_buffer.sv` | 1R1W buffer memory of a stage group |
| `rtl/fft_stage_ctrl.sv` | per-stage counter: phase, pointer, twiddle index, valid |
| `rtl/fft_stage_group.sv` | one thread of G stages |
| `rtl/fft_hls_ip.sv` | top level |
| `rtl/fft_resource_shared.sv` | memory-based FFT with parallel butterflies (alternative architecture) |
| `tb/fft_check.sv` | stimulus and bit-accurate reference for the top level |
| `tb/fft_rs_check.sv` | the same for `fft_resource_shared` |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the ones below |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* **`tb_fft_hls_ip`.** Runs five cores side by side:
  * 256 points at concurrency 8, 4, 2 and 1;
  * 64 points with word growth.

  Each core streams random frames with random idle input cycles. Every output word and its
  bin index are compared bit for bit with an independent in-place reference FFT that uses the
  same fixed-point rules. Frame 0 is also compared with a floating-point DFT, within a
  tolerance of log2(N)+2 LSB. The testbench also checks that no input is taken before
  `start`, checks the latency and throughput above, and requires saturation to occur on a
  core driven at ±full scale.
* **`tb_fft_full`.** Checks the default configuration (no parameter overrides) in the same
  way, over three frames.
* **`tb_fft_workloads`.** Runs the four application sizes listed above.
* **`tb_fft_resource_shared`.** Checks the memory-based FFT the same way, bit for bit, in five
  configurations: 4 to 256 points, 1 to 8 butterflies, with and without word growth, and with
  saturation. It also checks latency, frame period and the run of N output clocks.
* **Unit testbenches.** They check the operators against real arithmetic for every rounding
  and overflow mode. They check the butterfly with random and full-scale operands, every
  twiddle entry, the memory's read-during-write behaviour, the stage counter's sequences, and
  a stage group both alone and chained.

Each testbench was also run against a deliberately broken copy of its module and failed.

To simulate with Verilator 5, list the packages first:

```
verilator --binary --timing --assert -Wno-fatal rtl/fxp_pkg.sv rtl/fft_pkg.sv \
    rtl/fxp_add.sv rtl/fxp_mul.sv rtl/fft_butterfly.sv rtl/fft_twiddle_rom.sv \
    rtl/fft_delay_buffer.sv rtl/fft_stage_ctrl.sv rtl/fft_stage_group.sv rtl/fft_hls_ip.sv \
    tb/fft_check.sv tb/tb_fft_hls_ip.sv --top-module tb_fft_hls_ip
./obj_dir/Vtb_fft_hls_ip
```

Replace `tb_fft_hls_ip` with any other testbench. Each run takes well under a second of
simulation time.
