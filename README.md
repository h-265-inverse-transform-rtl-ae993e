# HEVC 2D inverse transform co-processor

An HEVC (H.265) decoder turns each transform unit (TU) of dequantised
coefficients back into a block of prediction residuals. Its core step is an
integer 2D inverse transform, `Y = Tᵀ X T`. `T` is the 8-bit HEVC DCT matrix
of the TU's size (4, 8, 16 or 32), or the 4×4 DST matrix used for intra 4×4
luma blocks. This RTL is the FPGA side of a co-processor for that step. A
host streams TUs in. The co-processor streams residual blocks back, plus one
timing record per TU. Its architecture follows a published high-level-synthesis
(Impulse C) design for a Virtex-6 board with a PCIe link.

The design has three main ideas:

* **Two 1D passes with a transpose memory between them.** Each pass
  transforms the columns of its input block. It reads one whole column per
  clock and writes that column's N results as one *row* of its output
  block. Doing this twice gives `Tᵀ X T`.
* **A separate lane per TU size.** Each pass holds five 1D units: DST4 and
  DCT4/8/16/32. Each TU type also has its own transpose memory and its own
  output memory, sized for it. Only the input memory is shared.
* **A pipeline of four processing elements over ping-pong memories.** The
  four elements are the input transfer, the first pass (P1), the second pass
  (P2) and the output transfer. Every memory between two of them has two
  halves: one element fills one half while the next element drains the
  other. A controller launches each element when its source half is full
  and its destination half is free.

```
 in stream ─► FIFO ─► transfer_input ─► input_memory (32 row RAMs, 2 halves)
                                              │ one column / clock
                                              ▼
                           P1: itr_1d_stage  (shift 7)
                     DST4 | DCT4 | DCT8 | DCT16 | DCT32   (one row / clock)
                                              ▼
                     transpose_memory[type]  (5 of them, 2 halves each)
                                              │ one column / clock
                                              ▼
                           P2: itr_1d_stage  (shift 20 − bit depth)
                                              ▼
                     output_memory[type]     (5 of them, 2 halves each)
                                              │ one sample / clock
                                              ▼
 out stream ◄─ FIFO ◄─ transfer_output
 stats stream ◄─ FIFO ◄─ controller (launches every element, times P1 and P2)
```

## The arithmetic

### Matrices

Every entry of the 32-point HEVC matrix is ± one of 33 magnitudes `C[m]`:
90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67, 64, 61, 57, 54,
50, 46, 43, 38, 36, 31, 25, 22, 18, 13, 9, 4, 0 for `m` = 1…32. These are
hand-tuned integer versions of `64·√2·cos(mπ/64)`. Row 0 is all 64s. For
row `k > 0` and column `n`:

* take `m = k(2n+1) mod 128`;
* fold `m` into 0…32 using the symmetries of the cosine, and keep the sign
  of `cos(mπ/64)`.

The N-point matrix is a row sub-sample of the 32-point one:
`T_N[k][n] = T32[k·32/N][n]`. `hevc_it_pkg` computes all of this with
constant functions. No coefficient table is stored anywhere: every
coefficient reaches the multipliers as an elaboration-time constant. The 4×4
DST matrix has rows `29 55 74 84 / 74 74 0 −74 / 84 −29 −74 55 / 55 −84 74 −29`.

### 1D units: partial butterfly

`idct_1d` does not multiply by the full N×N matrix. It uses the even/odd
split, which follows from the symmetries of the DCT matrix:

* The odd rows give `O[m] = Σ_{k odd} T_s[k][m]·x[k]`, for `m < s/2`.
* The even rows form an s/2-point transform `E[m]` of the even inputs.
* Then `y[m] = E[m] + O[m]` and `y[s−1−m] = E[m] − O[m]`.

The split is applied level by level, from 2 points up to N. So a 32-point
column costs 256 + 64 + 16 + 4 + 1 constant products instead of 1024. The
products by 64 are shifts. `idst4_1d` uses the factored form of the HEVC
reference decoder, which needs 8 products:

```
c0 = x0+x2   c1 = x2+x3   c2 = x0−x3   c3 = 74·x1
y0 = 29c0 + 55c1 + c3      y1 = 55c2 − 29c1 + c3
y2 = 74(x0 − x2 + x3)      y3 = 55c0 + 29c2 − c3
```

### Rounding and clipping

After each pass every sum `s` becomes:

```
clip16((s + 2^(shift−1)) >>> shift)
```

* The shift is 7 after the first pass.
* The shift is `20 − BIT_DEPTH` after the second pass (12 for 8-bit video).
* `clip16` saturates to the signed 16-bit range −32768…32767. It applies
  both to the intermediate values stored in the transpose memory and to the
  residuals.

Sums are 32 bits wide. The worst case is 32 × 90 × 32768 < 2²⁷, so they
cannot overflow.

### Timing of one pass

A column leaves the source memory one clock after it is requested. It then
spends two clocks in the 1D unit: the butterfly sums are registered, then
the shifted and clipped results are registered. Columns are issued back to
back, so a pass over an N×N TU takes **N + 4 clocks** from start to done:
8, 8, 12, 20 and 36 clocks for DST4, DCT4, DCT8, DCT16 and DCT32.

## Memories and the transpose

| memory | count | organisation | write | read |
|---|---|---|---|---|
| `input_memory` | 1 (shared) | 32 row RAMs × (2 halves × 32 words) | 1 coefficient/clock | whole column/clock |
| `transpose_memory` | 1 per TU type | 2 × N × N registers | whole row/clock | whole column/clock |
| `output_memory` | 1 per TU type | N column RAMs × (2 halves × N words) | whole row/clock | 1 sample/clock |

The input memory and the output memory are plain one-write, one-read RAMs,
so each maps onto block RAM:

* The input memory is split by rows. A column read reads every row RAM at
  the same address.
* The output memory is split by columns. A row write writes every column
  RAM at the same address.

The transpose memory has to take a whole row and give a whole column in the
same clock. No RAM split allows both, so it is built from registers: 2 × 32
× 32 × 16 bits for the 32×32 lane.

All memory reads are synchronous, with one clock of latency. There is no
reset on memory contents, because nothing is read before it is written.

## Controller: hand-over, ordering, timing records

The controller tracks the state of every memory half:

* **Input memory:** one full flag per half, a write pointer and a read
  pointer.
* **Transpose and output memories:** for each TU type, a count of full
  halves (0 to 2) plus write and read pointers.

The launch rules:

* **P1** is launched when the next input half is full and the transpose
  memory of that TU's type has a free half.
* **P2** is launched when the oldest TU waiting after P1 has a free
  output-memory half, and the stats FIFO has room.
* **The output transfer** is launched when it is idle and a TU is waiting
  after P2.

Consecutive TUs may go through different memories, so two small queues
carry each TU's type from P1 to P2 and from P2 to the output transfer. This
keeps TUs in arrival order.

A free-running 16-bit clock counter timestamps P1 and P2. When P2 finishes
a TU, the controller writes a `stats_t` record to the stats FIFO:
`{type, P1 clocks, P2 clocks, clocks from P1 start to P2 done}`. Because P2
is only launched when that FIFO has room, a slow stats reader stalls the
pipeline rather than losing records.

## Interface of `hevc_itr_top`

Parameters:

* `BIT_DEPTH` (default 8) sets the second-pass shift.
* `FIFO_DEPTH` (default 64, a power of two) sets the depth of all three
  stream FIFOs.

Reset `rst_n` is synchronous and active low. All three streams are
valid/ready: a word moves when both signals are high.

| stream | direction | width | contents |
|---|---|---|---|
| `in_*` | in | 32 | header word (bits 2:0 = TU type), then N·N coefficients row-major in bits 15:0 |
| `out_*` | out | 32 | header word (same encoding), then N·N residuals row-major, sign-extended |
| `stats_*` | out | 51 | one `hevc_it_pkg::stats_t` per TU, in TU order |

TU type codes: 0 = DST 4×4, 1 = DCT 4×4, 2 = DCT 8×8, 3 = DCT 16×16,
4 = DCT 32×32. Codes 5–7 are undefined and are treated as 32×32.

## Throughput

The two 1D passes are never the bottleneck. Even for 32×32 they take 72
clocks per TU, against 1025 words on each stream. The stream transfers are
the bottleneck: each moves one word per clock, so a TU occupies the stream
for about N² + 3 clocks. On a quiet pipeline, a TU spends three stages
after its last coefficient is written:

* N + 4 clocks in each of the two passes;
* N² + 3 clocks in the output transfer.

At a 200 MHz clock, a 1920×1080 4:2:0 frame has about 3.1 M residual
samples plus one header per TU. That gives about 64 frames/s, or about 94
frames/s for luma alone. A 3840×2160 frame gives about 16 frames/s.

`tb_frame_workload` runs this end to end at full rate on every stream. It
sends 14,500 TUs, the TU count of a Full HD frame, in a fixed mix of all
five types, with about 230 samples per TU. The frame takes 3,373,801 clocks
for 3,343,700 input words, which is 0.9% above one clock per word. That is
16.9 ms, or 59 frames/s, at 200 MHz.

The same testbench also tiles a 1920×1080 luma frame with a single TU type.
The published per-type frame rates of the original design are computed the
same way:

| TU type | TUs per frame | clocks | frames/s at 200 MHz | original design |
|---|---|---|---|---|
| DST 4×4 | 129,600 | 2,462,437 | 81.2 | 32.8 |
| DCT 4×4 | 129,600 | 2,462,437 | 81.2 | 32.8 |
| DCT 8×8 | 32,400 | 2,170,893 | 92.1 | 31.3 |
| DCT 16×16 | 8,100 | 2,098,201 | 95.3 | 30.4 |
| DCT 32×32 | 2,025 | 2,080,776 | 96.1 | 38.6 |

A 4×4 TU costs 19 clocks: the output transfer's N² + 3. A 32×32 TU costs
1027 clocks. The original design's rates count only its 2D transform time
per TU. The rates here include the stream transfers. Over its own real TU
mix, the original reports an average of 357 clocks per TU, or 39 frames/s.

This design's timing closure has not been checked, so 200 MHz is an assumed
clock, not a measured one.

## Where this RTL departs from the design it follows, or fills gaps

* **Clip range.** The text of the original design gives the clip range as
  ⟨−32767, 32768⟩. This RTL uses the 16-bit two's-complement range of the
  HEVC reference software, −32768…32767.
* **Shift values.** 7 and 20 − bit depth are the HEVC reference values. The
  original design passes the shift as a run-time argument and does not say
  what it is.
* **Coefficients.** The original stores the coefficients in a RAM and feeds
  them to DSP multipliers. Here they are elaboration-time constants inside
  the 1D units, so a synthesiser turns the products into shift-and-add
  logic or constant multipliers.
* **Register copies.** The original copies the input memory into several
  register arrays to cut fan-out. That copy is not built. One registered
  column read fans out to all five units.
* **This design's own choices.** The following are not described in the
  original design and were chosen here:
  * the stream framing (a header word carrying the type);
  * the valid/ready handshakes;
  * the controller's flags, queues and stall rules;
  * the contents of the stats record: the original collects durations of
    all its important processing elements, but this record holds only the
    two passes and their combined time, not the two stream transfers;
  * the FIFO depths.
* **Measured durations.** The per-size durations reported for the original
  implementation are 47, 47, 197, 812 and 2541 clocks for the 2D transform.
  This RTL needs 2N + 8 clocks (16, 16, 24, 40 and 72). The testbenches
  check that it never exceeds the original figures.
* **Not included.** The host side is not part of this RTL: the software
  that produces coefficients, consumes residuals and collects statistics,
  and the board's PCIe link and its support library. The three FIFOs' outer
  sides are the top's ports.

## Files

| file | what it is |
|---|---|
| `rtl/hevc_it_pkg.sv` | types, TU encoding, matrix functions, rounding/clip, `stats_t` |
| `rtl/idct_1d.sv` | N-point 1D inverse DCT, partial butterfly, rate 1, latency 2 |
| `rtl/idst4_1d.sv` | 4-point 1D inverse DST, rate 1, latency 2 |
| `rtl/itr_1d_stage.sv` | one pass (P1 or P2): five units plus the column-loop sequencer |
| `rtl/input_memory.sv` | shared coefficient memory, column read |
| `rtl/transpose_memory.sv` | per-size row-write/column-read store |
| `rtl/output_memory.sv` | per-size row-write/sample-read store |
| `rtl/transfer_input.sv` | stream → input memory |
| `rtl/transfer_output.sv` | output memory → stream |
| `rtl/controller.sv` | launches, hand-over, ordering, timing records |
| `rtl/sync_fifo.sv` | valid/ready FIFO |
| `rtl/hevc_itr_top.sv` | the whole co-processor |

Every module has a testbench `tb/tb_<module>.sv`. Each one is self-checking
against a model written independently of the RTL: a direct matrix product
rather than a butterfly, and queues rather than the RTL's state machines. It
ends by printing `TB_RESULT checks=N failures=M`.

`tb_hevc_itr_top` runs the top at its default parameters. It sends 110 TUs
of all five types and checks:

* every residual, bit-exact;
* every header;
* every timing record.

It also makes each flow-control path happen at least once, and fails if one
never does:

* input memory full;
* transpose memory full;
* output memory full;
* stats FIFO full;
* output FIFO full;
* reader stalls;
* saturation in the clip;
* P1 and P2 working at once.

`tb_frame_workload` runs the six frames described under Throughput, about
316,000 TUs in all, in about 40 s of simulation. It checks:

* every residual and every record;
* that the mixed frame fits a 30 frames/s budget at 200 MHz;
* that each single-type frame reaches the original design's rate.

## Simulating

With Verilator 5, the package first and the testbench last:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    --top-module tb_hevc_itr_top \
    rtl/hevc_it_pkg.sv rtl/sync_fifo.sv rtl/controller.sv rtl/idct_1d.sv \
    rtl/idst4_1d.sv rtl/itr_1d_stage.sv rtl/input_memory.sv \
    rtl/transpose_memory.sv rtl/output_memory.sv rtl/transfer_input.sv \
    rtl/transfer_output.sv rtl/hevc_itr_top.sv tb/tb_hevc_itr_top.sv
./obj_dir/Vtb_hevc_itr_top
```

The full-size test builds in about 20 s and runs in well under a second.
For a unit test, replace the top and its testbench with the module, the
modules it instantiates, and its `tb_` file.

## How far to trust it

* The arithmetic is checked bit-exactly against an independent model, for
  all five transforms, at both shifts and with saturating inputs.
* The coefficient functions are checked against the published HEVC 4×4 and
  8×8 matrices and against rows of the 16- and 32-point matrices.
* The pipeline is checked under heavy back-pressure on every stream.
* Lint (Verilator) and elaboration (slang) are clean apart from
  unused-signal warnings.
* Not checked: timing closure, resource use on any FPGA, and behaviour with
  undefined header codes beyond what is described above.
