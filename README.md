# Soft-decision decoder for the extended Golay (24,12) code

The extended binary Golay code packs 12 data bits into a 24-bit codeword,
has minimum distance 8, and is self-dual. A hard-decision decoder throws away
how sure the receiver was of each bit. A soft-decision decoder keeps that
information and gains about 2 to 3 dB on an AWGN channel. Full
maximum-likelihood decoding means scoring all 4096 codewords. This design
scores only 24 well-chosen candidates and still decodes close to ML.

The trick uses the code's self-duality. With codeword `c = (d, p)` and
`p = d·P`, the matrix `P` is its own inverse-transpose: `P⁻¹ = Pᵗ`. So a full
codeword can be rebuilt from either half:

* from the data half: `p = d·P`;
* from the parity half: `d = p·Pᵗ`.

The decoder takes the hard decisions of one half and flips bits in that
half's 5 least reliable positions, trying 12 flip patterns. It rebuilds the
full codeword from each result. It does this for both halves, giving 12 + 12
candidates. The candidate closest to the received soft word is the decision.
If the channel errors are few and sit mostly in one half, at least one list
contains the transmitted codeword.

The RTL follows a published low-complexity architecture for this algorithm:
reception, processing, transmission and control blocks, 4-bit soft inputs,
5 least reliable positions per half, and 12 + 12 test patterns. Where that
description stops short, this design makes its own choices. They are listed
under [Where this design departs from or adds to the source](#where-this-design-departs-from-or-adds-to-the-source).

## Data format

* A frame is 24 soft symbols, sent one per clock. Symbols 0..11 are the data
  bits `d[0..11]` and symbols 12..23 are the parity bits `p[0..11]`.
* A soft symbol (`golay_pkg::soft_t`) has a sign bit and a 3-bit magnitude.
  The BPSK mapping is bit 0 → positive sample and bit 1 → negative sample. So
  the sign bit is the hard decision, and the magnitude (0..7) is how reliable
  it is.
* The output is the 12 decoded data bits, sent serially, `d[0]` first.

## The code and the Cortex re-encoder

The decoder re-encodes 24 candidates per frame, so the encoder sits on the
critical path. It uses the *Cortex* construction (`cortex_encoder`). The 12
input bits are split into three nibbles, and each nibble is replaced by its
parity under the (8,4,4) extended Hamming code. The 12 results are permuted,
and this is repeated for three layers:

```
x ─► [H H H] ─► π ─► [H H H] ─► π ─► [H H H] ─► y
```

`H` is the (8,4,4) code in which message bits 1, 2, 4, 8 give parity
nibbles `D`, `7`, `E`, `B` (`hamming_enc`). `π` is `golay_pkg::CORTEX_PERM`: bit `i` of the next
layer's input is bit `π[i]` of the previous layer's output. Each `H` block is
a 4×4 orthogonal matrix over GF(2), because the Hamming code is self-dual,
and each `π` is a permutation. So the whole map is orthogonal too. Run
backwards, it is the parity-to-data map: last layer first, inverse
permutation, transposed `H` blocks (`INVERSE = 1`).

The source names this three-layer structure but does not give the
permutation. The permutation used here was chosen because it makes the
24-bit code reach minimum distance 8. Any [24,12,8] binary code is the
extended Golay code up to the order of its bits. The resulting `P` (row `i`
is the parity of the data word with only bit `i` set) is:

```
P rows (hex, bit 0 = p[0]): 376 fa2 9d3 1af a9e d4e 71b a6b 4fa c37 ffd 6c7
```

An encoder for a transmitter that talks to this decoder must use the same
`P`. `cortex_encoder` with `INVERSE = 0` is exactly that encoder.

## Decoding algorithm

For one received frame, with hard decisions `h` and magnitudes `|r|`:

1. **Least reliable positions.** For each half, list the 5 positions with
   the smallest magnitudes, least reliable first. On a tie, the earlier
   position counts as less reliable.
2. **Test patterns.** Pattern `t` (0..11) flips these ranks of that list
   (`golay_pkg::tp_ranks`):

   | t | ranks flipped |
   |---|---|
   | 0 | none |
   | 1–5 | rank t−1 alone |
   | 6–11 | pairs (0,1) (0,2) (0,3) (1,2) (1,3) (2,3) |
   | 12–15 | pairs (0,4) (1,4) (2,4) (3,4), used only when `N_TP_HALF = 16` |

   The top parameter `N_TP_HALF` is 12 by default, giving 12 + 12
   candidates. It can be set to 16, which tries all 16 flips of up to two of
   the 5 positions; the steps then run in counter states 1..16.

3. **Candidates.** The data-list candidate `t` is `d' = h_d ^ mask`, giving
   `(d', d'·P)`. The parity-list candidate `t` is `p' = h_p ^ mask`, giving
   `(p'·Pᵗ, p')`.
4. **Metric.** Each candidate's metric is the sum of `|r_i|` over the
   positions where it disagrees with the hard decision (`metric_unit`). This
   differs from the correlation `Σ ±r_i` only by a per-frame constant and a
   factor of 2. So the smallest metric is the largest correlation, which is
   the ML score. The metric is at most 24·7 = 168, which fits 8 bits.
5. **Choice.** Candidates are ranked in the order: data 0, parity 0, data 1,
   parity 1, and so on. Among those with the smallest metric, the first one
   in that order wins.

## Pipeline and timing

A 5-bit counter `cnt` (`control_counter`) runs 0..23 and sets the pace. Each
frame passes through two 24-clock stages, and then transmission:

| cnt | Reception (frame k) | Processing (frame k−1) | Transmission (frame k−2) |
|---|---|---|---|
| 0 | symbol 0 in; lists restart | copy frame k−1 from reception | bit 0 out |
| 1..11 | symbols 1..11 in | test patterns 0..10, both halves | bits 1..11 out |
| 12 | symbol 12 in; parity list restarts | test pattern 11 | idle |
| 13..22 | symbols 13..22 in | idle (decision held) | idle |
| 23 | symbol 23 in | decision loaded into PISO | idle |

* **Reception** (`reception_block`) shifts every symbol into a 24-deep SIPO
  (`sipo_buffer`). Two insertion sorters (`lrp_sorter`), one per half, keep
  the 5 smallest magnitudes and their positions. Each sorter takes one
  symbol per clock.
* **Processing** (`processing_block`) copies the finished frame into its own
  registers at `cnt = 0`. That frees the reception block to start on the
  next frame in the same clock. In each of the next 12 clocks it applies one
  test pattern to both halves at once. Each half has its own pattern
  generator, Cortex re-encoder (forward for data, reverse for parity) and
  metric unit. The `selection_unit` compares the two candidates and the
  stored best.
* **Transmission** (`tx_piso`) is a 12-bit PISO loaded at `cnt = 23`.

The figures that result:

* **Latency:** 48 clocks (2n) from symbol 0 in to data bit 0 out.
* **Throughput:** one frame per 24 clocks, that is 12 data bits per 24
  clocks.
* **Combinational paths:** the longest path in processing is pattern mask,
  three XOR layers, then a 24-input adder and the comparator.

## Interface (`golay_soft_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of all registers |
| `in_sym` | in | `soft_t` (4) | soft symbol `cnt` of the current frame |
| `in_valid` | in | 1 | sampled with symbol 0; tags the whole frame as valid |
| `frame_start` | out | 1 | this clock is the slot of symbol 0 |
| `out_bit` | out | 1 | decoded data bit |
| `out_valid` | out | 1 | `out_bit` belongs to a valid frame (12 clocks per frame) |
| `out_first` | out | 1 | `out_bit` is `d[0]` |
| `out_metric` | out | 8 | metric of the chosen codeword |
| `out_from_parity` | out | 1 | chosen codeword came from the parity-half list |

The decoder runs freely after reset, and the source must line its frames up
with `frame_start`. There is no back-pressure. Frames marked invalid still
pass through the pipeline, but produce no `out_valid`.

## Module map

| module | role |
|---|---|
| `golay_pkg` | sizes, `soft_t`, the (8,4,4) code, Cortex permutation, test-pattern table |
| `golay_soft_decoder` | top: counter, three stages, frame-valid tags |
| `control_counter` | 0..23 frame counter |
| `reception_block` | `sipo_buffer` plus two `lrp_sorter`s |
| `processing_block` | frame buffer, two branches of `error_pattern_gen` → `cortex_encoder` → `metric_unit`, `selection_unit` |
| `hamming_enc` | (8,4,4) parity nibble, or its inverse |
| `tx_piso` | serial output |

## Where this design departs from or adds to the source

* **Cortex permutation.** Chosen here, as described above. The source shows
  it only in a figure. A different valid permutation would give an
  equivalent Golay code with a different `P`.
* **Inside of the Hamming block.** The source builds the (8,4,4) code itself
  as a Cortex of (4,2,2) codes. Here it is written directly from its
  generator, which gives the same function.
* **Choice of the test patterns.** The source fixes only the count (12 per
  half in its architecture, 16 per half in one of its performance runs) and
  the 5 positions.
* **Metric.** A discrepancy metric replaces the signed correlation. The
  decisions are the same.
* **Tie rules.** On equal magnitudes, the earlier position counts as less
  reliable. On equal metrics, the earlier candidate wins.
* **Depth of the SIPO.** It holds all 24 samples, because the metric needs
  both halves. The source speaks of 12 stored samples.
* **Frame schedule, handshake and reset.** These are this design's own. The
  source's latency formula `L = 2n` is kept: 48 clocks.
* **Data rate.** The source quotes 400 MHz in 0.18 µm CMOS and a data rate
  of 450–500 Mb/s. With one frame per 24 clocks, this schedule gives
  200 Mb/s of data at 400 MHz. The source's own description of its stages
  (24 clocks per frame in, 12 bits out) gives the same figure. No clock
  target has been checked here.
* **Not built.**
  * The larger Cortex codes (32, 64 and 128 bits) whose gate counts the
    source lists.
  * The alternative encoders the source reviews: an 11-stage LFSR for the
    cyclic form, and generator-matrix encoding.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model,
`tb/golay_ref_pkg.sv`, is deliberately independent of the RTL. It defines the
code by the matrices `P` and `Pᵗ` rather than by the Cortex layers, and the
Hamming code by its list of codewords. It finds the least reliable positions
with a plain stable sort.

* `tb_cortex_encoder` checks all 4096 data words. The forward encoder must
  give `d·P`, the reverse encoder must undo it, and the minimum codeword
  weight must be exactly 8.
* `tb_golay_soft_decoder` is the end-to-end test, run at the default sizes:
  * Setup: 1500 frames of random data, approximately Gaussian noise at five
    levels, some frames marked invalid, frames sent back to back.
  * Each output frame is compared with the reference decoder: data, metric,
    and which list it came from.
  * Noiseless frames must decode to the data that was sent.
  * The latency of every frame must be exactly 48 clocks.
  * It counts how often each mechanism is used, and fails if one is never
    used: pattern 0 wins, a single flip wins, a double flip wins, a
    data-list candidate wins, a parity-list candidate wins, bits are
    corrected, an invalid frame is dropped, frames arrive back to back.

`tb_golay_ber` measures how close to ML decoding the design gets. It feeds
the same stream to two decoders, one with 12 patterns per half and one with
16. It decodes 300 noisy frames at each of three noise levels. For every
frame it also runs an exhaustive ML search over all 4096 codewords, on the
same quantized samples. The noise levels correspond to Eb/N0 of about 4.3,
1.2 and −1.0 dB before quantization. The measured frame errors were:

| Eb/N0 (approx.) | 12 + 12 | 16 + 16 | ML |
|---|---|---|---|
| 4.3 dB | 0 | 0 | 0 |
| 1.2 dB | 54 | 51 | 40 |
| −1.0 dB | 139 | 131 | 122 |

The test fails in any of these cases:

* either decoder makes more than 1.5 × the ML errors plus 3;
* either decoder's metric falls below the ML metric;
* the 16-pattern metric is ever worse than the 12-pattern one.

A separate model evaluation compared other choices of the 12 test patterns,
for example adding a triple flip or a pair with rank 4. They gave the same
frame error rate within a few percent. So at these low SNRs the gap to ML
comes from the 5-position, 24-candidate list itself, not from which 12
patterns are tried.

## Simulating

Plain Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/golay_pkg.sv tb/golay_ref_pkg.sv tb/tb_golay_soft_decoder.sv \
  --top-module tb_golay_soft_decoder -o sim
./obj_dir/sim
```

To run a unit test, replace the testbench file and the top module with, for
example, `tb/tb_lrp_sorter.sv` and `tb_lrp_sorter`. The testbenches set
up their stimulus with `$urandom`; pass `+verilator+seed+N` to the
simulation to vary it. Change `NFRAMES` in
the end-to-end test for a longer run.
