# Streaming radix-2 FFT with carry skip adder arithmetic

This design is a small pipelined FFT processor for communication receivers
such as OFDM. It takes one complex sample per clock and returns one frequency
bin per clock. By default it computes 8 points on 8-bit samples. The
structure is a single-path delay feedback (SDF) pipeline: one radix-2
butterfly per stage, with a feedback delay line that keeps half of every
butterfly's results until they can leave. The arithmetic is built from
explicit gate-level units:

- a **carry skip adder** for every addition in the butterflies and the
  complex multiplier;
- a **ripple-borrow subtractor**, made of a half subtractor and a chain of
  full subtractors, for every subtraction;
- a **signed array multiplier** built from AND and NAND cells;
- a **complex multiplier** that needs only three real products.

All modules are parameterised. The defaults are N = 8 points, 8-bit input
words and 8-bit twiddle factors.

## Data flow

```
in_re ─► SISO (8 words) ─┐      stage 1          stage 2            stage 3
in_im ─► SISO (8 words) ─┴─► [delay 4]+BF ─► W·[delay 2]+BF ─► W·[delay 1]+BF ─► out_re/out_im, out_bin
```

1. **Input frame buffer.** Two serial-in serial-out shift registers hold the
   real and imaginary parts. Each is N words deep and shifts on every valid
   input. A sample comes out of it N valid samples after it went in.
2. **Three SDF stages.** Their delay lines are N/2, N/4 and N/8 words long
   (4, 2 and 1 at the default). Each stage runs the N/2 butterflies of one
   column of the FFT flow graph on a single butterfly, one after another.
3. **Output.** Results leave in bit-reversed order. `out_bin` gives the
   frequency index k of each result, so a consumer can write it straight to
   `X[k]`. The design does not reorder the output.

## How an SDF stage works

This is the part that takes the most effort to follow.

Stage s pairs frame positions i and i + D, where D = N/2^s. Its delay line is
D words long. A position counter splits each frame into halves of D samples:

| incoming sample is…                  | pushed into the delay line      | sent to the next stage                                           |
|--------------------------------------|---------------------------------|------------------------------------------------------------------|
| upper (position bit D clear)         | the sample itself               | the word leaving the delay line (a difference from the previous group) |
| lower (position bit D set)           | `upper − W·lower` (difference)  | `upper + W·lower` (sum), where `upper` is the word leaving the delay line |

So each stage turns a natural-order stream into another natural-order stream.
The stage delays it by D samples plus one register.

The FFT is the decimation-in-time algorithm, arranged for natural-order
input. In that arrangement the twiddle multiplies the lower input *before* the
butterfly. For frame position i in stage s the exponent is

```
e = bitrev_{s-1}( i >> (log2 N − s + 1) ) · N / 2^s        W = W_N^e = exp(−j·2π·e/N)
```

In stage 1 this is always W^0 = 1, so stage 1 has no multiplier. For N = 8
the twiddles are:

- stage 2: W^0, W^0 for positions 0–3, then W^2, W^2 for positions 4–7;
- stage 3: W^0, W^2, W^1, W^3 for the four pairs.

The outputs of the last stage are the DFT bins in bit-reversed order.

The **first D outputs after reset** come from the zeroed delay line and are
not flagged. `out_valid` in a stage rises with the first lower-half sample.

**Only valid cycles move data.** Every register advances only when its input
is valid. A frame's last results therefore leave when the next frame's first
samples arrive. To drain the pipeline, feed zeros after the last frame. The input registers
hold N words and the stages N/2 + N/4 + ... + 1 = N − 1 more, so two frames of
zeros flush everything out.

## Arithmetic units

### Carry skip adder (`cska`)
The operands are split into blocks of `BLOCK` bits (4 by default). Inside a
block the carry ripples through full adders. Each block also has a block
propagate, P = AND of (a_i XOR b_i). The carry out of a block is

```
c_out = c_ripple | (P & c_in)
```

If every bit of a block propagates, the carry entering it skips to the next
block through one AND-OR gate and does not ripple through its full adders.
This gives the same sums as the usual 2:1 skip multiplexer. The last block
may be shorter than `BLOCK` when `WIDTH` is not a multiple of it.

### Subtractor (`subtractor`)
Bit 0 uses a half subtractor:

- d = a ^ b
- b_out = ~a & b

Every other bit uses a full subtractor:

- d = a ^ b ^ b_in
- b_out = (~a & b) | (~(a ^ b) & b_in)

The result is correct modulo 2^WIDTH, so it also works for two's complement
operands.

### Signed array multiplier (`baugh_wooley_multiplier`)
This is an N×N array of full-adder cells in carry-save form. Row j adds
a_i·b_j into the sums and carries of the row above.

Cells whose product has exactly one sign bit (a_{N−1}b_j or a_ib_{N−1}, with
i, j < N−1) use the **NAND** of the two bits. All other cells use the
**AND**, including a_{N−1}b_{N−1}.

Each row gives one low product bit. A last ripple row of N full adders gives
the high half, with a constant 1 on its carry input (weight 2^N). The top
product bit is inverted, which adds 2^(2N−1). Together, these two constants
cancel the offset introduced by the NAND cells. The result is the exact
2N-bit two's complement product.

### Complex multiplier (`complex_multiplier`)
The product (x + jy)(C + jS) is formed as

```
R = y·(C − S) + C·(x − y)  = xC − yS
I = x·(C + S) − C·(x − y)  = xS + yC
```

This uses three array multipliers, one subtractor for x − y, one carry skip
adder for R and one subtractor for I. C + S and C − S are constants for a
twiddle factor. They come precomputed from the twiddle table, so no adder is
spent on them.

## Number formats and widths

- **Input:** DW-bit two's complement (default 8) for the real and the
  imaginary part.
- **Twiddles:** TW-bit two's complement (default 8) with TW − 2 fraction
  bits, so ±1.0 = ±64. C + S and C − S take TW + 1 bits. The table is
  computed at elaboration with `$cos`/`$sin` and rounded to nearest. The
  formula is in `fft_pkg::twiddle`.
- **Twiddle products:** computed exactly, then shifted right by TW − 2
  (truncation toward −∞). They are kept at one bit more than the data
  (`|re| + |im|` can grow by √2).
- **Growth:** the datapath does not scale. Each butterfly adds one bit, and
  each twiddle multiply in stages 2 and up adds one bit. The output is
  therefore DW + 2·log2(N) − 1 bits wide: 13 bits for the default.
- **Accuracy:** the results equal the exact DFT sum X[k] = Σ x[n]·W_N^{nk},
  apart from twiddle quantisation and product truncation. The error stays
  below 2·log2(N) plus (log2(N) − 1)/128 of the summed input magnitudes.
  With 8-bit twiddles the quantisation part grows with N; widen `TW` for
  larger transforms.

## Interface and timing (`cska_fft`)

| port                 | dir | width             | meaning                                      |
|----------------------|-----|-------------------|----------------------------------------------|
| `clk`                | in  | 1                 | clock, all registers on the rising edge      |
| `rst_n`              | in  | 1                 | synchronous, active low; clears every register |
| `in_valid`           | in  | 1                 | a sample is presented                        |
| `in_re`, `in_im`     | in  | DW                | input sample                                 |
| `out_valid`          | out | 1                 | a result is presented                        |
| `out_re`, `out_im`   | out | DW+2·log2(N)−1    | X[`out_bin`]                                 |
| `out_bin`            | out | log2(N)           | frequency index of the result                |

Frames are N consecutive valid samples in natural order. The first frame
starts with the first valid sample after reset.

Throughput is one sample per clock. If the stream has no gaps, the result
for frame position p of a frame whose first sample was accepted at cycle t0
is presented 2N − 1 + log2(N) cycles after t0 + p. That is 18 cycles for
N = 8. Gaps in `in_valid` simply stretch the schedule.

The datapath from a stage's input register through the twiddle multiplier
and the butterfly to its output register is combinational. The design adds
no internal pipelining.

## Design choices and limits

These parts follow the source design:

- the block chain SISO → carry skip adder / adder / subtractor → SDF
  pipeline;
- the radix-2 decimation-in-time algorithm;
- 8 points, with delay lengths N/2, N/4, N/8;
- 8-bit input words, and an 8-stage input register;
- the half/full subtractor structure;
- the AND/NAND array multiplier, including the constant 1 entering its last
  row;
- the three-multiplier complex product with C + S, C − S and C as
  multiplier inputs.

These are choices made for this implementation:

- uniform 4-bit skip blocks and an AND-OR skip gate;
- the inverted top product bit that supplies the multiplier's second
  constant;
- word-wide input register stages;
- the twiddle format, rounding and truncation, and no scaling;
- natural input order with bit-reversed output and the `out_bin` index;
- the valid handshake and the synchronous reset.

Deliberately left out:

- **The "folding architecture" step.** The source names it only. Folding a
  column of butterflies onto one butterfly is exactly what each SDF stage
  does, so no extra block was added.
- **Output reordering** to natural order.
- **The carry-skip variant with concatenation and incrementation blocks and
  AOI/OAI skip gates.** It is a reference point, not part of this datapath.
- **A four-multiplier complex product.**
- **Any FPGA-specific mapping.**

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|-----------|----------------|
| `tb_cska` | all 8-bit operand pairs with both carry-ins; a 13-bit adder with a short last block, on random operands and on carries that skip every block |
| `tb_subtractor` | all 8-bit pairs (difference and borrow); random 17-bit operands |
| `tb_baugh_wooley_multiplier` | all 8×8 and 5×5 signed operand pairs |
| `tb_complex_multiplier` | all eight 8-point twiddles against integer arithmetic, on random and full-scale data |
| `tb_radix2_butterfly` | random and extreme 9-bit operands |
| `tb_siso_shift_register` | random data with a random shift enable; the valid flag and the 8-shift delay |
| `tb_sdf_stage` | stages 1–3 on a random stream with gaps, against a per-stage model; every output's latency |
| `tb_cska_fft` | the default design end to end (see below) |
| `tb_cska_fft_n16` | the same end-to-end checks on a 16-point, 10-bit configuration (four stages, 35-cycle latency) |

**What `tb_cska_fft` checks.** It runs the default design on 52 frames, then
flushes it with zero frames. The frames are:

- an impulse, a constant and full-scale corners;
- the 0/1 sequences 1,0,0,0,1,0,0,0 (real) and 1,0,1,0,0,0,0,0 (imaginary);
- random data.

The frames are sent first back to back, then with random gaps.

Every result is compared three ways:

- with a bit-exact integer model of the algorithm written in the testbench;
- with the floating-point DFT, within the accuracy bound given above;
- on its `out_bin` value.

For the gap-free frames it also checks the 18-cycle latency. It counts how
often each mechanism acted and fails if any of them never did: SISO output,
a carry skip taken, a feedback word sent, a non-trivial twiddle, a
subtractor borrow.

Run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cska_fft \
  rtl/fft_pkg.sv rtl/full_adder.sv rtl/cska.sv rtl/subtractor.sv \
  rtl/baugh_wooley_multiplier.sv rtl/complex_multiplier.sv rtl/radix2_butterfly.sv \
  rtl/siso_shift_register.sv rtl/sdf_stage.sv rtl/cska_fft.sv tb/tb_cska_fft.sv
./obj_dir/Vtb_cska_fft
```

To change the size, override `N` (a power of two, at least 4), `DW` or `TW`
on `cska_fft`. The twiddle table and all widths follow from these.

## Files

| file | module |
|------|--------|
| `rtl/fft_pkg.sv` | default sizes, bit reversal, stage widths, twiddle formula |
| `rtl/cska_fft.sv` | top: input registers and the stage chain |
| `rtl/sdf_stage.sv` | one SDF stage |
| `rtl/radix2_butterfly.sv` | butterfly (adders and subtractors) |
| `rtl/complex_multiplier.sv` | three-multiplier complex product |
| `rtl/baugh_wooley_multiplier.sv` | signed AND/NAND array multiplier |
| `rtl/cska.sv` | carry skip adder |
| `rtl/subtractor.sv` | half/full subtractor chain |
| `rtl/full_adder.sv` | one-bit full adder cell |
| `rtl/siso_shift_register.sv` | input frame register |
