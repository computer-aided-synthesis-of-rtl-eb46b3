# Multiplier-free 8x8 two-dimensional DCT engine

This is a streaming engine for the 8x8 two-dimensional discrete cosine transform
(DCT). The 8x8 DCT is the block transform at the heart of video and image coders.
The engine takes one 8-bit pixel per pixel slot and produces one 14-bit
coefficient per slot, with no gaps between blocks. It uses no multipliers. Each
one-dimensional transform is done by *distributed arithmetic*: the inputs are
processed one bit plane at a time, each bit plane addresses a small constant table,
and the table outputs are accumulated with shifts and adds.

The RTL reconstructs a late-1980s VLSI design: a 2 µm chip of about 8,900 gates,
run at 27 MHz for a 13.5 MHz pixel rate. Its architecture, word sizes, clocking and
latency follow that design. The binary points, the interface strobes, reset and
some internal details are this implementation's own choices; they are listed
under [Departures and open points](#departures-and-open-points).

## The transform and how it is split

For an N x N block X (N = 8), the transform is

    Y = C^T X C,      C[m][0] = sqrt(1/N),
                      C[m][k] = sqrt(2/N) cos((2m+1) k pi / 2N),  k = 1..N-1

where C is the orthonormal DCT matrix, m is the sample index and k the frequency.
It is done as two one-dimensional transforms with a transposition in between:

    Z = X^T C      (each column of X gives one row of Z)
    Y = Z^T C      (each column of Z gives one row of Y)

This gives four stages:

    pix_in ─> IR ─> MDCT1 ─> TMEM ─> MDCT2 ─> OR ─> y_out
               \_______ all sequenced by CU _______/

| Stage | Module | Role |
|---|---|---|
| IR | `ir_sipo` | Input register. Shifts in 8 pixels (one column of X) and presents them as a vector. |
| MDCT1 | `mdct` (8-bit in, 11-bit out) | One-dimensional DCT of the column. The result is one row of Z. |
| TMEM | `tmem`, built from `tmem_bs` | Transposition memory: an 8x8 shift matrix. Rows of Z go in and columns of Z come out. |
| MDCT2 | `mdct` (11-bit in, 14-bit out) | One-dimensional DCT of a column of Z. The result is one row of Y. |
| OR | `or_piso` | Output register. Sends the 8 coefficients of a row out one at a time. |
| CU | `cu` | Control unit: counters and strobes for all stages. |

Both MDCT stages are the same module with different widths.

## Time base: the vector period

The clock runs at CPP = 2 times the pixel rate. Eight pixels therefore take a
**vector period** of 16 clocks. Every stage moves exactly one 8-word vector per
period, and all hand-overs happen together on the last clock of the period
(`vec_stb`).

| Clock in period | 0 | 1 | 2 | ... | 8 | ... | 11 | ... | 15 |
|---|---|---|---|---|---|---|---|---|---|
| pixel sampled into IR (`pix_stb`) | x | | x | ... | x | ... | | ... | |
| MDCT1 bit step (W1 = 9) | q=0, first | q=1 | q=2 | ... | q=8, sign (last) | | | | |
| MDCT2 bit step (W2 = 12) | q=0, first | q=1 | q=2 | ... | q=8 | ... | q=11, sign (last) | | |
| OR element change (`or_shift`) | | x | | ... | | ... | x | ... | x |
| IR->MDCT1, MDCT1->TMEM, TMEM->MDCT2, MDCT2->OR (`vec_stb`) | | | | | | | | | x |

A block travels as follows, counted in vector periods from the one in which its
first column enters:

| Period | What happens to the first column / row |
|---|---|
| 0 | Column 0 of X enters IR, one pixel per slot. |
| 1 | MDCT1 transforms it (9 bit steps) and row 0 of Z goes into TMEM at the end of the period. |
| 2-8 | The other 7 rows of Z follow. |
| 9 | TMEM now runs in the other direction and presents column 0 of Z. MDCT2 loads it. |
| 10 | MDCT2 transforms it. Row 0 of Y is complete at the end of the period. |
| 11 | OR sends Y[0][0..7] out. |

So a row of Y is complete 10 vector periods after the matching input column has
been gathered: 1 period in MDCT1, 8 in TMEM and 1 in MDCT2. The first coefficient
Y[0][0] leaves (N+3)·N·CPP = 176 clocks after x[0][0] was sampled. The schedule
needs each serial multiplication, plus its load, to fit in one period:
W + 1 ≤ N·CPP. `cu` checks this when the design elaborates.

## Inside an MDCT stage: butterfly and distributed arithmetic

Coefficient k of an N-point DCT is z_k = Σ_m C[m][k]·x_m. Because the cosines are
symmetric, C[N-1-m][k] = ±C[m][k], so only half the inputs matter:

    even k:  z_k = Σ_{m<N/2} C[m][k]·s_m,   s_m = x_m + x_{N-1-m}
    odd k:   z_k = Σ_{m<N/2} C[m][k]·d_m,   d_m = x_m - x_{N-1-m}

**phase_a** computes the 4 sums and 4 differences when a vector is loaded. It keeps
each one exactly in IW+1 bits. It then shifts them right one bit per clock, so
`sbit`/`dbit` carry bit plane q of all 8 words in clock q, least significant bit
first, with the sign bit last. This register is the stage's one-period pipeline
register.

**phase_b** holds 8 serial multiplier-accumulators (`sma`). SMAs 0-3 take the sums
and compute frequencies 0, 2, 4 and 6. SMAs 4-7 take the differences and compute
frequencies 1, 3, 5 and 7. The output vector is put back in frequency order.

**sma** does the distributed arithmetic. Write each w_m (W bits, two's complement)
as its bits. Then

    z_k = Σ_q 2^q · A(q)  -  2^(W-1) · A(W-1),   A(q) = Σ_m C[m][k]·bit_q(w_m)

A(q) depends only on the 4 bits of plane q, so it comes from a 16-entry constant
table (`sma_lut`), stored as round(2^FRAC·A) in RS = 11 bits with FRAC = 9 (for
N = 8).
Each clock the SMA adds the table word, or subtracts it for the sign plane, in
the upper part of its accumulator, and shifts the accumulator right:

    P <= (P ± (LUT << W)) >>> 1

The bits shifted out are kept in the low W bits of P. After W clocks P is therefore
exactly Σ ±LUT(q)·2^q. Rounding happens only once, at the end: to nearest, with
halves rounded up, dropping FRAC-G bits. The result then saturates to OS bits.
The tables are built at elaboration from the cosine formula. A synthesis tool turns
each one into a few gates of random logic, not a ROM.

### Number formats

| Signal | Bits | Value |
|---|---|---|
| pixel x | 8 | integer, -128..127 |
| TMEM word (MDCT1 out, MDCT2 in) | 11 | 2·Z (1 fractional bit) |
| y_out | 14 | 4·Y (2 fractional bits) |
| table word | 11 | A·2^9 |

Each stage sets its output binary point from its widths:
G = OS - IW - ceil(log2(N)/2). This leaves room for the sqrt(N) growth of a
transform. For the default widths G = 1 in both stages. Because of this, y_out is
always 4·Y, even when OS1 is changed.

## Transposition memory

TMEM is an 8x8 array of bidirectional shift cells (`tmem_bs`). Each cell is a
register that loads either its horizontal or its vertical neighbour. Every
`vec_stb` shifts the whole array by one place:

* **horizontal** (`dir` = 0): the vector enters at column 0, rows move right, and
  column 7 leaves.
* **vertical** (`dir` = 1): the vector enters at row 7 (in reversed element
  order), columns move up, and row 0 leaves (read in reversed cell order).

A block written in one direction comes out transposed when it is read in the
other direction. That read frees exactly one row or column per shift, and the next
block fills it in the same direction. The direction therefore flips every 8 shifts
and the memory never idles. `cu` flips it one period after each input block starts,
because that is when the block's first row of Z arrives. The input buffer (which
edge is fed) and the output multiplexer (which edge is read) are just wiring
selected by `dir`. Their ordering is chosen so that element j of every row comes
out in row order in both directions.

## Interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, CPP × pixel rate |
| `rst` | in | 1 | synchronous reset, active high; clears every register |
| `pix_in` | in | 8 | pixel, sampled when `pix_stb` = 1; blocks enter column by column: x[0][0], x[1][0], …, x[7][0], x[0][1], … |
| `pix_stb` | out | 1 | the chip samples `pix_in` in this clock |
| `in_sob` | out | 1 | the pixel sampled now is x[0][0] of a block |
| `y_out` | out | 14 | coefficient 4·Y, row by row: Y[0][0], Y[0][1], …; each lasts CPP clocks |
| `y_stb` | out | 1 | a new coefficient starts in this clock (once `y_valid`) |
| `y_sob` | out | 1 | `y_out` is Y[0][0] of a block |
| `y_valid` | out | 1 | the pipeline has filled since reset (11 periods) |

The engine is free running and cannot be stalled. The pixel source follows
`pix_stb` and `in_sob`. Block boundaries are fixed by the control unit: the first
block starts in the first clock after reset.

## Parameters (`bdct_top`)

| Name | Default | Meaning |
|---|---|---|
| `N` | 8 | transform order |
| `IS1` | 8 | pixel bits |
| `OS1` | 11 | MDCT1 output = TMEM word = MDCT2 input bits |
| `OS2` | 14 | output bits |
| `RS1`, `RS2` | 11 | table word bits of MDCT1 / MDCT2 |
| `CPP` | 2 | clocks per pixel |

All defaults are the original chip's sizes. The description is generic in `N`,
as the original was. Choose `CPP` so that the second stage's serial word and its
load fit in one vector period: OS1 + 2 ≤ N·CPP. Two other quantities follow N:

* the table binary point, FRAC = RS - 2 - (clog2(N) - 2)/2, because the largest
  table word is sqrt(N)/2;
* the stage headroom in G.

Besides N = 8, `tb_bdct_order` runs N = 4 with CPP = 4 (54.3 dB) and N = 16 with
CPP = 1 (44.0 dB), both bit-exact against the reference model. At CPP = 1 the last
pixel of a column arrives on the same clock edge as the hand-over to MDCT1. For
that reason MDCT1 loads the input register's next-state view (`vec_next`) rather
than its current contents.

## Accuracy

`tb_bdct_snr` runs the whole engine on the same uniformly random 8-bit blocks in 9
configurations. Every output is checked bit-exactly against a reference model.
The signal-to-noise ratio is then measured against the exact real-valued 2-D DCT:

| RS1 | RS2 | OS1 | SNR (dB) |
|---|---|---|---|
| 9 | 9 | 11 | 38.2 |
| 10 | 10 | 11 | 45.1 |
| **11** | **11** | **11** | **50.7** |
| 12 | 12 | 11 | 52.7 |
| 11 | 11 | 9 | 41.8 |
| 11 | 11 | 10 | 47.3 |
| 11 | 11 | 12 | 52.9 |
| 9 | 11 | 11 | 41.2 |
| 11 | 9 | 11 | 40.4 |

The original design chose its word sizes from the same kind of sweep and reports
"always above 52 dB" for the chosen sizes. Its SNR definition and test data are not
known. Here the mixed random and extreme-value blocks of `tb_bdct_top` give 52.7 dB,
while uniformly random blocks give 50.7 dB. The main limit is the 11-bit tables:
their rounding error is scaled by up to 2^W across the bit planes. The worst
single-coefficient error in `tb_bdct_top` is 1.3 (in units of Y).

The original design found the first stage's table width much more important than
the second's. In this implementation, narrowing either table to 9 bits costs about
the same: 41.2 dB for RS1 = 9 and 40.4 dB for RS2 = 9. This suggests the original
scaled the second stage's input differently. That scaling is not known.

## Departures and open points

* **Adder width in the SMA.** The original SMA's adder/subtractor is OS+1 bits
  wide, and its shifter feeds OS bits back. This one uses an RS+2-bit adder and
  keeps every bit shifted out below it, then rounds once. The result is exact before rounding, and the rounding rule is easy
  to state. It costs W extra flip-flops per SMA.
* **Saturation** of each stage's output is added. At the default widths it never
  triggers, because the largest result uses about half of each output range. It
  matters only when the widths are reduced.
* **Cells and clocking.** In the original TMEM cell, separate horizontal and
  vertical clock phases select the input, and a further clock phase drives the
  output stage. Here everything is on one rising clock edge, with an enable and a
  direction select.
* **IR and OR placement.** Only MDCT1 has an input shift register and only MDCT2
  an output one. TMEM exchanges whole vectors with both stages.
* **Pads** are not modelled. The original package has 12 input, 8 output and 14
  bidirectional (tristate) signal pads, but which signal uses which pad is not
  known. The top has plain ports.
* **Fast adder.** The original used a hand-specified fast 11-bit adder rather than
  a ripple-carry one. Here the adders are written as `+`/`-` and left to
  synthesis.
* **No timing closure.** Nothing here shows that 27 MHz is reached in any process.

## Files

`rtl/`:

| File | Contents |
|---|---|
| `bdct_pkg.sv` | default sizes, DCT coefficient and rounding functions for elaboration |
| `bdct_top.sv` | the engine |
| `cu.sv` | control unit |
| `ir_sipo.sv`, `or_piso.sv` | input and output registers |
| `mdct.sv` | one 1-D stage = `phase_a` + `phase_b` |
| `phase_a.sv` | butterfly and serialising pipeline register |
| `phase_b.sv` | eight SMAs |
| `sma.sv`, `sma_lut.sv` | serial multiplier-accumulator and its table |
| `tmem.sv`, `tmem_bs.sv` | transposition memory and its cell |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

* `tb_bdct_top.sv`: end to end at default sizes. It runs 12 blocks back to back
  and checks every output bit-exactly and against the real DCT. It also checks the
  176-clock latency, the gap-free output, both TMEM directions and the SNR.
* `tb_bdct_snr.sv` with `bdct_snr_probe.sv`: the word-size sweep above.
* `tb_bdct_order.sv`: the engine at N = 4 and N = 16, using the same probe.
* `bdct_ref_pkg.sv`: the reference model, in plain integer and real arithmetic.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/bdct_pkg.sv tb/bdct_ref_pkg.sv tb/tb_bdct_top.sv \
        --top-module tb_bdct_top -o sim
    ./obj_dir/sim

Replace `tb_bdct_top` with any other testbench name. Modules are found through
`-Irtl -Itb`. Each run takes well under a minute.
