# JPEG XR (HD Photo) encoder core: 1920x1080 4:4:4 in under 612 cycles per macroblock

This is a hardware encoder for the JPEG XR still-image format. It is sized for full-HD 4:4:4
pictures at 20 frames per second on a 100 MHz clock. A 1920x1080 frame holds 120 x 68 = 8160
macroblocks of 16x16 pixels, so the budget is 100e6 / (8160 * 20) ≈ 612 clock cycles per
macroblock. The core meets it by splitting the work into three macroblock-level pipeline stages
that run at the same time on three consecutive macroblocks:

```
 RGB pixels ─► xform_stage ─► coef_buffer A ─► pred_stage ─► coef_buffer B ─► entropy_stage ─► main stream
              (colour, pre-filter,   (ping-pong)   (DC/AD/AC        (ping-pong)   (adaptive scan,      FlexBits stream
               PCT, quantise)                       prediction)                    RLE, VLC, FlexBits)
                                                   top_ad SRAM
```

On a generated 1920x1080 picture, the whole frame takes 2,994,014 cycles at the default
parameters. That is 367 cycles per macroblock, or about 33 frames/s at 100 MHz.

**Compatibility.** The dataflow follows JPEG XR, but several parts are this design's own:
- the overlap pre-filter coefficients;
- the variable-length code tables;
- the adaptation rules;
- the bitstream layout.

The output is therefore a self-consistent compressed stream, **not** a JPEG XR file a standard
decoder can read. Each departure is listed below.

## Data representation

- Every coefficient is a signed 20-bit value (`jxr_pkg::coef_t`). That is enough for 8-bit input
  after colour conversion, the 4x growth of the DC path through two transform passes, and
  prediction residuals.
- A macroblock holds three components (Y, U, V). Each component has 16 blocks of 4x4. That is
  768 coefficients, and one `coef_buffer` bank holds exactly one macroblock.
- The buffer stores four coefficients per row, so one row of a 4x4 block moves per cycle.
- Row address = `{component[1:0], block[3:0], row[1:0]}`. Blocks are numbered in raster order
  inside the macroblock.
- After the transform, coefficient 0 of each block is special:
  - in block 0 it holds the macroblock's **DC**;
  - in blocks 1..15 it holds the 15 **AD** (low-pass) coefficients.
- The other 15 positions of each block are the **AC** (high-pass) coefficients.

## Stage 1: `xform_stage` (colour, pre-filter, PCT, quantisation)

Pixels arrive one per cycle in raster order inside a macroblock, and macroblocks in raster order
over the frame. `color_conv` turns each pixel into reversible YUV with integer lifting:

```
V = B - R;  t = R - G + ((V + 1) >>> 1);  U = -t;  Y = G + (t >>> 1) - 128
```

The result is written into one bank of a two-bank macroblock register array. While pixels fill
one bank, the other bank is processed by a small sequencer:

| step | cycles | work |
|------|--------|------|
| PF   | 27 | `prefilter4x4` on the 3x3 filter blocks. They sit 2 samples off the transform grid, straddling the internal block edges, one per cycle. |
| PCT1 | 48 | `pct4x4` on all 16 blocks of the three components. Coefficient 0 of each result is copied to a separate DC register array. |
| PCT2 | 3  | `pct4x4` again on each component's 4x4 array of coefficient-0 values. This gives the DC and the 15 AD values. |
| QW   | 192 | `quantizer`: four lanes with per-lane band select (DC, LP or HP step). Writes one row per cycle into coef_buffer A. |

- The whole sequence takes about 275 cycles.
- Pixel input (256 cycles) overlaps the processing of the previous macroblock.
- `pix_ready` drops only if both banks are occupied.

**Transform.** `pct4x4` is the two-layer 4x4 core transform, built from 2x2 lifting operators:
- First layer: a Hadamard-like `T_h` on four sample quartets.
- Second layer:
  - `T_h` on the low-pass quartet;
  - `T_odd` on the two mixed quartets;
  - `T_odd_odd` on the high-high quartet.

The transform is combinational and processes one block per cycle. A flat block of value `v`
gives DC `4v` and zero AC.

**Pre-filter.** `prefilter4x4` is a separable lifting filter. It applies a 1-D four-point
operator to the rows and then to the columns:

```
d -= a; a += d>>>1; c -= b; b += c>>>1;        (butterfly)
d += (3c + 4)>>>3; c -= (3d + 8)>>>4;          (scaling)
b -= c>>>1; c += b; a -= d>>>1; d += a          (inverse butterfly)
```

Every step is a lifting step, so the filter is exactly invertible. Its coefficients are this
design's own. The filter is only applied to the nine filter blocks that lie inside a macroblock.
Filter blocks that straddle a macroblock or frame edge are passed unfiltered, because the
neighbouring macroblock's samples are not kept.

**Quantiser.** Each lane computes `q = sign(x) * ((|x| + s/2) / s)`, rounding to nearest. The step
`s` is the raw `qp_*` input, and a step of 0 is treated as 1.

## Stage 2: `pred_stage` (DC, AD and AC prediction)

Prediction removes what neighbouring data already tells the decoder. All prediction is a
subtraction. What makes this stage hard to follow is that it needs three kinds of neighbour:
- the **left** macroblock, kept in registers;
- the **top** macroblock, kept in `top_ad_sram`;
- the **top-left** DC, which is the SRAM word read for the previous macroblock.

`top_ad_sram` is a single-port `sram_sp` of 1440 x 32 bits. It holds, for each of the 120
macroblock columns and 3 components, the DC and AD 1..3 of the last macroblock coded in that
column.

Per macroblock, the stage runs these phases:
1. **GATHER** (48 reads): reads coefficient 0 of every block, i.e. the DC and the 15 AD values of
   each component.
2. **TOPRD** (12 reads): reads the top neighbour's DC and AD 1..3 from the SRAM.
3. **CALC**: the DC direction comes from the luma DCs in `dc_pred_dir`. With TL = top-left,
   T = top and L = left:
   - `H = |TL - T|`, `V = |TL - L|`;
   - `H > 4V` → predict from LEFT;
   - `V > 4H` → predict from TOP;
   - otherwise → from the floor of the mean of LEFT and TOP.

   At the frame edges:
   - the first macroblock is not predicted;
   - the rest of the first row uses LEFT;
   - the rest of the first column uses TOP.

   The AD values follow the DC direction:
   - LEFT subtracts the left macroblock's AD 4, 8, 12;
   - TOP subtracts the top macroblock's AD 1, 2, 3;
   - the mixed case predicts no AD.

   The AC direction is chosen from the luma AD energy, with `Hs = |AD1|+|AD2|+|AD3|` and
   `Vs = |AD4|+|AD8|+|AD12|`:
   - `Vs > 4Hs` → LEFT;
   - `Hs > 4Vs` → TOP;
   - otherwise none.
4. **TOPWR** (12 writes): stores this macroblock's unpredicted DC and AD 1..3 for the next row.
5. **STREAM** (192 rows): copies the macroblock to coef_buffer B.
   - Coefficient 0 is replaced by the DC or AD residual.
   - With LEFT, coefficients 4, 8, 12 of a block become differences from the block on its left
     in the same macroblock.
   - With TOP, coefficients 1, 2, 3 become differences from the block above.
   - Blocks in the first block column (LEFT) or first block row (TOP) are left as they are.

The stage takes about 270 cycles. The chosen directions are reported with `dir_valid`, `dc_dir`
and `ac_dir` for monitoring.

## Stage 3: `entropy_stage` (adaptive encode)

For each component, the stage codes in this order:
- the DC value;
- the AD block (the 16 coefficient-0 values, with the DC residual in position 0);
- the 16 AC blocks.

A fetcher prefetches the next block while `ae_block_enc` codes the current one. Each block is
coded in four parts.

**1. FlexBits split.** The adaptive ModelBits count `mb` (0..6, one per band) splits every
coefficient:
- `|x| >> mb` is the high part, which goes to run-level coding;
- the low `mb` bits go, as a fixed-length word, to a second stream.

`flexbits_enc` builds that word as `{low, sign, low != 0}`. With `mb = 2` this gives the codes
-3→15, -2→11, -1→7, 0→0, 1→5, 2→9. A coefficient with a non-zero high part carries its sign in
the main stream instead.

**2. Adaptive scan.** Each band and context keeps an order of the 15 scan positions (AC positions
1..15, or the 15 AD values), starting in zig-zag order. It also keeps a hit count per position.
- Each time a position holds a non-zero value, its count goes up.
- If its count then exceeds that of the position scanned just before it, the two swap places.
- All counts halve when one reaches 255.

The most frequently non-zero coefficients thus drift to the front of the scan.

**3. Run-level and adaptive VLC** (`huff_enc`).
- One bit first flags whether the block has any non-zero high part.
- Each non-zero high part then becomes a symbol (run of zeros before it, level, last flag).
- The symbol's class `{last, level > 1, run > 0}` is coded through one of two index tables.
- These fields follow the class:
  - the sign;
  - the level minus 2, in Exp-Golomb order 0 or 1;
  - the run minus 1, in Exp-Golomb.
- Saturating per-context counters choose the table and Exp-Golomb order that would have been
  shorter recently. This is the adaptive table switch (`ev_tbl`).
- A DC value is Exp-Golomb coded with a sign bit.

**4. ModelBits update.**
- ModelBits goes up by one if four or more coefficients of the block had a non-zero high part.
- It goes down by one if no magnitude reached `2^(mb-1)`.

A block takes `3 + nnz` cycles, where `nnz` is the number of non-zero high parts. The minimum is
5 cycles when FlexBits are sent, because FlexBits go out four scan positions per cycle.
- On natural content at moderate quantisation this stays well inside 612 cycles per macroblock.
- On dense content at very fine steps (near 1), stage 3 can exceed the budget. In that case
  coef_buffer B back-pressures stages 2 and 1, and the pixel source sees `pix_ready` low.

Two `bit_packer`s gather codewords MSB-first into 64-bit words: one for the main stream, one for
FlexBits. After the last macroblock of a frame both are flushed with zero padding, and
`frame_done` pulses. The output has no back-pressure: each word is valid for one cycle.

## Handshakes between stages

`coef_buffer` is a two-bank SRAM, 2 x 192 rows of four 20-bit coefficients, with read data one
cycle after the address.

| Side | Signal | Meaning |
|---|---|---|
| Producer | `wr_ready` | the write bank is free |
| Producer | `wr_commit` | hands the bank over, with a 16-bit tag (macroblock row and column) |
| Consumer | `rd_ready` | a committed bank is waiting |
| Consumer | `rd_release` | frees the bank |

Assertions flag a commit without a free bank and a release without a full one. A stage reads its
macroblock's position from the tag, so stages never need to count macroblocks in step.

## Top level: `jxr_encoder`

| Port | Width | Meaning |
|------|-------|---------|
| `clk`, `rst_n` | 1 | clock; synchronous active-low reset |
| `qp_dc`, `qp_lp`, `qp_hp` | 8 each | quantiser steps; hold them for a frame |
| `pix_valid` / `pix_ready` | 1 | pixel handshake |
| `pix_r`, `pix_g`, `pix_b` | 8 each | pixel |
| `main_valid` / `main_data` | 1 / 64 | main bitstream words |
| `flex_valid` / `flex_data` | 1 / 64 | FlexBits stream words |
| `main_bits`, `flex_bits` | 32 each | bits produced so far |
| `mb_done`, `frame_done` | 1 each | a macroblock is coded / the frame is flushed |
| `dir_valid`, `dc_dir`, `ac_dir` | 1 / 2 / 2 | prediction directions per macroblock (0 none, 1 left, 2 top, 3 both) |
| `ev_swap`, `ev_mb_inc`, `ev_mb_dec`, `ev_tbl` | 1 each | adaptation events |

The parameters are `MB_COLS = 120` and `MB_ROWS = 68`. The picture size is `16*MB_COLS` by
`16*MB_ROWS`. The source must pad the last partial macroblock row; 1080 lines become 1088.

## What departs from JPEG XR, and what is missing

- **Pre-filter:**
  - the coefficients are not the standard's;
  - filter blocks across macroblock and frame edges are not filtered;
  - a streaming register array that would keep neighbour samples for them is not built.
- **Transform:** built from the standard's lifting structure as understood here. It has not been
  checked against a reference decoder.
- **Entropy coder:** the VLC tables, the adaptation rules, the code-block-pattern bit and the
  stream layout are this design's own.
- **Two output streams:** the main codes and the FlexBits come out as two separate word streams.
  They are not merged into one packetised output, and the consumer has to keep them apart.
- **No file or image headers.**
- **No tiles:** the frame is one tile, and the adaptive state carries across the whole frame.
- **Overlap mode:** only the one-level overlap mode exists.
- **Frame geometry:** fixed by parameters. A 3072x2048 picture needs `MB_COLS=192` (a 2304-word
  top SRAM).
- **Prediction details** are reasonable readings of a compact description:
  - which coefficients are predicted;
  - the AC weight rule;
  - the directions taken from luma only.

## Files and simulation

`rtl/` holds one module or package per file:
- `jxr_pkg` (types);
- `color_conv`, `prefilter4x4`, `pct4x4`, `quantizer`, `xform_stage`;
- `coef_buffer`, `sram_sp`;
- `dc_pred_dir`, `pred_stage`;
- `flexbits_enc`, `huff_enc`, `ae_block_enc`, `bit_packer`, `entropy_stage`;
- `jxr_encoder`.

`tb/` holds a self-checking testbench `tb_<module>` for each. Each testbench:
- compares its module with an independent model or hand-worked values;
- prints `TB_RESULT checks=N failures=M`;
- has a cycle watchdog.

Notable testbenches:
- `tb_jxr_encoder`: runs a 4x3-macroblock design over a flat and a textured frame. It checks the
  bit count of the flat frame exactly. It also requires that every mechanism happens at least
  once:
  - each DC and AC direction;
  - scan swaps;
  - ModelBits up and down;
  - table switches;
  - input stalls.
- `tb_jxr_encoder_q512`: codes a generated 512x512 picture (32x32 macroblocks) twice, with every
  step at 5 and then at 70. It checks each frame's completeness and word counts, that the coarse
  step gives the shorter stream, and that the fine frame stays within 612 cycles per macroblock.
  Measured: 456 cycles per macroblock at step 5 and 354 at step 70.
- `tb_jxr_encoder_full`: encodes one generated 1920x1080 frame at the default parameters. It
  checks completion, the stream word counts against the bit counters, and the 612-cycle budget.
  It runs in a few seconds with Verilator.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/jxr_pkg.sv rtl/*.sv tb/tb_jxr_encoder.sv \
          --top-module tb_jxr_encoder -o sim && ./obj_dir/sim
```

Use `tb/tb_<module>.sv` and `--top-module tb_<module>` for a single block. Testbenches that need
uninitialised state exercised can add `+verilator+rand+reset+2` at run time.
