# Approximate-multiplier 9/7 DWT with a leader-column multiplier

Wavelet image compression based on convolution does a lot of multiply-accumulate work. Every
output of the 9/7 biorthogonal transform takes nine low-pass or seven high-pass products, at
every level, in both directions. Most of the area, power and delay therefore sits in the
multipliers, and an image coder can tolerate small arithmetic errors. This design keeps the
multipliers (it does not switch to a lifting or multiplierless transform) and makes each one
cheaper and faster in two ways:

* **Leader-column reduction.** Partial products are compressed around the tallest column of
  the partial-product matrix, the *leader column*. Exact 4:2 compressors are used only in
  that column and its neighbours; 3:2 compressors are used everywhere else.
* **Approximate final adder (LC-AKSA).** Below the leader column the final carry-propagate
  adder is replaced by cells whose carry does not ripple. Above it, an exact Kogge-Stone adder
  does the addition.

These multipliers feed a three-level separable 2-D DWT: row filtering, column filtering,
recursion on the LL band, and symmetric edge extension. A hard threshold then zeroes small
coefficients, and the count of retained coefficients gives the compression ratio. An inverse
9/7 transform, built from the same multipliers, reconstructs the image from the thresholded
coefficients, so that the quality of the compression can be measured as PSNR.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). Every block has a self-checking
testbench.

## Block overview

```
                      mloa_dwt_top
 host load ──► ┌──────────────┐        ┌──────────────┐
 (x,y,pixel)   │ frame_ram A  │◄──────►│ dwt2d_engine │──► busy, done, nonzero_cnt
 host read ◄── │ image/coeffs/│        │  ├ dwt_filter_pair (9 + 7 taps)
               │ reconstructed│        │  │   └ 16 x mloa_lc_multiplier (16x16)
               └──────────────┘        │  │        ├ compressor_4_2 / compressor_3_2 / half_adder
               ┌──────────────┐        │  │        └ lc_approx_final_adder ─ kogge_stone_adder
               │ frame_ram B  │◄──────►│  └ coef_threshold
               │ intermediate │        └──────────────┘
               └──────────────┘        ┌───────────────┐
             (both memories are also   │ idwt2d_engine │──► busy, done
              shared with the inverse) │  └ idwt_filter (9 x mloa_lc_multiplier)
                                       └───────────────┘
```

## The leader-column multiplier (`mloa_lc_multiplier`)

An N x N unsigned multiplier (N = 8 by default) works in four steps:

1. **Partial products.** `pp(i,j) = a_i & b_j` goes into column `k = i + j`. Column heights
   rise from 1 to N and fall back again. With `K_DROP > 0`, the partial products of the
   `K_DROP` lowest columns are never built. This is the pruning form of approximation;
   typical values are 2, 4 and 6.
2. **Leader column.** The leader column is the first column of greatest height: `k_L = N-1`,
   which is column 7 with 8 bits for N = 8.
3. **Reduction.** Stage targets follow the Dadda sequence `d_1 = 2`,
   `d_(r+1) = floor(1.5 d_r)`. Only targets below the starting height are used, so N = 8
   goes through stages 6, 4, 3 and 2. At each stage, column k must lose
   `E_k = max(0, H_k + carries arriving from column k-1 - d_r)` bits. Compressors are chosen
   greedily:
   - a 4:2 compressor takes five bits of the column and removes four. It is used only within
     `LC_SPAN` (1) columns of the leader, when at least 3 bits must go.
   - a 3:2 compressor removes two.
   - a half adder removes the last one.

   The schedule is computed at elaboration by a constant function (`build_sched`), and the
   generate loops instantiate the compressors it lists. For N = 8 the result is:

   | stage | target | compressors (column: kind x count) |
   |---|---|---|
   | 1 | 6 | c6: HA; c7: 4:2; c8: 4:2; c9: 3:2 |
   | 2 | 4 | c4: HA; c5: 3:2 + HA; c6, c7, c8: 4:2; c9, c10: 3:2 x2; c11: 3:2 |
   | 3 | 3 | c3: HA; c4-c6: 3:2; c7, c8: HA; c9-c12: 3:2 |
   | 4 | 2 | c2: HA; c3-c13: 3:2 |

   That adds up to five 4:2 compressors, 25 3:2 compressors and seven half adders, with every
   4:2 compressor in columns 6-8.
4. **Final adder**, selected by `FINAL_ADDER`:
   - `FA_RIPPLE_CPA`: exact ripple adder.
   - `FA_KOGGE_STONE`: exact parallel-prefix adder.
   - `FA_LC_AKSA` (default): the leader-column approximate adder described below.

### The approximate final adder (`lc_approx_final_adder`)

The two remaining rows are A and B. For the `APPROX_BITS` lowest bits (default N-1, so every
column below the leader column):

```
S_i     = (A_i xor B_i) or C_i        C_0 = 0
C_(i+1) = A_i
```

No carry travels more than one position in this part. Bits from `APPROX_BITS` upward go
through an exact Kogge-Stone adder whose carry in is `A_(APPROX_BITS-1)`.

The low part gives a value in `[0, 2^s)`, where `s` is `APPROX_BITS`. It also forwards one
carry of weight `2^s`, while the true low sum lies in `[0, 2^(s+1))`. So the error is always
smaller than `2^(APPROX_BITS+1)` in magnitude: under 256 for 8 x 8. The multiplier testbench
checks this bound on all 65,536 operand pairs and reports these figures for the default 8 x 8:

* error rate 0.927
* mean error distance 75.3
* normalised error distance 0.00116 (relative to 255 x 255)

The error is frequent but small, the kind of error image data tolerates.

## The wavelet datapath

### Number formats

| quantity | format |
|---|---|
| samples and coefficients | signed 16 bit, 4 fractional bits; a pixel `p` enters as `p << 4` |
| filter taps | sign + 16-bit magnitude, Q1.15 |
| low-pass taps h0[-4..4] | 877, -553, -2563, 8745, **19756**, 8745, -2563, -553, 877 (sum = 32768, DC gain 1) |
| high-pass taps h1[-3..3] | 2991, -1886, -19375, **36540**, -19375, -1886, 2991 (sum = 0) |

The taps are the standard CDF 9/7 analysis filters in JPEG2000 normalisation, rounded to
Q1.15. The centre taps are adjusted so that the sums come out exact. They live in
`mloa_pkg`.

### `dwt_filter_pair`

The filter pair takes a nine-sample window `x[c-4..c+4]` centred on an even sample and
computes one low-pass and one high-pass output. Each of the 9 + 7 taps is one 16 x 16
`mloa_lc_multiplier`:

1. The sample's magnitude is multiplied by the tap magnitude.
2. The sign is applied to the product, and the products are summed.
3. The sum is rounded (+2^14, then an arithmetic shift by 15) and saturated to 16 bits.

The output is registered, so the latency is one clock and a new window is accepted every
clock. The approximate multiplier keeps each output within 19 LSBs of the exact result; the
testbench checks this bound.

### `dwt2d_engine`

The engine works on frame memory A (image in, coefficients out) and frame memory B (the
row-filtered intermediate). For each level, on the region `w x h = img >> level`:

* **Row pass.** Each row of A streams through the window at one sample per clock. At every
  even centre c, the low output goes to column `c/2` of B and the high output to column
  `w/2 + c/2`. This is filtering plus "downsample columns by 2".
* **Column pass.** The same happens down each column of B. Low outputs go to row `c/2` of A
  and high outputs to row `h/2 + c/2`.
* **Recursion.** The next level repeats both passes on the LL quarter only. The result is the
  usual pyramid: LL top-left, HL right, LH below, HH diagonal.
* **Edges.** The read address generator applies whole-sample symmetric extension:
  `x[-n] = x[n]` and `x[len-1+n] = x[len-1-n]`.
* **Threshold pass.** After the last level, `coef_threshold` rewrites every coefficient
  (`|C| < thr -> 0`) and counts the non-zero ones.

A pipeline of tags (line, centre, pass) follows each sample from the read, through the window
shift and the filter, to the two writes. Low and high results are written in consecutive
clocks. Outputs come at most every other clock, so they never collide, and assertions check
this.

Start-to-done time, in clocks:

```
sum over levels [ h_l*(w_l+8) + w_l*(h_l+8) + 12 ] + img_w*img_h + 8
```

This works out to 1,443,372 clocks for 768 x 512 and 244,780 for 256 x 256, or 14.4 ms and
2.4 ms at 100 MHz. Frame sizes must be multiples of 8 and at most `W_MAX x H_MAX`
(768 x 512), with a last-level region of at least 4 x 4.

### Inverse transform: `idwt_filter` and `idwt2d_engine`

The inverse transform interleaves a low half L and a high half H into one sequence,
`u[2j] = L[j]` and `u[2j+1] = H[j]`, and filters it. Each output sample `x[m]` is a
nine-tap sum over `u[m-4..m+4]`. The kernel depends on the parity of m:

| output | kernel over `u[m-4..m+4]` (Q1.15) |
|---|---|
| even m | 0, 553, -1886, -8745, **36540**, -8745, -1886, 553, 0 |
| odd m  | 877, -2991, -2563, 19375, **19756**, 19375, -2563, -2991, 877 |

These are the synthesis filters `g0[d] = (-1)^d h1[d]` and `g1[d] = (-1)^d h0[d]` of the
quantised analysis taps. A constant low band therefore reconstructs to the same constant
exactly. `idwt_filter` computes one output per clock with nine 16 x 16 multipliers of the
same configuration as the forward path. Rounding, saturation and the one-clock latency are
the same as in `dwt_filter_pair`.

`idwt2d_engine` undoes the forward engine on the same two memories. It starts at the coarsest
level and works down to the finest, on the region `w x h = img >> level`:

* **Column pass.** Down each column of A, rows `0..h/2-1` (low) and `h/2..h-1` (high) are
  read interleaved through the window. Output m goes to row m of B.
* **Row pass.** Along each row of B the same happens, and the output goes back to A.

The interleaved sequence is extended with the same whole-sample symmetry as the forward
transform, which is what makes the pair reconstruct exactly up to rounding. One sample is
read and one written per clock. A run takes

```
sum over levels [ w_l*(h_l+8) + h_l*(w_l+8) + 12 ] + 2
```

clocks: 1,050,150 for 768 x 512.

With exact adders, a forward-then-inverse round trip is within 4 LSB, a quarter of a grey
level. With the default approximate multipliers, the reconstruction is within 21 LSB of the
exact inverse of the same coefficients.

### `mloa_dwt_top`

The top has three host operations, all synchronous to `clk`:

* **Load.** While `busy` is low, `host_we` writes `host_pixel` at (`host_x`, `host_y`).
* **Run.** Pulse `start` with `img_w`, `img_h` and `thr`. The threshold is in coefficient
  units, so 16 equals one grey level. `busy` stays high until `done` pulses.
* **Inverse.** Pulse `start_inv` with `img_w` and `img_h`. The thresholded coefficients in
  memory A are replaced by the reconstructed image. `busy` and `done` behave as for a run.
* **Read.** While `busy` is low, `host_rdata` returns the word at (`host_rx`, `host_ry`) one
  clock after the address is given. This is a coefficient after a run and a reconstructed
  sample after an inverse. Both have 4 fractional bits, so the grey level is
  `(word + 8) >> 4`, clipped to 0..255.

`total_cnt / nonzero_cnt` is the compression ratio. The memories belong to whichever engine
is running. If `start` and `start_inv` arrive together, `start` wins.

## Where this design makes its own choices

These are the points the method leaves open; each was settled as described:

* The 4:2 compressor's fifth input comes from its own column, not from a neighbour's carry
  out. Half adders finish columns that are one bit over target.
* The compressor count per column is worked out from the least significant column upward,
  because a column needs to know the carries coming from below. The leader column shows up as
  the only place where 4:2 compressors are allowed.
* In the approximate cell, the operator between `(A xor B)` and `C` is read as OR. The
  approximate region ends at the leader column.
* The DWT datapath needs operands wider than the multiplier's 8-bit default, so its filters
  use 16 x 16 instances of the same generator. Signs are handled in sign-magnitude form around
  the unsigned multiplier.
* Frame memories, control, handshakes and reset are this design's own. One filter pair serves
  both passes in turn.
* The method computes the inverse transform in software, only to measure quality. Here it is
  hardware, using the same approximate multipliers, so the measured quality includes
  arithmetic errors from both directions.
* The method names two wavelet families, "Bior 9/7" and "Bior 4.4". The common software
  definition of bior4.4 is the same CDF 9/7 pair, so one tap set covers both names.

### Not built

* The eight replicated processing elements and concurrent row/column filtering, which the
  method uses to estimate throughput.
* The baseline Dadda, Wallace, Baugh-Wooley and Vedic multipliers, which serve only for
  comparison.
* The selection procedure that picks a multiplier configuration under PSNR/SSIM limits. It
  is an offline design-time decision; here it appears only as parameter values.
* SSIM. Only PSNR is measured, in the top-level testbenches.

## How far it is checked

| testbench | what it shows |
|---|---|
| `tb_compressor_3_2`, `tb_compressor_4_2` | exhaustive; the 4:2 `cout` does not depend on `cin` |
| `tb_kogge_stone_adder` | exhaustive at 8 bits, random at 13 and 16 bits |
| `tb_lc_approx_final_adder` | against a bit-serial model of the cell equations; exact when `APPROX_BITS = 0` |
| `tb_mloa_lc_multiplier` | 8 x 8 exact modes and `K_DROP = 4` on all 65,536 pairs; LC-AKSA error bound; random 16 x 16 |
| `tb_dwt_filter_pair` | exact mode bit-for-bit; approximate mode within 19 LSB; one-clock latency; saturation |
| `tb_frame_ram`, `tb_coef_threshold` | read latency and read-during-write; exhaustive thresholding |
| `tb_dwt2d_engine` | exact multipliers: every coefficient, non-zero count and clock count equal the integer model, at two frame sizes |
| `tb_idwt_filter` | exact mode bit-for-bit on 20,000 windows of both parities; approximate mode within 19 LSB (7 seen); unit DC gain |
| `tb_idwt2d_engine` | exact multipliers: every sample and the clock count equal the integer model, at two frame sizes; forward-inverse round trip within 8 LSB (4 seen) |
| `tb_mloa_dwt_top` | 64 x 64 and 48 x 32 frames, default multipliers: coefficients within 3 grey levels of exact (12 LSB seen), counts, clock counts; reconstruction within 3 grey levels of the exact inverse; PSNR at least 30 dB (43.7 and 35.4 dB seen); every mechanism exercised |
| `tb_mloa_dwt_full` | default parameters, frames of 768 x 512, 512 x 512 and 256 x 256, forward and inverse (about 2 minutes in Verilator); largest deviation 18 LSB forward and 21 LSB inverse; PSNR 43.3-43.6 dB at a threshold of 4 grey levels |

The top-level testbenches use synthetic images (gradient, a sharp-edged block, pseudo-random
texture) and the integer reference models in `tb/tb_dwt_ref_pkg.sv`. The PSNR figures come
from these synthetic images, not from photographs. They show that the arithmetic is sound,
but they are not comparable with published image-quality numbers.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/mloa_pkg.sv tb/tb_dwt_ref_pkg.sv tb/tb_mloa_dwt_top.sv --top-module tb_mloa_dwt_top
./obj_dir/Vtb_mloa_dwt_top
```

Replace the testbench file and top module to run any other testbench. Each one prints
`TB_RESULT checks=N failures=M`.

To try another multiplier configuration, change the top's parameters:

* `FINAL_ADDER`: `FA_RIPPLE_CPA`, `FA_KOGGE_STONE` or `FA_LC_AKSA`
* `APPROX_BITS`: width of the approximate low part
* `K_DROP`: number of pruned low columns
