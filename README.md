# ROI-based 9/7 lifting DWT with Wallace-tree and Vedic multipliers

This design runs a wavelet transform on the region of interest (ROI) of a
medical image, for example an 86x90 or 90x86 crop of a brain MRI slice. The
transform is the discrete wavelet transform (DWT) with the CDF 9/7
lifting scheme, and it handles one even/odd pixel pair per clock. Every
coefficient multiplication in the lifting scheme runs on 8x8 multiplier
cores. Two interchangeable cores are provided:

* a pipelined **Wallace-tree multiplier** with radix-4 Booth encoding (WM);
* a **Vedic multiplier** built on the Urdhva-Tiryakbhyam ("vertically and
  crosswise") method, as a tree of 2x2, 4x4 and 8x8 stages (VM).

The architecture compares the two cores, so the top level holds two complete
chains that run side by side on the same pixel stream: DWT-WM and DWT-VM.
Each chain is a forward transform followed by an inverse transform that
rebuilds the ROI. After a run over the whole ROI, each chain also repeats
the transform down the columns of its row results, which gives the 2D
transform. Both chains produce exactly the same numbers. They differ
only in the multiplier hardware and in pipeline depth.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). There is one
module per file in `rtl/`, and each module has a self-checking testbench in
`tb/`.

## The lifting datapath (`dwt_1d`)

Write the ROI as one long raster-order sequence x. It is split into even
samples e[n] = x[2n] and odd samples o[n] = x[2n+1]. The memory does this
split by reading two pixels per address. The forward transform is:

```
predict 1   d1[n] = o[n]  + alpha * (e[n]    + e[n+1])
update 1    s1[n] = e[n]  + beta  * (d1[n-1] + d1[n])
predict 2   d2[n] = d1[n] + gamma * (s1[n]   + s1[n+1])
update 2    s2[n] = s1[n] + delta * (d2[n-1] + d2[n])
scaling     low[n]  = K * s2[n]          (low band,  lout)
inverse     high[n] = d2[n] / K          (high band, hout)
```

alpha = -1.586134342, beta = -0.052980118, gamma = 0.882911076,
delta = 0.443506852 and K = 1.149604398. These are the standard
Daubechies/Sweldens factors. With this K, a flat area of grey level g gives
low ≈ 1.414·g and high ≈ 0.

Each of the four steps is one `lift_step`. A lift_step holds:

* a register with the previous sample of the stream being filtered;
* an adder for x[n] + x[n-1];
* a coefficient multiplier (`coef_mult`);
* an adder for the bypass term;
* an output register.

The four steps alternate between the even-side chain and the odd-side chain.
This is the 8-adder, 4-multiplier structure of the reference architecture.

**Why there are delay lines.** The design is a feed-forward lifting
structure, so pipelining it is free, but only if each bypass operand arrives
together with the product it is added to. "Previous" and "next" samples are
counted in samples, not clocks. So every register in `dwt_1d` (and in the
Wallace-tree core) advances only while `en` is high, and the `delay_line`
instances are sized in samples. Let L be the multiplier latency: 0 for
Vedic, 1 for Wallace-tree. The alignment delays are:

| operand | delayed by | why |
|---|---|---|
| odd sample into predict 1 | 1 | waits for e[n+1] |
| even sample into update 1 | L+2 | meets d1[n-1]+d1[n] |
| d1 into predict 2 | L+2 | meets s1[n]+s1[n+1] |
| s1 into update 2 | L+2 | meets d2[n-1]+d2[n] |
| d2 into inverse scaling | L+1 | lines up with s2 |

**Latency.** `dwt_latency(MULT) = 5L + 7` samples: 7 with Vedic cores, 12
with Wallace-tree cores. The pair presented with enable number t makes
`lout/hout` show pair t − LATENCY.

**Edges of the ROI.** Samples before the first pair and after the last pair
are taken as zero. After reset the pipeline holds the transform of an
all-zero past. After the last pair the controller feeds LATENCY more zero
pairs, which pushes the last results out. The transform is therefore that of
the zero-padded sequence. This choice is this design's own; no boundary rule
was given.

## Number format and coefficients

* Pixels are unsigned 8-bit values. Inside the datapath, samples are 16-bit
  two's complement numbers with 4 fraction bits (`DW`=16, `FRAC`=4). For
  8-bit input the worst-case intermediate value (d2 sums, about 35 500) fits
  in 17 bits, so the adders never saturate in practice. They saturate
  anyway, for safety.
* Each coefficient is an 8-bit mantissa, a right shift and a sign, all in
  `dwt_pkg`. For example alpha ≈ −203/2^7 and beta ≈ −217/2^12. Every
  coefficient therefore uses the full 8-bit multiplier input, and the error
  is below 0.3 %.
* `lout`/`hout` are rounded to integers and saturated to `OUT_W`=10 signed
  bits. The reference description calls these "8-bit" outputs. But the low
  band of a bright area reaches about 1.41 × 255, and the high band is
  signed, so 10 bits are used.

## Multiplying wide sums on 8x8 cores (`coef_mult`)

The lifting sums are 17-bit signed values, while both multipliers are 8x8
unsigned cores. `coef_mult` bridges the gap in five steps:

1. It splits the operand into sign and magnitude. The single value −65536 is
   clamped.
2. It cuts the 16-bit magnitude into two bytes and multiplies each byte by
   the coefficient mantissa on its own core.
3. It adds the two byte products at their weights.
4. It rounds half away from zero and shifts.
5. It applies sign = input sign XOR coefficient sign, then saturates.

The Wallace-tree core's pipeline register delays the product by one enabled
clock, so the sign travels through a matching one-stage `delay_line`.
Because both cores are unsigned and exact, the WM and VM builds give
bit-identical results. The testbenches rely on this.

The two scaling multipliers at the end of `dwt_1d` are also `coef_mult`s.
Their shift includes the 4 fraction bits, so the scaling, the rounding to
an integer and the saturation happen in one unit.

## Wallace-tree core (`wallace_mult`)

`booth_encoder` → `pp_generator` → `wallace_compressor` → pipeline register →
`tree_adder`.

* **Booth encoding** (radix 4). The 8-bit multiplier is padded to
  {00, b, 0} and read in overlapping 3-bit groups:
  000→0, 001→+1, 010→+1, 011→+2, 100→−2, 101→−1, 110→−1, 111→0.
  The operands are unsigned, so a fifth digit is needed.
* **Partial products.** Each row is 0, a or 2a, one's-complemented for a
  negative digit. The +1 that completes the two's complement goes out
  separately as a `neg` bit.
* **No sign extension.** Sign extension is avoided with the
  inverted-sign-bit trick: bit 9 of each row holds the inverted sign. The
  constant 0x5600 = −(2^9 + 2^11 + 2^13 + 2^15) mod 2^16 is then added once
  in the tree.
* **Compressor tree.** Three levels reduce the seven operands to two rows of
  16 bits:
  1. a row of 4:2 compressors takes rows 0–3;
  2. a second row of 4:2 compressors takes that result, row 4 and the `neg`
     bits;
  3. a row of full adders adds the constant.

  A 4:2 compressor (`compressor_4_2`) is two full adders whose lateral carry
  does not depend on its own carry-in.
* **Pipeline and final adder.** A register, enabled by `en`, sits between
  the tree and the final adder. That gives one clock of latency
  (`PIPELINED`=1).

## Vedic core (`vedic_8x8`)

The 8x8 multiplier uses four 4x4 multipliers:

* VM1 = a[3:0]·b[3:0]
* VM2 = a[7:4]·b[3:0]
* VM3 = a[3:0]·b[7:4]
* VM4 = a[7:4]·b[7:4]

They are combined as follows:

* VM1[3:0] is product bits s[3:0].
* An 8-bit adder computes VM2 + VM1[7:4].
* A 12-bit adder computes {VM4, 0000} + VM3.
* A second 12-bit adder sums those two results and gives s[15:4].

None of the adders can overflow; the comments give the bounds. `vedic_4x4`
repeats the same pattern with 2x2 blocks, a 4-bit adder and two 6-bit
adders. `vedic_2x2` is two half adders. The core is purely combinational.

One way of reading the adder-input description would pad VM3 and VM4 the
other way round. That gives wrong products (the `vedic_8x8` fault test
checks exactly this), so the arithmetically correct placement is used.

## Reconstruction (`idwt_1d`)

The inverse transform undoes the steps in reverse order:

1. It undoes the scaling: low·(1/K) and high·K.
2. It runs the four lifting steps delta, gamma, beta and alpha with the
   coefficient signs flipped. These use the same `lift_step` hardware, and
   the alignment delays mirror those of the forward engine.
3. It rounds the results and clamps them to 0..255.

Latency: 5L + 8 (8 Vedic, 13 Wallace-tree).

For an exact rebuild, the inverse engine must see the forward engine's
*whole* output stream. That includes the coefficients just outside the ROI,
which zero padding makes non-zero (low[−1], high[N], …). In the top level
the inverse engine is wired straight to the forward engine, with the same
enable, so it gets them. The rebuilt pixels then differ from the input by
at most one grey level. This error comes only from rounding the
coefficients to integers. On the full-size test image the round-trip MSE is
0.10 (PSNR 58 dB) for both chains. The design performs no quantisation or
entropy coding.

## Memory, controller and top level

`roi_pixel_mem` holds `DEPTH` = 7740 pixels (one 90x86 or 86x90 ROI). It is
split into an even bank and an odd bank. Pixels are written one at a time by
raster address. Reads return pixels 2k and 2k+1 one clock after pair
address k is applied, so each bank maps onto a simple dual-port block RAM.
The memory has no reset.

`dwt_ctrl` runs each transform:

* On `start`, it steps `mem_adrs` from 0 to n_pairs−1, one address per
  clock.
* It then keeps the engines enabled for `REC_LATENCY` (25) more clocks,
  with `pad` forcing zero pixels.
* `out_valid`/`out_idx` mark the coefficient outputs, and
  `rec_valid`/`rec_idx` mark the rebuilt pixels.
* `done` comes with the last rebuilt pair.
* `n_pairs` is sampled at start and clamped to 1..N_PAIRS.

`roi_dwt_top` has these ports:

| port | meaning |
|---|---|
| `clk`, `rst_n` | clock, active-low asynchronous reset |
| `ld_en`, `ld_addr[12:0]`, `ld_data[7:0]` | write one ROI pixel (raster order) |
| `start`, `n_pairs[12:0]` | start a run over the first n_pairs pairs |
| `busy`, `done`, `mem_adrs[11:0]` | run status, current pair address |
| `out_valid`, `out_idx`, `lout_wm`, `hout_wm`, `lout_vm`, `hout_vm` | coefficients of both chains, signed 10-bit |
| `rec_valid`, `rec_idx`, `rec_even_wm`, `rec_odd_wm`, `rec_even_vm`, `rec_odd_vm` | rebuilt pixels of both chains |
| `col_valid`, `col_col`, `col_idx`, `col_lo_wm`, `col_hi_wm`, `col_lo_vm`, `col_hi_vm`, `col_done` | column-pass (2D) results of both chains, signed 11-bit |

Timing from the top: the coefficients of pair k appear 13 clocks after
`mem_adrs` = k, and the rebuilt pixels appear 26 clocks after. Results come
out one pair per clock. The Vedic chain's results are delayed internally by
5 and 10 clocks to match. A full 7740-pixel ROI takes 3870 + 13 clocks to
its last coefficient pair.

Default parameters: `ROWS` = 90, `COLS` = 86, `N_PAIRS` = ROWS·COLS/2 =
3870, `DW` = 16, `FRAC` = 4, `OUT_W` = 10.
The core selection `MULT` (`MULT_VEDIC`/`MULT_WALLACE`, in `dwt_pkg`) is a
parameter of `dwt_1d`, `idwt_1d`, `dwt_2d_col`, `lift_step` and `coef_mult`.

## Column pass and the 2D transform (`dwt_2d_col`)

The 2D transform applies the 1D transform to the rows and then to the
columns of the result. The row pass is the stream above: pair k of a
ROWS x COLS raster lies in row 2k/COLS. `dwt_2d_col` stores each row's
results as a coefficient image. The COLS/2 low values come first, then the
COLS/2 high values. The image is held in four banks: {low half, high half}
x {even row, odd row}. That way a row-pass result is written in one clock,
and two rows of one column are read in one clock. The row pass runs over
the raster as one continuous sequence, not row by row. So the coefficients
at the end of a row also depend on the first pixels of the next row. A
transform that pads each row separately would differ there.

When `start` arrives, the block runs its own `dwt_1d` down columns
0..COLS−1, one row pair per clock. Each column is followed by
PADS = latency + 4 zero pairs, which drain the engine so that neighbouring
columns do not mix. Columns 0..COLS/2−1 give the LL and LH bands, and the
rest give HL and HH. The inputs are the signed 10-bit row coefficients, so
the column engine uses `IN_SIGNED` = 1, `DW` = 18 and an 11-bit saturated
output. A bright area's column low band is about 2 x 255 and needs the
extra bit.

In the top, the column pass starts on `done` only when the run covered the
whole memory (n_pairs ≥ N_PAIRS); after a shorter run parts of the store
would hold old or unwritten values.
`busy` stays high, and `start` is ignored, until `col_done`. The Vedic
column results are delayed by 5 clocks to line up with the Wallace-tree
ones. At full size the column pass takes 86 x (45 + 16) = 5246 clocks. On
the test image, 97.9 % of the energy lands in the LL quarter.

## How far to trust it, and where it departs

These points follow the reference architecture:

* the lifting structure, with four predict/update steps, scaling and
  inverse scaling, and one even/odd pair per clock;
* the Booth table;
* the block structure of both multipliers;
* the 8x8 core size;
* the 7740-pixel store addressed as 3870 pairs;
* the active-low asynchronous reset and the signal names `mem_adrs`,
  `even_in`, `odd_in`, `lout`, `hout`.

These are choices made here:

* the coefficient values and their 8-bit quantisation;
* the fixed-point format, rounding and saturation;
* the 10-bit output width;
* zero padding at the ROI edges;
* how a wide sum is multiplied on 8x8 cores;
* unsigned operands in the Booth core;
* the position of the Wallace-tree pipeline register;
* the arrangement of the compressor tree;
* all pipeline registers in the DWT datapath;
* the controller handshake;
* the inverse engine's structure;
* the coefficient store, column order and word widths of the column pass.

Other departures:

* **Low band and high band.** Scaling by K goes on the update chain, which
  gives the low band, and 1/K goes on the prediction chain, which gives the
  high band. This is the standard assignment. It is the opposite of the
  wording "scaling … inverse scaling … high and low pass respectively", but
  it matches the position of the scaling block in the datapath.
* **2D transform.** The second pass is described only in outline ("fed to
  the DWT process again"). The column pass here is one way to build it,
  and it runs only after a run over the whole ROI.
* **Reconstruction path.** The ROI is rebuilt from the 1D row-pass stream,
  not from the 2D coefficients. An inverse of the 2D transform (inverse
  column pass, then inverse row pass) is not included. With zero padding,
  an exact inverse row pass also needs the few coefficients just outside
  the ROI, and the 2D store does not keep them.
* **Store size.** The engines stream any length, but the store holds only
  7740 pixels. A 90x90 ROI (8100 pixels) or a whole 256x256 slice needs
  larger `ROWS`/`COLS`; both have been simulated that way.
* **Image quality.** The image-quality figures reported for the reference
  designs (PSNR of 27–31 dB, and a better PSNR for the Vedic version) cannot
  be reproduced. Here both cores are exact, so both chains are
  bit-identical, and the only loss is rounding.

Every module has a testbench that compares it with values worked out
independently. The small cores are tested exhaustively: all 65 536 operand
pairs for both 8x8 multipliers. The datapath is compared with an integer
model of the lifting equations in `tb/dwt_ref_pkg.sv`. The full-size
testbench runs a 90x86 synthetic MRI-like ROI through the top at its default
parameters. It checks every coefficient of both chains exactly, checks every
rebuilt pixel to within ±1, and checks the run length. It then checks every
column-pass result of both chains exactly.

## Simulating

Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/dwt_pkg.sv tb/tb_roi_dwt_top_full.sv --top-module tb_roi_dwt_top_full
./obj_dir/Vtb_roi_dwt_top_full
```

Any other `tb/tb_<module>.sv` builds the same way. `tb/tb_roi_dwt_top.sv` is
the quick end-to-end test: an 8x16 ROI and three runs (full, short,
clamped), with the column pass checked after the two full runs. It counts
each mechanism it exercises. `tb/tb_roi_workloads.sv` runs three more
sizes through tops sized for them: an 86x90 ROI, a 90x90 ROI and a whole
256x256 slice (with the helper `tb/roi_workload_run.sv`). All reach a
round-trip PSNR of about 58 dB, with 98–99 % of the 2D energy in the LL
quarter. Every testbench ends by
printing `TB_RESULT checks=N failures=M`.

To change the design:

* **Different ROI size:** set `ROWS` and `COLS` (both even) on
  `roi_dwt_top`.
* **Different wavelet factors:** edit the mantissa, shift and sign constants
  in `dwt_pkg`, and keep each mantissa within 8 bits.
* **Only one multiplier type:** instantiate `dwt_1d`/`idwt_1d` once with the
  wanted `MULT`.

## Files

| file | content |
|---|---|
| `rtl/dwt_pkg.sv` | core-type enum, latencies, 9/7 coefficient constants, Booth digit type |
| `rtl/roi_dwt_top.sv` | top level: memory, controller, WM and VM chains with inverse and column pass |
| `rtl/dwt_1d.sv`, `rtl/idwt_1d.sv` | forward and inverse lifting engines |
| `rtl/lift_step.sv`, `rtl/coef_mult.sv`, `rtl/delay_line.sv` | lifting step, coefficient multiplier, sample-delay line |
| `rtl/wallace_mult.sv`, `rtl/booth_encoder.sv`, `rtl/pp_generator.sv`, `rtl/wallace_compressor.sv`, `rtl/compressor_row.sv`, `rtl/compressor_4_2.sv`, `rtl/tree_adder.sv` | Wallace-tree core |
| `rtl/vedic_8x8.sv`, `rtl/vedic_4x4.sv`, `rtl/vedic_2x2.sv` | Vedic core |
| `rtl/roi_pixel_mem.sv`, `rtl/dwt_ctrl.sv` | ROI store with even/odd split, run controller |
| `rtl/dwt_2d_col.sv` | coefficient store and column pass (2D transform) |
| `tb/dwt_ref_pkg.sv` | integer reference model of the forward and inverse transform |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_roi_dwt_top_full` and `tb_roi_workloads` |
| `tb/roi_workload_run.sv` | helper for `tb_roi_workloads`: one complete run of a top sized ROWS x COLS |
