# H.264 transform and quantization core with one shared engine for compressor and decompressor

The compressor and the decompressor of an H.264 codec both contain the same
arithmetic:

- an integer transform, forward in the compressor and inverse in both;
- a quantizer in the compressor;
- a rescaler (inverse quantizer) in both.

This design builds that arithmetic once. A single engine serves both
directions. It has three parts:

- an 8x8 array of 16-bit registers;
- a bank of shift-and-add lanes;
- a set of eight multipliers with shifters.

A control input sets the engine to compress or decompress. The two modes differ
only in the order in which the adders and the multipliers take their turn on
the register array:

- In the compressor, the adders go first and the multipliers follow.
- In the decompressor, the multipliers go first and the adders follow.

The two units overlap, one line (row or column) apart. The integer transforms
need only additions and shifts by fixed amounts. All per-coefficient scaling is
folded into the quantizer multipliers.

Around the engine, `h264_codec_top` processes one macroblock at a time. It forms
residuals from current and predicted samples, runs them through the engine, and
adds the decoded residuals back onto the prediction. It delivers quantized
levels for an entropy coder and reconstructed samples for a loop filter.
Prediction (motion compensation and intra prediction), entropy coding and the
loop filter are outside this core. Their data enter and leave through ports.

## Macroblock flow

A 4:2:0 macroblock is handled as six 8x8 regions, always in this order:

| region (`*_blk`) | contents                   | transform                             |
|------------------|----------------------------|---------------------------------------|
| 0..3             | luma quarters, raster order | one 8x8 integer transform            |
| 4                | Cb                          | four 4x4 transforms, done together   |
| 5                | Cr                          | four 4x4 transforms, done together   |

For each region, the top does the following:

1. It accepts 8 input rows through a valid/ready handshake. Each row carries 8
   predicted samples (`in_pred`) plus one of the following:
   - in compressor mode, 8 current samples (`in_cur`), from which
     `residual_sub` forms 8 residuals;
   - in decompressor mode, 8 quantized levels (`in_lvl`).

   The prediction rows are kept in an 8x8 byte buffer until reconstruction.
2. The engine transforms and quantizes the region, then rescales it and
   inverse-transforms it. In decompressor mode it only rescales and
   inverse-transforms.
3. In compressor mode, the quantized level rows leave on `lvl_*` while the
   engine rescales them.
4. `recon_add` adds each decoded residual row to its stored prediction row and
   clips the result to 0..255. The result leaves on `rec_*`.

### Coded block pattern

The core also tracks which regions are coded. It uses one bit per region, six
bits per macroblock:

- **Compressor**: `cbp[b]` is set while the level rows of region *b* stream
  out, if any level in them is non-zero.
- **Decompressor**: `cbp_in` says which regions carry levels. For a region
  whose bit is 0, the `in_lvl` rows are ignored and zeros are loaded instead,
  so the region reconstructs to its prediction. The entropy decoder therefore
  does not have to produce 64 zero levels for an uncoded region. The rows still
  have to be presented, because they carry the prediction.

The H.264 bitstream codes chroma in a different way, as DC/AC classes. This core
has no separate chroma DC path, so the per-region bit is its own
simplification.

### Encoder/decoder match

The compressor runs its reconstruction path in the same engine, right after the
forward path. Its reconstructed samples are therefore exactly those the
decompressor produces from the same levels. The end-to-end testbench checks this
bit for bit.

## The engine (`xq_engine`)

### Register array and line access (`coef_regs`)

The array holds 64 signed 16-bit values: first the residuals, then the
intermediate values, and finally the coefficients. The adders and the
multipliers each address one *line* at a time, chosen as row *n* or column *n*.
This row/column choice is the first level of multiplexing in the datapath. The
row pass of a 2-D transform uses rows and the column pass uses columns.

The array has these ports:

- two line read/write ports, one for the adders and one for the multipliers;
- one row load port;
- one row read-out port.

The two write-backs always address different lines. An assertion in
`xq_engine` checks this.

In 4x4 mode, the array holds four 4x4 blocks, one per quadrant. Each row or
column then carries two independent 4-element lines, and every 4x4 stage works
on lanes 0-3 and lanes 4-7 separately.

### Shift-and-add stage (`shift_add_stage`)

A 1-D transform runs as a sequence of butterfly stages. Each stage reads one
line, computes eight outputs and writes them back in place, all in one clock.

Each output lane computes the following sum:

```
out = t0 + t1 + t2 + t3 (+ 32)          then >>> 6 if rounding
t_k = +/- (line[src_k] shifted by >>1, >>2, <<1 or not at all), or 0
```

This sum takes four adders per lane, or 32 adders in total. The choice of
`src`, shift and sign for each lane is the second level of multiplexing. It
depends on the transform flavour and the stage. The choices are tabulated in
`h264_xq_pkg::stage_term`:

| flavour    | stages per line | stages (standard notation) |
|------------|-----------------|----------------------------|
| forward 8x8 | 3              | a (sums/differences), b, output |
| forward 4x4 | 1              | y = C1 x, one four-term sum per output |
| inverse 8x8 | 3              | e, f, g of the H.264 decoding process |
| inverse 4x4 | 2              | e, f |

C1 is the matrix `[1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]`.

The last stage of the inverse column pass also adds 32 and shifts right by 6.
That is the final rounding of the H.264 inverse transform, and it uses the
fourth adder of each lane. Every result is saturated to 16 bits before it is
written back. Inside a lane the sum is 20 bits wide.

The forward 8x8 transform is the butterfly of the widely used H.264 reference
encoder:

```
a = p0+p7, p1+p6, p2+p5, p3+p4 | p0-p7, p1-p6, p2-p5, p3-p4
b0 = a0+a3   b1 = a1+a2   b2 = a0-a3   b3 = a1-a2
b4 = a5+a6+(a4>>1)+a4   b5 = a4-a7-(a6>>1)-a6
b6 = a4+a7-(a5>>1)-a5   b7 = a5-a6+(a7>>1)+a7
y  = b0+b1, b4+(b7>>2), b2+(b3>>1), b5+(b6>>2),
     b0-b1, b6-(b5>>2), (b2>>1)-b3, (b4>>2)-b7
```

Its gain is at most 64 over two passes. A 9-bit residual therefore stays within
the 16-bit registers. The 4x4 forward gain is at most 36.

### Multipliers and shifters (`quant_mult`)

The eight lanes quantize or rescale one line per clock. The factor of a lane
depends on two things: the position class of its coefficient within the 4x4 or
8x8 block, and `qp % 6`. The shift depends on `qp / 6`. The tables are the
standard H.264 ones with flat weighting:

```
quantize (compressor, by columns):
    Z = sign(W) * ((|W| * MF + f) >> qbits)
    qbits = 15 + qp/6 (4x4)   or   16 + qp/6 (8x8)
    f = floor(2^qbits / 3) for intra, floor(2^qbits / 6) for inter

rescale (by rows):
    W' = (Z * V) << qp/6                    (4x4)
    W' = ((Z * V8) << qp/6 + 2) >>> 2       (8x8)
```

The 8x8 rescale equals the standard's `LevelScale8x8 = 16*V8` formula with its
rounding. It is rewritten so that the shifter only shifts left before a fixed
`>> 2`. The offset `f` is obtained by shifting the constant 0x5555_5555_5555
(2^48/3), so no divider is needed. Results saturate to 16 bits.

### Schedule and overlap

One clock handles one line per stage, so each pass over the array is short. The
table gives the phases in order for each mode:

| mode         | phases                                                                         |
|--------------|--------------------------------------------------------------------------------|
| compressor   | LOAD (8 rows) - FROW - FCOLQ - DQROW - ICOL - RESOUT (8 rows) |
| decompressor | LOAD (8 rows) - DQROW - ICOL - RESOUT (8 rows)                 |

- **FROW**: forward transform of the rows.
- **FCOLQ**: forward transform of the columns. The multipliers quantize column
  *c* one clock after the adders finish it, while the adders already work on
  column *c+1*.
- **DQROW**: the multipliers rescale one row per clock. The adders start the
  inverse row transform of row *r* as soon as that row is rescaled. In
  compressor mode, the pre-rescale row also leaves on `lvl_*` during this
  phase.
- **ICOL**: inverse transform of the columns, with final rounding.

Two stalls result, and both occur in normal operation:

- In FCOLQ, the multipliers wait for the adders (`mult_wait`).
- In DQROW, the adders wait for the first rescaled row (`add_wait`).

Clocks per region, from the edge that samples `start` to the edge that raises
`done`, with input always valid:

| region        | compressor | decompressor |
|---------------|-----------:|-------------:|
| one 8x8       | 115        | 66           |
| four 4x4      | 67         | 50           |
| macroblock (top, incl. control) | 601 | 371 |

At 1080p, 30 frames/s and a 1 GHz clock, the budget is
1e9 / (30 x 8100) = 4115 clocks per macroblock. At 1.1 GHz it is 4527 clocks,
and at 1.2 GHz it is 4938. This core compresses a macroblock, including its
reconstruction, in 601 clocks, which is well inside all three budgets. Clock
frequency and area are synthesis results that this RTL does not by itself
establish.

## Interfaces

### `h264_codec_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `mb_start` | in | 1 | one-clock pulse while idle; starts a macroblock |
| `compress` | in | 1 | 1 compressor, 0 decompressor (captured at `mb_start`) |
| `qp` | in | 6 | quantization parameter 0..51 (captured) |
| `intra` | in | 1 | quantizer rounding: 1 intra (1/3), 0 inter (1/6) (captured) |
| `cbp_in` | in | 6 | decompressor: bit *b* = 1 if region *b* carries levels (captured) |
| `cbp` | out | 6 | compressor: bit *b* = 1 if region *b* produced a non-zero level; valid after `mb_done` |
| `busy`, `mb_done` | out | 1 | macroblock in progress; one-clock pulse after the last reconstructed row |
| `in_valid` / `in_ready` | in / out | 1 | input row handshake; a row is taken when both are high at a clock edge |
| `in_cur` | in | 8 x 8 | current samples (compressor) |
| `in_lvl` | in | 8 x 16 | quantized levels (decompressor) |
| `in_pred` | in | 8 x 8 | predicted samples (both modes) |
| `lvl_valid`, `lvl_blk`, `lvl_row`, `lvl_data` | out | 1, 3, 3, 8 x 16 | quantized level row (compressor only) |
| `rec_valid`, `rec_blk`, `rec_row`, `rec_data` | out | 1, 3, 3, 8 x 8 | reconstructed sample row |
| `mult_wait`, `add_wait` | out | 1 | engine stall indicators, for observation |

Each region takes its 8 rows in order, row 0 first. Output rows are valid for
one clock each, with no back-pressure. Each mode delivers its rows as follows:

- **Compressor**: the 8 level rows of a region come first, then its 8
  reconstructed rows.
- **Decompressor**: only the 8 reconstructed rows are delivered.

`xq_engine` has the same kind of interface for a single region. Its ports are
`start`, `compress`, `sz8`, `qp`, `intra`, `ld_*`, `lvl_*`, `res_*` and `done`.

## Departures and choices

These points are this design's own. They matter when comparing it with other
implementations of the same architecture:

- **Bit-parallel datapath.** Each line is computed in full in one clock. The
  architecture was first reported as a bit-serial implementation. That version
  needed about 284 and 182 clocks for forward work on an 8x8 region and on a
  four-4x4 region, and 305 and 254 clocks for the inverse work. Those times are
  not reproduced here.
- **Stage tables.** These come from the H.264 standard: the inverse e/f/g
  equations and the quantizer tables. The forward 8x8 butterfly comes from the
  common reference encoder. Flat scaling matrices only.
- **Chroma.** Chroma is four ordinary 4x4 blocks per component. There is no
  chroma DC Hadamard stage and no separate luma DC path.
- **One engine for both chroma regions.** Cb and Cr are processed one after the
  other in the same engine, not in two engines side by side.
- **Saturation.** All engine results saturate to 16 bits. Conforming content
  never reaches the limits. Random worst-case data can.
- **Coded block pattern.** One bit per 8x8 region, as described above.
- **Interfaces.** The row-wide handshakes, the region order, the prediction
  buffer and the reset behaviour are choices of this design.
- **Not included.** Motion compensation, intra prediction and the predictor
  choice between them, entropy coding/decoding (including CBP handling) and
  the loop filter.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The reference model `tb/h264_ref_pkg.sv` is
written independently of the RTL, in plain integer arithmetic:

- the 4x4 forward transform is a matrix product with C1;
- the other transforms are scalar 1-D functions applied to rows, then columns;
- the quantizer and rescaler are direct formulas.

| testbench | what it checks |
|-----------|----------------|
| `tb_coef_regs` | random loads and row/column write-backs against a shadow array, all read ports, reset |
| `tb_shift_add_stage` | all stages of all four flavours, chained, against the 1-D reference; rounding; saturation |
| `tb_quant_mult` | every qp, both sizes, both rounding modes, rows and columns, quantize and rescale; saturation |
| `tb_residual_sub`, `tb_recon_add` | arithmetic and both clipping limits |
| `tb_xq_engine` | 80 random regions in both modes and sizes against the reference; clocks per region; both stalls |
| `tb_h264_codec_top` | 12 macroblocks compressed and then decompressed at default settings; levels and reconstruction against the reference; decoder output equal to encoder reconstruction; clocks per macroblock and the 4115-clock budget; counts of every mechanism (modes, mode switches, 8x8 and 4x4 regions, both engine stalls, input stalls, intra/inter rounding, reconstruction clipping, coded and uncoded regions); compressor `cbp`; decompressor ignoring levels of uncoded regions |

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/h264_xq_pkg.sv tb/h264_ref_pkg.sv tb/tb_h264_codec_top.sv \
    --top-module tb_h264_codec_top
./obj_dir/Vtb_h264_codec_top
```

Replace the last source file and the top name to run another testbench. Each
testbench finishes in seconds.

## Files

| file | contents |
|------|----------|
| `rtl/h264_xq_pkg.sv` | types, stage tables, quantizer tables, saturation |
| `rtl/coef_regs.sv` | 8x8 x 16-bit register array with row/column line ports |
| `rtl/shift_add_stage.sv` | one butterfly stage, 8 lanes of 4 adders |
| `rtl/quant_mult.sv` | eight multipliers and shifters (quantize / rescale) |
| `rtl/xq_engine.sv` | the shared engine and its controller |
| `rtl/residual_sub.sv`, `rtl/recon_add.sv` | residual subtraction and reconstruction addition |
| `rtl/h264_codec_top.sv` | macroblock sequencing, prediction buffer, top-level ports |
| `tb/h264_ref_pkg.sv` | reference model used by the testbenches |
| `tb/tb_*.sv` | testbenches |

To change the design:

- **Stage equations**: edit `stage_term` in the package. The stage count per
  flavour is in `num_stages`.
- **Scaling lists**: replace the table functions and the position-class
  functions.
