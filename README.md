# JPEG compression accelerator: 8x8 DCT, quantization, zigzag scan and run-length coding

JPEG compression spends nearly all of its arithmetic on a few steps that are
repeated for every 8x8 block of every colour component. The block is
transformed to the frequency domain with a 2D DCT. Each coefficient is divided
by a quantization step. The 64 results are read out in zigzag order, low
frequencies first. The runs of zeros this produces are then collapsed. This
RTL moves exactly those four steps into hardware, as a streaming accelerator
that sits between two DMA channels of a soft-processor system:

```
 DDR ──DMA read (memory→stream)──▶ pix_*  ┌──────────────────────────────────────────────┐
                                          │ block_buffer → dct2d → quantizer →           │
                                          │            zigzag_scan → rle_encoder         │──▶ comp_* ──DMA write──▶ DDR
 processor ──AXI4-Lite──────────▶ s_axil_*│ axil_regs (start, status, counters, tables)  │
                                          └──────────────────────────────────────────────┘
```

Software does the rest. It loads the image and converts RGB to YCbCr. It lays
the pixels out block by block and programs the DMA. It starts the accelerator
and writes the JPEG header. The accelerator never sees RGB, and it does no
Huffman coding: what it produces is a stream of `(run, value)` tuples per block.
Turning those into entropy-coded JPEG data is left to software.

The system around the accelerator is not part of this RTL. That covers the
processor, the AXI interconnect, the DMA engine, the DDR memory and the timer,
GPIO and interrupt-controller peripherals, which are all vendor parts. The
accelerator's three interfaces are top-level ports of `jpeg_accel_top`.

## The pipeline

Each stage holds a whole block (64 values) in registers. It passes the block on
with a block-level `valid`/`ready` handshake, carrying a small metadata word
(`blk_meta_t`: pixel-block number, colour component, last-block flag). So up to
five component blocks are in flight. While the run-length coder emits block
*n*, the quantizer works on block *n+1* and the DCT on block *n+2*.

| stage | module | work per component block | handshake |
|---|---|---|---|
| 8x8 block buffer | `block_buffer` | collects 64 pixels, then offers Y, Cb and Cr blocks, each level-shifted by −128 | 2 banks (ping-pong); `pix_tready` drops when both are full |
| 2D DCT | `dct2d` | 64 cycles row pass + 64 cycles column pass, one coefficient per cycle | `out_valid` 128 cycles after the accepting edge; 130 cycles per block |
| quantization | `quantizer` | one division per cycle | `out_valid` 64 cycles after accept |
| zigzag scan | `zigzag_scan` | pure reordering, registered once | 1 block per cycle |
| run-length coder | `rle_encoder` | one coefficient per cycle, emits on non-zero | 66 cycles per block, plus stall cycles while `comp_tready` is low |

The DCT is the slowest stage, so in steady state the accelerator takes one
component block every 130 cycles: about 390 cycles per 8x8 pixel block. A
256×256 image (1024 blocks) takes 399,558 cycles, about 4 ms at 100 MHz, with
the output side ready 7 cycles in 8. The input is 4:4:4: every pixel carries
Y, Cb and Cr, and the three are coded as separate blocks in that order. There
is no chroma subsampling.

## The DCT arithmetic

This is the part that needs the most care if you change widths. `dct2d`
computes the separable form F = A·f·Aᵀ. A is the 8×8 DCT-II basis, scaled and
rounded:

    A[u][x] = round( 2^12 · C(u)/2 · cos((2x+1)·u·π/16) ),   C(0) = 1/√2, else 1

`jpeg_pkg::dct_basis` builds A from the eight constants cos(kπ/16)/2·4096 =
2048, 2009, 1892, 1703, 1448, 1138, 784, 400. It folds the angle into 0..π and
takes the sign out.

One dot-product unit (eight multipliers and an adder tree) is shared by both
passes:

* **Row pass:** `t[y][u] = (Σx A[u][x]·f[y][x] + 2^8) >>> 9`. This leaves 3
  fraction bits, and `t` fits in 16 bits.
* **Column pass:** `F[v][u] = (Σy A[v][y]·t[y][u] + 2^14) >>> 15`. This gives
  integer coefficients, 12-bit two's complement.

Rounding is half-up (add half, arithmetic shift right). In the testbench, every
output is bit-exact against a separate model of this arithmetic. Every output
is also within ±2 of the exact real-valued DCT. Example: a block of all
`+127` samples gives DC = 1016 exactly.

## Quantization

`q = sign(F) · ⌊(|F| + ⌊Q/2⌋) / Q⌋`. This is division rounded to the nearest
integer, with halves rounded away from zero. Y blocks use the luminance table
and Cb/Cr blocks the chrominance table. Both tables are in registers that the
processor can write, so the hardware uses the same tables that software puts
into the file's DQT marker. At reset they hold the example tables of the JPEG
standard (Annex K). A table entry of 0 is treated as 1. The white pixel
`{Cr,Cb,Y} = 80 80 FF` gives Y samples of +127, so DC = 1016, and 1016/16 =
63.5 rounds to 64.

## Output stream: the run-length tuple

Each block becomes:

1. one DC tuple, with run 0 and the DC value, sent even when the value is 0;
2. one tuple per non-zero AC coefficient, whose run is the number of zeros
   skipped since the previous tuple;
3. one end-of-block tuple (`eob` = 1, value 0), whose run is the number of
   trailing zeros.

So the runs plus the value tuples always add up to 64, and a block decodes
without any other information. Runs are at most 63, so no escape code is
needed. The DC value is sent as is, not as a difference from the previous
block.

`comp_tdata[47:0]` (`jpeg_pkg::rle_tuple_t`):

| bits | field | meaning |
|---|---|---|
| 47:24 | `blk` | pixel-block number within the image |
| 23:21 | — | zero |
| 20 | `eob` | end-of-block tuple |
| 19:18 | `comp` | 0 = Y, 1 = Cb, 2 = Cr |
| 17:12 | `run` | zeros before `value` (for EOB: trailing zeros) |
| 11:0 | `value` | quantized coefficient, two's complement |

`comp_tlast` is high on the end-of-block tuple of the last block (the Cr block
of the last pixel block), so the DMA write channel ends its transfer there. A
beat moves only when `comp_tvalid` and `comp_tready` are both high. While
`comp_tvalid` is high the beat does not change; an assertion in `rle_encoder`
checks this.

## Input stream

`pix_tdata[23:0]` = `{Cr, Cb, Y}`, with Y in bits 7:0, one pixel per beat.
Pixels must arrive in block order: 64 beats per 8x8 block, row-major inside
the block, blocks one after the other. Reordering a raster image into blocks
is the job of software or of the DMA descriptors. After START the buffer takes
exactly `NUM_BLOCKS`×64 beats and ignores `tlast`.

## Registers (AXI4-Lite, 12-bit byte address, 32-bit data)

| address | name | access | content |
|---|---|---|---|
| 0x000 | CTRL | W | bit 0 START: starts a run; ignored while busy |
| 0x004 | STATUS | R | bit 0 BUSY, bit 1 DONE (sticky until the next START) |
| 0x008 | NUM_BLOCKS | RW | 8x8 pixel blocks in the image, bits 23:0 |
| 0x00C | BLOCKS_OUT | R | component blocks encoded in this run |
| 0x010 | TUPLES_OUT | R | tuples accepted by the output stream in this run |
| 0x014 | CYCLES | R | clock cycles from START to the last tuple |
| 0x018 | BLK_TUPLES | R | tuples of the most recent block, including EOB |
| 0x100 + 4i | QLUMA[i] | RW | luminance step for coefficient i (row-major), bits 7:0 |
| 0x200 + 4i | QCHROMA[i] | RW | chrominance step for coefficient i, bits 7:0 |

Software sequence:

1. Write the tables if the defaults are not wanted.
2. Write NUM_BLOCKS.
3. Write CTRL = 1.
4. Start both DMA channels.
5. Poll STATUS.DONE, or wait for the write channel to finish on `tlast`.

A write is taken in the cycle when AWVALID and WVALID are both high and no
response is pending. All responses are OKAY, and unmapped addresses read 0.
Reset is asynchronous and active-low (`rstn`).

## Files

* `rtl/jpeg_pkg.sv`: types, tuple layout, DCT basis and zigzag-order
  functions, default tables
* `rtl/block_buffer.sv`, `rtl/dct2d.sv`, `rtl/quantizer.sv`,
  `rtl/zigzag_scan.sv`, `rtl/rle_encoder.sv`: the pipeline stages
* `rtl/axil_regs.sv`: the register file
* `rtl/jpeg_accel_top.sv`: the top level
* `tb/tb_ref_pkg.sv`: reference models, written independently of the RTL
  * the DCT basis from `$cos`
  * the zigzag order as the literal standard sequence
  * quantizer and run-length coder as plain loops
* `tb/tb_<module>.sv`: one self-checking testbench per module
* `tb/tb_jpeg_accel_top.sv`: end-to-end test of the top level, in three runs
  * mixed image with default tables
  * all-ones tables, giving dense blocks
  * white image, checked against hand-worked tuples

  It counts input back-pressure, output stalls, stage overlap, table
  reprogramming, zero-run end-of-blocks and DONE, and fails if any of them
  never happens.
* `tb/tb_jpeg_image_256.sv`: full-size run at default settings
  * a generated 256×256 image (1024 blocks), every tuple checked, plus a
    throughput bound
  * then 1024 white blocks

Every testbench ends with `TB_RESULT checks=N failures=M`. Each has a
watchdog, and each checks the cycle counts that the design commits to.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/jpeg_pkg.sv tb/tb_ref_pkg.sv tb/tb_jpeg_accel_top.sv \
    --top-module tb_jpeg_accel_top
./obj_dir/Vtb_jpeg_accel_top
```

Replace the testbench name to run another one. The full-size test builds in
about 20 s and runs in under a second.

## Where this design departs from or goes beyond its source

The source paper describes the accelerator's stages, their order and their
overlap, the AXI-Lite control path and the AXI-Stream data paths. It also gives
the 48-bit output stream named `comp_tdata`/`comp_tvalid`/`comp_tready` and the
packed 24-bit `{Cr,Cb,Y}` pixel. Everything below is this design's own choice
or a deliberate difference:

* **Stage internals.** The DCT structure, fixed-point widths and rounding, the
  serial quantizer, the ping-pong input buffer and the stage handshakes are
  not specified in the source.
* **Quantizer rounding.** The source says both "rounded off" and, in its
  background section, "rounding down". This design rounds to nearest.
* **Tuple format.** The layout inside the 48 bits, the DC-first tuple, the
  end-of-block tuple with its trailing-zero count, and `tlast` on the last
  block are this design's.
* **Two tables.** Separate luminance and chrominance tables that software can
  write, with the standard's example tables at reset. The source names one
  "quantization table" and prints none.
* **Register map.** The source only says that configuration goes through
  memory-mapped AXI-Lite registers.
* **No decoder.** The source names a hardware "encoder/decoder" once but
  describes only compression. No decoder is built.
* **Output size.** The compressed-size figures reported for the source's test
  images include Huffman coding and a header made in software. They cannot be
  compared with the size of this tuple stream: the 256×256 test image gives
  10,205 tuples of 6 bytes against 196,608 raw bytes.
* **Input formats.** 4:4:4 only. Images must be a whole number of 8x8 blocks;
  padding edge blocks is left to software.
* **Size limit.** `NUM_BLOCKS` and the block field of a tuple are 24 bits,
  which limits an image to 16,777,215 blocks.
