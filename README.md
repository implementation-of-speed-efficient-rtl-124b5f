# JPEG encoder for 640x480 RGB images (baseline, 4:2:2)

This is a hardware JPEG compressor. A host streams an RGB image into it
line by line. It returns a complete JFIF file as a byte stream: header,
entropy-coded scan, and end-of-image marker. The file is baseline JPEG:
8-bit samples, YCbCr with 4:2:2 chroma sub-sampling, a host-programmable
quantization table, and the standard Huffman tables.

Two ideas shape the design:

* **Block pipeline with ping-pong buffers.** Every stage works on 8x8
  blocks and needs 64 clock cycles per block once the pipeline is full.
  Between the stages sits a two-bank block memory: at the DCT transpose,
  at the zig-zag, and in front of the run-length and Huffman coders. One
  bank is written while the other is read, so no stage waits for the
  previous one to finish a whole block.
* **A DCT without multipliers.** The 8-point transforms are built from
  look-up ROMs and adders (distributed arithmetic). The data path has
  no other multipliers than the colour converter's, which multiply by
  constants. The quantizer divides with a subtract-and-shift pipeline.

The default size is 640x480. The image size is a run-time register, so
any width that is a multiple of 16 and any height that is a multiple of 8
works, up to 640x480.

## Data path

```
 host pixels (24-bit RGB, line by line)
   |
 buf_fifo      two 8-line stripes (ping-pong); reads 16x8 MCUs block by block
   |  pix_pair_t: component + pixel pair
 rgb2ycbcr     Y of one pixel, or Cb/Cr of a horizontal pair (4:2:2); minus 128
   |  signed 8-bit sample, block raster order
 dct_2d        dct_1d (rows) -> pingpong_buf (transpose) -> dct_1d (columns)
   |  12-bit coefficient, column-major order
 zigzag        pingpong_buf + zig-zag reorder ROM
   |  coefficient, zig-zag order
 quantizer     64x8 table RAM, round(F/Q) by a pipelined divider
   |
 rle           pingpong_buf + DC differences, zero runs, ZRL and EOB symbols
   |  rle_sym_t
 huffman       pingpong_var (1..64 symbols per block) + code word and
   |           amplitude bits -> one chunk of <= 27 bits
   |  vlc_t
 byte_stuffer  bits -> bytes, 0x00 after every 0xFF, 1-padding at the end
   |
 jfif_gen      header (from header_ram) | scan bytes | FF D9  -> jpg_* output
```

Control runs beside the data path. `host_if` holds the registers and
writes the host-set header fields into `header_ram`. `jpeg_ctrl` steps
through the image: header, scan, flush, EOI.

Every link is a valid/ready handshake, and a word moves when both are
high. A stall anywhere (a slow output sink, a long burst of ZRL codes, a
full bit buffer) travels back to the input. There the host sees
`pix_ready` low and `fifo_full` high. Nothing is dropped, whatever the
output does.

### Component order and sample order

An MCU (minimum coded unit) of a 4:2:2 image covers 16x8 pixels and holds
four blocks: Y of the left 8x8, Y of the right 8x8, one Cb block and one
Cr block. Each chroma block covers the whole 16x8 area at half the
horizontal resolution. MCUs go left to right across a stripe of 8 lines,
then the next stripe follows.

Within a block the sample order changes along the pipeline. Keep this in
mind when you change a stage:

| link                      | order of the 64 samples                      |
|---------------------------|----------------------------------------------|
| into `dct_2d`             | raster: row r, column c, index r*8+c         |
| row DCT -> transpose RAM  | row r, frequency k (written in this order)   |
| transpose RAM -> col DCT  | column by column: index (i%8)*8 + i/8        |
| out of `dct_2d`           | column-major: F(u,v) at index v*8+u          |
| out of `zigzag`           | zig-zag order, as the JPEG scan needs        |

`zigzag` gets column-major input. Its reorder ROM holds the standard
zig-zag list of raster positions u*8+v. It swaps the two 3-bit halves of
each entry to reach the word that holds F(u,v). The parameter
`IN_COL_MAJOR=0` turns the swap off for raster input.

## The multiplier-free DCT (`dct_1d`, `dct_2d`)

The 2-D DCT of a block is

    F(u,v) = 1/4 C(u) C(v) sum_x sum_y f(x,y) cos((2x+1)u pi/16) cos((2y+1)v pi/16)

with C(0) = 1/sqrt(2) and C(k) = 1 otherwise. It splits into eight
1-D transforms over the rows, then eight over the columns. Each is

    X[k] = sum_{n=0..7} x[n] * b(k,n),    b(k,n) = C(k)/2 * cos((2n+1)k pi/16)

The basis b is stored as integers scaled by 2^12 (`jpeg_pkg::dct_coef`).

**Distributed arithmetic.** Write each input in two's complement with
bits x[n]_j (j = 0 .. W-1). Then

    X[k] = sum_j  w_j * R_k( x[0]_j, x[1]_j, ..., x[7]_j ),
    w_j = 2^j for j < W-1, w_{W-1} = -2^{W-1}

where `R_k(a)` = sum over n with a[n] = 1 of b(k,n). `R_k` depends only
on an 8-bit address, so it is a 256-word ROM. `dct_1d` has one
2048-word x 16-bit table for all k (the address is {k, a}), computed at
elaboration from the basis. With a group of eight inputs held, each clock
does the following:

1. Form W addresses, one per bit plane. Bit n of address j is bit j of
   input n.
2. Read W ROM words at once, for the current k. The tools give each its
   own copy of the ROM.
3. Add them with shifts. The sign plane is subtracted.
4. Round half up by `SHIFT` bits and saturate to `OUT_W` bits.

No product of two variables is formed. The result is exactly the integer
dot product `sum x[n]*b(k,n)`, rounded once.

**Streaming.** `dct_1d` collects eight inputs into a shift register.
When the group is complete it moves to a hold register in the same cycle
in which the last output of the previous group leaves. The eight outputs
k = 0..7 then leave one per cycle while the next group is collected. A
gap-free stream therefore runs at one sample per cycle: 64 cycles per
block per pass.

**Precision.**

| pass    | input                   | output                           | SHIFT |
|---------|-------------------------|----------------------------------|-------|
| rows    | 8-bit, level-shifted    | 13-bit, 2 fractional bits        | 10    |
| columns | 13-bit                  | 12-bit integer F(u,v)            | 14    |

Outputs saturate at +/-(2^(OUT_W-1) - 1). An 8-bit input never reaches
that limit: the DC range is -1024..1016 and the AC magnitudes stay below
about 850.

**Latency.** The first coefficient of a block leaves `dct_2d` about 140
cycles after its first sample enters. After that, one block leaves every
64 cycles.

## Ping-pong block buffers (`pingpong_buf`, `pingpong_var`)

Each buffer has two banks of 64 words. The write side fills one bank in
arrival order and marks it full. The read side empties a full bank in the
order it chooses, then frees it:

* linear order (`RD_LINEAR`);
* transposed order (`RD_TRANSPOSE`), used between the DCT passes;
* an address from the owner (`USE_RD_ADDR`), used with the zig-zag ROM.

`in_ready` is low only while the bank being written still holds an
unread block. Read data is registered.

`pingpong_var` does the same for blocks of variable length. It sits
between the run-length coder and the Huffman coder, where a block is
1..64 symbols. A bank is closed by the block-end flag of its last symbol.
It stores the index of that symbol and returns the flag with it on the
read side.

There are four block buffers: the DCT transpose, the zig-zag, the
run-length input and the Huffman input. Each adds one block time of
latency. None limits throughput. The line buffer uses the same idea with
8-line stripes in place of blocks.

## Line buffer and 4:2:2 (`buf_fifo`, `rgb2ycbcr`)

The host writes pixels with `pix_we`/`pix_data` while `pix_ready` is
high. `pixel_count` counts the writes within a line and returns to 0 at
the end of each line. The buffer holds two stripes of 8 lines of up to
640 pixels. Even and odd pixels are stored in separate RAMs so that one
read returns a horizontal pair.

Once a stripe is complete, each MCU in it is read with 256 reads:

* 64 reads for the left Y block and 64 for the right Y block. Each takes
  one pixel of a pair.
* 64 reads for Cb and 64 for Cr. Each takes a whole pair.

Meanwhile the host fills the other stripe. `fifo_full` is high while both
stripes are in use, or when the whole image has been received.
`fifo_almost_full` is high while the host writes the last line of a
stripe and the other stripe is still waiting to be read.

`rgb2ycbcr` evaluates

    Y  =  0.299 R + 0.587 G + 0.114 B
    Cb = -0.1687 R - 0.3313 G + 0.5 B + 128
    Cr =  0.5 R - 0.4187 G - 0.0813 B + 128

in 16-bit fixed point: 19595/38470/7471, -11056/-21712/32768 and
32768/-27440/-5328, over 65536. For chroma it works on the sum of the
two pixels of a pair, which averages them (the sub-sampling filter). For
luma it doubles the single pixel. The result is rounded, clamped to
0..255 and shifted to -128..127. It has two pipeline stages.

Reading each pixel twice, once for Y and once for chroma, sets the pixel
rate to one pixel per two clocks. A 640x480 image takes about 620,000
cycles, or 6.2 ms at 100 MHz.

## Quantizer

The 64 entries of the table are in zig-zag order, the order of a JPEG DQT
segment. They are indexed by the position of the coefficient in its
block. The result is

    |Fq| = floor((2|F| + Q) / (2Q)),  sign of F kept

This is round(F/Q) with ties away from zero. A 12-stage restoring
divider computes it, one quotient bit per stage, after one stage that
forms the operands. One sample enters per cycle and leaves 13 cycles
later. At reset the table holds the ITU-T T.81 Annex K luminance table.
The same table serves all three components.

## Entropy coding (`rle`, `huffman`, `byte_stuffer`)

`rle` turns each block into symbols (`rle_sym_t`):

* **DC**: the difference from the previous DC of the same component.
  There are three predictors, cleared at the start of each image.
* **AC**: a non-zero coefficient with the zeros before it. `run` is the
  zero count mod 16 and `zrl` is the count / 16, the number of
  "sixteen zeros" codes to send first (0..3).
* **EOB**: sent when the block ends in zeros.

`blk_end` marks the last symbol of a block. The component comes from a
block counter (Y, Y, Cb, Cr).

`huffman` makes one bit chunk per cycle. For a symbol with `zrl` > 0 it
first sends that many ZRL codes, holding its input meanwhile. The main
chunk is the code word of the category (DC) or of the run/size byte (AC),
followed by the amplitude bits. A negative value v is sent as v-1 in
`size` bits. Chunks are at most 27 bits long. The code words come from
the Annex K code-length and symbol lists, by the canonical rule, at
elaboration time.

`byte_stuffer` appends chunks to a 64-bit buffer while it holds at most
32 bits. It sends one byte per cycle and inserts 0x00 after every 0xFF.
When `flush` is high it pads the last partial byte with 1 bits.

## The JFIF file (`header_ram`, `jfif_gen`, `host_if`)

`header_ram` is a 2048x8 dual-port RAM. Its initial content is a
623-byte header built from package constants:

| offset | bytes | content                                                      |
|--------|-------|--------------------------------------------------------------|
| 0      | 2     | SOI FF D8                                                    |
| 2      | 18    | APP0 "JFIF" 1.01, no thumbnail                               |
| 20     | 69    | DQT, table 0; entries at 25..88 (host-written)               |
| 89     | 69    | DQT, table 1; entries at 94..157 (host-written, same values) |
| 158    | 19    | SOF0, 8-bit; height at 163..164, width at 165..166 (host-written); Y 2x1 with table 0, Cb and Cr 1x1 with table 1 |
| 177    | 33    | DHT, DC luminance                                            |
| 210    | 183   | DHT, AC luminance                                            |
| 393    | 33    | DHT, DC chrominance                                          |
| 426    | 183   | DHT, AC chrominance                                          |
| 609    | 14    | SOS, three components, spectral range 0..63                  |

The quantizer has a single table. The header carries it twice, as table
0 for luminance and table 1 for chrominance, so a decoder sees the usual
two-table layout.

`jfif_gen` owns the output. On `start_jfif` with `eoi=0` it copies bytes
0..622 of the header RAM to the output and pulses `ready_jfif`. It then
passes scan bytes through until `start_jfif` with `eoi=1`, writes FF D9
and pulses `ready_jfif` again. `jpg_addr` is the offset of each byte in
the file, so the stream can go straight into an output RAM.

### Register map (`host_if`)

| address   | register | meaning                                              |
|-----------|----------|------------------------------------------------------|
| 0x00      | CTRL     | write 1 to bit 0: encode one image                   |
| 0x01      | STATUS   | bit 0 busy, bit 1 done                               |
| 0x02      | IMG_W    | width in pixels, multiple of 16, <= 640 (reset 640)  |
| 0x03      | IMG_H    | height in lines, multiple of 8, <= 480 (reset 480)   |
| 0x40-0x7F | QTAB     | quantization entry 0..63, zig-zag order, 8 bits      |

Writes take one cycle. Writes to IMG_W, IMG_H and QTAB also update the
header, and each needs two header bytes: the two bytes of a size, or the
entry in both DQT tables. `host_wait` is high for one cycle after such a
write. Hold the next write until it falls.

To encode an image:

1. Write IMG_W and IMG_H, and QTAB if you want a table other than the
   default.
2. Write CTRL = 1.
3. Stream the pixels, line by line, as {R,G,B}, while `pix_ready` is
   high.
4. Take bytes from `jpg_*` until `done` is high.

`jpeg_ctrl` counts the finished blocks: (W/16)(H/8)*4 of them. Then it
flushes the bit buffer and asks for the EOI marker.

## Differences from the original design

This RTL follows a published VHDL JPEG encoder for 640x480 images. It
keeps the stage order, the colour equations, 4:2:2, the ROM-based DCT at
64 cycles per block, the ping-pong buffers in the DCT, zig-zag,
run-length and Huffman stages, the zig-zag reorder ROM, the 64x8
quantization RAM with round(F/Q), byte stuffing, the 2048x8 header RAM
with host-written fields, the 623-byte header, the
start_jfif/eoi/ready_jfif protocol and the FF D9 writer. The original
describes most stages by function only. The following choices
are this design's own:

* The stages hand data on with valid/ready. A central controller only
  sequences the image; it does not start each stage per block.
* The DCT uses bit-parallel distributed arithmetic. Its widths and
  rounding are chosen here.
* The layout of the 623 header bytes is this design's. The single
  table of the 64x8 RAM appears twice in it, as table 0 and table 1.
  The template comes from package constants rather than a hex file.
* The Huffman tables are the standard Annex K tables.
* The register map, the line buffer size (two 8-line stripes), the
  sub-sampling filter (a pair average), the rounding rules and the
  reset quantization table are chosen here.
* The original reports figures for a Virtex-5 build: 4,003 slice
  registers, 10 DSP blocks and a 5.531 ns minimum period. They do not
  apply here, because this RTL has not been put through that flow.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
The expected values are computed independently in the testbench:

* a matrix-product DCT with a `$cos` basis;
* integer division for the quantizer;
* Huffman codes built with the T.81 Annex C procedure;
* a bit-serial stuffing writer;
* a JFIF header assembled marker by marker.

The streaming testbenches apply random output stalls. Where a rate or
latency is stated above, they check it:

* 64 cycles per block in `dct_2d`, `zigzag` and `pingpong_buf`;
* 8 outputs per 8 cycles in `dct_1d`;
* 13 cycles of latency in the quantizer;
* 2 cycles of latency in the colour converter.

`tb/jpeg_ref_pkg.sv` is a complete reference encoder.
`tb_jpeg_encoder` encodes a 48x32 image, then a 32x8 image with a
different table, and compares every byte of both files. The output is
throttled at random. The test counts fifo_full stalls, fifo_almost_full,
output back-pressure, byte stuffing, ZRL and EOB codes. It also counts
the cycles in which each of the five ping-pong memories (the line
stripes and the four block buffers) is written while its other bank
holds a block. It checks that each of these occurred.

`tb_jpeg_encoder_full` runs the same test at 640x480 with the encoder at
its default parameters. It produces a bit-exact
147,745-byte file in about 620,000 cycles, and Verilator runs it in about a
second.

What has not been checked: decoding the output with an independent JPEG
decoder, and synthesis for an FPGA.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -yrtl -ytb rtl/jpeg_pkg.sv tb/jpeg_ref_pkg.sv \
  tb/tb_jpeg_encoder.sv --top-module tb_jpeg_encoder -o sim
./obj_dir/sim
```

Any other testbench builds the same way. Replace the last file and
`--top-module`; the two packages must come first. Each testbench prints
`TB_RESULT checks=N failures=M` and ends. To encode your own image,
change the pixel generator in `tb_jpeg_encoder.encode` and write the
collected bytes to a file with `$fwrite`.

## Files

* `rtl/jpeg_pkg.sv`: widths, stream structs, DCT basis, zig-zag list,
  Huffman lists and code generation, default table, header template.
* `rtl/jpeg_encoder.sv`: the top level. It instantiates `host_if`,
  `jpeg_ctrl`, `buf_fifo`, `rgb2ycbcr`, `dct_2d` (which instantiates
  `dct_1d` and `pingpong_buf`), `zigzag`, `quantizer`, `rle` (with a
  `pingpong_buf`), `huffman` (with a `pingpong_var`), `byte_stuffer`,
  `header_ram` and `jfif_gen`.
* `tb/`: one testbench per module, the end-to-end tests and the
  reference model package.
