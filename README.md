# ICT image archiving board

A PC/AT add-in board that compresses and restores 8-bit grey-scale images
with the order-8 **integer cosine transform** ICT(10,9,6,2,3,1). The host
computer does the statistics and the variable-length coding; the board does
the arithmetic:

* **forward transform**: a 256x256 image in, 65536 transform coefficients
  out, grouped by frequency so the host can gather the statistics of each
  coefficient type from consecutive addresses;
* **inverse transform**: packed coefficient codes in, unpacked by a table
  look-up on the board, and pixels out to the host or to a 256x256 frame
  buffer. Besides normal operation it can **low-pass filter** (keep the 3,
  10 or 21 lowest-sequency coefficients of each block) and **subsample**
  (reconstruct only a 2x2 or 4x4 image per block, giving 64x64 or 128x128
  pictures in a fraction of the time). Several subsampled pictures can be
  tiled on the frame buffer as a photo **album**.

The transform uses small integers in place of cosines, so every multiplier
is a shift-and-add of at most two terms. It runs on a two-stage processor
of 16 identical single-vector ICT chips, with 8 transpose buffers ("data
sequencers") between the stages.

Everything is synthesizable SystemVerilog (IEEE 1800-2017), in `rtl/`, with
self-checking testbenches in `tb/`.

## The transform and its number format

The kernel used by the chips is the ICT scaled with R = 8 and M = 3, so every
element has one of the magnitudes {2, 3, 6, 8, 9, 10}:

```
row 0:  8  8  8  8  8  8  8  8      row 4:  8 -8 -8  8  8 -8 -8  8
row 1: 10  9  6  2 -2 -6 -9 -10     row 5:  6 -10 2  9 -9 -2 10 -6
row 2:  9  3 -3 -9 -9 -3  3  9      row 6:  3 -9  9 -3 -3  9 -9  3
row 3:  9 -2 -10 -6 6 10  2 -9      row 7:  2 -6  9 -10 10 -9 6 -2
```

`ict_pkg::kernel(row, col)` holds it. A forward chip computes row S of the
kernel times the 8 input words, and an inverse chip computes column S.
Words are 14 bits: a sign bit and 13 magnitude bits. Products are 17 bits,
the accumulator is 20 bits, and the result drops its 6 LSBs. Four mode pins
set the number format:

| pin   | meaning |
|-------|---------|
| MODE1 | inverse (column S) or forward (row S) |
| MODE2 | two's complement or sign-magnitude, for input and output alike |
| MODE3 | input is offset binary: sign bit inverted, pixels become signed around 128 |
| MODE4 | output is offset binary: sign bit inverted, restored pixels come out around 128 |

A sign-magnitude result of -8192 has no code, so it saturates to -8191.

On the board, a forward input pixel p enters as `{p, 6'b0}`, with MODE3 and
two's complement. The 8 pixel bits therefore sit in the 8 MSBs. Inverse
coefficients enter in sign-magnitude. The output pixel is bits [13:6] of the
MODE4 output.

## The chip set

### ICT chip (`ict_chip`, `ict_multiplier`)

The chip takes one input word per ROW strobe. It multiplies the word by the
kernel element selected by its own counter and S, and accumulates. After CY
words (CY = 0 means 8), the next ROW latches the result into the output
register. At the same time the chip pulses COL (output valid) and LAT (next
stage may advance S), each for one clock. The multiplier is a 6-way
selection of two shifted operands.

OEN does not tri-state. It zeroes the data and lowers `c_drive`, so several
chips can share a bus by OR-ing their outputs.

### Data sequencer (`data_sequencer`)

The data sequencer has two banks of eight 14-bit registers, used as a
ping-pong pair:
* one bank fills with the first-stage results, taken on COL;
* the other bank plays its words to the second stage, one per ROW;
* the second stage is told which kernel vector to use through S3..S1;
* BL marks valid output;
* the banks swap when the fill bank is full and the play bank is done.

The play pattern depends on MODE and on CT (= CY3,CY2):

| operation | words kept | plays | S sequence |
|-----------|-----------|-------|------------|
| normal | 8 | 8 | 0..7 |
| fast filtering, N = 2, 4, 6 | first N | 8 | 0..7 |
| 2x2 subsampling | 2 | 2 | 0, 4 |
| 4x4 subsampling | 4 | 4 | 0, 2, 4, 6 |

For filtering, the first stage still runs groups of eight ROW cycles, some of
them idle (nil data). The sequencer takes a result only while it can still
play it before its fill bank is full. This drops the results of the idle
groups.

### ICT processor (`ict_processor`)

The processor has eight lanes. Lane i is a first-stage chip with S = i, a
data sequencer, and a second-stage chip driven by the sequencer's S.
* All first-stage chips see the same input word.
* The host of the processor reads the second stage one lane at a time
  through OEN.
* `ovalid` (COL of lane 0) marks a new set of eight results.
* `bl` says whether the set is valid.

In forward mode, rows X[k][0..7] of a block go in. At step s, lane i holds
coefficient C[s][i]. In inverse mode, coefficient rows go in and lane i holds
pixel X[s][i].

Block periods in ROW cycles: 72 normal, 6 for 2x2 subsampling, 20 for 4x4.
At processor level, fast filtering gives 24, 40 and 56 (one third, five
ninths and seven ninths of normal).

## The board (`ias_top`)

```
 host bus ─> input_stage ─┬─> input memory 1/2 (mem_module x2) ─┐
            (ports, ctrl) │        ^ AG3 (host)  ^ AG1 (blocks)  │ forward pixels
                          └─> address/bit/class maps             v
                              inverse_addr_gen ──codes──> ict_processor
                                                                │
 host bus <─ AG3 ── output memory 1/2 (mem_module x2) <─ AG2 / AG1
 frame buffer <─ AG3 ─────────┘
```

### Memories

Every memory module is two 32Kx8 SRAMs (`sram`, `mem_module`). A byte
address selects the SRAM with A0, and a 16-bit word writes both SRAMs.
* In the forward transform, the two input modules are a ping-pong image
  buffer: a full module (32K words, a 256x256 image) switches loading to the
  other one.
* In the inverse transform, input module 1 holds the packed codes and input
  module 2 holds the quantization table.
* The output modules swap after 512 blocks of forward coefficients.

### Address generators

* **AG1** is a 16-bit counter followed by a bit permutation. It walks 8x8
  blocks of a raster image: forward pixels out of the input memory, inverse
  pixels into the output memory. For subsampled output, it packs the 2x2
  or 4x4 pixels of each block into a 64- or 128-wide raster for the host.
  For the frame buffer, it places the picture in one of 16 (64x64) or
  4 (128x128) tiles. The upper counter bits select the tile, so pictures
  run after one another fill the screen left to right, top to bottom.
* **AG2** is a 15-bit counter whose address is `{q[5:0], q[14:6]}`. The
  frequency index becomes the high address, so the same coefficient of 512
  consecutive blocks lands at consecutive words.
* **AG3** is a plain 15-bit counter for every host transfer and for the
  frame-buffer stream.

### Inverse address generator (`inverse_addr_gen`)

This block unpacks the variable-length codes. It holds three maps:
* the address map: 64 bit pointers, one stream per coefficient type;
* the bit map: 4-bit code length per type and class;
* the class map: a 2-bit class per block, 4096 blocks.

For each coefficient it runs five clocks:
1. reads the stream pointer and the code length;
2. fetches the byte that holds the code start;
3. fetches the next byte, and writes the pointer back advanced by the
   length;
4. extracts the code;
5. reads the quantization table.

The quantization table is loaded after the bit map. The host writes only
the 2^(L-1) levels of each class and type in use, in order, and the load
address steps under control of the bit map, skipping types of length 0.

A code is a sign bit followed by an index of L-1 bits, MSB first. The table
address is `{class, type, index}`. The coefficient is the sign with table
bits [14:2] as magnitude. A length of zero gives a zero coefficient and
consumes no bits. These five clocks fit inside one ROW cycle of 8 system
clocks, which is why the chip set runs at 1/8 of the board clock.

### Controller and host interface

The host sees eight ports (`ias_pkg::port_e`) with one-clock write and read
strobes:

| port | use |
|------|-----|
| 0 CTRL | control register (write) / status (read) |
| 1 IMAGE | image words, or packed codes in inverse mode; read: output memory 1 |
| 2 QTAB | quantization table; read: output memory 2 |
| 3-5 | address map (two writes per entry), bit map (2 entries per write), class map (4 entries per write) |
| 6 GO | start a run. Data[11:0] = blocks - 1; data[15] continues the block numbering (and so the class map) of the previous run |
| 7 CLEAR | clear AG3, the map load pointers and the bank state |

The control register is `{size512, class4, to_fb, plane[1:0], subsamp,
degree[1:0], album, inverse}`:
* `degree` is 1, 2 or 3, for 2x2, 4x4 or 6x6 filtering, or for 2x2 or 4x4
  subsampling;
* `class4` enables the class map;
* `to_fb` streams output memory 1 to the frame buffer after the run;
* `album` keeps AG1 counting from the previous run. Start an album with the
  bit clear.

The status read is `{busy, 11'b0, out_bank, in_load_bank, in_run_bank, 0}`.
A read returns `h_rdata` two clocks after the strobe.

The controller issues one ROW every `ROW_DIV` clocks (default 8). It feeds
the N words of each group and fetches the coefficient for the next ROW in
the gap. It then reads the wanted lanes of the processor one per clock: all
8, lanes {0,4} for 2x2, or {0,2,4,6} for 4x4.

Measured in the end-to-end test, in ROW cycles:
* a 256x256 forward run: 73802, which is 1024 x 72 = 256·256·9/8 plus one
  block of pipeline fill;
* a 1024-block 2x2 subsampling run: 6 per block (64·64·3/2 in total);
* 4x4 subsampling: 20 per block (128·128·5/4 in total).

## Where this design departs from, or adds to, the description it follows

* **Filtering on the board** is done as normal operation with the unwanted
  coefficients forced to zero, as the board description says. It takes 72
  ROW cycles per block. The chip set's fast filtering is built and tested
  in the processor but not used by the board.
* **Accepted coefficients** for degree d are those with row + column < 2d:
  3, 10 or 21 of them.
* **Forward output** is stored as 16-bit words (sign-extended 14-bit
  coefficients). The memory description also mentions an 8-bit forward
  path. Inverse output is bytes.
* **Inverse output** always goes to output memory 1.
* **Address map entries** are 19 bits (byte address and bit offset), one
  more than the original's 18, so a stream can start anywhere in 64 KB.
* **Added by this design:** the host port map, the GO and CLEAR commands,
  the control and status layout, the `size512` bit, and the
  frame-buffer interface (8-bit data, write strobe, plane number).
* **Frame-buffer transfer** sends 65536 bytes at one per board clock.
* **Chip interface:** ROW is a clock-enable strobe, not a separate clock,
  and tri-state buses are OR-ed buses.
* **Not built:**
  * the frame buffer board and the PC/AT host, which are outside the
    board;
  * a DC-only album mode (64 pictures of 32x32): album pictures are
    2x2- or 4x4-subsampled tiles, as in the addressing tables;
  * images wider than 512, which must be split by the host. A 512x512
    image is processed as four 64K-pixel runs; the 512-wide inverse
    address orders are simulated on two block rows only.

## Simulating

Every testbench checks itself and prints
`TB_RESULT checks=<n> failures=<n>`. A watchdog ends a hung run. The testbenches are:

| testbench | what it checks |
|-----------|----------------|
| `tb_ict_multiplier` | every magnitude × every code (exhaustive) |
| `tb_ict_chip` | all modes, group sizes and S against a reference dot product, COL/LAT timing |
| `tb_data_sequencer` | S/BL patterns and data order in all operations |
| `tb_ict_processor` | 2-D forward and inverse blocks, filtering and subsampling, block periods |
| `tb_ag1`, `tb_ag2`, `tb_ag3` | address orders against their geometric meaning, wrap pulses |
| `tb_mem_module` | word and byte access of the SRAM pair |
| `tb_inverse_addr_gen` | random code streams, one and four classes, 5-clock latency, table load addresses |
| `tb_input_stage` | port decoding and the control register |
| `tb_ias_top` | the whole board at default parameters (below) |

`tb_ias_top` does the following:
* transforms a full 256x256 image and checks all 65536 coefficients;
* runs inverse transforms of random code streams: normal with four classes
  and a continued second run, 2x2/4x4/6x6 filtering, 2x2 and 4x4
  subsampling, the same on a 512-wide image, and a two-picture album sent
  to the frame buffer;
* checks every pixel against a reference model (`tb_ict_model`);
* counts each of these mechanisms and fails if one never happened.

It runs in a few seconds.

With plain Verilator, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/ict_pkg.sv rtl/ias_pkg.sv tb/tb_ict_model.sv tb/tb_ias_top.sv \
  --top-module tb_ias_top -o sim && obj_dir/sim
```

The same pattern works for every other testbench. Replace the last
testbench file and the top module name.
