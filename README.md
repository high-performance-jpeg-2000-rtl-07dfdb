# JPEG 2000 tile encoder core with pre-coding rate control

This is the datapath and control of a JPEG 2000 still-image encoder built
around one idea: keep every unit busy on a different tile at the same time,
using only two single-port tile memories, and decide how much of each
code-block to keep *before* it is coded instead of after. The core takes
8-bit pixels of 128x128 tiles, transforms them with a two-level reversible
5/3 wavelet, lets a rate-distortion unit choose a cut bit-plane for every
code-block while the transform runs, streams the cut coefficients to a block
coder, stores the coder's 28 parallel pass streams back into the very words
the coefficients came from, and finally walks those streams to emit a
codestream.

The block coder engine (context formation plus arithmetic coding of all
bit-planes of one coefficient per cycle) is **not** included. Its interface
is brought out on the top module; the testbenches drive it with a simple
behavioural stand-in. Everything else of the encoder is RTL.

## The tile pipeline and the two memories

There are three pipeline stages, each working on its own tile:

| stage | memory | does |
|-------|--------|------|
| DWT (+ RDO accumulation) | bank X | writes the coefficients of tile *k* |
| EBC (+ RDO results) | bank Y | reads tile *k-1*, writes its pass streams back |
| BSF | bank X, before the DWT | reads tile *k-2*'s streams, emits the codestream |

At every stage boundary the banks swap. The BSF of tile *k-2* and the DWT of
tile *k* share bank X one after the other: the DWT writes one word per cycle
and would need the bank for the whole stage, so the controller first lets
the BSF read out the old tile and then starts the transform. The coder stage
(about one coefficient per cycle, so about 16K cycles per tile) is the long
one; BSF (about 9K cycles) plus DWT (8K cycles plus stalls) is of the same
order. The rate unit has no memory traffic: it watches the DWT's writes
(accumulating for tile *k*) and serves the cut planes of tile *k-1* to the
coder stage at the same time, so its results are kept in two banks.

`main_control` holds three small state machines (stage sequencing, bank X
owner, bank Y owner) and produces the bank selection, the RDO bank and
enable signals that keep idle units from toggling. `sram_ag` is a plain
router from the three clients to the two physical memories.

Memory layout of one tile bank (word addresses; each 24-bit word holds two
horizontally adjacent 11-bit sign-magnitude coefficients, even column in
bits [10:0], odd column in [21:11]):

    HL1 0..2047   LH1 2048..4095   HH1 4096..6143
    HL2 6144..6655   LH2 6656..7167   HH2 7168..7679   LL2 7680..8191

With 64x64 code-blocks each subband is exactly one code-block, so there are
seven per tile, coded in the order above; LL2 comes last.

## Wavelet transform (`dwt_row`, `dwt_col`, `dwt_level`, `dwt_2level`, `dwt_packer`)

Pixels arrive as pairs in raster order of a tile, one pair per cycle. After
subtracting 128, `dwt_row` runs the two lifting steps of the 5/3 filter on
the pair (predict: odd sample minus the floor of the mean of its even
neighbours; update: even sample plus a quarter of the neighbouring
highpass values, rounded), with mirrored samples at the row ends. It emits
one lowpass/highpass pair per cycle.

`dwt_col` applies the same lifting vertically. It keeps three line buffers
(the previous even line, the previous odd line and the previous highpass
line) and emits a full LL/HL/LH/HH quad for each column pair while the odd
line of a line pair streams in; the last line pair is finished right after
the tile ends. Each pixel is read once and each coefficient written once.
`dwt_level` is a row unit feeding a column unit; `dwt_2level` cascades two of
them, pairing the level-1 LL values of two neighbouring columns as the input
pairs of level 2 (which works on a 64x64 image).

Pixel pairs reach the transform through `io_fifo`, a 16-entry FIFO, so the
source can keep sending while the pipeline waits to start the next tile.

`dwt_packer` converts the coefficients to 11-bit sign-magnitude
(saturating at 1023), pairs neighbouring columns into one word and gives it
its address. Up to seven words can appear in one cycle, but the memory takes
one, so each subband has a small queue. On average the transform produces
exactly one word per cycle, so the queues fill during the bursty rows; when
any queue comes within eight entries of full, the transform stops taking
pixels from the FIFO until it drains. This back-pressure is this design's own choice.

## Rate control before coding (`rdo`)

The rate unit decides, for every code-block, the lowest magnitude bit-plane
that is worth coding. It needs a distortion decrease and a rate increase for
each plane, and it gets both without running the coder:

* **Distortion.** For every coefficient and every plane *p* the unit looks
  at three bits (*p*, *p-1*, *p-2*) of the magnitude. If the coefficient is
  already significant above *p*, the refinement bit reduces the squared
  error by an amount taken from an 8-entry table (`DREF`, in units of
  4^(p-3), derived from the error of mid-point reconstruction before and
  after the bit is known). In the two lowest planes a coefficient becoming
  significant gives a gain from a second table (`DSIG`).
* **Rate.** A refinement bit is almost incompressible, so each costs a fixed
  `R2`; a non-significant bit in the lowest two planes is counted as a
  significance-pass bit at cost `R1` (such bits almost always fall in that
  pass there). Other planes are assumed to be cheap.

During the DWT stage the unit accumulates, per code-block and plane, the
distortion sum and both bit counts. After the tile, a decision machine
walks each code-block from its top plane down and keeps plane *p* while
`weighted dD * 4^p >= lambda * (n2*R2 + n1*R1)`; the weights are the
energy gains of the 5/3 synthesis filters per subband (x16: HL1/LH1 17,
HH1 8, HL2/LH2 44, HH2 16, LL2 121). `lambda = 0` keeps everything. The
decision takes at most 70 cycles and is stored in the bank the coder stage
will read next. The tables, the rate constants and the weights are this
design's own; decisions are made on whole bit-planes, not on single passes.

## Feeding the coder (`psr_ag`, `ebc_ctrl`)

For each code-block, `ebc_ctrl` fetches the cut plane and the number of
non-zero planes (if nothing is left above the cut, the block is skipped and
only its empty header written), starts the reader on the block's area and the stream
writer on the same area, waits until the coder has finished the block, lets
the writer flush, and moves on.

`psr_ag` reads the block in the coder's stripe order: stripes of four rows,
column by column, four coefficients per column. Since a word holds two
columns, it reads the four words of one stripe column pair (rows *4s..4s+3*)
and then emits eight coefficients; two such groups are double-buffered so
the coder gets one coefficient per cycle despite the two-cycle read
latency. Bits below the cut are cleared on the way (a sign is cleared
with its magnitude). The reader publishes `free_lim`: every word below it
has been read and may be overwritten.

## Storing 28 streams in the coefficients' place (`psw_ag`, `mem_arbiter`)

This is the least obvious part. The coder produces all passes of all
planes of a coefficient at once: 28 independent byte streams (the cleanup
pass of the top plane and three passes for each of the nine lower planes),
up to five bytes per cycle, in an order nobody can predict. They must be
kept until the whole block is done, because the codestream starts with the
stream lengths. There is no room for 28 buffers; instead the bytes go back
into the block's own words that the reader has already consumed.

Every stream is a linked list of 24-bit words. Bit 23 of a word is a type
flag:

    short (flag 0): [22:16] forward offset to the next word, [15:8] byte, [7:0] byte
    long  (flag 1): [22:10] absolute address of the next word,  [7:0] byte

A stream owns its current word and may hold one pending byte. When its
second byte arrives, a fresh word is allocated. If the fresh word lies
1..127 words ahead, the current word is written in short form with both
bytes; otherwise it is written in long form with the first byte and the
second stays pending. Because the allocator hands out words in address
order and the busy streams grab words often, almost all words are short
(about 91% in the end-to-end test). At the end of a block every pending
byte is written as a short word with offset 0 (the terminator) and a
28-word header is written at the top of the block's area: one word per
stream, `{length in bytes [23:13], head address [12:0]}`.

Where fresh words come from:

1. the block's own area, upwards, below `free_lim` (up to the header once
   the reader is finished);
2. otherwise the free tail of the previous block's area (between the end of
   its stream words and its header), downwards from the top; when that is
   used up, the tail of the block before it, and so on. `ebc_ctrl`
   remembers, per block, where its streams ended and how much of its tail
   later blocks have used;
3. otherwise the byte waits while the reader is still running (`n_wait`);
   the first block of a tile has no earlier tail and relies on this;
4. if nothing is free even after the reader is done, the stream is
   truncated: that byte and all its later bytes are dropped (`n_drop`).
   The stored part is still a valid prefix.

The low-frequency block is coded last and compresses least; the tails of
the six other blocks are its reserve. Step 4 is the only lossy fallback;
with natural images the output of a block is well below its area.

Reader and writer share the bank through `mem_arbiter`: one grant per cycle,
alternating when both ask, so the reader keeps freeing words and the writer
keeps draining its four-entry write queue.

## Forming the codestream (`bsf`, `bsf_sequencer`)

For each tile, `bsf` emits headers from a small table, then for each
code-block reads its 28 header words, emits the 28 stream lengths, and
walks each stream's list: a short word gives two bytes and the next address
by adding its offset, a long word one byte and the next address directly.
The memory has a two-cycle read latency; the next read is issued in the
cycle the previous word arrives, so a stream is read at one word per two
cycles, plus about half a cycle per stream switch. `bsf_sequencer` packs
the 1..3-byte pieces into 24-bit output words and pads the last word of a
tile with zeros.

The codestream syntax is this design's own, reduced form, not the full
standard's:

    first tile:  FF4F, FF51, 000A, width, height, tile size   (16-bit fields)
    each tile:   FF90, tile index, FF93,
                 for each code-block (HL1 ... LL2):
                   28 x 16-bit stream lengths, then the streams' bytes
                 zero padding to a 24-bit word boundary
    last tile:   FFD9 right after the last stream byte

Stream *s* of a block holds, in coding order, the cleanup pass of the top
plane (s = 0) and then significance, refinement and cleanup of each lower
plane (s = 1 + 3*(P-2-p) + {0, 1, 2}).

## The missing block coder

The top exposes the coder interface (`ebc_*`):

* coefficients: `ebc_c_valid`/`ebc_c_ready`, `ebc_c_data` (11-bit
  sign-magnitude, cut already applied), `ebc_c_last`, plus `ebc_cb` and
  `ebc_planes` (non-zero magnitude planes of the block);
* bytes: five lanes `ebc_b_valid[4:0]`, `ebc_b_byte`, `ebc_b_sid` (stream
  id as above), lane 0 first, all taken when `ebc_b_ready`;
* `ebc_cb_coded`: pulse after the last byte of a block.

`tb/ebc_model.sv` is a stand-in for simulation only: it sorts each bit into
the stream it would belong to, packs bits into bytes and throttles its input
at random. It sends only one in eight zero bits of insignificant
coefficients so that its output volume resembles a real coder's; it is not
decodable and not an entropy coder.

## How far it follows the original design

Taken from the original design: 128x128 tiles, 64x64 code-blocks, the
two-level line-based 5/3 transform at two pixels per cycle, 11-bit
coefficients stored two per word, the 8K x 24-bit single-port tile memories
with two-cycle latency, the three-stage tile pipeline with the BSF and DWT
sharing one memory, a rate control that accumulates during the transform
and decides before coding, a reader that cuts coefficients on their way to
the coder, 28 pass streams with up to five bytes per cycle, the short/long
linked-list word with 7-bit and 13-bit pointers, stream headers at the end
of each code-block's area, LL coded last with overflow into areas of
already coded subbands, an arbiter between reader and writer, and a BSF
built from a header table, header and stream analysers, address generator
and sequencer.

This design's own choices: the memory map and bit placement, the DWT word
queues and pixel back-pressure, the rate tables, constants and weights, the
whole-plane truncation, the link allocation rule and terminator, the header
word layout, the overflow order and the wait/truncate fallback, the
round-robin arbiter, and the codestream syntax.

Known differences from the original design:

* The coder engine is not included (see above).
* The rate unit truncates at whole bit-planes, not at individual passes.
* A code-block whose cut lies at or above its number of non-zero planes is
  discarded whole (never read, never coded; only its empty header is
  written). Because the rate model treats the top plane's cleanup bits as
  free, the top plane is always kept, so in practice only blocks that are
  entirely zero are discarded. Within a kept block the reader still feeds
  every coefficient, so cutting planes does not shorten the coder stage;
  the original design gained much of its lossy-mode speed from truncation.
* The codestream is not a standard-compliant JPEG 2000 codestream (no tag
  trees or packet headers).
* Pixels enter through a 16-entry input FIFO (`io_fifo`). The codestream
  leaves directly as 24-bit words with a valid strobe and no back-pressure;
  there is no output FIFO and no external memory interface.

## Files

`rtl/` (synthesizable): `jpeg2k_pkg` (types, constants, memory map),
`dwt_row`, `dwt_col`, `dwt_level`, `dwt_2level`, `dwt_packer`, `rdo`,
`psr_ag`, `psw_ag`, `mem_arbiter`, `ebc_ctrl`, `bsf`, `bsf_sequencer`,
`main_control`, `sram_ag`, `io_fifo`, `jpeg2k_top`. Defaults are the full sizes
(tile 128, latency 2).

`tb/`: one self-checking testbench per unit (`tb_<unit>.sv`), the
end-to-end tests `tb_jpeg2k_top` (four 64x64 tiles) and `tb_jpeg2k_full`
(four 128x128 tiles, top at its defaults), the shared end-to-end body
`jpeg2k_harness`, a reference transform (`dwt_ref_pkg`), an SRAM model with
two-cycle latency (`sram_model`) and the coder stand-in (`ebc_model`).

The end-to-end tests compare every code-block's coefficients, as the coder
receives them, with a reference transform cut at one plane, check the plane
count, parse the whole codestream and compare every stream's bytes with
what the coder produced, and require each mechanism to occur at least once:
pixel stalls, coder back-pressure, arbiter contention, short and long link
words, overflow words, writer waits, RDO cuts, code-blocks discarded whole
(a flat tile), and the DWT and BSF each running while the coder works. No byte may be dropped. Every unit test has
been checked to fail on a deliberately broken copy of its unit.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. With
Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
        -Irtl -y rtl -y tb +libext+.sv \
        rtl/jpeg2k_pkg.sv tb/dwt_ref_pkg.sv tb/tb_jpeg2k_full.sv \
        --top-module tb_jpeg2k_full -o sim
    ./obj_dir/sim

Replace `tb_jpeg2k_full` with any other testbench name. The full-size run
codes four tiles (one of them flat) in about 73K cycles and takes well
under a second. The
reduced end-to-end test sets `T = 64`; the DWT tests use smaller tiles too.
The smallest tile the top supports is 64 (a level-2 code-block must hold
its 28 header words).
