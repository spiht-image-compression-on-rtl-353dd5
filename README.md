# SPIHT wavelet image coder in SystemVerilog

This is a hardware encoder for SPIHT ("set partitioning in hierarchical
trees") image compression. It takes a square 8-bit grey-scale image and
produces the bits of an embedded SPIHT bit stream. Stopping anywhere in that
stream gives the best image the coder can offer for that many bits.

Software SPIHT is sequential. It walks the whole coefficient pyramid several
times per bit plane and moves coefficients and sets between three linked
lists (LIP, LIS, LSP). The list order depends on the image, so one block's
place in the stream is known only after every block before it has been
coded.

This design fixes the order in which blocks are sent instead. Blocks go in
Morton (Z-curve) order, coarsest level first. A block's position in each
list is then known in advance. What a 2x2 block adds to each bit plane then
depends only on:

- the block itself;
- whether its parent's descendant set has already been found significant;
- the largest magnitudes in its own descendant sets.

So all 22 bit planes of a block can be computed in one clock, in parallel.
At the end of every bit plane the stream holds exactly the bits that
ordinary SPIHT would have sent, in a different order. Only a cut inside a
plane gives a slightly different image.

The encoder is three phases, which run in turn over shared memories:

1. **Wavelet phase** (`dwt_engine`): a 2-D 9/7 wavelet transform, four rows
   at a time, in a compact per-level fixed-point format.
2. **Magnitude phase** (`mag_engine`): one depth-first walk over the
   wavelet trees. It writes one 128-bit record per 2x2 block. Each record
   holds the block and the bit lengths of the largest magnitudes below each
   of its coefficients, and the records come out in coding order.
3. **Coding phase** (`spiht_engine`): one record per clock goes through 22
   parallel bit-plane units. Their output bits are packed by 66 variable
   FIFOs and written to memory by fullest-first schedulers.

`spiht_top` strings the three together behind a small host interface.

## Number formats

### Variable fixed point

Every coefficient is a 16-bit two's-complement word. The binary point sits
at a different place for each wavelet level, because each 2-D low-pass step
can grow values by about a factor of 3. The image needs few integer bits;
the coarsest level needs many.

| data | integer bits (with sign) | fraction bits |
|---|---|---|
| image (pixel * 2^6) | 10 | 6 |
| level L (0 = finest) | 11 + L | 5 - L |
| level 6 | 17 | -1 (the LSB weighs 2) |

The filters keep this exact:

- The 9/7 analysis taps are scaled to a DC gain of sqrt(2) and held as
  14-fraction-bit integers (`H97`, `G97` in `spiht_pkg`).
- The row pass rescales by 2^-14, which keeps the input format.
- The column pass rescales by 2^-15, which gives up one fraction bit.
- So one full 2-D level moves data exactly one row down the table.
- Every rescale rounds half up and saturates to 16 bits. A saturation sets
  the sticky `overflow` output.

The level-L format leaves room for the largest values real 8-bit images
produce. It does not cover the theoretical worst case, which is why the
overflow flag exists.

### Common format for coding

Before coding, a level-L magnitude is shifted left by L (`spiht_shift`).
Every coefficient is then an integer multiple of 2^-5 in a 22-bit magnitude,
and bit plane p (0..21) of the stream is bit p of that magnitude.

### Bit lengths instead of maxima

SPIHT asks, per plane, whether the largest magnitude of a set is at least
2^p. That is the same as asking whether its bit length (floor(log2)+1, with
0 for zero) is greater than p. The records therefore store 5-bit bit
lengths, not 22-bit maxima.

## Wavelet phase

`dwt_engine` performs each level as two passes of the same row machine. Each
pass reads rows and writes them back **transposed**. The first pass filters
the rows and leaves them as columns. The second pass filters those, which is
the column transform, and transposes the data back. One set of addressing
logic therefore serves both dimensions.

The two memories alternate:

- Pass 0 reads memory A and writes memory B.
- Pass 1 reads B and writes A.
- The level's M x M low band is then halved, and the next level starts.

Four rows are handled at once. At every clock, the four lanes read sample c
of rows 4g..4g+3. Each lane is a `dwt_row_filter` that:

- keeps a 9-sample window with whole-sample symmetric reflection at both
  row ends;
- pre-adds the symmetric taps (5 multipliers);
- puts the low-pass output at even positions and the high-pass output at
  odd positions;
- rescales through `vfp_scale`.

Output n of row r goes to row n/2 (low band) or M/2 + n/2 (high band), at
column r (`dwt_write_sel`). So the four lanes write four consecutive
*columns* of one row, while they read four consecutive *rows* of one column.

Both patterns must be single accesses. `coef_mem` therefore splits each
memory into four banks, with bank = (row + col) mod 4. Four consecutive
rows, or four consecutive columns, then always fall in four different banks.
Assertions check that no two lanes ever hit one bank.

When all levels are done, the top LL band (8x8 at the default size) is
summed, and its rounded mean is subtracted from it in place (`ll_mean`). The
mean leaves on `ll_mean_value`; a decoder needs it.

Clock count for one pass over an M x M band: (M/4)(M+4)+3. That is M+4
steps per row group (M samples plus the filter flush) and 3 clocks of
pipeline. At 512x512 the whole phase takes 176,806 clocks, about 0.67 clocks
per pixel.

## Magnitude phase and the block record

`mag_engine` visits the 2x2 blocks of every band in a depth-first
post-order. It walks the Morton index of the finest level. After every 4th
block, and after every 16th block, and so on, it climbs one level and
finishes the parent. When a block is finished, its children are already
done.

A stack keeps the last four blocks of each level. From it, the parent gets,
for each of its coefficients i:

- `d_nb[i]`: the bit length of the largest magnitude in D(c_i), all
  descendants (children included);
- `l_nb[i]`: the same for L(c_i), the descendants without the children.

The coefficients of the top LL band are the tree roots. Root coefficient 1,
2 or 3 of a top block adopts as children the HL, LH or HH block at the same
position of the coarsest detail level. Root coefficient 0 has no offspring.

The block record (`blk_rec_t`, 128 bits) holds:

| field | meaning |
|---|---|
| `coef[4]` | the raw 16-bit coefficients (UL, UR, LL, LR) |
| `l_nb[4]`, `d_nb[4]` | bit lengths of max \|L(c_i)\| and max \|D(c_i)\| |
| `p_nb` | bit length of the largest magnitude in the parent's D set, i.e. of this block and everything below it |
| `has_l`, `has_d` | which coefficients have grand-children and children |
| `level`, `is_root` | wavelet level; block of the top LL band |

Records are written straight to their final addresses, so the coding phase
reads them in plain address order:

- top LL blocks first;
- then the levels from coarsest to finest;
- inside a level, the HL, LH and HH bands in turn;
- inside a band, Morton order.

Two coefficients are read per clock, half a block, so the phase takes
2·(N²/4) + 1 clocks: 131,073 at 512x512.

## Coding phase: Fixed Order SPIHT, one block at a time

This is the least obvious part. `spiht_bitplane` (one instance per plane P)
decides from one record what the block adds to plane P. A set or magnitude
is *significant at P* when its bit length is greater than P. It was
*significant before* when its bit length is greater than P+1.

- **Active**: the block is a root, or its parent's set D is significant at
  P (`p_nb > P`). Inactive blocks add nothing.
- **Newly reached** (`p_nb == P+1`, not a root): the parent's set split at
  this plane. In SPIHT, the four children are then sorted immediately,
  inside the LIS pass. The block sends its four significance bits, each
  followed by a sign bit when it is 1, as LIS bits.
- **LIP**: an active block that was not newly reached sends, for every
  coefficient not significant before, its significance bit (plus sign when
  significant).
- **LSP**: every coefficient significant before sends bit P of its
  magnitude (refinement).
- **LIS, type A**: for each coefficient with children, while D(c_i) is still
  in the list, the bit "D(c_i) significant at P". The entry exists from the
  start for roots. For other blocks it exists once the parent's L set was
  found: this block's sets are then live, that is max `d_nb` > P.
- **LIS, type B**: once D(c_i) is significant and grand-children exist, the
  bit "L(c_i) significant at P", until L(c_i) is found.

An entry leaves the list when it is found. That is why each of the
conditions above compares a bit length with both P and P+1.

The bits are packed first-bit-most-significant, into:

- LIP: 0..8 bits;
- LIS: 0..16 bits, the offspring bits of coefficients 0..3 first, then per
  coefficient its type A and type B bits;
- LSP: 0..4 bits.

### Streams, FIFOs and memory layout

Each (plane, list) pair is one of 66 independent streams, and each stream
has its own `var_fifo`. The FIFO shifts chunks of 0..16 bits into a 32-bit
word and stores full words. The default depth is 128 words, one 4-kbit
block RAM per stream.

Two `fifo_sched` units pick, every clock, the fullest FIFO of their group:

- the LIP and LIS FIFOs for write port 1;
- the LSP FIFOs for write port 2.

Each stream owns a fixed region of its memory and has a word counter as its
address generator:

- Port 1 region 2p + list (list 0 = LIP, 1 = LIS) starts at word
  (2p + list)·N²/8.
- Port 2 region p starts at word p·N²/32.

Each region holds the largest chunk times the number of blocks, so no
region can overflow.

When any FIFO holds DEPTH-2 words or more, record reading stalls. This
happens when the streams of one port together produce more than one word
per clock for long enough. In practice it is the LSP port, in the fine
levels, where every significant coefficient adds a refinement bit to every
lower plane.

After the last record, every FIFO is flushed, padding its last word with
zeros, and drained. `len_bits` (selected by `len_sel`: 0..43 port 1 region,
44..65 LSP of plane `len_sel`-44) gives each stream's exact bit length.

### Assembling the stream

A complete SPIHT stream, from plane 21 down to plane 0, is for each plane:

    LIP bits (port 1 region 2p) , LIS bits (region 2p+1) , LSP bits (port 2 region p)

Each part is `len_bits` bits long, read from the start of its region. This
concatenation is left to the reader of the memories; planes above `top_nb`
are empty. The stream header a decoder needs is: `ll_mean_value`, `top_nb`,
the image size and the level count.

## Top level and host interface

`spiht_top` (parameters `LOG2N` = 9 for 512x512, `LEVELS` = LOG2N-3, `DEPTH`
= 128) holds six memories:

- coefficient memories A and B (`coef_mem`, 4 x 16 bit per access);
- two 64-bit record memories, read together as one record;
- the LIP/LIS word memory;
- the LSP word memory.

All of them are `sram` arrays with synchronous read. A sequencer steps
`phase` through 0 (host), 1 (wavelet), 2 (magnitude) and 3 (coding). It
steers each memory port to the engine that owns it in that phase.
Assertions check that only the current phase's engine is busy.

Host use:

1. While idle, write pixels with `host_we`/`host_row`/`host_col`/`host_pix`.
2. Pulse `start` and wait for `done`.
3. Read coded words with `host_brd_en`/`host_brd_port`/`host_brd_addr`
   (data one clock later), and the stream lengths with `len_sel`.
4. Optionally read the transform back with `host_crd_en` at
   `host_row`/`host_col`.

Measured at 512x512 with the default parameters and a textured test image:

| phase | clocks | per pixel |
|---|---|---|
| wavelet | 176,806 | 0.67 |
| magnitude | 131,073 | 0.50 |
| coding | 66,691 (1,100 of them stalls) | 0.25 |

## Where this design departs from the published architecture

- **One clock domain, phases in sequence.** The original put each phase on
  its own FPGA, with its own clock, and switched board memories between
  them with a crossbar. Three images could then be in flight at once. Here
  the three engines share one clock and one image, and the crossbar is a
  set of multiplexers. Pipelining images would need a second set of
  memories; the per-phase clock counts are unaffected.
- **No PCI link.** The host side is plain load/read ports.
- **Clock counts.** The published counts per 512x512 image are 182,465
  (wavelet), 131,132 (magnitude) and 65,793 (coding). This design takes
  176,806, 131,073 and 66,691 (the coding count depends on the image,
  through stalls). All stay at or below 3/4, 1/2 and about 1/4 clocks per
  pixel.
- **Grouping of the coding bits.** The original grouped up to 37 bits per
  block and list. Here a block sends the sorting bits of its *own* four
  coefficients when its parent's set splits, rather than the parent sending
  all 16 child bits. The per-block groups are then at most 8, 16 and 4 bits.
  The bits sent per plane are the same; only their order inside a plane
  differs.
- **Record contents.** The magnitude phase stores bit lengths of the
  maxima, and the raw coefficients. Signs and significance are derived in
  the coding phase.
- **Two schedulers.** The original shows one dynamic FIFO scheduler for both
  write ports. Here each port has its own fullest-first scheduler over its
  own FIFOs, so both ports write in the same clock.
- **Bank skew** in the coefficient memories is this design's way of doing
  four-row reads and four-column transposed writes in one access each.
- **Filter quantisation.** The 9/7 taps (14 fraction bits), half-up
  rounding and saturation on overflow are choices of this design.
- **Sizes.** The default build is 512x512 and 6 decompositions (8x8 top LL).
  The image size is fixed when the design is built, not chosen at run time.
  Other power-of-two sizes need a rebuild with another `LOG2N` (and `LEVELS`).
  16x16, 32x32, 64x64, 512x512 and 1024x1024 (7 decompositions, all seven
  level formats) were simulated end to end; 128 and 256 were not.
- **No arithmetic coding**, as in the original.

## Simulating

Every testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops, and a watchdog stops it if it
hangs. The reference model in `tb/spiht_ref.svh` computes the transform
with the same fixed-point rules. It then codes every block with the rules
above and predicts each stream word by word. `tb/spiht_tb_body.svh` holds
the end-to-end test used at both sizes.

With Verilator 5, from the directory above `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
        rtl/spiht_pkg.sv tb/tb_spiht_top.sv --top-module tb_spiht_top \
        -Mdir obj_top -o sim
    ./obj_top/sim

`-Wno-fatal` keeps Verilator's width warnings from stopping the build. Some
unit testbenches mix integer widths freely in their reference arithmetic.
The RTL and the end-to-end testbenches build without warnings at their
default settings.

Replace `tb_spiht_top` with any other testbench:

| testbench | what it does |
|---|---|
| `tb_vfp_scale`, `tb_dwt_row_filter`, `tb_dwt_write_sel`, `tb_ll_mean`, `tb_coef_mem`, `tb_sram` | unit tests of the wavelet datapath |
| `tb_dwt_engine` | whole transform at 32x32, including a saturating image |
| `tb_mag_engine` | all records of a 32x32 image against the reference |
| `tb_spiht_shift`, `tb_spiht_bitplane`, `tb_var_fifo`, `tb_fifo_sched` | coder parts, random stimulus |
| `tb_spiht_engine` | whole coder at 32x32 |
| `tb_spiht_top` | end to end at 64x64, random image |
| `tb_spiht_top_full` | end to end at the default 512x512, textured image; about a minute in all, most of it compiling |
| `tb_spiht_top_16` | end to end at 16x16, one wavelet level |
| `tb_spiht_top_1024` | end to end at 1024x1024, seven levels; about a minute of simulation |

The end-to-end tests check:

- every transformed coefficient, the LL mean and `top_nb`;
- the length and every word of all 66 streams;
- the exact wavelet and magnitude clock counts, and bounds on the coder's.

They also count each mechanism and fail if one never happened:

- coder stalls;
- both write ports in use;
- a partially filled final word;
- newly reached blocks;
- type-B LIS entries (where two or more levels make them possible);
- refinement bits;
- a non-zero LL mean.

`tb_dwt_engine` drives an image that saturates, to exercise the overflow
flag.
