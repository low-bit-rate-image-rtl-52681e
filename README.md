# Tiled wavelet image compressor for low bit rates

This is a hardware image compressor meant for spacecraft, where the downlink is
narrow and the logic budget is small. An image is cut into square tiles of
N x N 8-bit pixels, 64 x 64 by default. Each tile is coded on its own, in two
stages:

1. A four-level 2-D 5/3 integer wavelet transform (DWT). It is built from
   lifting steps.
2. An embedded bit-plane coder. It is a no-list variant of SPIHT (set
   partitioning in hierarchical trees), often called NLS.

The coder writes the most important information first, so its output can be
cut at any byte. Each tile has a byte budget (`desired_byte`), and coding
stops when the budget is used up. This gives a fixed compression ratio per
tile. Useful ratios are about 4:1 (2 bits per pixel) to 160:1.

The design rests on one decision that makes it small: **the three detail bands
of the first transform level are thrown away.** They hold three quarters of
the coefficients. At high compression ratios almost no bits would reach them
anyway. Dropping them has three effects:

- The coefficient memory shrinks to (N/2) x (N/2) words.
- Every parent-child tree is one level shallower.
- 2 bits per pixel becomes the highest rate the design can reach, and the
  slowest case.

The RTL follows the architecture of "Low Bit Rate Image Compression Core for
Onboard Space Applications" (IEEE Trans. Circuits and Systems for Video
Technology). It is an independent implementation. Where the publication leaves
something open, or where this code departs from it, the difference is stated
below and in the opening comment of each file.

## Block structure

```
image_compressor            NUM_CORES independent cores, one tile each (default 4)
 ├─ output_interface        per core: byte address counter, bitstream memory, address mux
 └─ compressor_core         one tile: transform, then coder
     ├─ dwt_2d              2-D 5/3 DWT, 4 levels, level-1 details dropped
     │   ├─ dwt_cu          control unit: level/direction FSM, address
     │   │                  generators, border flags, normalization control
     │   ├─ lifting_proc    Prow (horizontal filtering)
     │   ├─ lifting_proc    Pcol (vertical filtering)
     │   ├─ dp_ram          MEMb: N x N/2 words, 16 bits
     │   ├─ dp_ram          MEMa: N/2 x N/2 words, 16 bits (final pyramid)
     │   └─ sm_norm x2      2's complement -> sign-magnitude, normalization shift
     └─ spiht_encoder
         ├─ mdmc            maximum-descendant circuit: Dmax, Gmax, initial threshold
         │   └─ dp_ram x2   Dmax (NC/4 words), Gmax (NC/16 words), 15 bits
         ├─ dp_ram          marker memory, NC words of 3 bits
         ├─ nls_unit        coder FSM and data path
         └─ byte_builder    bit packing, byte counter, stop condition
```

`spiht_pkg` holds the marker and pass types and the skip tables. NC is the
number of kept coefficients, (N/2)^2, which is 1024 for a 64 x 64 tile.

## Interface of a core

All signals are synchronous to `clk`. `rst` is synchronous and active high.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `newtile` | in | 1 | A high-to-low transition starts a tile. |
| `datain_p1`, `datain_p2` | in | 8 | Even and odd pixel of a horizontal pair. |
| `desired_byte` | in | log2(N^2)+1 | Byte budget of the tile. For a target of r bits per pixel it is N*N*r/8, e.g. 1024 for 2 bpp at N = 64. Sampled while coding. |
| `end_dwt` | out | 1 | High once the transform of the tile is complete. |
| `byte_out`, `new_byte` | out | 8, 1 | A compressed byte and its one-cycle strobe. |
| `byte_count` | out | as `desired_byte` | Bytes produced so far. |
| `end_spiht` | out | 1 | The tile is finished. This happens on the budget, or after the last bit plane. |

**Pixel input.** From the first cycle in which `newtile` is seen low, the core
takes one pixel pair per cycle in raster order. That is N*N/2 cycles per tile,
with no gaps, and the source must keep pace. Pull `newtile` high again
before the next tile.

**Output.** The stream has no header. The initial threshold (a power of two)
is available on the `init_th` output. A decoder needs it, and it is not
written into the byte stream. The first coded bit goes into bit 7 of the first
byte. If the coder runs out of bit planes before the budget is used, the last
partial byte is padded with zeros.

The top, `image_compressor`, repeats these ports as unpacked arrays indexed by
core. The cores share nothing except the clock and reset.

Behind every core the top places an `output_interface`. It holds:

- a byte memory of N*N bytes;
- a counter, `addr_byte`, that steps on each `new_byte`. It restarts at 0
  while `newtile` is high.
- a multiplexer on the memory address, switched by `end_spiht`.

While the core codes, byte k of the tile is written at address k. Once
`end_spiht` is high, a host reads the stream back by driving `addr_enc`. The
data appears on `bitstream` one cycle later. This is the buffer arrangement
of a single-core test set-up, repeated per core.

| Top-only port | Dir | Width | Meaning |
|---|---|---|---|
| `addr_enc` | in | log2(N^2) | Read address of the bitstream memory. |
| `bitstream` | out | 8 | Read data, one cycle after the address. |
| `addr_byte` | out | log2(N^2) | Number of bytes stored for the current tile. |
| `init_th` | out | 15 | Initial threshold of the tile. |

## The transform

**Lifting.** Each row, and then each column, is filtered with the reversible
5/3 lifting scheme on pairs (x[2n], x[2n+1]):

```
H[2n+1] = x[2n+1] - floor((x[2n] + x[2n+2]) / 2)        predict
L[2n]   = x[2n]   + floor((H[2n-1] + H[2n+1] + 2) / 4)   update
```

`lifting_proc` is a four-stage pipeline that takes one pair per cycle and
produces one (L, H) pair per cycle, 4 cycles later. It uses only adders,
multiplexers and shifts. It keeps the previous H for the update step.

**Tile borders.** Border handling is done by two multiplexers, which keeps
the hardware small:

- At the end of a line (`eol`), x[2n] is used in place of the missing
  x[N]. This mirrors x[N-2].
- At the start of a line (`sol`), H[-1] is taken as 0. This is the value
  that results from repeating the first pixel, x(-2) = x(-1) = x(0).

No pixel from a neighbouring tile is ever needed. Because of this, tiles are
fully independent.

**Dataflow per level.** Each level j is one horizontal step followed by one
vertical step.

- **Horizontal step.** The Prow processor reads rows and writes L|H halves
  into MEMb. At level 1 it reads the external pixel pairs; at later levels it
  reads the LL quadrant in MEMa. At level 1 only the L half is written, so
  MEMb needs N x N/2 words.
- **Vertical step.** The Pcol processor reads MEMb column-pair by column-pair
  and writes the result into MEMa.
- **MEMa layout.** MEMa ends up holding the usual pyramid in row-major order.
  For every S x S square: LL top left, HL top right, LH bottom left, HH bottom
  right.
- **Sign-magnitude conversion.** Every word written into MEMa that will not be
  filtered again passes through `sm_norm`. This means the HL, LH and HH bands
  of each level, and LL at the last level.

**Normalization.** The 5/3 lifting filters are not orthonormal. To make bit
planes of different bands comparable, `sm_norm` applies a left shift:

| Band | Left shift |
|---|---|
| LL_4 | 4 |
| HL_j, LH_j | j - 1 |
| HH_j | j - 2 |

These are the scale factors 2^j, 2^(j-1) and 2^(j-2) of each band, divided by
the smallest factor that is kept (that of HH_2). Magnitudes are saturated at
15 bits, and bit 15 carries the sign.

**Timing at N = 64.** A level costs about one cycle per pair in each step,
plus a few cycles to fill the pipeline and memory. The whole transform takes
4,456 cycles. Steps do not overlap.

**Read-out.** After `end_dwt`, MEMa is read through two external address
ports. Those addresses are **Morton (Z-order) indices**. Bit 2k of the index
is column bit k and bit 2k+1 is row bit k. `dwt_2d` de-interleaves the bits
to form the row-major address. In Morton order, the children of coefficient n
are exactly 4n..4n+3, and the coder relies on this.

## The coder

### Maximum-descendant tables (`mdmc`)

SPIHT constantly asks whether any descendant of a coefficient is significant
at the current threshold. The answer comes from two tables that are built
once per tile:

```
dmax[k] = |w[4k]| | |w[4k+1]| | |w[4k+2]| | |w[4k+3]| | gmax[k]        (all descendants of k)
gmax[k] = dmax[4k] | dmax[4k+1] | dmax[4k+2] | dmax[4k+3]             (grandchildren and below)
```

`|` is a bitwise OR of the magnitudes. For a power-of-two threshold th,
(OR of magnitudes) & th is non-zero exactly when some magnitude has that bit
set. That is the significance test the coder needs.

- **Order of work.** k runs from NC/4-1 down to 0, so each child entry is
  ready before its parent.
- **Cost.** Each k takes 3 cycles: two dual-port reads of MEMa and one write.
  With NC/4 = 256 entries that is 3*256 + 2 cycles in all.
- **Initial threshold.** The highest set bit of the OR of all magnitudes
  becomes the initial threshold.

### Markers instead of lists

Classic SPIHT keeps three linked lists. This coder replaces them with a 3-bit
marker per coefficient, stored in a dual-port memory:

| Marker | Meaning at position n |
|---|---|
| MIP | Coefficient n is not yet significant. |
| MSP | Coefficient n is significant. |
| MD  | n is the first child of an untested D set (all descendants of n/4). |
| MG  | n is the first grandchild of an untested G set (descendants of n/16 below the children). |
| MN2, MN3 | n is the first descendant, in the 2nd or 3rd generation, of an insignificant set. The scan skips the 16 or 64 positions that follow from it. |

At start-up the NDC = NC/4^(LEVELS-1) coefficients of LL_4 are marked MIP.
Every first child of each later generation is marked MD, MN2 or MN3 according
to its depth.

### Passes

Each bit plane is coded with three linear scans over n:

- **RP (refinement pass).** For every MSP position, output the current bit of
  the magnitude.
- **IPP (insignificant pixel pass).** For every MIP position, output whether
  it is significant. If it is, output its sign and mark it MSP.
- **ISP (insignificant set pass).**
  - At an MD, test dmax[n/4]. If the set is significant, code the four
    children, and mark the grandchild block at 4n as MG.
  - At an MG, test gmax[n/16]. If the set is significant, split it into four
    D sets at n, n+4, n+8 and n+12. Each of them writes MD at j, MN2 at 4j
    and MN3 at 16j. Then test n again.

Positions whose marker does not concern the current pass are skipped by a
fixed distance. For example, an MN3 in the ISP skips 64 positions. The
distances are set by the skip tables `skip_rp` and `skip_isp` in
`spiht_pkg`. Skipping is the main source of the coder's speed.

The order RP, IPP, ISP puts the refinement bits first, which differs from
classic SPIHT. It changes only the order of the bits, not their number.

**Threshold.** The first bit plane uses the initial threshold. Its RP is empty
because nothing is significant yet. The threshold is halved after each ISP,
and coding ends when it reaches zero or when `end_spiht` rises.

**Significance test.** The coefficients are in sign-magnitude form, so the
test is a bitwise AND of the magnitude with th.

**Control.** The coder's control unit is a one-hot state machine. There are
states for initialization, fetch and execute of a scan position, the sign bit,
coding of the four children of a significant D set, splitting of a G set,
and the final flush.

**Cost.** Each scanned position costs two cycles: a fetch, then an execute
step. This is because every memory has a registered read. Each output bit
costs one cycle. Bits go to `byte_builder`, which shifts them into bytes MSB
first, counts them and stops the coder when `byte_count` equals
`desired_byte`.

**Measured at N = 64.** A 2 bpp tile (1,024 bytes) takes roughly 28,000 to
36,000 cycles from `newtile` to `end_spiht`, depending on the image. That is
11 to 14 Mpixel/s per core at 100 MHz, and four cores give 45 to 58 Mpixel/s.
The publication reports 4.6 Mpixel/s per core and 18.4 for four, also at
2 bpp and 100 MHz, on its implementation. The testbench of `compressor_core`
checks that a 2 bpp tile finishes within the 89,043 cycles that 4.6 Mpixel/s
allows.

## Where this RTL departs from, or adds to, the publication

- **Memory sizes.** The publication's text gives the sizes of the two
  transform memories the other way round from its own dataflow. Here MEMb,
  which holds level-1 row results, is N x N/2, and MEMa, which holds the
  final pyramid, is (N/2) x (N/2). The total is unchanged.
- **Update step.** The drawing of the lifting data path shows a shift by one
  after the "+2" adder. The update equation needs division by 4, and this RTL
  shifts by two.
- **Threshold shift.** The text says the threshold register shifts "just
  before each refinement pass". Taken literally, the first bit plane would
  never be coded at the initial threshold. Here the first plane uses the
  initial threshold, and the shift happens before every later refinement
  pass.
- **LL_4 normalization.** The text lists the conversion to sign-magnitude and
  the normalization for the detail bands. The final LL_4 band must also be in
  sign-magnitude form and scaled for the coder, so it goes through the same
  unit, with a shift of 4.
- **Pixel input protocol, stream format and core-to-tile mapping.**
  - The publication names the pixel ports but gives no addresses or
    handshake. This RTL uses a fixed raster stream.
  - There is no header and no padding rule in the publication. The choices
    made here are described under *Interface* above.
  - How tiles are distributed to parallel cores is left to the user.
- **Cycle budget.** The split of work into cycles is this design's own.
  Examples are the 2-cycle scan step, the 3-cycle MDMC step and the 4-stage
  lifting pipeline.
- **Output buffer.** The publication shows a single core feeding a
  bitstream memory through an "output interface". The multiplexer in front of
  that memory is switched by `end_spiht`. Here one such buffer sits behind
  every core. Clearing its counter on `newtile` is this design's choice. So
  is giving a byte strobed in the same cycle as `end_spiht` priority over the
  host's address.
- **Not included.** The soft processor and the serial link to a PC that drive
  the core during testing are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. All of them compare
against `tb_ref_pkg`, a behavioural reference written separately from the
RTL. The reference contains:

- the 5/3 lifting with the border rule above, the 4-level pyramid and the
  normalization;
- the Morton mapping and the dmax/gmax tables;
- a straightforward software model of the marker-based coder that produces
  the exact expected bit stream for a given byte budget.

Test tiles are generated: random noise, smooth image-like gradients with
texture, flat tiles and stripes.

| Testbench | What it checks |
|---|---|
| `tb_lifting_proc` | Lifting results, border rule, 4-cycle latency. |
| `tb_sm_norm` | Conversion, shift and saturation for all shift values. |
| `tb_dp_ram` | Both ports against a model, including same-address writes. |
| `tb_byte_builder` | Bit packing, counting, budget stop, padding on flush. |
| `tb_dwt_cu` | The complete transform at N = 16, a reduced size chosen for speed. |
| `tb_dwt_2d` | Every coefficient of the pyramid at N = 64, and the cycle count of the transform. |
| `tb_mdmc` | Both tables, the initial threshold, and the cycle count. |
| `tb_nls_unit` | The bit stream from coefficients preloaded into a memory model. |
| `tb_spiht_encoder` | Bytes, byte count and `end_spiht` against the reference coder. |
| `tb_compressor_core` | End-to-end bytes at the default size for several budgets, and the 2 bpp cycle limit. |
| `tb_output_interface` | Counter, write/read switching, and a last byte strobed together with `end_spiht`. |
| `tb_image_compressor` | The whole top at its default parameters; see below. |
| `tb_image_workload` | A 512 x 512 image in 64 tiles on the four cores, at 160:1 and at 4:1; see below. |
| `tb_tile_sizes` | One core at N = 128 and at N = 256, and two cores at N = 128, at 2 bpp and at a low rate, with rate checks. |

`tb_image_compressor` runs four cores at the default parameters for two rounds
of different tiles and budgets. It also counts how often each mechanism
happened, and fails if any count is zero. The mechanisms are:

- line-start and line-end border handling;
- dropped level-1 details;
- sign-magnitude normalization;
- refinement bits;
- new significant coefficients;
- D-set and G-set splits;
- MN3 skips;
- stopping on the budget;
- stopping after the last bit plane.

In each round, `tb_image_compressor` also checks the stored streams (read
back through `addr_enc`), `addr_byte` and `init_th`.

`tb_image_workload` codes a synthetic 512 x 512 image as 64 tiles, four at a
time. The image has gradients, discs, texture, sharp bars and noise, and it
is continuous across tile borders. Every tile's stored stream is compared
with the reference. The measured results are:

| Budget | Bit rate | Cycles for the whole image | Rate at 100 MHz |
|---|---|---|---|
| 26 bytes per tile (160:1) | 0.05 bpp | about 131,000 | about 200 Mpixel/s |
| 1024 bytes per tile (4:1) | 1.29 bpp | about 461,000 | about 57 Mpixel/s |

At 4:1 the average is only 1.29 bpp, because smooth tiles run out of bit
planes before they reach the budget. The testbench checks the 4:1 run
against 18.4 Mpixel/s.

Each testbench ends by printing `TB_RESULT checks=<n> failures=<n>` and has a
cycle watchdog.

### Running a testbench with Verilator

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    --top-module tb_image_compressor \
    rtl/spiht_pkg.sv tb/tb_ref_pkg.sv tb/tb_image_compressor.sv
./obj_dir/Vtb_image_compressor
```

Replace the top module and file name to run another testbench. Each one
finishes in seconds. The simulator is two-state: all state that is read is
reset, so random initial values are harmless (`+verilator+rand+reset+2`).

## Parameters and scaling

| Module | Parameter | Default | Notes |
|---|---|---|---|
| `image_compressor` | `NUM_CORES` | 4 | |
| `image_compressor`, `compressor_core` | `N` | 64 | Tile side. A power of two. |
| `image_compressor`, `compressor_core` | `LEVELS` | 4 | |

- **Tile size.** N must be at least 2^(LEVELS+1). The publication also
  evaluates 128 x 128 and 256 x 256 tiles, and two cores on 128 x 128 tiles.
  All of these are parameter changes, and `tb_tile_sizes` simulates them.
  Measured 2 bpp tile times at 100 MHz, compared with the publication's rates:

  | Configuration | Cycles per tile | Measured | Published |
  |---|---|---|---|
  | 128 x 128 | 101,834 | 16.1 Mpixel/s | 7.2 |
  | Two cores, 128 x 128 | 118,280 for both tiles | 27.7 Mpixel/s | 14.4 |
  | 256 x 256 | 448,740 | 14.6 Mpixel/s | 12 |

  N = 16 is used for the control-unit test.
- **Budget width.** The width of `desired_byte` grows with N as log2(N^2)+1.
- **Memory per core.** At N = 64 a core holds 57,024 memory bits:

  | Memory | Size |
  |---|---|
  | MEMb | 2048 x 16 |
  | MEMa | 1024 x 16 |
  | Dmax | 256 x 15 |
  | Gmax | 64 x 15 |
  | Markers | 1024 x 3 |

  All of them are simple dual-port arrays with registered reads, suitable for
  FPGA block RAM.

## Limitations

- **Real images.** The design has been checked against its own reference
  model on synthetic tiles, not against a decoder or real images. PSNR
  results have not been reproduced.
- **Lint warnings.** A few status outputs are left unconnected in their
  parents: the transform's level and direction, and the coder's pass and
  threshold. The second read port of the marker memory is also unused, and
  so are the coefficients' sign bits in the MDMC, which needs only
  magnitudes. Lint tools report all of these as unused signals.
- **Input pacing.** The pixel source must keep up with one pair per cycle
  during the first level. There is no back-pressure.
