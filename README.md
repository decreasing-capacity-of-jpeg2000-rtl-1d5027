# ROI coding for a JPEG2000 encoder: S+P mask split and shift-up background

JPEG2000 lets an encoder give a *region of interest* (ROI) better quality than
the rest of the picture (the background). The usual way, Maxshift, scales every
ROI coefficient up above the largest background coefficient, so the words
leaving the ROI stage are about twice as wide as those entering it. Generic
scaling needs fewer extra bits (S of them), but finding S means buffering and
scanning a whole code block.

This RTL does the opposite: ROI coefficients pass unchanged, and every
background coefficient is shifted *down* by a user-chosen amount
(`maxshift_config_in`). The word width stays the same, 32 bits in and 32 bits
out, and the stage is one multiplexer and one register.

To know which wavelet coefficient is ROI and which is background, the pixel
mask of the tile must be carried into the wavelet domain. That is the larger
part of the design: a streaming, multi-level *S+P* mask split that produces the
mask of every subband, and a store that hands each quantized coefficient the
mask bit of its own subband and position.

```
 tile mask (1 bit/pixel)                               position (row, column, LEVEL)
        |                                                        |
   [mask buffer]                                            [roi_subband]  subband number
        |                                                        |
  [roi_generate]  level 0 -> level 1 -> ... -> level 4           |     quantized coefficient
   sp_mask_level x5, each: shifter -> 6-row RAM -> window        |            |
        | 3 detail bands per level + final LL band               |     [coefficient buffer]
        v                                                        v            v
  [roi_decode]  16 subband FIFOs (shifter + FIFO each) --> select by subband, tag
        |  {mask bit, coefficient}  (32 bits)
        v
  [shift_up_background]  ROI: unchanged; background: >>> maxshift_config_in
        |
   32-bit coefficient towards rate control / tier-1 coding
```

The colour transform, tiler, wavelet transform, quantizer, rate control and
the tier-1/tier-2 coders are not part of this RTL. `roi_top` has ports where
they connect.

## The S+P mask split

### The rule

A mask is split like the wavelet transform splits the image: first along each
row, then along each column. For one dimension, with X the mask and n the pair
index:

```
P(n) = X(2n) | X(2n+1)
H(n) = P(n)                      high band: the pair itself
L(n) = P(n-1) | P(n) | P(n+1)    low band: the pair and its neighbours
```

Pairs outside the tile count as 0. A low-band coefficient depends on six input
samples, 2n-2 to 2n+3, and a high-band coefficient on two. So in two
dimensions, for output position (m, n) of one level:

| output      | rows        | columns     | subband                   |
|-------------|-------------|-------------|---------------------------|
| `hm_hm_out` | 2m .. 2m+1  | 2n .. 2n+1  | diagonal (high/high)      |
| `hm_lm_out` | 2m-2 .. 2m+3 | 2n .. 2n+1 | horizontal high, right of LL |
| `lm_hm_out` | 2m .. 2m+1  | 2n-2 .. 2n+3 | vertical high, below LL  |
| `lm_lm_out` | 2m-2 .. 2m+3 | 2n-2 .. 2n+3 | low/low, fed to the next level |

Each output bit is the OR over that window. In the names, the first half is the
horizontal band (the row pass) and the second half is the vertical band (the
column pass). The next level splits the `lm_lm` mask again, just as the wavelet
transform re-splits its LL band. `roi_generate` chains `LEVELS` stages
(default 5), halving the width and height at each stage.

### One level in hardware (`sp_mask_level`)

Each output row pair m needs input rows 2m-2 to 2m+3, which is six rows. The
stage keeps exactly six rows in a RAM of `6 x W/32` words:

1. **Packing.** Incoming pixels go through `mask_shifter`, which packs 32 of
   them into a word (first pixel in the MSB). Whole words are written to the RAM
   slot `row mod 6`. Rows narrower than 32 pixels (deep levels) use one word of
   W bits.
2. **Window engine.** Once rows up to 2m+3 are in the RAM (or the tile's last
   row, at the bottom edge), the engine walks the row pair word column by word
   column. It reads the six rows of the next word column into a three-word
   window per row (previous, current and next word), which covers the two
   pixels on each side that the 6-wide low window reaches. Then it emits the 16
   output positions of the current word, one per cycle, each with all four band
   bits. Rows outside the tile are loaded as zeros. Output starts after the
   first four rows, because row pair 0 needs rows 0 to 3.
3. **Overwrite rule.** Input row r is written over the slot of row r-6. The
   last output row pair that needs row r-6 is m_last = (r-4)/2. A word of row r
   may be written only when pair m_last is finished, or is in progress and has
   already copied that word column into its window. Until then `ready_out` is
   low and the input stalls. At the end of a tile, the input also waits until
   the tile's last row pair has been emitted, and then all counters restart.

Cost and speed for one level W pixels wide: a row pair takes
`8 + 8*(NW-1) + 16*NW` engine cycles with NW = W/32, which is 96 cycles for
W = 128. The input takes 2W = 256 cycles for the same two rows. The input
therefore runs at one pixel per cycle, apart from short stalls from the
overwrite rule and the wait at the end of each tile. Each stage's output rate is
a quarter of its input rate.

## Subband numbers and the coefficient array

The wavelet transform is expected to report each coefficient's position in the
tile's coefficient array. That array has the deepest LL band in its top-left
corner, and for every level d (d = 1 is the finest) a band to the right of the
level-d low area, one below it and one diagonal to it. `roi_subband` numbers
the subbands as follows, with L = LEVEL+1:

```
0            deepest LL band
3(L-d) + 1   level d, right band      (horizontal high)  <- hm_lm of stage d-1
3(L-d) + 2   level d, lower band      (vertical high)    <- lm_hm of stage d-1
3(L-d) + 3   level d, diagonal band                      <- hm_hm of stage d-1
```

For 3 levels this gives 0 to 9 from the top-left corner outwards. With
5 levels there are 16 subbands, numbered 0 to 15. `level_in` must equal
`LEVELS-1`, and an assertion in `roi_top` checks this.

## Mask store and tagging (`roi_decode`)

The mask of a tile is ready long before, and in a different order from, the
coefficients of that tile. `roi_decode` therefore gives each subband its own
`mask_shifter` and `sync_fifo`:

- Each FIFO holds one whole subband plus one word. With a 128 x 128 tile that
  is 16384 mask bits in all. The mask can therefore run up to one tile ahead of
  the coefficients.
- A generator channel carries three bands at once. It is accepted only while
  all three FIFOs have two free words: one for a word still in the shifter,
  one for the word being filled.
- On the read side, each subband has a holding register with the word in use
  and a count of the bits left in it. The register refills from the FIFO when
  it runs empty.
- A coefficient is tagged when three things are present at once: its subband
  number, its value and a mask bit of that subband. The result is the registered
  32-bit word `{mask, coefficient[30:0]}`. If the mask bit is not there yet,
  `mask_wait` is high and both input channels are held.

**Ordering contract.** Within a subband, coefficients must arrive in raster
order of that subband. The subbands may be interleaved in any way, for example
band by band, or row by row across the whole coefficient array. The position
channel and the coefficient channel must carry the same coefficients in the
same order. They are joined by order, and the coefficient buffer absorbs the
quantizer's latency.

## Shift-up background (`shift_up_background`)

Input word: bit 31 is the ROI mask bit, and bits 30:0 are the quantized
coefficient in two's complement (bit 30 is its sign). Output, with c the
coefficient sign-extended to 32 bits:

- ROI (bit 31 = 1): c, unchanged.
- Background: `c >>> maxshift_config_in`, for shifts 0 to 31. A shift of 31
  leaves only sign bits.

The sign is always kept. A larger shift removes more of the background and
compresses it harder. The stage has one register with valid/ready.

## Top level `roi_top`

| parameter | default | meaning |
|---|---|---|
| `TILE_W`, `TILE_H` | 128 | tile size in pixels (powers of two, at least `2^(LEVELS+1)`) |
| `LEVELS` | 5 | wavelet decomposition levels (1 to 5) |
| `DW` | 32 | coefficient word width (mask bit + 31-bit coefficient) |
| `MBUF_DEPTH`, `QBUF_DEPTH` | 32 | depths of the mask input buffer and the coefficient buffer |

| port group | direction | meaning |
|---|---|---|
| `valid_mask_in`, `ready_mask_out`, `data_mask_in` | in/out/in | tile ROI mask, 1 bit per pixel, raster order, tiles back to back |
| `valid_pos_in`, `ready_pos_out`, `row_in`, `column_in`, `level_in` | in/out/in | position of each coefficient in the coefficient array |
| `valid_coef_in`, `ready_coef_out`, `coef_in[DW-2:0]` | in/out/in | quantized coefficients, same order as the positions |
| `maxshift_config_in[$clog2(DW)-1:0]` | in | background shift; change it only while the path is empty |
| `valid_out`, `ready_in`, `data_out[DW-1:0]` | out/in/out | shifted coefficients, same order as the input |
| `mask_wait` | out | a coefficient is waiting for its mask |

Every channel is valid/ready: a transfer happens on a clock edge where both
are high. Reset is asynchronous and active low.

Default size after synthesis: about 2500 word-level cells, 3800 flip-flop
bits and 19 kbit of memory. Most of the memory is the subband FIFOs, at one
tile of mask bits; the six-row RAMs add about 1.5 kbit.

## Files

| file | contents |
|---|---|
| `rtl/roi_pkg.sv` | shared constants, subband size and packing functions, `subband_t` |
| `rtl/mask_shifter.sv` | serial-to-word mask packer |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO |
| `rtl/sp_mask_level.sv` | one S+P level with its six-row RAM |
| `rtl/roi_generate.sv` | cascade of levels |
| `rtl/roi_subband.sv` | position to subband number |
| `rtl/roi_decode.sv` | subband mask FIFOs and coefficient tagging |
| `rtl/shift_up_background.sv` | background shift |
| `rtl/roi_top.sv` | the whole ROI path |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_roi_top_full` (defaults) and `tb_roi_image` (whole image) |
| `tb/sp_level_harness.sv` | stimulus and checker used three times by `tb_sp_mask_level` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
cycle watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/roi_pkg.sv tb/tb_roi_top.sv \
          --top-module tb_roi_top -Mdir obj_roi_top
./obj_roi_top/Vtb_roi_top
```

Replace `tb_roi_top` with any other testbench name. Verilator finds the
modules under `rtl/` and `tb/` through `-I`.

What the testbenches check. All expected values are computed inside the
testbench from the definitions above, never taken from the RTL.

- `tb_roi_top`: 32 x 32 tiles, 3 levels, three tiles.
  - Each tile mask has two regions of different shapes (a disc and a
    rectangle).
  - Positions come in two orders: band by band, deepest LL first, and row by
    row across the whole array. The shift differs from tile to tile.
  - Random gaps and random back-pressure.
  - Every output word is compared with one built from the mask windows and
    from integer division.
  - The test fails unless each of these happened at least once: coefficients
    waiting for their mask, mask input stalls, output back-pressure, ROI and
    background words, and every subband.
- `tb_roi_top_full`: the same test with every parameter at its default
  (128 x 128, 5 levels, 32 bits), two tiles. It runs in well under a second.
- `tb_roi_image`: the default configuration on a whole 2048 x 2048 image.
  - The image is sent as 256 tiles, in the order a tiler would send them.
  - The mask has several discs and rectangles that cross tile borders.
  - It checks all 4 194 304 coefficients and takes about 15 s.
  - Smaller images differ only in `IMG`.
- `tb_sp_mask_level`: three geometries (multi-word rows, one-word rows, and an
  8 x 8 deep-level band), with random gaps and back-pressure. It requires the
  overwrite stall to occur.
- `tb_roi_generate`: three levels, every band of every level compared.
- `tb_roi_decode`: shuffled subband order. The mask arrives late, so
  coefficients must wait for it.
- `tb_roi_subband`: compared with a map painted rectangle by rectangle. Also
  checks one result per cycle.
- `tb_mask_shifter`: the 16-pixel example `1110 1110 1111 0111` gives
  `16'hEEF7`. Random 32-bit words check the one-cycle latency.
- `tb_shift_up_background`: all 32 shift amounts, with both ROI and background
  words.
- `tb_sync_fifo`: a queue model, with a depth that is not a power of two.

## Where this design makes its own choices

These points are not fixed by the method. They are choices made for this
implementation:

- **Tile size.** It defaults to 128 x 128. The number is a parameter, and the
  storage scales with it: the RAMs with the width, the subband FIFOs with the
  area.
- **Edges.** The mask windows are clipped at the tile edge: pairs outside the
  tile count as 0, not mirrored.
- **Overwrite rule.** The RAM overwrite rule and the stall it causes are this
  design's own. So are the stall at the end of a tile, the holding registers,
  and the FIFO depths of one subband plus one word.
- **Mask bit.** The mask bit travels in bit 31 above a 31-bit coefficient.
  The shift stage therefore treats bit 30 as the sign. A coefficient that needs
  all 32 bits would need a wider `DW`.
- **Mask buffer position.** The mask buffer sits between the tiler and the
  mask generator. The tiler is outside this RTL, so the buffer that decouples
  the mask source is placed at the input of the ROI path. Putting it in front
  of the tiler instead would serve the same purpose.
- **Signalling.** All handshakes are valid/ready, and reset is asynchronous.
- **Joining the channels.** The position and coefficient channels are joined
  by order. Nothing checks that they describe the same coefficient.
- **Shift setting.** `maxshift_config_in` is a static setting. Words already
  inside the shift stage's register keep the shift they were given.

What is not here: the encoder stages around the ROI path, and any decoder-side
logic to undo the background shift. A decoder needs the mask, or the shift and
an ROI-detection rule, to rescale the background.
