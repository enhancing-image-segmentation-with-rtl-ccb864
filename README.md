# Winograd convolution engines for U-Net segmentation

A U-Net spends almost all of its time in 3x3 convolutions, and most of those
sit next to a layer that changes the map size: a 2x2 max pool after every
encoder convolution, a 2x nearest-neighbour upsampling before every decoder
convolution. This RTL implements three Winograd F(2x2,3x3) convolution
engines that each absorb the neighbouring layer into the convolution and
trim the additions of the Winograd transforms:

| engine | module | absorbs | input transform cost per tile and channel |
|---|---|---|---|
| Convolution Pooling Engine (CPE) | `conv_pool_engine` | 2x2 max pooling after the conv | 24 add/sub (32 for plain Winograd) |
| Upsampling Convolution Engine (UCE) | `upsample_conv_engine` | 2x upsampling before the conv | 9 add/sub (32 on upsampled data) |
| skip-connection engine | `skip_conv_engine` | the 4-row input buffer of a conv fed by an encoder layer | no adders, sign reversal only |

All three share the same back end: an element-wise multiplier (PE2), a
channel accumulator that has the bias folded into it, and the inverse
transform (PE3\*). The top, `unet_wino_top`, places the three engines side
by side behind one filter-load bus.

The structure of the three engines, the transform tricks and the
operation counts follow the published method these engines implement. The
streaming interfaces, the filter bank and load bus, the pipeline timing, the
number formats and the skip engine's partial-sum store are this design's
own choices; they are listed under "Departures and open points" below.

## The Winograd arithmetic

F(2x2,3x3) computes a 2x2 block of a 3x3 convolution (correlation, no filter
flip) from a 4x4 input tile `d`:

```
o = A^T [ (G g G^T) .* (B^T d B) ] A           (.* = element-wise)

B^T = [ 1  0 -1  0 ]     A^T = [ 1 1  1  0 ]     G = [ 1    0    0  ]
      [ 0  1  1  0 ]           [ 0 1 -1 -1 ]         [ 1/2  1/2  1/2]
      [ 0 -1  1  0 ]                                 [ 1/2 -1/2  1/2]
      [ 0  1  0 -1 ]                                 [ 0    0    1  ]
```

Tiles are taken with stride 2, so consecutive tiles overlap by two rows or
columns and the 2x2 outputs tile the output map. Over C input channels the
products are summed before the inverse transform, so one `B^T d B` per
channel and one `A^T . A` per filter are enough; the multiplications
(16 per tile, channel and filter) dominate.

The filter transform `U = G g G^T` is done offline: the engines store and use
U directly. Because of the halves in G, U is not an integer for integer g.
The testbenches load `4U = (2G) g (2G)^T`, which is an integer, and expect
four times the convolution; a fixed-point user instead chooses how many
fractional bits U carries.

## Shared back end

`wino_lane` is one filter's back end; each engine has one lane per filter,
all fed the same transformed input tile, so the input transform is done once
per tile and channel and shared by all K filters.

* **PE2** (`pe2_ewmul`): 16 multipliers, one register stage.
* **Accumulator** (`wino_accumulator`): sums the product tiles of all input
  channels. The bias trick: `o'11` appears with weight +1 in all four outputs
  of `A^T o' A`, so the accumulator starts the first channel from
  `bias` at row 1, column 1 and zero elsewhere. The four bias adders after
  the inverse transform disappear. The bias must be given in the scale of the
  products (times 4 with the testbench's integer filters).
* **PE3\*** (`pe3_inverse_transform`): `A^T o' A` as two add/sub stages,
  one register stage.
* **Filter bank** (`filter_bank`): U for every (channel, filter) and one bias
  per filter, written over the `wload` bus; read one channel (all filters) at
  a time, registered, so the coefficients line up with the one-cycle input
  transform.

`wino_pkg::wload_t` is one write: `en`, `is_bias`, `ch`, `k`, `idx`
(coefficient `row*4+col` of U) and `data` (the bias, or the coefficient in its
low 22 bits). At the top, `wload_sel` (`ENG_CPE`, `ENG_UCE`, `ENG_SKIP`)
picks the engine.

## CPE: stride-2 reuse and fused pooling

The input transform is separable: first `B^T` on every 4-pixel column
(4 add/subs per column, 16 per tile), then `B` along every row (16 per tile).
With stride-2 tiles along a row, columns 2 and 3 of one tile are columns 0
and 1 of the next, so their column-stage results are already known.
`cpe_input_transform` (PE1\*) keeps them per channel and computes only the two
new columns: 8 + 16 = 24 add/subs per tile instead of 32, except for the
first tile of a row.

This sets the input format: a **slab** is 4 rows x 2 columns of one channel.

```
for each tile row (input rows 2t .. 2t+3):
  for x = 0 .. W/2-1:                  slab = input columns 2x, 2x+1
    for c = 0 .. cfg_channels-1:       one slab per cycle (gaps allowed)
      in_row_start = (x == 0)          load-only slab: no tile yet
```

The reuse store has one entry per channel, which is what lets all channels
of one tile position pass before the engine moves right, the order the
channel accumulation needs.

A stride-2 2x2 output tile is exactly one window of a stride-2 2x2 max pool,
so `max_pool2x2` takes the maximum of each lane's tile and no pooling layer
or buffer exists. The CPE emits one pooled value per filter per tile.

Timing: the last-channel slab of tile x (x > 0) at cycle n gives
`out_valid` at cycle n+5 (PE1\*, PE2, accumulator, PE3\*, max). One slab per
cycle is accepted with no stall. The convolution has no padding: an HxW image
gives an (H/2-1) x (W/2-1) pooled map.

## UCE: upsampling that never happens

After 2x nearest-neighbour upsampling, every stride-2 4x4 tile is one 2x2
block `[[d00 d01],[d10 d11]]` of the original map with each pixel
duplicated. For such a tile the whole `B^T d B` collapses to four terms:

```
e = d00+d10   f = d00-d10   g = d01+d11   h = d01-d11

d' = [  f-h   f+h  -(f-h)   f-h ]
     [  e-g   e+g  -(e-g)   e-g ]
     [-(f-h) -(f+h)  f-h  -(f-h)]
     [  f-h   f+h  -(f-h)   f-h ]
```

So `uce_input_transform` reads the original map, one column of a row pair
(2 pixels) of one channel per cycle, and the upsampled map is never built:
no upsampling line buffer, and the convolution's line buffer holds
un-duplicated data. Consecutive tiles are one original column apart, so
(e, f) of a tile are (g, h) of the previous one and are stored per channel:
2 + 4 add/subs + 3 negations = 9 per tile (11 without the reuse).

Order: for each original row pair (i, i+1), i = 0..H-2, for each original
column j = 0..W-1, the channels; `in_row_start` at j = 0. The column at
j > 0 completes the output tile at upsampled rows 2i, 2i+1 and columns
2(j-1), 2(j-1)+1; `out_valid` follows 4 cycles after its last channel. The
output is the unpadded convolution of the 2H x 2W upsampled map:
(2H-2) x (2W-2).

## Skip-connection engine: no input rows buffered

A decoder convolution fed by an encoder Winograd layer receives its data
tile-wise: a 2x2 block of one channel, then the same block of the next
channel, and so on. A normal engine would have to buffer four full input
rows of all channels before its first 4x4 tile is complete, which is costly
when the encoder layer has many channels.

`skip_conv_engine` consumes each block as soon as it arrives. A block at
block position (r, c) is one corner of four 4x4 tiles: top-left of tile
(r, c), top-right of tile (r, c-1), bottom-left of tile (r-1, c) and
bottom-right of tile (r-1, c-1). Because the convolution is linear, a tile's
result is the sum of the convolutions of its four corners, each zero-padded
to 4x4. For a zero-padded corner every entry of `B^T d B` is a single block
pixel with a sign (`quadrant_transform`): along one axis `B^T` maps
`[x0 x1 0 0]` to `[x0 x1 -x1 x1]` and `[0 0 x0 x1]` to `[-x0 x0 x0 -x1]`.

Per filter there are four PE2 and four accumulators, one per corner: the
engine trades input storage for multipliers. When the last channel of a block
is in, the four corner sums are merged into transform-domain partial sums
(16 values per tile and filter) held for two tile rows:

```
ps[r  ][c  ] = bias@o'11 + TL      tile (r,c) starts
ps[r  ][c-1] += TR                 (c > 0)
ps[r-1][c  ] += BL                 (r > 0)
done        = ps[r-1][c-1] + BR    (r > 0, c > 0): tile complete -> PE3*
```

Tile (r-1, c-1) is complete exactly when block (r, c) has been merged, so
tiles leave in raster order, 5 cycles after the last channel of block
(r+1, c+1), tagged with `out_trow`/`out_tcol`. Blocks must come in raster
order with `in_brow`/`in_bcol` set; an HxW map gives the unpadded
(H-2) x (W-2) output. The store holds `2 x MAX_BW x K` tiles of 16
accumulators (default 32 blocks, i.e. maps up to 64 pixels wide).

This engine computes the skip-connection channels of a concatenated decoder
layer. The other half of that layer (the upsampled channels, on the UCE)
produces partial sums of the same output; adding the two is left to the
host.

## Operation counts

For one row of Th output tiles of a layer with C input channels and K
filters, the add/sub operations of the datapath are:

| | input transform | channel accumulation | inverse transform + bias |
|---|---|---|---|
| plain Winograd | 32C per tile | 16CK per tile | (24 + 4)K per tile |
| CPE | 8C per row + 24C per tile | 16CK per tile | 24K per tile |
| UCE | 2C per row + 9C per tile | 16CK per tile | 24K per tile |

The per-row terms are the load-only slab (CPE) or column (UCE) at the start
of each row. The bias costs nothing beyond the accumulator, which adds it to
one entry on the first channel. In the RTL these counts are structural: PE1\*
has 8 column-stage and 16 row-stage adders, the UCE transform 2 + 4 adders
and 3 negations, PE3\* 24 adders. The skip engine has no input-transform
adders but four times the multipliers and accumulators of a lane.

## Numbers and widths

Activations and coefficients are 22-bit signed. All arithmetic inside an
engine is exact, with widths set in `wino_pkg`:

| signal | width | why |
|---|---|---|
| `data_t` input pixel | 22 | fixed-point width of the design |
| `coef_t` U coefficient | 22 | same |
| `td_t` transformed input | 24 | sum of 4 pixels |
| `prod_t` product | 46 | 24 + 22 |
| `acc_t` accumulator, bias | 52 | exact for up to 64 channels |
| `out_t` output | 56 | sum of 9 accumulator values |

There is no rounding, saturation or rescaling to 22 bits at the outputs and
no activation function: where the binary point sits, and how a layer's
output is rescaled for the next layer, is left to the user.

## Top level

`unet_wino_top` defaults: CPE 16 input channels x 16 filters, UCE 16 x 3,
skip engine 16 x 3 with maps up to 64x64. Each engine's streams are top-level
ports (`cpe_*`, `uce_*`, `skip_*`), plus the shared `wload_sel`/`wload`. In
the system the engines serve a host processor and a DMA engine moves the
image patches; those are not part of this RTL. The layer sequencing (which
layer runs when, where feature maps are stored, `cfg_channels` per layer) is
the host's job.

Handshake: each engine takes one beat per cycle qualified by `in_valid` and
has no backpressure; outputs are a one-cycle `out_valid` pulse and must be
taken then. Reset (`rst_n`, active low, asynchronous) clears only the valid
bits. Filters must be loaded before use; each engine asserts that `in_ch`
is below `cfg_channels`.

## Simulation

Every block has a self-checking testbench in `tb/` that compares against
reference arithmetic written independently (matrix products and direct
convolution in `tb/tb_wino_pkg.sv`) and prints
`TB_RESULT checks=N failures=M`. With plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/wino_pkg.sv tb/tb_wino_pkg.sv tb/tb_unet_wino_top.sv \
    --top-module tb_unet_wino_top -o sim
./obj_dir/sim
```

Replace the testbench name for the others:

| testbench | covers |
|---|---|
| `tb_cpe_input_transform` | PE1\* reuse across a row, interleaved channels, extreme values |
| `tb_uce_input_transform` | UCE transform against B^T d B of the explicitly upsampled tile |
| `tb_quadrant_transform` | four corner transforms against zero-padded tiles |
| `tb_pe2_ewmul`, `tb_wino_accumulator`, `tb_pe3_inverse_transform`, `tb_max_pool2x2` | back-end stages, range corners, bias position |
| `tb_conv_pool_engine` | CPE vs direct conv + bias + max pool, 5-cycle latency |
| `tb_upsample_conv_engine` | UCE vs direct conv of the upsampled map, 4-cycle latency |
| `tb_skip_conv_engine` | skip engine vs direct conv, tile coordinates, 5-cycle latency |
| `tb_unet_wino_top` | all three engines at the default sizes, concurrently |

`tb_unet_wino_top` runs the top with no parameter changes: a 16-channel CPE
layer on a 12x16 image followed by a 1-channel, 16-filter layer (a channel-count
switch), a 16-channel UCE layer on a 6x8 map, and a 16-channel 64x64 map
through the skip engine, all at once. It counts row starts, reusing tiles,
which pooling position wins, left- and top-edge tiles of the skip engine and
filter writes per engine, and fails if any never happens. It takes about
10 s to build and run.

## Departures and open points

* No padding: all engines compute the unpadded ("valid") convolution.
  A padded layer needs the zero border in the input stream.
* No line buffers in front of the CPE and UCE: the caller delivers slabs and
  column pairs in the orders above.
* The filter transform G g G^T is done offline; U is loaded, not computed.
* The number of parallel filter lanes equals the filter count of the layer
  sizes the engines were dimensioned for (16 encoder, 3 decoder); a layer
  with more filters than lanes runs in several passes under host control.
* The skip engine's partial sums and the UCE's partial sums of a
  concatenated layer are not added in hardware.
* Only the reuse along a row is exploited; transform work shared between
  tile rows is recomputed, as in the method implemented.
* Weight pruning has no hardware support. A layer pruned of whole input
  channels or filters runs with a smaller `cfg_channels`, or with the unused
  lanes' outputs ignored.
* No activation, no output rescaling, no saturation (see "Numbers and
  widths").
* The FPGA results of the original work (resource use, latency, the host
  software) are not reproduced by this RTL; nothing here is tuned for a
  particular FPGA.
