// unet_wino_top: the three Winograd F(2x2,3x3) engines of the U-Net
// accelerator, side by side behind one filter-load bus.
//
//  - conv_pool_engine (CPE): encoder 3x3 convolution fused with 2x2 max
//    pooling; default 16 input channels, 16 filters.
//  - upsample_conv_engine (UCE): decoder 2x upsampling fused with the 3x3
//    convolution after it; default 16 input channels, 3 filters.
//  - skip_conv_engine: decoder 3x3 convolution of skip-connection data
//    delivered block by block by an encoder layer; 16 channels, 3 filters,
//    inputs up to 64x64.
//
// Each engine keeps its own streaming input and output ports; the layer
// sequencing (which layer runs on which engine, moving feature maps between
// layers, summing the two halves of a concatenated decoder layer) is left to
// the host and DMA that feed the accelerator. The load bus writes the
// transformed filter coefficients and biases into the filter bank of the
// engine named by wload_sel. Timing is that of the engines: one input beat
// per cycle each, results 5 (CPE, skip) or 4 (UCE) cycles after the beat
// that completes them.
module unet_wino_top
  import wino_pkg::*;
#(
  parameter  int CPE_C   = 16,
  parameter  int CPE_K   = 16,
  parameter  int UCE_C   = 16,
  parameter  int UCE_K   = 3,
  parameter  int SKIP_C  = 16,
  parameter  int SKIP_K  = 3,
  parameter  int SKIP_BW = 32,
  parameter  int SKIP_BH = 32,
  localparam int CPE_CW  = (CPE_C > 1)   ? $clog2(CPE_C)   : 1,
  localparam int UCE_CW  = (UCE_C > 1)   ? $clog2(UCE_C)   : 1,
  localparam int SKIP_CW = (SKIP_C > 1)  ? $clog2(SKIP_C)  : 1,
  localparam int SKIP_WW = (SKIP_BW > 1) ? $clog2(SKIP_BW) : 1,
  localparam int SKIP_HW = (SKIP_BH > 1) ? $clog2(SKIP_BH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // filter / bias load
  input  engine_e            wload_sel,
  input  wload_t             wload,
  // conv + pool engine
  input  logic [CPE_CW:0]    cpe_channels,
  input  logic               cpe_in_valid,
  input  logic               cpe_in_row_start,
  input  logic [CPE_CW-1:0]  cpe_in_ch,
  input  data_t              cpe_in_slab [4][2],
  output logic               cpe_out_valid,
  output out_t               cpe_out_pool [CPE_K],
  // upsample + conv engine
  input  logic [UCE_CW:0]    uce_channels,
  input  logic               uce_in_valid,
  input  logic               uce_in_row_start,
  input  logic [UCE_CW-1:0]  uce_in_ch,
  input  data_t              uce_in_col [2],
  output logic               uce_out_valid,
  output out_tile_t          uce_out_tile [UCE_K],
  // skip-connection conv engine
  input  logic [SKIP_CW:0]   skip_channels,
  input  logic               skip_in_valid,
  input  logic [SKIP_CW-1:0] skip_in_ch,
  input  logic [SKIP_HW-1:0] skip_in_brow,
  input  logic [SKIP_WW-1:0] skip_in_bcol,
  input  data_t              skip_in_blk [2][2],
  output logic               skip_out_valid,
  output logic [SKIP_HW-1:0] skip_out_trow,
  output logic [SKIP_WW-1:0] skip_out_tcol,
  output out_tile_t          skip_out_tile [SKIP_K]
);

  wload_t wl_cpe, wl_uce, wl_skip;

  always_comb begin
    wl_cpe     = wload;
    wl_uce     = wload;
    wl_skip    = wload;
    wl_cpe.en  = wload.en && (wload_sel == ENG_CPE);
    wl_uce.en  = wload.en && (wload_sel == ENG_UCE);
    wl_skip.en = wload.en && (wload_sel == ENG_SKIP);
  end

  conv_pool_engine #(.MAX_C(CPE_C), .K(CPE_K)) u_cpe (
    .clk, .rst_n, .wload(wl_cpe), .cfg_channels(cpe_channels),
    .in_valid(cpe_in_valid), .in_row_start(cpe_in_row_start), .in_ch(cpe_in_ch),
    .in_slab(cpe_in_slab), .out_valid(cpe_out_valid), .out_pool(cpe_out_pool)
  );

  upsample_conv_engine #(.MAX_C(UCE_C), .K(UCE_K)) u_uce (
    .clk, .rst_n, .wload(wl_uce), .cfg_channels(uce_channels),
    .in_valid(uce_in_valid), .in_row_start(uce_in_row_start), .in_ch(uce_in_ch),
    .in_col(uce_in_col), .out_valid(uce_out_valid), .out_tile(uce_out_tile)
  );

  skip_conv_engine #(.MAX_C(SKIP_C), .K(SKIP_K), .MAX_BW(SKIP_BW), .MAX_BH(SKIP_BH)) u_skip (
    .clk, .rst_n, .wload(wl_skip), .cfg_channels(skip_channels),
    .in_valid(skip_in_valid), .in_ch(skip_in_ch), .in_brow(skip_in_brow),
    .in_bcol(skip_in_bcol), .in_blk(skip_in_blk),
    .out_valid(skip_out_valid), .out_trow(skip_out_trow), .out_tcol(skip_out_tcol),
    .out_tile(skip_out_tile)
  );

endmodule
