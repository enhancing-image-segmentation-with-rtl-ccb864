// conv_pool_engine (CPE): 3x3 convolution by Winograd F(2x2,3x3) fused with
// the 2x2 max pooling that follows it in a U-Net encoder.
//
// Data flow: PE1* (cpe_input_transform, stride-2 input transform that reuses
// the column stage shared with the previous tile) -> K lanes of PE2
// (element-wise multiply with the filter bank's transformed filters) ->
// accumulator (starts at the bias, sums all input channels) -> PE3* (inverse
// transform) -> maximum of the 2x2 output tile. The input transform is done
// once per tile and channel and shared by all K filters. This structure is the
// document's; the filter bank, the interface and the pipeline timing are this
// design's own.
//
// Input order: for each tile row (4 input rows, stepping 2 rows), for each
// slab position x = 0..W/2-1 (2 input columns), the slabs of channels
// 0..cfg_channels-1, one per cycle. Slabs with x = 0 carry in_row_start.
// Each slab of the last channel with x > 0 completes a tile: 5 cycles later
// out_valid pulses with one pooled value per filter.
// Convolution is "valid" (no padding); the pooled map is (H/2-1) x (W/2-1).
module conv_pool_engine
  import wino_pkg::*;
#(
  parameter  int MAX_C = 16,  // input channels
  parameter  int K     = 16,  // filters
  localparam int CH_W  = (MAX_C > 1) ? $clog2(MAX_C) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  wload_t          wload,
  input  logic [CH_W:0]   cfg_channels,  // input channels in use, 1..MAX_C
  input  logic            in_valid,
  input  logic            in_row_start,
  input  logic [CH_W-1:0] in_ch,
  input  data_t           in_slab [4][2],
  output logic            out_valid,
  output out_t            out_pool [K]
);

  logic            t_valid;
  logic [CH_W-1:0] t_ch;
  td_tile_t        t_tile;
  coef_tile_t      coef [K];
  acc_t            bias [K];
  logic            t_first, t_last;
  logic            l_valid [K];
  out_tile_t       l_tile  [K];
  logic            m_valid [K];

  cpe_input_transform #(.MAX_C(MAX_C)) u_pe1 (
    .clk, .rst_n, .in_valid, .in_row_start, .in_ch, .in_slab,
    .out_valid(t_valid), .out_ch(t_ch), .out_tile(t_tile)
  );

  filter_bank #(.MAX_C(MAX_C), .K(K)) u_bank (
    .clk, .wload, .rd_ch(in_ch), .rd_coef(coef), .bias
  );

  assign t_first = (t_ch == '0);
  assign t_last  = ({1'b0, t_ch} == cfg_channels - 1'b1);

  for (genvar k = 0; k < K; k++) begin : g_lane
    wino_lane u_lane (
      .clk, .rst_n,
      .in_valid(t_valid), .in_first(t_first), .in_last(t_last),
      .in_tile(t_tile), .in_coef(coef[k]), .bias(bias[k]),
      .out_valid(l_valid[k]), .out_tile(l_tile[k])
    );
    max_pool2x2 u_max (
      .clk, .rst_n, .in_valid(l_valid[k]), .in_tile(l_tile[k]),
      .out_valid(m_valid[k]), .out_max(out_pool[k])
    );
  end

  assign out_valid = m_valid[0];

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> ({1'b0, in_ch} < cfg_channels))
    else $error("conv_pool_engine: channel index beyond cfg_channels");

endmodule
