// upsample_conv_engine (UCE): a 2x nearest-neighbour upsampling layer and the
// 3x3 convolution after it, merged into one Winograd F(2x2,3x3) engine that
// takes the map before upsampling.
//
// Each stride-2 4x4 tile of the upsampled map is one 2x2 block of the
// original map, duplicated, so the engine reads the original map directly
// (uce_input_transform, 9 add/subs per tile) and needs neither the
// upsampling line buffer nor the upsampled data. The back end (PE2,
// accumulator with bias, PE3*) is shared with the CPE. This merge follows the
// document; the filter bank, the interface and the timing are this design's
// own.
//
// Input order: for each original row pair (i,i+1), i = 0..H-2, for each
// original column j = 0..W-1, the columns of channels 0..cfg_channels-1, one
// per cycle; columns with j = 0 carry in_row_start. The last-channel column
// of each j > 0 completes the 2x2 output tile at upsampled rows 2i,2i+1 and
// columns 2(j-1),2(j-1)+1; out_valid pulses 4 cycles later with one tile per
// filter. Convolution is "valid" on the upsampled map: (2H-2) x (2W-2).
module upsample_conv_engine
  import wino_pkg::*;
#(
  parameter  int MAX_C = 16,  // input channels
  parameter  int K     = 3,   // filters
  localparam int CH_W  = (MAX_C > 1) ? $clog2(MAX_C) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  wload_t          wload,
  input  logic [CH_W:0]   cfg_channels,  // input channels in use, 1..MAX_C
  input  logic            in_valid,
  input  logic            in_row_start,
  input  logic [CH_W-1:0] in_ch,
  input  data_t           in_col [2],
  output logic            out_valid,
  output out_tile_t       out_tile [K]
);

  logic            t_valid;
  logic [CH_W-1:0] t_ch;
  td_tile_t        t_tile;
  coef_tile_t      coef [K];
  acc_t            bias [K];
  logic            t_first, t_last;
  logic            l_valid [K];

  uce_input_transform #(.MAX_C(MAX_C)) u_pe1 (
    .clk, .rst_n, .in_valid, .in_row_start, .in_ch, .in_col,
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
      .out_valid(l_valid[k]), .out_tile(out_tile[k])
    );
  end

  assign out_valid = l_valid[0];

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> ({1'b0, in_ch} < cfg_channels))
    else $error("upsample_conv_engine: channel index beyond cfg_channels");

endmodule
