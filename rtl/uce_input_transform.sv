// uce_input_transform: input transform of the upsampling convolution engine.
//
// A 3x3 convolution that follows a 2x nearest-neighbour upsampling sees 4x4
// tiles (taken with stride 2) that are each one 2x2 block of the original
// map, duplicated. For such a tile d' = B^T d B collapses to four values:
//   e = d00+d10, f = d00-d10, g = d01+d11, h = d01-d11
//   d' rows: [f-h  f+h  h-f  f-h]
//            [e-g  e+g  g-e  e-g]
//            [h-f -f-h  f-h  h-f]
//            [f-h  f+h  h-f  f-h]
// so the upsampled data never has to exist. Consecutive tiles along a row are
// one original pixel apart, so (e,f) of a tile equal (g,h) of the previous one
// and are kept per channel: 9 add/subs per tile (2 for g,h, 4 for the
// differences and sums, 3 negations) instead of 11. This follows the
// document; the streaming interface is this design's own.
//
// Interface: one original column (2 pixels of rows i,i+1) of one channel per
// cycle. A column with in_row_start set is the first column of a row: it only
// loads the reuse store. Every other column completes a tile.
// Timing: out_tile/out_ch are registered, valid one cycle after the column.
module uce_input_transform
  import wino_pkg::*;
#(
  parameter  int MAX_C = 16,  // channels the reuse store can hold
  localparam int CH_W  = (MAX_C > 1) ? $clog2(MAX_C) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            in_row_start,
  input  logic [CH_W-1:0] in_ch,
  input  data_t           in_col [2],   // [0] = row i, [1] = row i+1
  output logic            out_valid,
  output logic [CH_W-1:0] out_ch,
  output td_tile_t        out_tile
);

  // (sum, difference) of the previous column, per channel
  col_t reuse_q [MAX_C][2];

  col_t     e, f, g, h;
  td_t      f_m_h, f_p_h, e_m_g, e_p_g;
  td_tile_t tile_d;

  always_comb begin
    e = reuse_q[in_ch][0];
    f = reuse_q[in_ch][1];
    g = in_col[0] + in_col[1];
    h = in_col[0] - in_col[1];
    f_m_h = td_t'(f) - td_t'(h);
    f_p_h = td_t'(f) + td_t'(h);
    e_m_g = td_t'(e) - td_t'(g);
    e_p_g = td_t'(e) + td_t'(g);
    tile_d[0] = '{ f_m_h,  f_p_h, -f_m_h,  f_m_h};
    tile_d[1] = '{ e_m_g,  e_p_g, -e_m_g,  e_m_g};
    tile_d[2] = '{-f_m_h, -f_p_h,  f_m_h, -f_m_h};
    tile_d[3] = '{ f_m_h,  f_p_h, -f_m_h,  f_m_h};
  end

  always_ff @(posedge clk) begin
    if (in_valid) reuse_q[in_ch] <= '{g, h};
    out_tile <= tile_d;
    out_ch   <= in_ch;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && !in_row_start;
  end

endmodule
