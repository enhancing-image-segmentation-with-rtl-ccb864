// cpe_input_transform (PE1*): Winograd F(2x2,3x3) input transform d' = B^T d B
// for 4x4 input tiles taken with stride 2 along a row, reusing the work the
// two tiles share.
//
// The transform is done in two stages. The column stage applies B^T to each
// 4-pixel column (4 add/subs per column); the row stage combines the four
// column results of a tile (16 add/subs). Horizontally adjacent stride-2
// tiles share two columns, so the column stage of columns 2,3 of one tile is
// columns 0,1 of the next: it is kept per channel and not recomputed. A tile
// therefore costs 8 + 16 = 24 add/subs instead of 32, except the first tile
// of a row. This reuse follows the document; the streaming interface is this
// design's own.
//
// Interface: one "slab" (4 rows x 2 columns of one channel) per cycle.
// A slab with in_row_start set holds columns 0,1 of the first tile of a row:
// it only loads the reuse store and yields no tile. Every other slab holds the
// two new columns of the next tile and yields its d'. The reuse store holds
// one entry per channel, so the channels of one tile position may be
// interleaved freely.
// Timing: out_tile/out_ch are registered, valid one cycle after the slab.
module cpe_input_transform
  import wino_pkg::*;
#(
  parameter  int MAX_C = 16,  // channels the reuse store can hold
  localparam int CH_W  = (MAX_C > 1) ? $clog2(MAX_C) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_row_start,
  input  logic [CH_W-1:0] in_ch,
  input  data_t                    in_slab [4][2],   // [row][column]
  output logic                     out_valid,
  output logic [CH_W-1:0] out_ch,
  output td_tile_t                 out_tile
);

  // column-stage results of the two most recent columns, per channel
  col_t reuse_q [MAX_C][2][4];

  col_t     col_new [2][4];
  col_t     cols    [4][4];   // [tile column][row] after the column stage
  td_tile_t tile_d;

  always_comb begin
    // column stage on the two new columns: B^T applied to [d0 d1 d2 d3]
    for (int j = 0; j < 2; j++) begin
      col_new[j][0] = in_slab[0][j] - in_slab[2][j];
      col_new[j][1] = in_slab[1][j] + in_slab[2][j];
      col_new[j][2] = in_slab[2][j] - in_slab[1][j];
      col_new[j][3] = in_slab[1][j] - in_slab[3][j];
    end
    // tile columns 0,1 come from the reuse store, 2,3 are new
    for (int r = 0; r < 4; r++) begin
      cols[0][r] = reuse_q[in_ch][0][r];
      cols[1][r] = reuse_q[in_ch][1][r];
      cols[2][r] = col_new[0][r];
      cols[3][r] = col_new[1][r];
    end
    // row stage: the same B applied along each row
    for (int r = 0; r < 4; r++) begin
      tile_d[r][0] = td_t'(cols[0][r]) - td_t'(cols[2][r]);
      tile_d[r][1] = td_t'(cols[1][r]) + td_t'(cols[2][r]);
      tile_d[r][2] = td_t'(cols[2][r]) - td_t'(cols[1][r]);
      tile_d[r][3] = td_t'(cols[1][r]) - td_t'(cols[3][r]);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) reuse_q[in_ch] <= col_new;
    out_tile <= tile_d;
    out_ch   <= in_ch;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && !in_row_start;
  end

endmodule
