// skip_conv_engine: Winograd F(2x2,3x3) convolution of skip-connection data
// that arrives in the order an encoder Winograd layer produces it: one 2x2
// block of one channel at a time, all channels of a block before the next
// block.
//
// Instead of buffering four input rows until a 4x4 tile is complete, every
// block is consumed at once. It is one corner of four different 4x4 tiles
// (the tiles to its lower right, lower left, upper right and upper left), so
// it is transformed as four zero-padded tiles (quadrant_transform: sign
// reversal only), multiplied with the filters by four PE2 per filter, and
// summed over the channels (four accumulators per filter). When a block's
// last channel is in, its four contributions are added to the transform-
// domain partial sums of those four tiles, kept in a store of two tile rows;
// the tile above-left is then complete, goes through PE3* and leaves. The
// input data are never stored; the price is four times the multipliers. The
// corner decomposition and storing partial outputs follow the document; the
// partial-sum store, its two-row organisation, the bias placement and the
// interface are this design's own.
//
// Input order: blocks in raster order (block row br, block column bc, both
// from 0; block (br,bc) holds input pixels rows 2br..2br+1, columns
// 2bc..2bc+1), channels 0..cfg_channels-1 of a block in consecutive valid
// cycles. The output tile (tr,tc) covers output rows 2tr..2tr+1, columns
// 2tc..2tc+1 of the "valid" (unpadded) convolution; it leaves 5 cycles after
// the last channel of block (tr+1,tc+1), one 2x2 tile per filter.
module skip_conv_engine
  import wino_pkg::*;
#(
  parameter  int MAX_C  = 16,  // input channels
  parameter  int K      = 3,   // filters
  parameter  int MAX_BW = 32,  // blocks per row (input width / 2)
  parameter  int MAX_BH = 32,  // block rows (input height / 2)
  localparam int CH_W   = (MAX_C > 1)  ? $clog2(MAX_C)  : 1,
  localparam int BW_W   = (MAX_BW > 1) ? $clog2(MAX_BW) : 1,
  localparam int BH_W   = (MAX_BH > 1) ? $clog2(MAX_BH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  wload_t          wload,
  input  logic [CH_W:0]   cfg_channels,  // input channels in use, 1..MAX_C
  input  logic            in_valid,
  input  logic [CH_W-1:0] in_ch,
  input  logic [BH_W-1:0] in_brow,
  input  logic [BW_W-1:0] in_bcol,
  input  data_t           in_blk [2][2],
  output logic            out_valid,
  output logic [BH_W-1:0] out_trow,
  output logic [BW_W-1:0] out_tcol,
  output out_tile_t       out_tile [K]
);

  typedef struct packed {
    logic [BH_W-1:0] brow;
    logic [BW_W-1:0] bcol;
  } pos_t;

  // ---- stage 1: corner transforms and filter read ----
  logic       q_valid;
  td_tile_t   q_tile [4];
  coef_tile_t coef   [K];
  acc_t       bias   [K];
  logic [CH_W-1:0] ch1;   // channel, aligned with the transformed tiles
  pos_t       pos1, pos2, pos3;   // block position, down to the merge stage
  logic       q_first, q_last;

  quadrant_transform u_pe1 (
    .clk, .rst_n, .in_valid, .in_blk, .out_valid(q_valid), .out_tile(q_tile)
  );

  filter_bank #(.MAX_C(MAX_C), .K(K)) u_bank (
    .clk, .wload, .rd_ch(in_ch), .rd_coef(coef), .bias
  );

  always_ff @(posedge clk) begin
    ch1  <= in_ch;
    pos1 <= '{brow: in_brow, bcol: in_bcol};
    pos2 <= pos1;
    pos3 <= pos2;
  end

  assign q_first = (ch1 == '0);
  assign q_last  = ({1'b0, ch1} == cfg_channels - 1'b1);

  // ---- stages 2,3: multiply and accumulate over channels, per corner ----
  logic      a_valid [K][4];
  acc_tile_t a_tile  [K][4];

  for (genvar k = 0; k < K; k++) begin : g_filt
    for (genvar qi = 0; qi < 4; qi++) begin : g_quad
      logic       p_valid, p_first, p_last;
      prod_tile_t p_tile;
      pe2_ewmul u_pe2 (
        .clk, .rst_n,
        .in_valid(q_valid), .in_first(q_first), .in_last(q_last),
        .in_tile(q_tile[qi]), .in_coef(coef[k]),
        .out_valid(p_valid), .out_first(p_first), .out_last(p_last), .out_prod(p_tile)
      );
      wino_accumulator u_acc (
        .clk, .rst_n,
        .in_valid(p_valid), .in_first(p_first), .in_last(p_last), .in_prod(p_tile),
        .bias('0),
        .out_valid(a_valid[k][qi]), .out_acc(a_tile[k][qi])
      );
    end
  end

  // ---- stage 4: merge into the partial sums of the four tiles ----
  // ps[row parity][tile column][filter]: transform-domain partial sums of the
  // tiles of the current and the previous tile row.
  acc_tile_t ps [2][MAX_BW][K];
  logic      done_valid;
  acc_tile_t done_tile [K];
  logic [BH_W-1:0] done_trow;
  logic [BW_W-1:0] done_tcol;

  logic            m_valid, m_has_up, m_has_left, cur, prv;
  logic [BW_W-1:0] col, col_l;

  always_comb begin
    m_valid    = a_valid[0][0];
    m_has_up   = (pos3.brow != '0);
    m_has_left = (pos3.bcol != '0);
    cur        = pos3.brow[0];
    prv        = ~pos3.brow[0];
    col        = pos3.bcol;
    col_l      = pos3.bcol - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (m_valid) begin
      for (int k = 0; k < K; k++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            // tile to the lower right starts: bias at o'11, plus this corner
            ps[cur][col][k][r][c] <= ((r == 1 && c == 1) ? bias[k] : '0)
                                     + a_tile[k][Q_TL][r][c];
            if (m_has_left)
              ps[cur][col_l][k][r][c] <= ps[cur][col_l][k][r][c] + a_tile[k][Q_TR][r][c];
            if (m_has_up)
              ps[prv][col][k][r][c] <= ps[prv][col][k][r][c] + a_tile[k][Q_BL][r][c];
            // tile to the upper left receives its last corner and is complete
            done_tile[k][r][c] <= ps[prv][col_l][k][r][c] + a_tile[k][Q_BR][r][c];
          end
      done_trow <= pos3.brow - 1'b1;
      done_tcol <= col_l;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_valid <= 1'b0;
    else        done_valid <= m_valid && m_has_up && m_has_left;
  end

  // ---- stage 5: inverse transform ----
  logic p3_valid [K];
  for (genvar k = 0; k < K; k++) begin : g_pe3
    pe3_inverse_transform u_pe3 (
      .clk, .rst_n, .in_valid(done_valid), .in_acc(done_tile[k]),
      .out_valid(p3_valid[k]), .out_tile(out_tile[k])
    );
  end

  always_ff @(posedge clk) if (done_valid) begin
    out_trow <= done_trow;
    out_tcol <= done_tcol;
  end

  assign out_valid = p3_valid[0];

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> ({1'b0, in_ch} < cfg_channels))
    else $error("skip_conv_engine: channel index beyond cfg_channels");

endmodule
