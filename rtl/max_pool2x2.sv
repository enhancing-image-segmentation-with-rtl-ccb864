// max_pool2x2: the maximum function at the end of the convolution pooling
// engine. A Winograd F(2x2,3x3) output tile is exactly one 2x2 pooling window
// (stride-2 tiles, stride-2 pooling), so the pooled value is the signed
// maximum of the tile's four outputs and no pooling layer or buffer is
// needed. Compared as a tree of three comparisons.
// Timing: registered, one cycle from in_valid to out_valid.
module max_pool2x2
  import wino_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  out_tile_t in_tile,
  output logic      out_valid,
  output out_t      out_max
);

  out_t top_max, bot_max;

  always_comb begin
    top_max = (in_tile[0][0] > in_tile[0][1]) ? in_tile[0][0] : in_tile[0][1];
    bot_max = (in_tile[1][0] > in_tile[1][1]) ? in_tile[1][0] : in_tile[1][1];
  end

  always_ff @(posedge clk) if (in_valid) out_max <= (top_max > bot_max) ? top_max : bot_max;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
