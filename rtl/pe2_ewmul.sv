// pe2_ewmul (PE2): element-wise product of a transformed 4x4 input tile d'
// with a transformed 3x3 filter U = G g G^T (16 multiplies, one per
// coefficient). The filter transform is done offline; U arrives ready made.
// Two flags travel with the tile to mark the first and last input channel of
// an accumulation.
// Timing: registered, one cycle from in_* to out_*; one tile per cycle.
module pe2_ewmul
  import wino_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_first,
  input  logic       in_last,
  input  td_tile_t   in_tile,
  input  coef_tile_t in_coef,
  output logic       out_valid,
  output logic       out_first,
  output logic       out_last,
  output prod_tile_t out_prod
);

  always_ff @(posedge clk) begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        out_prod[r][c] <= prod_t'(in_tile[r][c]) * prod_t'(in_coef[r][c]);
    out_first <= in_first;
    out_last  <= in_last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
