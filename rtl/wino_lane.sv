// wino_lane: the per-filter back end of a Winograd engine: element-wise
// multiply (PE2), channel accumulation with the bias folded in, and the
// inverse transform (PE3*). An engine has one lane per filter, all fed the
// same transformed input tile, so each input tile is transformed once and
// reused by every filter.
// Timing: out_valid three cycles after the in_last tile (PE2, accumulator and
// PE3* are one register stage each). One tile per cycle.
module wino_lane
  import wino_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_first,
  input  logic       in_last,
  input  td_tile_t   in_tile,
  input  coef_tile_t in_coef,
  input  acc_t       bias,
  output logic       out_valid,
  output out_tile_t  out_tile
);

  logic       p_valid, p_first, p_last, a_valid;
  prod_tile_t p_tile;
  acc_tile_t  a_tile;

  pe2_ewmul u_pe2 (
    .clk, .rst_n,
    .in_valid, .in_first, .in_last, .in_tile, .in_coef,
    .out_valid(p_valid), .out_first(p_first), .out_last(p_last), .out_prod(p_tile)
  );

  wino_accumulator u_acc (
    .clk, .rst_n,
    .in_valid(p_valid), .in_first(p_first), .in_last(p_last), .in_prod(p_tile), .bias,
    .out_valid(a_valid), .out_acc(a_tile)
  );

  pe3_inverse_transform u_pe3 (
    .clk, .rst_n,
    .in_valid(a_valid), .in_acc(a_tile),
    .out_valid, .out_tile
  );

endmodule
