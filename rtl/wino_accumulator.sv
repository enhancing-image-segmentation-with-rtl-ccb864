// wino_accumulator: sums the 4x4 element-wise products of all input channels
// into one transform-domain tile o'.
//
// The bias is folded into the accumulation: o'11 enters all four outputs of
// the inverse transform with weight +1, so starting the accumulation with the
// bias at row 1, column 1 (and zero elsewhere) adds it to every output with no
// separate bias adders. This follows the document.
//
// Interface: in_first marks the first channel of a tile (the accumulator
// restarts from the bias pattern), in_last the last one (out_valid pulses and
// out_acc holds the finished sum until the next in_first).
// Timing: registered; out_valid one cycle after the in_last product.
module wino_accumulator
  import wino_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_first,
  input  logic       in_last,
  input  prod_tile_t in_prod,
  input  acc_t       bias,
  output logic       out_valid,
  output acc_tile_t  out_acc
);

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          if (!in_first)           out_acc[r][c] <= out_acc[r][c] + acc_t'(in_prod[r][c]);
          else if (r == 1 && c == 1) out_acc[r][c] <= bias + acc_t'(in_prod[r][c]);
          else                     out_acc[r][c] <= acc_t'(in_prod[r][c]);
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && in_last;
  end

endmodule
