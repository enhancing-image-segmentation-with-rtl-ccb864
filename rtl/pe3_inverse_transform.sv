// pe3_inverse_transform (PE3*): output transform o = A^T o' A of Winograd
// F(2x2,3x3), A = [[1,0],[1,1],[1,-1],[0,-1]]. Since the bias already sits in
// o'11, no bias adders follow it.
// Done in two stages of add/subs: m = A^T o' (2x4), then o = m A (2x2).
// Timing: registered, one cycle from in_valid to out_valid.
module pe3_inverse_transform
  import wino_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  acc_tile_t in_acc,
  output logic      out_valid,
  output out_tile_t out_tile
);

  out_t      m [2][4];
  out_tile_t o;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      m[0][c] = out_t'(in_acc[0][c]) + out_t'(in_acc[1][c]) + out_t'(in_acc[2][c]);
      m[1][c] = out_t'(in_acc[1][c]) - out_t'(in_acc[2][c]) - out_t'(in_acc[3][c]);
    end
    for (int r = 0; r < 2; r++) begin
      o[r][0] = m[r][0] + m[r][1] + m[r][2];
      o[r][1] = m[r][1] - m[r][2] - m[r][3];
    end
  end

  always_ff @(posedge clk) if (in_valid) out_tile <= o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
