// quadrant_transform: input transform of the skip-connection engine.
//
// A 2x2 block x is treated as four 4x4 input tiles, each holding x in one
// corner (top-left, top-right, bottom-left, bottom-right, see wino_pkg::quad_e)
// and zeros elsewhere. For such a tile every entry of d' = B^T d B is a
// single element of x, possibly negated: along one axis, B^T maps
// [x0 x1 0 0] to [x0 x1 -x1 x1] and [0 0 x0 x1] to [-x0 x0 x0 -x1]. So the
// four transforms need no adders, only sign reversal, which is what the
// document points out. The index/sign tables below are those two maps.
// Timing: registered, one cycle from in_valid to out_valid.
module quadrant_transform
  import wino_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  data_t    in_blk [2][2],   // [row][column]
  output logic     out_valid,
  output td_tile_t out_tile [4]     // indexed by quad_e
);

  // position of x along one axis: low half (rows/columns 0,1) or high half
  localparam logic [3:0] LO_IDX = 4'b1110;  // bit p: index into x for output p
  localparam logic [3:0] LO_NEG = 4'b0100;  // bit p: output p is negated
  localparam logic [3:0] HI_IDX = 4'b1000;
  localparam logic [3:0] HI_NEG = 4'b1001;

  td_tile_t q [4];

  always_comb begin
    for (int qi = 0; qi < 4; qi++) begin
      quad_e      qe;
      logic       row_hi, col_hi;
      logic [3:0] r_idx, r_neg, c_idx, c_neg;
      qe     = quad_e'(qi);
      row_hi = (qe == Q_BL) || (qe == Q_BR);
      col_hi = (qe == Q_TR) || (qe == Q_BR);
      r_idx  = row_hi ? HI_IDX : LO_IDX;
      r_neg  = row_hi ? HI_NEG : LO_NEG;
      c_idx  = col_hi ? HI_IDX : LO_IDX;
      c_neg  = col_hi ? HI_NEG : LO_NEG;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          td_t v;
          v = td_t'(in_blk[r_idx[r]][c_idx[c]]);
          q[qi][r][c] = (r_neg[r] ^ c_neg[c]) ? -v : v;
        end
    end
  end

  always_ff @(posedge clk) if (in_valid) out_tile <= q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
