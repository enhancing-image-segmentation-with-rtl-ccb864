// wino_pkg: widths, types and the weight-load bus shared by the Winograd
// F(2x2,3x3) convolution engines (conv+pool, upsample+conv, skip-connection).
//
// Activations and transformed filter coefficients are 22-bit signed fixed
// point, the width of the fixed-point variant of the design. All arithmetic
// after the inputs is exact: every stage widens by the bits its adds can
// produce, so no rounding or saturation happens inside an engine. Where the
// binary point sits is up to the user (products carry the sum of the
// fractional bits of data and coefficients); the bias must be given in that
// product scale.
package wino_pkg;

  localparam int DATA_W = 22;            // activation width
  localparam int COEF_W = 22;            // transformed filter coefficient width
  localparam int COL_W  = DATA_W + 1;    // after one add/sub (first transform stage)
  localparam int TD_W   = DATA_W + 2;    // transformed input d' (sum of 4 terms)
  localparam int PROD_W = TD_W + COEF_W; // element-wise product
  localparam int ACC_W  = PROD_W + 6;    // channel accumulator: exact for up to 64 channels
  localparam int OUT_W  = ACC_W + 4;     // inverse transform output (sum of 9 terms)
  localparam int IDX_W  = 8;             // channel / filter index width on the load bus

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [COL_W-1:0]  col_t;
  typedef logic signed [TD_W-1:0]   td_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [OUT_W-1:0]  out_t;

  // 4x4 tiles in the transform domain, 2x2 tiles in the output domain,
  // indexed [row][column].
  typedef td_t   td_tile_t   [4][4];
  typedef coef_t coef_tile_t [4][4];
  typedef prod_t prod_tile_t [4][4];
  typedef acc_t  acc_tile_t  [4][4];
  typedef out_t  out_tile_t  [2][2];

  // Corner of a 4x4 input tile at which a 2x2 block sits (skip-connection
  // engine): top-left, top-right, bottom-left, bottom-right.
  typedef enum logic [1:0] {Q_TL = 2'd0, Q_TR = 2'd1, Q_BL = 2'd2, Q_BR = 2'd3} quad_e;

  // Engine addressed by a filter-bank write at the top level.
  typedef enum logic [1:0] {ENG_CPE = 2'd0, ENG_UCE = 2'd1, ENG_SKIP = 2'd2} engine_e;

  // One write into an engine's filter bank: either coefficient idx (row*4+col)
  // of the transformed filter U = G g G^T for (channel ch, filter k), or, when
  // is_bias is set, the bias of filter k (ch and idx ignored).
  typedef struct packed {
    logic             en;
    logic             is_bias;
    logic [IDX_W-1:0] ch;
    logic [IDX_W-1:0] k;
    logic [3:0]       idx;
    acc_t             data;
  } wload_t;

endpackage
