// filter_bank: storage for the transformed filters U = G g G^T (16
// coefficients per input channel and filter) and one bias per filter of a
// Winograd engine. The filter transform is done offline, so the bank holds
// the transform-domain coefficients directly.
//
// Write side: the wload bus (wino_pkg::wload_t), one coefficient or bias per
// cycle, from the host. Read side: all K filters' 4x4 coefficients of one
// input channel at once, registered (valid one cycle after rd_ch), which
// lines them up with the one-cycle input transform. The bias is read
// combinationally. Contents are not reset; they must be loaded before use.
module filter_bank
  import wino_pkg::*;
#(
  parameter  int MAX_C = 16,  // input channels
  parameter  int K     = 16,  // filters (output channels)
  localparam int CH_W  = (MAX_C > 1) ? $clog2(MAX_C) : 1,
  localparam int K_W   = (K > 1) ? $clog2(K) : 1
) (
  input  logic            clk,
  input  wload_t          wload,
  input  logic [CH_W-1:0] rd_ch,
  output coef_tile_t      rd_coef [K],
  output acc_t            bias    [K]
);

  coef_tile_t mem    [MAX_C][K];
  acc_t       bias_q [K];

  always_ff @(posedge clk) begin
    if (wload.en && wload.k < IDX_W'(K)) begin
      if (wload.is_bias)
        bias_q[wload.k[K_W-1:0]] <= wload.data;
      else if (wload.ch < IDX_W'(MAX_C))
        mem[wload.ch[CH_W-1:0]][wload.k[K_W-1:0]][wload.idx[3:2]][wload.idx[1:0]]
          <= coef_t'(wload.data);
    end
    rd_coef <= mem[rd_ch];
  end

  assign bias = bias_q;

endmodule
