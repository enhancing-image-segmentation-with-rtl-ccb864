// tb_skip_conv_engine: loads random filters and biases, streams a random
// multi-channel map block by block (2x2 blocks in raster order, all channels
// of a block back to back, random idle gaps) and compares every output tile
// and its coordinates with a direct 3x3 convolution (plus bias, times 4) of
// the whole map. Checks the 5-cycle latency after the completing block and
// the number of tiles.
module tb_skip_conv_engine;
  import wino_pkg::*;
  import tb_wino_pkg::*;

  localparam int MAX_C = 16, K = 3, MAX_BW = 8, MAX_BH = 8;
  localparam int C = 4, BH = 4, BW = 6;          // channels, blocks used
  localparam int NT = (BH - 1) * (BW - 1);
  localparam int LAT = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  wload_t     wload;
  logic [4:0] cfg_channels;
  logic       in_valid = 0;
  logic [3:0] in_ch = 0;
  logic [2:0] in_brow = 0, in_bcol = 0;
  data_t      in_blk [2][2];
  logic       out_valid;
  logic [2:0] out_trow, out_tcol;
  out_tile_t  out_tile [K];

  skip_conv_engine #(.MAX_C(MAX_C), .K(K), .MAX_BW(MAX_BW), .MAX_BH(MAX_BH)) dut (.*);

  int     img  [C][2 * BH][2 * BW];
  g33_t   filt [K][C];
  longint bias [K];
  int     exp_cyc [NT];
  int     n_exp = 0, n_out = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint conv_ref(int k, int y, int x);
    longint s = 0;
    for (int c = 0; c < C; c++)
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) s += longint'(img[c][y + i][x + j]) * filt[k][c][i][j];
    return 4 * (s + bias[k]);
  endfunction

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int tr, tc;
      tr = n_out / (BW - 1);
      tc = n_out % (BW - 1);
      checks++;
      if (n_out >= n_exp) begin
        failures++;
        $display("unexpected output");
      end else begin
        if (cyc - exp_cyc[n_out] != LAT) begin
          failures++;
          $display("latency %0d", cyc - exp_cyc[n_out]);
        end
        if (int'(out_trow) != tr || int'(out_tcol) != tc) begin
          failures++;
          $display("tile %0d at (%0d,%0d) expected (%0d,%0d)", n_out, out_trow, out_tcol, tr, tc);
        end
        for (int k = 0; k < K; k++)
          for (int r = 0; r < 2; r++)
            for (int c = 0; c < 2; c++)
              if (longint'(out_tile[k][r][c]) != conv_ref(k, 2 * tr + r, 2 * tc + c)) begin
                failures++;
                $display("tile (%0d,%0d) f%0d [%0d][%0d] got %0d exp %0d", tr, tc, k, r, c,
                         out_tile[k][r][c], conv_ref(k, 2 * tr + r, 2 * tc + c));
              end
      end
      n_out++;
    end
  end

  task automatic wr(input logic is_bias, input int ch, input int k, input int idx,
                    input longint data);
    @(negedge clk);
    wload = '{en: 1'b1, is_bias: is_bias, ch: IDX_W'(ch), k: IDX_W'(k), idx: 4'(idx),
              data: acc_t'(data)};
    @(negedge clk);
    wload.en = 1'b0;
  endtask

  initial begin
    wload = '0;
    cfg_channels = 5'(C);
    for (int c = 0; c < C; c++)
      for (int y = 0; y < 2 * BH; y++)
        for (int x = 0; x < 2 * BW; x++) img[c][y][x] = srand(2000000);
    for (int k = 0; k < K; k++) begin
      bias[k] = longint'(srand(100000000));
      for (int c = 0; c < C; c++)
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) filt[k][c][i][j] = srand(100);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < K; k++) begin
      wr(1'b1, 0, k, 0, 4 * bias[k]);
      for (int c = 0; c < C; c++) begin
        t44_t u;
        u = filt_xform(filt[k][c]);
        for (int i = 0; i < 16; i++) wr(1'b0, c, k, i, u[i / 4][i % 4]);
      end
    end
    for (int br = 0; br < BH; br++)
      for (int bc = 0; bc < BW; bc++)
        for (int c = 0; c < C; c++) begin
          if ($urandom_range(3) == 0) begin
            @(negedge clk);
            in_valid = 0;
          end
          @(negedge clk);
          in_valid = 1;
          in_ch    = 4'(c);
          in_brow  = 3'(br);
          in_bcol  = 3'(bc);
          for (int r = 0; r < 2; r++)
            for (int x = 0; x < 2; x++) in_blk[r][x] = data_t'(img[c][2 * br + r][2 * bc + x]);
          if (br > 0 && bc > 0 && c == C - 1) begin
            exp_cyc[n_exp] = cyc;
            n_exp++;
          end
        end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (n_out != NT) begin
      failures++;
      $display("outputs %0d expected %0d", n_out, NT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
