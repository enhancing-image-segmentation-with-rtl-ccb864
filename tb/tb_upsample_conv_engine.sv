// tb_upsample_conv_engine: loads random filters and biases into the UCE,
// streams a random multi-channel map that has NOT been upsampled, and
// compares every output tile with a direct 3x3 convolution (plus bias, times
// 4) of the explicitly 2x nearest-neighbour upsampled map. Checks the 4-cycle
// latency and the output count; random idle gaps in the input.
module tb_upsample_conv_engine;
  import wino_pkg::*;
  import tb_wino_pkg::*;

  localparam int MAX_C = 16, K = 3;
  localparam int C = 5, HS = 5, WS = 6;     // original (not upsampled) size
  localparam int NT = (HS - 1) * (WS - 1);  // output tiles
  localparam int LAT = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  wload_t     wload;
  logic [4:0] cfg_channels;
  logic       in_valid = 0, in_row_start = 0;
  logic [3:0] in_ch = 0;
  data_t      in_col [2];
  logic       out_valid;
  out_tile_t  out_tile [K];

  upsample_conv_engine #(.MAX_C(MAX_C), .K(K)) dut (.*);

  int     img  [C][HS][WS];
  g33_t   filt [K][C];
  longint bias [K];
  longint exp_t  [NT][K][2][2];
  int     exp_cyc [NT];
  int     n_exp = 0, n_out = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (n_out >= n_exp) begin
        failures++;
        $display("unexpected output");
      end else begin
        if (cyc - exp_cyc[n_out] != LAT) begin
          failures++;
          $display("latency %0d", cyc - exp_cyc[n_out]);
        end
        for (int k = 0; k < K; k++)
          for (int r = 0; r < 2; r++)
            for (int c = 0; c < 2; c++)
              if (longint'(out_tile[k][r][c]) != exp_t[n_out][k][r][c]) begin
                failures++;
                $display("tile %0d f%0d [%0d][%0d] got %0d exp %0d", n_out, k, r, c,
                         out_tile[k][r][c], exp_t[n_out][k][r][c]);
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

  // 4 x (convolution + bias) at (y, x) of the upsampled map
  function automatic longint conv_up(int k, int y, int x);
    longint s = 0;
    for (int c = 0; c < C; c++)
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          s += longint'(img[c][(y + i) / 2][(x + j) / 2]) * filt[k][c][i][j];
    return 4 * (s + bias[k]);
  endfunction

  initial begin
    wload = '0;
    cfg_channels = 5'(C);
    for (int c = 0; c < C; c++)
      for (int y = 0; y < HS; y++)
        for (int x = 0; x < WS; x++) img[c][y][x] = srand(2000000);
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
    for (int i = 0; i < HS - 1; i++)
      for (int j = 1; j < WS; j++)
        for (int k = 0; k < K; k++)
          for (int r = 0; r < 2; r++)
            for (int c = 0; c < 2; c++)
              exp_t[i * (WS - 1) + j - 1][k][r][c] = conv_up(k, 2 * i + r, 2 * (j - 1) + c);
    for (int i = 0; i < HS - 1; i++)
      for (int j = 0; j < WS; j++)
        for (int c = 0; c < C; c++) begin
          if ($urandom_range(3) == 0) begin
            @(negedge clk);
            in_valid = 0;
          end
          @(negedge clk);
          in_valid     = 1;
          in_row_start = (j == 0);
          in_ch        = 4'(c);
          in_col[0]    = data_t'(img[c][i][j]);
          in_col[1]    = data_t'(img[c][i + 1][j]);
          if (j > 0 && c == C - 1) begin
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
