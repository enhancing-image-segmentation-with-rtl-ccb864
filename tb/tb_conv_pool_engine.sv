// tb_conv_pool_engine: loads random 3x3 filters (as integer transformed
// filters 4*U) and biases into the CPE, streams a random multi-channel image
// with random idle gaps, and compares each pooled output with the maximum of
// a directly computed 3x3 convolution plus bias (times 4) over the 2x2
// window. Checks the 5-cycle latency from the completing slab, the number of
// outputs, and that every window position wins the max at least once.
module tb_conv_pool_engine;
  import wino_pkg::*;
  import tb_wino_pkg::*;

  localparam int MAX_C = 16, K = 16;
  localparam int C = 3, H = 10, W = 12;   // channels in use, image size
  localparam int TR = (H - 4) / 2 + 1, TC = W / 2 - 1;
  localparam int LAT = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  wload_t     wload;
  logic [4:0] cfg_channels;
  logic       in_valid = 0, in_row_start = 0;
  logic [3:0] in_ch = 0;
  data_t      in_slab [4][2];
  logic       out_valid;
  out_t       out_pool [K];

  conv_pool_engine #(.MAX_C(MAX_C), .K(K)) dut (.*);

  int     img  [C][H][W];
  g33_t   filt [K][C];
  longint bias [K];
  longint exp_pool [TR * TC][K];
  int     exp_cyc  [TR * TC];
  int     n_exp = 0, n_out = 0;
  int     wins [4];

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
          if (longint'(out_pool[k]) != exp_pool[n_out][k]) begin
            failures++;
            $display("out %0d filter %0d got %0d exp %0d", n_out, k, out_pool[k],
                     exp_pool[n_out][k]);
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

  // 4 x (3x3 convolution + bias) at output (y, x), filter k
  function automatic longint conv_ref(int k, int y, int x);
    longint s = 0;
    for (int c = 0; c < C; c++)
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) s += longint'(img[c][y + i][x + j]) * filt[k][c][i][j];
    return 4 * (s + bias[k]);
  endfunction

  initial begin
    wload = '0;
    cfg_channels = 5'(C);
    wins = '{0, 0, 0, 0};
    for (int c = 0; c < C; c++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[c][y][x] = srand(2000000);
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
    // expected pooled outputs in tile order
    for (int ty = 0; ty < TR; ty++)
      for (int tx = 0; tx < TC; tx++)
        for (int k = 0; k < K; k++) begin
          longint m;
          int     w;
          m = conv_ref(k, 2 * ty, 2 * tx);
          w = 0;
          for (int p = 1; p < 4; p++) begin
            longint v;
            v = conv_ref(k, 2 * ty + p / 2, 2 * tx + p % 2);
            if (v > m) begin m = v; w = p; end
          end
          exp_pool[ty * TC + tx][k] = m;
          wins[w]++;
        end
    for (int ty = 0; ty < TR; ty++)
      for (int s = 0; s < W / 2; s++)
        for (int c = 0; c < C; c++) begin
          if ($urandom_range(3) == 0) begin
            @(negedge clk);
            in_valid = 0;
          end
          @(negedge clk);
          in_valid     = 1;
          in_row_start = (s == 0);
          in_ch        = 4'(c);
          for (int r = 0; r < 4; r++)
            for (int j = 0; j < 2; j++) in_slab[r][j] = data_t'(img[c][2 * ty + r][2 * s + j]);
          if (s > 0 && c == C - 1) begin
            exp_cyc[n_exp] = cyc;
            n_exp++;
          end
        end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (n_out != TR * TC) begin
      failures++;
      $display("outputs %0d expected %0d", n_out, TR * TC);
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (wins[p] == 0) begin
        failures++;
        $display("window position %0d never the maximum", p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
