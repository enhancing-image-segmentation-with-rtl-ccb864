// tb_uce_input_transform: streams original (not upsampled) row pairs of
// several interleaved channels through the UCE input transform. Each output
// is compared with B^T d B of the explicitly upsampled 4x4 tile, computed by
// matrix products. Checks that row-start columns yield no tile and the
// one-cycle latency.
module tb_uce_input_transform;
  import wino_pkg::*;
  import tb_wino_pkg::*;

  localparam int C = 3, W = 10, ROWS = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0, in_row_start = 0;
  logic [3:0] in_ch = 0;
  data_t      in_col [2];
  logic       out_valid;
  logic [3:0] out_ch;
  td_tile_t   out_tile;

  uce_input_transform #(.MAX_C(16)) dut (.*);

  longint img [C][2][W];
  t44_t   exp_t  [1024];
  int     exp_ch [1024];
  int     n_exp = 0, tiles = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (tiles >= n_exp) begin
        failures++;
        $display("unexpected tile");
      end else begin
        if (out_ch != 4'(exp_ch[tiles])) failures++;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            if (longint'(out_tile[r][c]) != exp_t[tiles][r][c]) begin
              failures++;
              $display("tile %0d mismatch [%0d][%0d] got %0d exp %0d",
                       tiles, r, c, out_tile[r][c], exp_t[tiles][r][c]);
            end
        tiles++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int row = 0; row < ROWS; row++) begin
      for (int c = 0; c < C; c++)
        for (int r = 0; r < 2; r++)
          for (int x = 0; x < W; x++)
            img[c][r][x] = (row == ROWS - 1)
                           ? (($urandom_range(1) != 0) ? 2097151 : -2097152)
                           : longint'(srand(2000000));
      for (int x = 0; x < W; x++)
        for (int c = 0; c < C; c++) begin
          @(negedge clk);
          in_valid     = 1;
          in_row_start = (x == 0);
          in_ch        = 4'(c);
          in_col[0]    = data_t'(img[c][0][x]);
          in_col[1]    = data_t'(img[c][1][x]);
          if (x > 0) begin
            t44_t d;   // nearest-neighbour upsampled 4x4 tile
            for (int r = 0; r < 4; r++)
              for (int j = 0; j < 4; j++) d[r][j] = img[c][r / 2][x - 1 + j / 2];
            exp_t[n_exp]  = in_xform(d);
            exp_ch[n_exp] = c;
            n_exp++;
          end
        end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (tiles != ROWS * (W - 1) * C || tiles != n_exp) begin
      failures++;
      $display("tile count %0d", tiles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
