// tb_cpe_input_transform: streams rows of stride-2 tiles for several
// interleaved channels through the PE1* input transform and compares every
// tile with B^T d B computed by matrix products from the full 4x4 input.
// Checks that row-start slabs yield no tile and that the tile arrives one
// cycle after its second slab.
module tb_cpe_input_transform;
  import wino_pkg::*;
  import tb_wino_pkg::*;

  localparam int C = 3, W = 12, ROWS = 4;   // W input columns per row

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           in_valid = 0, in_row_start = 0;
  logic [3:0]     in_ch = 0;
  data_t          in_slab [4][2];
  logic           out_valid;
  logic [3:0]     out_ch;
  td_tile_t       out_tile;

  cpe_input_transform #(.MAX_C(16)) dut (.*);

  longint img [C][4][W];
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

  // checker: the tile of slab n appears on the cycle after it
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (tiles >= n_exp) begin
          failures++;
          $display("unexpected tile");
        end else begin
          t44_t e;
          int   ech;
          e   = exp_t[tiles];
          ech = exp_ch[tiles];
          if (out_ch != 4'(ech)) failures++;
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++)
              if (longint'(out_tile[r][c]) != e[r][c]) begin
                failures++;
                $display("tile mismatch ch%0d [%0d][%0d] got %0d exp %0d",
                         ech, r, c, out_tile[r][c], e[r][c]);
              end
          tiles++;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int row = 0; row < ROWS; row++) begin
      // random data; the last row uses the extreme values of the data type
      for (int c = 0; c < C; c++)
        for (int r = 0; r < 4; r++)
          for (int x = 0; x < W; x++)
            img[c][r][x] = (row == ROWS - 1)
                           ? (($urandom_range(1) != 0) ? 2097151 : -2097152)
                           : longint'(srand(2000000));
      for (int s = 0; s < W / 2; s++)
        for (int c = 0; c < C; c++) begin
          @(negedge clk);
          in_valid     = 1;
          in_row_start = (s == 0);
          in_ch        = 4'(c);
          for (int r = 0; r < 4; r++)
            for (int j = 0; j < 2; j++) in_slab[r][j] = data_t'(img[c][r][2 * s + j]);
          if (s > 0) begin
            t44_t d;
            for (int r = 0; r < 4; r++)
              for (int j = 0; j < 4; j++) d[r][j] = img[c][r][2 * s - 2 + j];
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
    if (tiles != ROWS * (W / 2 - 1) * C || tiles != n_exp) begin
      failures++;
      $display("tile count %0d", tiles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
