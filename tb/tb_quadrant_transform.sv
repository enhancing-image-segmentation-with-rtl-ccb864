// tb_quadrant_transform: feeds random and extreme 2x2 blocks to the corner
// transform and compares each of the four outputs with B^T d B (matrix
// products) of the zero-padded 4x4 tile holding the block in that corner.
// Checks the one-cycle latency.
module tb_quadrant_transform;
  import wino_pkg::*;
  import tb_wino_pkg::*;

  localparam int N = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     in_valid = 0;
  data_t    in_blk [2][2];
  logic     out_valid;
  td_tile_t out_tile [4];

  quadrant_transform dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x [2][2];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++) begin
          x[r][c] = (n < 20) ? (($urandom_range(1) != 0) ? 2097151 : -2097152)
                             : longint'(srand(2000000));
          in_blk[r][c] = data_t'(x[r][c]);
        end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("no output one cycle after input");
      end
      for (int q = 0; q < 4; q++) begin
        t44_t d, e;
        int   r0, c0;
        r0 = (q >= 2) ? 2 : 0;     // Q_BL, Q_BR: bottom rows
        c0 = (q % 2 == 1) ? 2 : 0; // Q_TR, Q_BR: right columns
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) d[r][c] = 0;
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++) d[r0 + r][c0 + c] = x[r][c];
        e = in_xform(d);
        checks++;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            if (longint'(out_tile[q][r][c]) != e[r][c]) begin
              failures++;
              $display("quadrant %0d [%0d][%0d] got %0d exp %0d", q, r, c,
                       out_tile[q][r][c], e[r][c]);
            end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
