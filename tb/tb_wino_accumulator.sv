// tb_wino_accumulator: random groups of 1..16 product tiles, back to back,
// with a random bias; the finished sum must equal the plain sum of the
// products plus the bias at row 1, column 1 only, one cycle after the last
// product. Also checks that out_valid pulses once per group.
module tb_wino_accumulator;
  import wino_pkg::*;
  import tb_wino_pkg::*;

  localparam int GROUPS = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0, in_first = 0, in_last = 0;
  prod_tile_t in_prod;
  acc_t       bias;
  logic       out_valid;
  acc_tile_t  out_acc;

  wino_accumulator dut (.*);

  int pulses = 0;
  always @(posedge clk) if (rst_n && out_valid) pulses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum [4][4];
    longint b;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < GROUPS; g++) begin
      int n;
      n = (g < 2) ? 1 : int'($urandom_range(1, 16));
      b = longint'(srand(1000000000)) * 1000;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) sum[r][c] = 0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        in_valid = 1;
        in_first = (i == 0);
        in_last  = (i == n - 1);
        bias     = acc_t'(b);
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            longint p;
            p = longint'(srand(1000000000)) * longint'(srand(30000));
            in_prod[r][c] = prod_t'(p);
            sum[r][c] += p;
          end
        // a different bias after the first product must not matter
        if (i > 0) bias = acc_t'(b + 12345);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("no out_valid after group %0d", g);
      end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          longint e;
          e = sum[r][c] + ((r == 1 && c == 1) ? b : 0);
          checks++;
          if (longint'(out_acc[r][c]) != e) begin
            failures++;
            $display("group %0d [%0d][%0d] got %0d exp %0d", g, r, c, out_acc[r][c], e);
          end
        end
      // an idle cycle on odd groups, back to back otherwise
      if (g % 2 == 1) @(negedge clk);
    end
    repeat (2) @(negedge clk);
    checks++;
    if (pulses != GROUPS) begin
      failures++;
      $display("out_valid pulses %0d", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
