// tb_max_pool2x2: random signed 2x2 tiles (including ties and all-negative
// tiles); the output must be the largest of the four, one cycle later. Every
// position must win at least once.
module tb_max_pool2x2;
  import wino_pkg::*;
  import tb_wino_pkg::*;

  localparam int N = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      in_valid = 0;
  out_tile_t in_tile;
  logic      out_valid;
  out_t      out_max;

  max_pool2x2 dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v [4];
    int     wins [4];
    wins = '{0, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      longint m;
      int     w;
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        v[i] = longint'(srand(1000)) * ((n % 3 == 0) ? 1 : 100000000);
        if (n % 5 == 0) v[i] = -(v[i] < 0 ? -v[i] : v[i]) - 1;   // all negative
        in_tile[i / 2][i % 2] = out_t'(v[i]);
      end
      m = v[0];
      w = 0;
      for (int i = 1; i < 4; i++) if (v[i] > m) begin m = v[i]; w = i; end
      wins[w]++;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || longint'(out_max) != m) begin
        failures++;
        $display("got %0d exp %0d", out_max, m);
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (wins[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
