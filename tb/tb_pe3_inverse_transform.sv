// tb_pe3_inverse_transform: random and extreme accumulator tiles through
// PE3*; each 2x2 result is compared with A^T o A computed by matrix products,
// one cycle after the input.
module tb_pe3_inverse_transform;
  import wino_pkg::*;
  import tb_wino_pkg::*;

  localparam int N = 300;
  localparam longint ACC_MAX = (64'sd1 <<< (ACC_W - 1)) - 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      in_valid = 0;
  acc_tile_t in_acc;
  logic      out_valid;
  out_tile_t out_tile;

  pe3_inverse_transform dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t44_t o;
    t22_t e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          o[r][c] = (n < 10) ? (($urandom_range(1) != 0) ? ACC_MAX : -ACC_MAX - 1)
                             : longint'(srand(1000000000)) * longint'(srand(100000));
          in_acc[r][c] = acc_t'(o[r][c]);
        end
      e = out_xform(o);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++) begin
          checks++;
          if (longint'(out_tile[r][c]) != e[r][c]) begin
            failures++;
            $display("[%0d][%0d] got %0d exp %0d", r, c, out_tile[r][c], e[r][c]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
