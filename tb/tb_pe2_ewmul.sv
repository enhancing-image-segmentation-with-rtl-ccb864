// tb_pe2_ewmul: random and extreme tiles and coefficients through PE2; every
// product and the pass-through flags are checked one cycle later.
module tb_pe2_ewmul;
  import wino_pkg::*;
  import tb_wino_pkg::*;

  localparam int N = 300;
  localparam longint TD_MAX = (64'sd1 <<< (TD_W - 1)) - 1;
  localparam longint CF_MAX = (64'sd1 <<< (COEF_W - 1)) - 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0, in_first = 0, in_last = 0;
  td_tile_t   in_tile;
  coef_tile_t in_coef;
  logic       out_valid, out_first, out_last;
  prod_tile_t out_prod;

  pe2_ewmul dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a [4][4], b [4][4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          if (n < 4) begin   // corners of the value range
            a[r][c] = (n[0]) ? TD_MAX : -TD_MAX - 1;
            b[r][c] = (n[1]) ? CF_MAX : -CF_MAX - 1;
          end else begin
            a[r][c] = longint'(srand(8000000));
            b[r][c] = longint'(srand(2000000));
          end
          in_tile[r][c] = td_t'(a[r][c]);
          in_coef[r][c] = coef_t'(b[r][c]);
        end
      in_valid = 1;
      in_first = n[0];
      in_last  = n[1];
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_first != n[0] || out_last != n[1]) begin
        failures++;
        $display("valid/flags wrong at %0d", n);
      end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (longint'(out_prod[r][c]) != a[r][c] * b[r][c]) begin
            failures++;
            $display("product [%0d][%0d] got %0d exp %0d", r, c, out_prod[r][c],
                     a[r][c] * b[r][c]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
