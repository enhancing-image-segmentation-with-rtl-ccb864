// tb_unet_wino_top: end-to-end test of the accelerator top at its default
// parameters (16x16 CPE, 16x3 UCE, 16x3 skip engine with 32x32 blocks).
// Filters and biases for all three engines are loaded over the one shared
// load bus, then the three engines run at the same time:
//   - CPE: an encoder layer of 16 channels on a 12x16 image, then a second
//     single-channel layer with 16 filters (channel-count switch), conv +
//     2x2 max pooling;
//   - UCE: a decoder layer, 16 channels, 6x8 map upsampled to 12x16;
//   - skip engine: 16 channels on a full 64x64 map, block by block.
// Every output is checked against direct convolution (plus bias, times 4)
// computed here, with the latency of each engine. Mechanisms counted and
// required at least once: CPE row starts and column-reusing tiles, each
// pooling-window position winning, the channel-count switch, UCE row starts
// and reusing tiles, skip tiles at the left and top edges of the map, and
// filter writes to each engine.
module tb_unet_wino_top;
  import wino_pkg::*;
  import tb_wino_pkg::*;

  localparam int KC = 16, KU = 3, KS = 3, MAXC = 16;
  localparam int CH = 12, CW = 16;                 // CPE image
  localparam int UH = 6, UW = 8;                   // UCE map before upsampling
  localparam int SBH = 32, SBW = 32;               // skip map in 2x2 blocks
  localparam int C_TR = (CH - 4) / 2 + 1, C_TC = CW / 2 - 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  engine_e    wload_sel;
  wload_t     wload;
  logic [4:0] cpe_channels, uce_channels, skip_channels;
  logic       cpe_in_valid = 0, cpe_in_row_start = 0;
  logic [3:0] cpe_in_ch = 0;
  data_t      cpe_in_slab [4][2];
  logic       cpe_out_valid;
  out_t       cpe_out_pool [KC];
  logic       uce_in_valid = 0, uce_in_row_start = 0;
  logic [3:0] uce_in_ch = 0;
  data_t      uce_in_col [2];
  logic       uce_out_valid;
  out_tile_t  uce_out_tile [KU];
  logic       skip_in_valid = 0;
  logic [3:0] skip_in_ch = 0;
  logic [4:0] skip_in_brow = 0, skip_in_bcol = 0;
  data_t      skip_in_blk [2][2];
  logic       skip_out_valid;
  logic [4:0] skip_out_trow, skip_out_tcol;
  out_tile_t  skip_out_tile [KS];

  unet_wino_top dut (.*);

  // data, filters (g) and biases per engine
  int     cimg [MAXC][CH][CW];
  int     uimg [MAXC][UH][UW];
  int     simg [MAXC][2 * SBH][2 * SBW];
  g33_t   cf [KC][MAXC];
  g33_t   uf [KU][MAXC];
  g33_t   sf [KS][MAXC];
  longint cb [KC], ub [KU], sb [KS];
  int     cpe_c;       // channels of the CPE layer now running

  // mechanism counters
  int n_cpe_rowstart = 0, n_cpe_reuse = 0, n_cfg_switch = 0;
  int n_uce_rowstart = 0, n_uce_reuse = 0;
  int n_skip_left = 0, n_skip_top = 0, n_skip_tiles = 0;
  int n_wr [3] = '{0, 0, 0};
  int wins [4] = '{0, 0, 0, 0};

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint cconv(int k, int y, int x);
    longint s = 0;
    for (int c = 0; c < cpe_c; c++)
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) s += longint'(cimg[c][y + i][x + j]) * cf[k][c][i][j];
    return 4 * (s + cb[k]);
  endfunction

  function automatic longint uconv(int k, int y, int x);
    longint s = 0;
    for (int c = 0; c < MAXC; c++)
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          s += longint'(uimg[c][(y + i) / 2][(x + j) / 2]) * uf[k][c][i][j];
    return 4 * (s + ub[k]);
  endfunction

  function automatic longint sconv(int k, int y, int x);
    longint s = 0;
    for (int c = 0; c < MAXC; c++)
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) s += longint'(simg[c][y + i][x + j]) * sf[k][c][i][j];
    return 4 * (s + sb[k]);
  endfunction

  task automatic wr(input engine_e e, input logic is_bias, input int ch, input int k,
                    input int idx, input longint data);
    @(negedge clk);
    wload_sel = e;
    wload = '{en: 1'b1, is_bias: is_bias, ch: IDX_W'(ch), k: IDX_W'(k), idx: 4'(idx),
              data: acc_t'(data)};
    n_wr[int'(e)]++;
    @(negedge clk);
    wload.en = 1'b0;
  endtask

  task automatic load_filters(input engine_e e, input int nk, input int nc);
    for (int k = 0; k < nk; k++) begin
      longint b;
      b = (e == ENG_CPE) ? cb[k] : (e == ENG_UCE) ? ub[k] : sb[k];
      wr(e, 1'b1, 0, k, 0, 4 * b);
      for (int c = 0; c < nc; c++) begin
        t44_t u;
        u = (e == ENG_CPE) ? filt_xform(cf[k][c]) :
            (e == ENG_UCE) ? filt_xform(uf[k][c]) : filt_xform(sf[k][c]);
        for (int i = 0; i < 16; i++) wr(e, 1'b0, c, k, i, u[i / 4][i % 4]);
      end
    end
  endtask

  // ---------------- checkers ----------------
  int c_exp_cyc [$], u_exp_cyc [$], s_exp_cyc [$];
  int c_out = 0, u_out = 0, s_out = 0;

  always @(negedge clk) begin
    if (rst_n && cpe_out_valid) begin
      int ty, tx;
      ty = (c_out % (C_TR * C_TC)) / C_TC;
      tx = c_out % C_TC;
      checks++;
      if (c_exp_cyc.size() == 0) begin
        failures++;
        $display("CPE: unexpected output");
      end else if (cyc - c_exp_cyc.pop_front() != 5) begin
        failures++;
        $display("CPE: wrong latency");
      end
      for (int k = 0; k < KC; k++) begin
        longint m;
        int     w;
        m = cconv(k, 2 * ty, 2 * tx);
        w = 0;
        for (int p = 1; p < 4; p++) begin
          longint v;
          v = cconv(k, 2 * ty + p / 2, 2 * tx + p % 2);
          if (v > m) begin m = v; w = p; end
        end
        wins[w]++;
        if (longint'(cpe_out_pool[k]) != m) begin
          failures++;
          $display("CPE out %0d f%0d got %0d exp %0d", c_out, k, cpe_out_pool[k], m);
        end
      end
      c_out++;
    end
    if (rst_n && uce_out_valid) begin
      int i, j;
      i = u_out / (UW - 1);
      j = u_out % (UW - 1);
      checks++;
      if (u_exp_cyc.size() == 0) begin
        failures++;
        $display("UCE: unexpected output");
      end else if (cyc - u_exp_cyc.pop_front() != 4) begin
        failures++;
        $display("UCE: wrong latency");
      end
      for (int k = 0; k < KU; k++)
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++)
            if (longint'(uce_out_tile[k][r][c]) != uconv(k, 2 * i + r, 2 * j + c)) begin
              failures++;
              $display("UCE tile %0d mismatch", u_out);
            end
      u_out++;
    end
    if (rst_n && skip_out_valid) begin
      int tr, tc;
      tr = s_out / (SBW - 1);
      tc = s_out % (SBW - 1);
      checks++;
      if (s_exp_cyc.size() == 0) begin
        failures++;
        $display("skip: unexpected output");
      end else if (cyc - s_exp_cyc.pop_front() != 5) begin
        failures++;
        $display("skip: wrong latency");
      end
      if (int'(skip_out_trow) != tr || int'(skip_out_tcol) != tc) begin
        failures++;
        $display("skip: tile coordinates");
      end
      if (tc == 0) n_skip_left++;
      if (tr == 0) n_skip_top++;
      for (int k = 0; k < KS; k++)
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++)
            if (longint'(skip_out_tile[k][r][c]) != sconv(k, 2 * tr + r, 2 * tc + c)) begin
              failures++;
              $display("skip tile (%0d,%0d) mismatch", tr, tc);
            end
      s_out++;
      n_skip_tiles++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic run_cpe(input int nc);
    cpe_c = nc;
    cpe_channels = 5'(nc);
    for (int ty = 0; ty < C_TR; ty++)
      for (int s = 0; s < CW / 2; s++)
        for (int c = 0; c < nc; c++) begin
          @(negedge clk);
          cpe_in_valid     = 1;
          cpe_in_row_start = (s == 0);
          cpe_in_ch        = 4'(c);
          for (int r = 0; r < 4; r++)
            for (int j = 0; j < 2; j++)
              cpe_in_slab[r][j] = data_t'(cimg[c][2 * ty + r][2 * s + j]);
          if (s == 0 && c == 0) n_cpe_rowstart++;
          if (s > 0 && c == nc - 1) begin
            c_exp_cyc.push_back(cyc);
            n_cpe_reuse++;
          end
        end
    @(negedge clk);
    cpe_in_valid = 0;
    repeat (8) @(negedge clk);
  endtask

  task automatic run_uce();
    uce_channels = 5'(MAXC);
    for (int i = 0; i < UH - 1; i++)
      for (int j = 0; j < UW; j++)
        for (int c = 0; c < MAXC; c++) begin
          @(negedge clk);
          uce_in_valid     = 1;
          uce_in_row_start = (j == 0);
          uce_in_ch        = 4'(c);
          uce_in_col[0]    = data_t'(uimg[c][i][j]);
          uce_in_col[1]    = data_t'(uimg[c][i + 1][j]);
          if (j == 0 && c == 0) n_uce_rowstart++;
          if (j > 0 && c == MAXC - 1) begin
            u_exp_cyc.push_back(cyc);
            n_uce_reuse++;
          end
        end
    @(negedge clk);
    uce_in_valid = 0;
    repeat (8) @(negedge clk);
  endtask

  task automatic run_skip();
    skip_channels = 5'(MAXC);
    for (int br = 0; br < SBH; br++)
      for (int bc = 0; bc < SBW; bc++)
        for (int c = 0; c < MAXC; c++) begin
          @(negedge clk);
          skip_in_valid = 1;
          skip_in_ch    = 4'(c);
          skip_in_brow  = 5'(br);
          skip_in_bcol  = 5'(bc);
          for (int r = 0; r < 2; r++)
            for (int x = 0; x < 2; x++)
              skip_in_blk[r][x] = data_t'(simg[c][2 * br + r][2 * bc + x]);
          if (br > 0 && bc > 0 && c == MAXC - 1) s_exp_cyc.push_back(cyc);
        end
    @(negedge clk);
    skip_in_valid = 0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    wload = '0;
    wload_sel = ENG_CPE;
    cpe_channels = 5'd16;
    uce_channels = 5'd16;
    skip_channels = 5'd16;
    for (int c = 0; c < MAXC; c++) begin
      for (int y = 0; y < CH; y++)
        for (int x = 0; x < CW; x++) cimg[c][y][x] = srand(2000000);
      for (int y = 0; y < UH; y++)
        for (int x = 0; x < UW; x++) uimg[c][y][x] = srand(2000000);
      for (int y = 0; y < 2 * SBH; y++)
        for (int x = 0; x < 2 * SBW; x++) simg[c][y][x] = srand(2000000);
    end
    for (int k = 0; k < KC; k++) begin
      cb[k] = longint'(srand(100000000));
      for (int c = 0; c < MAXC; c++)
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) cf[k][c][i][j] = srand(100);
    end
    for (int k = 0; k < KU; k++) begin
      ub[k] = longint'(srand(100000000));
      sb[k] = longint'(srand(100000000));
      for (int c = 0; c < MAXC; c++)
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin
            uf[k][c][i][j] = srand(100);
            sf[k][c][i][j] = srand(100);
          end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_filters(ENG_CPE, KC, MAXC);
    load_filters(ENG_UCE, KU, MAXC);
    load_filters(ENG_SKIP, KS, MAXC);
    fork
      begin
        run_cpe(MAXC);
        run_cpe(1);          // second layer: 1 input channel, 16 filters
        n_cfg_switch++;
      end
      run_uce();
      run_skip();
    join
    checks++;
    if (c_out != 2 * C_TR * C_TC || u_out != (UH - 1) * (UW - 1) ||
        s_out != (SBH - 1) * (SBW - 1)) begin
      failures++;
      $display("output counts CPE %0d UCE %0d skip %0d", c_out, u_out, s_out);
    end
    $display("mechanisms: cpe_rowstart=%0d cpe_reuse_tiles=%0d cfg_switch=%0d uce_rowstart=%0d",
             n_cpe_rowstart, n_cpe_reuse, n_cfg_switch, n_uce_rowstart);
    $display("            uce_reuse_tiles=%0d skip_tiles=%0d skip_left=%0d skip_top=%0d",
             n_uce_reuse, n_skip_tiles, n_skip_left, n_skip_top);
    $display("            writes cpe/uce/skip=%0d/%0d/%0d pool_wins=%0d/%0d/%0d/%0d",
             n_wr[0], n_wr[1], n_wr[2], wins[0], wins[1], wins[2], wins[3]);
    begin
      int m [15];
      m = '{n_cpe_rowstart, n_cpe_reuse, n_cfg_switch, n_uce_rowstart, n_uce_reuse,
            n_skip_tiles, n_skip_left, n_skip_top, n_wr[0], n_wr[1], n_wr[2],
            wins[0], wins[1], wins[2], wins[3]};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin
          failures++;
          $display("mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
