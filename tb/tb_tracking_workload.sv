// tb_tracking_workload: the human-tracking use case at default sizes. A
// 64x128 binary depth slice (0 = background, 255 = inside the distance
// band) holding one person silhouette is cut into six 64x32 sliding windows
// at a stride of 19 columns, the windows are written back to back into the
// accelerator, and each result word is compared with the reference model.
// The testbench also measures the cycles from the first word to the last
// result and checks that six windows per frame at 30 frames per second need
// comfortably less than a 100 MHz clock; it reports the minimum clock.
module tb_tracking_workload;
  import mrcohog_pkg::*;
  import mrcohog_ref_pkg::*;
  localparam int NWIN = 6, STRIDE = 19, SW = 128;

  logic clk = 0, rst_n = 0;
  logic in_wr_en = 0, in_full, out_rd_en = 0, out_empty, busy;
  logic [31:0] in_wr_data = 0, out_rd_data;
  logic cfg_we = 0, cfg_sel = 0;
  logic [13:0] cfg_addr = 0;
  logic [15:0] cfg_data = 0;

  int checks = 0, failures = 0;
  int slice [H][SW];
  int wins [NWIN][H][W];
  int feat [NUM_WEAK];
  int lut [NUM_WEAK][32];
  logic [31:0] expw [NWIN];
  int cyc = 0, t_first, t_last, n_push = 0, best, best_win;

  comta_accel_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_ctrl.out_push) begin n_push++; t_last = cyc; end
  end

  function automatic logic [31:0] expected_word();
    int s;
    s = 0;
    compute_dirs(15);
    compute_hist();
    for (int t = 0; t < NUM_WEAK; t++) begin
      int c, b;
      c = hcount(feat[t]);
      if (c > 127) c = 127;
      b = c / 2;
      if (b > 31) b = 31;
      s += lut[t][b];
    end
    return {11'd0, s > 0, 20'(s)};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int keys [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Binary slice: person centred at column 70.
    for (int y = 0; y < H; y++)
      for (int x = 0; x < SW; x++) begin
        int hx, hy, by;
        hx = x - 70; hy = y - 10; by = y - 38;
        slice[y][x] = (hx * hx + hy * hy <= 36 || hx * hx * 4 + by * by <= 22 * 22) ? 255 : 0;
      end
    for (int n = 0; n < NWIN; n++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          wins[n][y][x] = slice[y][n * STRIDE + x];
    // Classifier tables built around the centred silhouette (window 3).
    img = wins[3]; compute_dirs(15); compute_hist();
    foreach (hist[k]) keys.push_back(k);
    for (int t = 0; t < NUM_WEAK; t++) begin
      feat[t] = keys[$urandom_range(keys.size() - 1)];
      @(negedge clk); cfg_we = 1; cfg_sel = 0; cfg_addr = 14'(t); cfg_data = 16'(feat[t]);
      for (int b = 0; b < 32; b++) begin
        lut[t][b] = (b == 0) ? -int'($urandom_range(4, 1)) : int'($urandom_range(60, 20));
        @(negedge clk); cfg_we = 1; cfg_sel = 1; cfg_addr = 14'(t * 32 + b); cfg_data = 16'(lut[t][b]);
      end
    end
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < NWIN; n++) begin img = wins[n]; expw[n] = expected_word(); end
    t_first = cyc;
    for (int n = 0; n < NWIN; n++)
      for (int i = 0; i < 512; i++) begin
        img = wins[n];
        @(negedge clk);
        in_wr_en = 1; in_wr_data = word_of(i);
        @(posedge clk);
        while (in_full) @(posedge clk);
      end
    @(negedge clk); in_wr_en = 0;
    wait (n_push == NWIN);
    best = -(1 << 30); best_win = -1;
    for (int n = 0; n < NWIN; n++) begin
      int sc;
      @(negedge clk);
      check(!out_empty, "result present");
      check(out_rd_data == expw[n], $sformatf("window %0d result %h exp %h", n, out_rd_data, expw[n]));
      sc = int'($signed(out_rd_data[19:0]));
      if (sc > best) begin best = sc; best_win = n; end
      out_rd_en = 1;
      @(negedge clk); out_rd_en = 0;
    end
    check(best_win == 3, $sformatf("highest score at the centred window (got %0d)", best_win));
    check(expw[3][20] == 1'b1, "centred window classified human");
    // One frame = six windows; 30 frames per second.
    $display("frame of %0d windows: %0d cycles, minimum clock for 30 fps: %0d kHz",
             NWIN, t_last - t_first, (t_last - t_first) * 30 / 1000);
    check((t_last - t_first) * 30 < 100_000_000, "30 fps at a 100 MHz clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
