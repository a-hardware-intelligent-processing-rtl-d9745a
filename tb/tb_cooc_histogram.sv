// tb_cooc_histogram: writes random direction maps for the three resolutions
// through the gradient ports, loads a random feature table in which most
// entries are dimensions that actually occur, runs the vote scan and checks
// every weak classifier's count against the full reference histogram. The
// scan must take 2688 + 3 cycles. A second round checks that clear removes
// the maps of the first.
module tb_cooc_histogram;
  import mrcohog_pkg::*;
  import mrcohog_ref_pkg::*;
  localparam int NW = 500;
  logic clk = 0, rst_n = 0, clear = 0, vote_start = 0, vote_done;
  grad_t g0, g1, g2;
  logic [CNT_W-1:0] counts [NW];
  logic cfg_we = 0;
  logic [8:0] cfg_addr = 0;
  logic [FEAT_W-1:0] cfg_feat = 0;
  int checks = 0, failures = 0;
  int feat [NW];
  int nonzero, cyc, t0;

  cooc_histogram #(.NW(NW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic grad_t mk(int x, int y, int d);
    grad_t v;
    v.valid = 1; v.x = X_W'(x); v.y = Y_W'(y);
    v.d.valid = (d >= 0); v.d.dir = 3'(d < 0 ? 0 : d);
    return v;
  endfunction

  task automatic round(input int pct_none);
    int keys [$];
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int r = 0; r < 3; r++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          dmap[r][y][x] = (y < res_h(r) && x < res_w(r) && $urandom_range(99) >= pct_none)
                          ? int'($urandom_range(7)) : -1;
    // Leave one res-0 pixel unwritten: it must read as "no direction".
    dmap[0][5][5] = -1;
    compute_hist();
    // Write the maps, the three resolutions in parallel.
    for (int i = 0; i < H * W; i++) begin
      int x, y;
      x = i % W; y = i / W;
      @(negedge clk);
      g0 = (x == 5 && y == 5) ? '0 : mk(x, y, dmap[0][y][x]);
      g1 = (i < (H/2) * (W/2)) ? mk(i % (W/2), i / (W/2), dmap[1][i / (W/2)][i % (W/2)]) : '0;
      g2 = (i < (H/4) * (W/4)) ? mk(i % (W/4), i / (W/4), dmap[2][i / (W/4)][i % (W/4)]) : '0;
    end
    @(negedge clk); g0 = '0; g1 = '0; g2 = '0;
    // Feature table.
    foreach (hist[k]) keys.push_back(k);
    for (int t = 0; t < NW; t++) begin
      feat[t] = ($urandom_range(9) < 7 && keys.size() > 0) ? keys[$urandom_range(keys.size() - 1)]
                                                           : int'($urandom_range(32767));
      @(negedge clk); cfg_we = 1; cfg_addr = 9'(t); cfg_feat = FEAT_W'(feat[t]);
    end
    @(negedge clk); cfg_we = 0;
    vote_start = 1; @(posedge clk); t0 = cyc; @(negedge clk); vote_start = 0;
    @(posedge clk iff vote_done);
    check(cyc - t0 == 2691, $sformatf("vote latency %0d", cyc - t0));
    nonzero = 0;
    for (int t = 0; t < NW; t++) begin
      int e;
      e = hcount(feat[t]);
      if (e > 127) e = 127;
      if (e > 0) nonzero++;
      check(int'(counts[t]) == e, $sformatf("count %0d feat %0h: got %0d exp %0d", t, feat[t], counts[t], e));
    end
    check(nonzero > NW / 2, "enough non-zero counts");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g0 = '0; g1 = '0; g2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    round(30);
    round(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
