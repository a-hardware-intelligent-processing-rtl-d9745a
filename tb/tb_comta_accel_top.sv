// tb_comta_accel_top: end-to-end test of the accelerator. It loads a
// feature table and weak-classifier LUT, sends eight ROIs (person-like
// silhouettes, rectangles and flat noisy patches) through the input FIFO and
// compares every result word with the reference model (decimation, $atan2
// directions, full co-occurrence histogram, LUT sum). FIFO_DEPTH is reduced
// to 4 so that both FIFOs fill: the CPU side keeps writing while the
// input FIFO is full, pauses so that the pixel stream runs dry, and reads
// results late so that the result write stalls. Each of these mechanisms,
// plus rejected weak gradients, cross-resolution votes and both decisions,
// is counted and must occur. The latency from scan start to result push is
// checked for ROIs whose load did not stall.
module tb_comta_accel_top;
  import mrcohog_pkg::*;
  import mrcohog_ref_pkg::*;
  localparam int NW = 500;
  localparam int NROI = 8;
  localparam int FD = 4;
  localparam int LAT = 5248;   // scan start to push: 2048 load + 4 flush + 2691 vote + 503 classify + 2 hand-over

  logic clk = 0, rst_n = 0;
  logic in_wr_en = 0, in_full, out_rd_en = 0, out_empty, busy;
  logic [31:0] in_wr_data = 0, out_rd_data;
  logic cfg_we = 0, cfg_sel = 0;
  logic [13:0] cfg_addr = 0;
  logic [15:0] cfg_data = 0;

  int checks = 0, failures = 0;
  int imgs [NROI][H][W];
  int feat [NW];
  int lut [NW][32];
  logic [31:0] expw [NROI];
  int n_in_full = 0, n_load_stall = 0, n_write_stall = 0, n_weak = 0, n_cross = 0;
  int n_human = 0, n_not = 0, n_res = 0, n_lat_checked = 0;
  bit roi_stalled;
  int cyc = 0, t_start;

  comta_accel_top #(.FIFO_DEPTH(FD), .NW(NW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // Mechanism counters and latency check.
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_wr_en && in_full) n_in_full++;
    if (dut.u_scaler.active && dut.in_empty) begin n_load_stall++; roi_stalled = 1; end
    if (dut.u_ctrl.write_stall) begin n_write_stall++; roi_stalled = 1; end
    if (dut.g[0].valid && !dut.g[0].d.valid) n_weak++;
    if (dut.u_hist.ev_q[4].valid || dut.u_hist.ev_q[5].valid) n_cross++;
    if (dut.u_ctrl.scan_start) begin t_start = cyc; roi_stalled = 0; end
    if (dut.u_ctrl.out_push && !roi_stalled) begin
      check(cyc - t_start == LAT, $sformatf("ROI latency %0d", cyc - t_start));
      n_lat_checked++;
    end
  end

  function automatic logic [31:0] expected_word();
    int s;
    s = 0;
    compute_dirs(15);
    compute_hist();
    for (int t = 0; t < NW; t++) begin
      int c, b;
      c = hcount(feat[t]);
      if (c > 127) c = 127;
      b = c / 2;
      if (b > 31) b = 31;
      s += lut[t][b];
    end
    return {11'd0, s > 0, 20'(s)};
  endfunction

  task automatic cfg_write(input bit sel, input int addr, input int data);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_addr = 14'(addr); cfg_data = 16'(data);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CPU writer.
  initial begin
    int keys [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Images.
    for (int n = 0; n < NROI; n++) begin
      case (n % 4)
        0: gen_person(40, 200, 14 + n / 4, 3);
        1: gen_image(120, 120, 0, 0, 0, 0, 4);          // flat, weak gradients only
        2: gen_person(220, 60, 17, 6);
        default: gen_image(30, 180, 8, 12, 22, 50, 2);
      endcase
      imgs[n] = img;
    end
    // Feature table: dimensions of ROI 0 and ROI 2 plus random ones.
    img = imgs[0]; compute_dirs(15); compute_hist();
    foreach (hist[k]) keys.push_back(k);
    img = imgs[2]; compute_dirs(15); compute_hist();
    foreach (hist[k]) keys.push_back(k);
    for (int t = 0; t < NW; t++) begin
      feat[t] = ($urandom_range(9) < 8) ? keys[$urandom_range(keys.size() - 1)] : int'($urandom_range(32767));
      cfg_write(0, t, feat[t]);
      for (int b = 0; b < 32; b++) begin
        lut[t][b] = (b == 0) ? -int'($urandom_range(4, 1)) : int'($urandom_range(60, 20));
        cfg_write(1, t * 32 + b, lut[t][b] & 16'hffff);
      end
    end
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < NROI; n++) begin
      img = imgs[n];
      expw[n] = expected_word();
    end
    // Stream all ROIs; ROI 3 is written with pauses.
    for (int n = 0; n < NROI; n++)
      for (int i = 0; i < 512; i++) begin
        img = imgs[n];
        @(negedge clk);
        if (n == 3 && i % 64 == 5) begin in_wr_en = 0; repeat (40) @(negedge clk); end
        in_wr_en = 1; in_wr_data = word_of(i);
        @(posedge clk);
        while (in_full) @(posedge clk);
      end
    @(negedge clk); in_wr_en = 0;
  end

  // CPU reader: starts late so that the output FIFO fills.
  initial begin
    wait (rst_n);
    wait (n_write_stall > 50);
    while (n_res < NROI) begin
      @(negedge clk);
      out_rd_en = 0;
      if (!out_empty && $urandom_range(3) == 0) begin
        out_rd_en = 1;
        $display("ROI %0d word %h", n_res, out_rd_data);
        check(out_rd_data == expw[n_res], $sformatf("ROI %0d result %h exp %h", n_res, out_rd_data, expw[n_res]));
        if (out_rd_data[20]) n_human++; else n_not++;
        n_res++;
      end
    end
    @(negedge clk); out_rd_en = 0;
    repeat (5) @(posedge clk);
    check(!busy && out_empty, "idle at the end");
    check(n_in_full > 0, "input FIFO back-pressure");
    check(n_load_stall > 0, "pixel stream stalled on empty FIFO");
    check(n_write_stall > 0, "result write stalled on full FIFO");
    check(n_weak > 0, "weak gradients rejected");
    check(n_cross > 0, "cross-resolution votes");
    check(n_human > 0 && n_not > 0, "both decisions");
    check(n_lat_checked > 0, "latency checked");
    $display("mechanisms: in_full=%0d load_stall=%0d write_stall=%0d weak=%0d cross=%0d human=%0d not=%0d lat=%0d",
             n_in_full, n_load_stall, n_write_stall, n_weak, n_cross, n_human, n_not, n_lat_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
