// tb_comta_accel_full: the accelerator at its default sizes (32-bit x 512
// FIFOs, 500 weak classifiers). It loads the full feature table and the
// 16,000-entry LUT, writes three ROIs back to back (a person-like
// silhouette, a flat noisy patch and a rectangle), reads the three result
// words and compares them with the reference model. Each ROI must take 5248
// cycles from scan start to result push.
module tb_comta_accel_full;
  import mrcohog_pkg::*;
  import mrcohog_ref_pkg::*;
  localparam int NROI = 3;
  localparam int LAT  = 5248;

  logic clk = 0, rst_n = 0;
  logic in_wr_en = 0, in_full, out_rd_en = 0, out_empty, busy;
  logic [31:0] in_wr_data = 0, out_rd_data;
  logic cfg_we = 0, cfg_sel = 0;
  logic [13:0] cfg_addr = 0;
  logic [15:0] cfg_data = 0;

  int checks = 0, failures = 0;
  int imgs [NROI][H][W];
  int feat [NUM_WEAK];
  int lut [NUM_WEAK][32];
  logic [31:0] expw [NROI];
  int cyc = 0, t_start, n_push = 0;

  comta_accel_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_ctrl.scan_start) t_start = cyc;
    if (dut.u_ctrl.out_push) begin
      check(cyc - t_start == LAT, $sformatf("ROI latency %0d", cyc - t_start));
      n_push++;
    end
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
    gen_person(40, 200, 15, 3);           imgs[0] = img;
    gen_image(120, 120, 0, 0, 0, 0, 4);   imgs[1] = img;
    gen_image(30, 180, 8, 12, 22, 50, 2); imgs[2] = img;
    img = imgs[0]; compute_dirs(15); compute_hist();
    foreach (hist[k]) keys.push_back(k);
    for (int t = 0; t < NUM_WEAK; t++) begin
      feat[t] = ($urandom_range(9) < 8) ? keys[$urandom_range(keys.size() - 1)] : int'($urandom_range(32767));
      @(negedge clk); cfg_we = 1; cfg_sel = 0; cfg_addr = 14'(t); cfg_data = 16'(feat[t]);
      for (int b = 0; b < 32; b++) begin
        lut[t][b] = (b == 0) ? -int'($urandom_range(4, 1)) : int'($urandom_range(60, 20));
        @(negedge clk); cfg_we = 1; cfg_sel = 1; cfg_addr = 14'(t * 32 + b); cfg_data = 16'(lut[t][b]);
      end
    end
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < NROI; n++) begin img = imgs[n]; expw[n] = expected_word(); end
    for (int n = 0; n < NROI; n++)
      for (int i = 0; i < 512; i++) begin
        img = imgs[n];
        @(negedge clk);
        in_wr_en = 1; in_wr_data = word_of(i);
        @(posedge clk);
        while (in_full) @(posedge clk);
      end
    @(negedge clk); in_wr_en = 0;
    wait (n_push == NROI);
    for (int n = 0; n < NROI; n++) begin
      @(negedge clk);
      check(!out_empty, "result present");
      check(out_rd_data == expw[n], $sformatf("ROI %0d result %h exp %h", n, out_rd_data, expw[n]));
      out_rd_en = 1;
      @(negedge clk); out_rd_en = 0;
    end
    check(expw[0][20] && !expw[1][20], "person detected, flat patch rejected");
    repeat (3) @(posedge clk);
    check(out_empty && !busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
