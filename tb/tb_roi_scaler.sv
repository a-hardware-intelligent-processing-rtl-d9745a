// tb_roi_scaler: feeds two ROIs of random words through a first-word-fall-
// through source with random gaps and checks every pixel, its coordinates,
// the half/quarter keep flags, the pop count and the done pulse. Without
// gaps one ROI must take exactly 2048 cycles (one pixel per cycle).
module tb_roi_scaler;
  import mrcohog_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic word_valid;
  logic [31:0] word;
  logic word_pop, done;
  px_stream_t px;
  int checks = 0, failures = 0;
  logic [31:0] words [512];
  int rd_idx, exp_n, pops, dones, first_cyc, last_cyc, cyc;
  bit gaps;

  roi_scaler dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // Source model: shows words[rd_idx] while "valid"; random gaps.
  logic src_on;
  always_comb begin
    word_valid = src_on && rd_idx < 512;
    word       = words[rd_idx < 512 ? rd_idx : 511];
  end
  always @(posedge clk) begin
    if (word_pop) begin rd_idx <= rd_idx + 1; pops++; end
    src_on <= gaps ? ($urandom_range(3) != 0) : 1'b1;
  end

  // Pixel checker.
  always @(posedge clk) begin
    if (rst_n && px.valid) begin
      int ex, ey;
      logic [7:0] ep;
      ex = exp_n % 32; ey = exp_n / 32;
      ep = words[exp_n / 4][8 * (exp_n % 4) +: 8];
      check(px.x == X_W'(ex) && px.y == Y_W'(ey), "coordinates");
      check(px.pix == ep, "pixel value");
      check(px.keep1 == (ex % 2 == 0 && ey % 2 == 0), "keep1");
      check(px.keep2 == (ex % 4 == 0 && ey % 4 == 0), "keep2");
      check(done == (exp_n == 2047), "done with last pixel");
      if (exp_n == 0) first_cyc = cyc;
      if (exp_n == 2047) last_cyc = cyc;
      exp_n++;
    end else if (rst_n) check(!done, "no stray done");
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    src_on = 1; rd_idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int roi = 0; roi < 2; roi++) begin
      gaps = (roi == 1);
      foreach (words[i]) words[i] = $urandom;
      @(negedge clk);
      rd_idx = 0; exp_n = 0; pops = 0;
      start = 1; @(negedge clk); start = 0;
      wait (exp_n == 2048);
      repeat (5) @(posedge clk);
      check(pops == 512, "512 words popped");
      if (!gaps) check(last_cyc - first_cyc == 2047, "one pixel per cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
