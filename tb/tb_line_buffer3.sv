// tb_line_buffer3: streams random 64x32 images (the second with random gaps
// between pixels) into the three-line buffer and checks every 3x3 window
// against the stored image, and that exactly the 62x30 interior pixels get
// a window, in raster order.
module tb_line_buffer3;
  import mrcohog_pkg::*;
  localparam int H = 64, W = 32;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [X_W-1:0] in_x = 0;
  logic [Y_W-1:0] in_y = 0;
  pix_t in_pix = 0;
  logic win_valid;
  logic [X_W-1:0] win_x;
  logic [Y_W-1:0] win_y;
  pix_t win [3][3];
  int checks = 0, failures = 0;
  int img [H][W];
  int nwin, ex, ey;

  line_buffer3 #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d,%0d", what, win_x, win_y); end
  endtask

  always @(posedge clk) begin
    if (rst_n && win_valid) begin
      check(int'(win_x) == ex && int'(win_y) == ey, "window order");
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          check(int'(win[r][c]) == img[int'(win_y) + r - 1][int'(win_x) + c - 1], "window pixel");
      nwin++;
      ex++;
      if (ex == W - 1) begin ex = 1; ey++; end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      foreach (img[y, x]) img[y][x] = $urandom_range(255);
      nwin = 0; ex = 1; ey = 1;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          if (pass == 1) while ($urandom_range(2) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_x = X_W'(x); in_y = Y_W'(y); in_pix = pix_t'(img[y][x]);
        end
      @(negedge clk); in_valid = 0;
      repeat (3) @(posedge clk);
      check(nwin == (H - 2) * (W - 2), "window count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
