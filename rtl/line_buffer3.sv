// line_buffer3: three-line buffer that forms a 3x3 pixel window.
//
// Two row memories hold the previous two rows of a raster pixel stream; with
// the incoming pixel they give one 3-pixel column per input pixel, which is
// shifted into a 3x3 register window. When pixel (x, y) arrives, the window
// is centred on (x-1, y-1); it is reported only when that centre has all
// eight neighbours inside the image (x >= 2, y >= 2), so border pixels get no
// window. The three-line buffer and 3x3 kernel follow the reference design;
// the border rule is this design's choice.
//
// Interface: in_valid/in_x/in_y/in_pix is one pixel per valid cycle in
// raster order, gaps allowed. win_valid, win_x, win_y and win are
// registered: the window appears one cycle after the pixel that completes
// it. win[r][c] is row r (0 = upper), column c (0 = left).
module line_buffer3
  import mrcohog_pkg::*;
#(
  parameter int unsigned IMG_W = ROI_W,
  parameter int unsigned IMG_H = ROI_H
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [X_W-1:0] in_x,
  input  logic [Y_W-1:0] in_y,
  input  pix_t           in_pix,
  output logic           win_valid,
  output logic [X_W-1:0] win_x,
  output logic [Y_W-1:0] win_y,
  output pix_t           win [3][3]
);
  pix_t row_m2 [IMG_W];   // row y-2
  pix_t row_m1 [IMG_W];   // row y-1
  pix_t col [3];          // column at x: rows y-2, y-1, y
  pix_t w   [3][3];       // shift window, column 2 newest

  localparam int unsigned AW = $clog2(IMG_W);
  logic [AW-1:0] xi;      // column index into the row memories
  assign xi = in_x[AW-1:0];

  always_comb begin
    col[0] = row_m2[xi];
    col[1] = row_m1[xi];
    col[2] = in_pix;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      row_m2[xi] <= row_m1[xi];
      row_m1[xi] <= in_pix;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
      win_x     <= '0;
      win_y     <= '0;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          w[r][c] <= '0;
    end else begin
      win_valid <= 1'b0;
      if (in_valid) begin
        for (int r = 0; r < 3; r++) begin
          w[r][0] <= w[r][1];
          w[r][1] <= w[r][2];
          w[r][2] <= col[r];
        end
        if (in_x >= X_W'(2) && in_y >= Y_W'(2)) begin
          win_valid <= 1'b1;
          win_x     <= in_x - 1'b1;
          win_y     <= in_y - 1'b1;
        end
      end
    end
  end

  assign win = w;

  initial assert (IMG_W <= (1 << X_W) && IMG_H <= (1 << Y_W))
    else $error("line_buffer3: image larger than the coordinate width");
endmodule
