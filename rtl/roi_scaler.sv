// roi_scaler: turns the 32-bit words of the input FIFO into a raster stream
// of ROI pixels and marks which pixels belong to the half- and
// quarter-resolution images.
//
// Each FIFO word holds four 8-bit pixels, the leftmost in bits 7:0, so a
// 64x32 ROI is exactly 512 words, the depth of the input FIFO. The scaler
// reads the head of the first-word-fall-through FIFO directly, sends one
// pixel per cycle and pops the word with its fourth pixel; an empty FIFO
// stalls the stream. Resizing is by decimation: the half-resolution image
// (32x16) keeps pixels whose row and column are even, the quarter image
// (16x8) those whose row and column are multiples of four. The three image
// sizes follow the reference design; the packing and the decimation are this
// design's choice.
//
// Interface: a start pulse arms the scaler for one ROI. px is registered:
// a pixel appears one cycle after it is taken from the FIFO. done pulses
// together with the last pixel (row ROI_H-1, column ROI_W-1).
module roi_scaler
  import mrcohog_pkg::*;
#(
  parameter int unsigned IMG_W = ROI_W,
  parameter int unsigned IMG_H = ROI_H
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        word_valid,
  input  logic [31:0] word,
  output logic        word_pop,
  output px_stream_t  px,
  output logic        done
);
  logic           active;
  logic [1:0]     k;          // pixel of the current word
  logic [X_W-1:0] x;
  logic [Y_W-1:0] y;
  logic           take;
  logic           last;

  assign take     = active && word_valid;
  assign word_pop = take && (k == 2'd3);
  assign last     = (x == X_W'(IMG_W - 1)) && (y == Y_W'(IMG_H - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      k      <= '0;
      x      <= '0;
      y      <= '0;
      px     <= '0;
      done   <= 1'b0;
    end else begin
      px.valid <= 1'b0;
      done     <= 1'b0;
      if (start && !active) begin
        active <= 1'b1;
        k      <= '0;
        x      <= '0;
        y      <= '0;
      end else if (take) begin
        px.valid <= 1'b1;
        px.x     <= x;
        px.y     <= y;
        px.keep1 <= (x[0] == 1'b0) && (y[0] == 1'b0);
        px.keep2 <= (x[1:0] == 2'b00) && (y[1:0] == 2'b00);
        px.pix   <= word[8*k +: 8];
        k        <= k + 1'b1;
        if (last) begin
          active <= 1'b0;
          done   <= 1'b1;
        end else if (x == X_W'(IMG_W - 1)) begin
          x <= '0;
          y <= y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end
endmodule
