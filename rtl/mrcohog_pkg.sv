// mrcohog_pkg: types and constants shared by the MRCoHOG / real-AdaBoost
// human-detection accelerator.
//
// The ROI size (64x32 pixels), the two resized images (32x16, 16x8), the 8x8
// histogram block, the offset distance of 1, the 8 gradient directions, the
// gradient-magnitude threshold of 15, the 32 histogram bins, the 500 weak
// classifiers and the 32-bit x 512 FIFOs are the values of the reference
// design. Pixel width, coordinate widths, the feature-index layout and the
// weak-output width are this design's own choices.
package mrcohog_pkg;

  localparam int unsigned ROI_H      = 64;   // rows of one region of interest
  localparam int unsigned ROI_W      = 32;   // columns of one region of interest
  localparam int unsigned PIX_W      = 8;    // bits per pixel
  localparam int unsigned X_W        = 5;    // column index width (ROI_W = 32)
  localparam int unsigned Y_W        = 6;    // row index width    (ROI_H = 64)
  localparam int unsigned NUM_DIR    = 8;    // quantized gradient directions
  localparam int unsigned GRAD_THRESH = 15;  // minimum gradient magnitude
  localparam int unsigned BLOCK      = 8;    // histogram block edge, pixels
  localparam int unsigned NUM_BINS   = 32;   // bins of one weak classifier
  localparam int unsigned NUM_WEAK   = 500;  // weak classifiers
  localparam int unsigned CNT_W      = 7;    // vote counter width (max 64)
  localparam int unsigned FEAT_W     = 15;   // feature index width
  localparam int unsigned H_W        = 8;    // weak classifier output width
  localparam int unsigned SCORE_W    = 20;   // strong classifier sum width
  // Histogram dimensions of the feature layout below: 32 res-0 blocks x 6
  // pair types + 8 res-1 blocks x 5 + 2 res-2 blocks x 4, each x 64
  // direction pairs.
  localparam int unsigned HIST_DIM   = (32 * 6 + 8 * 5 + 2 * 4) * NUM_DIR * NUM_DIR;

  typedef logic [PIX_W-1:0] pix_t;

  // One pixel of the raster stream, with the flags that say whether the
  // pixel is also kept in the half- and quarter-resolution images.
  typedef struct packed {
    logic           valid;
    logic [X_W-1:0] x;
    logic [Y_W-1:0] y;
    logic           keep1;   // x and y even
    logic           keep2;   // x and y divisible by 4
    pix_t           pix;
  } px_stream_t;

  // Quantized gradient: valid is clear where the magnitude is below the
  // threshold or where the pixel lies on the image border.
  typedef struct packed {
    logic       valid;
    logic [2:0] dir;
  } dir_t;

  // Gradient result of one pixel, with its position in its own resolution.
  typedef struct packed {
    logic           valid;   // a result is present this cycle
    logic [X_W-1:0] x;
    logic [Y_W-1:0] y;
    dir_t           d;
  } grad_t;

  // Co-occurrence pair types of the feature index.
  typedef enum logic [2:0] {
    PT_LEFT      = 3'd0,  // same resolution, (x-1, y)
    PT_UPLEFT    = 3'd1,  // same resolution, (x-1, y-1)
    PT_UP        = 3'd2,  // same resolution, (x,   y-1)
    PT_UPRIGHT   = 3'd3,  // same resolution, (x+1, y-1)
    PT_COARSE1   = 3'd4,  // next coarser resolution, co-located pixel
    PT_COARSE2   = 3'd5   // resolution two steps coarser (res 0 to res 2)
  } pair_t;

  // Block numbering: res 0 blocks 0..31 (8 rows x 4 columns), res 1 blocks
  // 32..39 (4 x 2), res 2 blocks 40..41 (2 x 1).
  function automatic logic [5:0] block_id(input logic [1:0] res,
                                          input logic [X_W-1:0] x,
                                          input logic [Y_W-1:0] y);
    case (res)
      2'd0:    return {1'b0, y[5:3], x[4:3]};
      2'd1:    return 6'd32 + {3'b000, y[4:3], x[3]};
      default: return 6'd40 + {5'b00000, y[3]};
    endcase
  endfunction

  // Feature index: {block, pair type, direction of the current pixel,
  // direction of its partner}.
  function automatic logic [FEAT_W-1:0] feat_index(input logic [5:0] blk,
                                                   input pair_t pt,
                                                   input logic [2:0] da,
                                                   input logic [2:0] db);
    return {blk, pt, da, db};
  endfunction

  // Result word written to the output FIFO.
  function automatic logic [31:0] result_word(input logic human,
                                              input logic signed [SCORE_W-1:0] score);
    return {11'd0, human, score};
  endfunction

endpackage
