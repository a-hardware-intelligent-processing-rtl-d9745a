// cooc_histogram: multi-resolution co-occurrence histogram of oriented
// gradients (MRCoHOG), counted only for the dimensions the weak classifiers
// use.
//
// While an ROI streams in, the three gradient units write one direction code
// per pixel into three direction maps (64x32, 32x16 and 16x8); border pixels
// and weak gradients stay invalid. After the last pixel, vote_start scans
// the maps one pixel per cycle: all of resolution 0, then 1, then 2. For the
// scanned pixel with a valid direction, up to six co-occurrence pairs are
// formed, each with a partner that also has a valid direction:
//   - four same-resolution partners at offset distance 1: left, upper-left,
//     upper and upper-right (each unordered neighbour pair is seen once);
//   - the co-located pixel of the next coarser resolution, and for
//     resolution 0 also that of the quarter image.
// A pair votes for the histogram dimension {block, pair type, own direction,
// partner direction}, where block is the 8x8-pixel block of the scanned
// pixel in its own resolution (see mrcohog_pkg::feat_index). This layout has
// 42 blocks x (4..6 pair types) x 64 direction pairs = 15360 dimensions.
//
// Real AdaBoost reads one histogram dimension per weak classifier, so
// instead of holding the full histogram the unit keeps one vote counter per
// weak classifier and compares each pair's index with the classifier's
// feature index (written through the cfg port). A dimension a classifier
// reads is voted at most once per pixel, so each counter adds 0 or 1 per
// cycle. The block size, offset distance, three resolutions and the 8
// directions follow the reference design; the dimension layout, the pair
// set and the counter-per-classifier organisation are this design's own.
//
// Timing: clear (one cycle) invalidates the maps. After vote_start, the scan
// takes 2048 + 512 + 128 = 2688 cycles plus three pipeline cycles; vote_done pulses
// when counts is final, and counts holds until the next vote_start.
module cooc_histogram
  import mrcohog_pkg::*;
#(
  parameter int unsigned NW = NUM_WEAK
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  grad_t              g0,          // resolution 0 writes
  input  grad_t              g1,          // resolution 1 writes
  input  grad_t              g2,          // resolution 2 writes
  input  logic               vote_start,
  output logic               vote_done,
  output logic [CNT_W-1:0]   counts [NW],
  input  logic               cfg_we,
  input  logic [8:0]         cfg_addr,
  input  logic [FEAT_W-1:0]  cfg_feat
);
  localparam int unsigned H0 = ROI_H,  W0 = ROI_W;
  localparam int unsigned H1 = H0 / 2, W1 = W0 / 2;
  localparam int unsigned H2 = H0 / 4, W2 = W0 / 4;
  localparam int unsigned NEV = 6;

  dir_t m0 [H0][W0];
  dir_t m1 [H1][W1];
  dir_t m2 [H2][W2];

  logic [FEAT_W-1:0] feat [NW];

  typedef struct packed {
    logic              valid;
    logic [FEAT_W-1:0] idx;
  } event_t;

  // ---------------- direction maps ----------------
  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int r = 0; r < int'(H0); r++) for (int c = 0; c < int'(W0); c++) m0[r][c] <= '0;
      for (int r = 0; r < int'(H1); r++) for (int c = 0; c < int'(W1); c++) m1[r][c] <= '0;
      for (int r = 0; r < int'(H2); r++) for (int c = 0; c < int'(W2); c++) m2[r][c] <= '0;
    end else begin
      if (g0.valid) m0[g0.y][g0.x]             <= g0.d;
      if (g1.valid) m1[g1.y[Y_W-2:0]][g1.x[X_W-2:0]] <= g1.d;
      if (g2.valid) m2[g2.y[Y_W-3:0]][g2.x[X_W-3:0]] <= g2.d;
    end
  end

  // ---------------- feature-index table ----------------
  always_ff @(posedge clk) begin
    if (cfg_we && cfg_addr < 9'(NW)) feat[cfg_addr] <= cfg_feat;
  end

  // ---------------- scan ----------------
  logic           scanning;
  logic [1:0]     res;
  logic [X_W-1:0] sx;
  logic [Y_W-1:0] sy;
  logic [X_W-1:0] wmax;
  logic [Y_W-1:0] hmax;
  logic           scan_last;

  always_comb begin
    case (res)
      2'd0:    begin wmax = X_W'(W0 - 1); hmax = Y_W'(H0 - 1); end
      2'd1:    begin wmax = X_W'(W1 - 1); hmax = Y_W'(H1 - 1); end
      default: begin wmax = X_W'(W2 - 1); hmax = Y_W'(H2 - 1); end
    endcase
    scan_last = (res == 2'd2) && (sx == wmax) && (sy == hmax);
  end

  // Direction at (x, y) of resolution r; out-of-range reads give invalid.
  function automatic dir_t rd(input logic [1:0] r, input int x, input int y);
    dir_t d;
    d = '0;
    case (r)
      2'd0: if (x >= 0 && x < int'(W0) && y >= 0 && y < int'(H0)) d = m0[y][x];
      2'd1: if (x >= 0 && x < int'(W1) && y >= 0 && y < int'(H1)) d = m1[y][x];
      default: if (x >= 0 && x < int'(W2) && y >= 0 && y < int'(H2)) d = m2[y][x];
    endcase
    return d;
  endfunction

  event_t ev [NEV];
  always_comb begin
    dir_t   cur;
    dir_t   pt [NEV];
    logic [5:0] blk;
    int x, y;
    x   = int'(sx);
    y   = int'(sy);
    cur = rd(res, x, y);
    blk = block_id(res, sx, sy);
    pt[0] = rd(res, x - 1, y);
    pt[1] = rd(res, x - 1, y - 1);
    pt[2] = rd(res, x,     y - 1);
    pt[3] = rd(res, x + 1, y - 1);
    pt[4] = (res == 2'd2) ? dir_t'('0) : rd(res + 2'd1, x / 2, y / 2);
    pt[5] = (res == 2'd0) ? rd(2'd2, x / 4, y / 4) : dir_t'('0);
    for (int j = 0; j < int'(NEV); j++) begin
      ev[j].valid = scanning && cur.valid && pt[j].valid;
      ev[j].idx   = feat_index(blk, pair_t'(j), cur.dir, pt[j].dir);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scanning <= 1'b0;
      res      <= '0;
      sx       <= '0;
      sy       <= '0;
    end else if (vote_start && !scanning) begin
      scanning <= 1'b1;
      res      <= '0;
      sx       <= '0;
      sy       <= '0;
    end else if (scanning) begin
      if (scan_last) begin
        scanning <= 1'b0;
      end else if (sx == wmax) begin
        sx <= '0;
        if (sy == hmax) begin
          sy  <= '0;
          res <= res + 1'b1;
        end else begin
          sy <= sy + 1'b1;
        end
      end else begin
        sx <= sx + 1'b1;
      end
    end
  end

  // ---------------- vote pipeline ----------------
  event_t ev_q [NEV];
  logic   last_q, last_qq, last_qqq;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(NEV); j++) ev_q[j] <= '0;
      last_q  <= 1'b0;
      last_qq <= 1'b0;
      last_qqq <= 1'b0;
    end else begin
      ev_q    <= ev;
      last_q  <= scanning && scan_last;
      last_qq <= last_q;
      last_qqq <= last_qq;
    end
  end

  assign vote_done = last_qqq;   // counts take the last votes one cycle earlier

  always_ff @(posedge clk) begin
    if (!rst_n || (vote_start && !scanning)) begin
      for (int t = 0; t < int'(NW); t++) counts[t] <= '0;
    end else begin
      for (int t = 0; t < int'(NW); t++) begin
        logic hit;
        hit = 1'b0;
        for (int j = 0; j < int'(NEV); j++)
          hit |= ev_q[j].valid && (ev_q[j].idx == feat[t]);
        if (hit && counts[t] != '1) counts[t] <= counts[t] + 1'b1;
      end
    end
  end

  // block_id and feat_index are written for this ROI size and block size.
  initial assert (H0 == 64 && W0 == 32 && BLOCK == 8 && NUM_DIR == 8 && HIST_DIM == 15360)
    else $error("cooc_histogram: feature layout assumes a 64x32 ROI, 8x8 blocks, 8 directions");
endmodule
