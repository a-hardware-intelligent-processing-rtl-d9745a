// comta_accel_top: FPGA-side human-detection accelerator. It takes depth-image
// regions of interest (ROIs) from the embedded CPU and returns a human / not
// human decision for each.
//
// Data path, one ROI at a time:
//   input FIFO (32 bit x 512) -> roi_scaler (4 pixels per word, 64x32 ROI,
//   plus half and quarter images by decimation) -> three line_buffer3 /
//   gradient_unit pairs, one per resolution (64x32, 32x16, 16x8) ->
//   cooc_histogram (direction maps, MRCoHOG co-occurrence votes counted for
//   the dimensions the weak classifiers use) -> adaboost_classifier
//   (500 weak classifiers x 32 bins in a LUT, sign of the sum) ->
//   output FIFO (32 bit x 512).
// accel_ctrl sequences the phases: load (one pixel per cycle, 2048 cycles),
// flush (4), vote (2688 + 3), classify (500 + 3) and write (1 cycle, longer
// while the output FIFO is full). Without stalls, 5248 cycles pass from the
// cycle the controller starts an ROI to the cycle it pushes the result.
//
// CPU side: the CPU writes the 512 words of an ROI with in_wr_en while
// in_full is low, and reads result words with out_rd_en while out_empty is
// low. A result word holds the decision in bit 20 and the signed score in
// bits 19:0. Before use the CPU loads the trained tables through the cfg
// port: cfg_sel = 0 writes the feature index cfg_data[14:0] of weak
// classifier cfg_addr[8:0]; cfg_sel = 1 writes the weak output
// cfg_data[7:0] (signed) at LUT address cfg_addr = {classifier, bin}.
// Tables must not be written while busy is high.
//
// Left unconnected on purpose: the FIFO occupancy counts, the controller's
// write-stall flag (both for observation only) and cfg_data[15]. Result-word
// bits 31:21 are always zero.
//
// The block structure, the FIFO sizes, the image sizes and the classifier
// organisation follow the reference design; the CPU-side handshakes, the
// cfg port, the result-word format and the sequencing are this design's own.
module comta_accel_top
  import mrcohog_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned NW         = NUM_WEAK
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_wr_en,
  input  logic [31:0] in_wr_data,
  output logic        in_full,
  input  logic        out_rd_en,
  output logic [31:0] out_rd_data,
  output logic        out_empty,
  input  logic        cfg_we,
  input  logic        cfg_sel,
  input  logic [13:0] cfg_addr,
  input  logic [15:0] cfg_data,
  output logic        busy
);
  // FIFOs
  logic        in_empty, in_pop;
  logic [31:0] in_word;
  logic        out_full, out_push;
  logic [31:0] out_word;
  logic [$clog2(FIFO_DEPTH):0] in_count, out_count;

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .wr_en(in_wr_en), .wr_data(in_wr_data), .full(in_full),
    .rd_en(in_pop), .rd_data(in_word), .empty(in_empty), .count(in_count));

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .wr_en(out_push), .wr_data(out_word), .full(out_full),
    .rd_en(out_rd_en), .rd_data(out_rd_data), .empty(out_empty), .count(out_count));

  // Control
  logic clear, scan_start, scan_done, vote_start, vote_done, cls_start, cls_done;
  logic write_stall;

  accel_ctrl u_ctrl (
    .clk, .rst_n,
    .in_empty, .scan_done, .vote_done, .cls_done, .out_full,
    .clear, .scan_start, .vote_start, .cls_start, .out_push, .busy, .write_stall);

  // Pixel stream
  px_stream_t px;

  roi_scaler u_scaler (
    .clk, .rst_n, .start(scan_start),
    .word_valid(!in_empty), .word(in_word), .word_pop(in_pop),
    .px, .done(scan_done));

  // Three resolutions: line buffer + gradient
  logic           lv [3];
  logic [X_W-1:0] lx [3];
  logic [Y_W-1:0] ly [3];
  logic           wv [3];
  logic [X_W-1:0] wx [3];
  logic [Y_W-1:0] wy [3];
  pix_t           win0 [3][3];
  pix_t           win1 [3][3];
  pix_t           win2 [3][3];
  grad_t          g [3];

  always_comb begin
    lv[0] = px.valid;           lx[0] = px.x;      ly[0] = px.y;
    lv[1] = px.valid && px.keep1; lx[1] = px.x >> 1; ly[1] = px.y >> 1;
    lv[2] = px.valid && px.keep2; lx[2] = px.x >> 2; ly[2] = px.y >> 2;
  end

  line_buffer3 #(.IMG_W(ROI_W),     .IMG_H(ROI_H))     u_lb0 (
    .clk, .rst_n, .in_valid(lv[0]), .in_x(lx[0]), .in_y(ly[0]), .in_pix(px.pix),
    .win_valid(wv[0]), .win_x(wx[0]), .win_y(wy[0]), .win(win0));
  line_buffer3 #(.IMG_W(ROI_W / 2), .IMG_H(ROI_H / 2)) u_lb1 (
    .clk, .rst_n, .in_valid(lv[1]), .in_x(lx[1]), .in_y(ly[1]), .in_pix(px.pix),
    .win_valid(wv[1]), .win_x(wx[1]), .win_y(wy[1]), .win(win1));
  line_buffer3 #(.IMG_W(ROI_W / 4), .IMG_H(ROI_H / 4)) u_lb2 (
    .clk, .rst_n, .in_valid(lv[2]), .in_x(lx[2]), .in_y(ly[2]), .in_pix(px.pix),
    .win_valid(wv[2]), .win_x(wx[2]), .win_y(wy[2]), .win(win2));

  gradient_unit u_grad0 (.clk, .rst_n, .win_valid(wv[0]), .win_x(wx[0]), .win_y(wy[0]), .win(win0), .g(g[0]));
  gradient_unit u_grad1 (.clk, .rst_n, .win_valid(wv[1]), .win_x(wx[1]), .win_y(wy[1]), .win(win1), .g(g[1]));
  gradient_unit u_grad2 (.clk, .rst_n, .win_valid(wv[2]), .win_x(wx[2]), .win_y(wy[2]), .win(win2), .g(g[2]));

  // Histogram and classifier
  logic [CNT_W-1:0]          counts [NW];
  logic signed [SCORE_W-1:0] score;
  logic                      human;

  cooc_histogram #(.NW(NW)) u_hist (
    .clk, .rst_n, .clear,
    .g0(g[0]), .g1(g[1]), .g2(g[2]),
    .vote_start, .vote_done, .counts,
    .cfg_we(cfg_we && !cfg_sel), .cfg_addr(cfg_addr[8:0]), .cfg_feat(cfg_data[FEAT_W-1:0]));

  adaboost_classifier #(.NW(NW)) u_cls (
    .clk, .rst_n, .start(cls_start), .counts,
    .done(cls_done), .score, .human,
    .cfg_we(cfg_we && cfg_sel), .cfg_addr(cfg_addr), .cfg_h(cfg_data[H_W-1:0]));

  assign out_word = result_word(human, score);

  // A push into a full FIFO would lose the word.
  assert property (@(posedge clk) disable iff (!rst_n) out_push |-> !out_full);
endmodule
