// adaboost_classifier: real AdaBoost strong classifier with the weak
// classifiers held in a look-up table.
//
// Weak classifier t reads the vote count of its histogram dimension,
// quantizes it into one of NUM_BINS bins, bin = min(count >> BIN_SHIFT,
// NUM_BINS-1), and outputs the signed integer h_t stored in the LUT at
// address {t, bin}. The strong classifier adds the outputs of all NW weak
// classifiers and reports human when the sum is positive, i.e. the sign of
// sum h_t(x). The LUT organisation (500 classifiers x 32 bins of integers)
// and the sign rule follow the reference design; the binning rule, the
// 8-bit width of h_t and the treatment of a zero sum as "not human" are this
// design's choices. The LUT contents come from offline training and are
// loaded through the cfg port.
//
// Timing: after a start pulse one weak classifier is evaluated per cycle
// (synchronous LUT read, one accumulate stage); done pulses NW+3 cycles
// after the clock edge that takes start, and score and human hold until the
// next start. counts must stay stable meanwhile.
module adaboost_classifier
  import mrcohog_pkg::*;
#(
  parameter int unsigned NW        = NUM_WEAK,
  parameter int unsigned BIN_SHIFT = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [CNT_W-1:0]           counts [NW],
  output logic                       done,
  output logic signed [SCORE_W-1:0]  score,
  output logic                       human,
  input  logic                       cfg_we,
  input  logic [13:0]                cfg_addr,   // {t[8:0], bin[4:0]}
  input  logic signed [H_W-1:0]      cfg_h
);
  localparam int unsigned DEPTH = NW * NUM_BINS;

  logic signed [H_W-1:0] lut [DEPTH];

  logic                  running;
  logic [8:0]            t;
  logic                  rd_v, acc_last_q, rd_last;
  logic signed [H_W-1:0] h_q;
  logic [CNT_W-1:0]      c;
  logic [4:0]            bin;
  logic [13:0]           raddr;

  always_comb begin
    c     = counts[t];
    bin   = ((c >> BIN_SHIFT) > CNT_W'(NUM_BINS - 1)) ? 5'(NUM_BINS - 1) : 5'(c >> BIN_SHIFT);
    raddr = {t, bin};
  end

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_addr < 14'(DEPTH)) lut[cfg_addr] <= cfg_h;
  end

  always_ff @(posedge clk) begin
    h_q <= lut[raddr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running    <= 1'b0;
      t          <= '0;
      rd_v       <= 1'b0;
      rd_last    <= 1'b0;
      acc_last_q <= 1'b0;
      score      <= '0;
      human      <= 1'b0;
      done       <= 1'b0;
    end else begin
      rd_v       <= running;
      rd_last    <= running && (t == 9'(NW - 1));
      acc_last_q <= rd_last;
      done       <= acc_last_q;
      if (start && !running) begin
        running <= 1'b1;
        t       <= '0;
        score   <= '0;
      end else if (running) begin
        if (t == 9'(NW - 1)) running <= 1'b0;
        else                 t       <= t + 1'b1;
      end
      if (rd_v) score <= score + SCORE_W'(h_q);
      if (acc_last_q) human <= (score > 0);
    end
  end
endmodule
