// accel_ctrl: sequencer of the accelerator, one region of interest at a time.
//
// IDLE waits until the input FIFO holds data, then clears the direction maps
// and starts the pixel stream (LOAD). When the last pixel has left the
// scaler, FLUSH waits FLUSH_CYCLES cycles so that the line buffers and
// gradient units finish writing the maps, then starts the histogram scan
// (VOTE). When the votes are counted the strong classifier runs (CLASSIFY),
// and WRITE pushes the result word into the output FIFO as soon as it has
// room, stalling while it is full. The order of the phases follows the data
// flow of the reference design; the state machine itself is this design's.
//
// Timing: every start/push output is a one-cycle pulse decoded from the
// state register.
module accel_ctrl
  import mrcohog_pkg::*;
#(
  parameter int unsigned FLUSH_CYCLES = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_empty,
  input  logic scan_done,
  input  logic vote_done,
  input  logic cls_done,
  input  logic out_full,
  output logic clear,
  output logic scan_start,
  output logic vote_start,
  output logic cls_start,
  output logic out_push,
  output logic busy,
  output logic write_stall    // result ready but output FIFO full
);
  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_FLUSH, S_VOTE, S_CLASSIFY, S_WRITE
  } state_t;

  state_t     state, next;
  logic [3:0] fcnt;

  always_comb begin
    next       = state;
    clear      = 1'b0;
    scan_start = 1'b0;
    vote_start = 1'b0;
    cls_start  = 1'b0;
    out_push   = 1'b0;
    case (state)
      S_IDLE:     if (!in_empty) begin clear = 1'b1; scan_start = 1'b1; next = S_LOAD; end
      S_LOAD:     if (scan_done) next = S_FLUSH;
      S_FLUSH:    if (fcnt == 4'(FLUSH_CYCLES - 1)) begin vote_start = 1'b1; next = S_VOTE; end
      S_VOTE:     if (vote_done) begin cls_start = 1'b1; next = S_CLASSIFY; end
      S_CLASSIFY: if (cls_done) next = S_WRITE;
      S_WRITE:    if (!out_full) begin out_push = 1'b1; next = S_IDLE; end
      default:    next = S_IDLE;
    endcase
  end

  assign busy        = (state != S_IDLE);
  assign write_stall = (state == S_WRITE) && out_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      fcnt  <= '0;
    end else begin
      state <= next;
      fcnt  <= (state == S_FLUSH) ? fcnt + 1'b1 : '0;
    end
  end

  initial assert (FLUSH_CYCLES >= 1 && FLUSH_CYCLES <= 16)
    else $error("accel_ctrl: FLUSH_CYCLES out of range");
endmodule
