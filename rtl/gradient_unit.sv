// gradient_unit: luminance gradient, magnitude threshold and 8-direction
// quantization for one 3x3 window.
//
// The horizontal difference fx = right - left and the vertical difference
// fy = lower - upper are taken from the four direct neighbours of the window
// centre, as in the reference design. To stay free of multipliers and
// dividers, the magnitude is approximated by |fx| + |fy| and the direction is
// the 45-degree sector of the angle atan2(fy, fx), found from the signs of fx
// and fy and one comparison of |fx| with |fy|: code k covers angles in
// [45k, 45k+45) degrees, with the angle measured from the +x axis towards +y
// (downwards in the image). A gradient whose magnitude is below GRAD_THRESH
// gets no direction (d.valid = 0). Using the L1 magnitude, this sector
// boundary and the ">= threshold" rule are this design's own choices.
//
// Timing: one register stage; the result appears the cycle after the window.
module gradient_unit
  import mrcohog_pkg::*;
#(
  parameter int unsigned THRESH = GRAD_THRESH
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           win_valid,
  input  logic [X_W-1:0] win_x,
  input  logic [Y_W-1:0] win_y,
  input  pix_t           win [3][3],
  output grad_t          g
);
  logic signed [PIX_W:0] fx, fy;
  logic        [PIX_W:0] ax, ay;
  logic        [PIX_W+1:0] mag;
  logic        [2:0]     dir;

  always_comb begin
    fx  = $signed({1'b0, win[1][2]}) - $signed({1'b0, win[1][0]});
    fy  = $signed({1'b0, win[2][1]}) - $signed({1'b0, win[0][1]});
    ax  = fx[PIX_W] ? (PIX_W+1)'(-fx) : (PIX_W+1)'(fx);
    ay  = fy[PIX_W] ? (PIX_W+1)'(-fy) : (PIX_W+1)'(fy);
    mag = {1'b0, ax} + {1'b0, ay};
    if (fx > 0 && fy >= 0)       dir = (ay < ax) ? 3'd0 : 3'd1;
    else if (fx <= 0 && fy > 0)  dir = (ax < ay) ? 3'd2 : 3'd3;
    else if (fx < 0 && fy <= 0)  dir = (ay < ax) ? 3'd4 : 3'd5;
    else                         dir = (ax < ay) ? 3'd6 : 3'd7;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      g <= '0;
    end else begin
      g.valid   <= win_valid;
      g.x       <= win_x;
      g.y       <= win_y;
      g.d.valid <= win_valid && (mag >= (PIX_W+2)'(THRESH));
      g.d.dir   <= dir;
    end
  end
endmodule
