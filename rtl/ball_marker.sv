// ball_marker: draws a magenta square whose horizontal place is the ball
// height (or the reference), lined up with the frequency bars.
//
// Continuous mode (mode=1, 8 pixels per bin): a 20-pixel square at
// x = 512 + 8*track + 5, track limited to 58. Discrete mode (4 pixels per bin,
// two bins per height step): a 15-pixel square at x = 256 + 8*track + 5,
// track limited to 61. The square's top line is Y_TOP. Both put height 0 over
// bin 65, the low end of the pitch range. Drawn only when `enable` is set.
// Geometry follows the design description.
//
// Timing: the x position is registered; pixel is registered, 1 cycle after
// hcount/vcount.
module ball_marker
  import levitator_pkg::*;
#(
  parameter int Y_TOP = 515
) (
  input  logic        clk,
  input  logic        enable,
  input  logic        mode,
  input  logic [5:0]  track,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output pixel_t      pixel
);
  logic [10:0] x_left;
  logic [5:0]  t;
  logic [10:0] size;

  assign t    = mode ? ((track >= 6'd58) ? 6'd58 : track) : ((track >= 6'd61) ? 6'd61 : track);
  assign size = mode ? 11'd20 : 11'd15;

  always_ff @(posedge clk) begin
    x_left <= (mode ? 11'd512 : 11'd256) + {2'b00, t, 3'b000} + 11'd5;
    pixel  <= (enable && vcount >= 10'(Y_TOP) && 11'(vcount) < 11'(Y_TOP) + size
               && hcount >= x_left && hcount < x_left + size) ? PIX_MAGENTA : PIX_BLACK;
  end
endmodule
