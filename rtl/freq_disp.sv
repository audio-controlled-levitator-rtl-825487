// freq_disp: marks the detected pitch and the current mode's range on screen.
//
// Column x shows bin x >> range_sel, the same mapping as the histogram. A
// green bar (lines 650..699) is drawn in the columns of the detected bin; two
// taller blue bars (lines 600..699) mark the lowest bin (MIN_BIN) and the
// highest bin of the mode's range (MAX_CONT_BIN in continuous mode, mode=1,
// MAX_DISC_BIN in discrete mode). The green bar's place between the blue ones
// shows where the pitch will put the ball. Bar positions follow the design
// description; their heights are this design's choice.
//
// Timing: pixel is registered, 1 cycle after hcount/vcount.
module freq_disp
  import levitator_pkg::*;
#(
  parameter int MIN_BIN      = 65,
  parameter int MAX_CONT_BIN = 120,
  parameter int MAX_DISC_BIN = 190
) (
  input  logic        clk,
  input  logic [9:0]  bin,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        blank,
  input  logic [1:0]  range_sel,
  input  logic        mode,
  output pixel_t      pixel
);
  logic [9:0] column_bin;
  logic [9:0] max_bin;
  logic       in_green, in_blue;

  assign column_bin = hcount[9:0] >> range_sel;
  assign max_bin    = mode ? 10'(MAX_CONT_BIN) : 10'(MAX_DISC_BIN);
  assign in_green   = column_bin == bin && vcount >= 10'd650 && vcount < 10'd700;
  assign in_blue    = (column_bin == 10'(MIN_BIN) || column_bin == max_bin)
                      && vcount >= 10'd600 && vcount < 10'd700;

  always_ff @(posedge clk) begin
    if (blank)         pixel <= PIX_BLACK;
    else if (in_green) pixel <= PIX_GREEN;
    else if (in_blue)  pixel <= PIX_BLUE;
    else               pixel <= PIX_BLACK;
  end
endmodule
