// histogram: draws the FFT result as red bars rising from the screen bottom.
//
// Each column x reads bin x >> range_sel of the FFT store (1, 2, 4 or 8
// pixels per bin, a zoom on the low part of the spectrum). A bar is
// vdata[14:5]*8 pixels tall: the pixel is lit when its height above the
// bottom line (767 - vcount) is below that. The scaling follows the design
// description; the colour is red.
//
// Timing: vaddr is combinational from hcount. vdata, vcount and blank are
// registered once and the pixel once more: the pixel appears two cycles after
// the vdata/vcount/blank it is computed from (the caller adds the RAM's read
// delay and its own register on vdata, and aligns the syncs to match).
module histogram
  import levitator_pkg::*;
(
  input  logic        clk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        blank,
  input  logic [1:0]  range_sel,
  output logic [9:0]  vaddr,
  input  logic [14:0] vdata,
  output pixel_t      pixel
);
  logic [12:0] bar_height;
  logic [9:0]  pixel_height;
  logic        blank_q;

  assign vaddr = hcount[9:0] >> range_sel;

  always_ff @(posedge clk) begin
    bar_height   <= {vdata[14:5], 3'b000};
    pixel_height <= 10'd767 - vcount;
    blank_q      <= blank;
    pixel        <= (!blank_q && 13'(pixel_height) < bar_height) ? PIX_RED : PIX_BLACK;
  end
endmodule
