// sound_display: draws the live audio waveform across the upper screen.
//
// Column x shows audio sample x of a 1024-sample trace buffer: the sample's
// top 10 bits are read at vaddr = hcount[9:0] and the pixel is lit (magenta)
// where BASE_LINE - vcount < data < BASE_LINE + 5 - vcount, a 4-line-thick
// trace, compared as signed numbers so lines below the base line work too.
// Larger samples are drawn higher up. The scaling follows the design
// description; colour as in its screen photographs.
//
// Timing: vaddr is registered; pixel is valid 2 cycles after hcount/vcount
// (RAM read plus output register), so the caller delays sync and blank by 2.
module sound_display
  import levitator_pkg::*;
#(
  parameter int BASE_LINE = 470
) (
  input  logic        clk,
  input  logic [9:0]  data,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        blank,
  output logic [9:0]  vaddr,
  output pixel_t      pixel
);
  logic signed [11:0] vtop, vbot;
  logic       blank_q;

  always_ff @(posedge clk) begin
    vaddr   <= hcount[9:0];
    blank_q <= blank;
    vtop    <= 12'(BASE_LINE) - $signed({2'b00, vcount});
    vbot    <= 12'(BASE_LINE + 5) - $signed({2'b00, vcount});
    pixel   <= (!blank_q && vtop < $signed({2'b00, data}) && vbot > $signed({2'b00, data})) ? PIX_MAGENTA : PIX_BLACK;
  end
endmodule
