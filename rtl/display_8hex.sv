// display_8hex: drives an 8-digit multiplexed 7-segment display with 8 hex
// digits.
//
// A free-running counter selects one digit at a time (digit 7, data[31:28],
// first); the digit's anode strobe is driven low and its segments a..g
// (seg[0]..seg[6], active low) show the hex glyph. Each digit is lit for
// 2^(CNT_W-3) cycles, 2^11 = 31.5 us at 65 MHz. Synchronous active-high
// reset restarts the scan at digit 7; outputs are registered (1 cycle).
module display_8hex #(
  parameter int CNT_W = 14
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] data,
  output logic [6:0]  seg,
  output logic [7:0]  strobe
);
  logic [CNT_W-1:0] counter;
  logic [2:0]       digit;
  logic [3:0]       nibble;
  logic [6:0]       glyph;   // active-high segments g..a

  assign digit  = counter[CNT_W-1 -: 3];
  assign nibble = data[4*(7 - digit) +: 4];

  always_comb begin
    unique case (nibble)
      4'h0: glyph = 7'b0111111;  4'h1: glyph = 7'b0000110;
      4'h2: glyph = 7'b1011011;  4'h3: glyph = 7'b1001111;
      4'h4: glyph = 7'b1100110;  4'h5: glyph = 7'b1101101;
      4'h6: glyph = 7'b1111101;  4'h7: glyph = 7'b0000111;
      4'h8: glyph = 7'b1111111;  4'h9: glyph = 7'b1101111;
      4'hA: glyph = 7'b1110111;  4'hB: glyph = 7'b1111100;
      4'hC: glyph = 7'b1011000;  4'hD: glyph = 7'b1011110;
      4'hE: glyph = 7'b1111001;  default: glyph = 7'b1110001;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) counter <= '0;
    else     counter <= counter + 1'b1;
    seg     <= ~glyph;
    strobe  <= ~(8'b1000_0000 >> digit);
  end
endmodule
