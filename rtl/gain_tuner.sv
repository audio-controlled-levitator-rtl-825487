// gain_tuner: maps a 10-bit potentiometer reading onto a signed offset range.
//
//   offset = min + floor((ADC + b) * (max - min) / 1024)
//
// b (OFFSET_BUFFER) widens each end step slightly so that the extreme offsets
// are reachable without the pot sitting exactly at code 0 or 1023. The best b
// for a range d is floor(((d+1)/d*1024 - 1023)/2): 51 for d=10, 26 for d=20,
// 17 for d=31. It is a parameter so that no divider is needed; the divide by
// 1024 is a shift. The formula and the parameter follow the design
// description; the pot is read directly (code 0 gives the minimum).
//
// Timing: a three-register chain (range and ADC+b, product, result); o_offset
// follows a change of i_tune or of the limits after 3 clock cycles. Synchronous
// active-high reset clears the chain.
module gain_tuner #(
  parameter int OFFSET_BUFFER = 25
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [9:0]        i_tune,
  input  logic signed [5:0] i_offset_min,
  input  logic signed [5:0] i_offset_max,
  output logic signed [7:0] o_offset
);
  logic signed [6:0]  range_q;    // d
  logic signed [5:0]  min_q;
  logic signed [11:0] biased_q;   // ADC + b
  logic signed [18:0] product_q;  // (ADC + b) * d
  logic signed [5:0]  min_q2;

  always_ff @(posedge clk) begin
    if (rst) begin
      range_q   <= '0;
      min_q     <= '0;
      biased_q  <= '0;
      product_q <= '0;
      min_q2    <= '0;
      o_offset  <= '0;
    end else begin
      range_q   <= 7'(i_offset_max) - 7'(i_offset_min);
      min_q     <= i_offset_min;
      biased_q  <= $signed({2'b00, i_tune}) + 12'(OFFSET_BUFFER);
      product_q <= 19'(biased_q) * 19'(range_q);
      min_q2    <= min_q;
      o_offset  <= 8'(min_q2) + 8'(product_q >>> 10);
    end
  end
endmodule
