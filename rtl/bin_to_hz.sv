// bin_to_hz: converts an FFT bin index to a frequency in Hz for display.
//
// hertz = floor(bin * HZ_PER_BIN_Q10 / 1024). With a sample rate of
// 104 MHz/(42*15*16) = 10317 Hz and a 4096-point FFT, one bin is 2.5186 Hz,
// i.e. 2579/1024. The design uses a lookup table for this; the same values are
// computed here with one multiplier.
//
// Timing: registered, one cycle of latency like a synchronous ROM.
module bin_to_hz #(
  parameter int HZ_PER_BIN_Q10 = 2579
) (
  input  logic        clk,
  input  logic [9:0]  bin,
  output logic [11:0] hertz
);
  logic [23:0] scaled;
  assign scaled = 24'(bin) * 24'(HZ_PER_BIN_Q10);
  always_ff @(posedge clk) hertz <= scaled[21:10];
endmodule
