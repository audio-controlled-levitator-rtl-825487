// freq_det: pitch detection on the FFT result as it is read out.
//
// The FFT result store is read out bin by bin (by the histogram display in
// the levitator). Values are the real part of the FFT with negative values
// already cleared. Every bin above MIN_BIN whose value, times 4, exceeds
// THRESHOLD replaces the stored bin index, so after a sweep `frequency` holds
// the highest-numbered bin that crossed the threshold: for a voice or a tone
// the loudest component usually is the only one above a well-set threshold.
// Bins up to 50 are ignored because they were consistently noisy. MIN_BIN and
// the threshold follow the design description.
//
// Timing: frequency updates one cycle after a qualifying valid input; it
// holds its value otherwise. Synchronous active-high reset clears it.
module freq_det #(
  parameter int MIN_BIN   = 50,
  parameter int THRESHOLD = 249
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [9:0]  addr,
  input  logic [14:0] data,
  input  logic        valid,
  output logic [9:0]  frequency
);
  always_ff @(posedge clk) begin
    if (rst) frequency <= '0;
    else if (valid && 32'(addr) > MIN_BIN && ({data, 2'b00} > 17'(THRESHOLD)))
      frequency <= addr;
  end
endmodule
