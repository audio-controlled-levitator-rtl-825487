// reference_gen: turns the detected pitch (an FFT bin) into a 6-bit height
// reference for the controller.
//
// Continuous mode (mode = 1): the reference follows the pitch all the time:
// bin - MIN_BIN between MIN_BIN and MAX_CONT_BIN, 0 at or below MIN_BIN and 63
// at or above MAX_CONT_BIN (about 164 Hz to 302 Hz, one breath's sweep).
// Discrete mode (mode = 0): a candidate `want` = (bin - MIN_BIN)/2 over the
// wider MIN_BIN..MAX_DISC_BIN range (about 164 Hz to 479 Hz), same limits, is
// updated continuously, and the reference takes it only on the rising edge of
// the `send` button. The bin limits follow the design description.
//
// Timing: registered; ref_out follows the pitch, or the send edge, after one
// cycle (the edge detector adds one more). Synchronous active-high reset.
module reference_gen #(
  parameter int MIN_BIN      = 65,
  parameter int MAX_CONT_BIN = 120,
  parameter int MAX_DISC_BIN = 190
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       send,
  input  logic       mode,
  input  logic [9:0] freq,
  output logic [5:0] ref_out,
  output logic [5:0] want
);
  localparam logic MODE_CONTINUOUS = 1'b1;

  logic send_q, send_pulse;
  assign send_pulse = send && !send_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      send_q  <= 1'b0;
      ref_out <= '0;
      want    <= '0;
    end else begin
      send_q <= send;
      if (mode == MODE_CONTINUOUS) begin
        if (32'(freq) > MIN_BIN && 32'(freq) < MAX_CONT_BIN) ref_out <= 6'(32'(freq) - MIN_BIN);
        else if (32'(freq) >= MAX_CONT_BIN)                   ref_out <= 6'd63;
        else                                                  ref_out <= 6'd0;
      end else begin
        if (send_pulse) ref_out <= want;
        if (32'(freq) > MIN_BIN && 32'(freq) < MAX_DISC_BIN) want <= 6'((32'(freq) - MIN_BIN) >> 1);
        else if (32'(freq) >= MAX_DISC_BIN)                   want <= 6'd63;
        else                                                  want <= 6'd0;
      end
    end
  end
endmodule
