// audio_pwm: W-bit PWM for the board's audio output.
//
// A W-bit ramp counts every clock; the level is sampled when the ramp is 0 and
// the output is high while the ramp is below it. At 104 MHz and W = 11 the
// PWM rate is 50.8 kHz, above the audible band. sd enables the amplifier.
module audio_pwm #(
  parameter int W = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] level,
  output logic         pwm,
  output logic         sd
);
  logic [W-1:0] ramp, level_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      ramp    <= '0;
      level_q <= '0;
      pwm     <= 1'b0;
    end else begin
      ramp <= ramp + 1'b1;
      if (ramp == '0) level_q <= level;
      pwm  <= level_q > ramp;
    end
  end
  assign sd = 1'b1;
endmodule
