// pwm_generator: fan PWM from the signed controller command.
//
// A prescaler counts CLK_MAX clock cycles; each time it wraps, a duty counter
// steps through 0..COMMAND_MAX-1. The output is high while the duty counter is
// below the command, so a command <= 0 gives 0 % duty, COMMAND_MAX/2 about
// 50 % and COMMAND_MAX or more 100 %. With a 65 MHz clock,
// CLK_MAX = 65e6 / (1 kHz * COMMAND_MAX) = 108 for the default COMMAND_MAX of
// 600, giving a 1.003 kHz PWM period of CLK_MAX*COMMAND_MAX cycles. CLK_MAX is
// a parameter of its own (no divider): change both together. Both numbers
// follow the design description.
//
// Timing: o_pwm is registered, one cycle after the counters. Synchronous
// active-high reset clears the counters and drives the output low.
module pwm_generator
  import levitator_pkg::*;
#(
  parameter int COMMAND_MAX = 600,
  parameter int CLK_MAX     = 108
) (
  input  logic     clk,
  input  logic     rst,
  input  command_t i_control,
  output logic     o_pwm
);
  localparam int CW = $clog2(CLK_MAX);
  localparam int PW = $clog2(COMMAND_MAX);

  logic [CW-1:0] clk_cnt;
  logic [PW-1:0] duty_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_cnt  <= '0;
      duty_cnt <= '0;
      o_pwm    <= 1'b0;
    end else begin
      if (clk_cnt == CW'(CLK_MAX - 1)) begin
        clk_cnt  <= '0;
        duty_cnt <= (duty_cnt == PW'(COMMAND_MAX - 1)) ? '0 : duty_cnt + 1'b1;
      end else begin
        clk_cnt <= clk_cnt + 1'b1;
      end
      o_pwm <= (i_control > 0) && (32'(duty_cnt) < 32'(i_control));
    end
  end
endmodule
