// command_calc: controller output u[n] = p[n] + d[n] + BIAS_SCALE*b[n] (+ s[n]).
//
// The bias b[n] is the 0..31 bias-pot setting, scaled by 10 to 0..310 so that
// it sets the fan's operating point. The sum term s[n] is added only when
// USE_SUM is set; by default it is left out, as in the final tuned system.
// The additions are spread over sequential states (as the design description
// does, one addition per cycle): IDLE -> CALC2 -> CALC3 -> DONE. The result is
// limited to the 11-bit signed range, which only matters with USE_SUM set
// (255*3 + 310 = 1075).
//
// Timing: o_done pulses with the new o_command 3 cycles after i_start.
// Synchronous active-high reset clears the output.
module command_calc
  import levitator_pkg::*;
#(
  parameter bit USE_SUM    = 1'b0,
  parameter int BIAS_SCALE = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              i_start,
  input  term_t             i_prop,
  input  term_t             i_sum,
  input  term_t             i_delta,
  input  logic signed [9:0] i_bias,
  output command_t          o_command,
  output logic              o_done
);
  typedef enum logic [1:0] {S_IDLE, S_CALC2, S_CALC3, S_DONE} state_t;
  state_t state;

  logic signed [12:0] pd_q, bias_q, acc_q, total;

  assign total = USE_SUM ? acc_q + 13'(i_sum) : acc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      pd_q      <= '0;
      bias_q    <= '0;
      acc_q     <= '0;
      o_command <= '0;
      o_done    <= 1'b0;
    end else begin
      o_done <= 1'b0;
      unique case (state)
        S_IDLE: if (i_start) begin
          pd_q   <= 13'(i_prop) + 13'(i_delta);
          bias_q <= 13'(i_bias) * 13'(BIAS_SCALE);
          state  <= S_CALC2;
        end
        S_CALC2: begin
          acc_q <= pd_q + bias_q;
          state <= S_CALC3;
        end
        S_CALC3: begin
          if (total > 13'sd1023)       o_command <= command_t'(1023);
          else if (total < -13'sd1024) o_command <= command_t'(-1024);
          else                         o_command <= command_t'(total);
          o_done <= 1'b1;
          state  <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
