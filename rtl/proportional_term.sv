// proportional_term: p[n] = Kp * e[n], saturated to the 9-bit signed range.
//
// The gain is KP_BASE plus an offset from a gain_tuner driven by the Kp
// potentiometer, clamped to [KP_MIN, KP_MAX]; it is refreshed every cycle
// while the FSM is idle. FSM states follow the design description: IDLE ->
// CALC (multiply) -> CALC_OVERFLOW (limit to PROP_MIN..PROP_MAX) -> DONE.
// This design limits by comparing the whole product with the bounds, rather
// than by inspecting the sign bit of its low nine bits, so that products such
// as 10*60 saturate instead of wrapping.
//
// Timing: o_done pulses for one cycle 3 cycles after i_start, together with
// the new o_prop_term. The tuner adds 3 cycles from a pot change to the gain.
// Synchronous active-high reset clears the output and restores KP_BASE.
module proportional_term
  import levitator_pkg::*;
#(
  parameter int KP_BASE      = 2,
  parameter int KP_MIN       = 0,
  parameter int KP_MAX       = 31,
  parameter int TUNING_MIN   = -5,
  parameter int TUNING_MAX   = 5,
  parameter int TUNER_BUFFER = 51,
  parameter int PROP_MIN     = -256,
  parameter int PROP_MAX     = 255
) (
  input  logic              clk,
  input  logic              rst,
  input  error_t            i_error,
  input  logic              i_start,
  input  logic [9:0]        i_Kp_tune,
  output logic              o_done,
  output term_t             o_prop_term,
  output logic signed [7:0] o_kp
);
  typedef enum logic [1:0] {S_IDLE, S_CALC, S_CALC_OVERFLOW, S_DONE} state_t;
  state_t state;

  logic signed [7:0]  offset;
  logic signed [7:0]  kp_q;
  logic signed [15:0] raw_q;

  gain_tuner #(.OFFSET_BUFFER(TUNER_BUFFER)) u_tuner (
    .clk, .rst, .i_tune(i_Kp_tune),
    .i_offset_min(6'(TUNING_MIN)), .i_offset_max(6'(TUNING_MAX)),
    .o_offset(offset));

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      kp_q        <= 8'(KP_BASE);
      raw_q       <= '0;
      o_prop_term <= '0;
      o_done      <= 1'b0;
    end else begin
      o_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          kp_q <= clamp_gain(32'(KP_BASE) + 32'(offset), 32'(KP_MIN), 32'(KP_MAX));
          if (i_start) state <= S_CALC;
        end
        S_CALC: begin
          raw_q <= 16'(kp_q) * 16'(i_error);
          state <= S_CALC_OVERFLOW;
        end
        S_CALC_OVERFLOW: begin
          if (32'(raw_q) > PROP_MAX)      o_prop_term <= term_t'(PROP_MAX);
          else if (32'(raw_q) < PROP_MIN) o_prop_term <= term_t'(PROP_MIN);
          else                            o_prop_term <= term_t'(raw_q);
          o_done <= 1'b1;
          state  <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign o_kp = kp_q;
endmodule
