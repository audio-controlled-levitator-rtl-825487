// delta_term: d[n] = Kd * (e[n] - e[n-DELAY]), saturated to 9-bit signed.
//
// A discrete derivative whose division by the timestep is folded into Kd.
// Comparing with the error DELAY (=4) control steps back rather than the
// previous one slows the derivative and makes it less sensitive to noise. The
// error history is a shift register that advances once per i_start. Kd is
// KD_BASE plus a potentiometer offset from a gain_tuner, clamped to
// [KD_MIN, KD_MAX]. FSM as in the design description: IDLE -> CALC
// (difference) -> CALC_OVERFLOW (limit the difference) -> CALC2 (multiply) ->
// CALC_OVERFLOW2 (limit the product) -> DONE. Limits compare whole values.
//
// Timing: o_done pulses one cycle, with the new o_del_term, 5 cycles after
// i_start. Synchronous active-high reset clears history and outputs.
module delta_term
  import levitator_pkg::*;
#(
  parameter int KD_BASE      = 2,
  parameter int KD_MIN       = 0,
  parameter int KD_MAX       = 32,
  parameter int TUNING_MIN   = -5,
  parameter int TUNING_MAX   = 15,
  parameter int TUNER_BUFFER = 26,
  parameter int DELAY        = 4,
  parameter int DELTA_MIN    = -256,
  parameter int DELTA_MAX    = 255
) (
  input  logic       clk,
  input  logic       rst,
  input  error_t     i_error,
  input  logic       i_start,
  input  logic [9:0] i_Kd_tune,
  output logic       o_done,
  output term_t      o_del_term
);
  typedef enum logic [2:0] {S_IDLE, S_CALC, S_CALC_OVERFLOW, S_CALC2, S_CALC_OVERFLOW2, S_DONE} state_t;
  state_t state;

  logic signed [7:0]  offset;
  logic signed [7:0]  kd_q;
  error_t             hist_q [DELAY];
  term_t              diff_q;
  logic signed [16:0] raw_q;

  gain_tuner #(.OFFSET_BUFFER(TUNER_BUFFER)) u_tuner (
    .clk, .rst, .i_tune(i_Kd_tune),
    .i_offset_min(6'(TUNING_MIN)), .i_offset_max(6'(TUNING_MAX)),
    .o_offset(offset));

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      kd_q       <= 8'(KD_BASE);
      for (int i = 0; i < DELAY; i++) hist_q[i] <= '0;
      diff_q     <= '0;
      raw_q      <= '0;
      o_del_term <= '0;
      o_done     <= 1'b0;
    end else begin
      o_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          kd_q <= clamp_gain(32'(KD_BASE) + 32'(offset), 32'(KD_MIN), 32'(KD_MAX));
          if (i_start) state <= S_CALC;
        end
        S_CALC: begin
          diff_q    <= term_t'(i_error) - term_t'(hist_q[DELAY-1]);
          hist_q[0] <= i_error;
          for (int i = 1; i < DELAY; i++) hist_q[i] <= hist_q[i-1];
          state     <= S_CALC_OVERFLOW;
        end
        S_CALC_OVERFLOW: begin
          // |e| <= 63, so the 9-bit difference cannot leave -256..255; the
          // check is kept as a guard for other widths.
          diff_q <= sat_term(32'(diff_q));
          state  <= S_CALC2;
        end
        S_CALC2: begin
          raw_q <= 17'(kd_q) * 17'(diff_q);
          state <= S_CALC_OVERFLOW2;
        end
        S_CALC_OVERFLOW2: begin
          if (32'(raw_q) > DELTA_MAX)      o_del_term <= term_t'(DELTA_MAX);
          else if (32'(raw_q) < DELTA_MIN) o_del_term <= term_t'(DELTA_MIN);
          else                             o_del_term <= term_t'(raw_q);
          o_done <= 1'b1;
          state  <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
