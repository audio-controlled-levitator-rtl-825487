// psd_controller: sequencer of the discrete PD(+sum) height controller.
//
// In IDLE the reference and measured height are sampled every cycle; when
// either differs from its registered copy the loop runs once (the height
// changes at the IR sensor's ~60 Hz update, so the controller runs at about
// that rate). Steps, as in the design description:
//   CALC_ERROR  calc_error forms e[n] = r[n] - h[n]
//   CALC_PSD    proportional_term, sum_term and delta_term run in parallel;
//               the state is left once all three have reported done
//   CALC_OUTPUT command_calc is started
//   DONE        wait for the command, pulse o_done, back to IDLE
// The bias is a gain_tuner mapping the bias pot onto BIAS_MIN..BIAS_MAX
// (0..31); command_calc scales it by 10. The sum term is computed but only
// added to the command when USE_SUM is set (off by default, as in the final
// system). o_control_sig holds the last command until the next one.
//
// Timing: a full loop takes about 15 cycles from an input change to o_done.
// Synchronous active-high reset clears everything and returns to IDLE.
module psd_controller
  import levitator_pkg::*;
#(
  parameter bit USE_SUM     = 1'b0,
  parameter int BIAS_MIN    = 0,
  parameter int BIAS_MAX    = 31,
  parameter int BIAS_BUFFER = 17
) (
  input  logic              clk,
  input  logic              rst,
  input  height_t           i_ref,
  input  height_t           i_height,
  input  logic [9:0]        i_Kp_tune,
  input  logic [9:0]        i_Ki_tune,
  input  logic [9:0]        i_Kd_tune,
  input  logic [9:0]        i_bias_tune,
  output logic              o_done,
  output command_t          o_control_sig,
  output term_t             o_prop,
  output term_t             o_delta,
  output term_t             o_sum,
  output logic signed [7:0] o_bias
);
  typedef enum logic [2:0] {S_IDLE, S_CALC_ERROR, S_CALC_PSD, S_CALC_OUTPUT, S_DONE} state_t;
  state_t state;

  height_t ref_q, height_q;
  logic    error_start, psd_start, command_start;
  logic    error_done, p_done, s_done, d_done, command_done;
  logic    p_seen, s_seen, d_seen;
  error_t  error_sig;
  logic signed [7:0] kp_unused;

  calc_error u_error (
    .clk, .rst, .i_start(error_start), .i_ref(ref_q), .i_height(height_q),
    .o_done(error_done), .o_error(error_sig));

  proportional_term u_prop (
    .clk, .rst, .i_error(error_sig), .i_start(psd_start), .i_Kp_tune,
    .o_done(p_done), .o_prop_term(o_prop), .o_kp(kp_unused));

  sum_term u_sum (
    .clk, .rst, .i_error(error_sig), .i_start(psd_start), .i_Ki_tune,
    .o_done(s_done), .o_s_term(o_sum));

  delta_term u_delta (
    .clk, .rst, .i_error(error_sig), .i_start(psd_start), .i_Kd_tune,
    .o_done(d_done), .o_del_term(o_delta));

  gain_tuner #(.OFFSET_BUFFER(BIAS_BUFFER)) u_bias (
    .clk, .rst, .i_tune(i_bias_tune),
    .i_offset_min(6'(BIAS_MIN)), .i_offset_max(6'(BIAS_MAX)),
    .o_offset(o_bias));

  command_calc #(.USE_SUM(USE_SUM)) u_command (
    .clk, .rst, .i_start(command_start),
    .i_prop(o_prop), .i_sum(o_sum), .i_delta(o_delta), .i_bias(10'(o_bias)),
    .o_command(o_control_sig), .o_done(command_done));

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      ref_q         <= '0;
      height_q      <= '0;
      error_start   <= 1'b0;
      psd_start     <= 1'b0;
      command_start <= 1'b0;
      p_seen        <= 1'b0;
      s_seen        <= 1'b0;
      d_seen        <= 1'b0;
      o_done        <= 1'b0;
    end else begin
      error_start   <= 1'b0;
      psd_start     <= 1'b0;
      command_start <= 1'b0;
      o_done        <= 1'b0;
      unique case (state)
        S_IDLE: begin
          ref_q    <= i_ref;
          height_q <= i_height;
          if (ref_q != i_ref || height_q != i_height) begin
            error_start <= 1'b1;
            state       <= S_CALC_ERROR;
          end
        end
        S_CALC_ERROR: if (error_done) begin
          psd_start <= 1'b1;
          state     <= S_CALC_PSD;
        end
        S_CALC_PSD: begin
          if (p_done) p_seen <= 1'b1;
          if (s_done) s_seen <= 1'b1;
          if (d_done) d_seen <= 1'b1;
          if ((p_seen || p_done) && (s_seen || s_done) && (d_seen || d_done))
            state <= S_CALC_OUTPUT;
        end
        S_CALC_OUTPUT: begin
          p_seen        <= 1'b0;
          s_seen        <= 1'b0;
          d_seen        <= 1'b0;
          command_start <= 1'b1;
          state         <= S_DONE;
        end
        S_DONE: if (command_done) begin
          o_done <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
