// sum_term: s[n] = Ki * total[n], total[n] = total[n-1] + e[n].
//
// The sum (integral) term of the controller. The timestep is folded into Ki.
// Both the running total and the product are limited to the 9-bit signed
// range (-256..255) so that the integral cannot wind up without bound. Ki is
// KI_BASE plus a potentiometer offset, clamped to [KI_MIN, KI_MAX]. FSM as in
// the design description: IDLE -> CALC (add) -> CALC_OVERFLOW (limit total)
// -> CALC2 (multiply) -> CALC_OVERFLOW2 (limit product) -> DONE. In the
// complete system the term is computed but, by default, not added into the
// command (see command_calc), as the integral wound up too fast in practice.
//
// Timing: o_done pulses with the new o_s_term 5 cycles after i_start.
// Synchronous active-high reset clears the total.
module sum_term
  import levitator_pkg::*;
#(
  parameter int KI_BASE      = 1,
  parameter int KI_MIN       = 0,
  parameter int KI_MAX       = 31,
  parameter int TUNING_MIN   = -5,
  parameter int TUNING_MAX   = 5,
  parameter int TUNER_BUFFER = 51
) (
  input  logic       clk,
  input  logic       rst,
  input  error_t     i_error,
  input  logic       i_start,
  input  logic [9:0] i_Ki_tune,
  output logic       o_done,
  output term_t      o_s_term
);
  typedef enum logic [2:0] {S_IDLE, S_CALC, S_CALC_OVERFLOW, S_CALC2, S_CALC_OVERFLOW2, S_DONE} state_t;
  state_t state;

  logic signed [7:0]  offset;
  logic signed [7:0]  ki_q;
  logic signed [10:0] total_raw_q;   // wide enough for 255 + 63
  term_t              total_q;
  logic signed [16:0] raw_q;

  gain_tuner #(.OFFSET_BUFFER(TUNER_BUFFER)) u_tuner (
    .clk, .rst, .i_tune(i_Ki_tune),
    .i_offset_min(6'(TUNING_MIN)), .i_offset_max(6'(TUNING_MAX)),
    .o_offset(offset));

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      ki_q        <= 8'(KI_BASE);
      total_raw_q <= '0;
      total_q     <= '0;
      raw_q       <= '0;
      o_s_term    <= '0;
      o_done      <= 1'b0;
    end else begin
      o_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          ki_q <= clamp_gain(32'(KI_BASE) + 32'(offset), 32'(KI_MIN), 32'(KI_MAX));
          if (i_start) state <= S_CALC;
        end
        S_CALC: begin
          total_raw_q <= 11'(total_q) + 11'(i_error);
          state       <= S_CALC_OVERFLOW;
        end
        S_CALC_OVERFLOW: begin
          total_q <= sat_term(32'(total_raw_q));
          state   <= S_CALC2;
        end
        S_CALC2: begin
          raw_q <= 17'(ki_q) * 17'(total_q);
          state <= S_CALC_OVERFLOW2;
        end
        S_CALC_OVERFLOW2: begin
          o_s_term <= sat_term(32'(raw_q));
          o_done   <= 1'b1;
          state    <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
