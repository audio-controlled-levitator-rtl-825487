// calc_error: error signal e[n] = r[n] - h[n] of the height controller.
//
// r[n] and h[n] are unsigned 6-bit (0..63); they are zero-extended to 7-bit
// signed and subtracted, so e[n] is -63..63 and cannot overflow. A small
// three-state FSM (IDLE, CALC, DONE) as in the design description: the inputs
// are captured on i_start, the difference is formed in CALC together with a
// one-cycle o_done pulse, and DONE returns to IDLE.
//
// Timing: o_done and the new o_error appear 2 cycles after i_start.
// Synchronous active-high reset clears the registers and the FSM.
module calc_error
  import levitator_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    i_start,
  input  height_t i_ref,
  input  height_t i_height,
  output logic    o_done,
  output error_t  o_error
);
  typedef enum logic [1:0] {S_IDLE, S_CALC, S_DONE} state_t;
  state_t state;
  error_t ref_q, height_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      ref_q    <= '0;
      height_q <= '0;
      o_error  <= '0;
      o_done   <= 1'b0;
    end else begin
      o_done <= 1'b0;
      unique case (state)
        S_IDLE: if (i_start) begin
          ref_q    <= error_t'({1'b0, i_ref});
          height_q <= error_t'({1'b0, i_height});
          state    <= S_CALC;
        end
        S_CALC: begin
          o_error <= ref_q - height_q;
          o_done  <= 1'b1;
          state   <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
