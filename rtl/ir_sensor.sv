// ir_sensor: converts the IR distance sensor's ADC code into a 6-bit height.
//
// The sensor's voltage falls roughly exponentially with distance, so the
// curve is approximated by four straight pieces chosen by the ADC code:
//   distance_cm = floor(ALPHA_k * ADC / 256) + GAMMA_k
//   k = 1 for ADC >= 669, 2 for 481..668, 3 for 355..480, 4 below 355.
// The pieces meet at the break points. The ball height measured from the
// tower bottom is h_cm = 60 - distance_cm, clamped here to 15..50 cm, and the
// controller height is h6 = (h_cm - 15) * BETA / 128, so 15 cm maps to 0 and
// 50 cm (10 cm below the sensor) to 63. Only the middle of the tower, where
// the fan dynamics are roughly linear, is used. The coefficients follow the
// design's calibration; the clamp is this design's choice.
//
// Timing: three register stages, o_height follows i_ir after 3 cycles.
// Synchronous active-high reset clears the pipeline.
module ir_sensor #(
  parameter int ALPHA1 = -6,
  parameter int ALPHA2 = -11,
  parameter int ALPHA3 = -27,
  parameter int ALPHA4 = -57,
  parameter int GAMMA1 = 34,
  parameter int GAMMA2 = 47,
  parameter int GAMMA3 = 77,
  parameter int GAMMA4 = 118,
  parameter int BREAK1 = 669,
  parameter int BREAK2 = 481,
  parameter int BREAK3 = 355,
  parameter int BETA   = 234
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] i_ir,
  output logic [5:0] o_height,
  output logic [6:0] o_height_cm
);
  logic signed [19:0] prod_q;
  logic signed [8:0]  gamma_q;
  logic        [6:0]  hcm_q;

  logic signed [19:0] alpha_sel;
  logic signed [8:0]  gamma_sel;
  logic signed [19:0] dist_cm, hcm;

  always_comb begin
    if (32'(i_ir) >= BREAK1)      begin alpha_sel = 20'(ALPHA1); gamma_sel = 9'(GAMMA1); end
    else if (32'(i_ir) >= BREAK2) begin alpha_sel = 20'(ALPHA2); gamma_sel = 9'(GAMMA2); end
    else if (32'(i_ir) >= BREAK3) begin alpha_sel = 20'(ALPHA3); gamma_sel = 9'(GAMMA3); end
    else                          begin alpha_sel = 20'(ALPHA4); gamma_sel = 9'(GAMMA4); end
    dist_cm = (prod_q >>> 8) + 20'(gamma_q);
    hcm  = 20'sd60 - dist_cm;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prod_q   <= '0;
      gamma_q  <= '0;
      hcm_q    <= 7'd15;
      o_height <= '0;
    end else begin
      prod_q   <= alpha_sel * $signed({10'd0, i_ir});
      gamma_q  <= gamma_sel;
      hcm_q    <= (hcm < 20'sd15) ? 7'd15 : (hcm > 20'sd50) ? 7'd50 : 7'(hcm);
      o_height <= 6'((32'(hcm_q) - 15) * BETA / 128);
    end
  end

  assign o_height_cm = hcm_q;
endmodule
