// audio_interface: PDM microphone to 14-bit PCM at about 10 kHz.
//
// A counter divides the 104 MHz clock by MIC_DIV to make the microphone clock
// (104/42 = 2.476 MHz) and a one-cycle strobe at its rising edge, where the
// PDM bit is sampled. Each bit becomes a signed 8-bit +1 (for 1) or -1 (for
// 0) and enters a 5-stage CIC decimator with ratio 15 (2.476 MHz -> 165 kHz).
// The CIC's signed 8-bit output is turned into offset-binary 12 bits and
// averaged 16 at a time by oversample16 (-> 10.3 kHz, 14 bits unsigned).
// MIC_DIV = 42 is this design's choice: with it FFT bins 65 and 190 sit at
// 164 Hz and 479 Hz, the ends of the pitch ranges.
//
// Timing: sample_valid pulses for one clk cycle per output sample, every
// MIC_DIV*15*16 = 10080 cycles. Synchronous active-high reset.
module audio_interface #(
  parameter int MIC_DIV        = 42,
  parameter int CIC_DECIMATION = 15,
  parameter int CIC_WIDTH      = 21
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        m_data,
  output logic        m_clk,
  output logic [13:0] sample,
  output logic        sample_valid
);
  localparam int DW = $clog2(MIC_DIV);

  logic [DW-1:0]     div_cnt;
  logic              mic_rise;
  logic signed [7:0] pdm_value;
  logic signed [7:0] cic_out;
  logic              cic_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt  <= '0;
      m_clk    <= 1'b0;
      mic_rise <= 1'b0;
    end else begin
      mic_rise <= 1'b0;
      if (div_cnt == DW'(MIC_DIV - 1)) begin
        div_cnt  <= '0;
        m_clk    <= 1'b1;
        mic_rise <= 1'b1;
      end else begin
        div_cnt <= div_cnt + 1'b1;
        if (div_cnt == DW'(MIC_DIV / 2 - 1)) m_clk <= 1'b0;
      end
    end
  end

  assign pdm_value = m_data ? 8'sd1 : -8'sd1;

  cic_decimator #(.STAGES(5), .WIDTH(CIC_WIDTH), .IN_W(8), .OUT_W(8)) u_cic (
    .clk, .rst, .en(mic_rise), .decimation_ratio(16'(CIC_DECIMATION)),
    .d_in(pdm_value), .d_out(cic_out), .d_valid(cic_valid));

  oversample16 #(.IN_W(12), .OUT_W(14)) u_os16 (
    .clk, .rst, .sample({~cic_out[7], cic_out[6:0], 4'b0000}), .eoc(cic_valid),
    .oversample(sample), .done(sample_valid));
endmodule
