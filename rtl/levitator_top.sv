// levitator_top: audio-controlled ping-pong-ball levitator.
//
// A voice or tone picked up by a PDM microphone sets the height at which a
// fan holds a ball in a tube. Two clock domains:
//
// 104 MHz (clk_104), audio: audio_interface turns the PDM stream into 14-bit
//   PCM at 10.3 kHz. Samples go into a 4096-entry circular frame RAM and a
//   1024-entry trace RAM for display, and out as 11-bit PWM audio. Once per
//   video frame bram_to_fft streams the last 4096 samples to an external
//   4096-point FFT core (AXI-stream ports fft_in_*, configuration fft_cfg_*,
//   scaling from sw[12:7]). The core's real output for bins 0..1023
//   (fft_out_*) is written into a result RAM read from the other domain.
//
// 65 MHz (clk_65), video and control: xvga makes 1024x768 timing. The
//   histogram reads the result RAM along the raster; negative values are
//   cleared, and the same stream feeds freq_det, which keeps the last bin
//   above the threshold: the pitch. reference_gen turns the pitch into a 6-bit
//   height reference (sw15: 1 continuous, 0 discrete with btnd as "send");
//   sw6 chooses it or sw[5:0] as the controller reference. adc_reader polls
//   an MCP3008 over SPI once per ms: channel 0 is the IR distance sensor,
//   converted to a 6-bit height by ir_sensor, channels 1..4 the Kp, Ki, Kd and
//   bias pots. psd_controller computes the fan command whenever reference or
//   height change, and pwm_generator drives the fan at 1 kHz. The screen shows
//   the audio trace, the spectrum, the pitch bar between the range bars, and
//   (sw13) a square at the ball height (sw14: at the reference instead). The
//   7-segment display shows, with sw14 set, {received, sent, detected}
//   reference, otherwise {Hz, IR height, reference}.
//
// The external FFT core, clock generation, microphone, ADC chip, sensor and
// fan driver are outside this design; their signals are ports. btnc is the
// reset (synchronised into each domain). The ADC logic runs on clk_65 with a
// clock enable every 32 cycles (SPI clock 1.02 MHz). Video layers have
// pipelines of 1 to 4 cycles; sync and blank are delayed by 4 cycles, so some
// layers sit up to 3 pixels left of their nominal place, which is invisible
// at this scale.
module levitator_top
  import levitator_pkg::*;
#(
  parameter int DEBOUNCE_DELAY = 1000000,
  parameter int ADC_START_DIV  = 65000
) (
  input  logic        clk_104,
  input  logic        clk_65,
  input  logic [15:0] sw,
  input  logic        btnc,
  input  logic        btnd,
  // microphone
  input  logic        m_data,
  output logic        m_clk,
  output logic        m_lrsel,
  // FFT core
  output logic [31:0] fft_in_tdata,
  output logic        fft_in_tvalid,
  output logic        fft_in_tlast,
  input  logic        fft_in_tready,
  output logic [15:0] fft_cfg_tdata,
  output logic        fft_cfg_tvalid,
  input  logic        fft_event_tlast_missing,
  input  logic [31:0] fft_out_tdata,
  input  logic        fft_out_tvalid,
  input  logic [11:0] fft_out_tuser,
  // MCP3008 ADC
  output logic        adc_sck,
  output logic        adc_mosi,
  output logic        adc_cs_n,
  input  logic        adc_miso,
  // fan and audio out
  output logic        fan_pwm,
  output logic        aud_pwm,
  output logic        aud_sd,
  // VGA
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  // 7-segment display
  output logic [7:0]  seg,
  output logic [7:0]  an
);
  // ------------------------------------------------------------------ resets
  logic rst_104, rst_65;
  synchronizer u_rst_104 (.clk(clk_104), .in(btnc), .out(rst_104));
  synchronizer u_rst_65  (.clk(clk_65),  .in(btnc), .out(rst_65));

  // ------------------------------------------------------ switches, buttons
  logic [15:0] sw_c;
  logic        btnd_c;
  debounce #(.DELAY(DEBOUNCE_DELAY), .COUNT(17)) u_debounce (
    .clk(clk_65), .rst(rst_65), .noisy({sw, btnd}), .clean({sw_c, btnd_c}));

  logic mode_continuous;
  assign mode_continuous = sw_c[15];

  // ============================================================ 104 MHz side
  logic [13:0] sample;
  logic        sample_valid;

  audio_interface u_audio (
    .clk(clk_104), .rst(rst_104), .m_data, .m_clk,
    .sample, .sample_valid);
  assign m_lrsel = 1'b0;

  audio_pwm #(.W(11)) u_audio_pwm (
    .clk(clk_104), .rst(rst_104), .level(sample[13:3]), .pwm(aud_pwm), .sd(aud_sd));

  // circular frame buffer: head points at the oldest sample
  logic [11:0] frame_head, frame_raddr;
  logic [15:0] frame_rdata;
  always_ff @(posedge clk_104) begin
    if (rst_104)           frame_head <= '0;
    else if (sample_valid) frame_head <= frame_head + 1'b1;
  end

  dual_port_ram #(.DEPTH(4096), .WIDTH(16)) u_frame_ram (
    .clka(clk_104), .wea(sample_valid), .addra(frame_head), .dina({sample, 2'b00}),
    .clkb(clk_104), .addrb(frame_raddr), .doutb(frame_rdata));

  // trace buffer for the waveform display
  logic [9:0]  trace_waddr, trace_raddr;
  logic [15:0] trace_rdata;
  always_ff @(posedge clk_104) begin
    if (rst_104)           trace_waddr <= '0;
    else if (sample_valid) trace_waddr <= trace_waddr + 1'b1;
  end

  dual_port_ram #(.DEPTH(1024), .WIDTH(16)) u_trace_ram (
    .clka(clk_104), .wea(sample_valid), .addra(trace_waddr), .dina({sample, 2'b00}),
    .clkb(clk_65), .addrb(trace_raddr), .doutb(trace_rdata));

  // one frame per video frame: vsync falling edge, seen in this domain
  logic vsync_65, vsync_104, vsync_104_q, frame_start;
  synchronizer u_vsync_sync (.clk(clk_104), .in(vsync_65), .out(vsync_104));
  always_ff @(posedge clk_104) vsync_104_q <= vsync_104;
  assign frame_start = vsync_104_q && !vsync_104;

  bram_to_fft #(.ADDR_W(12)) u_bram_to_fft (
    .clk(clk_104), .rst(rst_104), .head(frame_head), .addr(frame_raddr), .data(frame_rdata),
    .start(frame_start), .last_missing(fft_event_tlast_missing),
    .frame_tdata(fft_in_tdata), .frame_tvalid(fft_in_tvalid), .frame_tlast(fft_in_tlast),
    .frame_tready(fft_in_tready));

  // FFT configuration: forward transform, scaling schedule from sw[12:7]
  logic [5:0] scale_q1, scale_q2;   // quasi-static switches, double registered
  always_ff @(posedge clk_104) begin
    scale_q1 <= sw_c[12:7];
    scale_q2 <= scale_q1;
  end
  assign fft_cfg_tdata  = {2'b00, 5'b11100, scale_q2, 2'b00, 1'b1};
  assign fft_cfg_tvalid = fft_in_tvalid;

  // FFT result store: real part of bins 0..1023
  logic [9:0]  hist_addr;
  logic [15:0] hist_rdata;
  dual_port_ram #(.DEPTH(1024), .WIDTH(16)) u_fft_ram (
    .clka(clk_104), .wea(fft_out_tvalid && fft_out_tuser[11:10] == 2'b00),
    .addra(fft_out_tuser[9:0]), .dina(fft_out_tdata[15:0]),
    .clkb(clk_65), .addrb(hist_addr), .doutb(hist_rdata));

  // ============================================================= 65 MHz side
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  xvga u_xvga (.clk(clk_65), .rst(rst_65), .hcount, .vcount, .hsync, .vsync, .blank);
  assign vsync_65 = vsync;

  // spectrum read-out: clear negative values, align the bin index
  logic [14:0] spec_data;
  logic [9:0]  hist_addr_q1, hist_addr_q2;
  always_ff @(posedge clk_65) begin
    hist_addr_q1 <= hist_addr;
    hist_addr_q2 <= hist_addr_q1;
    spec_data    <= hist_rdata[15] ? '0 : hist_rdata[14:0];
  end

  logic [1:0] range_sel;
  assign range_sel = {1'b1, mode_continuous};

  pixel_t hist_pixel, sound_pixel, bar_pixel, ball_pixel;

  histogram u_histogram (
    .clk(clk_65), .hcount, .vcount, .blank, .range_sel,
    .vaddr(hist_addr), .vdata(spec_data), .pixel(hist_pixel));

  logic [9:0] pitch_bin;
  freq_det u_freq_det (
    .clk(clk_65), .rst(rst_65), .addr(hist_addr_q2), .data(spec_data), .valid(1'b1),
    .frequency(pitch_bin));

  logic [5:0] reference, want;
  reference_gen u_refgen (
    .clk(clk_65), .rst(rst_65), .send(btnd_c), .mode(mode_continuous), .freq(pitch_bin),
    .ref_out(reference), .want);

  logic [11:0] hertz;
  bin_to_hz u_bin_to_hz (.clk(clk_65), .bin(pitch_bin), .hertz);

  sound_display u_sound (
    .clk(clk_65), .data(trace_rdata[15:6]), .hcount, .vcount, .blank,
    .vaddr(trace_raddr), .pixel(sound_pixel));

  freq_disp u_freq_disp (
    .clk(clk_65), .bin(pitch_bin), .hcount, .vcount, .blank, .range_sel,
    .mode(mode_continuous), .pixel(bar_pixel));

  // controller reference: pitch or switches
  height_t ctrl_ref, ir_height;
  assign ctrl_ref = sw_c[6] ? reference : sw_c[5:0];

  ball_marker u_ball (
    .clk(clk_65), .enable(sw_c[13]), .mode(mode_continuous),
    .track(sw_c[14] ? ctrl_ref : ir_height), .hcount, .vcount, .pixel(ball_pixel));

  // VGA output
  logic [3:0] hsync_d, vsync_d, blank_d;
  pixel_t     pix;
  always_ff @(posedge clk_65) begin
    hsync_d <= {hsync_d[2:0], hsync};
    vsync_d <= {vsync_d[2:0], vsync};
    blank_d <= {blank_d[2:0], blank};
    pix     <= hist_pixel | sound_pixel | bar_pixel | ball_pixel;
  end
  assign vga_r  = blank_d[3] ? 4'h0 : {4{pix[2]}};
  assign vga_g  = blank_d[3] ? 4'h0 : {4{pix[1]}};
  assign vga_b  = blank_d[3] ? 4'h0 : {4{pix[0]}};
  assign vga_hs = hsync_d[3];
  assign vga_vs = vsync_d[3];

  // 7-segment display
  logic [31:0] display_word;
  assign display_word = sw_c[14] ? {2'b00, ctrl_ref, 8'h00, 2'b00, reference, 2'b00, want}
                                 : {4'h0, hertz, 2'b00, ir_height, 2'b00, ctrl_ref};
  display_8hex u_display (.clk(clk_65), .rst(rst_65), .data(display_word), .seg(seg[6:0]), .strobe(an));
  assign seg[7] = 1'b1;

  // ADC pacing: clock enable every 32 cycles, a read every ADC_START_DIV cycles
  logic [4:0]  adc_div;
  logic [16:0] adc_start_cnt;
  logic        adc_ce, adc_start;
  always_ff @(posedge clk_65) begin
    if (rst_65) begin
      adc_div       <= '0;
      adc_start_cnt <= '0;
      adc_start     <= 1'b0;
    end else begin
      adc_div   <= adc_div + 1'b1;
      adc_start <= 1'b0;
      if (32'(adc_start_cnt) == ADC_START_DIV - 1) begin
        adc_start_cnt <= '0;
        adc_start     <= 1'b1;
      end else begin
        adc_start_cnt <= adc_start_cnt + 1'b1;
      end
    end
  end
  assign adc_ce = &adc_div;

  logic       miso_s;
  logic [9:0] adc_ch [5];
  logic       adc_done;
  synchronizer u_miso_sync (.clk(clk_65), .in(adc_miso), .out(miso_s));

  adc_reader #(.CHANNELS(5)) u_adc (
    .clk(clk_65), .ce(adc_ce), .rst(rst_65), .start(adc_start), .miso(miso_s),
    .mosi(adc_mosi), .sck(adc_sck), .cs_n(adc_cs_n), .channels(adc_ch), .done(adc_done));

  logic [6:0] height_cm;
  ir_sensor u_ir (.clk(clk_65), .rst(rst_65), .i_ir(adc_ch[0]), .o_height(ir_height),
                  .o_height_cm(height_cm));

  command_t control_sig;
  term_t    prop_term, delta_term_v, sum_term_v;
  logic signed [7:0] bias_v;
  logic     psd_done;
  psd_controller u_psd (
    .clk(clk_65), .rst(rst_65), .i_ref(ctrl_ref), .i_height(ir_height),
    .i_Kp_tune(adc_ch[1]), .i_Ki_tune(adc_ch[2]), .i_Kd_tune(adc_ch[3]), .i_bias_tune(adc_ch[4]),
    .o_done(psd_done), .o_control_sig(control_sig),
    .o_prop(prop_term), .o_delta(delta_term_v), .o_sum(sum_term_v), .o_bias(bias_v));

  pwm_generator u_fan_pwm (.clk(clk_65), .rst(rst_65), .i_control(control_sig), .o_pwm(fan_pwm));
endmodule
