// End-to-end testbench for levitator_top with every parameter at its default
// (full size: 1 ms ADC polling, 15 ms switch debouncing, real video timing).
//
// Models around the design: a first-order sigma-delta PDM source playing a
// 250 Hz tone into the microphone input, the FFT core (fft_model: a
// synthetic spectrum with a peak at a bin set here), and an MCP3008 ADC
// (mcp3008_model) whose channel codes are set here for the IR sensor and
// the four tuning pots.
//
// Phases: (A) continuous mode, pitch at bin 100 -> reference 35, IR code
// 500 -> height 36, Kp 2, Kd 0, bias 16 -> command 158; (B) pitch above
// the range -> reference 63, IR code 0 -> height 0, Kp 7 -> proportional
// term saturates at 255, command 415; (C) switch reference 0, IR code 1000
// -> height 63, bias 0 -> command -256, fan off; (D) discrete mode, pitch
// bin 150 -> candidate 42, send button -> reference 42.
// Everything is observed at the top's ports: the pitch (as Hz), IR height
// and references are read back by decoding the 7-segment display, the
// controller command by measuring the fan PWM over one full 64800-cycle
// period, ADC conversions by counting chip selects. Expected values are
// worked out here from the formulas (tuner, IR linearisation, controller).
// The FFT input frames are checked for continuity (each frame is the
// previous one moved on by about 172 samples, one video frame of audio) and
// for the 250 Hz tone (zero crossings over the newest 1000 samples). Each
// mechanism is counted and a failure is counted for any that never happened.
module tb_levitator_top;
  timeunit 1ns;
  timeprecision 1ps;
  import levitator_pkg::*;

  logic clk_104 = 0, clk_65 = 0;
  always #4.8077 clk_104 = ~clk_104;
  always #7.6923 clk_65  = ~clk_65;
  int checks = 0, failures = 0;

  logic [15:0] sw;
  logic btnc, btnd, m_data, m_clk, m_lrsel;
  logic [31:0] fft_in_tdata, fft_out_tdata;
  logic fft_in_tvalid, fft_in_tlast, fft_in_tready, fft_cfg_tvalid, fft_out_tvalid;
  logic [15:0] fft_cfg_tdata;
  logic [11:0] fft_out_tuser;
  logic adc_sck, adc_mosi, adc_cs_n, adc_miso, fan_pwm, aud_pwm, aud_sd, vga_hs, vga_vs;
  logic [3:0] vga_r, vga_g, vga_b;
  logic [7:0] seg, an;

  levitator_top dut (
    .clk_104, .clk_65, .sw, .btnc, .btnd, .m_data, .m_clk, .m_lrsel,
    .fft_in_tdata, .fft_in_tvalid, .fft_in_tlast, .fft_in_tready,
    .fft_cfg_tdata, .fft_cfg_tvalid, .fft_event_tlast_missing(1'b0),
    .fft_out_tdata, .fft_out_tvalid, .fft_out_tuser,
    .adc_sck, .adc_mosi, .adc_cs_n, .adc_miso, .fan_pwm, .aud_pwm, .aud_sd,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .seg, .an);

  // ---------------------------------------------------------------- models
  int peak_bin = 100;
  fft_model fft (.clk(clk_104), .rst(btnc), .s_tdata(fft_in_tdata), .s_tvalid(fft_in_tvalid),
    .s_tlast(fft_in_tlast), .s_tready(fft_in_tready), .m_tdata(fft_out_tdata),
    .m_tvalid(fft_out_tvalid), .m_tuser(fft_out_tuser), .peak_bin(peak_bin),
    .peak_value(6000), .stall_enable(1'b1));

  logic [9:0] adc_values [8];
  mcp3008_model adc (.sck(adc_sck), .cs_n(adc_cs_n), .mosi(adc_mosi), .miso(adc_miso), .value(adc_values));

  // PDM source: 250 Hz tone, amplitude 0.5, first-order sigma-delta
  real pdm_integ = 0.0, pdm_t = 0.0;
  always @(posedge m_clk) begin
    real x;
    x = 0.5 * $sin(2.0 * 3.14159265 * 250.0 * pdm_t);
    pdm_t += 42.0 / 104.0e6;
    m_data <= (pdm_integ >= 0.0);
    pdm_integ += x - ((pdm_integ >= 0.0) ? 1.0 : -1.0);
  end

  // -------------------------------------------------------- reference model
  function automatic int tuner(int adc_code, int lo, int hi, int b); return lo + ((adc_code + b) * (hi - lo)) / 1024; endfunction
  function automatic int clampi(int v, int lo, int hi); return v < lo ? lo : (v > hi ? hi : v); endfunction
  function automatic int ir_height(int a);
    int al, g, d, h;
    if (a >= 669) begin al = -6; g = 34; end
    else if (a >= 481) begin al = -11; g = 47; end
    else if (a >= 355) begin al = -27; g = 77; end
    else begin al = -57; g = 118; end
    d = int'($floor(real'(al) * a / 256.0)) + g;
    h = clampi(60 - d, 15, 50);
    return ((h - 15) * 234) / 128;
  endfunction
  function automatic int command(int r, int h);   // Kd pot at 0 -> Kd 0
    int kp, bias, p;
    kp = clampi(2 + tuner(int'(adc_values[1]), -5, 5, 51), 0, 31);
    bias = tuner(int'(adc_values[4]), 0, 31, 17);
    p = clampi(kp * (r - h), -256, 255);
    return p + 10 * bias;
  endfunction

  // ------------------------------------------------------- mechanism counts
  int n_frames = 0, n_frame_ok = 0, n_results = 0, n_adc = 0, n_psd = 0, n_sat = 0;
  int n_fan_off = 0, n_fan_on = 0, n_cont = 0, n_disc = 0, n_send = 0, n_vsync = 0;
  int n_red = 0, n_green = 0, n_blue = 0, n_magenta = 0, n_digits = 0, n_tone_ok = 0;
  int n_aud_toggles = 0;

  // FFT input frames: consecutive frames must overlap, shifted by the number
  // of samples taken in one video frame (104e6/1344/806*... ~ 171.7 samples)
  logic [15:0] prev_frame [4096];
  int frames_seen = 0;
  always @(fft.frames_in) begin
    int best, valid_n, crossings;
    bit hi;
    n_frames++;
    best = -1;
    if (frames_seen >= 2) begin
      for (int s = 150; s <= 200 && best < 0; s++) begin
        int bad;
        bad = 0;
        for (int k = 4096 - 1000; k < 4096 - s; k++) if (fft.frame[k] != prev_frame[k + s]) bad++;
        if (bad <= 1) best = s;
      end
      checks++;
      if (best < 0) begin failures++; $display("FAIL frame %0d does not continue the previous one", n_frames); end
      else n_frame_ok++;
      // the 250 Hz tone: zero crossings over the newest 1000 samples (97 ms)
      valid_n = 1000;
      crossings = 0;
      hi = !fft.frame[4096 - valid_n][15];
      for (int k = 4096 - valid_n; k < 4096; k++) begin
        logic signed [15:0] v;
        v = fft.frame[k];
        if (hi && v < -16'sd2000) begin hi = 0; crossings++; end
        else if (!hi && v > 16'sd2000) begin hi = 1; crossings++; end
      end
      if (frames_seen >= 7) begin
        checks++;
        if (crossings < 44 || crossings > 53) begin failures++; $display("FAIL tone: %0d crossings in 1000 samples", crossings); end
        else n_tone_ok++;
      end
    end
    frames_seen++;
    for (int k = 0; k < 4096; k++) prev_frame[k] = fft.frame[k];
  end
  always @(fft.frames_out) n_results++;

  // 7-segment display decoder: digit d shows word[4d+3:4d]
  logic [3:0] shown [8];
  function automatic int glyph_value(logic [6:0] segs_n);
    case (~segs_n)
      7'b0111111: return 0;  7'b0000110: return 1;  7'b1011011: return 2;  7'b1001111: return 3;
      7'b1100110: return 4;  7'b1101101: return 5;  7'b1111101: return 6;  7'b0000111: return 7;
      7'b1111111: return 8;  7'b1101111: return 9;  7'b1110111: return 10; 7'b1111100: return 11;
      7'b1011000: return 12; 7'b1011110: return 13; 7'b1111001: return 14; 7'b1110001: return 15;
      default: return -1;
    endcase
  endfunction
  always @(posedge clk_65) begin
    for (int d = 0; d < 8; d++) if (!an[d] && glyph_value(seg[6:0]) >= 0) shown[d] <= 4'(glyph_value(seg[6:0]));
  end
  function automatic int shown_field(int lo, int w);
    logic [31:0] word;
    for (int d = 0; d < 8; d++) word[4*d +: 4] = shown[d];
    return int'((word >> lo) & ((32'd1 << w) - 1));
  endfunction

  logic cs_q = 1;
  always @(posedge clk_65) begin
    cs_q <= adc_cs_n;
    if (!adc_cs_n && cs_q) n_adc++;
    if (vga_r == 4'hF && vga_g == 4'h0 && vga_b == 4'h0) n_red++;
    if (vga_g == 4'hF && vga_r == 4'h0 && vga_b == 4'h0) n_green++;
    if (vga_b == 4'hF && vga_r == 4'h0 && vga_g == 4'h0) n_blue++;
    if (vga_r == 4'hF && vga_b == 4'hF && vga_g == 4'h0) n_magenta++;
  end
  logic vs_q = 1, aud_q = 0;
  logic [7:0] an_q = '1;
  always @(posedge clk_65) begin
    vs_q <= vga_vs; an_q <= an;
    if (!vga_vs && vs_q) n_vsync++;
    if (an != an_q) n_digits++;
  end
  always @(posedge clk_104) begin aud_q <= aud_pwm; if (aud_pwm != aud_q) n_aud_toggles++; end

  // ---------------------------------------------------------------- helpers
  task automatic check_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s = %0d, expected %0d", what, got, exp); end
  endtask
  int last_cmd = -9999;
  task automatic fan_period(int exp_cmd);
    int high, e;
    high = 0;
    repeat (600 * 108) begin @(posedge clk_65); #1; if (fan_pwm) high++; end
    e = clampi(exp_cmd, 0, 600) * 108;
    check_eq("fan high cycles per period", high, e);
    if (high == 0) n_fan_off++; else n_fan_on++;
    if (high == e && exp_cmd != last_cmd) n_psd++;   // a new command: the controller ran
    last_cmd = exp_cmd;
  endtask
  task automatic wait_ms(int ms); repeat (ms * 65000) @(posedge clk_65); endtask

  initial begin
    #400ms; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int h;
    // sw15 continuous, sw13 ball marker, sw12:7 FFT scaling, sw6 pitch reference
    sw = 16'b1010_1010_1100_0000; btnd = 0; btnc = 1;
    adc_values = '{10'd500, 10'd512, 10'd512, 10'd0, 10'd512, 10'd0, 10'd0, 10'd0};
    repeat (20) @(posedge clk_65);
    btnc = 0;

    // ---- A: continuous mode, pitch bin 100 (display: Hz, IR height, reference)
    peak_bin = 100;
    wait_ms(40);
    h = ir_height(500);
    check_eq("displayed Hz", shown_field(16, 12), (100 * 2579) / 1024);
    check_eq("displayed IR height", shown_field(8, 6), h);
    check_eq("displayed reference (continuous)", shown_field(0, 6), 35);
    if (shown_field(0, 6) == 35) n_cont++;
    fan_period(command(35, h));

    // ---- B: pitch above the continuous range, ball low, strong Kp
    peak_bin = 124;
    adc_values[0] = 10'd0; adc_values[1] = 10'd1023;
    wait_ms(40);
    h = ir_height(0);
    check_eq("displayed Hz", shown_field(16, 12), (124 * 2579) / 1024);
    check_eq("displayed reference at top of range", shown_field(0, 6), 63);
    check_eq("displayed IR height (near)", shown_field(8, 6), h);
    if (shown_field(0, 6) == 63) n_cont++;
    // Kp 7 * error 63 = 441 saturates at 255: command 255 + 160 = 415, not 600
    check_eq("saturating command", command(63, h), 415);
    fan_period(command(63, h));
    if (last_cmd == 415 && n_fan_on == 2) n_sat++;

    // ---- C: reference from switches (0), ball high, no bias: fan off
    sw[6] = 1'b0;
    adc_values[0] = 10'd1000; adc_values[4] = 10'd0;
    wait_ms(25);
    check_eq("displayed reference from switches", shown_field(0, 6), 0);
    check_eq("displayed IR height (far)", shown_field(8, 6), ir_height(1000));
    fan_period(command(0, ir_height(1000)));

    // ---- D: discrete mode, pitch bin 150, send (display: refs and candidate)
    sw[15] = 1'b0; sw[6] = 1'b1; sw[14] = 1'b1;
    adc_values[4] = 10'd512;
    peak_bin = 150;
    wait_ms(45);
    check_eq("displayed candidate (discrete)", shown_field(0, 6), (150 - 65) / 2);
    check_eq("reference held before send", shown_field(8, 6), 63);
    btnd = 1; wait_ms(20); btnd = 0;
    wait_ms(2);
    check_eq("displayed reference after send", shown_field(8, 6), (150 - 65) / 2);
    check_eq("displayed controller reference", shown_field(24, 6), (150 - 65) / 2);
    if (shown_field(8, 6) == (150 - 65) / 2) begin n_send++; n_disc++; end
    fan_period(command((150 - 65) / 2, ir_height(1000)));
    check_eq("FFT configuration word", int'(fft_cfg_tdata), int'({2'b00, 5'b11100, sw[12:7], 2'b00, 1'b1}));

    // ---- mechanism counts
    $display("frames %0d continuous %0d tone %0d results %0d stalls %0d adc %0d psd %0d sat %0d fan on/off %0d/%0d",
             n_frames, n_frame_ok, n_tone_ok, n_results, fft.stalls, n_adc, n_psd, n_sat, n_fan_on, n_fan_off);
    $display("cont %0d disc %0d send %0d vsync %0d red %0d green %0d blue %0d magenta %0d digits %0d audio toggles %0d",
             n_cont, n_disc, n_send, n_vsync, n_red, n_green, n_blue, n_magenta, n_digits, n_aud_toggles);
    checks++; if (n_frame_ok < 3)    begin failures++; $display("FAIL no continuous FFT frames"); end
    checks++; if (n_tone_ok < 2)     begin failures++; $display("FAIL tone never checked"); end
    checks++; if (fft.stalls == 0)   begin failures++; $display("FAIL no stream stall"); end
    checks++; if (fft.bad_tlast != 0) begin failures++; $display("FAIL tlast misplaced"); end
    checks++; if (n_results < 3)     begin failures++; $display("FAIL no FFT results"); end
    checks++; if (n_adc < 500)       begin failures++; $display("FAIL too few ADC conversions"); end
    checks++; if (n_psd < 4)         begin failures++; $display("FAIL too few new controller commands"); end
    checks++; if (n_sat == 0)        begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_fan_off == 0 || n_fan_on == 0) begin failures++; $display("FAIL fan on/off not both seen"); end
    checks++; if (n_cont < 2)        begin failures++; $display("FAIL continuous mode"); end
    checks++; if (n_disc == 0 || n_send == 0) begin failures++; $display("FAIL discrete mode / send"); end
    checks++; if (n_vsync < 5)       begin failures++; $display("FAIL video frames"); end
    checks++; if (n_red == 0 || n_green == 0 || n_blue == 0 || n_magenta == 0) begin failures++; $display("FAIL a screen layer never drawn"); end
    checks++; if (n_digits < 100)    begin failures++; $display("FAIL 7-seg not scanning"); end
    checks++; if (n_aud_toggles < 100) begin failures++; $display("FAIL no audio PWM"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
