// Testbench for cic_decimator at the levitator's settings (5 stages, R = 15,
// 21-bit, 8-bit output). Drives +-1 samples (a slowly varying pulse density,
// like a PDM microphone) with en every 3rd cycle. The expected output is
// computed here by direct convolution with the filter's impulse response
// (a 15-sample box filter convolved with itself five times, 71 taps), then
// floor-divided by 2^13; the input-to-output alignment is found once from
// the first outputs and then held. Also checks one d_valid per 15 en and
// its 2-cycle delay.
module tb_cic_decimator;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int R = 15, TAPS = 5 * (R - 1) + 1;
  logic en;
  logic signed [7:0] din, dout;
  logic dvalid;
  cic_decimator dut (.clk, .rst, .en, .decimation_ratio(16'(R)), .d_in(din), .d_out(dout), .d_valid(dvalid));

  longint h[TAPS];
  int x[$];            // inputs in order of en
  int outs[$];         // outputs
  int out_at[$];       // number of en seen when each output appeared

  function automatic longint conv(int last);   // filter output with x[last] newest
    longint s = 0;
    for (int j = 0; j < TAPS; j++) if (last - j >= 0) s += h[j] * x[last - j];
    return s;
  endfunction
  function automatic int floor_div(longint v, int d);
    longint q = v / d;
    if (v < 0 && q * d != v) q--;
    return int'(q);
  endfunction

  initial begin
    #20000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // impulse response
  initial begin
    longint a[TAPS], b[TAPS];
    foreach (a[i]) a[i] = (i == 0);
    repeat (5) begin
      foreach (b[i]) begin b[i] = 0; for (int k = 0; k < R; k++) if (i - k >= 0) b[i] += a[i - k]; end
      a = b;
    end
    h = a;
  end

  int en_count = 0, last_en_cycle = 0, cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (dvalid && !rst) begin
      outs.push_back(int'(dout)); out_at.push_back(en_count);
      checks++; if (cycle - last_en_cycle != 2 || en_count % R != 0) begin
        failures++; $display("FAIL d_valid timing: %0d cycles after en, en_count %0d", cycle - last_en_cycle, en_count); end
    end
    if (en && !rst) begin en_count++; last_en_cycle = cycle; end
  end

  initial begin
    int n = 6000, off, best;
    bit found;
    real phase = 0.0, acc = 0.0;
    en = 0; din = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < n; i++) begin
      real dens; int b;
      dens = 0.5 + 0.45 * $sin(phase); phase += 0.013 + 0.002 * (i / 1000);
      acc += dens;
      if (acc >= 1.0) begin acc -= 1.0; b = 1; end else b = -1;
      if ($urandom_range(0, 20) == 0) b = -b;
      x.push_back(b);
      @(negedge clk); en = 1; din = 8'(b);
      @(negedge clk); en = 0;
      @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++; if (outs.size() != n / R) begin failures++; $display("FAIL %0d outputs, exp %0d", outs.size(), n / R); end
    // alignment: newest input index = out_at*... + off
    best = 0; found = 0;
    for (off = -10; off <= 10 && !found; off++) begin
      automatic bit ok = 1;
      for (int k = 5; k < 40; k++) if (floor_div(conv(out_at[k] - 1 + off), 8192) != outs[k]) ok = 0;
      if (ok) begin best = off; found = 1; end
    end
    checks++; if (!found) begin failures++; $display("FAIL no alignment matches"); for (int k = 5; k < 10; k++) begin $write("out %0d at %0d: %0d;", k, out_at[k], outs[k]); for (int o = -12; o < 2; o++) $write(" %0d", conv(out_at[k] + o)); $display(""); end end
    else begin
      $display("alignment offset %0d", best);
      for (int k = 0; k < outs.size(); k++) begin
        automatic int e = floor_div(conv(out_at[k] - 1 + best), 8192);
        checks++; if (e != outs[k]) begin failures++; if (failures < 10) $display("FAIL out %0d = %0d exp %0d", k, outs[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
