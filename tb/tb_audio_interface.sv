// Testbench for audio_interface (default 104 MHz settings): checks the mic
// clock (period 42 cycles, 50% duty), one sample every 42*15*16 = 10080
// cycles, and the DC levels worked out by hand from the filter chain:
// all-ones PDM gives CIC 92 -> 8-bit offset 220 -> 14080; all-zeros gives
// -93 -> 35 -> 2240. A 50% density input must land between them.
module tb_audio_interface;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic m_data, m_clk, sv;
  logic [13:0] sample;
  audio_interface dut (.clk, .rst, .m_data, .m_clk, .sample, .sample_valid(sv));

  initial begin
    #100000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cycle = 0, last_sv = -1, sv_gap_bad = 0, n_sv = 0;
  int last_rise = -1, last_fall = -1, clk_bad = 0, rises = 0;
  logic mclk_q = 0;
  always @(posedge clk) begin
    cycle++;
    mclk_q <= m_clk;
    if (m_clk && !mclk_q) begin
      if (cycle > 200 && last_rise >= 0 && cycle - last_rise != 42) begin clk_bad++; $display("rise gap %0d at %0d", cycle - last_rise, cycle); end
      if (cycle > 200 && last_fall >= 0 && cycle - last_fall != 21) begin clk_bad++; $display("high %0d at %0d", cycle - last_fall, cycle); end
      last_rise = cycle; rises++;
    end
    if (!m_clk && mclk_q) last_fall = cycle;
    if (sv) begin
      if (last_sv >= 0 && cycle - last_sv != 10080) sv_gap_bad++;
      last_sv = cycle; n_sv++;
    end
  end

  // PDM source: value applied on each m_clk rising edge
  int mode = 0;   // 0 ones, 1 zeros, 2 alternate
  logic alt = 0;
  always @(posedge m_clk) begin alt <= ~alt; m_data <= (mode == 0) ? 1'b1 : (mode == 1 ? 1'b0 : alt); end

  task automatic wait_samples(int k); repeat (k) begin @(posedge clk); while (!sv) @(posedge clk); end endtask

  initial begin
    m_data = 1;
    repeat (3) @(posedge clk); rst <= 0;
    mode = 0; wait_samples(4); #1;
    checks++; if (sample != 14'd14080) begin failures++; $display("FAIL ones -> %0d", sample); end
    mode = 1; wait_samples(4); #1;
    checks++; if (sample != 14'd2240) begin failures++; $display("FAIL zeros -> %0d", sample); end
    mode = 2; wait_samples(4); #1;
    checks++; if (sample < 14'd7000 || sample > 14'd9400) begin failures++; $display("FAIL half -> %0d", sample); end
    checks++; if (sv_gap_bad != 0) begin failures++; $display("FAIL %0d bad sample gaps", sv_gap_bad); end
    checks++; if (clk_bad != 0 || rises < 1000) begin failures++; $display("FAIL m_clk timing %0d", clk_bad); end
    checks++; if (n_sv != 12) begin failures++; $display("FAIL %0d samples", n_sv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
