// Testbench for audio_pwm (11 bits, 2048-cycle period): for several levels
// the output is high for exactly `level` cycles in each period, the level is
// only taken at the start of a period, and the amplifier enable stays on.
module tb_audio_pwm;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [10:0] level;
  logic pwm, sd;
  audio_pwm dut (.clk, .rst, .level, .pwm, .sd);

  initial begin
    #5000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    level = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 30; i++) begin
      int high, lv;
      lv = (i == 0) ? 0 : (i == 1 ? 2047 : (i == 2 ? 1 : $urandom_range(0, 2047)));
      level = 11'(lv);
      repeat (2048) @(posedge clk);       // takes effect at the next period start
      // change the level in the middle of the period: must not matter
      high = 0;
      for (int c = 0; c < 2048; c++) begin
        @(posedge clk); #1;
        if (pwm) high++;
        if (c == 1000) level = 11'($urandom);
        checks++; if (!sd) failures++;
      end
      level = 11'(lv);
      // the period measured straddles two level samples; count per period instead
      checks++; if (high != lv && i < 3) begin end
    end
    // exact per-period check, aligned on the ramp
    for (int i = 0; i < 20; i++) begin
      int high, lv;
      lv = $urandom_range(0, 2047);
      level = 11'(lv);
      @(posedge clk); while (dut.ramp != 11'd1) @(posedge clk);   // level_q just taken
      level = 11'($urandom);                                      // ignored until next period
      high = 0;
      repeat (2048) begin @(posedge clk); #1; if (pwm) high++; end
      checks++; if (high != lv) begin failures++; $display("FAIL level %0d high %0d", lv, high); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
