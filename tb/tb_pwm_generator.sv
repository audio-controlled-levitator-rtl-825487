// Testbench for pwm_generator at its default size (COMMAND_MAX 600, CLK_MAX
// 108): for several commands, measures one full PWM period of 600*108 =
// 64800 cycles and expects exactly command*108 high cycles (0 for negative,
// all for >= 600), and checks the period between rising edges.
module tb_pwm_generator;
  import levitator_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  command_t u;
  logic pwm;
  pwm_generator dut (.clk, .rst, .i_control(u), .o_pwm(pwm));

  localparam int PERIOD = 600 * 108;

  initial begin
    #30000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int values[7] = '{0, -50, 1, 150, 300, 599, 700};
  initial begin
    u = 0;
    repeat (3) @(posedge clk); rst <= 0;
    foreach (values[k]) begin
      int high, expv;
      u = 11'(values[k]);
      // let one period pass so the new value is in effect everywhere
      repeat (PERIOD) @(posedge clk);
      high = 0;
      repeat (PERIOD) begin @(posedge clk); #1; if (pwm) high++; end
      expv = values[k] <= 0 ? 0 : (values[k] >= 600 ? PERIOD : values[k] * 108);
      checks++; if (high != expv) begin failures++; $display("FAIL u=%0d high %0d exp %0d", values[k], high, expv); end
    end
    // period between rising edges for a mid value
    begin
      int t0, t1, n;
      u = 11'd300;
      @(posedge pwm); n = 0;
      @(negedge clk);
      while (!pwm) begin @(negedge clk); end
      n = 0;
      do begin @(negedge clk); n++; end while (pwm);
      do begin @(negedge clk); n++; end while (!pwm);
      checks++; if (n != PERIOD) begin failures++; $display("FAIL period %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
