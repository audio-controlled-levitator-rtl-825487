// Testbench for bin_to_hz: every bin 0..1023 against floor(bin * 2.5186 Hz)
// worked out here from the sample rate 104e6/(42*15*16) and 4096 points
// (allowing the 1-Hz difference the 2579/1024 rounding can make), with an
// exact check against floor(bin*2579/1024) and the 1-cycle latency.
module tb_bin_to_hz;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] bin;
  logic [11:0] hz;
  bin_to_hz dut (.clk, .bin, .hertz(hz));

  initial begin
    #1000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real per_bin;
    per_bin = 104.0e6 / (42.0 * 15.0 * 16.0) / 4096.0;
    for (int b = 0; b < 1024; b++) begin
      int e, r;
      @(negedge clk); bin = 10'(b);
      @(posedge clk); #1;
      e = (b * 2579) / 1024;
      r = int'($floor(b * per_bin));
      checks++; if (int'(hz) != e) begin failures++; $display("FAIL bin %0d hz %0d exp %0d", b, hz, e); end
      checks++; if (int'(hz) - r > 1 || r - int'(hz) > 1) begin failures++; $display("FAIL bin %0d hz %0d real %0d", b, hz, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
