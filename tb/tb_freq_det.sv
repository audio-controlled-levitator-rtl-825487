// Testbench for freq_det: sweeps of bins 0..1023 with random spectra. The
// expected pitch, worked out here, is the highest bin above 50 whose value
// times 4 exceeds 249 (i.e. value >= 63); with no such bin the previous
// result is kept. Also checks a value of 62 never counts and bins <= 50 are
// ignored even when large.
module tb_freq_det;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] addr, f;
  logic [14:0] data;
  logic valid;
  freq_det dut (.clk, .rst, .addr, .data, .valid, .frequency(f));

  initial begin
    #5000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int expected = 0;
    valid = 0; addr = 0; data = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int s = 0; s < 40; s++) begin
      int peaks[$];
      int v;
      peaks = {};
      repeat ($urandom_range(0, 3)) peaks.push_back($urandom_range(0, 1023));
      for (int b = 0; b < 1024; b++) begin
        v = $urandom_range(0, 62);
        if (b <= 50 && s % 2 == 0) v = 30000;
        foreach (peaks[k]) if (peaks[k] == b) v = (s % 4 == 1) ? 63 : $urandom_range(63, 32767);
        @(negedge clk); addr = 10'(b); data = 15'(v); valid = (s % 5 != 4) || (b % 2 == 0);
        if (valid && b > 50 && v >= 63) expected = b;
        @(posedge clk); #1;
        checks++; if (int'(f) != expected) begin failures++; if (failures < 10) $display("FAIL sweep %0d bin %0d f=%0d exp %0d", s, b, f, expected); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
