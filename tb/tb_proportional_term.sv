// Testbench for proportional_term: random errors and pot positions. The
// expected gain is clamp(2 + (-5 + floor((ADC+51)*10/1024)), 0, 31) and the
// expected term Kp*e limited to -256..255, both computed here. Checks the
// 3-cycle start-to-done latency and saturation at both ends.
module tb_proportional_term;
  import levitator_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done;
  error_t e;
  logic [9:0] tune;
  term_t p;
  logic signed [7:0] kp;
  proportional_term dut (.clk, .rst, .i_error(e), .i_start(start), .i_Kp_tune(tune),
                         .o_done(done), .o_prop_term(p), .o_kp(kp));

  function automatic int exp_kp(int adc);
    int k = 2 + (-5 + ((adc + 51) * 10) / 1024);
    return k < 0 ? 0 : (k > 31 ? 31 : k);
  endfunction
  function automatic int limit(int v);
    return v > 255 ? 255 : (v < -256 ? -256 : v);
  endfunction

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int sat_hi = 0, sat_lo = 0;
  initial begin
    start = 0; e = 0; tune = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 300; i++) begin
      int a, ev, lat;
      a  = (i % 4 == 0) ? 1023 : $urandom_range(0, 1023);
      ev = $urandom_range(0, 126) - 63;
      @(negedge clk); tune = 10'(a);
      repeat (6) @(posedge clk);
      @(negedge clk); e = 7'(ev); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      checks++; if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
      checks++; if (int'(kp) != exp_kp(a)) begin failures++; $display("FAIL kp %0d exp %0d", kp, exp_kp(a)); end
      checks++; if (int'(p) != limit(exp_kp(a) * ev)) begin
        failures++; $display("FAIL p=%0d exp %0d (kp %0d e %0d)", p, limit(exp_kp(a) * ev), exp_kp(a), ev); end
      if (exp_kp(a) * ev > 255) sat_hi++;
      if (exp_kp(a) * ev < -256) sat_lo++;
    end
    checks++; if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
