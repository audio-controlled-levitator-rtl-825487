// Testbench for sum_term: feeds error runs that drive the running total into
// both limits and back; expected total = limit(total + e) and term =
// limit(Ki * total), Ki = clamp(1 + (-5 + floor((ADC+51)*10/1024)), 0, 31),
// all limits -256..255. Checks the 5-cycle latency.
module tb_sum_term;
  import levitator_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done;
  error_t e;
  logic [9:0] tune;
  term_t s;
  sum_term dut (.clk, .rst, .i_error(e), .i_start(start), .i_Ki_tune(tune), .o_done(done), .o_s_term(s));

  function automatic int exp_ki(int adc);
    int k = 1 + (-5 + ((adc + 51) * 10) / 1024);
    return k < 0 ? 0 : (k > 31 ? 31 : k);
  endfunction
  function automatic int limit(int v);
    return v > 255 ? 255 : (v < -256 ? -256 : v);
  endfunction

  initial begin
    #3000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int total = 0, hit_hi = 0, hit_lo = 0;
  initial begin
    start = 0; e = 0; tune = 10'd512;
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 300; i++) begin
      int a, ev, lat;
      a  = (i % 40 == 0) ? $urandom_range(0, 1023) : int'(tune);
      // 0..59: push up, 60..139: push down, then random
      ev = (i < 60) ? 40 : (i < 140) ? -45 : $urandom_range(0, 126) - 63;
      @(negedge clk); tune = 10'(a);
      repeat (6) @(posedge clk);
      @(negedge clk); e = 7'(ev); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done && lat < 12) begin @(negedge clk); lat++; end
      total = limit(total + ev);
      if (total == 255) hit_hi++;
      if (total == -256) hit_lo++;
      checks++; if (lat != 5) begin failures++; $display("FAIL latency %0d", lat); end
      checks++; if (int'(s) != limit(exp_ki(a) * total)) begin
        failures++; $display("FAIL s=%0d exp %0d (ki %0d total %0d)", s, limit(exp_ki(a) * total), exp_ki(a), total); end
    end
    checks++; if (hit_hi == 0 || hit_lo == 0) begin failures++; $display("FAIL windup limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
