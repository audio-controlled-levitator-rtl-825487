// Testbench for delta_term: a random error sequence is applied one control
// step at a time; the expected term is clamp(Kd)*(e[n] - e[n-4]) limited to
// -256..255, where Kd = clamp(2 + (-5 + floor((ADC+26)*20/1024)), 0, 32) and
// the history starts at zero after reset. Checks the 5-cycle latency.
module tb_delta_term;
  import levitator_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done;
  error_t e;
  logic [9:0] tune;
  term_t d;
  delta_term dut (.clk, .rst, .i_error(e), .i_start(start), .i_Kd_tune(tune), .o_done(done), .o_del_term(d));

  function automatic int exp_kd(int adc);
    int k = 2 + (-5 + ((adc + 26) * 20) / 1024);
    return k < 0 ? 0 : (k > 32 ? 32 : k);
  endfunction
  function automatic int limit(int v);
    return v > 255 ? 255 : (v < -256 ? -256 : v);
  endfunction

  initial begin
    #3000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int hist[$];
  int sat = 0;
  initial begin
    start = 0; e = 0; tune = 10'd600;
    hist = {0, 0, 0, 0};
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 300; i++) begin
      int a, ev, lat, diff;
      a  = (i % 50 == 0) ? $urandom_range(0, 1023) : int'(tune);
      ev = (i % 7 < 2) ? ((i % 2) ? 63 : -63) : $urandom_range(0, 126) - 63;
      @(negedge clk); tune = 10'(a);
      repeat (6) @(posedge clk);
      @(negedge clk); e = 7'(ev); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done && lat < 12) begin @(negedge clk); lat++; end
      diff = ev - hist[0];
      hist.pop_front(); hist.push_back(ev);
      checks++; if (lat != 5) begin failures++; $display("FAIL latency %0d", lat); end
      checks++; if (int'(d) != limit(exp_kd(a) * diff)) begin
        failures++; $display("FAIL d=%0d exp %0d (kd %0d diff %0d)", d, limit(exp_kd(a) * diff), exp_kd(a), diff); end
      if (exp_kd(a) * diff > 255 || exp_kd(a) * diff < -256) sat++;
    end
    checks++; if (sat == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
