// Testbench for psd_controller: changes the reference and height, waits for
// done and compares the command with a model of the whole controller:
//   e = r - h, p = lim(Kp*e), d = lim(Kd*(e - e[n-4])), b = 0..31 from the
//   bias pot, u = p + d + 10*b (sum term not added by default).
// The error history advances once per controller run. Also checks that the
// controller does not run while its inputs stay the same, and the loop time.
module tb_psd_controller;
  import levitator_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  height_t r, h;
  logic [9:0] kp_t, ki_t, kd_t, b_t;
  logic done;
  command_t u;
  term_t op, od, os;
  logic signed [7:0] ob;
  psd_controller dut (.clk, .rst, .i_ref(r), .i_height(h), .i_Kp_tune(kp_t), .i_Ki_tune(ki_t),
    .i_Kd_tune(kd_t), .i_bias_tune(b_t), .o_done(done), .o_control_sig(u),
    .o_prop(op), .o_delta(od), .o_sum(os), .o_bias(ob));

  function automatic int lim(int v); return v > 255 ? 255 : (v < -256 ? -256 : v); endfunction
  function automatic int clampi(int v, int lo, int hi); return v < lo ? lo : (v > hi ? hi : v); endfunction
  function automatic int tuner(int adc, int lo, int hi, int bb); return lo + ((adc + bb) * (hi - lo)) / 1024; endfunction

  initial begin
    #5000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int hist[$];
  int runs = 0;
  initial begin
    r = 0; h = 0; kp_t = 512; ki_t = 512; kd_t = 512; b_t = 0;
    hist = {0, 0, 0, 0};
    repeat (3) @(posedge clk); rst <= 0;
    repeat (10) @(posedge clk);
    // no change -> no run
    repeat (50) begin @(posedge clk); #1; checks++; if (done) begin failures++; $display("FAIL spurious run"); end end
    for (int i = 0; i < 200; i++) begin
      int rv, hv, kpa, kda, ba, kp, kd, bias, e, p, d, lat;
      rv = $urandom_range(0, 63); hv = $urandom_range(0, 63);
      if (rv == int'(r) && hv == int'(h)) hv = (hv + 1) % 64;
      kpa = $urandom_range(0, 1023); kda = $urandom_range(0, 1023); ba = $urandom_range(0, 1023);
      @(negedge clk); kp_t = 10'(kpa); kd_t = 10'(kda); b_t = 10'(ba);
      repeat (8) @(posedge clk);
      @(negedge clk); r = 6'(rv); h = 6'(hv);
      lat = 0;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      runs++;
      kp = clampi(2 + tuner(kpa, -5, 5, 51), 0, 31);
      kd = clampi(2 + tuner(kda, -5, 15, 26), 0, 32);
      bias = tuner(ba, 0, 31, 17);
      e = rv - hv;
      p = lim(kp * e);
      d = lim(kd * (e - hist[0]));
      hist.pop_front(); hist.push_back(e);
      checks++; if (int'(u) != p + d + 10 * bias) begin
        failures++; $display("FAIL u=%0d exp %0d (p %0d d %0d b %0d)", u, p + d + 10 * bias, p, d, bias); end
      checks++; if (lat > 20) begin failures++; $display("FAIL loop took %0d cycles", lat); end
    end
    $display("runs %0d", runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
