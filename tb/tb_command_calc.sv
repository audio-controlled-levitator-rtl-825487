// Testbench for command_calc: random terms; expects p + d + 10*bias (sum term
// ignored) from the default instance and limit(p + d + 10*bias + s) to the
// 11-bit signed range from a USE_SUM instance. Checks the 3-cycle latency.
module tb_command_calc;
  import levitator_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done, done_s;
  term_t p, s, d;
  logic signed [9:0] b;
  command_t u, u_s;
  command_calc dut (.clk, .rst, .i_start(start), .i_prop(p), .i_sum(s), .i_delta(d), .i_bias(b), .o_command(u), .o_done(done));
  command_calc #(.USE_SUM(1'b1)) dut_s (.clk, .rst, .i_start(start), .i_prop(p), .i_sum(s), .i_delta(d), .i_bias(b), .o_command(u_s), .o_done(done_s));

  initial begin
    #1000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; p = 0; s = 0; d = 0; b = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 300; i++) begin
      int pv, sv, dv, bv, lat, full;
      pv = (i == 0) ? 255 : $urandom_range(0, 511) - 256;
      sv = (i == 0) ? 255 : $urandom_range(0, 511) - 256;
      dv = (i == 0) ? 255 : $urandom_range(0, 511) - 256;
      bv = (i == 0) ? 31 : $urandom_range(0, 31);
      @(negedge clk); p = 9'(pv); s = 9'(sv); d = 9'(dv); b = 10'(bv); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      full = pv + dv + 10 * bv + sv;
      full = full > 1023 ? 1023 : (full < -1024 ? -1024 : full);
      checks++; if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
      checks++; if (int'(u) != pv + dv + 10 * bv) begin failures++; $display("FAIL u=%0d exp %0d", u, pv + dv + 10 * bv); end
      checks++; if (int'(u_s) != full) begin failures++; $display("FAIL u_s=%0d exp %0d", u_s, full); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
