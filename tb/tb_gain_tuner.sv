// Testbench for gain_tuner: drives random pot codes and offset ranges and
// compares the offset with min + floor((ADC + b) * (max - min) / 1024)
// computed in integer arithmetic here. Also checks the 3-cycle latency and
// the two ends of the -5..5 range with b = 51 (ADC 0 -> -5, ADC 1023 -> +5).
module tb_gain_tuner;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] tune;
  logic signed [5:0] omin, omax;
  logic signed [7:0] off_def, off_51;

  gain_tuner dut (.clk, .rst, .i_tune(tune), .i_offset_min(omin), .i_offset_max(omax), .o_offset(off_def));
  gain_tuner #(.OFFSET_BUFFER(51)) dut51 (.clk, .rst, .i_tune(tune), .i_offset_min(omin), .i_offset_max(omax), .o_offset(off_51));

  function automatic int model(int adc, int lo, int hi, int b);
    int num = (adc + b) * (hi - lo);
    return lo + num / 1024;   // num >= 0 here, so / is floor
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #20000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    tune = 0; omin = -5; omax = 5;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    // latency: change input, output must not change before 3 edges, then must
    @(negedge clk); tune = 10'd1023;
    @(posedge clk); #1 check("latency 1", off_51, -5);
    @(posedge clk); #1 check("latency 2", off_51, -5);
    @(posedge clk); #1 check("latency 3", off_51, 5);
    // Figure ends for b=51, range -5..5
    @(negedge clk); tune = 0; repeat (4) @(posedge clk); #1 check("adc 0 -> -5", off_51, -5);
    @(negedge clk); tune = 1023; repeat (4) @(posedge clk); #1 check("adc 1023 -> 5", off_51, 5);
    @(negedge clk); tune = 512; repeat (4) @(posedge clk); #1 check("adc 512 -> 0", off_51, 0);
    for (int i = 0; i < 400; i++) begin
      int lo, hi, a;
      case (i % 3)
        0: begin lo = -5; hi = 5;  end
        1: begin lo = -5; hi = 15; end
        default: begin lo = 0; hi = 31; end
      endcase
      a = $urandom_range(0, 1023);
      @(negedge clk); tune = 10'(a); omin = 6'(lo); omax = 6'(hi);
      repeat (4) @(posedge clk); #1;
      check($sformatf("b25 adc %0d [%0d,%0d]", a, lo, hi), off_def, model(a, lo, hi, 25));
      check($sformatf("b51 adc %0d [%0d,%0d]", a, lo, hi), off_51, model(a, lo, hi, 51));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
