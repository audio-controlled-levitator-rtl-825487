// Testbench for debounce with DELAY 20 and three inputs bouncing
// independently. Model: an input that has kept one value for DELAY+2
// consecutive clock edges (counting the edge that first saw it) is passed
// to the output at that edge; shorter pulses never reach the output.
module tb_debounce;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 20;
  logic [2:0] noisy, clean;
  debounce #(.DELAY(D), .COUNT(3)) dut (.clk, .rst, .noisy, .clean);

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int stable [3];
    logic [2:0] exp_clean, last;
    int changes = 0;
    noisy = 3'b010;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    exp_clean = 3'b010; last = noisy;
    foreach (stable[k]) stable[k] = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        int p;
        p = ((i / 500) % 2) ? 3 : 60;       // bouncy phases and quiet phases
        if ($urandom_range(0, p) == 0) noisy[k] = ~noisy[k];
      end
      @(posedge clk); #1;
      for (int k = 0; k < 3; k++) begin
        if (noisy[k] == last[k]) stable[k]++; else begin stable[k] = 1; last[k] = noisy[k]; end
        if (stable[k] == D + 2 && exp_clean[k] != last[k]) begin exp_clean[k] = last[k]; changes++; end
      end
      checks++; if (clean != exp_clean) begin failures++; if (failures < 10) $display("FAIL at %0d clean %b exp %b", i, clean, exp_clean); end
    end
    checks++; if (changes < 20) begin failures++; $display("FAIL only %0d output changes", changes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
