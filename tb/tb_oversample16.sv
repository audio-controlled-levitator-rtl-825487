// Testbench for oversample16: feeds random 12-bit samples with eoc at random
// spacing and checks each output against (sum of 16 samples + 2) >> 2 worked
// out here, that done pulses once per 16 eoc, one cycle after the 16th.
module tb_oversample16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] sample;
  logic eoc, done;
  logic [13:0] os;
  oversample16 dut (.clk, .rst, .sample, .eoc, .oversample(os), .done);

  initial begin
    #10000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int sum, n = 0;
    eoc = 0; sample = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int blk = 0; blk < 300; blk++) begin
      sum = 0;
      for (int i = 0; i < 16; i++) begin
        automatic int v = (blk == 0) ? 4095 : (blk == 1 ? 0 : $urandom_range(0, 4095));
        repeat ($urandom_range(0, 3)) begin @(negedge clk); checks++; if (done) begin failures++; $display("FAIL early done"); end end
        @(negedge clk); sample = 12'(v); eoc = 1; sum += v;
        @(negedge clk); eoc = 0;
        if (i < 15) begin checks++; if (done) begin failures++; $display("FAIL done after %0d samples", i + 1); end end
      end
      checks++; if (!done) begin failures++; $display("FAIL no done"); end
      checks++; if (int'(os) != (sum + 2) >> 2) begin failures++; $display("FAIL os %0d exp %0d", os, (sum + 2) >> 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
