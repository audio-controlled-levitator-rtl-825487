// Testbench for adc_reader: an MCP3008 model returns a different random code
// on each channel; after each start the five channel registers must hold the
// codes of channels 0..4 and done must pulse once. The start request is a
// single clock-cycle pulse between clock enables.
module tb_adc_reader;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ce, start, miso, mosi, sck, cs_n, done;
  logic [9:0] ch [5];
  logic [9:0] values [8];
  adc_reader dut (.clk, .ce, .rst, .start, .miso, .mosi, .sck, .cs_n, .channels(ch), .done);
  mcp3008_model adc (.sck, .cs_n, .mosi, .miso, .value(values));

  logic [4:0] div = 0;
  always_ff @(posedge clk) div <= div + 1'b1;
  assign ce = &div;

  int ndone = 0;
  always @(posedge clk) if (done && ce) ndone++;

  initial begin
    #20000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0;
    foreach (values[k]) values[k] = '0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 8; i++) begin
      int t;
      foreach (values[k]) values[k] = 10'($urandom);
      if (i == 0) begin values[0] = 10'h3FF; values[1] = 10'h000; values[2] = 10'h200; values[3] = 10'h001; values[4] = 10'h2AA; end
      ndone = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t = 0;
      while (ndone == 0 && t < 200000) begin @(negedge clk); t++; end
      checks++; if (ndone != 1) begin failures++; $display("FAIL no done"); end
      for (int c = 0; c < 5; c++) begin
        checks++; if (ch[c] != values[c]) begin failures++; $display("FAIL ch%0d %h exp %h", c, ch[c], values[c]); end
      end
      // five 17-bit frames at 2 ce per bit: about 5*40 ce periods of 32 cycles
      checks++; if (t > 5 * 45 * 32) begin failures++; $display("FAIL read took %0d cycles", t); end
      repeat (100) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
