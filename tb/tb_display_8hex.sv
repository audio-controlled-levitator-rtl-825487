// Testbench for display_8hex with a short scan (CNT_W 6, 8 cycles per
// digit). Checks that exactly one anode is low at a time, that digits are
// scanned 7,6,...,0 each for 8 cycles, and that the segments (active low,
// bit 0 = a) show the hex glyph of the selected nibble; the glyph table here
// is written as lists of lit segments.
module tb_display_8hex;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] data;
  logic [6:0] seg;
  logic [7:0] an;
  display_8hex #(.CNT_W(6)) dut (.clk, .rst, .data, .seg, .strobe(an));

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "deg", "bcdeg", "adefg", "aefg"};
  function automatic logic [6:0] segs(int n);
    logic [6:0] s = '0;
    for (int k = 0; k < lit[n].len(); k++) s[lit[n][k] - "a"] = 1'b1;
    return ~s;
  endfunction

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int prev = -1, run = 0;
    data = 32'h0123_4567;
    repeat (3) @(posedge clk); rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      int d, cnt;
      if (i == 1000) data = 32'h89AB_CDEF;
      if (i > 2000 && i % 64 == 0) data = $urandom;
      @(posedge clk); #1;
      cnt = 0; d = -1;
      for (int k = 0; k < 8; k++) if (!an[k]) begin cnt++; d = k; end
      checks++; if (cnt != 1) begin failures++; $display("FAIL anodes %b", an); continue; end
      if (d == prev) run++;
      else begin
        if (prev >= 0) begin
          checks++; if (d != (prev + 7) % 8) begin failures++; $display("FAIL digit %0d after %0d", d, prev); end
          if (i > 20) begin checks++; if (run != 8) begin failures++; $display("FAIL digit %0d lit %0d cycles", prev, run); end end
        end
        prev = d; run = 1;
      end
      if (i % 64 != 1) begin
        checks++; if (seg != segs(int'(data[4*d +: 4]))) begin failures++; $display("FAIL digit %0d seg %b for %h", d, seg, data[4*d +: 4]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
