// Testbench for xvga at full size (1024x768 in a 1344x806 frame): runs two
// whole frames and checks hcount/vcount stepping, the line and frame lengths,
// hsync low for exactly 136 cycles starting at column 1048, vsync low for 6
// lines starting at line 771, and blank outside the 1024x768 area, all
// aligned with the registered counters.
module tb_xvga;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [10:0] hc;
  logic [9:0] vc;
  logic hs, vs, blank;
  xvga dut (.clk, .rst, .hcount(hc), .vcount(vc), .hsync(hs), .vsync(vs), .blank);

  initial begin
    #40000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int eh = 0, ev = 0, bad = 0, hs_low = 0, vs_rise = 0, frames = 0;
    logic vs_q;
    repeat (3) @(posedge clk); rst <= 0;
    @(negedge clk);
    // first registered state after reset: count (0,0) advanced once
    eh = int'(hc); ev = int'(vc);
    vs_q = vs;
    for (int i = 0; i < 2 * 1344 * 806 + 10; i++) begin
      bit e_hs, e_vs, e_blank;
      e_hs = !(eh >= 1048 && eh < 1184);
      e_vs = !(ev >= 771 && ev < 777);
      e_blank = (eh >= 1024) || (ev >= 768);
      if (int'(hc) != eh || int'(vc) != ev || hs != e_hs || vs != e_vs || blank != e_blank) begin
        bad++;
        if (bad < 5) $display("FAIL at h=%0d v=%0d: got h=%0d v=%0d hs=%b vs=%b blank=%b", eh, ev, hc, vc, hs, vs, blank);
      end
      if (!hs && ev == 0) hs_low++;
      if (vs && !vs_q) vs_rise++;
      vs_q = vs;
      eh++;
      if (eh == 1344) begin eh = 0; ev++; if (ev == 806) begin ev = 0; frames++; end end
      @(negedge clk);
    end
    checks++; if (bad != 0) begin failures++; $display("FAIL %0d mismatching cycles", bad); end
    checks++; if (hs_low != 2 * 136) begin failures++; $display("FAIL hsync low %0d cycles on line 0", hs_low); end
    checks++; if (vs_rise != 2) begin failures++; $display("FAIL %0d vsync pulses", vs_rise); end
    checks++; if (frames != 2) begin failures++; $display("FAIL %0d frames", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
