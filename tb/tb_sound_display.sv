// Testbench for sound_display: random positions, blanking and trace values.
// The trace point for a column with value d is drawn on screen lines where
// line + d lands 1..4 above the base line 470, so
// the expected pixel is magenta when v + d is 471..474 and the
// pixel is not blanked. Timing: the pixel for the position presented at one
// edge appears after the next edge, using the trace value present at that
// next edge (the trace RAM's read delay); vaddr is the column, one cycle late.
module tb_sound_display;
  import levitator_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] data, vaddr, vc;
  logic [10:0] hc;
  logic blank;
  pixel_t pixel;
  sound_display dut (.clk, .data, .hcount(hc), .vcount(vc), .blank, .vaddr, .pixel);

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int pv = 0, pb = 1, ph = 0, hits = 0;
    for (int i = 0; i < 20000; i++) begin
      int v, d, h, b;
      v = $urandom_range(0, 805); h = $urandom_range(0, 1343); b = ($urandom_range(0, 9) == 0);
      d = (i % 2) ? $urandom_range(0, 1023) : ((pv <= 470) ? 470 - pv + $urandom_range(0, 6) : $urandom_range(0, 6));
      @(negedge clk); vc = 10'(v); hc = 11'(h); blank = b; data = 10'(d);
      @(posedge clk); #1;
      if (i > 0) begin
        bit e;
        e = !pb && (pv + d >= 471) && (pv + d <= 474);
        if (e) hits++;
        checks++; if (pixel != (e ? PIX_MAGENTA : PIX_BLACK)) begin failures++; if (failures < 10) $display("FAIL v=%0d d=%0d pixel %b", pv, d, pixel); end
        checks++; if (int'(vaddr) != h % 1024) begin failures++; if (failures < 10) $display("FAIL vaddr"); end
      end
      pv = v; pb = b; ph = h;
    end
    checks++; if (hits < 100) begin failures++; $display("FAIL only %0d trace pixels", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
