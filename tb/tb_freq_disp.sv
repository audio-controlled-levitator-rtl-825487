// Testbench for freq_disp: random positions, zoom, mode and detected bin.
// Expected pixel, one cycle later: green where the column's bin equals the
// detected bin on lines 650..699; otherwise blue where the column's bin is
// the lowest usable bin 65 or the mode's highest bin (120 continuous, 190
// discrete) on lines 600..699; black elsewhere or when blanked.
module tb_freq_disp;
  import levitator_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] bin, vc;
  logic [10:0] hc;
  logic blank, mode;
  logic [1:0] rs;
  pixel_t pixel;
  freq_disp dut (.clk, .bin, .hcount(hc), .vcount(vc), .blank, .range_sel(rs), .mode, .pixel);

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int greens = 0, blues = 0;
    for (int i = 0; i < 30000; i++) begin
      int v, h, r, bn, cb, top;
      bit b, m;
      pixel_t e;
      r = $urandom_range(0, 3); m = 1'($urandom); b = ($urandom_range(0, 9) == 0);
      v = $urandom_range(590, 710); bn = $urandom_range(60, 200);
      case ($urandom_range(0, 3))
        0: h = bn << r;
        1: h = 65 << r;
        2: h = (m ? 120 : 190) << r;
        default: h = $urandom_range(0, 1023);
      endcase
      h = h + $urandom_range(0, (1 << r) - 1);
      if (h > 1023) h = 1023;
      @(negedge clk); vc = 10'(v); hc = 11'(h); rs = 2'(r); blank = b; mode = m; bin = 10'(bn);
      @(posedge clk); #1;
      cb = h >> r; top = m ? 120 : 190;
      if (b) e = PIX_BLACK;
      else if (cb == bn && v >= 650 && v <= 699) e = PIX_GREEN;
      else if ((cb == 65 || cb == top) && v >= 600 && v <= 699) e = PIX_BLUE;
      else e = PIX_BLACK;
      if (e == PIX_GREEN) greens++;
      if (e == PIX_BLUE) blues++;
      checks++; if (pixel != e) begin failures++; if (failures < 10) $display("FAIL h %0d v %0d bin %0d m %0d: %b exp %b", h, v, bn, m, pixel, e); end
    end
    checks++; if (greens < 100 || blues < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
