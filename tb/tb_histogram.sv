// Testbench for histogram: random positions, blanking, zoom settings and
// spectrum values. The bar for a value is (value / 32) * 8 pixels tall, so
// the pixel is red when the line lies within that height above the bottom
// line 767 and is not blanked. vaddr is the column divided by 2^range_sel
// (combinational); the pixel appears two cycles after its line, blank and
// value, which are presented every cycle here.
module tb_histogram;
  import levitator_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [10:0] hc;
  logic [9:0] vc, vaddr;
  logic blank;
  logic [1:0] rs;
  logic [14:0] vdata;
  pixel_t pixel;
  histogram dut (.clk, .hcount(hc), .vcount(vc), .blank, .range_sel(rs), .vaddr, .vdata, .pixel);

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int reds = 0;
    bit e_q[$];
    for (int i = 0; i < 20000; i++) begin
      int v, h, r, d, bar;
      bit b;
      v = $urandom_range(0, 767); h = $urandom_range(0, 1023); r = $urandom_range(0, 3);
      b = ($urandom_range(0, 9) == 0);
      d = (i % 3 == 0) ? $urandom_range(0, 32767) : $urandom_range(0, 2000);
      @(negedge clk); vc = 10'(v); hc = 11'(h); rs = 2'(r); blank = b; vdata = 15'(d);
      #1;
      checks++; if (int'(vaddr) != h / (1 << r)) begin failures++; if (failures < 10) $display("FAIL vaddr %0d for h %0d r %0d", vaddr, h, r); end
      bar = (d / 32) * 8;
      e_q.push_back(!b && (767 - v) < bar);
      @(posedge clk); #1;
      if (e_q.size() == 2) begin
        bit e;
        e = e_q.pop_front();
        if (e) reds++;
        checks++; if (pixel != (e ? PIX_RED : PIX_BLACK)) begin failures++; if (failures < 10) $display("FAIL at %0d pixel %b", i, pixel); end
      end
    end
    checks++; if (reds < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
