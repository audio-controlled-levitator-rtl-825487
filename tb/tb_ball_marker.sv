// Testbench for ball_marker: for random track values in both modes, scans
// every column of rows around the marker and counts the magenta pixels.
// Expected square: continuous mode 20x20 at x = 517 + 8*min(t,58); discrete
// mode 15x15 at x = 261 + 8*min(t,61); rows 515 onward. Checks the left
// edge, the width per row, the number of rows, and nothing when disabled.
module tb_ball_marker;
  import levitator_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable, mode;
  logic [5:0] track;
  logic [10:0] hc;
  logic [9:0] vc;
  pixel_t pixel;
  ball_marker dut (.clk, .enable, .mode, .track, .hcount(hc), .vcount(vc), .pixel);

  initial begin
    #50000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 40; i++) begin
      int t, size, x0, tc, rows;
      bit m, en;
      m = (i % 2); en = (i % 10 != 7);
      t = (i < 4) ? 63 * (i / 2) : $urandom_range(0, 63);
      size = m ? 20 : 15;
      tc = m ? (t > 58 ? 58 : t) : (t > 61 ? 61 : t);
      x0 = (m ? 512 : 256) + 8 * tc + 5;
      @(negedge clk); mode = m; enable = en; track = 6'(t); hc = 0; vc = 0;
      @(negedge clk);
      rows = 0;
      for (int v = 505; v < 545; v++) begin
        int cnt, first;
        cnt = 0; first = -1;
        for (int h = 0; h < 1024; h++) begin
          @(negedge clk); hc = 11'(h); vc = 10'(v);
          @(posedge clk); #1;
          if (pixel == PIX_MAGENTA) begin cnt++; if (first < 0) first = h; end
          else if (pixel != PIX_BLACK) begin checks++; failures++; end
        end
        if (cnt > 0) rows++;
        if (en && v >= 515 && v < 515 + size) begin
          checks++; if (cnt != size || first != x0) begin failures++; $display("FAIL t %0d m %0d row %0d: %0d px from %0d, exp %0d from %0d", t, m, v, cnt, first, size, x0); end
        end else begin
          checks++; if (cnt != 0) begin failures++; $display("FAIL t %0d row %0d has %0d px", t, v, cnt); end
        end
      end
      checks++; if (rows != (en ? size : 0)) begin failures++; $display("FAIL %0d rows", rows); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
