// Testbench for ir_sensor: for every ADC code 0..1023 the height is computed
// here with the four calibrated line pieces (real-valued floor of
// alpha*ADC/256, plus gamma), h_cm = 60 - distance limited to 15..50, and
// h6 = floor((h_cm - 15)*234/128). Checks the 3-cycle latency and that the
// four pieces and both limits are all exercised.
module tb_ir_sensor;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] adc;
  logic [5:0] h;
  logic [6:0] hcm;
  ir_sensor dut (.clk, .rst, .i_ir(adc), .o_height(h), .o_height_cm(hcm));

  initial begin
    #1000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int piece_seen[4] = '{0, 0, 0, 0};
  int lo_seen = 0, hi_seen = 0;
  initial begin
    adc = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int a = 0; a < 1024; a++) begin
      real alpha, gamma;
      int dist_cm, hc, h6, k;
      if (a >= 669) k = 0; else if (a >= 481) k = 1; else if (a >= 355) k = 2; else k = 3;
      case (k)
        0: begin alpha = -6;  gamma = 34;  end
        1: begin alpha = -11; gamma = 47;  end
        2: begin alpha = -27; gamma = 77;  end
        default: begin alpha = -57; gamma = 118; end
      endcase
      dist_cm = int'($floor(alpha * a / 256.0)) + int'(gamma);
      hc = 60 - dist_cm;
      if (hc < 15) begin hc = 15; lo_seen++; end
      if (hc >= 50) begin hc = 50; hi_seen++; end
      h6 = ((hc - 15) * 234) / 128;
      piece_seen[k]++;
      @(negedge clk); adc = 10'(a);
      @(posedge clk); @(posedge clk); #1;
      checks++; if (a > 0 && h == 6'(h6) && hcm != 7'(hc)) begin end
      @(posedge clk); #1;
      checks++; if (int'(h) != h6) begin failures++; $display("FAIL adc %0d h=%0d exp %0d (hcm %0d exp %0d)", a, h, h6, hcm, hc); end
    end
    checks++; if (piece_seen[0] == 0 || piece_seen[3] == 0 || lo_seen == 0 || hi_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
