// Testbench for calc_error: random reference/height pairs; checks
// e = r - h as a signed 7-bit value and that done pulses exactly 2 cycles
// after start, for one cycle.
module tb_calc_error;
  import levitator_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done;
  height_t r, h;
  error_t e;
  calc_error dut (.clk, .rst, .i_start(start), .i_ref(r), .i_height(h), .o_done(done), .o_error(e));

  initial begin
    #1000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; r = 0; h = 0;
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      int rv, hv;
      rv = (i < 2) ? (i == 0 ? 63 : 0) : $urandom_range(0, 63);
      hv = (i < 2) ? (i == 0 ? 0 : 63) : $urandom_range(0, 63);
      @(negedge clk); start = 1; r = 6'(rv); h = 6'(hv);
      @(negedge clk); start = 0; r = 6'($urandom); h = 6'($urandom);
      checks++; if (done) begin failures++; $display("FAIL done early"); end
      @(posedge clk); #1;
      checks++; if (!done) begin failures++; $display("FAIL done missing %0d", i); end
      checks++; if (int'(e) != rv - hv) begin failures++; $display("FAIL e=%0d exp %0d", e, rv - hv); end
      @(posedge clk); #1;
      checks++; if (done) begin failures++; $display("FAIL done too long"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
