// Testbench for reference_gen: random pitches (bins) in both modes.
// Continuous: ref = bin - 65 inside 65..120, 0 below, 63 at or above 120.
// Discrete: want = (bin - 65)/2 inside 65..190, same limits; ref changes only
// on a rising edge of send (holding send high must not update it again).
module tb_reference_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic send, mode;
  logic [9:0] freq;
  logic [5:0] ref_out, want;
  reference_gen dut (.clk, .rst, .send, .mode, .freq, .ref_out, .want);

  function automatic int cont(int b); return b <= 65 ? 0 : (b >= 120 ? 63 : b - 65); endfunction
  function automatic int disc(int b); return b <= 65 ? 0 : (b >= 190 ? 63 : (b - 65) / 2); endfunction

  initial begin
    #5000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int held, b;
    send = 0; mode = 1; freq = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 500; i++) begin
      b = (i % 3 == 0) ? $urandom_range(0, 1023) : $urandom_range(55, 200);
      @(negedge clk); freq = 10'(b);
      @(posedge clk); #1;
      checks++; if (int'(ref_out) != cont(b)) begin failures++; $display("FAIL cont bin %0d ref %0d", b, ref_out); end
    end
    @(negedge clk); mode = 0; @(negedge clk);
    held = int'(ref_out);
    for (int i = 0; i < 500; i++) begin
      b = (i % 3 == 0) ? $urandom_range(0, 1023) : $urandom_range(55, 200);
      @(negedge clk); freq = 10'(b);
      @(posedge clk); #1;
      checks++; if (int'(want) != disc(b)) begin failures++; $display("FAIL want bin %0d %0d", b, want); end
      checks++; if (int'(ref_out) != held) begin failures++; $display("FAIL ref moved without send"); end
      if (i % 4 == 0) begin
        @(negedge clk); send = 1;
        @(posedge clk); #1;
        held = disc(b);
        checks++; if (int'(ref_out) != held) begin failures++; $display("FAIL send: ref %0d exp %0d", ref_out, held); end
        // keep send high and change the pitch: no second update
        @(negedge clk); freq = 10'($urandom_range(66, 189));
        repeat (3) @(posedge clk); #1;
        checks++; if (int'(ref_out) != held) begin failures++; $display("FAIL held send updated ref"); end
        @(negedge clk); send = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
