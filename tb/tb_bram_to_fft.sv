// Testbench for bram_to_fft with a small frame (ADDR_W 5, 32 samples) and a
// dual_port_ram holding known words. The FFT side drops tready at random.
// Checks: each transferred beat carries RAM[(head + k) mod 32] - 32768 in
// order, exactly 32 beats per frame with tlast only on the last, no beats
// while idle, and that last_missing ends a frame early.
module tb_bram_to_fft;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int AW = 5, N = 32;
  logic [AW-1:0] head, addr, waddr;
  logic [15:0] rdata, wdata;
  logic we, start, lm, tvalid, tlast, tready;
  logic [31:0] tdata;
  dual_port_ram #(.DEPTH(N), .WIDTH(16)) ram (.clka(clk), .wea(we), .addra(waddr), .dina(wdata),
    .clkb(clk), .addrb(addr), .doutb(rdata));
  bram_to_fft #(.ADDR_W(AW)) dut (.clk, .rst, .head, .addr, .data(rdata), .start, .last_missing(lm),
    .frame_tdata(tdata), .frame_tvalid(tvalid), .frame_tlast(tlast), .frame_tready(tready));

  logic [15:0] mem [N];
  int beats = 0, lasts = 0;
  int exp_idx = 0;
  int frame_head, fr;
  always @(posedge clk) if (!rst && tvalid && tready) begin
    logic [15:0] e;
    e = mem[(frame_head + beats) % N] ^ 16'h8000;
    checks++; if (tdata !== {16'b0, e}) begin failures++; $display("FAIL frame %0d beat %0d %h exp %h", fr, beats, tdata[15:0], e); end
    checks++; if (tlast !== (beats == N - 1)) begin failures++; $display("FAIL tlast at beat %0d", beats); end
    beats++;
  end

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; start = 0; lm = 0; tready = 1; head = 0; waddr = 0; wdata = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = 16'($urandom); mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int f = 0; f < 30; f++) begin
      automatic int t = 0;
      beats = 0; fr = f;
      frame_head = $urandom_range(0, N - 1);
      @(negedge clk); head = AW'(frame_head); start = 1;
      @(negedge clk); start = 0; head = AW'($urandom);
      if (f % 10 == 9) begin
        // abort after a few beats
        repeat (5) @(negedge clk);
        lm = 1; @(negedge clk); lm = 0;
        checks++; if (tvalid) begin failures++; $display("FAIL still sending after last_missing"); end
        repeat (5) @(negedge clk);
        continue;
      end
      while (tvalid && t < 1000) begin tready = (f % 3 == 0) ? 1'b1 : 1'($urandom); @(negedge clk); t++; end
      tready = 1;
      checks++; if (beats != N) begin failures++; $display("FAIL %0d beats", beats); end
      if (f % 3 == 0) begin checks++; if (t != N) begin failures++; $display("FAIL full-rate frame took %0d", t); end end
      repeat (5) begin @(negedge clk); checks++; if (tvalid) begin failures++; $display("FAIL valid while idle"); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
