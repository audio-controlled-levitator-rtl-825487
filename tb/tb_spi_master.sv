// Testbench for spi_master (INOUTWIDTH 24): a mode-0 slave model here
// captures MOSI on rising SCK and drives MISO on falling SCK. Checks the
// word sent, the word received, new_data per word, chip select one-hot low
// for the chosen slave during the transfer, two back-to-back words, and
// the transfer length in clock-enable periods.
module tb_spi_master;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 24;
  logic ce, trigger, sck, mosi, miso, busy, new_data, load;
  logic [2:0] ss;
  logic [W-1:0] tx, rx;
  logic [15:0] nwords;
  logic [7:0] cs;
  spi_master #(.INOUTWIDTH(W)) dut (.clk, .ce, .rst, .ss, .data_to_send(tx), .how_many_bytes(nwords),
    .trigger, .miso, .sck, .mosi, .cs, .data_in(rx), .busy, .new_data, .load);

  // clock enable every 4 cycles
  logic [1:0] div = 0;
  always_ff @(posedge clk) div <= div + 1'b1;
  assign ce = (div == 2'd3);

  // slave model
  logic [W-1:0] slave_tx, slave_rx;
  logic [W-1:0] captured [$];
  int bits = 0;
  logic sck_q = 0;
  always @(posedge clk) begin
    sck_q <= sck;
    if (cs[ss] == 1'b1) begin bits = 0; miso <= slave_tx[W-1]; end
    else if (sck && !sck_q) begin
      slave_rx = {slave_rx[W-2:0], mosi};
      bits++;
      if (bits % W == 0) captured.push_back(slave_rx);
    end else if (!sck && sck_q) begin
      miso <= slave_tx[(W - 1 - (bits % W))];
    end
  end

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nd;
  always @(posedge clk) if (new_data && ce) nd++;

  initial begin
    trigger = 0; tx = 0; ss = 0; nwords = 1; slave_tx = 0; nd = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 20; i++) begin
      int cycles, nw;
      logic [W-1:0] word, sword;
      word = W'($urandom); sword = W'($urandom);
      nw = (i % 4 == 3) ? 2 : 1;
      captured.delete(); nd = 0;
      @(negedge clk); tx = word; slave_tx = sword; ss = 3'(i % 8); nwords = 16'(nw); trigger = 1;
      while (!busy) @(negedge clk);
      trigger = 0;
      cycles = 0;
      while (busy) begin
        @(negedge clk); cycles++;
        if (cs != ~(8'b1 << ss) && busy) begin checks++; failures++; $display("FAIL cs %b", cs); break; end
      end
      checks++; if (captured.size() != nw) begin failures++; $display("FAIL slave saw %0d words", captured.size()); end
      foreach (captured[k]) begin checks++; if (captured[k] != word) begin failures++; $display("FAIL mosi word %h exp %h", captured[k], word); end end
      checks++; if (rx != sword) begin failures++; $display("FAIL rx %h exp %h", rx, sword); end
      checks++; if (nd != nw) begin failures++; $display("FAIL new_data count %0d", nd); end
      // 2 ce periods per bit plus finish: (2*W*nw + 1) ce periods of 4 cycles
      checks++; if (cycles / 4 != 2 * W * nw) begin failures++; $display("FAIL length %0d ce periods", cycles / 4); end
      @(negedge clk); checks++; if (cs != 8'hFF || !load) begin failures++; $display("FAIL idle cs %b", cs); end
      repeat (10) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
