// Testbench for dual_port_ram with two unrelated clocks (10 and 14 time
// units): random writes on port A are mirrored in an array here; random reads
// on port B must return the mirrored word one port-B clock after the address.
// Addresses written recently are not read, so no read races a write.
module tb_dual_port_ram;
  logic clka = 0, clkb = 0;
  always #5 clka = ~clka;
  always #7 clkb = ~clkb;
  int checks = 0, failures = 0;

  localparam int D = 256, W = 16;
  logic wea;
  logic [7:0] addra, addrb;
  logic [W-1:0] dina, doutb;
  dual_port_ram #(.DEPTH(D), .WIDTH(W)) dut (.clka, .wea, .addra, .dina, .clkb, .addrb, .doutb);

  logic [W-1:0] mirror [D];
  bit written [D];

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wea = 0; addra = 0; dina = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clka); wea = 1; addra = 8'(i); dina = W'($urandom); mirror[i] = dina; written[i] = 1;
    end
    @(negedge clka); wea = 0;
    // phase 2: write only the upper half while reading the lower half
    for (int i = 0; i < 3000; i++) begin
      @(negedge clka); wea = 1'($urandom); addra = 8'($urandom_range(128, 255)); dina = W'($urandom);
      if (wea) mirror[addra] = dina;
    end
    @(negedge clka); wea = 0;
  end

  initial begin
    logic [7:0] a;
    repeat (D + 5) @(posedge clka);
    for (int i = 0; i < 1500; i++) begin
      @(negedge clkb); a = 8'($urandom_range(0, 127)); addrb = a;
      @(posedge clkb); #1;
      checks++; if (doutb !== mirror[a]) begin failures++; $display("FAIL addr %0d %h exp %h", a, doutb, mirror[a]); end
    end
    // after writes stop, read the whole memory
    #40000;
    for (int i = 0; i < D; i++) begin
      @(negedge clkb); addrb = 8'(i);
      @(posedge clkb); #1;
      checks++; if (doutb !== mirror[i]) begin failures++; $display("FAIL final addr %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
