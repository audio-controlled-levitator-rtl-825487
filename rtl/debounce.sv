// debounce: per-bit switch and button debouncer.
//
// Each of the COUNT inputs has its own counter: a change of the input restarts
// it, and when the input has stayed put for DELAY cycles (15 ms at 65 MHz for
// the default) the clean output takes the new value. Synchronous reset copies
// the inputs straight to the outputs.
module debounce #(
  parameter int DELAY = 1000000,
  parameter int COUNT = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [COUNT-1:0] noisy,
  output logic [COUNT-1:0] clean
);
  localparam int CW = $clog2(DELAY + 1);

  for (genvar i = 0; i < COUNT; i++) begin : g_bit
    logic [CW-1:0] count;
    logic          last;
    always_ff @(posedge clk) begin
      if (rst) begin
        count    <= '0;
        last     <= noisy[i];
        clean[i] <= noisy[i];
      end else if (noisy[i] != last) begin
        last  <= noisy[i];
        count <= '0;
      end else if (32'(count) == DELAY) begin
        clean[i] <= last;
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
