// dual_port_ram: simple dual-port block RAM with independent clocks.
//
// Port A writes (wea) at clka; port B reads at clkb with one cycle of
// latency (registered output), which is what FPGA block RAM provides. Used
// for the 4096x16 circular audio frame, the 1024x16 FFT result store (written
// at 104 MHz, read at 65 MHz by the video logic) and the 1024x16 audio trace.
// Contents are not reset.
module dual_port_ram #(
  parameter int DEPTH = 4096,
  parameter int WIDTH = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clka,
  input  logic             wea,
  input  logic [AW-1:0]    addra,
  input  logic [WIDTH-1:0] dina,
  input  logic             clkb,
  input  logic [AW-1:0]    addrb,
  output logic [WIDTH-1:0] doutb
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clka) if (wea) mem[addra] <= dina;
  always_ff @(posedge clkb) doutb <= mem[addrb];
endmodule
