// Behavioural model of an MCP3008 10-bit ADC's SPI interface (mode 0), for
// simulation only. While cs_n is low it counts rising SCK edges: edges 1..5
// carry start, SGL/DIFF and D2..D0 on MOSI; from then on it drives MISO on
// falling edges: zero for the sample and null bits, then the 10-bit code of
// the chosen channel, MSB first, ready for edges 8..17.
module mcp3008_model (
  input  logic       sck,
  input  logic       cs_n,
  input  logic       mosi,
  output logic       miso,
  input  logic [9:0] value [8]
);
  int   edges = 0;
  logic [4:0] cmd = '0;
  logic [9:0] code = '0;
  initial miso = 1'b0;

  always @(negedge cs_n) begin edges = 0; miso = 1'b0; end

  always @(posedge sck) if (!cs_n) begin
    edges++;
    if (edges <= 5) cmd = {cmd[3:0], mosi};
    if (edges == 5) code = value[cmd[2:0]];
  end

  always @(negedge sck) if (!cs_n) begin
    // value for the next rising edge, number edges+1
    if (edges + 1 >= 8 && edges + 1 <= 17) miso = code[17 - (edges + 1)];
    else miso = 1'b0;
  end
endmodule
