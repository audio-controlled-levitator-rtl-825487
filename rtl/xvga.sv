// xvga: 1024x768 at 60 Hz video timing for a 65 MHz pixel clock.
//
// hcount runs 0..1343 per line (1024 visible, 24 front porch, 136 sync, 160
// back porch) and vcount 0..805 per frame (768 visible, 3 front porch, 6
// sync, 29 back porch). hsync and vsync are active low; blank is high outside
// the visible 1024x768 area. All outputs are registered and change together.
// Synchronous active-high reset starts at the top-left pixel.
module xvga #(
  parameter int H_ACTIVE = 1024,
  parameter int H_SYNC_ON  = 1048,
  parameter int H_SYNC_OFF = 1184,
  parameter int H_TOTAL  = 1344,
  parameter int V_ACTIVE = 768,
  parameter int V_SYNC_ON  = 771,
  parameter int V_SYNC_OFF = 777,
  parameter int V_TOTAL  = 806
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    h_next = (32'(hcount) == H_TOTAL - 1) ? '0 : hcount + 1'b1;
    v_next = vcount;
    if (32'(hcount) == H_TOTAL - 1) v_next = (32'(vcount) == V_TOTAL - 1) ? '0 : vcount + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !(32'(h_next) >= H_SYNC_ON && 32'(h_next) < H_SYNC_OFF);
      vsync  <= !(32'(v_next) >= V_SYNC_ON && 32'(v_next) < V_SYNC_OFF);
      blank  <= (32'(h_next) >= H_ACTIVE) || (32'(v_next) >= V_ACTIVE);
    end
  end
endmodule
