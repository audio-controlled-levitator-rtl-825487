// bram_to_fft: streams one frame of audio samples from the frame RAM to the FFT.
//
// The frame RAM is a circular buffer whose write pointer `head` points at the
// oldest sample. On `start` the block reads 2^ADDR_W samples beginning at
// head, so the frame goes out oldest first, and sends them on an AXI-stream
// master: tdata = {16'b0 imaginary, signed real}, where the real part is the
// unsigned sample minus 32768. tlast marks the last sample. The RAM address
// is driven with the index of the sample that will be on the bus in the next
// cycle, so with a one-cycle-latency RAM the stream has no gaps while tready
// stays high. If the FFT core reports a missing tlast the frame is dropped.
//
// Timing: tvalid rises 1 cycle after start; a frame takes 2^ADDR_W cycles
// when tready is held high. start is ignored while a frame is being sent.
// Synchronous active-high reset.
module bram_to_fft #(
  parameter int ADDR_W = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] head,
  output logic [ADDR_W-1:0] addr,
  input  logic [15:0]       data,
  input  logic              start,
  input  logic              last_missing,
  output logic [31:0]       frame_tdata,
  output logic              frame_tvalid,
  output logic              frame_tlast,
  input  logic              frame_tready
);
  logic              sending;
  logic [ADDR_W-1:0] cur;     // RAM index of the sample now on the bus
  logic [ADDR_W-1:0] count;   // position of that sample within the frame
  logic              advance;

  assign advance = sending && frame_tready;

  always_comb begin
    if (!sending && start) addr = head;
    else if (advance)      addr = cur + 1'b1;
    else                   addr = cur;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sending <= 1'b0;
      cur     <= '0;
      count   <= '0;
    end else begin
      cur <= addr;
      if (!sending) begin
        if (start) begin
          sending <= 1'b1;
          count   <= '0;
        end
      end else if (last_missing) begin
        sending <= 1'b0;
      end else if (advance) begin
        count <= count + 1'b1;
        if (&count) sending <= 1'b0;
      end
    end
  end

  assign frame_tvalid = sending;
  assign frame_tlast  = sending && (&count);
  assign frame_tdata  = {16'b0, data ^ 16'h8000};   // data - 32768, two's complement

  // AXI-stream: data must hold while valid is high and ready is low.
  property p_hold;
    @(posedge clk) disable iff (rst) frame_tvalid && !frame_tready && !last_missing |=> frame_tvalid && $stable(frame_tdata);
  endproperty
  assert property (p_hold);
endmodule
