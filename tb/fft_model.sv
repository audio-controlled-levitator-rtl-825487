// Behavioural stand-in for the external 4096-point FFT core, for simulation
// only. It accepts one frame of 4096 samples on an AXI-stream input (tready
// is dropped now and then to exercise stalls), keeps the frame for the
// testbench to inspect, and then plays out a result frame of 4096 bins with
// the bin index on tuser. The result is a synthetic spectrum chosen by the
// testbench rather than a transform of the input: a peak of height
// `peak_value` at bin `peak_bin`, small non-negative noise that stays below
// the pitch threshold, and a large negative value a few bins above the
// peak (which the design must ignore). Input beats are ignored during rst.
module fft_model (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tlast,
  output logic        s_tready,
  output logic [31:0] m_tdata,
  output logic        m_tvalid,
  output logic [11:0] m_tuser,
  input  int          peak_bin,
  input  int          peak_value,
  input  bit          stall_enable
);
  logic [15:0] frame [4096];
  int  count = 0;
  int  frames_in = 0, frames_out = 0, stalls = 0, bad_tlast = 0;

  initial begin s_tready = 1'b1; m_tvalid = 1'b0; m_tdata = '0; m_tuser = '0; end

  always @(posedge clk) begin
    if (rst) count = 0;
    else if (s_tvalid && s_tready) begin
      if (count < 4096) frame[count] = s_tdata[15:0];
      if (s_tlast != (count == 4095)) begin bad_tlast++; $display("tlast %b at count %0d", s_tlast, count); end
      count++;
      if (s_tlast) begin count = 0; frames_in++; -> frame_done; end
    end
    if (s_tvalid && !s_tready) stalls++;
    s_tready <= stall_enable ? ($urandom_range(0, 7) != 0) : 1'b1;
  end

  event frame_done;
  always @(frame_done) begin
    repeat (50) @(posedge clk);
    for (int k = 0; k < 4096; k++) begin
      int v;
      v = $urandom_range(0, 40);
      if (k == peak_bin) v = peak_value;
      if (k == peak_bin + 7) v = -30000;
      @(posedge clk);
      m_tvalid <= 1'b1;
      m_tuser  <= 12'(k);
      m_tdata  <= {16'h0000, 16'(v)};
    end
    @(posedge clk) m_tvalid <= 1'b0;
    frames_out++;
  end
endmodule
