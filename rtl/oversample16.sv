// oversample16: 16-sample accumulator that decimates by 16 and adds 2 bits.
//
// Sixteen unsigned IN_W-bit samples (one per `eoc`) are summed; the sum
// (IN_W+4 bits) plus 2 for rounding is divided by 4, giving one OUT_W =
// IN_W+2 bit sample with a one-cycle `done` pulse. In the microphone path it
// follows the CIC filter as an extra low-pass, bit-depth increase and 16x
// decimation (160 kHz to 10 kHz).
//
// Timing: done and the new oversample come 1 cycle after the 16th eoc.
// Synchronous active-high reset clears the accumulator.
module oversample16 #(
  parameter int IN_W  = 12,
  parameter int OUT_W = 14
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [IN_W-1:0]  sample,
  input  logic             eoc,
  output logic [OUT_W-1:0] oversample,
  output logic             done
);
  logic [3:0]      counter;
  logic [IN_W+3:0] acc;
  logic [IN_W+4:0] total;

  assign total = {1'b0, acc} + (IN_W+5)'(sample) + (IN_W+5)'(2);

  always_ff @(posedge clk) begin
    if (rst) begin
      counter    <= '0;
      acc        <= '0;
      oversample <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (eoc) begin
        counter <= counter + 1'b1;
        if (&counter) begin
          oversample <= OUT_W'(total >> 2);
          done       <= 1'b1;
          acc        <= '0;
        end else begin
          acc <= acc + (IN_W+4)'(sample);
        end
      end
    end
  end
endmodule
