// cic_decimator: cascaded integrator-comb decimation filter.
//
// STAGES integrators run at the input rate (one step per `en`), the
// integrator output is kept every decimation_ratio-th input, and STAGES comb
// sections (differential delay 1) run at that decimated rate. The result is a
// moving-average-like low-pass with gain R^STAGES, computed in WIDTH-bit
// two's-complement arithmetic: the integrators wrap, which is harmless as long
// as WIDTH >= IN_W + STAGES*log2(R) (21 bits for +-1 inputs, 5 stages, R=15).
// d_out is the top OUT_W bits of the comb result. The ratio is an input so
// that it can be changed without rebuilding; 5 stages and R = 15 follow the
// design description, WIDTH is this design's choice.
//
// Timing: d_valid pulses one cycle, with a new d_out, 2 cycles after every
// decimation_ratio-th `en`. Synchronous active-high reset clears all state.
module cic_decimator #(
  parameter int STAGES = 5,
  parameter int WIDTH  = 21,
  parameter int IN_W   = 8,
  parameter int OUT_W  = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic [15:0]             decimation_ratio,
  input  logic signed [IN_W-1:0]  d_in,
  output logic signed [OUT_W-1:0] d_out,
  output logic                    d_valid
);
  logic signed [WIDTH-1:0] integ [STAGES];
  logic signed [WIDTH-1:0] comb_d [STAGES];   // previous input of each comb
  logic signed [WIDTH-1:0] decimated;
  logic [15:0]             count;
  logic                    comb_go;

  // comb chain: each stage subtracts its previous input
  logic signed [WIDTH-1:0] comb_in [STAGES+1];
  always_comb begin
    comb_in[0] = decimated;
    for (int i = 0; i < STAGES; i++) comb_in[i+1] = comb_in[i] - comb_d[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < STAGES; i++) begin
        integ[i]  <= '0;
        comb_d[i] <= '0;
      end
      decimated <= '0;
      count     <= '0;
      comb_go   <= 1'b0;
      d_out     <= '0;
      d_valid   <= 1'b0;
    end else begin
      comb_go <= 1'b0;
      d_valid <= 1'b0;
      if (en) begin
        integ[0] <= integ[0] + WIDTH'(d_in);
        for (int i = 1; i < STAGES; i++) integ[i] <= integ[i] + integ[i-1];
        if (count >= decimation_ratio - 16'd1) begin
          count     <= '0;
          decimated <= integ[STAGES-1];
          comb_go   <= 1'b1;
        end else begin
          count <= count + 16'd1;
        end
      end
      if (comb_go) begin
        for (int i = 0; i < STAGES; i++) comb_d[i] <= comb_in[i];
        d_out   <= OUT_W'(comb_in[STAGES] >>> (WIDTH - OUT_W));
        d_valid <= 1'b1;
      end
    end
  end
endmodule
