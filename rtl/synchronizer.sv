// synchronizer: NSYNC-flop synchroniser for a single-bit signal entering a
// clock domain. Output is `in` delayed by NSYNC cycles of clk.
module synchronizer #(
  parameter int NSYNC = 2
) (
  input  logic clk,
  input  logic in,
  output logic out
);
  logic [NSYNC-1:0] sync_q;
  always_ff @(posedge clk) sync_q <= {sync_q[NSYNC-2:0], in};
  assign out = sync_q[NSYNC-1];
endmodule
