// bit_sync: STAGES flip-flops in series that bring an asynchronous level
// into the clk domain (the cascaded-flip-flop synchronizer). Output latency
// is STAGES rising edges of clk.
`timescale 1ps/1fs
module bit_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] sr;

  always_ff @(posedge clk) sr <= {sr[STAGES-2:0], d};

  assign q = sr[STAGES-1];

endmodule
