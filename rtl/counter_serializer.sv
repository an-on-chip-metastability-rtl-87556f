// counter_serializer: reads the event counter out through one pin.
//
// Driven by the controller's clock cfg_clk. The first rising edge with
// rd_en high loads the parallel count; each further edge with rd_en high
// shifts by one place. sout shows the MSB, so after the load edge it
// carries bit WIDTH-1, after the next edge bit WIDTH-2, and so on: WIDTH
// edges deliver the whole count, MSB first. The counter must be idle
// (cnt_en low) during the readout. That a serializer reads the counter
// follows the design; the protocol is this design's own choice.
`timescale 1ps/1fs
module counter_serializer #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [WIDTH-1:0] par_in,
  output logic             sout
);

  logic [WIDTH-1:0] sreg;
  logic             rd_q;

  always_ff @(posedge clk) begin
    rd_q <= rd_en;
    if (rd_en && !rd_q)  sreg <= par_in;
    else if (rd_en)      sreg <= {sreg[WIDTH-2:0], 1'b0};
  end

  assign sout = sreg[WIDTH-1];

endmodule
