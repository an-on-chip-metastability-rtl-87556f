// event_counter: the 16-bit counter of metastability events.
//
// The controller sets the measuring period T by raising cnt_en and later
// lowering it. cnt_en comes from a pin, asynchronous to clk, and is first
// passed through a two-flip-flop synchronizer. The rising edge of the
// synchronized enable clears the count, so every period starts from zero;
// while it is high, each rising edge of clk that finds event_i high adds one.
// The count saturates at all ones and sets full rather than wrapping around.
// The width (16 bits) and the enable-controlled period follow the design;
// clear-on-start, the synchronizer and saturation are this design's own
// choices. count is stable while cnt_en is low, for the serial readout.
`timescale 1ps/1fs
module event_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             cnt_en,
  input  logic             event_i,
  output logic [WIDTH-1:0] count,
  output logic             full,
  output logic             counting
);

  logic en_s;
  logic en_q;

  bit_sync #(.STAGES(2)) u_sync (
    .clk (clk),
    .d   (cnt_en),
    .q   (en_s)
  );

  always_ff @(posedge clk) begin
    en_q <= en_s;
    if (en_s && !en_q) begin
      count <= '0;
    end else if (en_s && event_i && !full) begin
      count <= count + 1'b1;
    end
  end

  assign full     = &count;
  assign counting = en_s;

endmodule
