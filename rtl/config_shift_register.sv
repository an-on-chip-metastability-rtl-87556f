// config_shift_register: the serially written configuration register.
//
// The off-chip controller writes the whole configuration (delay-line code,
// choice of flip-flop under test, data frequency, output selection) through
// one data pin and one clock pin. On every rising edge of cfg_clk with
// shift_en high, the register moves one place toward its MSB and cfg_din
// enters bit 0. The first bit shifted in therefore ends in bit N-1 after N
// clocks. The register has no reset and no shadow copy: its outputs change
// while it is shifted, so the controller writes it only between measuring
// periods. The length (90 bits) follows the design; the shift direction and
// the enable are this design's own choices. cfg_dout is the last stage.
`timescale 1ps/1fs
module config_shift_register #(
  parameter int unsigned N = 90
) (
  input  logic         cfg_clk,
  input  logic         shift_en,
  input  logic         cfg_din,
  output logic [N-1:0] cfg,
  output logic         cfg_dout
);

  always_ff @(posedge cfg_clk) begin
    if (shift_en) cfg <= {cfg[N-2:0], cfg_din};
  end

  assign cfg_dout = cfg[N-1];

endmodule
