// output_mux: chooses what drives the circuit's single output pin.
// OUT_SERIAL gives the serial counter readout, OUT_DUT_Q the selected
// flip-flop's output, OUT_EVENT the measuring unit's raw event flag and
// OUT_CNT_FULL the counter's saturation flag. That an output mux exists
// follows the design; its inputs and encoding are this design's own
// choices. Purely combinational.
`timescale 1ps/1fs
module output_mux
  import meas_pkg::*;
(
  input  out_sel_e sel,
  input  logic     serial_i,
  input  logic     dut_q_i,
  input  logic     event_i,
  input  logic     full_i,
  output logic     out
);

  always_comb begin
    unique case (sel)
      OUT_SERIAL:   out = serial_i;
      OUT_DUT_Q:    out = dut_q_i;
      OUT_EVENT:    out = event_i;
      OUT_CNT_FULL: out = full_i;
      default:      out = serial_i;
    endcase
  end

endmodule
