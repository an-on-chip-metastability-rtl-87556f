// dut_unit: the design-under-test unit holding the four synchronizer
// flip-flops.
//
// Four flip-flop types are compared: (0) the regular library flip-flop,
// (1) the transmission-gate feedback flip-flop, (2) the XOR feedback
// flip-flop and (3) the delayed XOR feedback flip-flop. All four share the
// DUT clock. sel is a one-hot choice from the configuration register: only
// the selected flip-flop receives the data signal (the others see a constant
// 0 and stay quiet), and only its output reaches q. The four instances are
// behavioural models whose resolution time constants default to the measured
// values. The one-hot selection and the AND gating are this design's own
// choices. q is combinational from the selected flip-flop's output.
`timescale 1ps/1fs
module dut_unit
  import meas_pkg::*;
#(
  parameter int unsigned TAU_PS [NUM_FF] = '{TAU_REGULAR_PS, TAU_TG_PS, TAU_XOR_PS, TAU_DXOR_PS},
  parameter int unsigned TW_PS  = 20,
  parameter int unsigned TCQ_PS = 100
) (
  input  logic              clk,
  input  logic              data,
  input  logic [NUM_FF-1:0] sel,
  output logic              q,
  output logic [NUM_FF-1:0] q_all
);

  logic [NUM_FF-1:0] d_gated;

  for (genvar i = 0; i < NUM_FF; i++) begin : g_ff
    assign d_gated[i] = data & sel[i];
    sync_ff_model #(
      .TAU_PS (TAU_PS[i]),
      .TW_PS  (TW_PS),
      .TCQ_PS (TCQ_PS)
    ) u_ff (
      .clk (clk),
      .d   (d_gated[i]),
      .q   (q_all[i])
    );
  end

  assign q = |(q_all & sel);

endmodule
