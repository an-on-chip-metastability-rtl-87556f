// delay_line: behavioural model of the programmable delay line of the
// measuring unit.
//
// Behavioural model, not synthesizable: the real part is a chain of analog
// delay cells. The measuring unit samples the flip-flop under test with the
// clock delayed by DL; the delay is set from the configuration register.
// The code is taken as a thermometer code: every '1' bit switches in one
// delay cell of STEP_PS, on top of a fixed BASE_PS (any code is accepted;
// the delay depends only on the number of ones). With the defaults the
// range is 1.0 ns to 2.2 ns, which covers the 1.3 to 2.15 ns range over
// which the regular flip-flop was measured. Cell count, base and step are
// this design's own choices.
//
// Interface: clk_in, code in; clk_out is clk_in delayed (transport delay,
// both edges).
`timescale 1ps/1fs
module delay_line #(
  parameter int unsigned TAPS    = 80,
  parameter int unsigned BASE_PS = 1000,
  parameter int unsigned STEP_PS = 15
) (
  input  logic            clk_in,
  input  logic [TAPS-1:0] code,
  output logic            clk_out
);

  real delay_ps;

  initial clk_out = 1'b0;

  always_comb delay_ps = real'(BASE_PS) + real'(STEP_PS) * real'($countones(code));

  always @(posedge clk_in or negedge clk_in) clk_out <= #(delay_ps) clk_in;

endmodule
