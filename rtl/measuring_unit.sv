// measuring_unit: detects metastability that outlasts the delay DL.
//
// The output q of the flip-flop under test is sampled twice per clock
// cycle: X by the clock delayed by DL (from the delay line), and Y by the
// falling edge of the clock. If the flip-flop went metastable at the rising
// edge and resolved only after DL, X still holds the old value while Y holds
// the resolved one, and event_o = X xor Y is high from the falling edge until
// the next delayed edge. The clock is slow (160 ns at 6.25 MHz), so a
// resolution later than the falling edge is negligible. This structure
// (delay line, two sample flip-flops, XOR) follows the design.
//
// Interface: clk is the DUT clock; q the DUT output; dl_code the delay-line
// code. event_o is valid around the next rising edge of clk, where the
// counter samples it. Between DL and the falling edge event_o also pulses
// after every ordinary transition of q (X already new, Y still old); such
// pulses never reach the counter, which samples only at the rising edge.
`timescale 1ps/1fs
module measuring_unit
  import meas_pkg::*;
#(
  parameter int unsigned TAPS    = DL_TAPS,
  parameter int unsigned BASE_PS = 1000,
  parameter int unsigned STEP_PS = 15
) (
  input  logic            clk,
  input  logic            q,
  input  logic [TAPS-1:0] dl_code,
  output logic            x,
  output logic            y,
  output logic            event_o
);

  logic clk_dl;

  delay_line #(
    .TAPS    (TAPS),
    .BASE_PS (BASE_PS),
    .STEP_PS (STEP_PS)
  ) u_dl (
    .clk_in  (clk),
    .code    (dl_code),
    .clk_out (clk_dl)
  );

  // First sample: clock delayed by DL.
  always_ff @(posedge clk_dl) x <= q;

  // Second, safe sample: falling edge of the clock.
  always_ff @(negedge clk) y <= q;

  assign event_o = x ^ y;

endmodule
