// sync_ff_model: behavioural model of one synchronizer flip-flop under test.
//
// Behavioural model, not synthesizable. The four flip-flops of the DUT unit
// (regular library FF, transmission-gate feedback FF, XOR feedback FF and
// delayed XOR feedback FF) are transistor-level circuits whose worth lies in
// how fast their master latch leaves a metastable state. In a two-state logic
// simulator that can only be modelled statistically, which this module does:
//
//   * A rising clock edge that finds D unchanged for more than TW_PS captures
//     D normally; Q follows after TCQ_PS.
//   * If D changed within the last TW_PS before the edge, the flip-flop goes
//     metastable. Q keeps its old value, and after TCQ_PS plus a resolution
//     time drawn from an exponential distribution with mean TAU_PS it settles
//     to a random value (0 or 1 with equal probability).
//
// This is the failure model behind MTBF = exp(S/tau) / (Tw * Fc * Fd): the
// probability that metastability outlasts a time S is exp(-S/tau).
// TAU_PS is the only difference between the four flip-flop types; the
// defaults of the DUT unit use the measured values (101, 210, 148 and
// 168 ps). TW_PS and TCQ_PS are this model's own choices. Only the
// setup side of the window is modelled (D changing at or before the edge).
//
// Blocking assignments inside the clocked process are intentional: they
// are local bookkeeping of the model, not flip-flops.
//
// Interface: clk, d in; q out. meta_count counts metastable captures and may
// be read hierarchically by a testbench.
`timescale 1ps/1fs
module sync_ff_model #(
  parameter int unsigned TAU_PS = 101,  // resolution time constant
  parameter int unsigned TW_PS  = 20,   // metastability window before the edge
  parameter int unsigned TCQ_PS = 100   // clock-to-Q delay when not metastable
) (
  input  logic clk,
  input  logic d,
  output logic q
);

  real         t_d_change;   // time of the last transition on d
  int unsigned meta_count;   // metastable captures so far

  initial begin
    q           = 1'b0;
    t_d_change  = -1.0e12;
    meta_count  = 0;
  end

  always @(posedge d or negedge d) t_d_change = $realtime;

  real  dly;                 // delay of the pending output change
  logic v;                   // value the output will take
  real  u;                   // uniform random number in (0, 1]

  always @(posedge clk) begin : capture
    if ($realtime - t_d_change <= real'(TW_PS)) begin
      // Metastable: exponential resolution time, random final value.
      u           = (real'($urandom) + 1.0) / 4294967296.0;
      dly         = real'(TCQ_PS) - real'(TAU_PS) * $ln(u);
      v           = 1'($urandom % 2);
      meta_count  = meta_count + 1;
    end else begin
      v   = d;
      dly = real'(TCQ_PS);
    end
    q <= #(dly) v;
  end

endmodule
