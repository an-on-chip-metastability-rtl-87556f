// icg: input and clock generation unit.
//
// Produces the two signals the flip-flop under test receives:
//   * dut_clk, the measurement clock meas_clk (Fc) passed through a
//     latch-based clock gate controlled by clk_en. The latch is transparent
//     while meas_clk is low, so the gate cannot cut a clock pulse short;
//     this is the one intended latch of the design.
//   * dut_data, a data signal asynchronous to meas_clk. It is derived from
//     the separate reference data_ref: dut_data makes one transition every
//     2**fd_sel rising edges of data_ref, so one reference serves four data
//     rates (ratio 1, 1/2, 1/4, 1/8, as the four data frequencies 6.25,
//     3.125, 1.56 and 0.78 MHz). data_en low freezes dut_data.
// The unit's name and role follow the design; everything inside it (gate,
// divider, encoding of fd_sel) is this design's own choice.
// There is no reset pin: dut_data and the divider start at whatever value
// they power up with, which only shifts the phase of the data signal.
`timescale 1ps/1fs
module icg (
  input  logic       meas_clk,
  input  logic       data_ref,
  input  logic       clk_en,
  input  logic       data_en,
  input  logic [1:0] fd_sel,
  output logic       dut_clk,
  output logic       dut_data
);

  logic       en_latched;
  logic [2:0] div_cnt;
  logic [2:0] mask;

  // Clock gate: latch enable while the clock is low.
  always_latch begin
    if (!meas_clk) en_latched = clk_en;
  end
  assign dut_clk = meas_clk & en_latched;

  // Data generator: toggle once every 2**fd_sel reference edges.
  always_comb mask = 3'((4'd1 << fd_sel) - 4'd1);

  always_ff @(posedge data_ref) begin
    div_cnt <= div_cnt + 3'd1;
    if (data_en && ((div_cnt & mask) == mask)) dut_data <= ~dut_data;
  end

endmodule
