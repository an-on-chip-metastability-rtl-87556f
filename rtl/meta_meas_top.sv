// meta_meas_top: on-chip metastability measurement circuit.
//
// Measures how long a synchronizer flip-flop stays metastable. The selected
// flip-flop under test is clocked by Fc and fed a data signal asynchronous
// to it, so now and then it is caught mid-transition. The measuring unit
// samples its output once DL after the clock edge and once at the falling
// edge; when the two samples differ, metastability lasted longer than DL,
// and the 16-bit counter counts one event. Over a measuring period T the
// count gives MTBF(DL) = T / count; repeating for several DL values gives
// the resolution time constant tau from the slope of ln(count) against DL.
//
// Pins (six inputs, one output, as in the design; their roles are this
// design's own choice):
//   meas_clk  measurement clock Fc (6.25 MHz)
//   data_ref  data reference clock, asynchronous to meas_clk
//   cfg_clk   controller clock: shifts the configuration register while
//             rd_en is low, clocks the serial readout while rd_en is high
//   cfg_din   configuration serial data
//   cnt_en    counter enable; its high time is the measuring period T
//   rd_en     serial readout of the counter
//   out       single output, chosen by the configuration (normally the
//             serial count, MSB first)
//
// Operation: shift in the 90 configuration bits (see meas_pkg), raise cnt_en
// for T, lower it, then raise rd_en and give 16 cfg_clk pulses, reading out
// after each one. There is no reset pin; the configuration is fully defined
// after 90 shifts and the counter is cleared at the start of each period.
// The X/Y samples, the other flip-flops' outputs, the synchronized enable and
// the last configuration stage are internal observation points with no pin
// of their own; they are left unused on purpose.
`timescale 1ps/1fs
module meta_meas_top
  import meas_pkg::*;
#(
  // Behavioural-model settings, passed down to the DUT flip-flops and the
  // delay line (defaults: measured tau values, see sync_ff_model/delay_line).
  parameter int unsigned TAU_PS [NUM_FF] = '{TAU_REGULAR_PS, TAU_TG_PS, TAU_XOR_PS, TAU_DXOR_PS},
  parameter int unsigned TW_PS      = 20,
  parameter int unsigned TCQ_PS     = 100,
  parameter int unsigned DL_BASE_PS = 1000,
  parameter int unsigned DL_STEP_PS = 15
) (
  input  logic meas_clk,
  input  logic data_ref,
  input  logic cfg_clk,
  input  logic cfg_din,
  input  logic cnt_en,
  input  logic rd_en,
  output logic out
);

  cfg_t                cfg;
  logic                cfg_dout;
  logic                dut_clk;
  logic                dut_data;
  logic                dut_q;
  logic [NUM_FF-1:0]   dut_q_all;
  logic                x_s, y_s, event_s;
  logic [CNT_BITS-1:0] count;
  logic                cnt_full;
  logic                counting;
  logic                serial;

  config_shift_register #(.N(CFG_BITS)) u_cfg (
    .cfg_clk  (cfg_clk),
    .shift_en (!rd_en),
    .cfg_din  (cfg_din),
    .cfg      (cfg),
    .cfg_dout (cfg_dout)
  );

  icg u_icg (
    .meas_clk (meas_clk),
    .data_ref (data_ref),
    .clk_en   (cfg.clk_en),
    .data_en  (cfg.data_en),
    .fd_sel   (cfg.fd_sel),
    .dut_clk  (dut_clk),
    .dut_data (dut_data)
  );

  dut_unit #(
    .TAU_PS (TAU_PS),
    .TW_PS  (TW_PS),
    .TCQ_PS (TCQ_PS)
  ) u_dut (
    .clk   (dut_clk),
    .data  (dut_data),
    .sel   (cfg.dut_sel),
    .q     (dut_q),
    .q_all (dut_q_all)
  );

  measuring_unit #(
    .TAPS    (DL_TAPS),
    .BASE_PS (DL_BASE_PS),
    .STEP_PS (DL_STEP_PS)
  ) u_me (
    .clk     (dut_clk),
    .q       (dut_q),
    .dl_code (cfg.dl_code),
    .x       (x_s),
    .y       (y_s),
    .event_o (event_s)
  );

  event_counter #(.WIDTH(CNT_BITS)) u_cnt (
    .clk      (meas_clk),
    .cnt_en   (cnt_en),
    .event_i  (event_s),
    .count    (count),
    .full     (cnt_full),
    .counting (counting)
  );

  counter_serializer #(.WIDTH(CNT_BITS)) u_ser (
    .clk    (cfg_clk),
    .rd_en  (rd_en),
    .par_in (count),
    .sout   (serial)
  );

  output_mux u_omux (
    .sel      (cfg.out_sel),
    .serial_i (serial),
    .dut_q_i  (dut_q),
    .event_i  (event_s),
    .full_i   (cnt_full),
    .out      (out)
  );

endmodule
