// meas_pkg: types and constants shared by the metastability measurement circuit.
//
// The configuration word is the content of the 90-bit configuration shift
// register. The total length of 90 bits and the fact that it carries the
// delay-line (DL) setting and the choice of flip-flop under test follow the
// design; how the 90 bits are divided into fields is this design's own choice:
//
//   bit  89      clk_en   DUT clock gate enable (ICG)
//   bit  88      data_en  DUT data toggling enable (ICG)
//   bits 87:86   out_sel  what drives the single output pin (see out_sel_e)
//   bits 85:84   fd_sel   data frequency = data reference / 2**fd_sel
//   bits 83:80   dut_sel  one-hot choice of the flip-flop under test
//                         (bit 0 regular library FF, 1 TG feedback FF,
//                          2 XOR feedback FF, 3 delayed XOR feedback FF)
//   bits 79:0    dl_code  thermometer code: number of delay cells switched in
//
// Bit 0 is the last bit shifted in, bit 89 the first.
`timescale 1ps/1fs
package meas_pkg;

  localparam int unsigned CFG_BITS   = 90;   // length of the configuration register
  localparam int unsigned DL_TAPS    = 80;   // delay-line cells (thermometer code)
  localparam int unsigned NUM_FF     = 4;    // flip-flop types in the DUT unit
  localparam int unsigned CNT_BITS   = 16;   // event counter width

  // Measured resolution time constants, in ps, used as defaults of the
  // behavioural flip-flop models.
  localparam int unsigned TAU_REGULAR_PS = 101;
  localparam int unsigned TAU_TG_PS      = 210;
  localparam int unsigned TAU_XOR_PS     = 148;
  localparam int unsigned TAU_DXOR_PS    = 168;

  typedef enum logic [1:0] {
    OUT_SERIAL   = 2'd0,  // counter serializer (normal readout)
    OUT_DUT_Q    = 2'd1,  // output of the selected flip-flop under test
    OUT_EVENT    = 2'd2,  // raw event flag X xor Y of the measuring unit
    OUT_CNT_FULL = 2'd3   // counter has saturated
  } out_sel_e;

  typedef struct packed {
    logic                clk_en;
    logic                data_en;
    out_sel_e            out_sel;
    logic [1:0]          fd_sel;
    logic [NUM_FF-1:0]   dut_sel;
    logic [DL_TAPS-1:0]  dl_code;
  } cfg_t;

endpackage
