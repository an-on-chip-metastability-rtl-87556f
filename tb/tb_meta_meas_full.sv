// tb_meta_meas_full: one complete measurement with the circuit at its
// default settings (measured tau values, 20 ps window, 1.0-2.2 ns delay
// line). The clock runs at 6.25 MHz and the data reference at 6.245 MHz,
// so the data edges slide past the clock edges by 128 ps per cycle and now
// and then fall inside the window. The controller selects the regular
// flip-flop and DL = 1.3 ns, counts for 300,000 cycles (48 ms), reads the
// count out serially and compares it with an independent reference that
// flags each cycle in which the flip-flop output changed after DL but
// before the falling edge. With tau = 101 ps such late resolutions are
// very rare, so the expected count is almost always 0; the test also
// checks that metastable captures did occur and prints the MTBF bound.
`timescale 1ps/1fs
module tb_meta_meas_full;
  import meas_pkg::*;

  localparam int HALF   = 80000;    // 6.25 MHz
  localparam real HALF_D = 80064.317;  // about 6.245 MHz, not a multiple of 1 ps
  localparam int CYCLES = 300000;
  localparam int ONES   = 20;       // 1000 + 20 * 15 = 1300 ps

  logic meas_clk = 1'b0, data_ref = 1'b0;
  logic cfg_clk = 1'b0, cfg_din = 1'b0, cnt_en = 1'b0, rd_en = 1'b0;
  logic out;
  int checks = 0, failures = 0;

  meta_meas_top dut (.*);

  always #HALF meas_clk = ~meas_clk;
  initial begin
    #1234;
    forever #HALF_D data_ref = ~data_ref;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference event model.
  int   dl_ps = 1000 + 15 * ONES;
  real  t_edge = 0.0;
  bit   ev_cycle, ev_prev;
  logic [1:0] en_pipe = '0;
  bit   counting_ref = 1'b0;
  int   ref_count = 0;
  always @(dut.dut_q) begin
    if (($realtime - t_edge) > real'(dl_ps) && ($realtime - t_edge) < real'(HALF)) ev_cycle = 1'b1;
  end
  always @(posedge meas_clk) begin
    ev_prev  = ev_cycle;
    ev_cycle = 1'b0;
    t_edge   = $realtime;
    if (en_pipe[1] && !counting_ref) ref_count = 0;
    else if (en_pipe[1] && ev_prev && ref_count < 65535) ref_count++;
    counting_ref = en_pipe[1];
    en_pipe = {en_pipe[0], cnt_en};
  end

  task automatic pulse_cfg_clk();
    #5000 cfg_clk = 1'b1;
    #5000 cfg_clk = 1'b0;
  endtask

  initial begin
    cfg_t c;
    logic [CNT_BITS-1:0] v;
    int unsigned m0, captures;
    c.clk_en  = 1'b1;
    c.data_en = 1'b1;
    c.out_sel = OUT_SERIAL;
    c.fd_sel  = 2'd0;
    c.dut_sel = 4'b0001;
    c.dl_code = {DL_TAPS{1'b1}} >> (DL_TAPS - ONES);
    // 1. configuration
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      cfg_din = c[i];
      pulse_cfg_clk();
    end
    check(dut.cfg == c, "configuration written");
    // 2. measuring period
    m0 = dut.u_dut.g_ff[0].u_ff.meta_count;
    @(negedge meas_clk) cnt_en = 1'b1;
    repeat (CYCLES) @(negedge meas_clk);
    cnt_en = 1'b0;
    repeat (4) @(negedge meas_clk);
    captures = dut.u_dut.g_ff[0].u_ff.meta_count - m0;
    // 3. serial readout
    rd_en = 1'b1;
    for (int i = CNT_BITS - 1; i >= 0; i--) begin
      pulse_cfg_clk();
      #100 v[i] = out;
    end
    rd_en = 1'b0;
    $display("T = %0d cycles (%0.1f ms): %0d metastable captures, count %0d, reference %0d",
             CYCLES, CYCLES * 2.0 * HALF / 1.0e9, captures, v, ref_count);
    if (v == 0) $display("MTBF(DL=%0d ps) > %0.1f ms", dl_ps, CYCLES * 2.0 * HALF / 1.0e9);
    check(int'(v) == ref_count, "readout matches the reference");
    check(captures > 0, "data edges fell inside the window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
