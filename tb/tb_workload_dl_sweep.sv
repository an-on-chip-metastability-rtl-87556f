// tb_workload_dl_sweep: the characterisation run of the regular flip-flop,
// scaled so that it can be simulated. As in the lab measurement, the clock
// runs at 6.25 MHz and the data comes from a 6.245 MHz reference that is not
// locked to it, at the four data rates 6.245, 3.12, 1.56 and 0.78 MHz
// (fd_sel = 0..3). At each rate the delay DL is swept over 1.0, 1.3 and
// 1.6 ns, one measuring period per point, and tau is fitted by least squares
// to ln(count) against DL.
//
// Scaling: with the measured tau of 101 ps, counts at these delays would
// need hours of chip time. The flip-flop model therefore gets tau = 404 ps and
// a 8 ns window, and each period lasts 200,000 * 2**fd_sel clock cycles, so
// every rate collects a similar number of events.
//
// Checks: each readout equals the count of an independent reference model.
// The fitted tau at each rate lies within 25% of the model's, and their mean
// within 10%: tau does not depend on the data rate. The event rate per
// data transition agrees across rates within 25%: the count is proportional
// to Fd, as MTBF = exp(S/tau) / (Tw Fc Fd) says.
`timescale 1ps/1fs
module tb_workload_dl_sweep;
  import meas_pkg::*;

  localparam int unsigned TAU  = 404;
  localparam int unsigned TW   = 8000;
  localparam int unsigned BASE = 1000, STEP = 15;
  localparam int          HALF = 80000;
  localparam real         HALF_D = 80064.317;
  localparam int          BASE_CYCLES = 200000;
  localparam int          NDL = 3;
  localparam int          DL_ONES [NDL] = '{0, 20, 40};

  logic meas_clk = 1'b0, data_ref = 1'b0;
  logic cfg_clk = 1'b0, cfg_din = 1'b0, cnt_en = 1'b0, rd_en = 1'b0;
  logic out;
  int checks = 0, failures = 0;

  meta_meas_top #(.TAU_PS('{TAU, TAU, TAU, TAU}), .TW_PS(TW)) dut (.*);

  always #HALF meas_clk = ~meas_clk;
  initial begin
    #777;
    forever #HALF_D data_ref = ~data_ref;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #10s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference event model (as in the end-to-end test).
  int   dl_ps = BASE;
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

  task automatic write_cfg(input int fd, input int ones);
    cfg_t c;
    c.clk_en  = 1'b1;
    c.data_en = 1'b1;
    c.out_sel = OUT_SERIAL;
    c.fd_sel  = 2'(fd);
    c.dut_sel = 4'b0001;
    c.dl_code = (ones == 0) ? '0 : ({DL_TAPS{1'b1}} >> (DL_TAPS - ones));
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      cfg_din = c[i];
      pulse_cfg_clk();
    end
    dl_ps = BASE + STEP * ones;
  endtask

  task automatic run_point(input int cycles, output int value);
    logic [CNT_BITS-1:0] v;
    @(negedge meas_clk) cnt_en = 1'b1;
    repeat (cycles) @(negedge meas_clk);
    cnt_en = 1'b0;
    repeat (4) @(negedge meas_clk);
    rd_en = 1'b1;
    for (int i = CNT_BITS - 1; i >= 0; i--) begin
      pulse_cfg_clk();
      #100 v[i] = out;
    end
    rd_en = 1'b0;
    #5000;
    value = int'(v);
    check(value == ref_count, $sformatf("readout %0d reference %0d", value, ref_count));
  endtask

  initial begin
    real tau_fit [4];
    real rate [4];
    real tau_mean, rate_mean;
    repeat (3) @(negedge meas_clk);
    for (int fd = 0; fd < 4; fd++) begin
      real sx, sy, sxx, sxy, x, y, slope;
      int  n;
      int  cycles;
      cycles = BASE_CYCLES << fd;
      sx = 0; sy = 0; sxx = 0; sxy = 0;
      for (int k = 0; k < NDL; k++) begin
        write_cfg(fd, DL_ONES[k]);
        run_point(cycles, n);
        $display("Fd = %0.3f MHz  DL = %0d ps  T = %0d cycles  count = %0d  MTBF = %0.3f ms",
                 6.245 / (1 << fd), dl_ps, cycles, n, (n > 0) ? cycles * 0.00016 / n : -1.0);
        check(n > 10, "enough events for a fit");
        x = real'(dl_ps);
        y = $ln(real'((n > 0) ? n : 1));
        sx += x; sy += y; sxx += x * x; sxy += x * y;
        if (k == 0) rate[fd] = real'(n) / (real'(cycles) / real'(1 << fd));
      end
      slope = (NDL * sxy - sx * sy) / (NDL * sxx - sx * sx);
      tau_fit[fd] = -1.0 / slope;
      $display("Fd = %0.3f MHz: fitted tau = %0.0f ps (model %0d ps)", 6.245 / (1 << fd), tau_fit[fd], TAU);
      check(tau_fit[fd] > 0.75 * TAU && tau_fit[fd] < 1.25 * TAU, $sformatf("tau at fd_sel %0d", fd));
    end
    tau_mean = 0; rate_mean = 0;
    for (int fd = 0; fd < 4; fd++) begin
      tau_mean += tau_fit[fd] / 4.0;
      rate_mean += rate[fd] / 4.0;
    end
    $display("mean tau over the four data rates = %0.0f ps", tau_mean);
    check(tau_mean > 0.9 * TAU && tau_mean < 1.1 * TAU, "mean tau");
    for (int fd = 0; fd < 4; fd++)
      check(rate[fd] > 0.75 * rate_mean && rate[fd] < 1.25 * rate_mean,
            $sformatf("events per data transition at fd_sel %0d: %0.5f (mean %0.5f)", fd, rate[fd], rate_mean));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
