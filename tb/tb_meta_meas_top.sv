// tb_meta_meas_top: end-to-end test of the metastability measurement
// circuit, driven through its seven pins the way the off-chip controller
// drives it: shift in a configuration, enable the counter for a measuring
// period, disable it, read the count out serially, repeat.
//
// To make metastability frequent enough to simulate, the data reference is
// phase-locked to the clock so that every data transition lands 5 ps before
// a clock edge (inside the flip-flops' window), and the flip-flop models get
// resolution time constants four times the measured ones (404, 840, 592 and
// 672 ps). Every readout is compared with an independent reference that
// watches the flip-flop output and flags each cycle in which it changed
// after DL but before the falling edge.
//
// The test then extracts tau for each flip-flop from the counts at two
// delay settings, tau = (DL2 - DL1) / ln(N1 / N2), as the measurement
// software does, and checks it against the model value and the ranking
// regular < XOR < delayed XOR < TG. It also exercises the clock gate, the
// data enable, the data divider, counter saturation and every output-mux
// selection, and fails if any of these never happened.
`timescale 1ps/1fs
module tb_meta_meas_top;
  import meas_pkg::*;

  localparam int unsigned TAUS [NUM_FF] = '{404, 840, 592, 672};
  localparam int unsigned BASE = 1000, STEP = 15;
  localparam int          HALF = 80000;          // 6.25 MHz clock

  logic meas_clk = 1'b0, data_ref = 1'b0;
  logic cfg_clk = 1'b0, cfg_din = 1'b0, cnt_en = 1'b0, rd_en = 1'b0;
  logic out;
  int checks = 0, failures = 0;

  meta_meas_top #(.TAU_PS(TAUS), .DL_BASE_PS(BASE), .DL_STEP_PS(STEP)) dut (.*);

  // Clock, and data reference rising 5 ps ahead of each clock edge.
  always #HALF meas_clk = ~meas_clk;
  initial begin
    #(HALF - 5);
    forever begin
      data_ref = 1'b1; #HALF;
      data_ref = 1'b0; #HALF;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #2s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference event model ----------------
  int   dl_ps = BASE;               // DL of the current configuration
  bit   clk_on = 1'b1;              // DUT clock gate state
  real  t_edge = 0.0;
  bit   ev_cycle, ev_prev;
  logic [1:0] en_pipe = '0;
  bit   counting_ref = 1'b0;
  int   ref_count = 0;
  int   out_hits = 0, out_edges = 0;

  // The raw event flag on the output pin also pulses between DL and the
  // falling edge after every ordinary transition; only its value at the
  // rising edges inside the counting window is compared (out_hits).
  always @(dut.dut_q) begin
    if (clk_on && ($realtime - t_edge) > real'(dl_ps) && ($realtime - t_edge) < real'(HALF))
      ev_cycle = 1'b1;
  end
  always @(posedge meas_clk) begin
    ev_prev  = ev_cycle;
    ev_cycle = 1'b0;
    t_edge   = $realtime;
    if (en_pipe[1] && counting_ref && out) out_hits++;
    if (en_pipe[1] && !counting_ref) ref_count = 0;
    else if (en_pipe[1] && ev_prev && ref_count < 65535) ref_count++;
    counting_ref = en_pipe[1];
    en_pipe = {en_pipe[0], cnt_en};
  end
  always @(out) out_edges++;

  // ---------------- controller ----------------
  int n_cfg_writes = 0, n_readouts = 0, n_gated = 0, n_data_off = 0;
  int n_div = 0, n_sat = 0, n_meta_events = 0;
  int n_ff_measured [NUM_FF] = '{0, 0, 0, 0};
  int n_out_mode [4] = '{0, 0, 0, 0};

  task automatic pulse_cfg_clk();
    #5000 cfg_clk = 1'b1;
    #5000 cfg_clk = 1'b0;
  endtask

  task automatic write_cfg(input cfg_t c);
    rd_en = 1'b0;
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      cfg_din = c[i];
      pulse_cfg_clk();
    end
    check(dut.cfg == c, "configuration register holds the written word");
    dl_ps  = BASE + STEP * $countones(c.dl_code);
    clk_on = c.clk_en;
    n_cfg_writes++;
  endtask

  task automatic measure(input int cycles);
    @(negedge meas_clk) cnt_en = 1'b1;
    repeat (cycles) @(negedge meas_clk);
    cnt_en = 1'b0;
    repeat (4) @(negedge meas_clk);
  endtask

  task automatic readout(output int value);
    logic [CNT_BITS-1:0] v;
    rd_en = 1'b1;
    for (int i = CNT_BITS - 1; i >= 0; i--) begin
      pulse_cfg_clk();
      #100 v[i] = out;
    end
    rd_en = 1'b0;
    #5000;
    value = int'(v);
    n_readouts++;
    n_out_mode[OUT_SERIAL]++;
    check(value == ref_count, $sformatf("readout %0d, reference %0d", value, ref_count));
    if (value > 0) n_meta_events += value;
  endtask

  function automatic cfg_t make_cfg(input int ff, input int ones, input int fd,
                                    input out_sel_e os, input bit ck, input bit de);
    cfg_t c;
    c.clk_en  = ck;
    c.data_en = de;
    c.out_sel = os;
    c.fd_sel  = 2'(fd);
    c.dut_sel = NUM_FF'(1 << ff);
    c.dl_code = (ones == 0) ? '0 : ({DL_TAPS{1'b1}} >> (DL_TAPS - ones));
    return c;
  endfunction

  // ---------------- test sequence ----------------
  initial begin
    int n1, n2, v;
    real tau_est [NUM_FF];
    localparam int CYC = 12000;
    localparam int K2  = 40;                       // second DL: +600 ps

    repeat (3) @(negedge meas_clk);

    // tau extraction for each flip-flop
    for (int ff = 0; ff < NUM_FF; ff++) begin
      write_cfg(make_cfg(ff, 0, 0, OUT_SERIAL, 1'b1, 1'b1));
      measure(CYC);
      readout(n1);
      write_cfg(make_cfg(ff, K2, 0, OUT_SERIAL, 1'b1, 1'b1));
      measure(CYC);
      readout(n2);
      n_ff_measured[ff]++;
      if (n1 > 0 && n2 > 0 && n1 > n2) tau_est[ff] = real'(STEP * K2) / $ln(real'(n1) / real'(n2));
      else tau_est[ff] = 0.0;
      $display("flip-flop %0d: N(DL=%0d ps)=%0d N(DL=%0d ps)=%0d tau=%0.0f ps (model %0d ps)",
               ff, BASE, n1, BASE + STEP * K2, n2, tau_est[ff], TAUS[ff]);
      check(tau_est[ff] > 0.8 * TAUS[ff] && tau_est[ff] < 1.2 * TAUS[ff],
            $sformatf("flip-flop %0d tau estimate %0.0f", ff, tau_est[ff]));
    end
    check(tau_est[0] < tau_est[2] && tau_est[2] < tau_est[3] && tau_est[3] < tau_est[1],
          "tau ranking regular < XOR < delayed XOR < TG");

    // Clock gate off: no events.
    write_cfg(make_cfg(0, 0, 0, OUT_SERIAL, 1'b0, 1'b1));
    measure(2000);
    readout(v);
    check(v == 0, "no events with the DUT clock gated");
    n_gated++;

    // Data frozen: no events.
    write_cfg(make_cfg(0, 0, 0, OUT_SERIAL, 1'b1, 1'b0));
    measure(2000);
    readout(v);
    check(v == 0, "no events with the data frozen");
    n_data_off++;

    // Data divided by 4: a quarter of the edges are metastable.
    begin
      int unsigned m0;
      write_cfg(make_cfg(1, 0, 2, OUT_SERIAL, 1'b1, 1'b1));
      m0 = dut.u_dut.g_ff[1].u_ff.meta_count;
      measure(4000);
      readout(v);
      check((dut.u_dut.g_ff[1].u_ff.meta_count - m0) inside {[990:1020]},
            $sformatf("data at 1/4 rate: %0d metastable captures", dut.u_dut.g_ff[1].u_ff.meta_count - m0));
      n_div++;
    end

    // Output mux: raw event flag and DUT output.
    write_cfg(make_cfg(1, 0, 0, OUT_EVENT, 1'b1, 1'b1));
    out_hits = 0;
    measure(2000);
    check(out_hits > 0 && out_hits == ref_count,
          $sformatf("event output high at %0d counting edges, counted %0d", out_hits, ref_count));
    n_out_mode[OUT_EVENT]++;
    write_cfg(make_cfg(1, 0, 0, OUT_DUT_Q, 1'b1, 1'b1));
    out_edges = 0;
    repeat (500) @(negedge meas_clk);
    check(out_edges > 100, $sformatf("DUT output visible: %0d edges", out_edges));
    n_out_mode[OUT_DUT_Q]++;

    // Saturation: TG flip-flop, shortest DL, long period.
    write_cfg(make_cfg(1, 0, 0, OUT_CNT_FULL, 1'b1, 1'b1));
    measure(450000);
    #1;
    check(out == 1'b1, "full flag on the output pin");
    n_out_mode[OUT_CNT_FULL]++;
    write_cfg(make_cfg(1, 0, 0, OUT_SERIAL, 1'b1, 1'b1));
    readout(v);
    check(v == 65535, $sformatf("saturated count %0d", v));
    if (v == 65535) n_sat++;

    // Every mechanism must have happened.
    check(n_cfg_writes > 0, "configuration written");
    check(n_readouts > 0, "serial readout");
    check(n_meta_events > 0, "metastability events counted");
    for (int ff = 0; ff < NUM_FF; ff++) check(n_ff_measured[ff] > 0, $sformatf("flip-flop %0d measured", ff));
    check(n_gated > 0, "clock gate exercised");
    check(n_data_off > 0, "data enable exercised");
    check(n_div > 0, "data divider exercised");
    check(n_sat > 0, "counter saturation");
    for (int m = 0; m < 4; m++) check(n_out_mode[m] > 0, $sformatf("output mode %0d used", m));
    $display("mechanisms: cfg=%0d readouts=%0d events=%0d gated=%0d data_off=%0d div=%0d sat=%0d",
             n_cfg_writes, n_readouts, n_meta_events, n_gated, n_data_off, n_div, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
