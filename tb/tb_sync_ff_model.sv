// tb_sync_ff_model: checks the behavioural synchronizer flip-flop.
//   1. Data that changes long before the clock edge is captured and
//      appears on q exactly TCQ_PS after the edge.
//   2. Data that changes inside the window enters metastability: q holds
//      its old value at TCQ_PS and later settles to a random value. Over
//      many trials about half the trials change q, and the mean time from
//      TCQ_PS to the change estimates tau, which must lie within 10% of
//      TAU_PS (a simulated version of the on-chip measurement).
`timescale 1ps/1fs
module tb_sync_ff_model;
  localparam int unsigned TAU = 101, TW = 20, TCQ = 100;
  localparam int TRIALS = 4000;
  logic clk = 1'b0, d = 1'b0, q;
  int checks = 0, failures = 0;

  sync_ff_model #(.TAU_PS(TAU), .TW_PS(TW), .TCQ_PS(TCQ)) dut (.*);

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

  real t_edge, t_change, sum_res;
  int  n_changed, n_meta_start;
  logic q_old;

  initial begin
    // --- normal captures ---
    for (int i = 0; i < 20; i++) begin
      logic nd;
      nd = 1'($urandom % 2);
      #1000 d = nd;
      #5000 clk = 1'b1;
      #(TCQ - 1);
      if (i > 0) check(q == q_old, $sformatf("q stable before TCQ (trial %0d)", i));
      #2;
      check(q == nd, $sformatf("normal capture %0d: q=%0d d=%0d", i, q, nd));
      q_old = q;
      #5000 clk = 1'b0;
    end
    check(dut.meta_count == 0, "no metastability for clean setup");

    // --- metastable captures ---
    n_meta_start = int'(dut.meta_count);
    n_changed = 0;
    sum_res = 0.0;
    for (int i = 0; i < TRIALS; i++) begin
      #20000;
      q_old = q;
      d = ~d;                              // change 10 ps before the edge
      #10 clk = 1'b1;
      t_edge = $realtime;
      #(TCQ - 1);
      checks++;
      if (q != q_old) begin failures++; $display("FAIL: q changed before TCQ in trial %0d", i); end
      fork
        begin @(q); t_change = $realtime; end
        begin #15000; t_change = -1.0; end
      join_any
      disable fork;
      if (t_change > 0.0) begin
        n_changed++;
        sum_res += t_change - t_edge - real'(TCQ);
      end
      clk = 1'b0;
    end
    check(int'(dut.meta_count) - n_meta_start == TRIALS, "every in-window change is metastable");
    check(n_changed > TRIALS * 45 / 100 && n_changed < TRIALS * 55 / 100,
          $sformatf("about half resolve to the new value: %0d of %0d", n_changed, TRIALS));
    begin
      real tau_est;
      tau_est = sum_res / real'(n_changed);
      $display("estimated tau = %0.1f ps (model %0d ps)", tau_est, TAU);
      check(tau_est > 0.9 * TAU && tau_est < 1.1 * TAU, $sformatf("tau estimate %0.1f", tau_est));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
