// tb_icg: checks the input and clock generation unit. The gated clock must
// equal meas_clk while clk_en is high and stay low while it is low; the data
// output must make 64 / 2**fd_sel transitions in 64 data_ref cycles, and none
// with data_en low.
`timescale 1ps/1fs
module tb_icg;
  logic meas_clk = 1'b0, data_ref = 1'b0;
  logic clk_en = 1'b1, data_en = 1'b0;
  logic [1:0] fd_sel = '0;
  logic dut_clk, dut_data;
  int checks = 0, failures = 0;
  int toggles = 0;
  int clk_pulses = 0;

  icg dut (.*);

  always #80000 meas_clk = ~meas_clk;      // 6.25 MHz
  always #80064 data_ref = ~data_ref;      // slightly slower reference

  always @(posedge dut_data or negedge dut_data) toggles++;
  always @(posedge dut_clk) clk_pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // dut_clk follows meas_clk whenever the latched enable is set.
  always @(meas_clk) begin
    #1;
    if (clk_en && dut.en_latched) begin
      checks++;
      if (dut_clk !== meas_clk) begin failures++; $display("FAIL: dut_clk differs from meas_clk"); end
    end
  end

  initial begin
    repeat (4) @(posedge data_ref);
    data_en = 1'b1;
    for (int s = 0; s < 4; s++) begin
      fd_sel = 2'(s);
      @(posedge data_ref);
      // align to a divider phase where the mask bits are all zero
      while ((dut.div_cnt & 3'b111) != 3'd0) @(posedge data_ref);
      #10;
      toggles = 0;
      repeat (64) @(posedge data_ref);
      #10;
      check(toggles == (64 >> s), $sformatf("fd_sel=%0d toggles=%0d expected %0d", s, toggles, 64 >> s));
    end
    data_en = 1'b0;
    toggles = 0;
    repeat (32) @(posedge data_ref);
    check(toggles == 0, "data_en low freezes data");
    // Clock gate.
    @(negedge meas_clk); clk_en = 1'b0;
    @(posedge meas_clk); clk_pulses = 0;
    repeat (10) @(posedge meas_clk);
    check(clk_pulses == 0, $sformatf("gated clock off: %0d pulses", clk_pulses));
    check(dut_clk == 1'b0, "gated clock low");
    @(negedge meas_clk); clk_en = 1'b1;
    clk_pulses = 0;
    repeat (10) @(posedge meas_clk);
    #1;
    check(clk_pulses == 10, $sformatf("gated clock on: %0d pulses", clk_pulses));
    // Enable raised while clock is high must not create a short pulse.
    @(posedge meas_clk); clk_en = 1'b0;
    @(negedge meas_clk); #1;
    @(posedge meas_clk); #1;
    check(dut_clk == 1'b0, "gate closes at the next low phase");
    #1000; clk_en = 1'b1; #1;
    check(dut_clk == 1'b0, "no pulse from enable raised mid-high phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
