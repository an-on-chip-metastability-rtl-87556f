// tb_config_shift_register: shifts random 90-bit words into the
// configuration register and compares the parallel contents and the serial
// output with a reference word kept by the testbench. Also checks that the
// register holds while shift_en is low.
`timescale 1ps/1fs
module tb_config_shift_register;
  localparam int N = 90;
  logic cfg_clk = 1'b0, shift_en = 1'b0, cfg_din = 1'b0;
  logic [N-1:0] cfg;
  logic cfg_dout;
  int checks = 0, failures = 0;

  config_shift_register #(.N(N)) dut (.*);

  always #5000 cfg_clk = ~cfg_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge cfg_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] word, held;
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < N; i++) word[i] = 1'($urandom % 2);
      if (t == 1) word = '0;
      if (t == 2) word = '1;
      // Shift in, MSB first.
      for (int i = N - 1; i >= 0; i--) begin
        @(negedge cfg_clk);
        shift_en = 1'b1;
        cfg_din  = word[i];
      end
      @(negedge cfg_clk);
      shift_en = 1'b0;
      check(cfg == word, $sformatf("word %0d: cfg %h expected %h", t, cfg, word));
      check(cfg_dout == word[N-1], "cfg_dout is the last stage");
      // Hold with shift_en low while data toggles.
      held = cfg;
      repeat (7) begin
        @(negedge cfg_clk);
        cfg_din = ~cfg_din;
      end
      check(cfg == held, "register holds with shift_en low");
    end
    // One more shift moves everything one place.
    held = cfg;
    @(negedge cfg_clk); shift_en = 1'b1; cfg_din = 1'b1;
    @(negedge cfg_clk); shift_en = 1'b0;
    check(cfg == {held[N-2:0], 1'b1}, "single shift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
