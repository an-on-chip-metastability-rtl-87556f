// tb_measuring_unit: drives the flip-flop output q directly with a
// transition at a chosen time after the rising clock edge and checks the
// event flag at the next rising edge: it must be set exactly when the
// transition falls after DL (BASE + STEP * ones in the code) and before the
// falling edge. The clock is 6.25 MHz (80 ns high, 80 ns low).
`timescale 1ps/1fs
module tb_measuring_unit;
  import meas_pkg::*;
  localparam int unsigned BASE = 1000, STEP = 15;
  logic clk = 1'b0, q = 1'b0;
  logic [DL_TAPS-1:0] dl_code = '0;
  logic x, y, event_o;
  int checks = 0, failures = 0;

  measuring_unit #(.BASE_PS(BASE), .STEP_PS(STEP)) dut (.*);

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

  // One cycle: rising edge, q toggles t_q ps later (t_q < 0: no toggle),
  // falling edge at 80 ns; then the flag is sampled just before the next
  // rising edge.
  task automatic cycle(input int t_q, output logic ev);
    clk = 1'b1;
    if (t_q >= 0) begin
      if (t_q < 80000) begin
        #(t_q) q = ~q;
        #(80000 - t_q) clk = 1'b0;
      end else begin
        #80000 clk = 1'b0;
        #(t_q - 80000) q = ~q;
        #(80000 - (t_q - 80000));
      end
    end else begin
      #80000 clk = 1'b0;
      #80000;
    end
    if (t_q >= 0 && t_q < 80000) #80000;
    ev = event_o;
  endtask

  initial begin
    logic ev;
    int ks [4] = '{0, 20, 53, 80};
    #80000;
    repeat (3) cycle(-1, ev);
    foreach (ks[j]) begin
      int dl;
      dl = BASE + STEP * ks[j];
      dl_code = (ks[j] == 0) ? '0 : ({DL_TAPS{1'b1}} >> (DL_TAPS - ks[j]));
      repeat (2) cycle(-1, ev);
      cycle(100, ev);            check(ev == 1'b0, $sformatf("DL=%0d: early transition gives no event", dl));
      cycle(-1, ev);             check(ev == 1'b0, "quiet cycle");
      cycle(dl - 10, ev);        check(ev == 1'b0, $sformatf("DL=%0d: transition just before DL", dl));
      cycle(-1, ev);
      cycle(dl + 10, ev);        check(ev == 1'b1, $sformatf("DL=%0d: transition just after DL", dl));
      check(x != y, "x and y differ on an event");
      cycle(-1, ev);             check(ev == 1'b0, "event lasts one cycle");
      cycle(40000, ev);          check(ev == 1'b1, $sformatf("DL=%0d: transition mid high phase", dl));
      cycle(-1, ev);
      cycle(90000, ev);          check(ev == 1'b0, $sformatf("DL=%0d: transition after falling edge", dl));
      cycle(-1, ev);             check(ev == 1'b0, "late transition not counted next cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
