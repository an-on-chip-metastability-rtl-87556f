// tb_delay_line: measures the delay of both clock edges through the delay
// line for several codes and compares it with BASE_PS + STEP_PS * (number of
// ones in the code).
`timescale 1ps/1fs
module tb_delay_line;
  localparam int unsigned TAPS = 80, BASE = 1000, STEP = 15;
  logic clk_in = 1'b0;
  logic [TAPS-1:0] code = '0;
  logic clk_out;
  int checks = 0, failures = 0;

  delay_line #(.TAPS(TAPS), .BASE_PS(BASE), .STEP_PS(STEP)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ks [6] = '{0, 1, 20, 40, 79, 80};
    real t0, t1;
    #10000;
    foreach (ks[j]) begin
      int k;
      k = ks[j];
      code = (k == 0) ? '0 : ({TAPS{1'b1}} >> (TAPS - k));
      #10000;
      for (int e = 0; e < 2; e++) begin
        t0 = $realtime;
        clk_in = ~clk_in;
        @(clk_out);
        t1 = $realtime;
        check(clk_out == clk_in, "clk_out follows clk_in");
        check(t1 - t0 > real'(BASE + STEP * k) - 0.5 && t1 - t0 < real'(BASE + STEP * k) + 0.5,
              $sformatf("code with %0d ones: delay %0.1f expected %0d", k, t1 - t0, BASE + STEP * k));
        #10000;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
