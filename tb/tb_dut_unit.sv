// tb_dut_unit: checks the four-flip-flop DUT unit. For each one-hot
// selection, data with clean setup must appear on q after the clock edge
// while the unselected flip-flops stay at 0; data changing inside the
// window must make only the selected flip-flop metastable.
`timescale 1ps/1fs
module tb_dut_unit;
  import meas_pkg::*;
  logic clk = 1'b0, data = 1'b0;
  logic [NUM_FF-1:0] sel = '0;
  logic q;
  logic [NUM_FF-1:0] q_all;
  int checks = 0, failures = 0;

  dut_unit dut (.*);

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

  task automatic clock_once();
    #80000 clk = 1'b1;
    #80000 clk = 1'b0;
  endtask

  function automatic int unsigned meta_of(int i);
    case (i)
      0: return dut.g_ff[0].u_ff.meta_count;
      1: return dut.g_ff[1].u_ff.meta_count;
      2: return dut.g_ff[2].u_ff.meta_count;
      default: return dut.g_ff[3].u_ff.meta_count;
    endcase
  endfunction

  initial begin
    int unsigned m_before [NUM_FF];
    for (int s = 0; s < NUM_FF; s++) begin
      sel = '0;
      data = 1'b0;
      clock_once();
      clock_once();
      sel = NUM_FF'(1 << s);
      for (int i = 0; i < 8; i++) begin
        data = 1'($urandom % 2);
        clock_once();
        check(q == data, $sformatf("sel %0d: q=%0d data=%0d", s, q, data));
        check((q_all & ~sel) == '0, $sformatf("sel %0d: unselected outputs %b", s, q_all));
      end
      // Metastable capture: data changes 5 ps before the edge.
      for (int i = 0; i < NUM_FF; i++) m_before[i] = meta_of(i);
      #80000;
      data = ~data;
      #5 clk = 1'b1;
      #80000 clk = 1'b0;
      for (int i = 0; i < NUM_FF; i++)
        check(meta_of(i) - m_before[i] == ((i == s) ? 1 : 0),
              $sformatf("sel %0d: flip-flop %0d metastable count %0d", s, i, meta_of(i) - m_before[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
