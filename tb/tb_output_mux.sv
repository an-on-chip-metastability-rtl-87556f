// tb_output_mux: applies every input combination under every selection and
// compares the output with the selected input.
`timescale 1ps/1fs
module tb_output_mux;
  import meas_pkg::*;
  out_sel_e sel;
  logic serial_i, dut_q_i, event_i, full_i, out;
  int checks = 0, failures = 0;

  output_mux dut (.*);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 16; v++) begin
        logic expected;
        sel = out_sel_e'(s);
        {serial_i, dut_q_i, event_i, full_i} = 4'(v);
        #10;
        expected = (s == 0) ? serial_i : (s == 1) ? dut_q_i : (s == 2) ? event_i : full_i;
        checks++;
        if (out != expected) begin
          failures++;
          $display("FAIL: sel %0d inputs %b out %0d", s, 4'(v), out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
