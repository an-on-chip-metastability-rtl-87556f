// tb_counter_serializer: loads random 16-bit values and reads them out
// serially, MSB first, one bit after each clock with rd_en high; compares
// the assembled word with the value loaded. Also checks that the loaded
// value is held while rd_en is low.
`timescale 1ps/1fs
module tb_counter_serializer;
  localparam int W = 16;
  logic clk = 1'b0, rd_en = 1'b0;
  logic [W-1:0] par_in = '0;
  logic sout;
  int checks = 0, failures = 0;

  counter_serializer #(.WIDTH(W)) dut (.*);

  always #5000 clk = ~clk;

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
    logic [W-1:0] v, got;
    repeat (2) @(negedge clk);
    for (int t = 0; t < 10; t++) begin
      v = W'($urandom);
      if (t == 0) v = 16'h8001;
      if (t == 1) v = '0;
      if (t == 2) v = '1;
      par_in = v;
      @(negedge clk) rd_en = 1'b1;
      for (int i = W - 1; i >= 0; i--) begin
        @(negedge clk);
        got[i] = sout;
        par_in = W'($urandom);  // later changes must not disturb the readout
      end
      rd_en = 1'b0;
      check(got == v, $sformatf("readout %h expected %h", got, v));
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
