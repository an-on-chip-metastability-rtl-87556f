// tb_event_counter: drives random event flags and a counting window and
// compares the count with a reference count kept by the testbench, taking
// the two-cycle enable synchronizer into account. Checks clear at the start
// of each period, hold while disabled, and saturation (with WIDTH reduced
// to 6 so that it is reached quickly; a second instance keeps the full
// 16-bit width).
`timescale 1ps/1fs
module tb_event_counter;
  localparam int W = 6;
  logic clk = 1'b0, cnt_en = 1'b0, event_i = 1'b0;
  logic [W-1:0] count;
  logic full, counting;
  logic [15:0] count16;
  logic full16, counting16;
  int checks = 0, failures = 0;

  event_counter #(.WIDTH(W)) dut (.clk, .cnt_en, .event_i, .count, .full, .counting);
  event_counter dut16 (.clk, .cnt_en, .event_i, .count(count16), .full(full16), .counting(counting16));

  always #80000 clk = ~clk;

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

  // Reference: the enable as seen after two flip-flops.
  logic [1:0] en_pipe;
  int ref_count;
  bit counting_ref;
  always @(posedge clk) begin
    if (en_pipe[1] && !counting_ref) ref_count = 0;
    else if (en_pipe[1] && event_i) ref_count++;
    counting_ref = en_pipe[1];
    en_pipe = {en_pipe[0], cnt_en};
  end

  task automatic period(input int cycles, input int pct);
    @(negedge clk) cnt_en = 1'b1;
    repeat (cycles) begin
      @(negedge clk) event_i = (($urandom % 100) < pct);
    end
    @(negedge clk) cnt_en = 1'b0; event_i = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    en_pipe = '0;
    counting_ref = 1'b0;
    ref_count = 0;
    repeat (4) @(negedge clk);
    // Period 1: few events, no saturation.
    period(40, 50);
    check(count == W'(ref_count) && ref_count < 63, $sformatf("period 1: count %0d ref %0d", count, ref_count));
    check(count16 == 16'(ref_count), "period 1: 16-bit count");
    check(!full, "period 1: not full");
    // Events while disabled do not count.
    repeat (10) @(negedge clk) event_i = 1'b1;
    @(negedge clk) event_i = 1'b0;
    check(count == W'(ref_count), "hold while disabled");
    // Period 2: starts from zero again.
    period(20, 30);
    check(count == W'(ref_count), $sformatf("period 2 cleared and counted: %0d ref %0d", count, ref_count));
    // Period 3: saturation of the 6-bit instance.
    period(200, 80);
    check(ref_count > 63, "period 3 has more than 63 events");
    check(count == '1 && full, $sformatf("saturates: count %0d", count));
    check(count16 == 16'(ref_count), $sformatf("16-bit count %0d ref %0d", count16, ref_count));
    check(!full16, "16-bit not full");
    check(!counting, "counting low after period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
