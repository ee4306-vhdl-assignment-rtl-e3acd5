// tb_alarm_compare: checks the registered comparison. With random counter
// and random-value inputs (equal about half the time) and a random sample
// enable, the alarm must take the equality result of the previous cycle on
// sampled cycles and hold otherwise.
module tb_alarm_compare;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic sample, alarm;
  logic [8:0] count, prseq;
  alarm_compare dut (.clk, .rst_n, .sample, .count, .prseq, .alarm);

  int checks = 0, failures = 0, highs = 0;
  logic expected;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    sample = 1'b0; count = '0; prseq = '0;
    repeat (3) @(negedge clk);
    check(!alarm, "reset value");
    rst_n = 1'b1;
    expected = 1'b0;
    repeat (5000) begin
      sample = ($urandom_range(1) == 0);
      count  = 9'($urandom);
      prseq  = ($urandom_range(1) == 0) ? count : 9'($urandom);
      if (sample) expected = (count == prseq);
      @(negedge clk);
      check(alarm == expected, "alarm");
      if (alarm) highs++;
    end
    check(highs > 500, "alarm was raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
