// tb_piezo_driver: checks the gated differential output. With random alarm,
// gate and tone inputs the outputs, one clock later, must be
// p = alarm & gate & tone and n = alarm & gate & ~tone: antiphase while
// beeping, both low otherwise.
module tb_piezo_driver;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic alarm, gate, tone, piezo_p, piezo_n;
  piezo_driver dut (.clk, .rst_n, .alarm, .gate, .tone, .piezo_p, .piezo_n);

  int checks = 0, failures = 0, beeps = 0;
  logic ep, en;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    alarm = 1'b1; gate = 1'b1; tone = 1'b1;
    repeat (3) @(negedge clk);
    check(!piezo_p && !piezo_n, "reset value");
    rst_n = 1'b1;
    repeat (4000) begin
      {alarm, gate, tone} = 3'($urandom);
      ep = alarm & gate & tone;
      en = alarm & gate & ~tone;
      @(negedge clk);
      check(piezo_p == ep && piezo_n == en,
            $sformatf("a%0b g%0b t%0b -> p%0b n%0b", alarm, gate, tone, piezo_p, piezo_n));
      if (piezo_p) beeps++;
    end
    check(beeps > 100, "tone produced");
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
