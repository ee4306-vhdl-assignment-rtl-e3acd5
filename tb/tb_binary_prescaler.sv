// tb_binary_prescaler: checks the free-running binary divider at the two
// widths the timers use (8 and 18 bits). Every cycle the count is compared
// with the number of clock edges since reset, and `wrap` must be high exactly
// when the count is all ones; the wrap period must be 2^WIDTH cycles.
module tb_binary_prescaler;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic [7:0]  c8;  logic w8;
  logic [17:0] c18; logic w18;
  binary_prescaler #(.WIDTH(8))  dut8  (.clk, .rst_n, .count(c8),  .wrap(w8));
  binary_prescaler #(.WIDTH(18)) dut18 (.clk, .rst_n, .count(c18), .wrap(w18));

  int checks = 0, failures = 0;
  longint unsigned n = 0;            // clock edges since reset release
  longint unsigned last_w8 = 0, last_w18 = 0, n_w8 = 0, n_w18 = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", n, what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(c8 == 0 && c18 == 0, "reset value");
    rst_n = 1'b1;
    repeat (600000) begin
      @(negedge clk);
      n++;
      check(c8  == 8'(n),  $sformatf("count8 %0d", c8));
      check(c18 == 18'(n), $sformatf("count18 %0d", c18));
      check(w8  == (8'(n)  == 8'hFF),    "wrap8");
      check(w18 == (18'(n) == 18'h3FFFF), "wrap18");
      if (w8)  begin if (n_w8  > 0) check(n - last_w8  == 256,    "wrap8 period");  last_w8  = n; n_w8++;  end
      if (w18) begin if (n_w18 > 0) check(n - last_w18 == 262144, "wrap18 period"); last_w18 = n; n_w18++; end
    end
    check(n_w8 > 2000 && n_w18 == 2, "number of wraps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
