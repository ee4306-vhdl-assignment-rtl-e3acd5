// tb_mod_counter: checks the modulo counter with the three moduli the timers
// use (900, 512, 450) under a random enable. A plain integer model counts
// enabled cycles; the count must equal that number modulo the modulus, and
// `wrap` must be high exactly on enabled cycles that end a full round.
module tb_mod_counter;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic en;
  logic [9:0] c900; logic w900;
  logic [8:0] c512; logic w512;
  logic [8:0] c450; logic w450;
  mod_counter #(.MODULUS(900)) d900 (.clk, .rst_n, .en, .count(c900), .wrap(w900));
  mod_counter #(.MODULUS(512)) d512 (.clk, .rst_n, .en, .count(c512), .wrap(w512));
  mod_counter #(.MODULUS(450)) d450 (.clk, .rst_n, .en, .count(c450), .wrap(w450));

  int checks = 0, failures = 0;
  longint unsigned k = 0;           // enabled edges since reset
  int wraps900 = 0, wraps450 = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d: %s", k, what);
    end
  endtask

  initial begin
    en = 1'b0;
    repeat (3) @(negedge clk);
    check(c900 == 0 && c512 == 0 && c450 == 0, "reset value");
    rst_n = 1'b1;
    repeat (40000) begin
      en = ($urandom_range(3) != 0);
      #0;
      check(w900 == (en && (k % 900) == 899), "wrap900");
      check(w512 == (en && (k % 512) == 511), "wrap512");
      check(w450 == (en && (k % 450) == 449), "wrap450");
      if (w900) wraps900++;
      if (w450) wraps450++;
      @(negedge clk);
      if (en) k++;
      check(c900 == 10'(k % 900), $sformatf("count900 %0d", c900));
      check(c512 == 9'(k % 512),  $sformatf("count512 %0d", c512));
      check(c450 == 9'(k % 450),  $sformatf("count450 %0d", c450));
    end
    check(wraps900 == int'(k / 900) && wraps450 == int'(k / 450), "number of wraps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
