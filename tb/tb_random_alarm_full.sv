// tb_random_alarm_full: both timers at their real sizes (32768 Hz crystal,
// 7.03125 s quanta and 8 s ticks), run from reset for a little over one hour
// of simulated time (about 119 million clock cycles).
// Expected, worked out by hand from the division ratios:
//  main timer  - the zero start becomes 010101010 (170) on the first cycle;
//                the alarm opens at 170 * 230400 + 256 cycles (about 19 min
//                55 s), lasts 230400 cycles and carries three 1 s beeps and a
//                last 4/128 s one: 388 gate ticks * 8 = 3104 tone cycles; at
//                3600 s (117964800 cycles) the hourly pulse steps the value
//                to 101010101 (341);
//  alternative - the all-ones start becomes 0 at the first 8 s tick, steps
//                to 1 one cycle after the count reaches 256, and the alarm
//                opens at 452 ticks (3616 s) for one tick, with four 1 s
//                beeps: 4 * 1024 tone cycles.
module tb_random_alarm_full;
  timeunit 1ns; timeprecision 1ns;
  localparam longint QUANTUM = 230400, TICK = 262144;   // 256 * 900 and 2^18 cycles
  localparam longint HOUR = 512 * QUANTUM;
  localparam longint A2 = 170 * QUANTUM + 256;
  localparam longint A1 = 452 * TICK;
  localparam longint END = A1 + TICK + 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic piezo_p, piezo_n, alarm, hour_tick, s1_piezo_p, s1_piezo_n, s1_alarm;
  logic [8:0] prseq, s1_prseq;
  random_alarm_top dut (
    .clk, .rst_n, .piezo_p, .piezo_n, .alarm, .prseq, .hour_tick,
    .s1_piezo_p, .s1_piezo_n, .s1_alarm, .s1_prseq);

  int checks = 0, failures = 0;
  longint n = 0;
  longint rise2 = -1, fall2 = -1, rise1 = -1, fall1 = -1, hour_at = -1, s1_one_at = -1;
  longint tones2 = 0, tones1 = 0;
  logic pa2 = 1'b0, pa1 = 1'b0, pp2 = 1'b0, pp1 = 1'b0;
  logic [8:0] pv1 = 9'h1FF;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", n, what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n < END) begin
      @(negedge clk);
      n++;
      if (n == 1) check(prseq == 9'd170, "main zero reload to 010101010");
      if (n == TICK) check(s1_prseq == 9'd0, "alt lock-up recovered at the first tick");
      if (alarm != pa2) begin if (alarm) rise2 = n; else fall2 = n; end
      if (s1_alarm != pa1) begin if (s1_alarm) rise1 = n; else fall1 = n; end
      if (piezo_p && !pp2) tones2++;
      if (s1_piezo_p && !pp1) tones1++;
      if (hour_tick) hour_at = n;
      if (s1_prseq != pv1 && s1_prseq == 9'd1) s1_one_at = n;
      pa2 = alarm; pa1 = s1_alarm; pp2 = piezo_p; pp1 = s1_piezo_p; pv1 = s1_prseq;
    end
    check(rise2 == A2 && fall2 == A2 + QUANTUM, $sformatf("main alarm %0d..%0d", rise2, fall2));
    check(tones2 == 3104, $sformatf("main tone cycles %0d", tones2));
    check(hour_at == HOUR - 1, $sformatf("hourly pulse at %0d", hour_at));
    check(prseq == 9'd341, $sformatf("main value after the hour %0d", prseq));
    check(s1_one_at == 256 * TICK + 1, $sformatf("alt hourly step at %0d", s1_one_at));
    check(rise1 == A1 && fall1 == A1 + TICK, $sformatf("alt alarm %0d..%0d", rise1, fall1));
    check(tones1 == 4 * 1024, $sformatf("alt tone cycles %0d", tones1));
    $display("main alarm at %0.1f s, alternative alarm at %0.1f s",
             real'(rise2) / 32768.0, real'(rise1) / 32768.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * END + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
