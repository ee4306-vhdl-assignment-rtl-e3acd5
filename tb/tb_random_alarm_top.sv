// tb_random_alarm_top: end-to-end run of both timers through the top level,
// with shortened dividers (main timer: 16-cycle quantum, 8192-cycle hour;
// alternative timer: 16-cycle tick, 7200-cycle hour). It runs fourteen
// alternative-timer hours and checks, from the outputs only:
//  main timer  - the all-zero start is replaced by 010101010; the random value
//                steps once per hourly pulse along the taps-9,4 sequence; each
//                hour has exactly one alarm, opening one 128 Hz tick after the
//                chosen quantum begins and lasting one quantum;
//  alternative - the all-ones start is replaced by zero; each value of 450 or more
//                is replaced within one tick; each alarm opens one tick after
//                the hour count equals an in-range value and lasts one tick;
//  both        - the piezo pins toggle in antiphase during the alarm only and
//                are never high together.
// Every mechanism (zero reload, lock-up recovery, range rejection, hourly
// steps, alarms, beeps) must occur at least once.
module tb_random_alarm_top;
  timeunit 1ns; timeprecision 1ns;
  localparam int P2 = 4, Q2 = 16, H2 = Q2 * 512;      // main timer
  localparam int T1 = 16, H1 = T1 * 450;              // alternative timer
  localparam int HOURS = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic piezo_p, piezo_n, alarm, hour_tick, s1_piezo_p, s1_piezo_n, s1_alarm;
  logic [8:0] prseq, s1_prseq;
  random_alarm_top #(.S2_PRESCALE(2), .S2_DIVIDE(4), .S2_TONE_BIT(0), .S2_GATE_BIT(1),
                     .S1_PRESCALE(4), .S1_TONE_BIT(0), .S1_GATE_BIT(2)) dut (
    .clk, .rst_n, .piezo_p, .piezo_n, .alarm, .prseq, .hour_tick,
    .s1_piezo_p, .s1_piezo_n, .s1_alarm, .s1_prseq);

  int checks = 0, failures = 0;
  longint n = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", n, what);
    end
  endtask

  // mechanism counters
  int zero_reload = 0, hour_steps = 0, alarms2 = 0, beeps2 = 0;
  int lockup = 0, reject = 0, steps1 = 0, alarms1 = 0, beeps1 = 0;
  int alarms_in_hour [HOURS * 2];

  logic [8:0] pv2 = '0, pv1 = '0, expect2;
  logic pa2 = 1'b0, pa1 = 1'b0, pht = 1'b0;
  longint rise2 = 0, rise1 = 0, out_of_range_since = -1;

  initial begin
    repeat (3) @(negedge clk);
    check(prseq == 9'd0 && s1_prseq == 9'h1FF, "reset values");
    pv2 = prseq; pv1 = s1_prseq;
    rst_n = 1'b1;
    repeat (HOURS * H1) begin
      @(negedge clk);
      n++;
      // ---- main timer
      if (prseq != pv2) begin
        if (pv2 == 9'd0) begin
          zero_reload++;
          check(prseq == 9'b010101010, "zero reload value");
        end else begin
          hour_steps++;
          expect2 = {pv2[7:0], pv2[8] ^ pv2[3]};
          check(prseq == expect2, "hourly step follows the sequence");
          check(pht, "step only after the hourly pulse");
          check(n % H2 == 0, "step at the hour boundary");
        end
      end
      check(prseq != 9'd0, "no zero state");
      if (alarm && !pa2) begin
        alarms2++;
        alarms_in_hour[n / H2]++;
        check(n % H2 == longint'(prseq) * Q2 + P2, "main alarm position");
        rise2 = n;
      end
      if (!alarm && pa2) check(n - rise2 == Q2, "main alarm length");
      if (piezo_p != piezo_n) beeps2 += piezo_p;
      check(!(piezo_p && piezo_n), "main pins never both high");
      if (piezo_p || piezo_n) check(pa2, "main tone only while alarmed");
      // ---- alternative timer
      if (s1_prseq != pv1) begin
        if (pv1 == 9'h1FF) begin
          lockup++;
          check(s1_prseq == 9'd0, "lock-up replaced by zero");
        end else begin
          check(s1_prseq == {pv1[7:0], ~(pv1[8] ^ pv1[3])}, "alt step follows the sequence");
          if (pv1 >= 450) reject++; else steps1++;
        end
        check(n % T1 == 0 || pv1 < 450, "fast steps on the 8 s tick");
      end
      if (s1_prseq >= 450) begin
        if (out_of_range_since < 0 || s1_prseq != pv1) out_of_range_since = n;
        check(n - out_of_range_since <= T1, "out-of-range value kept for one tick at most");
      end else out_of_range_since = -1;
      if (s1_alarm && !pa1) begin
        alarms1++;
        check(s1_prseq < 450 && n % T1 == 0 && ((n / T1) - 1) % 450 == longint'(s1_prseq),
              "alt alarm position");
        rise1 = n;
      end
      if (!s1_alarm && pa1) check(n - rise1 == T1, "alt alarm length");
      if (s1_piezo_p != s1_piezo_n) beeps1 += s1_piezo_p;
      check(!(s1_piezo_p && s1_piezo_n), "alt pins never both high");
      if (s1_piezo_p || s1_piezo_n) check(pa1, "alt tone only while alarmed");
      pv2 = prseq; pv1 = s1_prseq; pa2 = alarm; pa1 = s1_alarm; pht = hour_tick;
    end
    for (int h = 0; h < (HOURS * H1) / H2; h++)
      check(alarms_in_hour[h] == 1, $sformatf("one main alarm in hour %0d", h));
    check(zero_reload == 1, "zero reload happened");
    check(hour_steps > 0, "hourly steps happened");
    check(alarms2 > 0 && beeps2 > 0, "main alarms and beeps happened");
    check(lockup == 1, "lock-up recovery happened");
    check(reject > 0, "range rejection happened");
    check(steps1 > 0, "alt hourly steps happened");
    check(alarms1 > 0 && beeps1 > 0, "alt alarms and beeps happened");
    $display("main: zero reloads %0d hourly steps %0d alarms %0d tone cycles %0d",
             zero_reload, hour_steps, alarms2, beeps2);
    $display("alt:  lock-up recoveries %0d rejections %0d hourly steps %0d alarms %0d tone cycles %0d",
             lockup, reject, steps1, alarms1, beeps1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
