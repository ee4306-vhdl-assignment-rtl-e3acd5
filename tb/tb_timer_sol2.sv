// tb_timer_sol2: end-to-end check of the main timer at shortened dividers
// (prescaler 2 bits, quantum divider 4, so a quantum is 16 cycles and an
// hour 8192 cycles; the hour counter and generator keep their 9 bits).
// The expected state after n clock edges is computed in closed form:
// quantum number = n / 16 mod 512, hour = n / 8192, random value = the
// shift-register sequence stepped once per hour from 010101010, alarm =
// equality sampled on the last 128 Hz tick, piezo pins one cycle later.
// It also checks that each hour holds exactly one alarm, of one quantum,
// starting one tick after the chosen quantum begins, and counts the zero
// reload, hourly steps, alarms and beeps.
module tb_timer_sol2;
  timeunit 1ns; timeprecision 1ns;
  localparam int P = 2, G = 1, T = 0;
  localparam longint D = 4;
  localparam longint P2 = 1 << P, QUANTUM = P2 * D, HOUR = QUANTUM * 512;
  localparam int HOURS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic piezo_p, piezo_n, alarm, hour_tick;
  logic [8:0] prseq;
  timer_sol2 #(.PRESCALE_BITS(P), .DIV7(int'(D)), .TONE_BIT(T), .GATE_BIT(G)) dut (
    .clk, .rst_n, .piezo_p, .piezo_n, .alarm, .prseq, .hour_tick);

  int checks = 0, failures = 0;
  longint n = 0;
  logic [8:0] hourly [HOURS + 2];
  int alarms_in_hour [HOURS + 2];
  int n_alarms = 0, n_hour_ticks = 0, n_reload = 0, beep_edges = 0;
  longint alarm_rise = -1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", n, what);
    end
  endtask

  function automatic logic [8:0] lfsr(input logic [8:0] v);
    return {v[7:0], v[8] ^ v[3]};
  endfunction

  function automatic int count1_at(longint m);  return int'(m % P2); endfunction
  function automatic int count7_at(longint m);  return int'((m / P2) % D); endfunction
  function automatic int counth_at(longint m);  return int'((m / QUANTUM) % 512); endfunction
  function automatic logic [8:0] prseq_at(longint m);
    return (m == 0) ? 9'd0 : hourly[int'(m / HOUR)];
  endfunction
  function automatic logic alarm_at(longint m);
    longint s = (m / P2) * P2;      // last edge that sampled the comparison
    if (s == 0) return 1'b0;
    return counth_at(s - 1) == int'(prseq_at(s - 1));
  endfunction

  logic prev_alarm = 1'b0, prev_p = 1'b0;
  logic ea, g, t;

  initial begin
    hourly[0] = 9'b010101010;
    for (int i = 1; i < HOURS + 2; i++) hourly[i] = lfsr(hourly[i-1]);
    repeat (3) @(negedge clk);
    check(prseq == 0 && !alarm && !piezo_p && !piezo_n, "reset state");
    rst_n = 1'b1;
    repeat (HOURS * HOUR + 3 * QUANTUM) begin
      @(negedge clk);
      n++;
      if (n == 1 && prseq == 9'b010101010) n_reload++;
      check(prseq == prseq_at(n), $sformatf("prseq %0d expected %0d", prseq, prseq_at(n)));
      check(alarm == alarm_at(n), "alarm");
      begin
        ea = alarm_at(n - 1);
        g  = 1'(count7_at(n - 1) >> G);
        t  = 1'(count1_at(n - 1) >> T);
        check(piezo_p == (ea & g & t) && piezo_n == (ea & g & ~t), "piezo pins");
      end
      check(hour_tick == (n % HOUR == HOUR - 1), "hour tick");
      if (hour_tick) n_hour_ticks++;
      if (alarm && !prev_alarm) begin
        n_alarms++;
        alarms_in_hour[int'(n / HOUR)]++;
        // opens one 128 Hz tick after the chosen quantum begins
        check(n % HOUR == longint'(prseq) * QUANTUM + P2, "alarm position in the hour");
        alarm_rise = n;
      end
      if (!alarm && prev_alarm) check(n - alarm_rise == QUANTUM, "alarm lasts one quantum");
      if (piezo_p && !prev_p) beep_edges++;
      prev_alarm = alarm;
      prev_p = piezo_p;
    end
    for (int h = 0; h < HOURS; h++) check(alarms_in_hour[h] == 1, $sformatf("one alarm in hour %0d", h));
    check(n_reload == 1, "zero reload at start");
    check(n_hour_ticks == HOURS, "hourly steps");
    check(beep_edges > 0, "piezo driven");
    $display("reloads %0d hour ticks %0d alarms %0d tone edges %0d",
             n_reload, n_hour_ticks, n_alarms, beep_edges);
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
