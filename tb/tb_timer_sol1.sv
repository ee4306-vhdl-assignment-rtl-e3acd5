// tb_timer_sol1: end-to-end check of the first timer with a 4-bit prescaler
// (an 8 s tick becomes 16 cycles; the hour keeps its 450 ticks, 7200 cycles).
// A cycle model written from the description (tick every 16 cycles, count
// modulo 450, hourly pulse when the count reaches 256, XNOR generator that
// steps hourly when in range and on every tick when at 450 or above, all
// ones replaced by zero, alarm sampled on the tick, gated tone one cycle
// later) is compared with the outputs every cycle. The run is long enough
// for the generator to leave the range, so the lock-up recovery, the range
// rejection, the hourly steps and the alarms are all counted.
module tb_timer_sol1;
  timeunit 1ns; timeprecision 1ns;
  localparam int P = 4, G = 2, T = 0, STEPS = 450;
  localparam int TICK = 1 << P, HOUR = TICK * STEPS;
  localparam int HOURS = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic piezo_p, piezo_n, alarm;
  logic [8:0] prseq;
  timer_sol1 #(.PRESCALE_BITS(P), .TONE_BIT(T), .GATE_BIT(G)) dut (
    .clk, .rst_n, .piezo_p, .piezo_n, .alarm, .prseq);

  int checks = 0, failures = 0;
  longint n = 0;

  // reference state
  int   m_c1 = 0, m_hc = 0;
  logic m_msb = 1'b0, m_alarm = 1'b0, m_p = 1'b0, m_n = 1'b0;
  logic [8:0] m_prs = 9'h1FF;
  int n_recover = 0, n_reject = 0, n_hourly = 0, n_alarms = 0, n_beeps = 0;
  logic prev_alarm = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", n, what);
    end
  endtask

  task automatic model_edge();
    bit   tick  = (m_c1 == TICK - 1);
    bit   hmsb  = ((m_hc >> 8) & 1) == 1;
    bit   pulse = hmsb && !m_msb;
    bit   adv   = (m_prs >= STEPS) ? tick : pulse;
    logic beep  = m_alarm && (((m_c1 >> G) & 1) == 1);
    logic tone  = ((m_c1 >> T) & 1) == 1;
    m_p = beep & tone;
    m_n = beep & ~tone;
    if (tick) m_alarm = (m_hc == int'(m_prs));
    if (adv) begin
      if (m_prs == 9'h1FF) begin m_prs = 9'd0; n_recover++; end
      else begin
        if (m_prs >= STEPS) n_reject++; else n_hourly++;
        m_prs = {m_prs[7:0], ~(m_prs[8] ^ m_prs[3])};
      end
    end
    m_msb = hmsb;
    if (tick) m_hc = (m_hc + 1) % STEPS;
    m_c1 = (m_c1 + 1) % TICK;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(prseq == 9'h1FF && !alarm && !piezo_p && !piezo_n, "reset state");
    rst_n = 1'b1;
    repeat (HOURS * HOUR) begin
      @(negedge clk);
      n++;
      model_edge();
      check(prseq == m_prs, $sformatf("prseq %0d expected %0d", prseq, m_prs));
      check(alarm == m_alarm, "alarm");
      check(piezo_p == m_p && piezo_n == m_n, "piezo pins");
      if (alarm && !prev_alarm) begin
        n_alarms++;
        check(prseq < STEPS, "alarm only for an in-range value");
      end
      if (piezo_p) n_beeps++;
      prev_alarm = alarm;
    end
    check(n_recover == 1, "lock-up recovery at start");
    check(n_reject > 0, "out-of-range values rejected");
    check(n_hourly >= HOURS - 1, "hourly steps");
    check(n_alarms >= HOURS - 2, "alarms");
    check(n_beeps > 0, "piezo driven");
    $display("recoveries %0d rejections %0d hourly %0d alarms %0d",
             n_recover, n_reject, n_hourly, n_alarms);
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
