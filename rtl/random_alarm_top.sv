// random_alarm_top: random hourly alarm for a 32768 Hz watch crystal and a
// piezo speaker, in its two variants side by side.
//
// The main timer (timer_sol2) cuts the hour into 512 quanta of 7.03125 s and
// sounds the alarm in one pseudo-randomly chosen quantum per hour. The
// alternative (timer_sol1) uses 450 ticks of 8 s and rejects random values
// beyond the hour. Both share the crystal clock and reset; each drives its
// own pair of piezo pins. In the intended package the crystal enters on pin
// 11 and the main timer's piezo pair leaves on pins 28 and 29. The alarm
// window and the current random value of each timer, and the main timer's
// hourly pulse, are brought out for observation. All outputs are registered on clk; there is no other timing
// relation between the two timers.
module random_alarm_top
  import rtimer_pkg::*;
#(
  // Divider sizes of both timers; the defaults are the real ones, smaller
  // values only make simulations shorter.
  parameter int unsigned S2_PRESCALE = S2_PRESCALE_BITS,
  parameter int unsigned S2_DIVIDE   = S2_DIV7,
  parameter int unsigned S2_TONE_BIT = 4,
  parameter int unsigned S2_GATE_BIT = 7,
  parameter int unsigned S1_PRESCALE = S1_PRESCALE_BITS,
  parameter int unsigned S1_TONE_BIT = 4,
  parameter int unsigned S1_GATE_BIT = 15
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 piezo_p,
  output logic                 piezo_n,
  output logic                 alarm,
  output logic [PRS_WIDTH-1:0] prseq,
  output logic                 hour_tick,
  output logic                 s1_piezo_p,
  output logic                 s1_piezo_n,
  output logic                 s1_alarm,
  output logic [PRS_WIDTH-1:0] s1_prseq
);
  timer_sol2 #(.PRESCALE_BITS(S2_PRESCALE), .DIV7(S2_DIVIDE),
               .TONE_BIT(S2_TONE_BIT), .GATE_BIT(S2_GATE_BIT)) u_main (
    .clk, .rst_n, .piezo_p, .piezo_n, .alarm, .prseq, .hour_tick);

  timer_sol1 #(.PRESCALE_BITS(S1_PRESCALE),
               .TONE_BIT(S1_TONE_BIT), .GATE_BIT(S1_GATE_BIT)) u_alt (
    .clk, .rst_n, .piezo_p(s1_piezo_p), .piezo_n(s1_piezo_n),
    .alarm(s1_alarm), .prseq(s1_prseq));
endmodule
