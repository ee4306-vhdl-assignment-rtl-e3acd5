// timer_sol2: hourly random alarm, built from a 7.03125 s time quantum.
//
// Idea: a 9-bit maximal-length shift register yields 511 pseudo-random
// values. If one hour is cut into 512 equal quanta, every value names a
// quantum, and no value ever has to be rejected. 3600 s / 512 = 7.03125 s,
// which is exactly 256 * 900 cycles of a 32768 Hz crystal, so the chain is
//   Count1  (binary_prescaler, 8 bit)  32768 Hz -> 128 Hz tick
//   Count7  (mod_counter, /900)        128 Hz   -> 7.03125 s tick
//   CountH  (mod_counter, /512)        quantum number 0..511, hourly pulse
//   PRSeq   (prs_gen_zero)             new random quantum every hour
//   compare (alarm_compare)            alarm while CountH == PRSeq
//   piezo   (piezo_driver)             1 kHz tone, 1 s on / 1 s off, differential
// The hourly pulse (CountH rolling over to 0) steps the generator, so the
// new value, never 0, always lies ahead in the hour that has just begun:
// exactly one alarm per hour, lasting one quantum (three 1 s beeps and a
// last blip of 4/128 s). Quantum 0 is never chosen.
//
// Timing: everything is clocked by the crystal; the stages are linked by
// one-cycle enables. The comparison is sampled on the 128 Hz tick, so the
// alarm opens 1/128 s after CountH reaches the chosen value. The piezo pins
// follow one crystal cycle later.
//
// The division ratios, tap, seed and the tone/gate bits (Count1 bit 4 for
// 1024 Hz, Count7 bit 7 for the 2 s gate) follow the original design; the
// single clock with enables, the reset and the differential output stage
// are this design's choices. Parameters other than the defaults only serve
// to shorten simulations.
module timer_sol2
  import rtimer_pkg::*;
#(
  parameter int unsigned          PRESCALE_BITS = S2_PRESCALE_BITS,
  parameter int unsigned          DIV7          = S2_DIV7,
  parameter logic [PRS_WIDTH-1:0] SEED          = PRS_SEED,
  parameter int unsigned          TONE_BIT      = 4,
  parameter int unsigned          GATE_BIT      = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 piezo_p,
  output logic                 piezo_n,
  output logic                 alarm,
  output logic [PRS_WIDTH-1:0] prseq,
  output logic                 hour_tick
);
  localparam int unsigned W7 = $clog2(DIV7);

  logic [PRESCALE_BITS-1:0] count1;
  logic [W7-1:0]            count7;
  logic [PRS_WIDTH-1:0]     count_h;
  logic                     tick128, tick7;

  binary_prescaler #(.WIDTH(PRESCALE_BITS)) u_count1 (
    .clk, .rst_n, .count(count1), .wrap(tick128));

  mod_counter #(.MODULUS(DIV7)) u_count7 (
    .clk, .rst_n, .en(tick128), .count(count7), .wrap(tick7));

  mod_counter #(.MODULUS(2**PRS_WIDTH)) u_count_h (
    .clk, .rst_n, .en(tick7), .count(count_h), .wrap(hour_tick));

  prs_gen_zero #(.SEED(SEED)) u_prs (
    .clk, .rst_n, .step(hour_tick), .prseq, .bad_start());

  alarm_compare #(.WIDTH(PRS_WIDTH)) u_cmp (
    .clk, .rst_n, .sample(tick128), .count(count_h), .prseq, .alarm);

  piezo_driver u_piezo (
    .clk, .rst_n, .alarm, .gate(count7[GATE_BIT]), .tone(count1[TONE_BIT]),
    .piezo_p, .piezo_n);

  initial assert (TONE_BIT < PRESCALE_BITS && GATE_BIT < W7)
    else $error("tone/gate bit outside its counter");
endmodule
