// timer_sol1: hourly random alarm built from an 8 s tick (first solution).
//
// Idea: an 18-bit binary divider turns the 32768 Hz crystal into an 8 s
// tick, and 450 ticks make an hour. A 9-bit shift register (XNOR feedback,
// taps 9,4) provides a random tick number, but its values run up to 510, so
// values of 450 and above name no time in the hour. The generator then steps
// on every 8 s tick until it holds a usable value, and otherwise only once
// an hour. The chain is
//   divider (binary_prescaler, 18 bit)   32768 Hz -> 8 s tick; bit 15 = 2 s gate
//   hour    (mod_counter, /450)          tick number 0..449
//   hourly pulse                         when the hour count's MSB rises (256)
//   PRSeq   (prs_gen_range)              hourly step, 8 s steps while >= 450
//   compare (alarm_compare)              alarm while count == PRSeq
//   piezo   (piezo_driver)               1 kHz tone, 1 s on / 1 s off, differential
// The alarm lasts one 8 s tick (four 1 s beeps). A value picked by the fast
// steps that is already behind the count is lost for that hour; this is a
// property of the original scheme and one reason the second timer exists.
//
// Timing: all registers run on the crystal clock with one-cycle enables;
// the comparison is sampled on the 8 s tick, so the alarm opens one tick
// after the count reaches the value. The hourly pulse comes one crystal
// cycle after the count reaches 256, as the original took it from the MSB.
//
// The ratios, tap, feedback and checks are the original design's; the
// modulo-450 count (the original's code reloads at 449 with a registered
// flag), the single clock, the reset and the differential output stage are
// this design's. Non-default parameters only shorten simulations.
module timer_sol1
  import rtimer_pkg::*;
#(
  parameter int unsigned PRESCALE_BITS = S1_PRESCALE_BITS,
  parameter int unsigned HOUR_STEPS    = S1_HOUR_STEPS,
  parameter int unsigned TONE_BIT      = 4,
  parameter int unsigned GATE_BIT      = 15
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 piezo_p,
  output logic                 piezo_n,
  output logic                 alarm,
  output logic [PRS_WIDTH-1:0] prseq
);
  localparam int unsigned WH = $clog2(HOUR_STEPS);

  logic [PRESCALE_BITS-1:0] count1;
  logic [WH-1:0]            count_h;
  logic                     tick8, msb_d, hour_pulse;

  binary_prescaler #(.WIDTH(PRESCALE_BITS)) u_div (
    .clk, .rst_n, .count(count1), .wrap(tick8));

  mod_counter #(.MODULUS(HOUR_STEPS)) u_hour (
    .clk, .rst_n, .en(tick8), .count(count_h), .wrap());

  // Hourly pulse: rising edge of the hour count's MSB.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) msb_d <= 1'b0;
    else        msb_d <= count_h[WH-1];
  assign hour_pulse = count_h[WH-1] & ~msb_d;

  prs_gen_range #(.LIMIT(HOUR_STEPS)) u_prs (
    .clk, .rst_n, .step_hour(hour_pulse), .step_fast(tick8),
    .prseq, .max_seq(), .bad_start());

  alarm_compare #(.WIDTH(PRS_WIDTH)) u_cmp (
    .clk, .rst_n, .sample(tick8), .count(PRS_WIDTH'(count_h)), .prseq, .alarm);

  piezo_driver u_piezo (
    .clk, .rst_n, .alarm, .gate(count1[GATE_BIT]), .tone(count1[TONE_BIT]),
    .piezo_p, .piezo_n);

  initial assert (TONE_BIT < GATE_BIT && GATE_BIT < PRESCALE_BITS && WH <= PRS_WIDTH)
    else $error("tone/gate bit or hour count width out of range");
endmodule
