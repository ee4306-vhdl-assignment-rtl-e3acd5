// piezo_driver: gates the alarm tone and drives the piezo differentially.
//
// While `alarm` is high, the 1 kHz `tone` is let through during the high
// half of the 2 s `gate` square wave, giving 1 s beeps with 1 s pauses.
// The piezo sits between piezo_p and piezo_n: during a beep the two pins
// toggle in antiphase (p = tone, n = not tone), so the element sees twice
// the supply swing; when silent both pins are low and no DC is across it.
// Both outputs are registered, one crystal cycle after the inputs, so the
// pins do not glitch.
// The gating alarm AND gate AND tone is the original design's AlarmSound;
// the second, antiphase output and the output registers are this design's
// reading of the requirement to drive the speaker differentially.
module piezo_driver (
  input  logic clk,
  input  logic rst_n,
  input  logic alarm,
  input  logic gate,
  input  logic tone,
  output logic piezo_p,
  output logic piezo_n
);
  logic beep;
  assign beep = alarm & gate;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      piezo_p <= 1'b0;
      piezo_n <= 1'b0;
    end else begin
      piezo_p <= beep &  tone;
      piezo_n <= beep & ~tone;
    end

  // Never drive both terminals high at once.
  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(piezo_p && piezo_n));
endmodule
