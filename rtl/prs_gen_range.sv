// prs_gen_range: 9-bit pseudo-random time generator of the first timer,
// with its range and lock-up checks.
//
// A shift register moves towards the MSB and feeds bit 0 with
// bit 8 xnor bit 3 (taps 9,4). With XNOR feedback the all-ones value is the
// lock-up state. The first timer counts only LIMIT (450) eight-second ticks
// per hour, so a value of LIMIT or more names no time in the hour:
// `max_seq` flags it, and the register then steps on every fast (8 s) tick
// until it holds a usable value; otherwise it steps only on the hourly pulse.
// In the step where the register holds all ones (`bad_start`) it is
// loaded with all zeros instead of shifted. All ones is at least LIMIT, so
// the lock-up state is always left on the fast tick.
//
// Taps, XNOR feedback, the range check and the all-ones-to-zero recovery are
// the original design's. Rejecting 450 and above (not 449) follows the
// original's text, the single clock with enables and the unregistered lock-up
// check are this design's choices. Reset loads the lock-up state, so the
// recovery is exercised at power-up.
module prs_gen_range
  import rtimer_pkg::*;
#(
  parameter int unsigned LIMIT = S1_HOUR_STEPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 step_hour,
  input  logic                 step_fast,
  output logic [PRS_WIDTH-1:0] prseq,
  output logic                 max_seq,
  output logic                 bad_start
);
  logic advance;

  assign max_seq   = (prseq >= PRS_WIDTH'(LIMIT));
  assign bad_start = &prseq;
  assign advance   = max_seq ? step_fast : step_hour;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       prseq <= '1;
    else if (advance) prseq <= bad_start ? '0 : prs_next(prseq, 1'b1);

  initial assert (LIMIT > 0 && LIMIT < 2**PRS_WIDTH)
    else $error("LIMIT must leave the all-ones state out of range");
endmodule
