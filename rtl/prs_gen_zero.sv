// prs_gen_zero: 9-bit pseudo-random time generator of the second timer,
// with its all-zero check.
//
// A shift register moves towards the MSB and feeds bit 0 with
// bit 8 xor bit 3 (taps 9,4), which runs through all 511 non-zero values
// before repeating. It steps only when `step` (the hourly pulse) is high, so
// the value is steady for the whole hour it is compared against. The all-zero
// value is the one state this feedback cannot leave; `bad_start` flags it
// and the register is loaded with SEED (010101010) on the next clock cycle,
// without waiting for the hourly step. Reset puts the register in that zero
// state, so the same check initialises it at power-up.
//
// The taps, the XOR feedback and the reload value are the original design's.
// The original switched the register's clock between the crystal and the
// hourly pulse; here it is one clock with two enables.
module prs_gen_zero
  import rtimer_pkg::*;
#(
  parameter logic [PRS_WIDTH-1:0] SEED = PRS_SEED
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 step,
  output logic [PRS_WIDTH-1:0] prseq,
  output logic                 bad_start
);
  assign bad_start = (prseq == '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         prseq <= '0;
    else if (bad_start) prseq <= SEED;
    else if (step)      prseq <= prs_next(prseq, 1'b0);

  // The reload value must itself be a legal (non-zero) state.
  initial assert (SEED != '0) else $error("SEED must be non-zero");
endmodule
