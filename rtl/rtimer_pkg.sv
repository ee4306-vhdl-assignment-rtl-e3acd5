// rtimer_pkg: constants shared by the random alarm timers.
//
// The timers run from a 32768 Hz watch crystal. The second (main) timer
// divides it by 256 and then by 900, giving a time quantum of
// 256*900/32768 = 7.03125 s; 512 quanta make exactly one hour, so every
// value of a 9-bit pseudo-random sequence names a quantum in the hour.
// The first timer divides by 2^18 for an 8 s tick and counts 450 ticks per
// hour. The feedback tap (stages 9 and 4) comes from the standard table of
// maximal-length shift registers; the reload value 010101010 of the second
// timer's zero check is the one the original design chose.
package rtimer_pkg;
  localparam int unsigned CRYSTAL_HZ   = 32768;
  localparam int unsigned PRS_WIDTH    = 9;
  localparam int unsigned PRS_TAP      = 4;            // taps 9,4 -> bits 8 and 3
  localparam logic [PRS_WIDTH-1:0] PRS_SEED = 9'b010101010;

  // Second solution: 2^8 * 900 crystal cycles per quantum, 2^9 quanta per hour.
  localparam int unsigned S2_PRESCALE_BITS = 8;
  localparam int unsigned S2_DIV7          = 900;

  // First solution: 2^18 crystal cycles per 8 s tick, 450 ticks per hour.
  localparam int unsigned S1_PRESCALE_BITS = 18;
  localparam int unsigned S1_HOUR_STEPS    = 450;

  // One maximal-length step of a shift register that shifts towards the MSB
  // and feeds bit 0 with stage WIDTH xor stage TAP (XNOR when xnor_fb is set).
  function automatic logic [PRS_WIDTH-1:0] prs_next(input logic [PRS_WIDTH-1:0] v,
                                                    input bit xnor_fb);
    logic fb;
    fb = v[PRS_WIDTH-1] ^ v[PRS_TAP-1];
    if (xnor_fb) fb = ~fb;
    return {v[PRS_WIDTH-2:0], fb};
  endfunction
endpackage
