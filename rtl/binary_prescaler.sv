// binary_prescaler: free-running WIDTH-bit binary divider on the crystal clock.
//
// The counter increments on every clock and rolls over every 2^WIDTH cycles.
// `wrap` is high during the last cycle before the roll-over, so it is a
// one-cycle enable at clk/2^WIDTH for the next divider stage. The individual
// bits of `count` are square waves at clk/2^(i+1); the timers take the 1 kHz
// tone from bit 4 (32768/32 = 1024 Hz) and, in the first timer, the 2 s beep
// gate from bit 15.
//
// Widths follow the original design (8 bits in the second timer, where this
// is Count1, 18 bits in the first). The original clocked the next stage from
// a counter bit; using the roll-over as a clock enable instead is this
// design's choice, keeping everything on one clock. Reset (to 0) is also ours.
module binary_prescaler #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] count,
  output logic             wrap
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;

  assign wrap = &count;
endmodule
