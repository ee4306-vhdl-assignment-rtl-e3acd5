// alarm_compare: the comparison that opens the alarm window.
//
// On each clock where `sample` is high, the register `alarm` is set if the
// time counter equals the pseudo-random value and cleared otherwise. Because
// the counter stays on one value for a whole quantum (7.03 s or 8 s), the
// alarm stays high for one quantum and then clears by itself. The result is
// one sample period late with respect to the counter.
// The registered equality test and its sampling rate (the 128 Hz tick in the
// second timer, the 8 s tick in the first) are the original design's; the
// reset to 0 is this design's.
module alarm_compare #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample,
  input  logic [WIDTH-1:0] count,
  input  logic [WIDTH-1:0] prseq,
  output logic             alarm
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      alarm <= 1'b0;
    else if (sample) alarm <= (count == prseq);
endmodule
