// mod_counter: enabled counter modulo MODULUS.
//
// Counts 0 .. MODULUS-1 on clock cycles where `en` is high and then returns
// to 0. `wrap` is high in the enabled cycle that takes the count from
// MODULUS-1 back to 0, so it is an enable for the next, slower stage.
// In the second timer this is Count7 (MODULUS 900: 128 Hz in, one pulse per
// 7.03125 s out) and CountH (MODULUS 512: one pulse per hour); in the first
// timer it is the hour counter of 450 eight-second ticks.
// The moduli are the original design's; the enable/wrap interface and the
// reset to 0 are this design's choices.
module mod_counter #(
  parameter int unsigned MODULUS = 900,
  localparam int unsigned W = (MODULUS > 1) ? $clog2(MODULUS) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         wrap
);
  localparam logic [W-1:0] LAST = W'(MODULUS - 1);

  assign wrap = en && (count == LAST);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     count <= '0;
    else if (wrap)  count <= '0;
    else if (en)    count <= count + 1'b1;
endmodule
