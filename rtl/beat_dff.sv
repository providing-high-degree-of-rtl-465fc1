// beat_dff: the beat-frequency detector flip-flop of the TRNG.
//
// The output of the faster-or-slower clock A is applied to the D input and
// sampled on every rising edge of clock B. Because the two clocks differ
// slightly in frequency, the phase of A relative to B slides by a small
// amount each B period; Q therefore stays at one level for many B cycles and
// flips each time A has gained (or lost) a whole period on B, i.e. once per
// beat interval. Near a crossing the two edges nearly coincide and jitter
// makes Q flip back and forth for a few cycles; that uncertainty is the
// source of randomness.
//
// Interface: clk_b (sampling clock, DCM-B), rst (asynchronous, active high,
// clears Q), clk_a (sampled clock, DCM-A), q (in the clk_b domain).
// Timing: q is clk_a as seen one clk_b edge earlier, one cycle of latency.
//
// One D flip-flop, as in the source; the asynchronous reset is this design's
// addition so that Q has a defined value before the DCMs lock.
module beat_dff (
  input  logic clk_b,
  input  logic rst,
  input  logic clk_a,
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk_b or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= clk_a;
  end

endmodule
