// beat_counter: measures the beat interval in periods of clock B.
//
// A free-running counter advances by one on every clk_b rising edge. When
// the beat flip-flop output `beat` rises (0 in the previous cycle, 1 now),
// the number of clk_b cycles since the previous rise is captured into
// count_max, count_valid pulses for one cycle, and the counter restarts.
// count_max is the counter maximum whose low-order bits carry the jitter
// and are used as random bits. The first rise after reset only starts the
// measurement and produces no output, because the interval before it is
// incomplete. If no rise arrives the counter saturates at all ones and the
// saturated value is reported at the next rise.
//
// Interface: clk_b and rst (asynchronous, active high), beat from
// beat_dff, count (running value), count_max / count_valid (clk_b domain).
// Timing: count_max and count_valid are registered and appear on the clk_b
// edge that sees the rise of beat (one cycle after beat_dff sampled it).
//
// Counting B periods, sampling at the beat and resetting follow the source.
// The edge detection, the first-interval suppression, saturation and the
// 12-bit default width are this design's choices (12 + 12 + 1 flip-flops
// is in line with the 25 registers reported for the counter).
module beat_counter #(
  parameter int unsigned COUNT_W = 12
) (
  input  logic               clk_b,
  input  logic               rst,
  input  logic               beat,
  output logic [COUNT_W-1:0] count,
  output logic [COUNT_W-1:0] count_max,
  output logic               count_valid
);
  timeunit 1ps;
  timeprecision 1ps;

  logic beat_d;
  logic primed;
  logic rise;
  logic [COUNT_W-1:0] count_inc;

  always_comb begin
    rise      = beat && !beat_d;
    count_inc = (count == '1) ? count : count + COUNT_W'(1);
  end

  always_ff @(posedge clk_b or posedge rst) begin
    if (rst) begin
      beat_d      <= 1'b0;
      primed      <= 1'b0;
      count       <= '0;
      count_max   <= '0;
      count_valid <= 1'b0;
    end else begin
      beat_d      <= beat;
      count_valid <= 1'b0;
      if (rise) begin
        count <= '0;
        primed <= 1'b1;
        if (primed) begin
          count_max   <= count_inc;
          count_valid <= 1'b1;
        end
      end else begin
        count <= count_inc;
      end
    end
  end

endmodule
