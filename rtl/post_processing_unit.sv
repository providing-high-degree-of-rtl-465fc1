// post_processing_unit: turns counter maxima into random output words.
//
// Only the low-order bits of a counter maximum vary with jitter; the upper
// bits follow the nominal beat interval. For every count_valid the unit
// keeps the nbits least significant bits of count_max (1 to MAX_BITS; 0 is
// treated as 1) and appends them to a bit accumulator, the newest bits at
// the least significant end. Whenever OUT_W bits have gathered, the oldest
// OUT_W of them are output as rnd_word with a one-cycle rnd_valid pulse and
// any bits left over start the next word, so no bit is lost or repeated
// when OUT_W is not a multiple of nbits.
//
// Interface: clk / rst (asynchronous, active high), count_max /
// count_valid from beat_counter, nbits (sampled with each count_valid),
// rnd_word / rnd_valid. Timing: rnd_valid follows the count_valid that
// completes a word by one cycle; a new count can be accepted every cycle.
//
// The source names this unit and states that one LSB, or up to three LSBs
// when the frequencies are closer, of each count are usable random bits;
// the packing into OUT_W-bit words and the widths are this design's choice.
module post_processing_unit #(
  parameter int unsigned COUNT_W  = 12,
  parameter int unsigned MAX_BITS = 3,
  parameter int unsigned OUT_W    = 32,
  localparam int unsigned NB_W    = $clog2(MAX_BITS + 1),
  localparam int unsigned ACC_W   = OUT_W + MAX_BITS,
  localparam int unsigned FILL_W  = $clog2(ACC_W + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [COUNT_W-1:0] count_max,
  input  logic               count_valid,
  input  logic [NB_W-1:0]    nbits,
  output logic [OUT_W-1:0]   rnd_word,
  output logic               rnd_valid
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [ACC_W-1:0]  acc;
  logic [FILL_W-1:0] fill;

  logic [NB_W-1:0]   n_eff;
  logic [ACC_W-1:0]  mask;
  logic [ACC_W-1:0]  acc_next;
  logic [FILL_W-1:0] fill_next;

  always_comb begin
    if (nbits == '0)                  n_eff = NB_W'(1);
    else if (32'(nbits) > MAX_BITS)   n_eff = NB_W'(MAX_BITS);
    else                              n_eff = nbits;
    mask      = (ACC_W'(1) << n_eff) - ACC_W'(1);
    acc_next  = (acc << n_eff) | (ACC_W'(count_max) & mask);
    fill_next = fill + FILL_W'(n_eff);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc       <= '0;
      fill      <= '0;
      rnd_word  <= '0;
      rnd_valid <= 1'b0;
    end else begin
      rnd_valid <= 1'b0;
      if (count_valid) begin
        acc <= acc_next;
        if (32'(fill_next) >= OUT_W) begin
          rnd_word  <= OUT_W'(acc_next >> (fill_next - FILL_W'(OUT_W)));
          rnd_valid <= 1'b1;
          fill      <= fill_next - FILL_W'(OUT_W);
        end else begin
          fill <= fill_next;
        end
      end
    end
  end

endmodule
