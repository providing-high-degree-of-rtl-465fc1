// md_bram: block RAM holding the pre-determined safe (M, D) settings.
//
// Letting a host write arbitrary multiplier/divider values into the clock
// managers is a risk, so only combinations checked at design time are kept
// here and the DRP controller can load nothing else. The memory has 2**5 =
// 32 words of 16 bits; words 0 to 22 hold the 23 feasible combinations as
// {M[7:0], D[7:0]} (23 x 2 bytes = 46 bytes) and the remaining words hold
// zero. The contents come from trng_pkg::md_entry.
//
// Interface: clk, en, addr (5 bits), dout (16 bits).
// Timing: synchronous read, dout is valid the cycle after en with addr.
// Contents and sizes follow the source; the byte packing is this design's
// choice. The array is initialised from a function so that synthesis maps
// it onto an initialised block RAM.
module md_bram
  import trng_pkg::*;
#(
  parameter int unsigned DEPTH = 2 ** ADDR_W
) (
  input  logic              clk,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] dout
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = md_entry(i);   // table in trng_pkg
  end

  always_ff @(posedge clk) begin
    if (en) dout <= mem[addr];
  end

endmodule
