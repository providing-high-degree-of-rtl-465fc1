// address_generator: selects which stored (M, D) entry each DCM receives.
//
// Two index registers, idx_a for DCM-A and idx_b for DCM-B, point into the
// NUM_ENTRIES valid words of md_bram. The host loads both with cfg_load;
// a load naming an index at or beyond NUM_ENTRIES is refused (the indices
// keep their values and cfg_err pulses), so an address outside the safe
// table can never be produced. cfg_step advances both indices by one,
// wrapping at NUM_ENTRIES, which lets a host sweep through the tuning
// settings. The BRAM address follows the DRP controller's phase input:
// idx_a while it serves DCM-A, idx_b while it serves DCM-B.
//
// Interface: clk, rst (asynchronous, active high, indices to
// INIT_A / INIT_B), cfg_load with cfg_idx_a / cfg_idx_b, cfg_step, phase,
// addr (combinational from the registered indices), idx_a, idx_b, cfg_err.
// Timing: a load or step is visible on addr the cycle after it.
//
// The source shows this module only as the producer of the 5-bit BRAM
// address; the two indices, the range check and the step mode are this
// design's choices.
module address_generator
  import trng_pkg::*;
#(
  parameter int unsigned NUM_ENTRIES = NUM_MD,
  parameter logic [ADDR_W-1:0] INIT_A = 5'd18,
  parameter logic [ADDR_W-1:0] INIT_B = 5'd22
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cfg_load,
  input  logic [ADDR_W-1:0] cfg_idx_a,
  input  logic [ADDR_W-1:0] cfg_idx_b,
  input  logic              cfg_step,
  input  dcm_sel_e          phase,
  output logic [ADDR_W-1:0] addr,
  output logic [ADDR_W-1:0] idx_a,
  output logic [ADDR_W-1:0] idx_b,
  output logic              cfg_err
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(NUM_ENTRIES - 1);

  function automatic logic [ADDR_W-1:0] wrap_inc(logic [ADDR_W-1:0] i);
    return (i >= LAST) ? '0 : i + ADDR_W'(1);
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      idx_a   <= INIT_A;
      idx_b   <= INIT_B;
      cfg_err <= 1'b0;
    end else begin
      cfg_err <= 1'b0;
      if (cfg_load) begin
        if (cfg_idx_a <= LAST && cfg_idx_b <= LAST) begin
          idx_a <= cfg_idx_a;
          idx_b <= cfg_idx_b;
        end else begin
          cfg_err <= 1'b1;
        end
      end else if (cfg_step) begin
        idx_a <= wrap_inc(idx_a);
        idx_b <= wrap_inc(idx_b);
      end
    end
  end

  always_comb addr = (phase == DCM_A) ? idx_a : idx_b;

endmodule
