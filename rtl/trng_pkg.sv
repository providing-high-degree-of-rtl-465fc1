// trng_pkg: types and constants shared by the tunable beat-frequency-detection TRNG.
//
// A tuning entry is one (M, D) pair for a Digital Clock Manager: the DCM
// synthesises CLKFX = CLKIN * M / D. Entries are stored in a 16-bit block-RAM
// word, M in the upper byte and D in the lower byte (16-bit data path and
// 5-bit address as in the tuning-circuit diagram; the byte split is this
// design's choice). The DCM's DRP register that holds the multiplier and
// divider is written with M-1 and D-1, following the usual convention of
// FPGA clock managers (this design's choice, not given by the source).
package trng_pkg;

  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned ADDR_W      = 5;   // BRAM address width
  localparam int unsigned DATA_W      = 16;  // BRAM / DRP data width
  localparam int unsigned DRP_ADDR_W  = 7;   // DCM DRP address width
  localparam int unsigned NUM_MD      = 23;  // feasible (M, D) combinations stored

  // DRP register of the DCM model holding {M-1, D-1}.
  localparam logic [DRP_ADDR_W-1:0] DRP_MD_ADDR = 7'h50;

  // Legal range of the multiplier and divider accepted by the DCM model.
  localparam int unsigned M_MIN = 2;
  localparam int unsigned M_MAX = 32;
  localparam int unsigned D_MIN = 1;
  localparam int unsigned D_MAX = 32;

  typedef struct packed {
    logic [7:0] m;
    logic [7:0] d;
  } md_t;

  // Which DCM a DRP transfer or BRAM read is for.
  typedef enum logic {
    DCM_A = 1'b0,
    DCM_B = 1'b1
  } dcm_sel_e;

  // DRP request bundle from a master (the DRP controller) to one DCM.
  typedef struct packed {
    logic                  den;
    logic                  dwe;
    logic [DRP_ADDR_W-1:0] daddr;
    logic [DATA_W-1:0]     di;
  } drp_req_t;

  // DRP response bundle from one DCM.
  typedef struct packed {
    logic [DATA_W-1:0] dout;
    logic              drdy;
  } drp_rsp_t;

  // Convert a stored (M, D) entry into the DRP register value {M-1, D-1}.
  function automatic logic [DATA_W-1:0] md_to_drp(md_t md);
    return {md.m - 8'd1, md.d - 8'd1};
  endfunction

  // The stored tuning table: entry i (0..22) is entry i+1 of the DCM-1
  // (M, D) column of the published tuning table, duplicates kept; entries
  // beyond it are {0, 0}, which no DCM accepts.
  function automatic md_t md_entry(int unsigned i);
    case (i)
      0:  return '{m: 8'd15, d: 8'd11};
      1:  return '{m: 8'd21, d: 8'd21};
      2:  return '{m: 8'd15, d: 8'd21};
      3:  return '{m: 8'd20, d: 8'd22};
      4:  return '{m: 8'd16, d: 8'd22};
      5:  return '{m: 8'd17, d: 8'd22};
      6:  return '{m: 8'd16, d: 8'd23};
      7:  return '{m: 8'd19, d: 8'd23};
      8:  return '{m: 8'd19, d: 8'd23};
      9:  return '{m: 8'd22, d: 8'd23};
      10: return '{m: 8'd23, d: 8'd23};
      11: return '{m: 8'd19, d: 8'd24};
      12: return '{m: 8'd24, d: 8'd24};
      13: return '{m: 8'd21, d: 8'd24};
      14: return '{m: 8'd23, d: 8'd24};
      15: return '{m: 8'd20, d: 8'd24};
      16: return '{m: 8'd21, d: 8'd24};
      17: return '{m: 8'd22, d: 8'd24};
      18: return '{m: 8'd20, d: 8'd24};
      19: return '{m: 8'd20, d: 8'd24};
      20: return '{m: 8'd20, d: 8'd24};
      21: return '{m: 8'd20, d: 8'd24};
      22: return '{m: 8'd21, d: 8'd24};
      default: return '{m: 8'd0, d: 8'd0};
    endcase
  endfunction

endpackage
