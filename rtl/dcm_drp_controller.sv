// dcm_drp_controller: retunes the two clock managers on request.
//
// A pulse on drp_req starts one reconfiguration: the controller puts both
// DCMs into reset, reads the (M, D) word for DCM-A from md_bram (the
// address generator supplies the address while phase = DCM_A), converts it
// to the DRP register value {M-1, D-1} and writes it to DCM-A through its
// dynamic reconfiguration port, waiting for DRDY. It then does the same for
// DCM-B. After holding the reset for RST_HOLD more cycles it releases it
// and waits until both DCMs report LOCKED (seen through a two-stage
// synchroniser, as LOCKED belongs to another clock domain); done then pulses and the
// controller returns to idle. If DRDY or LOCKED does not arrive within
// TIMEOUT cycles, err is set (until the next request) and the controller
// returns to idle, leaving the DCMs running with whatever they locked to.
// Requests arriving while busy are ignored.
//
// Interface: clk / rst (asynchronous, active high) is the DRP clock;
// drp_req, busy, done, err towards the host; phase and bram_en / bram_data
// towards address_generator and md_bram; drp_a / drp_b, rsp_a / rsp_b,
// dcm_rst and locked_a / locked_b towards the DCMs.
// Timing: one DCM costs 4 cycles plus the DRDY latency; a full retune takes
// 2 x (4 + DRDY latency) + RST_HOLD + lock time.
//
// Setting M and D on the fly through the DRP ports from a BRAM of safe
// values follows the source, where this role is played by software on a
// soft processor; the state machine, the reset around the write, the
// register encoding and the timeout are this design's choices.
module dcm_drp_controller
  import trng_pkg::*;
#(
  parameter int unsigned RST_HOLD = 8,
  parameter int unsigned TIMEOUT  = 4096
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              drp_req,
  output logic              busy,
  output logic              done,
  output logic              err,
  output dcm_sel_e          phase,
  output logic              bram_en,
  input  logic [DATA_W-1:0] bram_data,
  output drp_req_t          drp_a,
  output drp_req_t          drp_b,
  input  drp_rsp_t          rsp_a,
  input  drp_rsp_t          rsp_b,
  output logic              dcm_rst,
  input  logic              locked_a,
  input  logic              locked_b
);
  timeunit 1ps;
  timeprecision 1ps;

  typedef enum logic [2:0] {
    S_IDLE,
    S_READ,
    S_READ_WAIT,
    S_WRITE,
    S_WAIT_DRDY,
    S_HOLD,
    S_WAIT_LOCK
  } state_e;

  localparam int unsigned CNT_W = $clog2(TIMEOUT + RST_HOLD + 1);

  state_e            state;
  logic [CNT_W-1:0]  cnt;
  logic [DATA_W-1:0] wdata;
  drp_req_t          req_q;
  logic              drdy_sel;
  logic [1:0]        lock_sync [2];   // two-stage synchroniser for {locked_b, locked_a}

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      lock_sync[0] <= '0;
      lock_sync[1] <= '0;
    end else begin
      lock_sync[0] <= {locked_b, locked_a};
      lock_sync[1] <= lock_sync[0];
    end
  end

  always_comb begin
    drdy_sel = (phase == DCM_A) ? rsp_a.drdy : rsp_b.drdy;
    bram_en  = (state == S_READ);
    busy     = (state != S_IDLE);
    drp_a    = (phase == DCM_A) ? req_q : '0;
    drp_b    = (phase == DCM_B) ? req_q : '0;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= S_IDLE;
      phase   <= DCM_A;
      cnt     <= '0;
      wdata   <= '0;
      req_q   <= '0;
      dcm_rst <= 1'b0;
      done    <= 1'b0;
      err     <= 1'b0;
    end else begin
      done  <= 1'b0;
      req_q <= '0;
      case (state)
        S_IDLE: begin
          if (drp_req) begin
            state   <= S_READ;
            phase   <= DCM_A;
            dcm_rst <= 1'b1;
            err     <= 1'b0;
          end
        end
        S_READ:      state <= S_READ_WAIT;
        S_READ_WAIT: begin
          wdata <= md_to_drp(md_t'(bram_data));
          state <= S_WRITE;
        end
        S_WRITE: begin
          req_q <= '{den: 1'b1, dwe: 1'b1, daddr: DRP_MD_ADDR, di: wdata};
          cnt   <= '0;
          state <= S_WAIT_DRDY;
        end
        S_WAIT_DRDY: begin
          if (drdy_sel) begin
            cnt <= '0;
            if (phase == DCM_A) begin
              phase <= DCM_B;
              state <= S_READ;
            end else begin
              state <= S_HOLD;
            end
          end else if (32'(cnt) >= TIMEOUT) begin
            err     <= 1'b1;
            dcm_rst <= 1'b0;
            state   <= S_IDLE;
          end else begin
            cnt <= cnt + CNT_W'(1);
          end
        end
        S_HOLD: begin
          if (32'(cnt) >= RST_HOLD - 1) begin
            dcm_rst <= 1'b0;
            cnt     <= '0;
            state   <= S_WAIT_LOCK;
          end else begin
            cnt <= cnt + CNT_W'(1);
          end
        end
        S_WAIT_LOCK: begin
          if (lock_sync[1] == 2'b11) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (32'(cnt) >= TIMEOUT) begin
            err   <= 1'b1;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + CNT_W'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DRP rules: a write strobe lasts one cycle, and DCM reset is held for
  // the whole of the register write.
  a_den_single: assert property (@(posedge clk) disable iff (rst)
                                 req_q.den |=> !req_q.den)
    else $error("dcm_drp_controller: DEN held for more than one cycle");
  a_rst_during_write: assert property (@(posedge clk) disable iff (rst)
                                       req_q.den |-> dcm_rst)
    else $error("dcm_drp_controller: DRP write without DCM reset");

endmodule
