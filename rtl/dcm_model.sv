// dcm_model: behavioural model of an FPGA Digital Clock Manager (DCM) used
// as one of the two jittery clock sources of the TRNG. It is not
// synthesizable logic: the real part is a hard clock-synthesis macro of the
// FPGA, and this model only reproduces what the TRNG relies on.
//
// Function: once RST is released and LOCK_CYCLES rising edges of CLKIN have
// passed, LOCKED rises and CLKFX toggles with a nominal period of
// CLKIN_PERIOD_PS * D / M. Every half period is lengthened or shortened by an
// independent uniform random amount in [-JITTER_PS, +JITTER_PS], so the
// phase of CLKFX performs a random walk: this is the clock jitter that the
// beat-frequency detector turns into random numbers. The CLKIN period is
// taken from the parameter, not measured; CLKIN only paces the lock counter.
//
// Dynamic reconfiguration port (DRP), clocked by DCLK: a cycle with DEN and
// DWE high and DADDR = 7'h50 writes DI = {M-1, D-1} into the M/D register; a
// cycle with DEN and DWE low reads it back on DO. DRDY pulses for one DCLK
// cycle, the cycle after DEN. A new M/D takes effect on the next release of
// RST (the host resets the DCM around a reconfiguration). An M or D outside
// [M_MIN, M_MAX] / [D_MIN, D_MAX] of trng_pkg keeps the DCM from locking,
// standing in for an unsafe setting. While not locked CLKFX is held low.
//
// The port names follow the vendor primitive; the register address, the
// {M-1, D-1} encoding, the lock time and the jitter figure are this model's
// own choices.
module dcm_model
  import trng_pkg::*;
#(
  parameter int unsigned CLKFX_MULTIPLY  = 20,
  parameter int unsigned CLKFX_DIVIDE    = 24,
  parameter int unsigned CLKIN_PERIOD_PS = 20000,
  parameter int unsigned JITTER_PS       = 50,
  parameter int unsigned LOCK_CYCLES     = 16
) (
  input  logic                  CLKIN,
  input  logic                  RST,
  output logic                  CLKFX,
  output logic                  LOCKED,
  input  logic                  DCLK,
  input  logic                  DEN,
  input  logic                  DWE,
  input  logic [DRP_ADDR_W-1:0] DADDR,
  input  logic [DATA_W-1:0]     DI,
  output logic [DATA_W-1:0]     DO,
  output logic                  DRDY
);
  timeunit 1ps;
  timeprecision 1ps;

  // DRP-visible register {M-1, D-1}; starts at the parameter values.
  logic [DATA_W-1:0] md_reg;
  // Setting in use, copied from md_reg while the DCM is not locked.
  logic [7:0]        m_act;
  logic [7:0]        d_act;
  logic [15:0]       lock_cnt;
  logic              cfg_ok;

  // Power-up state of the model (plain always blocks below, as this is a
  // simulation model with an initial state rather than a reset).
  initial begin
    md_reg   = {8'(CLKFX_MULTIPLY - 1), 8'(CLKFX_DIVIDE - 1)};
    m_act    = 8'(CLKFX_MULTIPLY);
    d_act    = 8'(CLKFX_DIVIDE);
    lock_cnt = '0;
    LOCKED   = 1'b0;
    DRDY     = 1'b0;
    DO       = '0;
  end

  // ---------------- DRP ----------------
  always @(posedge DCLK) begin
    DRDY <= DEN;
    if (DEN) begin
      if (DWE) begin
        if (DADDR == DRP_MD_ADDR) md_reg <= DI;
      end else begin
        DO <= (DADDR == DRP_MD_ADDR) ? md_reg : '0;
      end
    end
  end

  // ---------------- lock ----------------
  always_comb begin
    cfg_ok = (32'(m_act) >= M_MIN) && (32'(m_act) <= M_MAX) &&
             (32'(d_act) >= D_MIN) && (32'(d_act) <= D_MAX);
  end

  always @(posedge CLKIN or posedge RST) begin
    if (RST) begin
      LOCKED   <= 1'b0;
      lock_cnt <= '0;
      m_act    <= md_reg[15:8] + 8'd1;
      d_act    <= md_reg[7:0] + 8'd1;
    end else if (!LOCKED) begin
      m_act <= md_reg[15:8] + 8'd1;
      d_act <= md_reg[7:0] + 8'd1;
      if (cfg_ok) begin
        if (32'(lock_cnt) >= LOCK_CYCLES - 1) LOCKED <= 1'b1;
        else                                  lock_cnt <= lock_cnt + 16'd1;
      end
    end
  end

  // ---------------- jittery synthesised clock ----------------
  function automatic int half_period_ps(logic [7:0] m, logic [7:0] d);
    int nominal;
    int jit;
    nominal = int'((longint'(CLKIN_PERIOD_PS) * longint'(d)) / (2 * longint'(m)));
    if (JITTER_PS == 0) jit = 0;
    else jit = int'($urandom_range(2 * JITTER_PS, 0)) - int'(JITTER_PS);
    if (nominal + jit < 1) return 1;
    return nominal + jit;
  endfunction

  initial CLKFX = 1'b0;

  // One half period per pass; waits for LOCKED while unlocked.
  always begin
    if (!LOCKED) begin
      CLKFX = 1'b0;
      @(posedge LOCKED);
    end else begin
      #(half_period_ps(m_act, d_act));
      CLKFX = LOCKED ? ~CLKFX : 1'b0;
    end
  end

  // A DRP access must not start before the previous one has been answered.
  property p_drp_one_at_a_time;
    @(posedge DCLK) DEN |=> !DEN;
  endproperty
  a_drp_one_at_a_time: assert property (p_drp_one_at_a_time)
    else $error("dcm_model: DEN asserted on consecutive DCLK cycles");

endmodule
