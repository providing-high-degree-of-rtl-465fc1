// tunable_bfd_trng: DCM-based, tunable beat-frequency-detection TRNG.
//
// Two clock managers, DCM-A and DCM-B, synthesise two clocks of nearly the
// same frequency from one reference clk_in. The beat flip-flop samples
// clock A on every edge of clock B; its output rises once per beat
// interval, when A has slipped one whole period against B. The counter,
// clocked by B, measures each beat interval in B periods; the jitter of the
// two clocks makes the low-order bits of these counts random, and the
// post-processing unit packs them into OUT_W-bit words.
//
// The multiplier/divider (M, D) of each DCM can be changed at run time
// without reprogramming the FPGA: on drp_req the DRP controller reads the
// entries selected by the address generator from the BRAM of
// pre-checked settings and writes them into the DCMs' reconfiguration
// ports. Moving the two frequencies closer lengthens the beat interval and
// makes more low-order bits random (nbits), at a lower count rate.
//
// Ports. Reference and control side: clk_in (DCM reference), sys_clk (DRP
// and control clock), rst (asynchronous, active high), en (runs the DCMs;
// low holds them in reset), drp_req / busy / done / drp_err (retune
// handshake), cfg_load / cfg_idx_a / cfg_idx_b / cfg_step / cfg_err and
// idx_a / idx_b (tuning-table selection), locked_a / locked_b. Random side,
// all in the rng_clk (= DCM-B output) domain: nbits, beat, count_max /
// count_valid, rnd_word / rnd_valid. A host, such as a soft processor,
// drives the control side and collects the words.
//
// Timing: after a retune no count is produced until both DCMs lock and two
// beat edges have passed; one count yields nbits bits, so a word needs
// ceil(OUT_W / nbits) beat intervals.
//
// The signal chain (DCM-A into D, DCM-B into CLK, counter on clock B,
// counter maxima into the post-processing unit) and the tuning path
// (address generator, 5-bit address, BRAM, 16-bit data, DRP controller,
// both DCMs) follow the source's block diagrams. This design's own choices:
// the clock-B logic is held in reset while either DCM is unlocked and for
// 16 sys_clk cycles after both lock (clock B runs only when DCM-B is
// locked, so the reset must overlap some of its edges), then released
// through a reset synchroniser; the default settings are table entries 18
// and 22, (M, D) = (20, 24) and (21, 24).
module tunable_bfd_trng
  import trng_pkg::*;
#(
  parameter int unsigned CLKIN_PERIOD_PS = 20000,
  parameter int unsigned JITTER_PS       = 50,
  parameter int unsigned LOCK_CYCLES     = 16,
  parameter logic [ADDR_W-1:0] INIT_IDX_A = 5'd18,
  parameter logic [ADDR_W-1:0] INIT_IDX_B = 5'd22,
  parameter int unsigned COUNT_W         = 12,
  parameter int unsigned MAX_BITS        = 3,
  parameter int unsigned OUT_W           = 32,
  parameter int unsigned RST_HOLD        = 8,
  parameter int unsigned TIMEOUT         = 4096,
  localparam int unsigned NB_W           = $clog2(MAX_BITS + 1)
) (
  input  logic               clk_in,
  input  logic               sys_clk,
  input  logic               rst,
  input  logic               en,
  // retune handshake
  input  logic               drp_req,
  output logic               busy,
  output logic               done,
  output logic               drp_err,
  // tuning-table selection
  input  logic               cfg_load,
  input  logic [ADDR_W-1:0]  cfg_idx_a,
  input  logic [ADDR_W-1:0]  cfg_idx_b,
  input  logic               cfg_step,
  output logic               cfg_err,
  output logic [ADDR_W-1:0]  idx_a,
  output logic [ADDR_W-1:0]  idx_b,
  output logic               locked_a,
  output logic               locked_b,
  // random output, rng_clk domain
  output logic               rng_clk,
  input  logic [NB_W-1:0]    nbits,
  output logic               beat,
  output logic [COUNT_W-1:0] count_max,
  output logic               count_valid,
  output logic [OUT_W-1:0]   rnd_word,
  output logic               rnd_valid
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam md_t INIT_MD_A = md_entry(int'(INIT_IDX_A));
  localparam md_t INIT_MD_B = md_entry(int'(INIT_IDX_B));

  logic              clk_a, clk_b;
  logic              ctrl_dcm_rst, dcm_rst;
  logic              rst_b, rst_b_async;
  dcm_sel_e          phase;
  logic              bram_en;
  logic [ADDR_W-1:0] bram_addr;
  logic [DATA_W-1:0] bram_data;
  drp_req_t          drp_a, drp_b;
  drp_rsp_t          rsp_a, rsp_b;

  // ---------------- tuning circuit ----------------
  address_generator #(
    .NUM_ENTRIES(NUM_MD),
    .INIT_A     (INIT_IDX_A),
    .INIT_B     (INIT_IDX_B)
  ) u_addr_gen (
    .clk      (sys_clk),
    .rst      (rst),
    .cfg_load (cfg_load),
    .cfg_idx_a(cfg_idx_a),
    .cfg_idx_b(cfg_idx_b),
    .cfg_step (cfg_step),
    .phase    (phase),
    .addr     (bram_addr),
    .idx_a    (idx_a),
    .idx_b    (idx_b),
    .cfg_err  (cfg_err)
  );

  md_bram u_bram (
    .clk (sys_clk),
    .en  (bram_en),
    .addr(bram_addr),
    .dout(bram_data)
  );

  dcm_drp_controller #(
    .RST_HOLD(RST_HOLD),
    .TIMEOUT (TIMEOUT)
  ) u_drp_ctrl (
    .clk      (sys_clk),
    .rst      (rst),
    .drp_req  (drp_req),
    .busy     (busy),
    .done     (done),
    .err      (drp_err),
    .phase    (phase),
    .bram_en  (bram_en),
    .bram_data(bram_data),
    .drp_a    (drp_a),
    .drp_b    (drp_b),
    .rsp_a    (rsp_a),
    .rsp_b    (rsp_b),
    .dcm_rst  (ctrl_dcm_rst),
    .locked_a (locked_a),
    .locked_b (locked_b)
  );

  // ---------------- clock sources ----------------
  always_comb dcm_rst = rst || !en || ctrl_dcm_rst;

  dcm_model #(
    .CLKFX_MULTIPLY (int'(INIT_MD_A.m)),
    .CLKFX_DIVIDE   (int'(INIT_MD_A.d)),
    .CLKIN_PERIOD_PS(CLKIN_PERIOD_PS),
    .JITTER_PS      (JITTER_PS),
    .LOCK_CYCLES    (LOCK_CYCLES)
  ) u_dcm_a (
    .CLKIN (clk_in),
    .RST   (dcm_rst),
    .CLKFX (clk_a),
    .LOCKED(locked_a),
    .DCLK  (sys_clk),
    .DEN   (drp_a.den),
    .DWE   (drp_a.dwe),
    .DADDR (drp_a.daddr),
    .DI    (drp_a.di),
    .DO    (rsp_a.dout),
    .DRDY  (rsp_a.drdy)
  );

  dcm_model #(
    .CLKFX_MULTIPLY (int'(INIT_MD_B.m)),
    .CLKFX_DIVIDE   (int'(INIT_MD_B.d)),
    .CLKIN_PERIOD_PS(CLKIN_PERIOD_PS),
    .JITTER_PS      (JITTER_PS),
    .LOCK_CYCLES    (LOCK_CYCLES)
  ) u_dcm_b (
    .CLKIN (clk_in),
    .RST   (dcm_rst),
    .CLKFX (clk_b),
    .LOCKED(locked_b),
    .DCLK  (sys_clk),
    .DEN   (drp_b.den),
    .DWE   (drp_b.dwe),
    .DADDR (drp_b.daddr),
    .DI    (drp_b.di),
    .DO    (rsp_b.dout),
    .DRDY  (rsp_b.drdy)
  );

  // ---------------- beat detection and counting ----------------
  // Clock-B reset. The clock-B logic is held in reset until both DCMs
  // have been locked for B_RESET_HOLD sys_clk cycles, so that clock B runs
  // for a few edges with the reset applied; the release is then
  // re-timed to clock B by a two-stage reset synchroniser.
  localparam int unsigned B_RESET_HOLD = 16;
  logic [1:0] lock_sync;
  logic [$clog2(B_RESET_HOLD + 1)-1:0] hold_cnt;
  logic       run_b;
  logic [1:0] rst_b_sync;

  always_ff @(posedge sys_clk or posedge rst) begin
    if (rst) begin
      lock_sync <= '0;
      hold_cnt  <= '0;
      run_b     <= 1'b0;
    end else begin
      lock_sync <= {lock_sync[0], locked_a && locked_b};
      if (!lock_sync[1]) begin
        hold_cnt <= '0;
        run_b    <= 1'b0;
      end else if (32'(hold_cnt) < B_RESET_HOLD) begin
        hold_cnt <= hold_cnt + 1'b1;
      end else begin
        run_b    <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk_b or posedge rst_b_async) begin
    if (rst_b_async) rst_b_sync <= 2'b11;
    else             rst_b_sync <= {rst_b_sync[0], 1'b0};
  end

  always_comb begin
    rst_b_async = rst || !run_b || !locked_a || !locked_b;
    rst_b       = rst_b_sync[1];
    rng_clk     = clk_b;
  end

  beat_dff u_dff (
    .clk_b(clk_b),
    .rst  (rst_b),
    .clk_a(clk_a),
    .q    (beat)
  );

  beat_counter #(
    .COUNT_W(COUNT_W)
  ) u_counter (
    .clk_b      (clk_b),
    .rst        (rst_b),
    .beat       (beat),
    .count      (),
    .count_max  (count_max),
    .count_valid(count_valid)
  );

  post_processing_unit #(
    .COUNT_W (COUNT_W),
    .MAX_BITS(MAX_BITS),
    .OUT_W   (OUT_W)
  ) u_post (
    .clk        (clk_b),
    .rst        (rst_b),
    .count_max  (count_max),
    .count_valid(count_valid),
    .nbits      (nbits),
    .rnd_word   (rnd_word),
    .rnd_valid  (rnd_valid)
  );

endmodule
