// tb_dcm_drp_controller: self-checking test of the DCM reconfiguration
// sequencer.
//
// The testbench models the BRAM (one-cycle read of a table given by the
// phase), the two DRP slaves (DRDY one cycle after DEN, writes logged) and
// the LOCKED outputs (rising LOCK_DLY cycles after the DCM reset is
// released). It checks that a request writes {M-1, D-1} of the selected
// entry to DCM-A and then to DCM-B at the DRP address 7'h50, that the DCM
// reset covers both writes, that done pulses after both DCMs lock and the
// exact length of a retune, that requests while busy are ignored, and that a
// DCM that never locks ends in err after the timeout.
module tb_dcm_drp_controller;
  import trng_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned RST_HOLD = 8, TIMEOUT = 200, LOCK_DLY = 10;

  logic clk = 1'b0, rst = 1'b1, drp_req = 1'b0;
  logic busy, done, err, bram_en, dcm_rst;
  dcm_sel_e phase;
  logic [DATA_W-1:0] bram_data = '0;
  drp_req_t drp_a, drp_b;
  drp_rsp_t rsp_a = '0, rsp_b = '0;
  logic locked_a = 1'b1, locked_b = 1'b1;
  bit never_lock = 0;
  int checks = 0, failures = 0;

  always #5000 clk = ~clk;

  dcm_drp_controller #(.RST_HOLD(RST_HOLD), .TIMEOUT(TIMEOUT)) dut (
    .clk(clk), .rst(rst), .drp_req(drp_req), .busy(busy), .done(done), .err(err),
    .phase(phase), .bram_en(bram_en), .bram_data(bram_data),
    .drp_a(drp_a), .drp_b(drp_b), .rsp_a(rsp_a), .rsp_b(rsp_b),
    .dcm_rst(dcm_rst), .locked_a(locked_a), .locked_b(locked_b)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Settings handed out by the modelled BRAM for each phase.
  logic [7:0] m_sel[2], d_sel[2];
  logic [15:0] wr_log[$];
  int          wr_dcm[$];
  int          rel_cnt = 0;

  always @(posedge clk) begin
    if (bram_en) bram_data <= {m_sel[phase], d_sel[phase]};
    rsp_a.drdy <= drp_a.den;
    rsp_b.drdy <= drp_b.den;
    if (!rst && drp_a.den) begin
      check(drp_a.dwe && drp_a.daddr == 7'h50, "DCM-A write to the M/D register");
      check(dcm_rst, "DCM-A written while in reset");
      check(!drp_b.den, "one DCM at a time");
      wr_log.push_back(drp_a.di); wr_dcm.push_back(0);
    end
    if (!rst && drp_b.den) begin
      check(drp_b.dwe && drp_b.daddr == 7'h50, "DCM-B write to the M/D register");
      check(dcm_rst, "DCM-B written while in reset");
      wr_log.push_back(drp_b.di); wr_dcm.push_back(1);
    end
    // LOCKED model.
    if (dcm_rst) begin
      locked_a <= 1'b0; locked_b <= 1'b0; rel_cnt <= 0;
    end else if (!never_lock) begin
      rel_cnt <= rel_cnt + 1;
      if (rel_cnt == LOCK_DLY - 1) locked_a <= 1'b1;
      if (rel_cnt == LOCK_DLY + 2) locked_b <= 1'b1;
    end
  end

  int cycles;
  task automatic retune(input int ma, input int da, input int mb, input int db, output int n);
    m_sel[0] = 8'(ma); d_sel[0] = 8'(da); m_sel[1] = 8'(mb); d_sel[1] = 8'(db);
    @(negedge clk); drp_req = 1'b1;
    @(negedge clk); drp_req = 1'b0;
    n = 1;
    while (!done && n < 1000) begin
      if (n == 3) begin drp_req = 1'b1; @(negedge clk); drp_req = 1'b0; n++; end
      else begin @(negedge clk); n++; end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!busy && !dcm_rst, "idle after reset");

    retune(20, 24, 21, 24, cycles);
    check(done && !err, "retune completes");
    check(wr_log.size() == 2, $sformatf("%0d DRP writes, expected 2", wr_log.size()));
    if (wr_log.size() == 2) begin
      check(wr_dcm[0] == 0 && wr_log[0] == {8'd19, 8'd23}, $sformatf("DCM-A gets %h", wr_log[0]));
      check(wr_dcm[1] == 1 && wr_log[1] == {8'd20, 8'd23}, $sformatf("DCM-B gets %h", wr_log[1]));
    end
    // Request edge to done: per DCM 4 cycles plus the 1-cycle DRDY, x 2;
    // RST_HOLD; the modelled DCM-B locks LOCK_DLY + 3 cycles after it sees
    // the release; 2 synchroniser stages; 2 cycles from the DUT's done
    // register to this loop's count.
    check(cycles == 2 * 5 + RST_HOLD + LOCK_DLY + 3 + 2 + 2,
          $sformatf("retune took %0d cycles, expected %0d", cycles, 2 * 5 + RST_HOLD + LOCK_DLY + 3 + 2 + 2));
    @(negedge clk);
    check(!busy && !done, "back to idle, done was a single pulse");
    repeat (5) @(negedge clk);
    check(wr_log.size() == 2, "request while busy was ignored");

    wr_log.delete(); wr_dcm.delete();
    retune(15, 11, 16, 22, cycles);
    check(wr_log.size() == 2 && wr_log[0] == {8'd14, 8'd10} && wr_log[1] == {8'd15, 8'd21},
          "second retune writes the new entries");

    // A DCM that never locks: err after the timeout.
    never_lock = 1;
    @(negedge clk); drp_req = 1'b1;
    @(negedge clk); drp_req = 1'b0;
    cycles = 0;
    while (busy && cycles < 2000) begin @(negedge clk); cycles++; end
    check(err && !busy, "lock timeout reported");
    check(cycles > TIMEOUT && cycles < TIMEOUT + 40, $sformatf("timeout after %0d cycles", cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd20000 * 10000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
