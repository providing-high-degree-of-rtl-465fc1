// tb_dcm_model: self-checking test of the DCM behavioural model.
//
// Checks the lock delay after reset, the mean CLKFX period against
// CLKIN_PERIOD_PS * D / M, that the jitter is present but bounded, the DRP
// write / read-back with its one-cycle DRDY, that a new (M, D) takes effect
// after a reset, and that an out-of-range setting never locks.
module tb_dcm_model;
  import trng_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TIN  = 20000;
  localparam int unsigned JIT  = 50;
  localparam int unsigned LOCK = 16;

  logic clkin = 1'b0, dclk = 1'b0, rst = 1'b1;
  logic clkfx, locked, den = 1'b0, dwe = 1'b0, drdy;
  logic [DRP_ADDR_W-1:0] daddr = '0;
  logic [DATA_W-1:0] di = '0, dout;
  int checks = 0, failures = 0;

  always #(TIN / 2) clkin = ~clkin;
  always #5000 dclk = ~dclk;

  dcm_model #(
    .CLKFX_MULTIPLY(20), .CLKFX_DIVIDE(24), .CLKIN_PERIOD_PS(TIN),
    .JITTER_PS(JIT), .LOCK_CYCLES(LOCK)
  ) dut (
    .CLKIN(clkin), .RST(rst), .CLKFX(clkfx), .LOCKED(locked),
    .DCLK(dclk), .DEN(den), .DWE(dwe), .DADDR(daddr), .DI(di), .DO(dout), .DRDY(drdy)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mean and spread of n CLKFX periods.
  task automatic measure(input int n, output longint mean, output longint pmin, output longint pmax);
    longint t0, t1, p;
    @(posedge clkfx);
    t0 = $time;
    pmin = 64'h7fffffff; pmax = 0;
    for (int i = 0; i < n; i++) begin
      t1 = $time;
      @(posedge clkfx);
      p = $time - t1;
      if (p < pmin) pmin = p;
      if (p > pmax) pmax = p;
    end
    mean = ($time - t0) / n;
  endtask

  task automatic drp(input bit we, input logic [15:0] data, output logic [15:0] rd, output int lat);
    @(negedge dclk);
    den = 1'b1; dwe = we; daddr = DRP_MD_ADDR; di = data;
    @(negedge dclk);
    den = 1'b0; dwe = 1'b0;
    lat = 1;
    while (!drdy && lat < 10) begin @(negedge dclk); lat++; end
    rd = dout;
  endtask

  task automatic reset_dcm();
    @(negedge clkin); rst = 1'b1;
    repeat (3) @(negedge clkin);
    rst = 1'b0;
  endtask

  longint mean, pmin, pmax, nominal;
  logic [15:0] rd;
  int lat, n;

  initial begin
    // Lock delay.
    repeat (4) @(negedge clkin);
    check(!locked && !clkfx, "outputs idle in reset");
    rst = 1'b0;
    n = 0;
    while (!locked && n < 100) begin @(posedge clkin); #1; n++; end
    check(n == LOCK, $sformatf("lock after %0d CLKIN edges, expected %0d", n, LOCK));

    // Period and jitter at M/D = 20/24.
    nominal = longint'(TIN) * 24 / 20;
    measure(400, mean, pmin, pmax);
    check(mean > nominal - 10 && mean < nominal + 10,
          $sformatf("mean period %0d, expected %0d", mean, nominal));
    check(pmax > pmin, "jitter present");
    check(pmin >= nominal - 2 * JIT && pmax <= nominal + 2 * JIT,
          $sformatf("period range %0d..%0d within +-%0d", pmin, pmax, 2 * JIT));

    // DRP read of the power-up setting, then write M = 21, D = 24.
    drp(1'b0, 16'h0, rd, lat);
    check(rd == {8'd19, 8'd23}, $sformatf("read back %h", rd));
    check(lat == 1, $sformatf("DRDY latency %0d", lat));
    @(negedge clkin); rst = 1'b1;
    drp(1'b1, {8'd20, 8'd23}, rd, lat);
    check(lat == 1, "DRDY after write");
    drp(1'b0, 16'h0, rd, lat);
    check(rd == {8'd20, 8'd23}, $sformatf("read back after write %h", rd));
    repeat (3) @(negedge clkin);
    rst = 1'b0;
    wait (locked);
    nominal = longint'(TIN) * 24 / 21;
    measure(400, mean, pmin, pmax);
    check(mean > nominal - 10 && mean < nominal + 10,
          $sformatf("retuned mean period %0d, expected %0d", mean, nominal));

    // An unsafe setting (M = 0) must not lock.
    @(negedge clkin); rst = 1'b1;
    drp(1'b1, {8'hFF, 8'd23}, rd, lat);
    reset_dcm();
    repeat (100) @(posedge clkin);
    check(!locked, "out-of-range M does not lock");
    check(!clkfx, "no CLKFX while unlocked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(TIN) * 5000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
