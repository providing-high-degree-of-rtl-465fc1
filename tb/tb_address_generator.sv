// tb_address_generator: self-checking test of the tuning-table address
// generator: reset values, loads, refusal of out-of-range indices, stepping
// with wrap-around at the table end and the phase multiplexer.
module tb_address_generator;
  import trng_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 1'b0, rst = 1'b1, cfg_load = 1'b0, cfg_step = 1'b0, cfg_err;
  logic [ADDR_W-1:0] cfg_idx_a = '0, cfg_idx_b = '0, addr, idx_a, idx_b;
  dcm_sel_e phase = DCM_A;
  int checks = 0, failures = 0;

  always #5000 clk = ~clk;

  address_generator #(.NUM_ENTRIES(23), .INIT_A(5'd18), .INIT_B(5'd22)) dut (
    .clk(clk), .rst(rst), .cfg_load(cfg_load), .cfg_idx_a(cfg_idx_a),
    .cfg_idx_b(cfg_idx_b), .cfg_step(cfg_step), .phase(phase), .addr(addr),
    .idx_a(idx_a), .idx_b(idx_b), .cfg_err(cfg_err)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_addr(input int a, input int b);
    phase = DCM_A; #1;
    check(int'(addr) == a, $sformatf("A address %0d, expected %0d", addr, a));
    phase = DCM_B; #1;
    check(int'(addr) == b, $sformatf("B address %0d, expected %0d", addr, b));
  endtask

  task automatic pulse_load(input int a, input int b);
    @(negedge clk); cfg_load = 1'b1; cfg_idx_a = 5'(a); cfg_idx_b = 5'(b);
    @(negedge clk); cfg_load = 1'b0;
  endtask

  int ea, eb;
  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    expect_addr(18, 22);
    pulse_load(3, 7);
    check(!cfg_err, "legal load accepted");
    expect_addr(3, 7);
    pulse_load(23, 1);
    check(cfg_err, "index 23 refused");
    expect_addr(3, 7);
    pulse_load(0, 31);
    check(cfg_err, "index 31 refused");
    pulse_load(20, 22);
    ea = 20; eb = 22;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk); cfg_step = 1'b1;
      @(negedge clk); cfg_step = 1'b0;
      ea = (ea + 1) % 23; eb = (eb + 1) % 23;
      expect_addr(ea, eb);
    end
    check(int'(idx_a) == ea && int'(idx_b) == eb, "index outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd1000 * 10000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
