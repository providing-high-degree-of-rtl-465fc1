// tb_beat_counter: self-checking test of the beat-interval counter.
//
// The testbench drives `beat` with rising edges a known number of clk_b
// cycles apart and checks that each interval after the first is reported
// exactly once on count_max, one cycle after the rise, that the first
// interval is suppressed, that the running count restarts, and that a
// too-long interval saturates.
module tb_beat_counter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 12;

  logic clk = 1'b0, rst = 1'b1, beat = 1'b0;
  logic [W-1:0] count, count_max;
  logic count_valid;
  int checks = 0, failures = 0;

  always #5000 clk = ~clk;

  beat_counter #(.COUNT_W(W)) dut (
    .clk_b(clk), .rst(rst), .beat(beat),
    .count(count), .count_max(count_max), .count_valid(count_valid)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected values, in order of the rises that produce them.
  int exp_q[$];
  int n_valid = 0;
  int cyc = 0, last_rise_cyc = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && count_valid) begin
      n_valid++;
      if (exp_q.size() == 0) check(1'b0, "unexpected count_valid");
      else begin
        int e;
        e = exp_q.pop_front();
        check(32'(count_max) == e, $sformatf("count_max %0d, expected %0d", count_max, e));
        check(cyc == last_rise_cyc + 1, "count_valid one cycle after the rise");
      end
    end
  end

  // Beat with a rise every `len` cycles, high for half of it.
  task automatic interval(input int len, input bit expect_out);
    @(negedge clk);
    beat = 1'b1;
    if (expect_out) exp_q.push_back(len > (2 ** W - 1) ? 2 ** W - 1 : len);
    @(posedge clk);
    last_rise_cyc = cyc;
    for (int i = 1; i < len; i++) begin
      @(negedge clk);
      beat = (i < len / 2);
    end
  endtask

  int lens[] = '{20, 21, 19, 25, 3, 2, 100, 7, 4095};
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (5) @(negedge clk);
    // The first rise only starts the measurement: no output before the
    // second rise, which reports the first interval.
    @(posedge clk);
    check(!count_valid, "no output before the first interval ends");
    for (int i = 0; i < lens.size(); i++) interval(lens[i], 1'b1);
    interval(5000, 1'b1);      // saturates
    interval(10, 1'b1);
    @(negedge clk); beat = 1'b1;   // final rise closes the last interval
    @(posedge clk); last_rise_cyc = cyc;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d intervals never reported", exp_q.size()));
    check(n_valid == lens.size() + 2, $sformatf("%0d outputs", n_valid));
    check(count == 2, $sformatf("running count restarts, %0d", count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10000 * 20000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
