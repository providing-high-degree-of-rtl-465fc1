// tb_beat_dff: self-checking test of the beat flip-flop.
//
// Two jitter-free clocks 5 % apart drive the flip-flop. On every clk_b
// edge the testbench records clk_a and compares it with Q one step later;
// it also counts the rising edges of Q and compares them with the beat
// frequency |fA - fB| over the run, and checks the asynchronous reset.
module tb_beat_dff;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int TA = 12000;   // clock A period, ps
  localparam int TB = 11430;   // clock B period, ps
  localparam int NB = 4000;    // clk_b cycles observed

  logic clk_a = 1'b0, clk_b = 1'b0, rst = 1'b1, q;
  int checks = 0, failures = 0;

  initial begin #1; forever #(TA / 2) clk_a = ~clk_a; end
  always #(TB / 2) clk_b = ~clk_b;

  beat_dff dut (.clk_b(clk_b), .rst(rst), .clk_a(clk_a), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic exp_q, q_prev;
  int rises, mism, expected;

  initial begin
    repeat (3) @(posedge clk_b);
    #1 check(q == 1'b0, "reset clears Q");
    @(negedge clk_b) rst = 1'b0;
    mism = 0; rises = 0; q_prev = q;
    for (int i = 0; i < NB; i++) begin
      @(posedge clk_b);
      exp_q = clk_a;
      #1;
      if (q !== exp_q) mism++;
      if (q && !q_prev) rises++;
      q_prev = q;
    end
    check(mism == 0, $sformatf("%0d samples differ from clk_a", mism));
    // Beats in NB periods of B: NB * TB * |1/TB - 1/TA| = NB * (TA - TB) / TA.
    expected = NB * (TA - TB) / TA;
    check(rises >= expected - 1 && rises <= expected + 1,
          $sformatf("%0d beat edges, expected %0d", rises, expected));
    rst = 1'b1;
    #1 check(q == 1'b0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(TB) * (NB + 1000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
