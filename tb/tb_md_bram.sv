// tb_md_bram: self-checking test of the (M, D) table memory.
//
// Reads all 32 words in random order and compares them with the tuning
// table written out independently below: 23 (M, D) pairs packed as
// {M, D}, zero beyond them. Also checks the one-cycle read latency and that
// dout holds while en is low.
module tb_md_bram;
  import trng_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 1'b0, en = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [DATA_W-1:0] dout;
  int checks = 0, failures = 0;

  always #5000 clk = ~clk;

  md_bram dut (.clk(clk), .en(en), .addr(addr), .dout(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // M and D of the 23 stored settings.
  int mtab[23] = '{15, 21, 15, 20, 16, 17, 16, 19, 19, 22, 23, 19, 24, 21, 23, 20, 21, 22, 20, 20, 20, 20, 21};
  int dtab[23] = '{11, 21, 21, 22, 22, 22, 23, 23, 23, 23, 23, 24, 24, 24, 24, 24, 24, 24, 24, 24, 24, 24, 24};

  function automatic logic [15:0] expected(int a);
    if (a < 23) return {8'(mtab[a]), 8'(dtab[a])};
    return 16'h0000;
  endfunction

  int order[32];
  initial begin
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (order[i]) begin
      @(negedge clk);
      en = 1'b1; addr = ADDR_W'(order[i]);
      @(posedge clk); #1;
      check(dout == expected(order[i]), $sformatf("word %0d = %h, expected %h", order[i], dout, expected(order[i])));
    end
    // Hold while disabled.
    @(negedge clk); en = 1'b0; addr = 5'd0;
    @(posedge clk); #1;
    check(dout == expected(order[31]), "dout holds while en is low");
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
