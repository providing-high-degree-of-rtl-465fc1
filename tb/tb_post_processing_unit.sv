// tb_post_processing_unit: self-checking test of the bit packer.
//
// Random counts arrive with random gaps and a random bit count per input
// (including 0, which means 1). A bit-queue reference keeps the same bits
// in arrival order; every output word must equal the oldest 32 queued
// bits, appear one cycle after the input that completed it, and no bits
// may be left over beyond what the queue predicts.
module tb_post_processing_unit;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CW = 12, MB = 3, OW = 32;

  logic clk = 1'b0, rst = 1'b1;
  logic [CW-1:0] count_max = '0;
  logic count_valid = 1'b0;
  logic [1:0] nbits = 2'd1;
  logic [OW-1:0] rnd_word;
  logic rnd_valid;
  int checks = 0, failures = 0;

  always #5000 clk = ~clk;

  post_processing_unit #(.COUNT_W(CW), .MAX_BITS(MB), .OUT_W(OW)) dut (
    .clk(clk), .rst(rst), .count_max(count_max), .count_valid(count_valid),
    .nbits(nbits), .rnd_word(rnd_word), .rnd_valid(rnd_valid)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit bitq[$];
  int words = 0;
  bit due = 0, pending = 0;
  logic [OW-1:0] exp_word, exp_pending;

  // `due` / `exp_word` describe the input presented now; the word is
  // expected on the clock edge after the one that consumes it.
  always @(posedge clk) begin
    if (!rst) begin
      check(rnd_valid == pending, $sformatf("rnd_valid %0d, expected %0d", rnd_valid, pending));
      if (rnd_valid) begin
        words++;
        check(rnd_word == exp_pending, $sformatf("word %h, expected %h", rnd_word, exp_pending));
      end
      pending     = due;
      exp_pending = exp_word;
    end
  end

  int n;
  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      due = 0;
      if ($urandom_range(3, 0) != 0) begin
        count_max = CW'($urandom);
        nbits = 2'($urandom_range(3, 0));
        count_valid = 1'b1;
        n = (nbits == 0) ? 1 : int'(nbits);
        for (int i = n - 1; i >= 0; i--) bitq.push_back(count_max[i]);
        if (bitq.size() >= OW) begin
          due = 1;
          for (int i = OW - 1; i >= 0; i--) exp_word[i] = bitq.pop_front();
        end
      end else begin
        count_valid = 1'b0;
      end
    end
    @(negedge clk) begin count_valid = 1'b0; due = 0; end
    repeat (2) @(negedge clk);
    check(words > 50, $sformatf("%0d words produced", words));
    check(bitq.size() < OW, "leftover bits below one word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10000 * 5000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
