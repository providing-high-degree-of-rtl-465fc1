// tb_tunable_bfd_trng: end-to-end test of the tunable BFD-TRNG at its
// default parameters.
//
// Drives the reference and control clocks, then:
//  1. waits for both DCMs to lock at the default settings (20/24, 21/24) and
//     checks that the mean counter maximum equals the beat ratio
//     TA / (TA - TB) computed from the two nominal periods;
//  2. checks every output word against the low-order bits of the counts
//     seen at the counter output, for nbits = 1, 2 and 3;
//  3. retunes through the DRP path (load indices, request, done) to a
//     wider frequency gap and checks the new mean count;
//  4. steps the table indices and retunes again;
//  5. refuses an out-of-range index (cfg_err);
//  6. drops EN during a retune so the DCMs cannot lock (drp_err), then
//     recovers.
// Each mechanism is counted; one that never happened is a failure.
module tb_tunable_bfd_trng;
  import trng_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TIN = 20000;

  logic clk_in = 1'b0, sys_clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic drp_req = 1'b0, busy, done, drp_err;
  logic cfg_load = 1'b0, cfg_step = 1'b0, cfg_err;
  logic [ADDR_W-1:0] cfg_idx_a = '0, cfg_idx_b = '0, idx_a, idx_b;
  logic locked_a, locked_b, rng_clk, beat;
  logic [1:0] nbits = 2'd1;
  logic [11:0] count_max;
  logic count_valid;
  logic [31:0] rnd_word;
  logic rnd_valid;
  int checks = 0, failures = 0;

  always #(TIN / 2) clk_in = ~clk_in;
  always #5000 sys_clk = ~sys_clk;

  tunable_bfd_trng dut (
    .clk_in(clk_in), .sys_clk(sys_clk), .rst(rst), .en(en),
    .drp_req(drp_req), .busy(busy), .done(done), .drp_err(drp_err),
    .cfg_load(cfg_load), .cfg_idx_a(cfg_idx_a), .cfg_idx_b(cfg_idx_b),
    .cfg_step(cfg_step), .cfg_err(cfg_err), .idx_a(idx_a), .idx_b(idx_b),
    .locked_a(locked_a), .locked_b(locked_b),
    .rng_clk(rng_clk), .nbits(nbits), .beat(beat),
    .count_max(count_max), .count_valid(count_valid),
    .rnd_word(rnd_word), .rnd_valid(rnd_valid)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Independent copy of the table entries used here: {M, D}.
  function automatic int m_of(int i);
    int m[23] = '{15, 21, 15, 20, 16, 17, 16, 19, 19, 22, 23, 19, 24, 21, 23, 20, 21, 22, 20, 20, 20, 20, 21};
    return m[i];
  endfunction
  function automatic int d_of(int i);
    int d[23] = '{11, 21, 21, 22, 22, 22, 23, 23, 23, 23, 23, 24, 24, 24, 24, 24, 24, 24, 24, 24, 24, 24, 24};
    return d[i];
  endfunction
  // Expected mean count: periods of B per beat, TA / |TA - TB| with the
  // model's rounding of half periods to whole picoseconds.
  function automatic real beat_ratio(int ia, int ib);
    real ta, tb;
    ta = 2.0 * ((TIN * d_of(ia)) / (2 * m_of(ia)));
    tb = 2.0 * ((TIN * d_of(ib)) / (2 * m_of(ib)));
    return ta / ((ta > tb) ? (ta - tb) : (tb - ta));
  endfunction

  // ---------------- random-side monitor ----------------
  bit    bitq[$];
  int    n_counts = 0, n_words = 0, n_word_err = 0;
  longint sum_counts = 0;
  int    cmin = 4096, cmax = 0;
  int    words_at_nbits[4];

  // The clock-B logic's reset (internal) marks outputs not yet valid.
  always @(posedge rng_clk) begin
    if (dut.rst_b) bitq.delete();
    else if (count_valid) begin
      int n;
      n_counts++;
      sum_counts += longint'(count_max);
      if (int'(count_max) < cmin) cmin = int'(count_max);
      if (int'(count_max) > cmax) cmax = int'(count_max);
      n = (nbits == 0) ? 1 : int'(nbits);
      for (int i = n - 1; i >= 0; i--) bitq.push_back(count_max[i]);
    end
    if (!dut.rst_b && rnd_valid) begin
      logic [31:0] e;
      n_words++;
      words_at_nbits[nbits]++;
      // The word left the packer one cycle after its last count, so the
      // newest count's bits, just queued above, are not part of it.
      for (int i = 31; i >= 0; i--) e[i] = bitq[31 - i];
      if (rnd_word != e) n_word_err++;
      for (int i = 0; i < 32; i++) void'(bitq.pop_front());
    end
  end

  // Clear the statistics (between phases, with the random side quiet).
  task automatic clear_stats();
    n_counts = 0; sum_counts = 0; cmin = 4096; cmax = 0;
  endtask

  task automatic collect(input int n);
    int t;
    t = 0;
    while (n_counts < n && t < 2000000) begin @(posedge sys_clk); t++; end
    check(n_counts >= n, $sformatf("%0d counts collected, wanted %0d", n_counts, n));
  endtask

  task automatic check_mean(input int ia, input int ib, input string what);
    real mean, exp_m;
    mean  = real'(sum_counts) / real'(n_counts);
    exp_m = beat_ratio(ia, ib);
    check(mean > exp_m * 0.9 && mean < exp_m * 1.1,
          $sformatf("%s: mean count %f, expected %f", what, mean, exp_m));
    check(cmax > cmin, $sformatf("%s: counts vary (%0d..%0d)", what, cmin, cmax));
  endtask

  task automatic retune(output bit ok);
    int t;
    @(negedge sys_clk); drp_req = 1'b1;
    @(negedge sys_clk); drp_req = 1'b0;
    t = 0;
    while (!done && !drp_err && t < 20000) begin @(negedge sys_clk); t++; end
    ok = done;
    // The clock-B side was reset with the DCMs: partial words are dropped.
    bitq.delete();
  endtask

  task automatic load(input int a, input int b);
    @(negedge sys_clk); cfg_load = 1'b1; cfg_idx_a = 5'(a); cfg_idx_b = 5'(b);
    @(negedge sys_clk); cfg_load = 1'b0;
  endtask

  int n_retune = 0, n_cfg_err = 0, n_step = 0, n_drp_err = 0, n_en_off = 0;
  bit ok;

  initial begin
    repeat (4) @(negedge sys_clk);
    rst = 1'b0;
    en  = 1'b1;
    wait (locked_a && locked_b);

    // 1-2. default setting, nbits = 1, 2, 3.
    for (int nb = 1; nb <= 3; nb++) begin
      @(negedge rng_clk);
      nbits = 2'(nb);
      clear_stats();
      collect(400);
      check_mean(18, 22, $sformatf("default setting, nbits %0d", nb));
    end
    check(words_at_nbits[1] > 0 && words_at_nbits[2] > 0 && words_at_nbits[3] > 0,
          "words produced at every nbits");

    // 3. retune to A = entry 15 (20/24), B = entry 17 (22/24).
    nbits = 2'd1;
    load(15, 17);
    check(!cfg_err && idx_a == 15 && idx_b == 17, "indices loaded");
    retune(ok);
    check(ok, "retune 1 done");
    if (ok) n_retune++;
    clear_stats();
    collect(300);
    check_mean(15, 17, "retuned 20/24 vs 22/24");

    // 4. step both indices: A = 16 (21/24), B = 18 (20/24).
    @(negedge sys_clk); cfg_step = 1'b1;
    @(negedge sys_clk); cfg_step = 1'b0;
    check(idx_a == 16 && idx_b == 18, "indices stepped");
    if (idx_a == 16) n_step++;
    retune(ok);
    check(ok, "retune 2 done");
    if (ok) n_retune++;
    clear_stats();
    collect(300);
    check_mean(16, 18, "stepped 21/24 vs 20/24");

    // 5. out-of-range index.
    load(23, 2);
    @(posedge sys_clk);
    if (cfg_err) n_cfg_err++;
    @(negedge sys_clk);
    check(idx_a == 16 && idx_b == 18, "refused load leaves indices");

    // 6. retune with EN low: DCMs held in reset, lock times out.
    en = 1'b0;
    repeat (3) @(negedge sys_clk);
    check(!locked_a && !locked_b, "EN low stops the DCMs");
    if (!locked_a) n_en_off++;
    clear_stats();
    retune(ok);
    check(!ok && drp_err, "lock timeout reported as drp_err");
    if (drp_err) n_drp_err++;
    check(n_counts == 0, "no counts while the DCMs are stopped");
    en = 1'b1;
    load(18, 22);
    retune(ok);
    check(ok && !drp_err, "recovery retune done");
    if (ok) n_retune++;
    clear_stats();
    collect(100);
    check_mean(18, 22, "back to the default setting");

    check(n_word_err == 0, $sformatf("%0d of %0d words differ from the count bits", n_word_err, n_words));
    check(n_words > 50, $sformatf("%0d words", n_words));
    check(n_retune == 3, $sformatf("%0d retunes", n_retune));
    check(n_step == 1, "step mode used");
    check(n_cfg_err == 1, "cfg_err seen");
    check(n_drp_err == 1, "drp_err seen");
    check(n_en_off == 1, "EN off seen");
    $display("mechanisms: words=%0d retunes=%0d steps=%0d cfg_err=%0d drp_err=%0d en_off=%0d",
             n_words, n_retune, n_step, n_cfg_err, n_drp_err, n_en_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd20000000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
