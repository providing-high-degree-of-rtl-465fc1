// tb_tuning_sweep: runs the TRNG at its default parameters over four pairs
// of table settings, from a wide frequency gap to the closest pair the
// table offers, retuning through the DRP path between them.
//
// For each pair it collects counter maxima and prints the mean count and
// its relative standard deviation. Where the per-cycle phase drift is much
// larger than the jitter, the mean must match TA / |TA - TB| from the
// nominal periods (the model rounds half periods to whole picoseconds). As
// the gap shrinks the jitter accumulated over one interval grows, so the
// standard deviation of the count must grow from each pair to the next:
// this is the tuning knob of the design, trading count rate for
// randomness.
module tb_tuning_sweep;
  import trng_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TIN = 20000;   // the top's default reference period
  localparam int unsigned NP  = 4;

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

  // (M, D) of the table entries used, written out independently.
  // Pairs: entries (2, 18) 15/21 vs 20/24; (18, 22) 20/24 vs 21/24;
  // (3, 17) 20/22 vs 22/24; (9, 14) 22/23 vs 23/24.
  int pa[NP] = '{2, 18, 3, 9};
  int pb[NP] = '{18, 22, 17, 14};
  int ma[NP] = '{15, 20, 20, 22};
  int da[NP] = '{21, 24, 22, 23};
  int mb[NP] = '{20, 21, 22, 23};
  int db[NP] = '{24, 24, 24, 24};
  int ncount[NP] = '{400, 300, 100, 40};
  bit mean_checked[NP] = '{1, 1, 1, 0};

  int     n = 0;
  real    s1 = 0.0, s2 = 0.0;
  bit     collecting = 0;
  always @(posedge rng_clk) begin
    if (collecting && count_valid) begin
      n++;
      s1 += real'(count_max);
      s2 += real'(count_max) * real'(count_max);
    end
  end

  real ta, tb_p, exp_m, mean, sd, prev_sd;
  int t;
  initial begin
    repeat (4) @(negedge sys_clk);
    rst = 1'b0;
    en  = 1'b1;
    prev_sd = -1.0;
    for (int k = 0; k < NP; k++) begin
      @(negedge sys_clk); cfg_load = 1'b1; cfg_idx_a = 5'(pa[k]); cfg_idx_b = 5'(pb[k]);
      @(negedge sys_clk); cfg_load = 1'b0;
      @(negedge sys_clk); drp_req = 1'b1;
      @(negedge sys_clk); drp_req = 1'b0;
      t = 0;
      while (!done && !drp_err && t < 20000) begin @(negedge sys_clk); t++; end
      check(done, $sformatf("retune to entries %0d/%0d", pa[k], pb[k]));
      // Skip the first counts after the restart.
      repeat (400) @(negedge sys_clk);
      n = 0; s1 = 0.0; s2 = 0.0;
      collecting = 1;
      t = 0;
      while (n < ncount[k] && t < 50000000) begin @(negedge sys_clk); t++; end
      collecting = 0;
      check(n >= ncount[k], $sformatf("%0d counts collected", n));
      ta    = 2.0 * real'((TIN * da[k]) / (2 * ma[k]));
      tb_p  = 2.0 * real'((TIN * db[k]) / (2 * mb[k]));
      exp_m = ta / ((ta > tb_p) ? ta - tb_p : tb_p - ta);
      mean  = s1 / real'(n);
      sd    = (s2 / real'(n) - mean * mean);
      sd    = (sd > 0.0) ? $sqrt(sd) : 0.0;
      $display("setting A %0d/%0d  B %0d/%0d: nominal count %7.2f  mean %7.2f  rel. std. dev. %5.2f %%",
               ma[k], da[k], mb[k], db[k], exp_m, mean, 100.0 * sd / mean);
      if (mean_checked[k])
        check(mean > exp_m * 0.95 && mean < exp_m * 1.05,
              $sformatf("mean %f, expected %f", mean, exp_m));
      check(sd > prev_sd, $sformatf("spread grows as the gap shrinks (%f after %f)", sd, prev_sd));
      prev_sd = sd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd100000000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
