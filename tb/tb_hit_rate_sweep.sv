// tb_hit_rate_sweep: hit-rate and error sweep over random operands.
//
// Reproduces the random-number evaluation of the two multipliers: a long
// stream of products of random single precision numbers (uniform fractions,
// moderate exponents) is run through both units of the top level for each
// tuning setting, and the testbench reports, per setting, the hit rate (share
// of products delivered by an approximate path) and the mean and largest
// relative error against the exact product.
//   RMAC: N = 0 (no tuning), 1, 2, 3, 4, 6, 8 tuning bits.
//   CFPU: no bound (N = 0, one-stage), then error bounds 2^-N for
//         N = 3 .. 7, one-stage and two-stage.
// For the untuned settings of both units the distribution of the relative
// error is printed as a histogram in 1% bins.
// Checks: every RMAC result is within 1/9 (11.1%) of the exact product; every
// CFPU result is within its bound 2^-N (plus one unit of truncation); the
// RMAC hit rate grows with N from N = 1 on and is 100% at N = 0; the
// two-stage CFPU hits at least as often as the one-stage CFPU at the same
// bound; with tuning off the largest RMAC error approaches 11.1% while the
// largest CFPU error exceeds 45% and is over four times the RMAC's.
module tb_hit_rate_sweep;
  import fp_ref_pkg::*;
  import fp_pkg::*;

  localparam int OPS = 1000000;        // products per setting

  logic clk = 0, rst_n = 0;
  logic [4:0]  rmac_tune_n = 0, cfpu_tune_n = 0;
  logic        cfpu_two_stage = 0;
  logic        rmac_in_valid = 0, cfpu_in_valid = 0, rmac_in_ready, cfpu_in_ready;
  logic [31:0] rmac_a = 0, rmac_b = 0, cfpu_a = 0, cfpu_b = 0, rmac_y, cfpu_y;
  logic        rmac_out_valid, cfpu_out_valid;
  res_path_e   rmac_out_path, cfpu_out_path;

  int checks = 0, failures = 0;

  approx_fpmul_top dut (.*);

  always #5 clk = ~clk;

  // operands of the products in flight, oldest first
  logic [31:0] rqa[$], rqb[$], cqa[$], cqb[$];
  int  r_ops, r_hit, c_ops, c_hit;
  real r_sum, r_max, c_sum, c_max, c_bound;
  int  r_hist[51], c_hist[51];    // relative error in 1% bins, last bin 50% and up

  always @(posedge clk) if (rst_n) begin
    if (rmac_in_valid && rmac_in_ready) begin rqa.push_back(rmac_a); rqb.push_back(rmac_b); end
    if (cfpu_in_valid && cfpu_in_ready) begin cqa.push_back(cfpu_a); cqb.push_back(cfpu_b); end
    if (rmac_out_valid) begin
      real ex, e;
      ex = f2r(rqa.pop_front()) * f2r(rqb.pop_front());
      e  = rel_err(f2r(rmac_y), ex);
      r_ops++; r_sum += e; if (e > r_max) r_max = e;
      r_hist[(e >= 0.5) ? 50 : int'($floor(e * 100.0))]++;
      if (rmac_out_path != PATH_EXACT) r_hit++;
      if (e > 1.0 / 9.0 + 1e-9) begin failures++; $display("FAIL: RMAC error %f", e); end
    end
    if (cfpu_out_valid) begin
      real ex, e;
      ex = f2r(cqa.pop_front()) * f2r(cqb.pop_front());
      e  = rel_err(f2r(cfpu_y), ex);
      c_ops++; c_sum += e; if (e > c_max) c_max = e;
      c_hist[(e >= 0.5) ? 50 : int'($floor(e * 100.0))]++;
      if (cfpu_out_path != PATH_EXACT) c_hit++;
      if (c_bound > 0.0 && e >= c_bound + pow2(-22)) begin failures++; $display("FAIL: CFPU error %f", e); end
    end
  end

  task automatic run_rmac(int n, output real hit, output real emax);
    r_ops = 0; r_hit = 0; r_sum = 0.0; r_max = 0.0;
    foreach (r_hist[i]) r_hist[i] = 0;
    @(negedge clk); rmac_tune_n = 5'(n);
    for (int i = 0; i < OPS; i++) begin
      @(negedge clk);
      rmac_in_valid = 1; rmac_a = rand_fp(112, 142); rmac_b = rand_fp(112, 142);
      @(posedge clk);
      while (!rmac_in_ready) @(posedge clk);
    end
    @(negedge clk); rmac_in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (r_ops != OPS) begin failures++; $display("FAIL: RMAC lost results"); end
    hit = 100.0 * r_hit / r_ops; emax = 100.0 * r_max;
    if (n == 0) begin
      $display("RMAC N=0 error histogram (1%% bins, share of products):");
      foreach (r_hist[i]) if (r_hist[i] > 0)
        $display("  RMAC %2d-%2d%%: %6.2f%%", i, i + 1, 100.0 * r_hist[i] / r_ops);
    end
    $display("RMAC N=%0d: hit rate %5.1f%%, mean error %6.3f%%, max error %6.3f%%",
             n, hit, 100.0 * r_sum / r_ops, emax);
  endtask

  task automatic run_cfpu(int n, bit two, output real hit, output real emax);
    c_ops = 0; c_hit = 0; c_sum = 0.0; c_max = 0.0;
    c_bound = (n == 0) ? 0.0 : pow2(-n);
    foreach (c_hist[i]) c_hist[i] = 0;
    @(negedge clk); cfpu_tune_n = 5'(n); cfpu_two_stage = two;
    for (int i = 0; i < OPS; i++) begin
      @(negedge clk);
      cfpu_in_valid = 1; cfpu_a = rand_fp(112, 142); cfpu_b = rand_fp(112, 142);
      @(posedge clk);
      while (!cfpu_in_ready) @(posedge clk);
    end
    @(negedge clk); cfpu_in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (c_ops != OPS) begin failures++; $display("FAIL: CFPU lost results"); end
    hit = 100.0 * c_hit / c_ops;
    if (n == 0) begin
      $display("CFPU N=0 error histogram (1%% bins, share of products):");
      foreach (c_hist[i]) if (c_hist[i] > 0)
        $display("  CFPU %2d-%2d%%: %6.2f%%", i, i + 1, 100.0 * c_hist[i] / c_ops);
    end
    emax = 100.0 * c_max;
    $display("CFPU %s N=%0d (bound %5.2f%%): hit rate %5.1f%%, mean error %6.3f%%, max error %6.3f%%",
             two ? "two-stage" : "one-stage", n, 100.0 * c_bound, hit,
             100.0 * c_sum / c_ops, 100.0 * c_max);
  endtask

  initial begin
    int  rn[7];
    real rh[7], rm[7], h1, h2, m1, m2, cm0;
    rn = '{0, 1, 2, 3, 4, 6, 8};
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin
        foreach (rn[k]) run_rmac(rn[k], rh[k], rm[k]);
      end
      begin
        run_cfpu(0, 0, h1, cm0);
        for (int n = 3; n <= 7; n++) begin
          run_cfpu(n, 0, h1, m1);
          run_cfpu(n, 1, h2, m2);
          checks++;
          if (h2 < h1) begin failures++; $display("FAIL: two-stage below one-stage at N=%0d", n); end
        end
      end
    join
    checks++;
    if (rh[0] != 100.0) begin failures++; $display("FAIL: untuned RMAC not always approximate"); end
    for (int k = 2; k < 7; k++) begin
      checks++;
      if (rh[k] < rh[k-1]) begin failures++; $display("FAIL: RMAC hit rate falls at N=%0d", rn[k]); end
    end
    // untuned: discarding errs up to ~50%, mantissa addition only up to 11.1%
    checks++;
    if (cm0 < 45.0 || cm0 < 4.0 * rm[0]) begin
      failures++; $display("FAIL: untuned CFPU max error %f", cm0);
    end
    checks++;
    if (rm[0] < 10.5) begin failures++; $display("FAIL: untuned RMAC max error %f", rm[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
