// tb_approx_fpmul_top: end-to-end test of the top level at its default
// (single precision) parameters.
//
// Both multipliers run at the same time on independent random operation
// streams, each with a valid/ready handshake, random gaps and a tuning
// setting that changes while operations are in flight. Every result is
// checked against the real-number models for value, path tag and latency.
// Each mechanism of the design must occur at least once: RMAC approximate
// hits, RMAC re-runs requested by the tuner, RMAC re-runs for special
// operands, CFPU first-stage and second-stage hits, CFPU exact results with
// and without a second-stage attempt, stalls of both units, and changes of
// the tuning setting and of the CFPU stage mode. At the end the RMAC accuracy
// sweep of the tuning bits is printed: fraction of approximate results (hit
// rate) and the largest relative error for each N.
module tb_approx_fpmul_top;
  import fp_ref_pkg::*;
  import fp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [4:0]  rmac_tune_n = 0, cfpu_tune_n = 0;
  logic        cfpu_two_stage = 0;
  logic        rmac_in_valid = 0, cfpu_in_valid = 0, rmac_in_ready, cfpu_in_ready;
  logic [31:0] rmac_a = 0, rmac_b = 0, cfpu_a = 0, cfpu_b = 0, rmac_y, cfpu_y;
  logic        rmac_out_valid, cfpu_out_valid;
  res_path_e   rmac_out_path, cfpu_out_path;

  int checks = 0, failures = 0, cycle = 0;
  int r_hit = 0, r_tune = 0, r_special = 0, r_stall = 0;
  int c_path[4] = '{0, 0, 0, 0};
  int c_stall = 0, n_tune_change = 0, n_mode_change = 0;
  bit rmac_done = 0, cfpu_done = 0;
  int sweep_ops[24], sweep_hit[24];
  real sweep_err[24];

  approx_fpmul_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [31:0] a, b, exp; int path, lat, t; real ex; int n; } item_t;
  item_t rq[$], cq[$];

  // ---------------------------------------------------------------- RMAC side
  always @(posedge clk) if (rst_n) begin
    if (rmac_in_valid && !rmac_in_ready) r_stall++;
    if (rmac_in_valid && rmac_in_ready) begin
      item_t it;
      bit ok, ne;
      ok = is_normal(rmac_a) && is_normal(rmac_b) && is_normal(r2f(rmac_val(rmac_a, rmac_b)));
      ne = rmac_tune_n != 0 && rmac_run(rmac_a, rmac_b) >= int'(rmac_tune_n);
      it.a = rmac_a; it.b = rmac_b; it.t = cycle; it.n = int'(rmac_tune_n);
      it.path = (!ok || ne) ? 2 : 0;
      it.lat  = (it.path == 2) ? 3 : 1;
      it.exp  = (it.path == 2) ? mul_ref(rmac_a, rmac_b) : r2f(rmac_val(rmac_a, rmac_b));
      it.ex   = f2r(rmac_a) * f2r(rmac_b);
      if (!ok) r_special++; else if (ne) r_tune++; else r_hit++;
      rq.push_back(it);
    end
    if (rmac_out_valid) begin
      item_t it;
      checks++;
      if (rq.size() == 0) begin
        failures++; $display("FAIL: unexpected RMAC result");
      end else begin
        it = rq.pop_front();
        if (rmac_y !== it.exp || cycle != it.t + it.lat || int'(rmac_out_path) != it.path) begin
          failures++;
          $display("FAIL: RMAC %h * %h = %h expected %h", it.a, it.b, rmac_y, it.exp);
        end
        if (is_normal(it.a) && is_normal(it.b) && it.ex != 0.0) begin
          real e;
          e = rel_err(f2r(rmac_y), it.ex);
          sweep_ops[it.n]++;
          if (it.path == 0) sweep_hit[it.n]++;
          if (e > sweep_err[it.n]) sweep_err[it.n] = e;
        end
      end
    end
  end

  // ---------------------------------------------------------------- CFPU side
  always @(posedge clk) if (rst_n) begin
    if (cfpu_in_valid && !cfpu_in_ready) c_stall++;
    if (cfpu_in_valid && cfpu_in_ready) begin
      item_t it;
      bit t2;
      it.a = cfpu_a; it.b = cfpu_b; it.t = cycle;
      cfpu_model(cfpu_a, cfpu_b, int'(cfpu_tune_n), cfpu_two_stage, it.path, t2, it.exp);
      it.lat = (it.path == 0) ? 1 : (it.path == 1) ? 2 : (t2 ? 4 : 3);
      c_path[(it.path == 2 && t2) ? 3 : it.path]++;
      cq.push_back(it);
    end
    if (cfpu_out_valid) begin
      item_t it;
      checks++;
      if (cq.size() == 0) begin
        failures++; $display("FAIL: unexpected CFPU result");
      end else begin
        it = cq.pop_front();
        if (cfpu_y !== it.exp || cycle != it.t + it.lat || int'(cfpu_out_path) != it.path) begin
          failures++;
          $display("FAIL: CFPU %h * %h = %h expected %h", it.a, it.b, cfpu_y, it.exp);
        end
      end
    end
  end

  // ---------------------------------------------------------------- stimulus
  localparam int OPS = 4000;
  int tune_sweep[7] = '{0, 1, 2, 3, 4, 6, 8};

  initial begin : rmac_drive
    logic [4:0] n;
    for (int i = 0; i < OPS; i++) begin
      @(negedge clk);
      rmac_in_valid = ($urandom_range(4) != 0);
      rmac_a = (i % 97 == 0) ? 32'h0 : rand_fp(110, 144);
      rmac_b = rand_fp(110, 144);
      n = 5'(tune_sweep[(i / 200) % 7]);
      if (n != rmac_tune_n) n_tune_change++;
      rmac_tune_n = n;
      @(posedge clk);
      while (rmac_in_valid && !rmac_in_ready) @(posedge clk);
    end
    @(negedge clk); rmac_in_valid = 0;
    rmac_done = 1;
  end

  initial begin : cfpu_drive
    logic ts;
    for (int i = 0; i < OPS; i++) begin
      @(negedge clk);
      cfpu_in_valid = ($urandom_range(4) != 0);
      cfpu_a = (i % 89 == 0) ? 32'hff800000 : rand_fp(110, 144);
      cfpu_b = rand_fp(110, 144);
      if ($urandom_range(1) != 0) cfpu_a[22:0] = cfpu_a[22:0] & ~(23'h7fffff >> $urandom_range(23));
      cfpu_tune_n = 5'(1 + (i / 300) % 8);
      ts = ((i / 500) % 4) != 3;
      if (ts != cfpu_two_stage) n_mode_change++;
      cfpu_two_stage = ts;
      @(posedge clk);
      while (cfpu_in_valid && !cfpu_in_ready) @(posedge clk);
    end
    @(negedge clk); cfpu_in_valid = 0;
    cfpu_done = 1;
  end

  initial begin
    foreach (sweep_ops[i]) begin sweep_ops[i] = 0; sweep_hit[i] = 0; sweep_err[i] = 0.0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (rmac_done && cfpu_done);
    repeat (8) @(negedge clk);
    checks++;
    if (rq.size() != 0 || cq.size() != 0) begin failures++; $display("FAIL: results missing"); end
    $display("RMAC: approximate %0d, tuning re-runs %0d, special re-runs %0d, stall cycles %0d",
             r_hit, r_tune, r_special, r_stall);
    $display("CFPU: stage 1 %0d, stage 2 %0d, exact %0d, exact after stage 2 %0d, stall cycles %0d",
             c_path[0], c_path[1], c_path[2], c_path[3], c_stall);
    $display("tuning changes %0d, CFPU stage mode changes %0d", n_tune_change, n_mode_change);
    foreach (tune_sweep[k]) begin
      int n;
      n = tune_sweep[k];
      if (sweep_ops[n] > 0)
        $display("RMAC N=%0d: hit rate %5.1f%%, max relative error %5.2f%%", n,
                 100.0 * sweep_hit[n] / sweep_ops[n], 100.0 * sweep_err[n]);
    end
    begin
      int seen[12];
      seen = '{r_hit, r_tune, r_special, r_stall, c_path[0], c_path[1],
                       c_path[2], c_path[3], c_stall, n_tune_change, n_mode_change,
                       sweep_ops[0]};
      foreach (seen[k]) begin
        checks++;
        if (seen[k] == 0) begin failures++; $display("FAIL: mechanism %0d never happened", k); end
      end
    end
    // no tuning must reach the 11.1% worst case, N = 1 must stay well below it
    checks++;
    if (sweep_err[0] <= sweep_err[1]) begin failures++; $display("FAIL: N=1 not tighter than no tuning"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
