// tb_rmac: self-checking test of the tunable RMAC multiplier.
//
// A stream of operations with random gaps and a randomly changing number of
// tuning bits N is offered with a valid/ready handshake; an offered operation
// is held until it is accepted. For each accepted operation the testbench
// predicts from the real-number models whether the approximation is kept
// (normal operands and result, and a critical run shorter than N or N = 0),
// and then expects either the mantissa-addition result one cycle after
// acceptance or the exact product three cycles after acceptance, tagged with
// the matching path. The worked example 50 x -25 is run at N = 1 (exact) and
// N = 5 (approximate). Approximate hits, tuning re-runs, special-operand
// re-runs and input stalls must each occur.
module tb_rmac;
  import fp_ref_pkg::*;
  import fp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [4:0] tune_n = 0;
  logic in_valid = 0, in_ready;
  logic [31:0] a = 0, b = 0, y;
  logic out_valid;
  res_path_e out_path;
  int checks = 0, failures = 0, cycle = 0;
  int n_hit = 0, n_tune_rerun = 0, n_special = 0, n_stall = 0;

  rmac dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [31:0] a, b, exp; bit exact; int t; } item_t;
  item_t q[$];

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (in_valid && in_ready) begin
      item_t it;
      bit ok, ne;
      ok = is_normal(a) && is_normal(b) && is_normal(r2f(rmac_val(a, b)));
      ne = tune_n != 0 && rmac_run(a, b) >= int'(tune_n);
      it.a = a; it.b = b; it.t = cycle;
      it.exact = !ok || ne;
      it.exp = it.exact ? mul_ref(a, b) : r2f(rmac_val(a, b));
      if (!ok) n_special++; else if (ne) n_tune_rerun++; else n_hit++;
      q.push_back(it);
    end
    if (out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL: unexpected result %h", y);
      end else begin
        it = q.pop_front();
        if (y !== it.exp || cycle != it.t + (it.exact ? 3 : 1) ||
            out_path != (it.exact ? PATH_EXACT : PATH_APPROX1)) begin
          failures++;
          $display("FAIL: %h * %h = %h expected %h, path %0d exact %0d, latency %0d",
                   it.a, it.b, y, it.exp, out_path, it.exact, cycle - it.t);
        end
      end
    end
  end

  task automatic offer(logic [31:0] x, logic [31:0] z, int n);
    @(negedge clk);
    in_valid = 1; a = x; b = z; tune_n = 5'(n);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    logic [31:0] x, z;
    repeat (3) @(negedge clk);
    rst_n = 1;
    offer(32'h42480000, 32'hc1c80000, 1);       // 50 x -25, exact at N = 1
    offer(32'h42480000, 32'hc1c80000, 5);       // approximate at N = 5
    offer(32'h42480000, 32'hc1c80000, 0);       // no tuning
    offer(32'h00000000, 32'h3f800000, 0);       // zero operand
    offer(32'h7fc00000, 32'h3f800000, 0);       // NaN operand
    for (int i = 0; i < 6000; i++) begin
      x = (i % 50 == 0) ? 32'h0 : rand_fp(100, 154);
      z = rand_fp(100, 154);
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0); a = x; b = z;
      tune_n = 5'($urandom_range(10));
      @(posedge clk);
      while (in_valid && !in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    $display("approximate %0d, tuning re-runs %0d, special re-runs %0d, stall cycles %0d",
             n_hit, n_tune_rerun, n_special, n_stall);
    checks += 4;
    if (n_hit == 0)        begin failures++; $display("FAIL: no approximate hit"); end
    if (n_tune_rerun == 0) begin failures++; $display("FAIL: no tuning re-run"); end
    if (n_special == 0)    begin failures++; $display("FAIL: no special re-run"); end
    if (n_stall == 0)      begin failures++; $display("FAIL: no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
