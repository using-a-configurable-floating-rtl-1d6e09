// tb_rmac_fp16: the RMAC unit built for IEEE-754 half precision
// (5 exponent bits, 10 fraction bits).
//
// The tuning method applies to narrower formats as well; this test builds
// rmac with EXP_W = 5, FRAC_W = 10 and runs a random stream of normal
// half-precision operands (plus zeros) with a changing number of tuning bits.
// Each result is compared with a real-number model: the mantissa-addition
// value when the tuning rule (run of the critical pattern shorter than N, or
// N = 0) keeps the approximation, otherwise the correctly rounded
// half-precision product. Latencies are 1 and 3 cycles as in single
// precision. Approximate hits and exact re-runs must both occur.
module tb_rmac_fp16;
  import fp_ref_pkg::*;
  import fp_pkg::*;

  localparam int EW = 5, FW = 10;

  logic clk = 0, rst_n = 0;
  logic [3:0]  tune_n = 0;
  logic        in_valid = 0, in_ready, out_valid;
  logic [15:0] a = 0, b = 0, y;
  res_path_e   out_path;
  int checks = 0, failures = 0, cycle = 0, n_hit = 0, n_exact = 0;

  rmac #(.EXP_W(EW), .FRAC_W(FW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [15:0] rand_h();
    return {1'($urandom), 5'(8 + $urandom_range(14)), 10'($urandom)};
  endfunction

  // mantissa-addition value and critical run length, from reals
  function automatic real approx_val(logic [15:0] x, logic [15:0] z);
    real fx = real'(x[9:0]) / 1024.0, fz = real'(z[9:0]) / 1024.0;
    real sc = pow2(int'(x[14:10]) + int'(z[14:10]) - 30);
    real v  = (fx + fz < 1.0) ? (1.0 + fx + fz) * sc : 2.0 * (fx + fz) * sc;
    return (x[15] ^ z[15]) ? -v : v;
  endfunction

  function automatic int run_len(logic [15:0] x, logic [15:0] z);
    real c = real'(x[9:0]) / 1024.0 + real'(z[9:0]) / 1024.0;
    int  bv[FW];
    int  pat, run;
    if (c >= 1.0) c = c - 1.0;
    for (int i = 0; i < FW; i++) begin
      c = c * 2.0;
      bv[i] = (c >= 1.0) ? 1 : 0;
      if (c >= 1.0) c = c - 1.0;
    end
    pat = (x[9] && z[9]) ? 0 : (!x[9] && !z[9]) ? 1 : bv[0];
    run = 0;
    while (run < FW && bv[run] == pat) run++;
    return run;
  endfunction

  typedef struct { logic [15:0] a, b, exp; bit exact; int t; } item_t;
  item_t q[$];

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      item_t it;
      bit ok, ne;
      logic [31:0] av;
      av = r2x(approx_val(a, b), EW, FW);
      ok = a[14:10] != 0 && b[14:10] != 0 && av[14:10] != 0 && av[14:10] != 5'h1f;
      ne = tune_n != 0 && run_len(a, b) >= int'(tune_n);
      it.a = a; it.b = b; it.t = cycle; it.exact = !ok || ne;
      if (it.exact) begin
        logic [31:0] ev;
        ev = r2x(x2r({16'h0, a}, EW, FW) * x2r({16'h0, b}, EW, FW), EW, FW);
        it.exp = (a[14:10] == 0 || b[14:10] == 0) ? {a[15] ^ b[15], 15'h0} : ev[15:0];
        n_exact++;
      end else begin
        it.exp = av[15:0];
        n_hit++;
      end
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
          $display("FAIL: %h * %h = %h expected %h, exact %0d, latency %0d",
                   it.a, it.b, y, it.exp, it.exact, cycle - it.t);
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      a = (i % 61 == 0) ? 16'h0000 : rand_h();
      b = rand_h();
      tune_n = 4'($urandom_range(6));
      @(posedge clk);
      while (in_valid && !in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    checks += 3;
    if (q.size() != 0) begin failures++; $display("FAIL: results missing"); end
    if (n_hit == 0)    begin failures++; $display("FAIL: no approximate hit"); end
    if (n_exact == 0)  begin failures++; $display("FAIL: no exact re-run"); end
    $display("approximate %0d, exact %0d", n_hit, n_exact);
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
