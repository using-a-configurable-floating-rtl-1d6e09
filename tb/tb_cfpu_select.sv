// tb_cfpu_select: self-checking test of CFPU mantissa discarding.
//
// Random operands and error bounds N: the smaller fraction must be the one
// discarded, the first-stage result must be (1 + larger fraction) *
// 2^(ea+eb), and it must be accepted exactly when the operands and result are
// normal and the discarded fraction is below 2^-N. Accepted results must be
// within the bound 2^-N of the exact product.
module tb_cfpu_select;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  logic [4:0] tune_n;
  logic s1_ok, normal_in, sign, keep_b;
  logic signed [9:0] exp_sum;
  logic [22:0] keep_frac, disc_frac;
  int checks = 0, failures = 0, n_ok = 0, n_rej = 0;

  cfpu_select dut (.*);

  task automatic check(logic [31:0] x, logic [31:0] z, int n);
    int path; bit t2; logic [31:0] ye;
    a = x; b = z; tune_n = 5'(n);
    #1;
    cfpu_model(x, z, n, 0, path, t2, ye);
    checks++;
    if (s1_ok !== (path == 0) || (s1_ok && y !== ye) ||
        keep_frac !== ((x[22:0] <= z[22:0]) ? z[22:0] : x[22:0]) ||
        disc_frac !== ((x[22:0] <= z[22:0]) ? x[22:0] : z[22:0])) begin
      failures++;
      $display("FAIL: %h * %h N=%0d ok=%0d y=%h expected ok=%0d y=%h", x, z, n,
               s1_ok, y, path == 0, ye);
    end
    if (s1_ok) begin
      n_ok++;
      checks++;
      if (n != 0 && rel_err(f2r(y), f2r(x) * f2r(z)) >= pow2(-n)) begin
        failures++; $display("FAIL: error bound %h * %h N=%0d", x, z, n);
      end
    end else n_rej++;
  endtask

  initial begin
    check(32'h40a00000, 32'h41200000, 1);     // 5 x 10: 1.25 * 1.25, discard 0.25 -> 40
    checks++; if (!s1_ok || y !== 32'h42200000) begin failures++; $display("FAIL 5x10"); end
    check(32'h40a00000, 32'h41200000, 2);     // 0.25 not below 2^-2
    checks++; if (s1_ok) begin failures++; $display("FAIL 5x10 N=2"); end
    check(32'h0, 32'h41200000, 0);            // zero goes exact
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, z;
      x = rand_fp(100, 150); z = rand_fp(100, 150);
      if ($urandom_range(1) != 0) x[22:0] = x[22:0] >> $urandom_range(22);
      check(x, z, int'($urandom_range(8)));
    end
    checks++;
    if (n_ok == 0 || n_rej == 0) begin failures++; $display("FAIL: one outcome never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
