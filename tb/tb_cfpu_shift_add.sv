// tb_cfpu_shift_add: self-checking test of the CFPU shift-and-add stage.
//
// The stage is driven through the first stage (cfpu_select supplies sign,
// exponent and the kept and discarded fractions). For random operands and
// bounds N the result must equal the model (1+fkeep) + ((1+fkeep) >> k),
// k the position of the first 1 of the discarded fraction, normalised and
// truncated, and must be accepted exactly when the rest of the discarded
// fraction is below 2^-N. Accepted results must lie within 2^-N (plus one
// unit of truncation) of the exact product, and the second-stage error must
// never exceed the first stage's.
module tb_cfpu_shift_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y1, y;
  logic [4:0] tune_n, shift;
  logic s1_ok, normal_in, sign, keep_b, s2_ok;
  logic signed [9:0] exp_sum;
  logic [22:0] keep_frac, disc_frac;
  int checks = 0, failures = 0, n_ok = 0, n_rej = 0;

  cfpu_select u_sel (.a(a), .b(b), .tune_n(tune_n), .y(y1), .s1_ok(s1_ok),
                     .normal_in(normal_in), .sign(sign), .exp_sum(exp_sum),
                     .keep_frac(keep_frac), .disc_frac(disc_frac), .keep_b(keep_b));
  cfpu_shift_add dut (.sign(sign), .exp_sum(exp_sum), .normal_in(normal_in),
                      .keep_frac(keep_frac), .disc_frac(disc_frac), .tune_n(tune_n),
                      .y(y), .s2_ok(s2_ok), .shift(shift));

  task automatic check(logic [31:0] x, logic [31:0] z, int n);
    int path; bit t2; logic [31:0] ye;
    real ex, e1, e2;
    a = x; b = z; tune_n = 5'(n);
    #1;
    cfpu_model(x, z, n, 1, path, t2, ye);
    if (path == 0) return;        // stage 2 not reached for these operands
    checks++;
    if (s2_ok !== (path == 1) || (s2_ok && y !== ye)) begin
      failures++;
      $display("FAIL: %h * %h N=%0d ok=%0d y=%h expected ok=%0d y=%h", x, z, n,
               s2_ok, y, path == 1, ye);
    end
    ex = f2r(x) * f2r(z);
    e1 = rel_err(f2r(y1), ex);
    e2 = rel_err(f2r(y), ex);
    checks++;
    if (e2 > e1 / 2.0 + pow2(-22)) begin
      failures++; $display("FAIL: second stage error %f vs first %f", e2, e1);
    end
    if (s2_ok) begin
      n_ok++;
      checks++;
      if (e2 >= pow2(-n) + pow2(-22)) begin
        failures++; $display("FAIL: error bound %h * %h N=%0d err %f", x, z, n, e2);
      end
    end else n_rej++;
  endtask

  initial begin
    // 5 x 10 at N = 3: 1.25 * 1.25, discarded .01 -> 1.25 + 1.25/4 exactly
    check(32'h40a00000, 32'h41200000, 3);
    checks++; if (!s2_ok || y !== 32'h42480000 || shift != 2) begin
      failures++; $display("FAIL 5x10 stage 2 %h", y); end
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, z;
      x = rand_fp(100, 150); z = rand_fp(100, 150);
      if ($urandom_range(1) != 0) x[22:0] = x[22:0] & ~(23'h7fffff >> $urandom_range(23));
      check(x, z, 1 + int'($urandom_range(8)));
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
