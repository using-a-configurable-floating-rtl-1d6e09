// tb_rmac_approx: self-checking test of the mantissa-addition datapath.
//
// Checks the worked examples of the method (5 x 10 = 48, 12 x 12 = 128,
// 50 x -25 = -1152), then random normal operands against the real-number
// model (1+fa+fb)*2^(ea+eb), which single precision holds exactly. It also
// checks that approx_ok drops for special operands and out-of-range
// exponents, and that the relative error never exceeds 1/9 (11.1%).
module tb_rmac_approx;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  logic approx_ok, carry;
  logic [22:0] c_frac;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  rmac_approx dut (.*);

  task automatic check(logic [31:0] x, logic [31:0] z);
    real v, e;
    bit ok_exp;
    a = x; b = z;
    #1;
    v = rmac_val(x, z);
    ok_exp = is_normal(x) && is_normal(z) && is_normal(r2f(v));
    checks++;
    if (approx_ok !== ok_exp) begin
      failures++;
      $display("FAIL: %h * %h approx_ok=%0d expected %0d", x, z, approx_ok, ok_exp);
    end else if (ok_exp) begin
      e = rel_err(f2r(y), f2r(x) * f2r(z));
      if (e > max_err) max_err = e;
      checks++;
      if (y !== r2f(v) || e > 1.0 / 9.0 + 1e-9) begin
        failures++;
        $display("FAIL: %h * %h = %h expected %h (err %f)", x, z, y, r2f(v), e);
      end
    end
  endtask

  initial begin
    check(32'h40a00000, 32'h41200000);                        // 5 x 10
    checks++; if (y !== 32'h42400000) begin failures++; $display("FAIL 5x10 %h", y); end
    check(32'h41400000, 32'h41400000);                        // 12 x 12
    checks++; if (y !== 32'h43000000) begin failures++; $display("FAIL 12x12 %h", y); end
    check(32'h42480000, 32'hc1c80000);                        // 50 x -25
    checks++; if (y !== 32'hc4900000) begin failures++; $display("FAIL 50x-25 %h", y); end
    check(32'h00000000, 32'h3f800000);                        // zero
    check(32'h7f800000, 32'h3f800000);                        // inf
    check(32'h7f000000, 32'h7f000000);                        // overflow
    check(32'h00800000, 32'h00800000);                        // underflow
    for (int i = 0; i < 20000; i++) check(rand_fp(0, 255), rand_fp(0, 255));
    for (int i = 0; i < 20000; i++) check(rand_fp(110, 145), rand_fp(110, 145));
    checks++;
    if (max_err < 0.10) begin
      failures++; $display("FAIL: max error %f, worst case never approached", max_err);
    end
    $display("max relative error %f", max_err);
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
