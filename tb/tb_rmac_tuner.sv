// tb_rmac_tuner: self-checking test of the accuracy tuner.
//
// Directed cases cover the three operand cases (both leading fraction bits 1,
// both 0, different) with chosen result patterns; the worked example 50 x -25
// must need the exact multiplier at N = 1 and not at N = 5. Random cases
// compare the run length with a count made on the real-valued fraction sum,
// and need_exact with the rule "run >= N, N = 0 disables tuning".
module tb_rmac_tuner;
  import fp_ref_pkg::*;

  logic a_msb, b_msb, need_exact;
  logic [22:0] c_frac;
  logic [4:0] tune_n, run_len;
  int checks = 0, failures = 0;

  rmac_tuner dut (.*);

  // directed: operand leading bits, result fraction, N, expected run and decision
  task automatic dcheck(logic am, logic bm, logic [22:0] c, int n, int run, bit ne);
    a_msb = am; b_msb = bm; c_frac = c; tune_n = 5'(n);
    #1;
    checks++;
    if (int'(run_len) != run || need_exact !== ne) begin
      failures++;
      $display("FAIL: case %b%b c=%h N=%0d run=%0d need=%0d expected %0d %0d",
               am, bm, c, n, run_len, need_exact, run, ne);
    end
  endtask

  initial begin
    logic [31:0] a, b;
    logic [23:0] s;
    int run;
    // case 1: count 0s
    dcheck(1, 1, 23'h000000, 3, 23, 1);
    dcheck(1, 1, 23'h100000, 3, 2, 0);       // .001...
    dcheck(1, 1, 23'h400000, 1, 0, 0);       // .1...
    // case 2: count 1s
    dcheck(0, 0, 23'h7fffff, 8, 23, 1);
    dcheck(0, 0, 23'h700000, 4, 3, 0);       // .1110...
    dcheck(0, 0, 23'h0fffff, 1, 0, 0);
    // case 3: count copies of C23
    dcheck(0, 1, 23'h7e0000, 6, 6, 1);       // .1111110
    dcheck(1, 0, 23'h07ffff, 4, 4, 1);       // .0000111
    dcheck(1, 0, 23'h200000, 2, 1, 0);       // .01
    // tuning off
    dcheck(1, 1, 23'h000000, 0, 23, 0);
    // 50 x -25 : C = .001, both leading bits 1
    dcheck(1, 1, 23'h100000, 1, 2, 1);
    dcheck(1, 1, 23'h100000, 5, 2, 0);
    for (int i = 0; i < 20000; i++) begin
      a = rand_fp(100, 150); b = rand_fp(100, 150);
      s = {1'b0, a[22:0]} + {1'b0, b[22:0]};
      a_msb = a[22]; b_msb = b[22]; c_frac = s[22:0];
      tune_n = 5'($urandom_range(12));
      #1;
      run = rmac_run(a, b);
      checks++;
      if (int'(run_len) != run || need_exact !== (tune_n != 0 && run >= int'(tune_n))) begin
        failures++;
        $display("FAIL: %h %h run=%0d expected %0d", a, b, run_len, run);
      end
    end
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
