// tb_fp_mul_exact: self-checking test of the exact single precision multiplier.
//
// Directed cases (small integers, rounding ties, overflow, underflow,
// subnormal, zero, infinity and NaN operands) are followed by random
// operands over the whole exponent range, operands with short fractions
// (which give exact rounding ties) and a back-to-back stream, issued with
// random gaps. Each result is compared with the real-number
// reference and must appear exactly two cycles after its operands.
module tb_fp_mul_exact;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [31:0] a = 0, b = 0, y;
  logic out_valid;
  int checks = 0, failures = 0, cycle = 0;

  fp_mul_exact dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [31:0] a, b, exp; int t; } item_t;
  item_t q[$];

  always @(posedge clk) if (rst_n) begin
    if (in_valid) q.push_back('{a, b, mul_ref(a, b), cycle});
    if (out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL: unexpected result %h", y);
      end else begin
        it = q.pop_front();
        if (y !== it.exp || cycle != it.t + 2) begin
          failures++;
          $display("FAIL: %h * %h = %h expected %h (latency %0d)", it.a, it.b, y,
                   it.exp, cycle - it.t);
        end
      end
    end
  end

  task automatic issue(logic [31:0] x, logic [31:0] z);
    @(negedge clk); in_valid = 1; a = x; b = z;
    @(negedge clk); in_valid = 0;
    repeat ($urandom_range(1)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    issue(32'h40a00000, 32'h41200000);   // 5 * 10
    issue(32'h42480000, 32'hc1c80000);   // 50 * -25
    issue(32'h3f800001, 32'h3f800001);   // rounding
    issue(32'h3fc00001, 32'h40400003);
    issue(32'h3f800001, 32'h3fffffff);   // tie region
    issue(32'h3fc00000, 32'h3f800001);   // exact tie, odd: rounds up
    issue(32'h3f800800, 32'h3f800800);   // exact tie, even: stays
    issue(32'h7f000000, 32'h40000000);   // overflow to inf
    issue(32'h00800000, 32'h3f000000);   // underflow to zero
    issue(32'h00400000, 32'h3f800000);   // subnormal operand
    issue(32'h00000000, 32'hc0000000);   // signed zero
    issue(32'h7f800000, 32'hbf800000);   // inf
    issue(32'h7f800000, 32'h00000000);   // inf * 0 = NaN
    issue(32'h7fc00001, 32'h3f800000);   // NaN
    for (int i = 0; i < 3000; i++) issue(rand_fp(1, 254), rand_fp(1, 254));
    for (int i = 0; i < 2000; i++) issue(rand_fp(100, 160), rand_fp(100, 160));
    // short fractions make exact halfway products (rounding ties) common
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] x, z;
      x = rand_fp(110, 140); z = rand_fp(110, 140);
      x[10:0] = 0; z[11:0] = 0; z[12] = 1;
      issue(x, z);
    end
    for (int i = 0; i < 500; i++) begin
      // back-to-back stream
      @(negedge clk); in_valid = 1; a = rand_fp(90, 170); b = rand_fp(90, 170);
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
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
