// tb_cfpu: self-checking test of the two-stage CFPU multiplier.
//
// A stream of operations with random gaps, a randomly changing error bound N
// and the second stage switched on and off is offered with a valid/ready
// handshake. For each accepted operation the real-number model predicts which
// hardware must produce the result (mantissa discarding, shift-and-add or the
// exact multiplier) and the result itself, and the testbench checks the path
// tag and the latency: 1 cycle for stage 1, 2 for stage 2, 3 for the exact
// multiplier when stage 2 is skipped and 4 when stage 2 was tried first.
// Every one of these outcomes and input stalls must occur.
module tb_cfpu;
  import fp_ref_pkg::*;
  import fp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [4:0] tune_n = 0;
  logic two_stage = 0;
  logic in_valid = 0, in_ready;
  logic [31:0] a = 0, b = 0, y;
  logic out_valid;
  res_path_e out_path;
  int checks = 0, failures = 0, cycle = 0;
  int n_path[4] = '{0, 0, 0, 0};   // stage 1, stage 2, exact direct, exact after stage 2
  int n_stall = 0;

  cfpu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [31:0] a, b, exp; int path, lat, t; } item_t;
  item_t q[$];

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (in_valid && in_ready) begin
      item_t it;
      bit t2;
      it.a = a; it.b = b; it.t = cycle;
      cfpu_model(a, b, int'(tune_n), two_stage, it.path, t2, it.exp);
      it.lat = (it.path == 0) ? 1 : (it.path == 1) ? 2 : (t2 ? 4 : 3);
      n_path[(it.path == 2 && t2) ? 3 : it.path]++;
      q.push_back(it);
    end
    if (out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL: unexpected result %h", y);
      end else begin
        it = q.pop_front();
        if (y !== it.exp || cycle != it.t + it.lat || int'(out_path) != it.path) begin
          failures++;
          $display("FAIL: %h * %h = %h expected %h, path %0d expected %0d, latency %0d expected %0d",
                   it.a, it.b, y, it.exp, out_path, it.path, cycle - it.t, it.lat);
        end
      end
    end
  end

  initial begin
    logic [31:0] x, z;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      x = (i % 64 == 0) ? 32'h7f800000 : rand_fp(100, 154);
      z = rand_fp(100, 154);
      if ($urandom_range(1) != 0) x[22:0] = x[22:0] & ~(23'h7fffff >> $urandom_range(23));
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0); a = x; b = z;
      tune_n = 5'($urandom_range(8));
      two_stage = ($urandom_range(3) != 0);
      @(posedge clk);
      while (in_valid && !in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    $display("stage 1 %0d, stage 2 %0d, exact %0d, exact after stage 2 %0d, stall cycles %0d",
             n_path[0], n_path[1], n_path[2], n_path[3], n_stall);
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (n_path[p] == 0) begin failures++; $display("FAIL: outcome %0d never seen", p); end
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: no stall"); end
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
