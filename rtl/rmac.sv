// rmac: tunable approximate floating point multiplier (RMAC).
//
// Every multiplication is first done approximately, by adding the mantissas
// (rmac_approx). The accuracy tuner (rmac_tuner) inspects the leading operand
// bits and the approximate result and, with N = tune_n tuning bits, decides
// whether the approximation is accurate enough. If it is not, or if the
// operands or the result are outside the normal range, the multiplication is
// re-started on the precise IEEE-754 multiplier (fp_mul_exact). The tuning
// setting can be changed between any two operations, so one unit can serve
// applications with different accuracy needs.
//
// Timing (a choice of this implementation; the method is characterised by
// energy and delay figures, not cycle counts):
//   approximate result: out_valid one cycle after the operation is accepted;
//   exact re-run:       the operands are held in a register, the exact
//                       multiplier is started in the next cycle and the
//                       result appears three cycles after acceptance.
// While an exact re-run is in progress in_ready is low (the unit stalls), so
// results leave in the order operations arrived. An operation is accepted
// when in_valid and in_ready are both high. There is no output back-pressure:
// out_valid is a one-cycle pulse. out_path tells which hardware produced y.
// The exact multiplier's inputs only change when a re-run starts, so it does
// not switch while approximations are accepted.
module rmac #(
  parameter int unsigned EXP_W  = fp_pkg::FP_EXP_W,
  parameter int unsigned FRAC_W = fp_pkg::FP_FRAC_W,
  localparam int unsigned W     = 1 + EXP_W + FRAC_W,
  localparam int unsigned RW    = $clog2(FRAC_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RW-1:0]    tune_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  output logic             out_valid,
  output logic [W-1:0]     y,
  output fp_pkg::res_path_e out_path
);

  import fp_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_WAIT} state_e;
  state_e state;

  // approximate path and tuner, on the incoming operands
  logic [W-1:0]      ap_y;
  logic              ap_ok, ap_carry;
  logic [FRAC_W-1:0] ap_c;
  logic [RW-1:0]     run_len;
  logic              need_exact;

  rmac_approx #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_approx (
    .a(a), .b(b), .y(ap_y), .approx_ok(ap_ok), .carry(ap_carry), .c_frac(ap_c)
  );

  rmac_tuner #(.FRAC_W(FRAC_W)) u_tuner (
    .a_msb(a[FRAC_W-1]), .b_msb(b[FRAC_W-1]), .c_frac(ap_c),
    .tune_n(tune_n), .run_len(run_len), .need_exact(need_exact)
  );

  wire fire   = in_valid && in_ready;
  wire accept = ap_ok && !need_exact;

  // operand register for the exact re-run
  logic [W-1:0] op_a, op_b;
  logic         ex_start, ex_valid;
  logic [W-1:0] ex_y;

  fp_mul_exact #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_exact (
    .clk(clk), .rst_n(rst_n), .in_valid(ex_start), .a(op_a), .b(op_b),
    .out_valid(ex_valid), .y(ex_y)
  );

  assign in_ready = (state == S_IDLE);
  assign ex_start = (state == S_LAUNCH);

  logic         ap_valid_q;
  logic [W-1:0] ap_y_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ap_valid_q <= 1'b0;
      op_a       <= '0;
      op_b       <= '0;
    end else begin
      ap_valid_q <= fire && accept;
      unique case (state)
        S_IDLE:   if (fire && !accept) begin
                    op_a  <= a;
                    op_b  <= b;
                    state <= S_LAUNCH;
                  end
        S_LAUNCH: state <= S_WAIT;
        S_WAIT:   state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
    if (fire && accept) ap_y_q <= ap_y;
  end

  assign out_valid = ap_valid_q || ex_valid;
  assign y         = ex_valid ? ex_y : ap_y_q;
  assign out_path  = ex_valid ? PATH_EXACT : PATH_APPROX1;

  // the two result sources can never complete in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(ap_valid_q && ex_valid));
  // a re-run always returns its result as the unit becomes ready again
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_WAIT) |=> (ex_valid && state == S_IDLE));

endmodule
