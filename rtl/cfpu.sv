// cfpu: configurable floating point multiplier with two approximation stages.
//
// An operation is tried on progressively more expensive hardware and stops at
// the first result that meets the user's error bound Errormax = 2^-N
// (N = tune_n):
//   stage 1, mantissa discarding (cfpu_select): keep the larger mantissa,
//            drop the other; accepted when the first N bits of the dropped
//            fraction are 0;
//   stage 2, shift and add (cfpu_shift_add): approximate the dropped
//            fraction by its first 1 bit and add the shifted kept mantissa to
//            itself; accepted when the first N bits of what is left of the
//            dropped fraction are 0. Only tried when two_stage is high;
//   exact:   the precise IEEE-754 multiplier (fp_mul_exact).
// Operands that are not normal numbers, and results whose exponent leaves the
// normal range, always go to the exact multiplier.
//
// Timing (a choice of this implementation; the method fixes no cycle
// counts): an operation is accepted when in_valid and in_ready are high. Stage 1 decides
// in the cycle of acceptance and a stage-1 result appears one cycle later.
// Otherwise the operands' selected mantissas are registered and stage 2
// works on them in the next cycle (result two cycles after acceptance); if
// stage 2 is off or misses the bound, the exact multiplier is started from the
// operand register one cycle later still and its result follows two cycles
// after that (four cycles after acceptance with stage 2, three without).
// in_ready is low while stage 2 or an exact re-run is in progress.
// out_valid is a one-cycle pulse with no back-pressure; out_path says which
// hardware produced y. tune_n and two_stage are sampled when an operation is
// accepted.
module cfpu #(
  parameter int unsigned EXP_W  = fp_pkg::FP_EXP_W,
  parameter int unsigned FRAC_W = fp_pkg::FP_FRAC_W,
  localparam int unsigned W     = 1 + EXP_W + FRAC_W,
  localparam int unsigned RW    = $clog2(FRAC_W + 1),
  localparam int unsigned XW    = EXP_W + 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RW-1:0]    tune_n,
  input  logic             two_stage,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  output logic             out_valid,
  output logic [W-1:0]     y,
  output fp_pkg::res_path_e out_path
);

  import fp_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_STAGE2, S_LAUNCH, S_WAIT} state_e;
  state_e state;

  // ------------------------------------------------------------ stage 1
  logic [W-1:0]         s1_y;
  logic                 s1_ok, s1_normal, s1_sign, s1_keep_b;
  logic signed [XW-1:0] s1_exp;
  logic [FRAC_W-1:0]    s1_keep, s1_disc;

  cfpu_select #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_select (
    .a(a), .b(b), .tune_n(tune_n), .y(s1_y), .s1_ok(s1_ok),
    .normal_in(s1_normal), .sign(s1_sign), .exp_sum(s1_exp),
    .keep_frac(s1_keep), .disc_frac(s1_disc), .keep_b(s1_keep_b)
  );

  wire fire = in_valid && in_ready;

  // registers between stage 1 and stage 2 / the exact multiplier
  logic [W-1:0]         op_a, op_b;
  logic [RW-1:0]        r_tune;
  logic                 r_normal, r_sign;
  logic signed [XW-1:0] r_exp;
  logic [FRAC_W-1:0]    r_keep, r_disc;

  // ------------------------------------------------------------ stage 2
  logic [W-1:0]  s2_y;
  logic          s2_ok;
  logic [RW-1:0] s2_shift;

  cfpu_shift_add #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_shift_add (
    .sign(r_sign), .exp_sum(r_exp), .normal_in(r_normal), .keep_frac(r_keep),
    .disc_frac(r_disc), .tune_n(r_tune), .y(s2_y), .s2_ok(s2_ok),
    .shift(s2_shift)
  );

  // ------------------------------------------------------------ exact
  logic         ex_valid;
  logic [W-1:0] ex_y;

  fp_mul_exact #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_exact (
    .clk(clk), .rst_n(rst_n), .in_valid(state == S_LAUNCH), .a(op_a), .b(op_b),
    .out_valid(ex_valid), .y(ex_y)
  );

  assign in_ready = (state == S_IDLE);

  logic         ap_valid_q;
  logic [W-1:0] ap_y_q;
  res_path_e    ap_path_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ap_valid_q <= 1'b0;
      ap_path_q  <= PATH_APPROX1;
      op_a       <= '0;
      op_b       <= '0;
      r_tune     <= '0;
      r_normal   <= 1'b0;
      r_sign     <= 1'b0;
      r_exp      <= '0;
      r_keep     <= '0;
      r_disc     <= '0;
    end else begin
      ap_valid_q <= 1'b0;
      unique case (state)
        S_IDLE:
          if (fire) begin
            if (s1_ok) begin
              ap_valid_q <= 1'b1;
              ap_path_q  <= PATH_APPROX1;
              ap_y_q     <= s1_y;
            end else begin
              op_a     <= a;
              op_b     <= b;
              r_tune   <= tune_n;
              r_normal <= s1_normal;
              r_sign   <= s1_sign;
              r_exp    <= s1_exp;
              r_keep   <= s1_keep;
              r_disc   <= s1_disc;
              state    <= (two_stage && s1_normal) ? S_STAGE2 : S_LAUNCH;
            end
          end
        S_STAGE2:
          if (s2_ok) begin
            ap_valid_q <= 1'b1;
            ap_path_q  <= PATH_APPROX2;
            ap_y_q     <= s2_y;
            state      <= S_IDLE;
          end else begin
            state      <= S_LAUNCH;
          end
        S_LAUNCH: state <= S_WAIT;
        S_WAIT:   state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign out_valid = ap_valid_q || ex_valid;
  assign y         = ex_valid ? ex_y : ap_y_q;
  assign out_path  = ex_valid ? PATH_EXACT : ap_path_q;

  assert property (@(posedge clk) disable iff (!rst_n) !(ap_valid_q && ex_valid));
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_WAIT) |=> (ex_valid && state == S_IDLE));

endmodule
