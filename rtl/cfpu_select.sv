// cfpu_select: first CFPU stage, adaptive operand selection and mantissa
// discarding.
//
// The CFPU avoids the mantissa multiplication by keeping one operand's
// mantissa as the result mantissa and discarding the other: with
// A = (1+fa)2^ea and B = (1+fb)2^eb it returns (1+fkeep)2^(ea+eb). The
// relative error is fdisc/(1+fdisc), so the operand with the smaller fraction
// is the one discarded (adaptive selection, a multiplexer between the two
// fractions). The error is predicted from the first N bits of the discarded
// fraction: when they are all 0 the error is below 2^-N and the approximation
// is accepted (s1_ok). N = tune_n is the user's error bound, Errormax =
// 2^-N; N = 0 accepts every first-stage result. Comparing whole fractions for
// the selection, and expressing the threshold as a number of leading zero
// bits, are choices of this design.
//
// s1_ok is also low when an operand is zero, subnormal, infinite or NaN, or
// the result exponent is out of the normal range; the caller then uses the
// exact multiplier. sign, exp_sum, keep_frac and disc_frac are passed on to the
// second stage (cfpu_shift_add). Purely combinational.
module cfpu_select #(
  parameter int unsigned EXP_W  = fp_pkg::FP_EXP_W,
  parameter int unsigned FRAC_W = fp_pkg::FP_FRAC_W,
  localparam int unsigned W     = 1 + EXP_W + FRAC_W,
  localparam int unsigned RW    = $clog2(FRAC_W + 1),
  localparam int unsigned XW    = EXP_W + 2
) (
  input  logic [W-1:0]         a,
  input  logic [W-1:0]         b,
  input  logic [RW-1:0]        tune_n,
  output logic [W-1:0]         y,          // first-stage result
  output logic                 s1_ok,      // first-stage result accepted
  output logic                 normal_in,  // both operands normal numbers
  output logic                 sign,
  output logic signed [XW-1:0] exp_sum,    // ea + eb - bias
  output logic [FRAC_W-1:0]    keep_frac,
  output logic [FRAC_W-1:0]    disc_frac,
  output logic                 keep_b      // 1: B's mantissa kept
);

  localparam logic [EXP_W-1:0] EXP_MAX = '1;
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;

  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic             disc_small;   // first N bits of the discarded fraction are 0
  logic             exp_ok;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sign      = sa ^ sb;
    exp_sum   = XW'(signed'({2'b00, ea})) + XW'(signed'({2'b00, eb})) - XW'(BIAS);
    normal_in = (ea != '0) && (ea != EXP_MAX) && (eb != '0) && (eb != EXP_MAX);
    keep_b    = (fa <= fb);             // discard the smaller fraction
    keep_frac = keep_b ? fb : fa;
    disc_frac = keep_b ? fa : fb;
    disc_small = 1'b1;
    for (int i = 0; i < FRAC_W; i++)
      if ((FRAC_W - 1 - i) < int'(tune_n) && disc_frac[i]) disc_small = 1'b0;
    exp_ok = (exp_sum >= 1) && (exp_sum < XW'(signed'({2'b00, EXP_MAX})));
    s1_ok  = normal_in && exp_ok && disc_small;
    y      = {sign, exp_sum[EXP_W-1:0], keep_frac};
  end

endmodule
