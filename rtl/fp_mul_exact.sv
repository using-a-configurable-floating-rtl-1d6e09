// fp_mul_exact: precise IEEE-754 floating point multiplier, two-stage pipeline.
//
// This is the conventional multiplier that the approximate units fall back to
// when an approximation would be too inaccurate. It follows the textbook
// multiply: the result sign is the XOR of the operand signs, the exponents are
// added (and the bias removed), the two mantissas with their hidden 1 are
// multiplied, and a product in [2,4) is shifted right by one place with the
// exponent incremented.
//
// Choices of this design beyond that outline: rounding is round-to-nearest-
// even; subnormal operands are read as zero and subnormal results are flushed
// to a signed zero; an exponent overflow gives a signed infinity; any NaN
// operand, or zero times infinity, gives the quiet NaN 0x7fc00000 (for the
// default format).
//
// Interface and timing: in_valid/a/b are sampled on a rising clk edge; the
// mantissa product and exponent sum are registered in stage 1, and the
// rounded result appears on y with out_valid two cycles after the operands
// were presented. A new operation can start every cycle. There is no
// back-pressure. rst_n is an active-low synchronous reset of the valid bits.
module fp_mul_exact #(
  parameter int unsigned EXP_W  = fp_pkg::FP_EXP_W,
  parameter int unsigned FRAC_W = fp_pkg::FP_FRAC_W,
  localparam int unsigned W     = 1 + EXP_W + FRAC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         out_valid,
  output logic [W-1:0] y
);

  localparam int unsigned M    = FRAC_W + 1;          // mantissa with hidden bit
  localparam int unsigned P    = 2 * M;               // product width
  localparam int unsigned XW   = EXP_W + 2;           // signed working exponent
  localparam logic [EXP_W-1:0] EXP_MAX = '1;
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;

  // ---------------------------------------------------------------- stage 0
  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    a_zero = (ea == '0);                       // zero or subnormal (flushed)
    b_zero = (eb == '0);
    a_inf  = (ea == EXP_MAX) && (fa == '0);
    b_inf  = (eb == EXP_MAX) && (fb == '0);
    a_nan  = (ea == EXP_MAX) && (fa != '0);
    b_nan  = (eb == EXP_MAX) && (fb != '0);
  end

  // stage 1 registers
  logic                 v1;
  logic                 s1_sign;
  logic signed [XW-1:0] s1_exp;
  logic [P-1:0]         s1_prod;
  logic                 s1_nan, s1_inf, s1_zero;

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    s1_sign <= sa ^ sb;
    s1_exp  <= XW'(signed'({2'b00, ea})) + XW'(signed'({2'b00, eb})) - XW'(BIAS);
    s1_prod <= {1'b1, fa} * {1'b1, fb};
    s1_nan  <= a_nan | b_nan | (a_inf & b_zero) | (b_inf & a_zero);
    s1_inf  <= a_inf | b_inf;
    s1_zero <= a_zero | b_zero;
  end

  // ---------------------------------------------------------------- stage 2
  logic [M-1:0]         mant;      // truncated mantissa, hidden bit at top
  logic                 guard, sticky, round_up;
  logic [M:0]           mant_r;    // after rounding, one spare bit
  logic signed [XW-1:0] exp_n;
  logic [W-1:0]         res;

  always_comb begin
    if (s1_prod[P-1]) begin                    // product in [2,4)
      mant   = s1_prod[P-1 -: M];
      guard  = s1_prod[P-1-M];
      sticky = |s1_prod[P-2-M:0];
      exp_n  = s1_exp + XW'(1);
    end else begin                             // product in [1,2)
      mant   = s1_prod[P-2 -: M];
      guard  = s1_prod[P-2-M];
      sticky = |s1_prod[P-3-M:0];
      exp_n  = s1_exp;
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + (M+1)'(round_up);
    if (mant_r[M]) begin                       // rounding carried to 2.0
      exp_n  = exp_n + XW'(1);
      mant_r = mant_r >> 1;
    end

    if (s1_nan)
      res = {1'b0, EXP_MAX, 1'b1, {(FRAC_W-1){1'b0}}};
    else if (s1_inf)
      res = {s1_sign, EXP_MAX, {FRAC_W{1'b0}}};
    else if (s1_zero || exp_n <= 0)
      res = {s1_sign, {EXP_W{1'b0}}, {FRAC_W{1'b0}}};
    else if (exp_n >= XW'(signed'({2'b00, EXP_MAX})))
      res = {s1_sign, EXP_MAX, {FRAC_W{1'b0}}};
    else
      res = {s1_sign, exp_n[EXP_W-1:0], mant_r[FRAC_W-1:0]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
    y <= res;
  end

endmodule
