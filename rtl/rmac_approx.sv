// rmac_approx: approximate floating point multiply by mantissa addition.
//
// With A = (1+fa)*2^ea and B = (1+fb)*2^eb, the mantissa product (1+fa)(1+fb)
// is replaced by an addition: the FRAC_W-bit fraction fields are added, and
// when the sum overflows (fa + fb >= 1) its carry is added to the exponent
// while the low FRAC_W sum bits become the result fraction. The mantissa is
// thus 1+fa+fb for fa + fb < 1 and 2(fa+fb), with the exponent one higher,
// otherwise (the piecewise-linear approximation known from logarithmic
// multiplication). Examples: 5 x 10 gives 48 (4% low), 50 x -25 gives -1152
// (7.84% low) and 12 x 12 gives 128 (11.1% low, the worst case, reached at
// fa = fb = 0.5). The result is never above the exact product.
//
// The sign is the XOR of the operand signs and the exponent is ea + eb - bias
// + carry. The approximation is only defined for normal operands and a
// normal result: approx_ok is low for a zero, subnormal, infinite or NaN
// operand and for a result exponent outside 1 .. 2^EXP_W-2; the caller then
// uses the exact multiplier (this split is a choice of this design).
//
// Purely combinational. carry and c_frac are brought out for the accuracy
// tuner: carry is the mantissa adder's overflow, c_frac the result fraction
// (the "mantissa C").
module rmac_approx #(
  parameter int unsigned EXP_W  = fp_pkg::FP_EXP_W,
  parameter int unsigned FRAC_W = fp_pkg::FP_FRAC_W,
  localparam int unsigned W     = 1 + EXP_W + FRAC_W
) (
  input  logic [W-1:0]      a,
  input  logic [W-1:0]      b,
  output logic [W-1:0]      y,
  output logic              approx_ok,
  output logic              carry,
  output logic [FRAC_W-1:0] c_frac
);

  localparam int unsigned XW = EXP_W + 2;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;

  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic signed [XW-1:0] ec;
  logic normal_in;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    {carry, c_frac} = {1'b0, fa} + {1'b0, fb};
    ec = XW'(signed'({2'b00, ea})) + XW'(signed'({2'b00, eb})) - XW'(BIAS)
       + XW'(carry);
    normal_in = (ea != '0) && (ea != EXP_MAX) && (eb != '0) && (eb != EXP_MAX);
    approx_ok = normal_in && (ec >= 1) && (ec < XW'(signed'({2'b00, EXP_MAX})));
    y = {sa ^ sb, ec[EXP_W-1:0], c_frac};
  end

endmodule
