// cfpu_shift_add: second CFPU stage, shift-and-add approximation.
//
// When discarding a mantissa is too inaccurate, the discarded fraction fdisc
// is reduced to its first 1 bit, 2^-k, and the product mantissa is
// approximated by (1+fkeep)(1+2^-k) = (1+fkeep) + ((1+fkeep) >> k): the kept
// mantissa is shifted right by k places and added to itself. A sum of 2 or
// more is shifted right once and the exponent incremented. The bits that are
// left of fdisc after its first 1 (the remainder r) are what this stage
// ignores; its error is below r/(1+fdisc) and so at most half the first
// stage's. The result is accepted (s2_ok) when the first N bits of r are 0,
// the same error bound 2^-N as the first stage. Bits shifted out below the
// fraction are truncated; truncation and the form of the check are choices of
// this design.
//
// s2_ok is also low when normal_in is low or the result exponent leaves the
// normal range. With fdisc = 0 the kept mantissa is returned unchanged (the
// result is then exact). Purely combinational.
module cfpu_shift_add #(
  parameter int unsigned EXP_W  = fp_pkg::FP_EXP_W,
  parameter int unsigned FRAC_W = fp_pkg::FP_FRAC_W,
  localparam int unsigned W     = 1 + EXP_W + FRAC_W,
  localparam int unsigned RW    = $clog2(FRAC_W + 1),
  localparam int unsigned XW    = EXP_W + 2
) (
  input  logic                 sign,
  input  logic signed [XW-1:0] exp_sum,    // ea + eb - bias
  input  logic                 normal_in,
  input  logic [FRAC_W-1:0]    keep_frac,
  input  logic [FRAC_W-1:0]    disc_frac,
  input  logic [RW-1:0]        tune_n,
  output logic [W-1:0]         y,
  output logic                 s2_ok,
  output logic [RW-1:0]        shift       // k, the position of the first 1
);

  localparam int unsigned M = FRAC_W + 1;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;

  logic              found;
  logic [FRAC_W-1:0] rest;       // discarded fraction without its first 1
  logic [M-1:0]      m;          // 1.keep_frac
  logic [M:0]        sum;        // m + (m >> k), value in [1,4)
  logic [FRAC_W-1:0] frac;
  logic signed [XW-1:0] e;
  logic              rest_small;

  always_comb begin
    found = 1'b0;
    shift = '0;
    rest  = disc_frac;
    for (int i = FRAC_W - 1; i >= 0; i--)
      if (!found && disc_frac[i]) begin
        found   = 1'b1;
        shift   = RW'(FRAC_W - i);
        rest[i] = 1'b0;
      end
    m   = {1'b1, keep_frac};
    sum = {1'b0, m} + (found ? ({1'b0, m} >> shift) : '0);
    if (sum[M]) begin
      frac = sum[M-1:1];
      e    = exp_sum + XW'(1);
    end else begin
      frac = sum[M-2:0];
      e    = exp_sum;
    end
    rest_small = 1'b1;
    for (int i = 0; i < FRAC_W; i++)
      if ((FRAC_W - 1 - i) < int'(tune_n) && rest[i]) rest_small = 1'b0;
    s2_ok = normal_in && rest_small
         && (e >= 1) && (e < XW'(signed'({2'b00, EXP_MAX})));
    y = {sign, e[EXP_W-1:0], frac};
  end

endmodule
