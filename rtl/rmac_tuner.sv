// rmac_tuner: run-time accuracy check of the mantissa-addition approximation.
//
// The error of mantissa addition is fa*fb / ((1+fa)(1+fb)) and is largest when
// both fractions are near 0.5. It can be bounded from the leading fraction
// bits of the operands (A23, B23: the first bit after the hidden 1) and from
// the run of equal bits at the top of the approximate result fraction C:
//   case 1, A23 = B23 = 1: the critical pattern is a run of 0s in C
//           (fa + fb just above 1);
//   case 2, A23 = B23 = 0: the critical pattern is a run of 1s in C
//           (fa + fb just below 1);
//   case 3, A23 != B23  : the critical pattern is a run of copies of C23,
//           the first bit of C.
// The longer the run, the larger the possible error. With N tuning bits the
// approximation is rejected (need_exact = 1) when the run is N bits or longer;
// N = 0 switches tuning off and every approximation is accepted. So N = 1 is
// the most accurate setting and larger N accept more approximations; this
// reading makes 50 x -25 (C = .0010..., a run of two 0s) exact at N = 1 and
// approximate at N = 5, the method's worked example.
//
// Purely combinational. run_len is the run length (0 .. FRAC_W), brought out
// for observation.
module rmac_tuner #(
  parameter int unsigned FRAC_W = fp_pkg::FP_FRAC_W,
  localparam int unsigned RW    = $clog2(FRAC_W + 1)
) (
  input  logic              a_msb,      // A23: first fraction bit of A
  input  logic              b_msb,      // B23: first fraction bit of B
  input  logic [FRAC_W-1:0] c_frac,     // approximate result fraction
  input  logic [RW-1:0]     tune_n,     // N tuning bits, 0 = tuning off
  output logic [RW-1:0]     run_len,
  output logic              need_exact
);

  logic pattern;        // the bit value whose leading run is measured
  logic [FRAC_W-1:0] x; // c_frac with pattern bits turned into 1s
  logic stop;

  always_comb begin
    unique case ({a_msb, b_msb})
      2'b11:   pattern = 1'b0;                 // case 1
      2'b00:   pattern = 1'b1;                 // case 2
      default: pattern = c_frac[FRAC_W-1];     // case 3
    endcase
    x = pattern ? c_frac : ~c_frac;
    // count leading 1s of x
    run_len = '0;
    stop    = 1'b0;
    for (int i = FRAC_W - 1; i >= 0; i--) begin
      if (!stop && x[i]) run_len = run_len + RW'(1);
      else               stop    = 1'b1;
    end
    need_exact = (tune_n != '0) && (run_len >= tune_n);
  end

endmodule
