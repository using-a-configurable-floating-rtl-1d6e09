// fp_pkg: constants and types shared by the approximate floating point
// multipliers.
//
// The default number format is IEEE-754 single precision (1 sign bit, 8
// exponent bits, 23 fraction bits). The modules take the exponent and
// fraction widths as parameters, so that narrower formats (for example
// half precision, 5 + 10 bits) can be built as well; these defaults are the
// ones every module uses.
//
// res_path_e tags each result with the hardware that produced it, so that a
// user can count how often the cheap approximate paths were taken (the "hit
// rate" of the multiplier).
package fp_pkg;

  localparam int unsigned FP_EXP_W  = 8;   // IEEE-754 single precision
  localparam int unsigned FP_FRAC_W = 23;  // stored fraction bits

  // Which datapath produced a result.
  typedef enum logic [1:0] {
    PATH_APPROX1 = 2'd0,  // RMAC mantissa addition, or CFPU mantissa discarding
    PATH_APPROX2 = 2'd1,  // CFPU shift-and-add (second stage)
    PATH_EXACT   = 2'd2   // precise IEEE-754 multiplier
  } res_path_e;

endpackage
