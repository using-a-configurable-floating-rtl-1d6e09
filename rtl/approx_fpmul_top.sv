// approx_fpmul_top: the two tunable approximate floating point multipliers
// side by side.
//
// The design offers two ways of trading multiplication accuracy for energy
// and delay at run time, each backed by its own precise IEEE-754 multiplier:
//   RMAC (rmac): mantissa addition in place of mantissa multiplication,
//        checked by an accuracy tuner with N tuning bits;
//   CFPU (cfpu): mantissa discarding, then shift-and-add, with an error
//        bound of 2^-N.
// Each unit has its own operand/result handshake and configuration, so a
// host (for example a GPU's floating point lanes) can drive either or both.
// All ports are those of the two units, prefixed rmac_ and cfpu_; see rmac.sv
// and cfpu.sv for the timing.
module approx_fpmul_top #(
  parameter int unsigned EXP_W  = fp_pkg::FP_EXP_W,
  parameter int unsigned FRAC_W = fp_pkg::FP_FRAC_W,
  localparam int unsigned W     = 1 + EXP_W + FRAC_W,
  localparam int unsigned RW    = $clog2(FRAC_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // RMAC
  input  logic [RW-1:0]     rmac_tune_n,
  input  logic              rmac_in_valid,
  output logic              rmac_in_ready,
  input  logic [W-1:0]      rmac_a,
  input  logic [W-1:0]      rmac_b,
  output logic              rmac_out_valid,
  output logic [W-1:0]      rmac_y,
  output fp_pkg::res_path_e rmac_out_path,
  // CFPU
  input  logic [RW-1:0]     cfpu_tune_n,
  input  logic              cfpu_two_stage,
  input  logic              cfpu_in_valid,
  output logic              cfpu_in_ready,
  input  logic [W-1:0]      cfpu_a,
  input  logic [W-1:0]      cfpu_b,
  output logic              cfpu_out_valid,
  output logic [W-1:0]      cfpu_y,
  output fp_pkg::res_path_e cfpu_out_path
);

  rmac #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_rmac (
    .clk(clk), .rst_n(rst_n), .tune_n(rmac_tune_n),
    .in_valid(rmac_in_valid), .in_ready(rmac_in_ready), .a(rmac_a), .b(rmac_b),
    .out_valid(rmac_out_valid), .y(rmac_y), .out_path(rmac_out_path)
  );

  cfpu #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_cfpu (
    .clk(clk), .rst_n(rst_n), .tune_n(cfpu_tune_n), .two_stage(cfpu_two_stage),
    .in_valid(cfpu_in_valid), .in_ready(cfpu_in_ready), .a(cfpu_a), .b(cfpu_b),
    .out_valid(cfpu_out_valid), .y(cfpu_y), .out_path(cfpu_out_path)
  );

endmodule
