// hbu_func_bank: the five benchmark functions as approximate HBU units.
//
//   GELU(x)                    on Fixed<1,16,12> in [-8, 8), offset binary
//   gamma(x) = x^0.45          on 16-bit unit-interval codes
//   tanh'(x) = (1 + tanh(4(2x - 1))) / 2
//   cosh'(x) = cosh(x) - 1
//   exp'(x)  = e^(x - 1)
// Each unit is independent, 16-bit in and out, with a registered output:
// one cycle from input to output. CFG selects the plan set: 1 for the
// paper's Config. 1 (mean absolute error below 0.01), 2 for Config. 2
// (below 0.001, more regions and cores). Any other plan of the same width
// can be given instead. The plans themselves are this design's own (the
// paper does not give its division parameters).
module hbu_func_bank import hbu_pkg::*; #(
  parameter int        CFG        = 1,
  parameter hbu_plan_t GELU_PLAN  = (CFG == 2) ? hbu_plans_pkg::GELU16_C2  : hbu_plans_pkg::GELU16_C1,
  parameter hbu_plan_t GAMMA_PLAN = (CFG == 2) ? hbu_plans_pkg::GAMMA16_C2 : hbu_plans_pkg::GAMMA16_C1,
  parameter hbu_plan_t TANH_PLAN  = (CFG == 2) ? hbu_plans_pkg::TANH16_C2  : hbu_plans_pkg::TANH16_C1,
  parameter hbu_plan_t COSH_PLAN  = (CFG == 2) ? hbu_plans_pkg::COSH16_C2  : hbu_plans_pkg::COSH16_C1,
  parameter hbu_plan_t EXP_PLAN   = (CFG == 2) ? hbu_plans_pkg::EXP16_C2   : hbu_plans_pkg::EXP16_C1
) (
  input  logic        clk,
  input  logic [15:0] x_gelu,  input  logic [15:0] x_gamma,
  input  logic [15:0] x_tanh,  input  logic [15:0] x_cosh,
  input  logic [15:0] x_exp,
  output logic [15:0] y_gelu,  output logic [15:0] y_gamma,
  output logic [15:0] y_tanh,  output logic [15:0] y_cosh,
  output logic [15:0] y_exp
);
  initial assert (CFG == 1 || CFG == 2) else $error("hbu_func_bank: CFG must be 1 or 2");

  hbu_unit #(.PLAN(GELU_PLAN))  u_gelu  (.clk(clk), .x(x_gelu),  .y(y_gelu));
  hbu_unit #(.PLAN(GAMMA_PLAN)) u_gamma (.clk(clk), .x(x_gamma), .y(y_gamma));
  hbu_unit #(.PLAN(TANH_PLAN))  u_tanh  (.clk(clk), .x(x_tanh),  .y(y_tanh));
  hbu_unit #(.PLAN(COSH_PLAN))  u_cosh  (.clk(clk), .x(x_cosh),  .y(y_cosh));
  hbu_unit #(.PLAN(EXP_PLAN))   u_exp   (.clk(clk), .x(x_exp),   .y(y_exp));
endmodule
