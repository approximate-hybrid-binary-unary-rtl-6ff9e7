// hbu_system_top: the applications of approximate HBU computing, side by side.
//
//   * bert_accel: BERT encoder accelerator datapath (MMA, Trimmed GELU and
//     Softmax with HBU units), ports prefixed bert_;
//   * roberts_cross: 8-bit Roberts Cross edge-magnitude kernel with HBU
//     square and square-root units, ports prefixed rc_;
//   * hbu_func_bank: the five benchmark functions at 16 bits, ports
//     prefixed fb_.
// The three share only the clock and reset. Timing of each is given in its
// own module. LayerNorm, the remaining part of an encoder block, is not part
// of this design.
//
// Source: the three parts are the paper's applications; placing them side by
// side in one top is this design's own.
module hbu_system_top import bert_pkg::*; #(
  parameter int N     = 128,
  parameter int NSM   = 80,
  parameter int REUSE = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // BERT accelerator
  input  logic                 bert_w_we,
  input  logic [$clog2(N)-1:0] bert_w_idx,
  input  logic signed [7:0]    bert_w_col [N],
  input  logic                 bert_b_we,
  input  logic signed [31:0]   bert_b_vec [N],
  input  logic                 bert_in_valid,
  output logic                 bert_in_ready,
  input  post_op_e             bert_post_op,
  input  logic signed [7:0]    bert_x [N],
  output logic                 bert_out_valid,
  output logic signed [31:0]   bert_y [N],
  // Roberts Cross
  input  logic                 rc_in_valid,
  input  logic [7:0]           rc_p00,
  input  logic [7:0]           rc_p01,
  input  logic [7:0]           rc_p10,
  input  logic [7:0]           rc_p11,
  output logic                 rc_out_valid,
  output logic [7:0]           rc_g,
  // function bank
  input  logic [15:0]          fb_x_gelu,
  input  logic [15:0]          fb_x_gamma,
  input  logic [15:0]          fb_x_tanh,
  input  logic [15:0]          fb_x_cosh,
  input  logic [15:0]          fb_x_exp,
  output logic [15:0]          fb_y_gelu,
  output logic [15:0]          fb_y_gamma,
  output logic [15:0]          fb_y_tanh,
  output logic [15:0]          fb_y_cosh,
  output logic [15:0]          fb_y_exp
);
  bert_accel #(.N(N), .NSM(NSM), .REUSE(REUSE)) u_bert (
    .clk, .rst_n,
    .w_we(bert_w_we), .w_idx(bert_w_idx), .w_col(bert_w_col),
    .b_we(bert_b_we), .b_vec(bert_b_vec),
    .in_valid(bert_in_valid), .in_ready(bert_in_ready), .post_op(bert_post_op),
    .x(bert_x), .out_valid(bert_out_valid), .y(bert_y)
  );

  roberts_cross u_rc (
    .clk, .rst_n, .in_valid(rc_in_valid),
    .p00(rc_p00), .p01(rc_p01), .p10(rc_p10), .p11(rc_p11),
    .out_valid(rc_out_valid), .g(rc_g)
  );

  hbu_func_bank u_fb (
    .clk,
    .x_gelu(fb_x_gelu), .x_gamma(fb_x_gamma), .x_tanh(fb_x_tanh),
    .x_cosh(fb_x_cosh), .x_exp(fb_x_exp),
    .y_gelu(fb_y_gelu), .y_gamma(fb_y_gamma), .y_tanh(fb_y_tanh),
    .y_cosh(fb_y_cosh), .y_exp(fb_y_exp)
  );
endmodule
