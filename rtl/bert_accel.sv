// bert_accel: BERT encoder accelerator datapath (matrix multiply, GELU, Softmax).
//
// One pass takes an int8 input vector through the matrix-multiply-and-add
// layer (mma_layer) and then, as chosen by the pass's post_op, through the
// Trimmed GELU layer, the Softmax layer, or neither. Repeated passes with
// different weights cover the operations of a whole encoder block (a
// product of length 3072 is, for example, 24 passes of 128). The two
// non-linear layers use approximate HBU units.
//
// How the 32-bit MMA results are read by the non-linear layers is this
// design's choice: as Fixed<1,32,8> by GELU and as Fixed<1,32,12> by
// Softmax (the layers' input formats); Softmax uses the first NSM = 80
// elements. Outputs: raw accumulations (POST_NONE), GELU results in
// Fixed<1,32,8>, or Softmax probabilities in Fixed<0,16,15> zero-extended
// in lanes 0..NSM-1 with the other lanes zero.
//
// Timing: out_valid pulses once per accepted vector. Counting the accepting
// clock edge as the first, the result is registered on edge
// (REUSE + 1) + L + 1, with L = 0 (none), 4 (GELU) or 3 (Softmax): edges 66,
// 70 and 69 at REUSE = 64. Only one pass is in flight
// (the MMA layer is the bottleneck at 65 cycles), so post_op is captured
// with the vector and the layers' results never collide.
//
// Source: the layer sequence and formats follow the paper's BERT
// accelerator; the pass interface, post_op select and single pass in flight
// are this design's own.
module bert_accel import hbu_pkg::*, bert_pkg::*; #(
  parameter int        N         = 128,
  parameter int        NSM       = 80,
  parameter int        REUSE     = 64,
  parameter hbu_plan_t GELU_PLAN = hbu_plans_pkg::GELU16_C2,
  parameter hbu_plan_t EXP_PLAN  = hbu_plans_pkg::SEXP16_C2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   w_we,
  input  logic [$clog2(N)-1:0]   w_idx,
  input  logic signed [7:0]      w_col [N],
  input  logic                   b_we,
  input  logic signed [31:0]     b_vec [N],
  input  logic                   in_valid,
  output logic                   in_ready,
  input  post_op_e               post_op,
  input  logic signed [7:0]      x [N],
  output logic                   out_valid,
  output logic signed [31:0]     y [N]
);
  post_op_e           op_q;
  logic               mma_valid, gelu_in, sm_in, gelu_valid, sm_valid;
  logic signed [31:0] mma_y  [N];
  logic signed [31:0] gelu_y [N];
  logic signed [31:0] sm_x   [NSM];
  logic [15:0]        sm_p   [NSM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) op_q <= POST_NONE;
    else if (in_valid && in_ready) op_q <= post_op;
  end

  mma_layer #(.N_IN(N), .N_OUT(N), .REUSE(REUSE)) u_mma (
    .clk, .rst_n, .w_we, .w_idx, .w_col, .b_we, .b_vec,
    .in_valid, .in_ready, .x, .out_valid(mma_valid), .y(mma_y)
  );

  assign gelu_in = mma_valid && (op_q == POST_GELU);
  assign sm_in   = mma_valid && (op_q == POST_SOFTMAX);

  tgelu_layer #(.N(N), .GELU_PLAN(GELU_PLAN)) u_gelu (
    .clk, .rst_n, .in_valid(gelu_in), .x(mma_y), .out_valid(gelu_valid), .y(gelu_y)
  );

  always_comb for (int i = 0; i < NSM; i++) sm_x[i] = mma_y[i];

  softmax_layer #(.N(NSM), .EXP_PLAN(EXP_PLAN)) u_sm (
    .clk, .rst_n, .in_valid(sm_in), .x(sm_x), .out_valid(sm_valid), .p(sm_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else out_valid <= (mma_valid && op_q == POST_NONE) || gelu_valid || sm_valid;
  end

  always_ff @(posedge clk) begin
    if (gelu_valid) y <= gelu_y;
    else if (sm_valid) begin
      for (int i = 0; i < N; i++) y[i] <= (i < NSM) ? 32'(sm_p[i]) : 32'sd0;
    end else if (mma_valid && op_q == POST_NONE) y <= mma_y;
  end

  initial assert (NSM <= N) else $error("Softmax length exceeds the vector length");
endmodule
