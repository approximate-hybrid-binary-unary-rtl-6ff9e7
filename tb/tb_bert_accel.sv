// tb_bert_accel: the BERT accelerator datapath at full size.
//
// Random small weights and biases are loaded, then passes are run with each
// post-operation: raw MMA results (checked exactly), Trimmed GELU (within
// 0.06, exact outside [-8, 8)) and Softmax on the first 80 lanes (within
// 0.01, other lanes zero), each against a reference computed here from the
// same weights. Latencies: 66, 70 and 69 cycles. Every post-operation, GELU
// lanes in all three ranges, Softmax lanes dropped below -8 and the
// accelerator refusing input while busy must all occur.
//
// Source: formats and layers follow the paper; the stimuli, tolerances and
// mechanism counts are this design's own.
module tb_bert_accel;
  localparam int N = 128;
  localparam int NSM = 80;
  logic clk = 0, rst_n = 0;
  logic w_we = 0, b_we = 0, in_valid = 0, in_ready, out_valid;
  logic [6:0] w_idx;
  logic signed [7:0]  w_col [N];
  logic signed [31:0] b_vec [N];
  logic signed [7:0]  x [N];
  logic signed [31:0] y [N];
  logic signed [7:0]  wm [N][N];
  bert_pkg::post_op_e post_op = bert_pkg::POST_NONE;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bert_accel dut (.clk, .rst_n, .w_we, .w_idx, .w_col, .b_we, .b_vec,
                  .in_valid, .in_ready, .post_op, .x, .out_valid, .y);

  `include "bert_pass.svh"

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_weights(3, 0);
    load_bias(4000);
    run_pass(bert_pkg::POST_NONE, 40, 66);
    run_pass(bert_pkg::POST_GELU, 20, 70);
    run_pass(bert_pkg::POST_GELU, 20, 70);
    load_bias(60000);
    run_pass(bert_pkg::POST_SOFTMAX, 30, 69);
    run_pass(bert_pkg::POST_SOFTMAX, 30, 69);
    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0) begin failures++; $display("a post-operation never ran"); end
    checks++;
    if (n_lo == 0 || n_hi == 0 || n_mid == 0) begin failures++; $display("GELU range missed: %0d %0d %0d", n_lo, n_hi, n_mid); end
    checks++;
    if (n_clip == 0) begin failures++; $display("no Softmax lane below -8"); end
    checks++;
    if (n_busy == 0) begin failures++; $display("never busy"); end
    $display("passes none/gelu/softmax: %0d/%0d/%0d; gelu lanes lo/hi/mid %0d/%0d/%0d; softmax zeroed %0d; busy %0d",
             n_mode[0], n_mode[1], n_mode[2], n_lo, n_hi, n_mid, n_clip, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
