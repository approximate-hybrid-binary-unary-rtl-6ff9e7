// tb_hbu_system_top: end-to-end run of the whole design at its default size.
//
// While the BERT accelerator runs passes with every post-operation (raw,
// Trimmed GELU, Softmax) against references computed here, the Roberts
// Cross kernel processes a 32x32 synthetic image (a bright square, a
// diagonal ramp and full-contrast steps) one window per cycle, and the
// function bank is fed random codes for all five functions. Checked: every
// BERT output as in tb_bert_accel; every edge pixel within 16 codes of a
// floating-point reference with a PSNR of at least 25 dB; the function bank's
// mean absolute error below 0.01 per function. Each mechanism must happen:
// every post-operation, GELU lanes below, above and inside [-8, 8), Softmax
// lanes dropped to zero, the accelerator refusing input while busy, and
// saturated edge magnitudes.
//
// Source: the workloads mirror the paper's applications; the synthetic
// image, tolerances and PSNR floor are this design's own.
module tb_hbu_system_top import hbu_pkg::*;;
  localparam int N = 128;
  localparam int NSM = 80;
  localparam int IMG = 32;
  logic clk = 0, rst_n = 0;
  logic w_we = 0, b_we = 0, in_valid = 0, in_ready, out_valid;
  logic [6:0] w_idx;
  logic signed [7:0]  w_col [N];
  logic signed [31:0] b_vec [N];
  logic signed [7:0]  x [N];
  logic signed [31:0] y [N];
  logic signed [7:0]  wm [N][N];
  bert_pkg::post_op_e post_op = bert_pkg::POST_NONE;
  logic rc_in_valid = 0, rc_out_valid;
  logic [7:0] p00, p01, p10, p11, rc_g;
  logic [15:0] fx [5];
  logic [15:0] fy [5];
  int checks = 0, failures = 0;
  bit bert_done = 0, rc_done = 0, fb_done = 0;

  always #5 clk = ~clk;

  hbu_system_top dut (
    .clk, .rst_n,
    .bert_w_we(w_we), .bert_w_idx(w_idx), .bert_w_col(w_col), .bert_b_we(b_we), .bert_b_vec(b_vec),
    .bert_in_valid(in_valid), .bert_in_ready(in_ready), .bert_post_op(post_op), .bert_x(x),
    .bert_out_valid(out_valid), .bert_y(y),
    .rc_in_valid, .rc_p00(p00), .rc_p01(p01), .rc_p10(p10), .rc_p11(p11),
    .rc_out_valid, .rc_g,
    .fb_x_gelu(fx[0]), .fb_x_gamma(fx[1]), .fb_x_tanh(fx[2]), .fb_x_cosh(fx[3]), .fb_x_exp(fx[4]),
    .fb_y_gelu(fy[0]), .fb_y_gamma(fy[1]), .fb_y_tanh(fy[2]), .fb_y_cosh(fy[3]), .fb_y_exp(fy[4])
  );

  `include "bert_pass.svh"

  // BERT accelerator
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_weights(3, 0);
    load_bias(4000);
    run_pass(bert_pkg::POST_NONE, 40, 66);
    run_pass(bert_pkg::POST_GELU, 20, 70);
    load_bias(60000);
    run_pass(bert_pkg::POST_SOFTMAX, 30, 69);
    bert_done = 1;
  end

  // Roberts Cross over a synthetic image
  function automatic int pix(int r, int c);
    if (r >= 8 && r < 20 && c >= 8 && c < 20) return 240;
    if (c >= 26) return (r % 2 == 0) ? 255 : 0;
    return (r + c) * 3;
  endfunction

  initial begin
    int sat = 0, n = 0;
    real se = 0.0, psnr;
    repeat (4) @(posedge clk);
    for (int r = 0; r < IMG - 1; r++)
      for (int c = 0; c < IMG - 1; c++) begin
        real gx, gy, s, ref_v, e;
        @(negedge clk);
        p00 = 8'(pix(r, c)); p01 = 8'(pix(r, c + 1));
        p10 = 8'(pix(r + 1, c)); p11 = 8'(pix(r + 1, c + 1));
        rc_in_valid = 1;
        gx = real'(pix(r, c) - pix(r + 1, c + 1));
        gy = real'(pix(r, c + 1) - pix(r + 1, c));
        s = (gx * gx + gy * gy) / 256.0;
        if (s > 255.0) begin s = 255.0; sat++; end
        ref_v = $sqrt(s * 256.0);
        @(negedge clk);
        rc_in_valid = 0;
        checks++;
        e = real'(rc_g) - ref_v;
        se += e * e; n++;
        if (!rc_out_valid || e > 16.0 || e < -16.0) begin
          failures++; $display("pixel %0d,%0d: g=%0d expected %f", r, c, rc_g, ref_v);
        end
      end
    psnr = 10.0 * $log10(255.0 * 255.0 / (se / n + 1.0e-9));
    checks++;
    if (psnr < 25.0) begin failures++; $display("PSNR %f dB too low", psnr); end
    checks++;
    if (sat == 0) begin failures++; $display("no saturated edge"); end
    $display("edge image: PSNR %f dB, saturated pixels %0d", psnr, sat);
    rc_done = 1;
  end

  // Function bank
  initial begin
    const func_e fns [5] = '{F_GELU, F_GAMMA, F_TANH, F_COSH, F_EXP};
    real err [5];
    int  u [5];
    for (int k = 0; k < 5; k++) err[k] = 0.0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int k = 0; k < 5; k++) begin u[k] = int'($urandom_range(0, 65535)); fx[k] = 16'(u[k]); end
      @(negedge clk);
      for (int k = 0; k < 5; k++) begin
        int d;
        d = int'(fy[k]) - f_eval(fns[k], 16, u[k]);
        err[k] += real'((d < 0) ? -d : d);
      end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (!(err[k] / 2000.0 / 65536.0 < 0.01)) begin failures++; $display("%s: error too large", fns[k].name()); end
    end
    fb_done = 1;
  end

  initial begin
    wait (bert_done && rc_done && fb_done);
    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0) begin failures++; $display("a post-operation never ran"); end
    checks++;
    if (n_lo == 0 || n_hi == 0 || n_mid == 0) begin failures++; $display("GELU range missed"); end
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
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
