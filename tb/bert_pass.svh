// Shared by the BERT testbenches: load weights, run one pass through the
// accelerator ports named below and check it against a reference computed
// here. Expects: clk, the accelerator's ports (w_we, w_idx, w_col, b_we,
// b_vec, in_valid, in_ready, post_op, x, out_valid, y), counters checks,
// failures, and N, NSM.
//
// Source: formats follow the paper; these shared test tasks are this
// design's own.
int n_mode [3];
int n_clip = 0, n_lo = 0, n_hi = 0, n_mid = 0, n_busy = 0;

task automatic load_weights(int wmax, int seed_unused);
  for (int i = 0; i < N; i++) begin
    @(negedge clk);
    for (int j = 0; j < N; j++) begin
      wm[i][j] = 8'(int'($urandom_range(0, 2 * wmax)) - wmax);
      w_col[j] = wm[i][j];
    end
    w_we = 1; w_idx = $bits(w_idx)'(i);
  end
  @(negedge clk);
  w_we = 0;
endtask

task automatic load_bias(int bmax);
  @(negedge clk);
  for (int j = 0; j < N; j++) b_vec[j] = int'($urandom_range(0, 2 * bmax)) - bmax;
  b_we = 1;
  @(negedge clk);
  b_we = 0;
endtask

function automatic real gelu_ref(real v);
  return 0.5 * v * (1.0 + hbu_pkg::erf_approx(v / $sqrt(2.0)));
endfunction

task automatic run_pass(bert_pkg::post_op_e op, int xmax, int exp_lat);
  logic signed [31:0] acc [N];
  real e [N];
  real m, s;
  int lat;
  for (int i = 0; i < N; i++) x[i] = 8'(int'($urandom_range(0, 2 * xmax)) - xmax);
  for (int j = 0; j < N; j++) begin
    acc[j] = b_vec[j];
    for (int i = 0; i < N; i++) acc[j] += 32'(wm[i][j]) * 32'(x[i]);
  end
  @(negedge clk);
  post_op = op;
  in_valid = 1;
  @(posedge clk);
  lat = 0;
  do begin
    @(negedge clk);
    lat++;
    if (lat == 1) begin
      in_valid = 0;
      if (!in_ready) n_busy++;
    end
  end while (!out_valid && lat < 300);
  n_mode[int'(op)]++;
  checks++;
  if (lat != exp_lat) begin
    failures++; $display("post_op %s: latency %0d, expected %0d", op.name(), lat, exp_lat);
  end
  case (op)
    bert_pkg::POST_NONE:
      for (int j = 0; j < N; j++) begin
        checks++;
        if (y[j] != acc[j]) begin failures++; $display("lane %0d: %0d expected %0d", j, y[j], acc[j]); end
      end
    bert_pkg::POST_GELU:
      for (int j = 0; j < N; j++) begin
        real r, d;
        checks++;
        if (acc[j] < -2048) begin
          n_lo++;
          if (y[j] != 0) begin failures++; $display("gelu lane %0d: %0d expected 0", j, y[j]); end
        end else if (acc[j] >= 2048) begin
          n_hi++;
          if (y[j] != acc[j]) begin failures++; $display("gelu lane %0d: %0d expected %0d", j, y[j], acc[j]); end
        end else begin
          n_mid++;
          r = gelu_ref(real'(acc[j]) / 256.0);
          d = real'(y[j]) / 256.0 - r;
          if (d > 0.06 || d < -0.06) begin
            failures++; $display("gelu lane %0d: %f expected %f", j, real'(y[j]) / 256.0, r);
          end
        end
      end
    default: begin
      m = -1.0e30;
      for (int j = 0; j < NSM; j++) if (real'(acc[j]) > m) m = real'(acc[j]);
      s = 0.0;
      for (int j = 0; j < NSM; j++) begin
        real d;
        d = (real'(acc[j]) - m) / 4096.0;
        e[j] = (d < -8.0) ? 0.0 : $exp(d);
        if (d < -8.0) n_clip++;
        s += e[j];
      end
      for (int j = 0; j < N; j++) begin
        real pr, d;
        checks++;
        if (j >= NSM) begin
          if (y[j] != 0) begin failures++; $display("softmax lane %0d not zero", j); end
        end else begin
          pr = real'(y[j]) / 32768.0;
          d = pr - e[j] / s;
          if (d > 0.01 || d < -0.01) begin
            failures++; $display("softmax lane %0d: %f expected %f", j, pr, e[j] / s);
          end
        end
      end
    end
  endcase
endtask
