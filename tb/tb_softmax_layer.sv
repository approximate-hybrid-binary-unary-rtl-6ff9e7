// tb_softmax_layer: Softmax layer at its full size (80 lanes).
//
// Twelve vectors are sent on consecutive cycles. Their values are random
// Fixed<1,32,12> numbers around a random offset, with some lanes pushed far
// below the maximum so that their exponential is dropped to zero. Every
// output is compared with a floating-point softmax of the same vector (with
// the same rule that exp(d) = 0 for d < -8), within 0.01 in probability;
// the outputs of a vector must sum to 1 within 0.02; and each result must
// appear exactly three cycles after its vector.
//
// Source: the Softmax formats follow the paper; the 0.01 tolerance is this
// design's own.
module tb_softmax_layer;
  localparam int N = 80;
  localparam int NV = 12;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [31:0] x [N];
  logic [15:0] p [N];
  int checks = 0, failures = 0, clipped = 0, cycle = 0;
  int sent_at [NV];
  real ref_p [NV][N];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  softmax_layer dut (.clk, .rst_n, .in_valid, .x, .out_valid, .p);

  task automatic make_vector(int v);
    real e [N];
    real s, m;
    int  off;
    off = int'($urandom_range(0, 400000)) - 200000;
    for (int i = 0; i < N; i++) begin
      x[i] = off + int'($urandom_range(0, 6 * 4096)) - 3 * 4096;
      if ($urandom_range(0, 9) == 0) x[i] = x[i] - 12 * 4096;
    end
    m = -1.0e30;
    for (int i = 0; i < N; i++) if (real'(x[i]) > m) m = real'(x[i]);
    s = 0.0;
    for (int i = 0; i < N; i++) begin
      real d;
      d = (real'(x[i]) - m) / 4096.0;
      e[i] = (d < -8.0) ? 0.0 : $exp(d);
      if (d < -8.0) clipped++;
      s += e[i];
    end
    for (int i = 0; i < N; i++) ref_p[v][i] = e[i] / s;
  endtask

  int got = 0;
  always @(negedge clk) begin
    if (out_valid) begin
      real s;
      s = 0.0;
      checks++;
      if (cycle - sent_at[got] + 1 != 3) begin
        failures++;
        $display("vector %0d: latency %0d cycles, expected 3", got, cycle - sent_at[got] + 1);
      end
      for (int i = 0; i < N; i++) begin
        real pr, d;
        pr = real'(p[i]) / 32768.0;
        s += pr;
        d = pr - ref_p[got][i];
        checks++;
        if (d > 0.01 || d < -0.01) begin
          failures++;
          $display("vector %0d lane %0d: p=%f expected %f", got, i, pr, ref_p[got][i]);
        end
      end
      checks++;
      if (s > 1.02 || s < 0.98) begin
        failures++; $display("vector %0d: probabilities sum to %f", got, s);
      end
      got++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int v = 0; v < NV; v++) begin
      make_vector(v);
      in_valid = 1;
      sent_at[v] = cycle + 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (got != NV) begin failures++; $display("received %0d of %0d results", got, NV); end
    checks++;
    if (clipped == 0) begin failures++; $display("no lane was below -8"); end
    $display("lanes dropped to zero: %0d", clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
