// tb_tgelu_layer: Trimmed GELU layer at its full size (128 lanes).
//
// Ten vectors on consecutive cycles, mixing lanes below -8 (output 0),
// at or above 8 (output x) and inside [-8, 8) (output GELU(x) from the HBU
// unit), plus the boundary values -8, 8 and just below each. Outputs are
// compared with a floating-point GELU, within 0.06 per element and 0.016
// on average inside the range (Config. 2: mean error below 0.001 of the
// 16-unit range) and exactly outside it, and must appear four cycles
// after their vector. Each of the three cases must occur.
//
// Source: the Trimmed GELU ranges follow the paper; the tolerances are this
// design's own.
module tb_tgelu_layer;
  localparam int N = 128;
  localparam int NV = 10;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [31:0] x [N];
  logic signed [31:0] y [N];
  logic signed [31:0] xs [NV][N];
  int checks = 0, failures = 0, cycle = 0, n_lo = 0, n_hi = 0, n_mid = 0;
  int sent_at [NV];
  real err_sum = 0.0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  tgelu_layer dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  function automatic real gelu(real v);
    return 0.5 * v * (1.0 + hbu_pkg::erf_approx(v / $sqrt(2.0)));
  endfunction

  int got = 0;
  always @(negedge clk) begin
    if (out_valid) begin
      checks++;
      if (cycle - sent_at[got] + 1 != 4) begin
        failures++;
        $display("vector %0d: latency %0d cycles, expected 4", got, cycle - sent_at[got] + 1);
      end
      for (int i = 0; i < N; i++) begin
        logic signed [31:0] xi;
        real r, d;
        xi = xs[got][i];
        checks++;
        if (xi < -2048) begin
          n_lo++;
          if (y[i] != 0) begin failures++; $display("x=%0d: y=%0d, expected 0", xi, y[i]); end
        end else if (xi >= 2048) begin
          n_hi++;
          if (y[i] != xi) begin failures++; $display("x=%0d: y=%0d, expected x", xi, y[i]); end
        end else begin
          n_mid++;
          r = gelu(real'(xi) / 256.0);
          d = real'(y[i]) / 256.0 - r;
          err_sum += (d < 0.0) ? -d : d;
          if (d > 0.06 || d < -0.06) begin
            failures++; $display("x=%f: y=%f, expected %f", real'(xi) / 256.0, real'(y[i]) / 256.0, r);
          end
        end
      end
      got++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int v = 0; v < NV; v++) begin
      for (int i = 0; i < N; i++) begin
        case ($urandom_range(0, 5))
          0: x[i] = -2048 - int'($urandom_range(1, 100000));
          1: x[i] = 2048 + int'($urandom_range(0, 100000));
          default: x[i] = int'($urandom_range(0, 4095)) - 2048;
        endcase
      end
      x[0] = -2048; x[1] = -2049; x[2] = 2047; x[3] = 2048; x[4] = 0; x[5] = -192;
      xs[v] = x;
      in_valid = 1;
      sent_at[v] = cycle + 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (got != NV) begin failures++; $display("received %0d of %0d results", got, NV); end
    checks++;
    if (n_lo == 0 || n_hi == 0 || n_mid == 0) begin failures++; $display("a range was never used"); end
    checks++;
    if (err_sum / real'(n_mid) > 0.016) begin failures++; $display("mean error too large"); end
    $display("mean absolute error inside [-8, 8): %f", err_sum / real'(n_mid));
    $display("lanes below -8: %0d, at or above 8: %0d, inside: %0d", n_lo, n_hi, n_mid);
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
