// tb_roberts_cross: edge-magnitude kernel on random and extreme windows.
//
// The reference is sqrt(min(255, Gx^2/256 + Gy^2/256) * 256) in floating
// point. Each result must be within 16 codes of it, the mean error must be
// below 4 codes, and each result must come one cycle after its window.
// Windows whose squared gradients exceed the range (saturation) must occur.
//
// Source: the Roberts Cross formula follows the paper; the 16-code and mean
// tolerances are this design's own.
module tb_roberts_cross;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [7:0] p00, p01, p10, p11, g;
  int checks = 0, failures = 0, saturated = 0, n = 0;
  real err_sum = 0.0;

  always #5 clk = ~clk;

  roberts_cross dut (.clk, .rst_n, .in_valid, .p00, .p01, .p10, .p11, .out_valid, .g);

  function automatic real ref_g(int a, int b, int c, int d);
    real gx, gy, s;
    gx = real'(a - d); gy = real'(b - c);
    s = gx * gx / 256.0 + gy * gy / 256.0;
    if (s > 255.0) s = 255.0;
    return $sqrt(s * 256.0);
  endfunction

  initial begin
    real r, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i < 4) begin
        p00 = (i[0]) ? 8'd255 : 8'd0; p11 = 8'd255 - p00;
        p01 = (i[1]) ? 8'd255 : 8'd0; p10 = 8'd255 - p01;
      end else if (i % 3 == 0) begin
        p00 = 8'($urandom); p01 = 8'($urandom); p10 = 8'($urandom); p11 = 8'($urandom);
      end else begin
        p00 = 8'($urandom_range(100, 140)); p01 = 8'($urandom_range(100, 140));
        p10 = 8'($urandom_range(100, 140)); p11 = 8'($urandom_range(100, 140));
      end
      in_valid = 1;
      r = ref_g(p00, p01, p10, p11);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("no result one cycle after the window"); end
      e = real'(g) - r;
      if (e < 0.0) e = -e;
      err_sum += e; n++;
      if (r >= 255.0) saturated++;
      checks++;
      if (e > 16.0) begin
        failures++;
        $display("window %0d %0d %0d %0d: g=%0d expected %f", p00, p01, p10, p11, g, r);
      end
    end
    checks++;
    if (err_sum / n > 4.0) begin failures++; $display("mean error %f", err_sum / n); end
    checks++;
    if (saturated == 0) begin failures++; $display("no saturated window"); end
    $display("mean error %f codes, saturated windows %0d", err_sum / n, saturated);
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
