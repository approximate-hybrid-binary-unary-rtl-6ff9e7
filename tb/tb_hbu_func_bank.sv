// tb_hbu_func_bank: the five benchmark units in both plan sets, every fifth
// input code.
//
// Two banks are instantiated, CFG=1 and CFG=2. All ten units get a new
// input each cycle; each output is checked one cycle later (registered
// output) against the exact function code. The mean absolute error of each
// function, as a fraction of the output range, must be below 0.01 for
// Config. 1 and below 0.001 for Config. 2, the paper's two error targets.
// Config. 2 must also be more accurate than Config. 1 for every function.
module tb_hbu_func_bank import hbu_pkg::*;;
  logic clk = 0;
  logic [15:0] x;
  logic [15:0] y1 [5], y2 [5];
  int checks = 0, failures = 0, n = 0;
  real err1 [5], err2 [5];

  always #5 clk = ~clk;

  hbu_func_bank #(.CFG(1)) dut1 (.clk, .x_gelu(x), .x_gamma(x), .x_tanh(x), .x_cosh(x), .x_exp(x),
                                 .y_gelu(y1[0]), .y_gamma(y1[1]), .y_tanh(y1[2]), .y_cosh(y1[3]), .y_exp(y1[4]));
  hbu_func_bank #(.CFG(2)) dut2 (.clk, .x_gelu(x), .x_gamma(x), .x_tanh(x), .x_cosh(x), .x_exp(x),
                                 .y_gelu(y2[0]), .y_gamma(y2[1]), .y_tanh(y2[2]), .y_cosh(y2[3]), .y_exp(y2[4]));

  function automatic real ae(int y, func_e fn, int u);
    int d;
    d = y - f_eval(fn, 16, u);
    return real'((d < 0) ? -d : d);
  endfunction

  initial begin
    const func_e fns [5] = '{F_GELU, F_GAMMA, F_TANH, F_COSH, F_EXP};
    for (int k = 0; k < 5; k++) begin err1[k] = 0.0; err2[k] = 0.0; end
    for (int u = 0; u < 65536; u += 5) begin
      @(negedge clk);
      x = 16'(u);
      @(negedge clk);
      for (int k = 0; k < 5; k++) begin
        err1[k] += ae(y1[k], fns[k], u);
        err2[k] += ae(y2[k], fns[k], u);
      end
      n++;
    end
    for (int k = 0; k < 5; k++) begin
      real m1, m2;
      m1 = err1[k] / n / 65536.0;
      m2 = err2[k] / n / 65536.0;
      $display("%s: mean absolute error Config.1 %g, Config.2 %g", fns[k].name(), m1, m2);
      checks += 3;
      if (!(m1 < 0.01))  begin failures++; $display("  Config.1 above 0.01"); end
      if (!(m2 < 0.001)) begin failures++; $display("  Config.2 above 0.001"); end
      if (!(m2 < m1))    begin failures++; $display("  Config.2 not better than Config.1"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
