// hbu_probe: testbench helper that sweeps every input code of one HBU unit.
//
// For each input it checks, one clock after applying it, that the unit
// returns the value of a behavioural reference: the fixed upper bits of the
// input's region concatenated with the truncated sub-function of the core
// that region uses, the latter computed directly from the function
// definition. It also accumulates the mean absolute error against the exact
// function and checks it against the error bound the plan was built for.
//
// Source: the error bounds are the paper's Config. 1/2 targets; the probe
// itself is this design's own test code.
module hbu_probe import hbu_pkg::*; #(
  parameter hbu_plan_t PLAN  = hbu_plans_pkg::EXP16_C1,
  parameter real       BOUND = 0.01,
  parameter string     NAME  = "unit"
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int W = PLAN.w;
  logic [W-1:0] x, y;

  hbu_unit #(.PLAN(PLAN)) dut (.clk(clk), .x(x), .y(y));

  function automatic int ref_out(int u);
    int r, c, rep, off;
    for (r = 0; r < PLAN.nreg; r++)
      if (u >= int'(PLAN.reg_start[r]) && u < int'(PLAN.reg_start[r]) + (1 << PLAN.reg_len[r])) break;
    c   = int'(PLAN.reg_core[r]);
    rep = int'(PLAN.core_rep[c]);
    off = u - int'(PLAN.reg_start[r]);
    return (int'(PLAN.reg_ub[r]) << (W - PLAN.k)) |
           g_eval(PLAN.func, W, PLAN.k, int'(PLAN.reg_start[rep]) + off, int'(PLAN.reg_ub[rep]));
  endfunction

  initial begin
    real err_sum, mae;
    int  max_err, e, mism;
    done = 0; checks = 0; failures = 0; x = '0;
    err_sum = 0.0; max_err = 0; mism = 0;
    wait (start);
    for (int u = 0; u < 2 ** W; u++) begin
      @(negedge clk) x = W'(u);
      @(posedge clk) #1;
      checks++;
      if (int'(y) != ref_out(u)) begin
        failures++; mism++;
        if (mism <= 5) $display("%s: x=%0d y=%0d expected %0d", NAME, u, y, ref_out(u));
      end
      e = int'(y) - f_eval(PLAN.func, W, u);
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
      err_sum += real'(e);
    end
    mae = err_sum / (2.0 ** W) / (2.0 ** W);
    checks++;
    if (!(mae < BOUND)) begin
      failures++;
      $display("%s: mean absolute error %g not below %g", NAME, mae, BOUND);
    end
    $display("%s: %0d inputs, mean absolute error %g, max error %0d codes", NAME, 2 ** W, mae, max_err);
    done = 1;
  end
endmodule
