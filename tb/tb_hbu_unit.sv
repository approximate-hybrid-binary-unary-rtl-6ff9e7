// tb_hbu_unit: exhaustive test of the approximate HBU function unit.
//
// Three units are swept over every input code: the default unit (exp at 16
// bits, Config. 1), square root at 8 bits in Config. 2 (many sub-functions,
// one core each) and square at 8 bits in Config. 1 (sub-functions sharing
// cores). Each output must match the region/core reference and appear one
// cycle after its input, and the mean absolute error must stay below the
// configuration's bound (0.01 for Config. 1, 0.001 for Config. 2).
//
// Source: the error bounds are the paper's Config. 1/2 targets; the
// reference model is this design's own.
module tb_hbu_unit;
  logic clk = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic d0, d1, d2;
  int   c0, c1, c2, f0, f1, f2;

  hbu_probe #(.PLAN(hbu_plans_pkg::EXP16_C1), .BOUND(0.01),  .NAME("exp16_c1"))
    p0 (.clk(clk), .start(start), .done(d0), .checks(c0), .failures(f0));
  hbu_probe #(.PLAN(hbu_plans_pkg::SQRT8_C2), .BOUND(0.001), .NAME("sqrt8_c2"))
    p1 (.clk(clk), .start(start), .done(d1), .checks(c1), .failures(f1));
  hbu_probe #(.PLAN(hbu_plans_pkg::SQ8_C1),   .BOUND(0.01),  .NAME("sq8_c1"))
    p2 (.clk(clk), .start(start), .done(d2), .checks(c2), .failures(f2));

  initial begin
    repeat (2) @(posedge clk);
    start = 1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
