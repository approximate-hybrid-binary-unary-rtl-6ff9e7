// tb_unary_core: scaling-network test on a non-monotonic sub-function.
//
// The core implements GELU at 8 bits over x in [-4, 0) (inputs 64..127)
// with the upper 4 output bits forced to 7. GELU falls and then rises there,
// so output wires need XOR gates. For every input the core's output must be
// a thermometer code whose value equals the reference sub-function, computed
// here from the function definition. The test also counts the input steps
// where the sub-function falls, to be sure the XOR path was exercised.
//
// Source: triggering points with XOR gates follow the paper; the chosen GELU
// piece is this design's own.
module tb_unary_core import hbu_pkg::*;;
  int checks = 0, failures = 0, falls = 0;
  logic [5:0]  t;
  logic [62:0] x_u;
  logic [14:0] f_u;

  therm_encoder #(.W(6)) enc (.x(t), .u(x_u));
  unary_core #(.FUNC(F_GELU), .W(8), .K(4), .LEN(6), .REP_START(64), .REP_UB(7))
    dut (.x_u(x_u), .f_u(f_u));

  initial begin
    int g, gp;
    gp = 0;
    for (int v = 0; v < 64; v++) begin
      t = 6'(v); #1;
      g = g_eval(F_GELU, 8, 4, 64 + v, 7);
      if (v > 0 && g < gp) falls++;
      gp = g;
      checks++;
      if (f_u != 15'((1 << g) - 1)) begin
        failures++;
        $display("t=%0d f_u=%b expected %0d ones", v, f_u, g);
      end
    end
    checks++;
    if (falls == 0) begin failures++; $display("sub-function never falls"); end
    $display("falling steps: %0d", falls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
