// tb_therm_encoder: exhaustive test of the thermometer encoder at W=3 and
// W=6. Every output must have exactly x ones, packed at the low end.
//
// Source: tests a part named by the paper; the stimuli are this design's
// own.
module tb_therm_encoder;
  int checks = 0, failures = 0;
  logic [2:0] x3;  logic [6:0]  u3;
  logic [5:0] x6;  logic [62:0] u6;

  therm_encoder #(.W(3)) d3 (.x(x3), .u(u3));
  therm_encoder #(.W(6)) d6 (.x(x6), .u(u6));

  initial begin
    for (int v = 0; v < 8; v++) begin
      x3 = 3'(v); #1;
      checks++;
      if (u3 != 7'((1 << v) - 1)) begin failures++; $display("W=3 x=%0d u=%b", v, u3); end
    end
    for (int v = 0; v < 64; v++) begin
      x6 = 6'(v); #1;
      checks++;
      if (u6 != 63'((64'd1 << v) - 1)) begin failures++; $display("W=6 x=%0d u=%b", v, u6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
