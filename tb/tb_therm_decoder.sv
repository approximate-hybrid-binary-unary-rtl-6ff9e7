// tb_therm_decoder: the decoder must return the number of high wires, for
// every thermometer code at W=2 and W=5 and for random unary codes at W=5.
//
// Source: tests a part named by the paper; the stimuli are this design's
// own.
module tb_therm_decoder;
  int checks = 0, failures = 0;
  logic [2:0]  u2;  logic [1:0] y2;
  logic [30:0] u5;  logic [4:0] y5;

  therm_decoder #(.W(2)) d2 (.u(u2), .y(y2));
  therm_decoder #(.W(5)) d5 (.u(u5), .y(y5));

  initial begin
    for (int v = 0; v < 4; v++) begin
      u2 = 3'((1 << v) - 1); #1;
      checks++;
      if (int'(y2) != v) begin failures++; $display("W=2 u=%b y=%0d", u2, y2); end
    end
    for (int v = 0; v < 32; v++) begin
      u5 = 31'((1 << v) - 1); #1;
      checks++;
      if (int'(y5) != v) begin failures++; $display("W=5 u=%b y=%0d", u5, y5); end
    end
    for (int i = 0; i < 200; i++) begin
      u5 = 31'($urandom); #1;
      checks++;
      if (int'(y5) != $countones(u5)) begin failures++; $display("W=5 u=%b y=%0d", u5, y5); end
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
