// therm_decoder: unary thermometer-code to binary decoder.
//
// The 2^W-1 input wires carry a value equal to the number of wires that are
// high. The scaling network of a unary core always produces a proper
// thermometer code, but the decoder simply counts the ones, so it also gives
// the value of any unary (equal-weight) code. Purely combinational.
//
// Source: the paper's unary cores end in a thermometer decoder; counting
// with an adder is this design's own.
module therm_decoder #(
  parameter int W = 2
) (
  input  logic [2**W-2:0] u,
  output logic [W-1:0]    y
);
  always_comb begin
    y = '0;
    for (int k = 0; k < 2 ** W - 1; k++) y = y + W'(u[k]);
  end
endmodule
