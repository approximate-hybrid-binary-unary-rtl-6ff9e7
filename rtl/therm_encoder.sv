// therm_encoder: binary to unary thermometer-code encoder.
//
// A W-bit unsigned value x becomes 2^W-1 wires of equal weight; wire k-1 is
// high exactly when x >= k, so the number of high wires equals x (for W=3,
// x=5 gives 0011111 read from the top wire down). This is the encoder that
// feeds each fully unary core of an HBU unit. Purely combinational.
//
// Source: the thermometer encoder follows the paper; the comparator form is
// this design's own.
module therm_encoder #(
  parameter int W = 3
) (
  input  logic [W-1:0]      x,
  output logic [2**W-2:0]   u
);
  always_comb begin
    for (int k = 1; k < 2 ** W; k++) u[k-1] = (32'(x) >= k);
  end
endmodule
