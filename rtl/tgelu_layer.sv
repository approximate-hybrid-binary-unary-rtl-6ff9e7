// tgelu_layer: Trimmed GELU over an N-element vector.
//
// TGELU(x) = 0 for x < -8, x for x >= 8, GELU(x) otherwise. Inputs and
// outputs are Fixed<1,32,8> (signed, 8 fraction bits). Inside [-8, 8) the
// value is re-scaled to Fixed<1,16,12> and evaluated by a 16-bit HBU GELU
// unit (input and output in offset binary); the Fixed<1,16,12> result is
// rounded back to 8 fraction bits (add half, shift right by 4) and
// sign-extended. Outside that range the two linear pieces need no unit.
//
// Pipeline, four cycles from in_valid to out_valid (the document's cycle
// count for this layer), one vector per cycle:
//   1. input register;
//   2. range classification and re-scaling;
//   3. HBU GELU (its output register);
//   4. selection of 0, x or GELU(x).
// The stage split is this design's choice; the document gives the formats,
// the trimming and the cycle count.
module tgelu_layer import hbu_pkg::*; #(
  parameter int        N         = 128,
  parameter hbu_plan_t GELU_PLAN = hbu_plans_pkg::GELU16_C2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [31:0] x [N],
  output logic               out_valid,
  output logic signed [31:0] y [N]
);
  localparam logic signed [31:0] EIGHT = 32'sd2048;  // 8.0 in Fixed<1,32,8>

  logic v1, v2, v3;
  logic signed [31:0] x1 [N];

  always_ff @(posedge clk) x1 <= x;

  for (genvar i = 0; i < N; i++) begin : g_lane
    logic signed [31:0] x2, x3;
    logic               lo2, hi2, lo3, hi3;
    logic [15:0]        u2, g3;
    logic signed [15:0] gs;
    logic signed [31:0] gr;

    always_ff @(posedge clk) begin
      lo2 <= (x1[i] < -EIGHT);
      hi2 <= (x1[i] >= EIGHT);
      u2  <= {x1[i][11:0], 4'b0000} ^ 16'h8000;
      x2  <= x1[i];
      lo3 <= lo2;
      hi3 <= hi2;
      x3  <= x2;
    end

    hbu_unit #(.PLAN(GELU_PLAN)) u_gelu (.clk(clk), .x(u2), .y(g3));

    assign gs = signed'(g3 ^ 16'h8000);
    assign gr = (32'(gs) + 32'sd8) >>> 4;

    always_ff @(posedge clk) y[i] <= lo3 ? 32'sd0 : (hi3 ? x3 : gr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; v3 <= v2; out_valid <= v3;
    end
  end
endmodule
