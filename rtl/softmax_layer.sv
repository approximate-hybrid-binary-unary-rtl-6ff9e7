// softmax_layer: Softmax over an N-element vector using HBU exponential units.
//
// p_i = exp(x_i - m) / sum_j exp(x_j - m), m = max_j x_j (the down-scaling
// form, which keeps every exponential in (0, 1]).
// Formats follow the document: inputs are Fixed<1,32,12> (signed, 12
// fraction bits); x_i - m is <= 0, and below -8 its exponential is taken as
// zero; in [-8, 0] it is a Fixed<1,16,12> value fed to a 16-bit HBU exp unit
// whose output is Fixed<0,16,15>. The exponentials are summed in a 32-bit
// accumulator and each is divided by the sum; outputs are Fixed<0,16,15>.
//
// Pipeline, three cycles from in_valid to out_valid (the document's cycle
// count for this layer):
//   1. register the vector and its maximum (comparator tree);
//   2. subtract the maximum, flag lanes below -8, HBU exp (its output
//      register is this stage's register);
//   3. zero the flagged lanes, sum all lanes (adder tree), divide.
// One vector can enter every cycle. The accumulator is an adder tree, which
// is this design's choice to reach three cycles; the document only says a
// 32-bit accumulator adds up the exponentials and a divider normalises them.
// The division truncates; a sum of zero, which cannot occur because the
// largest lane always contributes exp(0), would give all-zero outputs.
module softmax_layer import hbu_pkg::*; #(
  parameter int        N        = 80,
  parameter hbu_plan_t EXP_PLAN = hbu_plans_pkg::SEXP16_C2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [31:0] x [N],
  output logic               out_valid,
  output logic [15:0]        p [N]
);
  localparam logic signed [32:0] MIN_ARG = -33'sd32768;  // -8 in Fixed<.,.,12>

  // Stage 1: input register and maximum.
  logic signed [31:0] x1 [N];
  logic signed [31:0] m1;
  logic               v1, v2;
  logic signed [31:0] m_c;

  always_comb begin
    m_c = x[0];
    for (int i = 1; i < N; i++) if (x[i] > m_c) m_c = x[i];
  end

  always_ff @(posedge clk) begin
    x1 <= x;
    m1 <= m_c;
  end

  // Stage 2: subtract the maximum and evaluate exp on every lane.
  logic [15:0] e2 [N];
  logic        z2 [N];

  for (genvar i = 0; i < N; i++) begin : g_lane
    logic signed [32:0] d;
    logic [15:0]        u;
    assign d = 33'(x1[i]) - 33'(m1);
    // Fixed<1,16,12> value of d in offset binary: d + 8.0.
    assign u = 16'(d - MIN_ARG);
    hbu_unit #(.PLAN(EXP_PLAN)) u_exp (.clk(clk), .x(u), .y(e2[i]));
    always_ff @(posedge clk) z2[i] <= (d < MIN_ARG);
  end

  // Stage 3: accumulate and normalise.
  logic [31:0] e3 [N];
  logic [31:0] sum3;

  always_comb begin
    sum3 = '0;
    for (int i = 0; i < N; i++) begin
      e3[i] = z2[i] ? 32'd0 : 32'(e2[i]);
      sum3  = sum3 + e3[i];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++)
      p[i] <= (sum3 == 0) ? 16'd0 : 16'((48'(e3[i]) << 15) / 48'(sum3));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; out_valid <= v2;
    end
  end
endmodule
