// roberts_cross: 8-bit Roberts Cross edge magnitude with HBU x^2 and sqrt.
//
// For the 2x2 window  p00 p01 / p10 p11  the edge magnitude is
//   G = sqrt(Gx^2 + Gy^2),  Gx = p00 - p11,  Gy = p01 - p10.
// |Gx| and |Gy| are 8-bit; each is squared by an 8-bit HBU unit working on
// unit-interval codes (sq(a) = a^2 / 256), the two squares are added and
// saturated to 255, and an 8-bit HBU square-root unit (sqrt(s) =
// sqrt(256 s)) returns G, which therefore saturates at 255. The HBU units
// are combinational here and the result is registered: one cycle from
// in_valid to out_valid, one pixel per cycle, as the document reports for
// this kernel. The saturation and the absolute-value step are this design's
// choice; the document states only that x^2 and sqrt(x) are done with the
// method at 8 bits. Scanning an image and forming the windows is left to the
// surrounding system.
module roberts_cross import hbu_pkg::*; #(
  parameter hbu_plan_t SQ_PLAN   = hbu_plans_pkg::SQ8_C2,
  parameter hbu_plan_t SQRT_PLAN = hbu_plans_pkg::SQRT8_C2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] p00,
  input  logic [7:0] p01,
  input  logic [7:0] p10,
  input  logic [7:0] p11,
  output logic       out_valid,
  output logic [7:0] g
);
  logic [7:0] gx, gy, sx, sy, s, r;
  logic [8:0] sum;

  assign gx  = (p00 >= p11) ? p00 - p11 : p11 - p00;
  assign gy  = (p01 >= p10) ? p01 - p10 : p10 - p01;

  hbu_unit #(.PLAN(SQ_PLAN), .OUT_REG(1'b0)) u_sqx (.clk(clk), .x(gx), .y(sx));
  hbu_unit #(.PLAN(SQ_PLAN), .OUT_REG(1'b0)) u_sqy (.clk(clk), .x(gy), .y(sy));

  assign sum = 9'(sx) + 9'(sy);
  assign s   = sum[8] ? 8'hff : sum[7:0];

  hbu_unit #(.PLAN(SQRT_PLAN), .OUT_REG(1'b0)) u_sqrt (.clk(clk), .x(s), .y(r));

  always_ff @(posedge clk) g <= r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
