// unary_core: fully unary scaling network for one truncated sub-function.
//
// The core implements g(t), t = 0 .. 2^LEN-1, a (W-K)-bit truncated
// sub-function of an HBU unit, entirely in the unary domain. Input wire
// x_u[t-1] is high when t' >= t; output wire f_u[j-1] must be high when
// g(t') >= j. Output wire j therefore toggles each time the input crosses a
// point t where [g(t) >= j] differs from [g(t-1) >= j] (a "triggering point").
// A wire with one triggering point is a plain connection to that input wire,
// several triggering points are XORed together, and an output that is high
// already at t = 0 starts from a constant 1. A monotonic g needs wires only;
// a non-monotonic g needs XOR gates where its output falls.
//
// g is not stored: it is recomputed at elaboration time from the function
// definition in hbu_pkg, over the representative region starting at
// REP_START whose upper output bits are forced to REP_UB. Only the fixed
// triggering-point pattern reaches the netlist. Purely combinational.
//
// Source: wires and XOR gates at triggering points follow the paper;
// deriving them at elaboration from f_eval is this design's own.
module unary_core import hbu_pkg::*; #(
  parameter func_e FUNC      = F_EXP,
  parameter int    W         = 8,    // resolution of f
  parameter int    K         = 5,    // upper output bits held in UB
  parameter int    LEN       = 5,    // log2 of the sub-function's input length
  parameter int    REP_START = 0,
  parameter int    REP_UB    = 12
) (
  input  logic [2**LEN-2:0]       x_u,
  output logic [2**(W-K)-2:0]     f_u
);
  localparam int NO = 2 ** (W - K) - 1;  // unary output wires
  localparam int NI = 2 ** LEN - 1;      // unary input wires

  // Output wires that are high for g = v.
  function automatic logic [NO-1:0] level(int t);
    int v;
    logic [NO-1:0] l;
    v = g_eval(FUNC, W, K, REP_START + t, REP_UB);
    for (int j = 1; j <= NO; j++) l[j-1] = (v >= j);
    return l;
  endfunction

  localparam logic [NO-1:0] BASE = level(0);

  logic [NO-1:0] term [NI];

  for (genvar t = 1; t <= NI; t++) begin : g_trig
    localparam logic [NO-1:0] TRIG = level(t) ^ level(t - 1);
    assign term[t-1] = x_u[t-1] ? TRIG : '0;
  end

  always_comb begin
    f_u = BASE;
    for (int t = 0; t < NI; t++) f_u = f_u ^ term[t];
  end
endmodule
