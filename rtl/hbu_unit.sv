// hbu_unit: approximate hybrid binary-unary function unit, y ~ f(x).
//
// Structure (one instance per function):
//   * one thermometer encoder + fully unary core + thermometer decoder per
//     distinct truncated sub-function ("core"). A core serving regions of
//     length 2^L sees the low L input bits, which are the offset inside any
//     region of that length, so regions that share a core share all of it;
//   * the upper input bits select the region the input falls in (the
//     regions tile the input range); the output is that region's fixed
//     upper bits UB_r concatenated with the decoded output of its core.
//     No binary adder is needed.
// The region list, the UB values and the core sharing come from the plan
// parameter (hbu_pkg::hbu_plan_t, produced offline by the function division
// and self-similarity steps); the unary cores rebuild their sub-function
// tables from the function definition while elaborating.
//
// Timing: with OUT_REG = 1 (default) y is registered, one clock cycle from
// x to y, as in the document's single-cycle units. OUT_REG = 0 makes the unit
// purely combinational so a caller can place it inside its own pipeline
// stage. The output register has no reset: it is pure datapath.
module hbu_unit import hbu_pkg::*; #(
  parameter hbu_plan_t PLAN    = hbu_plans_pkg::EXP16_C1,
  parameter bit        OUT_REG = 1'b1
) (
  input  logic              clk,
  input  logic [PLAN.w-1:0] x,
  output logic [PLAN.w-1:0] y
);
  localparam int W  = PLAN.w;
  localparam int K  = PLAN.k;
  localparam int WG = W - K;

  logic [WG-1:0] dec [MAXCORE];

  for (genvar c = PLAN.ncore; c < MAXCORE; c++) begin : g_unused
    assign dec[c] = '0;
  end

  for (genvar c = 0; c < PLAN.ncore; c++) begin : g_core
    localparam int REP = int'(PLAN.core_rep[c]);
    localparam int LEN = int'(PLAN.reg_len[REP]);
    logic [2**LEN-2:0] x_u;
    logic [2**WG-2:0]  f_u;

    therm_encoder #(.W(LEN)) u_enc (.x(x[LEN-1:0]), .u(x_u));
    unary_core #(
      .FUNC(PLAN.func), .W(W), .K(K), .LEN(LEN),
      .REP_START(int'(PLAN.reg_start[REP])), .REP_UB(int'(PLAN.reg_ub[REP]))
    ) u_core (.x_u(x_u), .f_u(f_u));
    therm_decoder #(.W(WG)) u_dec (.u(f_u), .y(dec[c]));
  end

  // Upper input bits select the sub-function and its fixed upper bits.
  // Every region is at least 2^LSEL inputs long and aligned to its length,
  // so x >> LSEL identifies the region; the selection is a constant table
  // of {UB, core} built from the plan while elaborating.
  function automatic int min_len();
    int l = W;
    for (int r = 0; r < PLAN.nreg; r++) if (int'(PLAN.reg_len[r]) < l) l = int'(PLAN.reg_len[r]);
    return l;
  endfunction

  localparam int LSEL = min_len();
  localparam int NSEL = 2 ** (W - LSEL);

  typedef struct packed {
    logic [K-1:0] ub;
    logic [3:0]   core;
  } sel_t;

  function automatic sel_t [NSEL-1:0] sel_table();
    sel_t [NSEL-1:0] t;
    t = '0;
    for (int r = 0; r < PLAN.nreg; r++)
      for (int q = int'(PLAN.reg_start[r]) >> LSEL;
           q < (int'(PLAN.reg_start[r]) + (1 << PLAN.reg_len[r])) >> LSEL; q++) begin
        t[q].ub   = K'(PLAN.reg_ub[r]);
        t[q].core = PLAN.reg_core[r];
      end
    return t;
  endfunction

  localparam sel_t [NSEL-1:0] SEL = sel_table();

  sel_t         sel;
  logic [W-1:0] y_c;

  assign sel = SEL[x[W-1:LSEL]];
  assign y_c = {sel.ub, dec[sel.core]};

  if (OUT_REG) begin : g_reg
    always_ff @(posedge clk) y <= y_c;
  end else begin : g_comb
    assign y = y_c;
  end
endmodule
