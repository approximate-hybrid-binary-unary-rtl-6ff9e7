// hbu_pkg: shared types and the function definitions of the approximate
// hybrid binary-unary (HBU) units.
//
// An HBU unit computes y = f(x) for a univariate function f at W-bit input
// and output resolution. Offline, the input range is cut into aligned,
// power-of-two sized sub-regions such that inside each one the upper K bits
// of the (rounded) output are constant ("UB"). Each sub-region is then a
// truncated sub-function g_i of only W-K output bits, implemented as a small
// fully unary core. Sub-functions that are close enough share one core.
// The result of that offline step is a "plan" (hbu_plan_t): the region list
// and which core each region uses. The cores' contents are not stored: the
// RTL recomputes them at elaboration time from f_eval() below, so the plan
// stays a few dozen numbers.
//
// All functions take and return unsigned integer codes, as in the document:
//   F_GAMMA, F_TANH, F_COSH, F_EXP, F_SQ, F_SQRT: input and output are W-bit
//       fractions in [0,1) (code / 2^W), functions of Table 2 plus x^2 and
//       sqrt(x) for edge detection.
//   F_GELU: signed fixed point with W-4 fraction bits on [-8,8), input and
//       output both in offset binary (code = two's complement value ^ MSB).
//       At W=16 this is the Fixed<1,16,12> format of the GELU layer.
//   F_SEXP: exp(x) for the Softmax layer, input Fixed<1,W,W-4> in offset
//       binary, output unsigned with W-1 fraction bits (Fixed<0,16,15> at 16).
// Output values are rounded to nearest and clipped to [0, 2^W-1].
// The erf() needed by GELU uses the Abramowitz-Stegun 7.1.26 formula
// (absolute error below 1.5e-7, far below one output step).
//
// Source: the HBU structure and the function definitions follow the paper;
// the code formats, the erf approximation and the plan record are this
// design's own.
package hbu_pkg;

  typedef enum logic [3:0] {
    F_GELU, F_GAMMA, F_TANH, F_COSH, F_EXP, F_SEXP, F_SQ, F_SQRT
  } func_e;

  localparam int MAXREG  = 256; // sub-functions per unit
  localparam int MAXCORE = 16;  // distinct unary cores per unit

  // Result of the function division / self-similarity step. Region r covers
  // inputs [reg_start[r], reg_start[r] + 2^reg_len[r] - 1]; its output upper
  // bits are reg_ub[r] and its lower bits come from core reg_core[r]. Core c
  // implements the truncated sub-function of region core_rep[c].
  typedef struct packed {
    func_e                    func;
    int                       w;
    int                       k;
    int                       nreg;
    int                       ncore;
    logic [MAXREG-1:0][15:0]  reg_start;
    logic [MAXREG-1:0][4:0]   reg_len;
    logic [MAXREG-1:0][15:0]  reg_ub;
    logic [MAXREG-1:0][3:0]   reg_core;
    logic [MAXCORE-1:0][7:0]  core_rep;
  } hbu_plan_t;

  function automatic real erf_approx(real x);
    real s, t, y;
    s = (x < 0.0) ? -1.0 : 1.0;
    x = (x < 0.0) ? -x : x;
    t = 1.0 / (1.0 + 0.3275911 * x);
    y = 1.0 - (((((1.061405429 * t - 1.453152027) * t) + 1.421413741) * t
                - 0.284496736) * t + 0.254829592) * t * $exp(-x * x);
    return s * y;
  endfunction

  // Exact (rounded) output code of function fn at resolution w for input u.
  function automatic int f_eval(func_e fn, int w, int u);
    real n, x, v, one;
    n   = 2.0 ** w;
    one = 2.0 ** (w - 4);
    case (fn)
      F_GAMMA: v = $pow(real'(u) / n, 0.45) * n;
      F_TANH:  v = (1.0 + $tanh(4.0 * (2.0 * real'(u) / n - 1.0))) / 2.0 * n;
      F_COSH:  v = ($cosh(real'(u) / n) - 1.0) * n;
      F_EXP:   v = $exp(real'(u) / n - 1.0) * n;
      F_SQ:    v = real'(u) * real'(u) / n;
      F_SQRT:  v = $sqrt(real'(u) / n) * n;
      F_GELU: begin
        x = (real'(u) - n / 2.0) / one;
        v = 0.5 * x * (1.0 + erf_approx(x / $sqrt(2.0))) * one + n / 2.0;
      end
      F_SEXP: begin
        x = (real'(u) - n / 2.0) / one;
        v = $exp(x) * n / 2.0;
      end
      default: v = 0.0;
    endcase
    v = $floor(v + 0.5);
    if (v < 0.0) v = 0.0;
    if (v > n - 1.0) v = n - 1.0;
    return int'(v);
  endfunction

  // Output of sub-function region rep after its upper bits are forced to ub
  // (nearest value with those upper bits), with the upper bits removed.
  function automatic int g_eval(func_e fn, int w, int k, int u, int ub);
    int lo, hi, v;
    lo = ub << (w - k);
    hi = ((ub + 1) << (w - k)) - 1;
    v  = f_eval(fn, w, u);
    if (v < lo) v = lo;
    if (v > hi) v = hi;
    return v - lo;
  endfunction

endpackage
