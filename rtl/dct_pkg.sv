// dct_pkg: types, fixed-point formats and helper functions shared by the
// recursive 2-D DCT.
//
// Coefficients are 12-bit two's complement numbers, the word length of the
// signals in the reference FPGA implementation. eta/kappa (alpha..delta) and
// zeta use COEF_F = 10 fraction bits, so the range is [-2, 2): zeta = 2cos(pi/M)
// needs the integer bit. eps = -u(k1)u(k2)/N is always negative with magnitude
// at most 1/N, so it carries its own, finer scaling given to the kernel as
// EPS_F (COEF_W-1+log2(N) fraction bits, which puts -1/N on -2^(COEF_W-1)).
// The split into these formats is this design's choice; the source only fixes
// the 12-bit word length.
package dct_pkg;

  localparam int unsigned COEF_W = 12;
  localparam int unsigned COEF_F = 10;

  typedef logic signed [COEF_W-1:0] coef_t;

  // The pre-computed inputs of the kernel(s) for one output X(k1,k2):
  //   alpha = cos(((k1+k2)/2 - 1) pi/M)   eta   of the x_a kernel
  //   gamma = cos(((k1+k2)/2) pi/M)       kappa of the x_a kernel
  //   beta  = cos(((k1-k2)/2 - 1) pi/M)   eta   of the x_s kernel
  //   delta = cos(((k1-k2)/2) pi/M)       kappa of the x_s kernel
  //   eps   = -u(k1)u(k2)/N               output scale (EPS_F fraction bits)
  //   zeta  = 2cos(pi/M)                  recursion coefficient
  typedef struct packed {
    coef_t alpha;
    coef_t beta;
    coef_t gamma;
    coef_t delta;
    coef_t eps;
    coef_t zeta;
  } coef_set_t;

  localparam real PI = 3.14159265358979323846;

  // round(v * 2^frac) for a real v, for building constant tables.
  function automatic int round_fx(real v, int frac);
    real s;
    s = v * (2.0 ** frac);
    return (s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(-s + 0.5);
  endfunction

  // Arithmetic right shift by sh with round-half-up.
  function automatic logic signed [63:0] round_shift(logic signed [63:0] v, int sh);
    if (sh <= 0) return v;
    return (v + (64'sd1 <<< (sh - 1))) >>> sh;
  endfunction

  // Clamp v to the range of a signed word of w bits.
  function automatic logic signed [63:0] saturate(logic signed [63:0] v, int w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
