// dct_coeff_rom: the pre-computed kernel inputs for one output X(k1,k2).
//
// With M = N/g samples per sequence (g = 1, or with CASE2 the common factor
// g = gcd(k1,k2,N)), theta = pi/M and omega = (k1 +- k2)/(2g), every cosine
// the kernels need is cos(j pi/(2N)) for an integer j. So a single table of
// one period, COS_TAB[j] = round(cos(j pi/(2N)) * 2^COEF_F) for j = 0 .. 4N-1,
// is built at elaboration time and indexed with j mod 4N:
//     alpha = cos((k1+k2-2g) pi/(2N))    gamma = cos((k1+k2) pi/(2N))
//     beta  = cos((k1-k2-2g) pi/(2N))    delta = cos((k1-k2) pi/(2N))
//     zeta  = 2cos(g pi/N)               eps   = -u(k1)u(k2)/N
// with u(0) = 1/sqrt(2) and u(k) = 1 otherwise. zeta has a small table of its
// own, indexed by g, so that it is rounded once rather than doubled.
// The formulas are the source's. The table form, the closed form for g and
// the number formats are this design's. eps has EPS_F = COEF_W-1+log2(N)
// fraction bits (see dct_pkg).
//
// Outputs: coef (coef_set_t), fold (g, 1 .. N) and seq_len (M = N/g, 1 .. N).
// The block is combinational.
module dct_coeff_rom
  import dct_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter bit          CASE2 = 1'b0,   // shorten sequences by common factors
  localparam int unsigned KW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned EPS_F = COEF_W - 1 + KW
) (
  input  logic [KW-1:0] k1,
  input  logic [KW-1:0] k2,
  output coef_set_t     coef,
  output logic [KW:0]   fold,
  output logic [KW:0]   seq_len
);

  localparam int unsigned TN = 4 * N;          // one period of cos(j pi/(2N))

  typedef coef_t cos_tab_t [TN];
  typedef coef_t eps_tab_t [3];
  typedef coef_t zeta_tab_t [N+1];

  function automatic cos_tab_t make_cos_tab();
    cos_tab_t t;
    for (int j = 0; j < TN; j++)
      t[j] = coef_t'(round_fx($cos(PI * j / (2.0 * N)), COEF_F));
    return t;
  endfunction

  // eps for u(k1)u(k2) = 1, 1/sqrt(2), 1/2 (number of zero indices 0, 1, 2)
  function automatic eps_tab_t make_eps_tab();
    eps_tab_t t;
    t[0] = coef_t'(round_fx(-1.0 / N, EPS_F));
    t[1] = coef_t'(round_fx(-1.0 / (N * $sqrt(2.0)), EPS_F));
    t[2] = coef_t'(round_fx(-0.5 / N, EPS_F));
    return t;
  endfunction

  // zeta = 2cos(g pi/N) for g = 0 .. N (entry 0 unused)
  function automatic zeta_tab_t make_zeta_tab();
    zeta_tab_t t;
    for (int gg = 0; gg <= N; gg++)
      t[gg] = coef_t'(round_fx(2.0 * $cos(PI * gg / N), COEF_F));
    return t;
  endfunction

  localparam cos_tab_t  COS_TAB  = make_cos_tab();
  localparam eps_tab_t  EPS_TAB  = make_eps_tab();
  localparam zeta_tab_t ZETA_TAB = make_zeta_tab();

  // common factor g of k1, k2 and N: the largest divisor of N dividing both
  // (gcd(0,0,N) = N)
  always_comb begin
    fold = (KW+1)'(1);
    if (CASE2) begin
      for (int d = 2; d <= N; d++)
        if ((N % d) == 0 && (int'(k1) % d) == 0 && (int'(k2) % d) == 0)
          fold = (KW+1)'(d);
    end
  end

  always_comb begin
    seq_len = (KW+1)'(N);
    for (int d = 1; d <= N; d++)
      if ((N % d) == 0 && int'(fold) == d) seq_len = (KW+1)'(N / d);
  end

  // table indices, all in 0 .. 4N-1
  localparam int unsigned TW = $clog2(TN) + 1;
  logic [TW-1:0] sp, df, g2;
  logic [TW-2:0] ia, ib;
  logic [1:0]    nzero;

  always_comb begin
    g2 = TW'(fold) << 1;                                      // 2g <= 2N
    sp = TW'(k1) + TW'(k2);                                   // k1 + k2 < 2N
    df = (k1 >= k2) ? TW'(k1) - TW'(k2) : TW'(TN) + TW'(k1) - TW'(k2);
    ia = (TW-1)'((sp >= g2) ? sp - g2 : sp + TW'(TN) - g2);
    ib = (TW-1)'((df >= g2) ? df - g2 : df + TW'(TN) - g2);
    nzero = 2'(k1 == '0) + 2'(k2 == '0);
    coef.alpha = COS_TAB[ia];
    coef.gamma = COS_TAB[sp[TW-2:0]];
    coef.beta  = COS_TAB[ib];
    coef.delta = COS_TAB[df[TW-2:0]];
    coef.zeta  = ZETA_TAB[fold];
    coef.eps   = EPS_TAB[nzero];
  end

endmodule
