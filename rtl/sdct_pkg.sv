// sdct_pkg -- fixed-point formats and constant coefficients of the
// look-ahead sliding DCT.
//
// The formats are the Q-notation widths printed on the block diagram of the
// design: Qi.f has i integer bits including the sign and f fraction bits.
// The coefficients are functions of the window length M, the damping factor
// beta and the bin index m; they are evaluated at elaboration time with real
// arithmetic and rounded to nearest into their Q format, so every bin gets
// its own constant multipliers without any stored table.
//
//   W = exp(-j*pi/M)   (the 2M-th root of unity W_2M)
//   beta^M (-1)^m      comb coefficient              Q1.7
//   beta^k W^{+-km}    look-ahead / loop coefficients Q2.10
//   1/2 k_m (-1)^m W^{m/2}  output scaling           Q1.11
//
// The window length, beta and the rounding of the constants to nearest are
// this implementation's choices; the formats follow the design.
package sdct_pkg;

  // ---- fixed-point formats (total width, fraction bits) ----
  localparam int X_W  = 14;  // Q7.7   input samples, comb and feed-forward sums
  localparam int X_F  = 7;
  localparam int BM_W = 8;   // Q1.7   beta^M (-1)^m
  localparam int BM_F = 7;
  localparam int CF_W = 12;  // Q2.10  complex rotation coefficients
  localparam int CF_F = 10;
  localparam int P_W  = 15;  // Q7.8   recursion state P1, P2
  localparam int P_F  = 8;
  localparam int S_W  = 16;  // Q8.8   P = P1 + P2 and the output X_m
  localparam int S_F  = 8;
  localparam int G_W  = 12;  // Q1.11  output scaling coefficient
  localparam int G_F  = 11;

  // Pipeline latency from x(n) at the input to X_m(n) at the output.
  localparam int LATENCY = 8;

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [X_W-1:0]  x_t;
  typedef logic signed [S_W-1:0]  s_t;
  typedef logic signed [CF_W-1:0] cf_t;
  typedef logic signed [G_W-1:0]  g_t;
  typedef logic signed [BM_W-1:0] bm_t;

  typedef struct packed {
    cf_t re;
    cf_t im;
  } ccf_t;  // complex Q2.10 coefficient

  typedef struct packed {
    g_t re;
    g_t im;
  } cg_t;   // complex Q1.11 coefficient

  // Round a real constant to nearest in a signed format of 'w' bits with
  // 'f' fraction bits, clipping to the representable range.
  function automatic longint quant(input real v, input int w, input int f);
    real    s;
    longint q, hi, lo;
    s  = v * (2.0 ** f);
    q  = (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    if (q > hi) q = hi;
    if (q < lo) q = lo;
    return q;
  endfunction

  // Real and imaginary part of g * W^k, with W = exp(-j*pi/M).
  function automatic real wk_re(input real g, input real k, input int m_len);
    return g * $cos(PI * k / m_len);
  endfunction

  function automatic real wk_im(input real g, input real k, input int m_len);
    return -g * $sin(PI * k / m_len);
  endfunction

  // g * W^k quantised to Q2.10.
  function automatic ccf_t coef(input real g, input real k, input int m_len);
    ccf_t c;
    c.re = cf_t'(quant(wk_re(g, k, m_len), CF_W, CF_F));
    c.im = cf_t'(quant(wk_im(g, k, m_len), CF_W, CF_F));
    return c;
  endfunction

  // beta^M (-1)^m in Q1.7 (only its magnitude is used: the sign is applied
  // by choosing subtraction for even and addition for odd bins).
  function automatic bm_t beta_m(input real beta, input int m_len);
    return bm_t'(quant(beta ** m_len, BM_W, BM_F));
  endfunction

  // 1/2 k_m (-1)^m W^{m/2} in Q1.11, with k_0 = 1/sqrt(2) and k_m = 1 otherwise.
  function automatic cg_t out_coef(input int m, input int m_len);
    real  g;
    cg_t  c;
    g = 0.5 * ((m == 0) ? 1.0 / $sqrt(2.0) : 1.0) * (((m % 2) == 0) ? 1.0 : -1.0);
    c.re = g_t'(quant(wk_re(g, m / 2.0, m_len), G_W, G_F));
    c.im = g_t'(quant(wk_im(g, m / 2.0, m_len), G_W, G_F));
    return c;
  endfunction

endpackage
