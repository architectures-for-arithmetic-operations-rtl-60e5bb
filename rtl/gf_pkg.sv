// gf_pkg -- GF(2^3) symbol arithmetic shared by the Reed-Solomon blocks.
//
// The RS(7,3) encoder and decoder work on 3-bit symbols of GF(8) in the
// standard (polynomial) basis generated by the primitive polynomial
// F(z) = z^3 + z + 1, alpha = z. Bit i of a symbol is the coefficient of
// alpha^i. The functions below are combinational: gf_mul is a shift-and-add
// product reduced by F, gf_inv raises to the power 2^m - 2, and gf_apow
// returns alpha^e for any integer e (taken modulo 2^m - 1). They also serve
// as constant functions that compute the hardwired cell constants at
// elaboration time. The field and its polynomial follow the running example;
// widths of control counters are this design's own choice.
package gf_pkg;

  localparam int unsigned GF_M = 3;                     // bits per symbol
  localparam logic [GF_M:0] GF_POLY = 4'b1011;          // z^3 + z + 1
  localparam int unsigned GF_N = (1 << GF_M) - 1;       // 7 non-zero elements

  typedef logic [GF_M-1:0] gf_t;

  // Action taken by a key-equation processing element (COMB_XARD).
  typedef enum logic [2:0] {
    KES_NULL         = 3'd0,  // decwina exhausted: pass through
    KES_ADJUST       = 3'd1,  // both leading coefficients zero
    KES_ADVANCE      = 3'd2,  // only L'(g3) zero: g advanced
    KES_REDUCE_DELAY = 3'd3,  // reduce f, then delay g (gshift > 0)
    KES_REDUCE_SWAP  = 3'd4   // reduce f, swap, advance (gshift = 0)
  } kes_act_e;

  // Product of two field elements.
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    gf_t acc;
    gf_t sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < GF_M; i++) begin
      if (b[i]) acc = acc ^ sh;
      sh = sh[GF_M-1] ? ((sh << 1) ^ GF_POLY[GF_M-1:0]) : (sh << 1);
    end
    return acc;
  endfunction

  // alpha^e, e reduced modulo 2^m - 1 (negative exponents allowed).
  function automatic gf_t gf_apow(input int e);
    int  r;
    gf_t x;
    r = e % int'(GF_N);
    if (r < 0) r = r + int'(GF_N);
    x = gf_t'(1);
    for (int i = 0; i < r; i++) x = gf_mul(x, gf_t'(2));
    return x;
  endfunction

  // Multiplicative inverse a^(2^m - 2); the inverse of 0 is returned as 0.
  function automatic gf_t gf_inv(input gf_t a);
    gf_t x;
    x = gf_t'(1);
    for (int i = 0; i < int'(GF_N) - 1; i++) x = gf_mul(x, a);
    return x;
  endfunction

  // a / b as a * b^-1.
  function automatic gf_t gf_div(input gf_t a, input gf_t b);
    return gf_mul(a, gf_inv(b));
  endfunction

  // ---- constants of the systolic Cauchy encoder, RS(n,k), r = n - k ----
  // roots alpha^L .. alpha^(L+r-1), a = 1 - L (mod n); "-" is "+" in GF(2^m)

  // x_0 = -alpha^(n-1), the initial content of the x register of every cell
  function automatic gf_t cauchy_x0(input int n);
    return gf_apow(n - 1);
  endfunction

  // y_j = alpha^(n-1-k-j)
  function automatic gf_t cauchy_y(input int n, input int k, input int j);
    return gf_apow(n - 1 - k - j);
  endfunction

  // c_i = alpha^(-(n-1-i)a) / prod_{t != i} (alpha^(n-1-i) - alpha^(n-1-t))
  function automatic gf_t cauchy_c(input int n, input int k, input int a, input int i);
    gf_t den;
    den = gf_t'(1);
    for (int t = 0; t < k; t++)
      if (t != i) den = gf_mul(den, gf_apow(n - 1 - i) ^ gf_apow(n - 1 - t));
    return gf_div(gf_apow(-(n - 1 - i) * a), den);
  endfunction

  // d_j^-1, d_j = alpha^((n-1-k-j)a) prod_t (alpha^(n-1-k-j) - alpha^(n-1-t))
  function automatic gf_t cauchy_dinv(input int n, input int k, input int a, input int j);
    gf_t d;
    d = gf_apow((n - 1 - k - j) * a);
    for (int t = 0; t < k; t++)
      d = gf_mul(d, gf_apow(n - 1 - k - j) ^ gf_apow(n - 1 - t));
    return gf_inv(d);
  endfunction

endpackage
