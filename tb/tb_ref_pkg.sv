// tb_ref_pkg -- reference GF(8) arithmetic and RS(7,3) models for the
// testbenches, written independently of the RTL: products go through
// exponent/logarithm tables built by stepping alpha with z^3 = z + 1.
package tb_ref_pkg;

  typedef logic [2:0] sym_t;

  function automatic sym_t r_exp(input int e);
    sym_t x;
    int r;
    r = e % 7;
    if (r < 0) r += 7;
    x = 3'b001;
    for (int i = 0; i < r; i++) x = {x[1], x[0] ^ x[2], x[2]};   // x * z
    return x;
  endfunction

  function automatic int r_log(input sym_t a);
    for (int e = 0; e < 7; e++) if (r_exp(e) == a) return e;
    return -1;
  endfunction

  function automatic sym_t r_mul(input sym_t a, input sym_t b);
    if (a == 0 || b == 0) return 3'b000;
    return r_exp(r_log(a) + r_log(b));
  endfunction

  function automatic sym_t r_inv(input sym_t a);
    if (a == 0) return 3'b000;
    return r_exp(-r_log(a));
  endfunction

  // p(x), p[i] = coefficient of x^i
  function automatic sym_t r_eval(input sym_t p [], input sym_t x);
    sym_t acc;
    acc = 0;
    for (int i = p.size() - 1; i >= 0; i--) acc = r_mul(acc, x) ^ p[i];
    return acc;
  endfunction

  // codeword c = m(x) g(x), g(x) = (x+a)(x+a^2)(x+a^3)(x+a^4); c[i] of x^i
  function automatic void r_encode_g(input sym_t m [3], output sym_t c [7]);
    sym_t g [5];
    g = '{r_exp(3), r_exp(1), 3'b001, r_exp(3), 3'b001};
    for (int i = 0; i < 7; i++) c[i] = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 5; j++) c[i+j] ^= r_mul(m[i], g[j]);
  endfunction

  // nearest codeword within distance 2 (brute force over all 512 codewords)
  function automatic bit r_decode(input sym_t v [7], output sym_t c [7]);
    sym_t m [3];
    sym_t cc [7];
    for (int k = 0; k < 512; k++) begin
      int d;
      m[0] = sym_t'(k & 7); m[1] = sym_t'((k >> 3) & 7); m[2] = sym_t'((k >> 6) & 7);
      r_encode_g(m, cc);
      d = 0;
      for (int i = 0; i < 7; i++) if (cc[i] != v[i]) d++;
      if (d <= 2) begin
        c = cc;
        return 1'b1;
      end
    end
    c = v;
    return 1'b0;
  endfunction

endpackage
