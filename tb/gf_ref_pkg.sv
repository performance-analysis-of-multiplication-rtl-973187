// gf_ref_pkg: reference arithmetic for the testbenches, written without the
// permutation shortcut the hardware uses.
//
// Field elements are handled as polynomials modulo the all-one polynomial
// G(x) = 1 + x + ... + x^m (m <= 62). The normal basis element alpha^(2^i) is
// obtained by squaring x i times modulo G, so a normal basis vector is mapped
// to its polynomial by summing those powers. A hardware result is correct
// when its polynomial equals the reference product of the operand polynomials.
package gf_ref_pkg;

  typedef logic [63:0] word_t;

  // x * y mod G(x), G = all-one polynomial of degree m.
  function automatic word_t poly_mulmod(input word_t x, input word_t y, input int m);
    word_t r, g;
    g = (word_t'(1) << (m + 1)) - 1;
    r = '0;
    for (int i = m - 1; i >= 0; i--) begin
      r = r << 1;
      if (r[m]) r ^= g;
      if (y[i]) r ^= x;
    end
    return r;
  endfunction

  // Normal basis vector to polynomial: sum of a_i * x^(2^i) mod G.
  function automatic word_t nb_to_poly(input word_t a, input int m);
    word_t e, r;
    e = word_t'(2);
    r = '0;
    for (int i = 0; i < m; i++) begin
      if (a[i]) r ^= e;
      e = poly_mulmod(e, e, m);
    end
    return r;
  endfunction

  // Normal basis product, found by search over the field (small m only).
  function automatic word_t nb_mul_search(input word_t a, input word_t b, input int m);
    word_t target;
    target = poly_mulmod(nb_to_poly(a, m), nb_to_poly(b, m), m);
    for (longint c = 0; c < (longint'(1) << m); c++)
      if (nb_to_poly(word_t'(c), m) == target) return word_t'(c);
    return '1;
  endfunction

endpackage
