// gf_onb_pkg: shared constants and elaboration-time helpers for the Type-I
// optimal normal basis (ONB) arithmetic units.
//
// A Type-I ONB of GF(2^m) exists when p = m+1 is prime and 2 is primitive
// modulo p. Its generator alpha is a root of the all-one polynomial
// 1 + x + ... + x^m, so alpha^(m+1) = 1 and the normal basis element
// alpha^(2^i) equals alpha^(2^i mod (m+1)). The permutations, the multiplier
// and the inverter all use the index map j(i) = 2^i mod (m+1) computed here.
//
// M_DEFAULT is 10. The results that motivate this design use 8-bit operands,
// but m = 8 has no Type-I ONB (9 is not prime); 10 is the smallest valid field
// size of at least 8 bits and is this design's own choice.
package gf_onb_pkg;

  localparam int unsigned M_DEFAULT = 10;

  // 2^i mod p, by repeated doubling so no wide intermediate is needed.
  function automatic int unsigned pow2_mod(input int unsigned i, input int unsigned p);
    int unsigned r;
    r = 1 % p;
    for (int unsigned k = 0; k < i; k++) r = (2 * r) % p;
    return r;
  endfunction

  function automatic bit is_prime(input int unsigned p);
    if (p < 2) return 1'b0;
    for (int unsigned d = 2; d * d <= p; d++) if (p % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  // True when GF(2^m) has a Type-I optimal normal basis.
  function automatic bit is_type1_onb(input int unsigned m);
    int unsigned r;
    int unsigned ord;
    if (m < 2 || !is_prime(m + 1)) return 1'b0;
    r = 2 % (m + 1);
    ord = 1;
    while (r != 1) begin
      r = (2 * r) % (m + 1);
      ord++;
    end
    return ord == m;
  endfunction

endpackage
