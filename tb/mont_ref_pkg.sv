// mont_ref_pkg: reference arithmetic for the testbenches.
//
// mont_ref computes the digit-serial Montgomery product with whole-digit
// integer arithmetic, independent of the carry-save, bit-by-bit hardware:
// for each D-bit digit q_i of Q (least significant first)
//   T = C + P*q_i,  u = -T * N^-1 mod 2**D,  C = (T + u*N) / 2**D
// and the result is C mod 2**W (no final subtraction of N).
// inv_mod_pow2 finds N^-1 mod 2**D by search. mod_inv finds 2**-W mod N.
package mont_ref_pkg;
  function automatic int unsigned inv_mod_pow2(int unsigned n, int unsigned d);
    for (int unsigned k = 1; k < (1 << d); k += 2)
      if (((n * k) % (1 << d)) == 1) return k;
    return 0;
  endfunction

  function automatic int unsigned mont_full(int unsigned p, int unsigned q, int unsigned n,
                                            int unsigned w, int unsigned d);
    int unsigned c, t, u, ninv, r;
    r = 1 << d;
    ninv = inv_mod_pow2(n, d);
    c = 0;
    for (int unsigned i = 0; i < w / d; i++) begin
      t = c + p * ((q >> (i * d)) % r);
      u = ((r - (t % r)) % r) * ninv % r;
      c = (t + u * n) / r;
    end
    return c;
  endfunction

  function automatic int unsigned mont_ref(int unsigned p, int unsigned q, int unsigned n,
                                           int unsigned w, int unsigned d);
    return mont_full(p, q, n, w, d) % (1 << w);
  endfunction

  // Inverse of 2**w modulo n (n odd, n > 1), by search.
  function automatic int unsigned inv_pow2_mod(int unsigned w, int unsigned n);
    for (int unsigned k = 0; k < n; k++)
      if ((((1 << w) % n) * k) % n == 1 % n) return k;
    return 0;
  endfunction
endpackage
