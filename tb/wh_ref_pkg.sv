// wh_ref_pkg: reference arithmetic for the WH testbenches.
//
// Written straight from the definitions, with none of the structure of the
// hardware: a full carry-less product of two polynomials, then long division
// by the reduction polynomial, and the WH sum with explicit powers of x. The
// hardware instead interleaves multiplication and reduction bit by bit and
// uses Horner's rule, so agreement between the two is a real check.
// Widths up to 64 bits are handled in fixed 64/128-bit containers.
package wh_ref_pkg;

  typedef logic [63:0]  word_t;
  typedef logic [127:0] dword_t;

  function automatic word_t mask(input int unsigned w);
    return (w >= 64) ? '1 : ((64'd1 << w) - 64'd1);
  endfunction

  // Carry-less (GF(2)[x]) product of two polynomials of degree < w.
  function automatic dword_t clmul(input word_t a, input word_t b);
    dword_t r;
    r = '0;
    for (int i = 0; i < 64; i++)
      if (b[i]) r ^= dword_t'(a) << i;
    return r;
  endfunction

  // Remainder of x modulo x^w + plow (plow = low-order coefficients).
  function automatic word_t polymod(input dword_t x, input word_t plow,
                                    input int unsigned w);
    dword_t p;
    p = (dword_t'(1) << w) | dword_t'(word_t'(plow & mask(w)));
    for (int i = 127; i >= int'(w); i--)
      if (x[i]) x ^= p << (i - int'(w));
    return word_t'(x) & mask(w);
  endfunction

  function automatic word_t gfmul(input word_t a, input word_t b,
                                  input word_t plow, input int unsigned w);
    return polymod(clmul(a & mask(w), b & mask(w)), plow, w);
  endfunction

  // x^e mod p
  function automatic word_t xpow(input int unsigned e, input word_t plow,
                                 input int unsigned w);
    word_t r;
    r = 64'd1;
    for (int unsigned i = 0; i < e; i++) r = gfmul(r, 64'd2, plow, w);
    return r;
  endfunction

  // WH over message words m[0..n-1] with key words k[koff .. koff+n-1]
  // (0-based; koff = 2(j-1) for Toeplitz hash j).
  function automatic word_t wh(input word_t m[64], input word_t k[64],
                               input int unsigned koff, input int unsigned n,
                               input word_t plow, input int unsigned w);
    word_t s, prod;
    s = '0;
    for (int unsigned i = 1; i <= n / 2; i++) begin
      prod = gfmul(m[2*i-2] ^ k[koff+2*i-2], m[2*i-1] ^ k[koff+2*i-1], plow, w);
      s ^= gfmul(prod, xpow((n/2 - i) * w, plow, w), plow, w);
    end
    return s;
  endfunction

endpackage
