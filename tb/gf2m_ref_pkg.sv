// gf2m_ref_pkg: bit-serial reference arithmetic in GF(2^m) for the testbenches.
//
// Polynomials are held in a fixed 1024-bit vector, coefficient k in bit k; the
// field size m is passed as an argument (m <= 1000). The functions work one
// bit at a time, in the textbook way, and share nothing with the systolic
// design's split into C and D half-products:
//   mulmod   : A*B mod G, MSB-first shift-and-add
//   mulx     : A*x mod G;  divx : A*x^-1 mod G (add G when a_0 = 1, shift right)
//   mont     : A*B*x^-((m-1)/2) mod G, the Montgomery product with R = x^((m-1)/2)
//   to_mont  : a*R mod G (entry into the Montgomery domain)
package gf2m_ref_pkg;

  typedef logic [1023:0] poly_t;

  function automatic poly_t mulx(poly_t a, poly_t g, int m);
    poly_t r;
    r = a << 1;
    if (r[m]) r ^= g;
    return r;
  endfunction

  function automatic poly_t divx(poly_t a, poly_t g, int m);
    poly_t r;
    r = a;
    if (r[0]) r ^= g;
    return r >> 1;
  endfunction

  function automatic poly_t mulmod(poly_t a, poly_t b, poly_t g, int m);
    poly_t r;
    r = '0;
    for (int k = m - 1; k >= 0; k--) begin
      r = mulx(r, g, m);
      if (b[k]) r ^= a;
    end
    return r;
  endfunction

  function automatic poly_t mont(poly_t a, poly_t b, poly_t g, int m);
    poly_t r;
    r = mulmod(a, b, g, m);
    for (int k = 0; k < (m - 1) / 2; k++) r = divx(r, g, m);
    return r;
  endfunction

  function automatic poly_t to_mont(poly_t a, poly_t g, int m);
    poly_t r;
    r = a;
    for (int k = 0; k < (m - 1) / 2; k++) r = mulx(r, g, m);
    return r;
  endfunction

  // Random element of degree < m.
  function automatic poly_t rand_elem(int m);
    poly_t r;
    for (int w = 0; w < 32; w++) r[w*32 +: 32] = $urandom;
    for (int k = m; k < 1024; k++) r[k] = 1'b0;
    return r;
  endfunction

  // Random G with g_m = g_0 = 1 (the array does not need G to be irreducible).
  function automatic poly_t rand_poly(int m);
    poly_t r;
    r = rand_elem(m);
    r[0] = 1'b1;
    r[m] = 1'b1;
    return r;
  endfunction

endpackage
