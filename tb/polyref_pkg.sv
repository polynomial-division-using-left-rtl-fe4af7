// polyref_pkg: reference GF(2) polynomial arithmetic for the testbenches.
// Polynomials are 64-bit vectors, bit i the coefficient of x^i. The
// remainder is formed by schoolbook long division from the top coefficient
// down, independently of the shift-register method used in the design.
package polyref_pkg;

  typedef logic [63:0] poly_t;

  // f mod p, where p has degree n (p[n] = 1).
  function automatic poly_t pmod(input poly_t f, input poly_t p, input int n);
    for (int i = 63; i >= n; i--)
      if (f[i]) f = f ^ (p << (i - n));
    return f;
  endfunction

  // Carry-less product; the caller keeps deg a + deg b below 64.
  function automatic poly_t pmul(input poly_t a, input poly_t b);
    poly_t s = '0;
    for (int i = 0; i < 64; i++)
      if (b[i]) s = s ^ (a << i);
    return s;
  endfunction

  // Random monic polynomial of degree n (n <= 32).
  function automatic poly_t rand_monic(input int n);
    poly_t p;
    p = poly_t'({$urandom(), $urandom()});
    p = p & ((poly_t'(1) << n) - 1);
    return p | (poly_t'(1) << n);
  endfunction

  // Random polynomial of degree at most d (d < 64).
  function automatic poly_t rand_poly(input int d);
    poly_t p;
    p = poly_t'({$urandom(), $urandom()});
    if (d < 63) p = p & ((poly_t'(1) << (d + 1)) - 1);
    return p;
  endfunction

endpackage
