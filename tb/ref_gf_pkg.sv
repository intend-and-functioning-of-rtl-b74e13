// ref_gf_pkg -- reference GF(2^14) arithmetic for the testbenches.
//
// Written independently of the design's package: multiplication reduces a
// full 27-bit carry-less product modulo x^14+x^10+x^6+x+1, and powers of
// alpha use a right-to-left exponentiation with an explicit modular
// reduction of the exponent. Polynomials (error locators) are arrays of
// coefficients, index = degree.
package ref_gf_pkg;

  localparam int REF_Q1 = 16383;
  localparam int MAXDEG = 64;

  typedef logic [13:0] elem_t;
  typedef elem_t poly_t [0:MAXDEG];

  function automatic elem_t rmul(elem_t a, elem_t b);
    logic [26:0] p;
    p = '0;
    for (int i = 0; i < 14; i++) if (a[i]) p ^= 27'(b) << i;
    for (int i = 26; i >= 14; i--) if (p[i]) p ^= 27'h4443 << (i - 14);
    return p[13:0];
  endfunction

  function automatic elem_t rpow(int e);
    elem_t r, b;
    int x;
    x = e % REF_Q1;
    if (x < 0) x += REF_Q1;
    r = 14'd1;
    b = 14'd2;
    while (x > 0) begin
      if (x % 2 == 1) r = rmul(r, b);
      b = rmul(b, b);
      x = x / 2;
    end
    return r;
  endfunction

  // Multiplicative inverse: a^(2^14-2).
  function automatic elem_t rinv(elem_t a);
    elem_t r, b;
    int x;
    r = 14'd1; b = a; x = REF_Q1 - 1;
    while (x > 0) begin
      if (x % 2 == 1) r = rmul(r, b);
      b = rmul(b, b);
      x = x / 2;
    end
    return r;
  endfunction

  // Lambda(x) evaluated at alpha^i.
  function automatic elem_t peval(poly_t c, int deg, int i);
    elem_t s;
    s = '0;
    for (int j = 0; j <= deg; j++) s ^= rmul(c[j], rpow(j * i));
    return s;
  endfunction

endpackage
