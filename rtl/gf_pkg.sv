// gf_pkg -- GF(2^m) definitions shared by the Chien-search datapath.
//
// The field is GF(2^14) built on the primitive polynomial
// x^14 + x^10 + x^6 + x + 1; elements are m-bit vectors in the polynomial
// basis, bit i being the coefficient of alpha^i. The field size and the
// polynomial are this design's choice: a 1 KB message protected at code rate
// 0.93 needs a code length above 8191, hence m = 14.
//
// The functions are only evaluated at elaboration time, to derive the
// constant multiplication matrices of the finite-field multipliers (FFMs);
// no hardware is built from them directly.
package gf_pkg;

  localparam int unsigned M = 14;
  localparam logic [M:0] PRIM_POLY = 15'h4443;  // x^14+x^10+x^6+x+1
  localparam int unsigned Q1 = (1 << M) - 1;    // multiplicative order of alpha

  typedef logic [M-1:0] gf_t;

  // Product of two field elements (shift-and-add with reduction).
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    logic [M:0] acc;
    logic [M:0] sh;
    acc = '0;
    sh  = {1'b0, a};
    for (int i = 0; i < int'(M); i++) begin
      if (b[i]) acc = acc ^ sh;
      sh = sh << 1;
      if (sh[M]) sh = sh ^ PRIM_POLY;
    end
    return acc[M-1:0];
  endfunction

  // alpha^e for any non-negative exponent e (square and multiply).
  function automatic gf_t alpha_pow(int unsigned e);
    gf_t r;
    gf_t b;
    int unsigned x;
    r = gf_t'(1);
    b = gf_t'(2);
    x = e % Q1;
    while (x != 0) begin
      if (x[0]) r = gf_mul(r, b);
      b = gf_mul(b, b);
      x = x >> 1;
    end
    return r;
  endfunction

endpackage
