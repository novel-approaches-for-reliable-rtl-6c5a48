// gf9_pkg: arithmetic in GF(2^9) and the constants of the (511,448) binary BCH code.
//
// Field elements are 9-bit polynomial-basis vectors reduced by the primitive polynomial
// x^9 + x^4 + 1 (a standard choice for m = 9; the field size and code come from the design,
// the polynomial is this implementation's choice). alpha is the element 0x002.
// All functions are constant-foldable, so they can size tables or be synthesized as
// XOR networks (multiply, square) or as a chain of multipliers (inverse).
// K is used only by the full decoder; a lint of a single path reports it as an unused
// parameter, which is expected and harmless.
package gf9_pkg;

  localparam int unsigned M      = 9;           // field degree
  localparam int unsigned N      = 511;         // code length 2^m - 1
  localparam int unsigned K      = 448;         // information bits
  localparam logic [M:0]  PRIM   = 10'b10_0001_0001; // x^9 + x^4 + 1

  typedef logic [M-1:0] gf_t;

  // Product of two field elements: carry-less product, then reduction by PRIM.
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    logic [2*M-2:0] p;
    p = '0;
    for (int i = 0; i < int'(M); i++)
      if (b[i]) p = p ^ ((2*M-1)'(a) << i);
    for (int i = 2*int'(M) - 2; i >= int'(M); i--)
      if (p[i]) p = p ^ ((2*M-1)'(PRIM) << (i - int'(M)));
    return p[M-1:0];
  endfunction

  function automatic gf_t gf_sq(input gf_t a);
    return gf_mul(a, a);
  endfunction

  // alpha^e for 0 <= e (taken mod N)
  function automatic gf_t gf_alpha_pow(input int unsigned e);
    gf_t r;
    r = gf_t'(1);
    for (int unsigned i = 0; i < (e % N); i++) r = gf_mul(r, gf_t'(2));
    return r;
  endfunction

  // Multiplicative inverse a^(2^m - 2); returns 0 for a = 0.
  // a^510 = (a^255)^2 and a^255 = a * a^2 * a^4 * ... * a^128.
  function automatic gf_t gf_inv(input gf_t a);
    gf_t p;
    gf_t acc;
    p   = a;
    acc = gf_t'(1);
    for (int i = 0; i < int'(M) - 1; i++) begin
      acc = gf_mul(acc, p);
      p   = gf_sq(p);
    end
    return gf_sq(acc);
  endfunction

endpackage
