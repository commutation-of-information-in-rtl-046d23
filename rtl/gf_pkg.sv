// gf_pkg - arithmetic in the Galois fields GF(2^m) used by the crossbar switches.
//
// A field element is an m-bit word written the way the field table is
// printed: the coefficient of a^0 is the leftmost (most significant) bit,
// the coefficient of a^(m-1) the rightmost. So with F(X) = X^4 + X + 1,
// a^0 = 4'b1000, a^1 = 4'b0100, a^4 = 4'b1100 and a^14 = 4'b1001.
// Addition is bitwise XOR. Multiplication by a moves every coefficient one
// power up (a right shift in this bit order) and folds a^m back in with the
// low terms of the field polynomial.
//
// The generic functions take m and the polynomial (bit k = coefficient of
// X^k, so X^4 + X + 1 is 'b10011) as arguments and serve any m up to
// GF_MAXM. The gf16_* functions are the fixed GF(2^4), F(X) = X^4 + X + 1,
// field of the BCH switch. All are constant functions as well, so they also
// build tables at elaboration time.
package gf_pkg;

  localparam int unsigned GF_MAXM = 16;
  typedef logic [GF_MAXM-1:0] gf_word_t;

  // GF(2^4) of the BCH switch
  localparam int unsigned GF16_M = 4;
  localparam logic [4:0]  GF16_POLY = 5'b10011;   // X^4 + X + 1
  typedef logic [3:0] gf16_t;

  // Reverse the low m bits of w (standard bit order <-> printed order).
  function automatic gf_word_t gf_rev(gf_word_t w, int unsigned m);
    gf_word_t r = '0;
    for (int unsigned k = 0; k < m; k++) r[m-1-k] = w[k];
    return r;
  endfunction

  // x * a in GF(2^m), printed bit order.
  function automatic gf_word_t gf_mul_alpha(gf_word_t x, int unsigned m, gf_word_t poly);
    gf_word_t r;
    logic carry;
    carry = x[0];                         // coefficient of a^(m-1)
    r = x >> 1;
    if (carry) r ^= gf_rev(poly, m);      // a^m = low terms of F(a)
    return r;
  endfunction

  // a^k in GF(2^m), printed bit order.
  function automatic gf_word_t gf_alpha_pow(int unsigned k, int unsigned m, gf_word_t poly);
    gf_word_t r = gf_word_t'(1) << (m - 1);   // a^0
    for (int unsigned i = 0; i < k; i++) r = gf_mul_alpha(r, m, poly);
    return r;
  endfunction

  // ---------------------------------------------------------------- GF(16)
  function automatic gf16_t gf16_mul_alpha(gf16_t x);
    return gf16_t'(gf_mul_alpha(gf_word_t'(x), GF16_M, gf_word_t'(GF16_POLY)));
  endfunction

  function automatic gf16_t gf16_alpha_pow(int unsigned k);
    return gf16_t'(gf_alpha_pow(k % 15, GF16_M, gf_word_t'(GF16_POLY)));
  endfunction

  // Shift-and-add product: for each power a^k present in b add a * a^k.
  function automatic gf16_t gf16_mul(gf16_t a, gf16_t b);
    gf16_t r = '0;
    gf16_t t = a;
    for (int k = 0; k < 4; k++) begin
      if (b[3-k]) r ^= t;
      t = gf16_mul_alpha(t);
    end
    return r;
  endfunction

  function automatic gf16_t gf16_sq(gf16_t a);
    return gf16_mul(a, a);
  endfunction

  // Inverse as a^14 = a^-1 (0 maps to 0).
  function automatic gf16_t gf16_inv(gf16_t a);
    gf16_t a2  = gf16_sq(a);
    gf16_t a4  = gf16_sq(a2);
    gf16_t a8  = gf16_sq(a4);
    return gf16_mul(gf16_mul(a8, a4), a2);      // a^(8+4+2)
  endfunction

endpackage
