// bch_pkg - the (15,5) BCH code, n = 15, t = 3, over GF(2^4), that addresses
// the receivers of the BCH crossbar.
//
// A 15-bit word is written as printed: position i from the left (bit 14-i)
// is the coefficient of X^i and carries the field element a^i in the
// syndromes. The generator g(X) = (1+X+X^4)(1+X+X^2+X^3+X^4)(1+X+X^2) has
// degree 10, so a code word has 10 check symbols (positions 0..9) followed by
// 5 information symbols (positions 10..14). The address of receiver n puts n
// into the information symbols, least significant bit first, and fills the
// check symbols with X^10 n(X) mod g(X): the same systematic layout as the
// Hamming switch's address table.
package bch_pkg;
  import gf_pkg::*;

  typedef logic [14:0] bch_word_t;

  // Error state of one channel, as decided by the determinant circuit.
  typedef struct packed {
    logic t_eq1;       // exactly one address error (corrected)
    logic t_eq2;       // exactly two address errors (corrected)
    logic t_ge3;       // three or more errors: detected, not corrected
  } bch_status_t;

  // Carry-less product of two polynomials, standard bit order.
  function automatic logic [15:0] poly_mul(logic [15:0] a, logic [15:0] b);
    logic [15:0] r = '0;
    for (int k = 0; k < 16; k++) if (b[k]) r ^= a << k;
    return r;
  endfunction

  // g(X), bit k = coefficient of X^k.
  function automatic logic [10:0] bch_gen();
    return 11'(poly_mul(poly_mul(16'b1_0011, 16'b1_1111), 16'b111));
  endfunction

  localparam logic [10:0] BCH_G = bch_gen();

  // Address (systematic code word, printed order) of receiver n, 0 <= n <= 31.
  function automatic bch_word_t bch_encode(logic [4:0] n);
    logic [14:0] c;                 // standard order, bit i = X^i
    c = 15'(n) << 10;
    for (int i = 14; i >= 10; i--)  // remainder of X^10 n(X) by g(X)
      if (c[i]) c ^= 15'(BCH_G) << (i - 10);
    c[14:10] = n;
    return bch_word_t'(gf_rev(gf_word_t'(c), 15));
  endfunction

  // Receiver number from the information symbols of a printed word (its low
  // five bits, i0 in bit 4).
  function automatic logic [4:0] bch_info(logic [4:0] w);
    return {w[0], w[1], w[2], w[3], w[4]};
  endfunction

endpackage
