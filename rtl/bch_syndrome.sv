// bch_syndrome - power-sum syndromes S1, S3, S5 of a 15-bit word over GF(2^4).
//
// Bit position i (counted from the left, from 0) carries the field element
// a^i; S_j is the field sum of a^(j*i) over the positions holding a 1. These
// are the three 4-bit column groups of the transposed parity check matrix
// (rows a^i, a^3i, a^5i). For a code word of the (15,5) BCH code all three
// are 0; for an error pattern with locators X_k they are sum X_k^j.
// Combinational: each syndrome bit is an XOR of word bits. The matrix is the
// original one; the position-to-bit order is this design's convention.
module bch_syndrome
  import gf_pkg::*, bch_pkg::*;
(
  input  bch_word_t word,               // printed order, position 0 = word[14]
  output gf16_t     s1,
  output gf16_t     s3,
  output gf16_t     s5
);
  always_comb begin
    s1 = '0;
    s3 = '0;
    s5 = '0;
    for (int unsigned i = 0; i < 15; i++)
      if (word[14-i]) begin
        s1 ^= gf16_alpha_pow(i);
        s3 ^= gf16_alpha_pow(3 * i);
        s5 ^= gf16_alpha_pow(5 * i);
      end
  end
endmodule
