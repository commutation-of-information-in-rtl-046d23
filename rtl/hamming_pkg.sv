// hamming_pkg - the (7,4) Hamming code that addresses the receivers of the
// error-correcting crossbar.
//
// Code words are written as printed, 7 bits c0..c6 from left to right with
// c0 in bit 6: three check symbols, then four information symbols i0..i3.
// A receiver's address is the code word whose information symbols spell its
// number in binary with i0 least significant (receiver 1 = 110 1000).
// The code has generator g(X) = 1 + X + X^3; the rows below are the systematic
// code words of receivers 1, 2, 4 and 8, and every address is the XOR of the
// rows for the set bits of the receiver number. HAM_H is the parity check
// matrix built from h(X) = 1 + X + X^2 + X^4; its columns are the seven
// distinct non-zero 3-bit syndromes, top row in syndrome bit 2.
package hamming_pkg;

  typedef logic [6:0] ham_word_t;
  typedef logic [2:0] ham_syn_t;

  localparam ham_word_t HAM_GSYS [4] = '{7'b1101000, 7'b0110100, 7'b1110010, 7'b1010001};
  localparam ham_word_t HAM_H    [3] = '{7'b0010111, 7'b0101110, 7'b1011100};

  // Address (code word) of receiver n, 0 <= n <= 15.
  function automatic ham_word_t ham_encode(logic [3:0] n);
    ham_word_t c = '0;
    for (int k = 0; k < 4; k++) if (n[k]) c ^= HAM_GSYS[k];
    return c;
  endfunction

  // Column j (1..7, counted from the left) of HAM_H, top row in bit 2.
  function automatic ham_syn_t ham_column(int j);
    ham_syn_t s;
    for (int r = 0; r < 3; r++) s[2-r] = HAM_H[r][7-j];
    return s;
  endfunction

  // Receiver number from the information symbols of a code word (its low
  // four bits, i0 in bit 3).
  function automatic logic [3:0] ham_info(logic [3:0] c);
    return {c[0], c[1], c[2], c[3]};          // i3 i2 i1 i0
  endfunction

endpackage
