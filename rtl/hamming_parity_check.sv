// hamming_parity_check - syndrome of a 7-bit (7,4) Hamming code word.
//
// Each syndrome bit is the parity of the word bits selected by one row of the
// parity check matrix H (rows 0010111, 0101110, 1011100). A code word gives
// 000; a word with one wrong bit gives that bit's column of H, e.g. 100 for
// the seventh (rightmost) bit. Combinational, one XOR tree per row. H and its
// row order are the original ones; the syndrome bit order is this design's.
module hamming_parity_check
  import hamming_pkg::*;
(
  input  ham_word_t word,               // printed order, leftmost bit = word[6]
  output ham_syn_t  syndrome            // syndrome[2] from the top row of H
);
  always_comb
    for (int r = 0; r < 3; r++) syndrome[2-r] = ^(word & HAM_H[r]);
endmodule
