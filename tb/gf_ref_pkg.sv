// gf_ref_pkg - reference values for the testbenches, written out from the
// published tables rather than computed the way the RTL computes them.
//
//  * GF16_EXP: the 15 non-zero elements a^0..a^14 of GF(2^4), F(X) = X^4+X+1,
//    in printed order (a^0 = 1000). Products use logarithms into this table.
//  * GF8_EXP:  a^0..a^6 of GF(2^3), F(X) = X^3 + X + 1, same order.
//  * HAM_TABLE: the receiver addresses 1..15 of the (7,4) Hamming switch.
//  * HAM_COL: the column of H for each bit position 1..7.
//  * BCH_HT: the transposed BCH parity check matrix, one 12-bit row
//    {a^i, a^3i, a^5i} per bit position i.
//  * bch_ref_encode: systematic (15,5) encoding by long division by
//    g(X) = X^10 + X^8 + X^5 + X^4 + X^2 + X + 1.
package gf_ref_pkg;

  localparam logic [3:0] GF16_EXP [15] = '{
    4'b1000, 4'b0100, 4'b0010, 4'b0001, 4'b1100, 4'b0110, 4'b0011, 4'b1101,
    4'b1010, 4'b0101, 4'b1110, 4'b0111, 4'b1111, 4'b1011, 4'b1001};

  localparam logic [2:0] GF8_EXP [7] = '{
    3'b100, 3'b010, 3'b001, 3'b110, 3'b011, 3'b111, 3'b101};

  localparam logic [6:0] HAM_TABLE [16] = '{
    7'b0000000,
    7'b1101000, 7'b0110100, 7'b1011100, 7'b1110010, 7'b0011010, 7'b1000110,
    7'b0101110, 7'b1010001, 7'b0111001, 7'b1100101, 7'b0001101, 7'b0100011,
    7'b1001011, 7'b0010111, 7'b1111111};

  localparam logic [2:0] HAM_COL [8] = '{
    3'b000, 3'b001, 3'b010, 3'b101, 3'b011, 3'b111, 3'b110, 3'b100};

  localparam logic [11:0] BCH_HT [15] = '{
    12'b1000_1000_1000, 12'b0100_0001_0110, 12'b0010_0011_1110,
    12'b0001_0101_1000, 12'b1100_1111_0110, 12'b0110_1000_1110,
    12'b0011_0001_1000, 12'b1101_0011_0110, 12'b1010_0101_1110,
    12'b0101_1111_1000, 12'b1110_1000_0110, 12'b0111_0001_1110,
    12'b1111_0011_1000, 12'b1011_0101_0110, 12'b1001_1111_1110};

  function automatic int gf16_log(logic [3:0] x);
    for (int i = 0; i < 15; i++) if (GF16_EXP[i] == x) return i;
    return -1;                                   // zero has no logarithm
  endfunction

  function automatic logic [3:0] gf16_ref_mul(logic [3:0] a, logic [3:0] b);
    if (a == 0 || b == 0) return 4'b0000;
    return GF16_EXP[(gf16_log(a) + gf16_log(b)) % 15];
  endfunction

  function automatic logic [3:0] gf16_ref_pow(logic [3:0] a, int k);
    logic [3:0] r = 4'b1000;
    for (int i = 0; i < k; i++) r = gf16_ref_mul(r, a);
    return r;
  endfunction

  // {S1, S3, S5} of a printed 15-bit word through the H^T rows.
  function automatic logic [11:0] bch_ref_syndrome(logic [14:0] w);
    logic [11:0] s = '0;
    for (int i = 0; i < 15; i++) if (w[14-i]) s ^= BCH_HT[i];
    return s;
  endfunction

  // Printed-order code word of receiver n: check symbols at positions 0..9,
  // n (least significant bit first) at positions 10..14.
  function automatic logic [14:0] bch_ref_encode(logic [4:0] n);
    logic [14:0] poly;                           // bit i = coefficient of X^i
    logic [14:0] out;
    poly = {n, 10'b0};
    for (int i = 14; i >= 10; i--)
      if (poly[i]) poly ^= 15'b000_0101_0011_0111 << (i - 10);
    poly[14:10] = n;
    for (int i = 0; i < 15; i++) out[14-i] = poly[i];
    return out;
  endfunction

endpackage
