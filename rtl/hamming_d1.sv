// hamming_d1 - decoder D1 of the Hamming switch: syndrome to correction mask.
//
// The syndrome equals the column of H at the wrong bit. D1 compares it with
// the columns of the four information symbols (positions 4..7) and raises
// flip[k] for information symbol i_k, which the register then inverts. A
// syndrome pointing at a check symbol (positions 1..3) leaves the information
// symbols alone. error is 1 for any non-zero syndrome. Combinational. D1's
// role comes from the original channel; its exact mapping follows from H,
// and the error output is this design's addition.
module hamming_d1
  import hamming_pkg::*;
(
  input  ham_syn_t   syndrome,
  output logic [3:0] flip,              // flip[k]: invert information bit i_k
  output logic       error              // a single error was seen
);
  always_comb
    for (int k = 0; k < 4; k++) flip[k] = (syndrome == ham_column(4 + k));

  assign error = |syndrome;
endmodule
