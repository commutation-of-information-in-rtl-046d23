// binary_decoder - W-input binary decoder whose output 0 is left out.
//
// Output y[j-1] is 1 when the input number equals j, for j = 1..NOUT. The
// number 0 (and any number above NOUT) drives no output: in the switches it
// stands for "no receiver". Combinational. Dropping output 0 follows the
// original decoder; the NOUT limit (used by the 5-input BCH decoder) is this
// design's addition.
module binary_decoder #(
  parameter int unsigned W    = 4,      // input bits (m)
  parameter int unsigned NOUT = 15      // outputs used, at most 2^W - 1
) (
  input  logic [W-1:0]    sel,
  output logic [NOUT-1:0] y             // y[j-1] <=> sel == j
);
  always_comb
    for (int unsigned j = 1; j <= NOUT; j++)
      y[j-1] = (sel == W'(j));

  initial assert (NOUT <= (1 << W) - 1)
    else $error("binary_decoder: NOUT %0d exceeds 2^W-1", NOUT);
endmodule
