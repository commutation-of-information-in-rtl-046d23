// bch_det_mcs - determinants of Peterson's matrices L1..L3 over GF(2^4) and
// the majority coincidence outputs that count the errors.
//
//   det L1 = S1
//   det L2 = S1^3 + S3
//   det L3 = S1^6 + S1^3*S3 + S1*S5 + S3^2
//
// Each determinant is reduced by an OR of its bits to "non-zero". The
// majority coincidence outputs t_ge[j] = (det L_j | ... | det L3 non-zero)
// say "at least j errors". Adding an inversion of the next determinant's
// flag gives exact counts:
//   det L1 = 0                   no error
//   det L1 != 0, det L2 = 0      one error   (t_eq1)
//   det L2 != 0, det L3 = 0      two errors  (t_eq2)
//   det L3 != 0                  three or more (t_ge3)
// The products are GF(2^4) multipliers in logic; a table (PROM with 2m
// address inputs per product) would do the same. det1 is S1 by definition,
// so those four outputs are wired straight from the input. Combinational.
// Formulas, OR reductions and the decision rule follow the original circuit.
module bch_det_mcs
  import gf_pkg::*;
(
  input  gf16_t s1,
  input  gf16_t s3,
  input  gf16_t s5,
  output gf16_t det1,
  output gf16_t det2,
  output gf16_t det3,
  output logic [3:1] t_ge,              // t_ge[j]: at least j errors
  output logic  t_eq1,
  output logic  t_eq2,
  output logic  t_ge3
);
  gf16_t s1_cube;
  logic  nz1, nz2, nz3;

  always_comb begin
    s1_cube = gf16_mul(gf16_sq(s1), s1);
    det1    = s1;
    det2    = s1_cube ^ s3;
    det3    = gf16_sq(s1_cube) ^ gf16_mul(s1_cube, s3) ^ gf16_mul(s1, s5) ^ gf16_sq(s3);
  end

  assign nz1   = |det1;
  assign nz2   = |det2;
  assign nz3   = |det3;
  assign t_ge  = {nz3, nz2 | nz3, nz1 | nz2 | nz3};
  assign t_eq1 = nz1 & ~nz2;
  assign t_eq2 = nz2 & ~nz3;
  assign t_ge3 = nz3;
endmodule
