// bch_error_locator - positions of one or two errors in a 15-bit BCH word.
//
// One error: S1 itself is the error locator a^p.
// Two errors: the locator polynomial X^2 + S1*X + (S1^3+S3)/S1 is turned by
// X = S1*Y into Y^2 + Y + d with d = (S1^3 + S3)/S1^3 = det L2 / S1^3. A
// 16-entry table, built at elaboration from the field, gives a root Y1 of
// Y^2 + Y + d for each d; then X1 = S1*Y1 and X2 = S1 + X1. A d for which
// the quadratic has no root in GF(2^4) means more than two errors (no_root).
// The locators are turned into a 15-bit mask in printed order (position p =
// mask[14-p]) by comparing them with a^0..a^14. Combinational. The method
// and the stored root table are the original ones; building the table at
// elaboration instead of in a memory, and the no_root output, are this
// design's choices.
module bch_error_locator
  import gf_pkg::*;
(
  input  gf16_t       s1,
  input  gf16_t       det2,
  input  logic        t_eq1,
  input  logic        t_eq2,
  output logic [14:0] mask,             // bits to invert
  output logic        no_root           // two errors flagged but no roots
);
  typedef logic [15:0][3:0] root_tab_t;

  // Smallest y with y^2 + y = d, for every d; 0 where none exists.
  function automatic root_tab_t root_table();
    root_tab_t t = '0;
    for (int d = 15; d >= 0; d--)
      for (int y = 15; y >= 1; y--)
        if ((gf16_sq(gf16_t'(y)) ^ gf16_t'(y)) == gf16_t'(d)) t[d] = gf16_t'(y);
    return t;
  endfunction

  localparam root_tab_t ROOT = root_table();

  gf16_t d, y1, x1, x2;

  always_comb begin
    d  = gf16_mul(det2, gf16_inv(gf16_mul(gf16_sq(s1), s1)));
    y1 = ROOT[d];
    x1 = gf16_mul(s1, y1);
    x2 = s1 ^ x1;
    no_root = t_eq2 && (y1 == '0);
    mask = '0;
    for (int unsigned p = 0; p < 15; p++) begin
      if (t_eq1 && s1 == gf16_alpha_pow(p)) mask[14-p] = 1'b1;
      if (t_eq2 && y1 != '0 && (x1 == gf16_alpha_pow(p) || x2 == gf16_alpha_pow(p)))
        mask[14-p] = 1'b1;
    end
  end
endmodule
