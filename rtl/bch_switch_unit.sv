// bch_switch_unit - one channel of the one-bit switch with BCH-coded receiver
// addresses: corrects up to two address errors and detects three or more.
//
// The source bit strobes the 15-bit address (a (15,5) BCH code word) through
// the AND group. The syndrome circuit gives S1, S3, S5; the determinant
// circuit decides how many errors there are; the locator finds one or two
// error positions. The register Rg loads the five information bits with the
// located errors inverted, and D2 decodes the corrected receiver number to
// NOUT receiver lines. With three or more errors (or a two-error pattern
// whose quadratic has no root) the channel delivers nothing and reports
// t_ge3; that choice, like the register and its single cycle of latency,
// belongs to this design, which mirrors the Hamming channel.
//
// Timing: din/addr before a rising edge, dout and status after it.
module bch_switch_unit
  import gf_pkg::*, bch_pkg::*;
#(
  parameter int unsigned NOUT = 15
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            din,          // source bit
  input  bch_word_t       addr,         // receiver address (code word)
  output logic [NOUT-1:0] dout,         // receiver lines 1..NOUT
  output bch_status_t     status        // aligned with dout
);
  bch_word_t   gated;
  gf16_t       s1, s3, s5, det2;
  logic        t_eq1, t_eq2, t_ge3, no_root, uncorr;
  logic [14:0] mask;
  logic [4:0]  info, flip, num;
  bch_status_t st;

  strobe_gate #(.W(15)) u_and (.strobe(din), .a(addr), .y(gated));

  bch_syndrome u_syn (.word(gated), .s1(s1), .s3(s3), .s5(s5));

  bch_det_mcs u_det (
    .s1 (s1), .s3 (s3), .s5 (s5),
    .det1 (), .det2 (det2), .det3 (), .t_ge (),
    .t_eq1 (t_eq1), .t_eq2 (t_eq2), .t_ge3 (t_ge3)
  );

  bch_error_locator u_loc (
    .s1 (s1), .det2 (det2), .t_eq1 (t_eq1), .t_eq2 (t_eq2),
    .mask (mask), .no_root (no_root)
  );

  always_comb begin
    uncorr   = t_ge3 | no_root;
    info     = uncorr ? '0 : bch_info(gated[4:0]);
    flip     = uncorr ? '0 : bch_info(mask[4:0]);
    st.t_eq1 = t_eq1;
    st.t_eq2 = t_eq2 & ~no_root;
    st.t_ge3 = uncorr;
  end

  correction_register #(.W(5), .FW(3)) u_rg (
    .clk      (clk),
    .rst_n    (rst_n),
    .info     (info),
    .flip     (flip),
    .flags_in (st),
    .q        (num),
    .flags_q  (status)
  );

  binary_decoder #(.W(5), .NOUT(NOUT)) u_d2 (.sel(num), .y(dout));
endmodule
