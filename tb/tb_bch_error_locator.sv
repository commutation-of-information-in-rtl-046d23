// tb_bch_error_locator - error positions from S1 and det L2.
// Worked example: errors at the fifth and tenth positions (S1 = a^14,
// det L2 = a^12) give the locators a^4 and a^9. Every single and double
// error pattern must be located exactly. Then, for every non-zero S1 and
// det L2 flagged as two errors, the mask must hold the two roots found by
// search, or no_root must be raised when Y^2 + Y + d has none.
module tb_bch_error_locator;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic [3:0]  s1, det2;
  logic        t1, t2, no_root;
  logic [14:0] mask, e, exp_mask;
  logic [11:0] s;
  int          roots;

  bch_error_locator dut (.s1(s1), .det2(det2), .t_eq1(t1), .t_eq2(t2), .mask(mask), .no_root(no_root));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s1 = GF16_EXP[14]; det2 = GF16_EXP[12]; t1 = 0; t2 = 1;
    @(posedge clk);
    checks++;
    if (mask !== 15'b000010000100000 || no_root) begin failures++; $display("example mask=%b", mask); end
    for (int a = 0; a < 15; a++)
      for (int b = a; b < 15; b++) begin
        e = (15'(1) << (14 - a)) | (15'(1) << (14 - b));
        s = bch_ref_syndrome(e);
        s1 = s[11:8];
        det2 = gf16_ref_pow(s1, 3) ^ s[7:4];
        t1 = (a == b); t2 = (a != b);
        @(posedge clk);
        checks++;
        if (mask !== e || no_root) begin failures++; $display("e=%b mask=%b no_root=%b", e, mask, no_root); end
      end
    t1 = 0; t2 = 1;
    for (int x = 1; x < 16; x++)
      for (int y = 1; y < 16; y++) begin
        automatic logic [3:0] dd;
        s1 = 4'(x); det2 = 4'(y);
        dd = gf16_ref_mul(det2, gf16_ref_pow(s1, 12));   // det2 / S1^3
        exp_mask = '0; roots = 0;
        for (int r = 1; r < 16; r++)
          if ((gf16_ref_mul(4'(r), 4'(r)) ^ 4'(r)) == dd) begin
            roots++;
            exp_mask[14 - gf16_log(gf16_ref_mul(s1, 4'(r)))] = 1'b1;
          end
        @(posedge clk);
        checks++;
        if (roots == 0 ? (no_root !== 1'b1) : (no_root !== 1'b0 || mask !== exp_mask)) begin
          failures++; $display("S1=%b det2=%b mask=%b exp %b no_root=%b", s1, det2, mask, exp_mask, no_root);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
