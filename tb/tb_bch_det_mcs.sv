// tb_bch_det_mcs - determinants det L1..det L3 and the error-count outputs.
// The worked example gives det L1 = a^14, det L2 = a^12, det L3 = 0 (two
// errors). Random error patterns of weight 0..3 must be counted exactly;
// for heavier patterns the determinants are compared with reference values.
// The "at least j errors" outputs follow the non-zero determinants.
module tb_bch_det_mcs;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic [3:0]  s1, s3, s5, d1, d2, d3, e1, e2, e3;
  logic        t1, t2, t3;
  logic [3:1]  tge;
  logic [14:0] e;
  logic [11:0] s;
  int          cnt [4];

  bch_det_mcs dut (.s1(s1), .s3(s3), .s5(s5), .det1(d1), .det2(d2), .det3(d3), .t_ge(tge),
                   .t_eq1(t1), .t_eq2(t2), .t_ge3(t3));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [14:0] rand_pattern(int w);
    logic [14:0] p = '0;
    while ($countones(p) < w) p[$urandom_range(14)] = 1'b1;
    return p;
  endfunction

  initial begin
    s1 = GF16_EXP[14]; s3 = 4'b0000; s5 = GF16_EXP[10];
    @(posedge clk);
    checks++;
    if (d1 !== GF16_EXP[14] || d2 !== GF16_EXP[12] || d3 !== 4'b0000 || {t1, t2, t3} !== 3'b010) begin
      failures++; $display("example det %b %b %b t=%b%b%b", d1, d2, d3, t1, t2, t3);
    end
    for (int t = 0; t < 2000; t++) begin
      automatic int w = (t < 1600) ? t % 4 : 4 + $urandom_range(11);
      e = rand_pattern(w);
      s = bch_ref_syndrome(e);
      {s1, s3, s5} = s;
      e1 = s1;
      e2 = gf16_ref_pow(s1, 3) ^ s3;
      e3 = gf16_ref_pow(s1, 6) ^ gf16_ref_mul(gf16_ref_pow(s1, 3), s3)
         ^ gf16_ref_mul(s1, s5) ^ gf16_ref_mul(s3, s3);
      @(posedge clk);
      checks++;
      if (d1 !== e1 || d2 !== e2 || d3 !== e3) begin
        failures++; $display("e=%b det %b %b %b exp %b %b %b", e, d1, d2, d3, e1, e2, e3);
      end
      checks++;
      if (tge !== {e3 != 0, (e2 != 0) || (e3 != 0), (e1 != 0) || (e2 != 0) || (e3 != 0)}) begin
        failures++; $display("e=%b t_ge=%b", e, tge);
      end
      if (w < 4) begin
        checks++;
        cnt[w]++;
        if ({t1, t2, t3} !== ((w == 0) ? 3'b000 : (w == 1) ? 3'b100 : (w == 2) ? 3'b010 : 3'b001)) begin
          failures++; $display("weight %0d e=%b t=%b%b%b", w, e, t1, t2, t3);
        end
      end
    end
    $display("patterns of weight 0..3: %0d %0d %0d %0d", cnt[0], cnt[1], cnt[2], cnt[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
