// tb_bch_syndrome - S1, S3, S5 of 15-bit words against the rows of the
// transposed parity check matrix. The worked error pattern (fifth and tenth
// positions) gives S1 = a^14, S3 = 0, S5 = a^10; every receiver address is a
// code word (all syndromes 0); random words match the row sums.
module tb_bch_syndrome;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic [14:0] word;
  logic [3:0]  s1, s3, s5;
  logic [11:0] exp_s;

  bch_syndrome dut (.word(word), .s1(s1), .s3(s3), .s5(s5));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word = 15'b000010000100000;
    @(posedge clk);
    checks++;
    if ({s1, s3, s5} !== {GF16_EXP[14], 4'b0000, GF16_EXP[10]}) begin
      failures++; $display("example S1=%b S3=%b S5=%b", s1, s3, s5);
    end
    for (int n = 0; n < 32; n++) begin
      word = bch_ref_encode(5'(n));
      @(posedge clk);
      checks++;
      if ({s1, s3, s5} !== 12'd0) begin failures++; $display("code word %0d S=%b %b %b", n, s1, s3, s5); end
    end
    for (int t = 0; t < 1000; t++) begin
      word = 15'($urandom);
      exp_s = bch_ref_syndrome(word);
      @(posedge clk);
      checks++;
      if ({s1, s3, s5} !== exp_s) begin failures++; $display("word %b S=%b%b%b exp %b", word, s1, s3, s5, exp_s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
