// tb_gf_mod2_adder - field addition of two GF(2^4) elements under the strobe.
// The worked case a^1 + a^3 = 0101, then every pair of elements, strobe 0 and 1.
module tb_gf_mod2_adder;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0;
  logic       strobe;
  logic [3:0] a, b, sum, exp_sum;

  gf_mod2_adder #(.M(4)) dut (.strobe(strobe), .a(a), .b(b), .sum(sum));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    strobe = 1; a = GF16_EXP[1]; b = GF16_EXP[3];
    @(posedge clk);
    checks++;
    if (sum !== 4'b0101) begin failures++; $display("a^1+a^3 gave %b", sum); end
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          strobe = s[0]; a = 4'(i); b = 4'(j);
          // sum of the two bitwise, component by component
          for (int k = 0; k < 4; k++) exp_sum[k] = s[0] & (a[k] != b[k]);
          @(posedge clk);
          checks++;
          if (sum !== exp_sum) begin failures++; $display("s=%0d %b+%b=%b exp %b", s, a, b, sum, exp_sum); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
