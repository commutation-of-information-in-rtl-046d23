// tb_hamming_parity_check - syndromes of the (7,4) Hamming code.
// Every receiver address of the address table gives 000; each address with
// one bit inverted gives that bit's column of H (bit 7 of 1111111 -> 100);
// every 7-bit word is compared with the column sum of its set bits.
module tb_hamming_parity_check;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0;
  logic [6:0] word;
  logic [2:0] syn, exp_syn;

  hamming_parity_check dut (.word(word), .syndrome(syn));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word = 7'b1111110;
    @(posedge clk);
    checks++;
    if (syn !== 3'b100) begin failures++; $display("example syndrome %b", syn); end
    for (int n = 1; n < 16; n++) begin
      word = HAM_TABLE[n];
      @(posedge clk);
      checks++;
      if (syn !== 3'b000) begin failures++; $display("rcv %0d syndrome %b", n, syn); end
      for (int p = 1; p <= 7; p++) begin
        word = HAM_TABLE[n] ^ (7'b1000000 >> (p - 1));
        @(posedge clk);
        checks++;
        if (syn !== HAM_COL[p]) begin failures++; $display("rcv %0d bit %0d syndrome %b", n, p, syn); end
      end
    end
    for (int w = 0; w < 128; w++) begin
      word = 7'(w);
      exp_syn = '0;
      for (int p = 1; p <= 7; p++) if (word[7-p]) exp_syn ^= HAM_COL[p];
      @(posedge clk);
      checks++;
      if (syn !== exp_syn) begin failures++; $display("word %b syndrome %b exp %b", word, syn, exp_syn); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
