// tb_gf_crossbar - random permutations (then random many-to-one choices) through the 15 x 15 switch over
// GF(2^4) and the 7 x 7 switch over GF(2^3). Source i is sent to receiver
// p(i) with control word a^(i-1) + p(i); random data bits; the output must
// equal the permuted data. Also: many sources to one receiver (OR) and
// control words that leave a source unconnected.
module tb_gf_crossbar;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;

  logic [14:0]       din, dout, expd;
  logic [14:0][3:0]  addr;
  logic [6:0]        din8, dout8, expd8;
  logic [6:0][2:0]   addr8;
  int perm [15];
  int perm8 [7];

  gf_crossbar #(.M(4), .POLY(17'b10011)) dut  (.din(din),  .addr(addr),  .dout(dout));
  gf_crossbar #(.M(3), .POLY(17'b1011))  dut8 (.din(din8), .addr(addr8), .dout(dout8));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 15; i++) perm[i] = i + 1;
      for (int i = 14; i > 0; i--) begin
        automatic int j = $urandom_range(i); automatic int x = perm[i]; perm[i] = perm[j]; perm[j] = x;
      end
      // second half: receivers drawn at random, so several sources share one
      if (t >= 150) for (int i = 0; i < 15; i++) perm[i] = 1 + $urandom_range(14);
      for (int i = 0; i < 7; i++) perm8[i] = i + 1;
      for (int i = 6; i > 0; i--) begin
        automatic int j = $urandom_range(i); automatic int x = perm8[i]; perm8[i] = perm8[j]; perm8[j] = x;
      end
      din = 15'($urandom); din8 = 7'($urandom);
      expd = '0; expd8 = '0;
      for (int i = 0; i < 15; i++) begin
        addr[i] = GF16_EXP[i] ^ 4'(perm[i]);
        if (din[i]) expd[perm[i]-1] = 1'b1;
      end
      for (int i = 0; i < 7; i++) begin
        addr8[i] = GF8_EXP[i] ^ 3'(perm8[i]);
        if (din8[i]) expd8[perm8[i]-1] = 1'b1;
      end
      @(posedge clk);
      checks += 2;
      if (dout  !== expd)  begin failures++; $display("GF16 t=%0d dout=%b exp=%b", t, dout, expd); end
      if (dout8 !== expd8) begin failures++; $display("GF8 t=%0d dout=%b exp=%b", t, dout8, expd8); end
    end
    // all sources to receiver 9 with one data bit set each time
    for (int k = 0; k < 15; k++) begin
      din = 15'(1) << k;
      for (int i = 0; i < 15; i++) addr[i] = GF16_EXP[i] ^ 4'd9;
      @(posedge clk);
      checks++;
      if (dout !== 15'(1) << 8) begin failures++; $display("merge k=%0d dout=%b", k, dout); end
    end
    // a control word equal to the source's own element: no receiver
    din = '1;
    for (int i = 0; i < 15; i++) addr[i] = GF16_EXP[i];
    @(posedge clk);
    checks++;
    if (dout !== '0) begin failures++; $display("unconnected dout=%b", dout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
