// tb_hamming_crossbar - the 15 x 15 switch with Hamming-coded addresses.
// First the worked case: 1 -> 15, 2 -> 14, 14 -> 1, 15 -> 2, other sources
// silent, source 1's address with its seventh bit wrong. Then random
// permutations (then random, shared receivers) with random data and one random wrong bit in each address;
// receivers must see the permuted data one clock later.
module tb_hamming_crossbar;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic             clk = 0, rst_n = 0;
  logic [14:0]      din, dout, corr, expd, expc;
  logic [14:0][6:0] addr;
  int perm [15];

  hamming_crossbar #(.N(15)) dut (
    .clk(clk), .rst_n(rst_n), .din(din), .addr(addr), .dout(dout), .corrected(corr));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0; addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    din = 15'b110_0000_0000_0011;
    for (int i = 0; i < 15; i++) addr[i] = '0;
    addr[0]  = 7'b1111110;             // receiver 15, seventh bit wrong
    addr[1]  = HAM_TABLE[14];
    addr[13] = HAM_TABLE[1];
    addr[14] = HAM_TABLE[2];
    @(negedge clk);
    checks += 2;
    if (dout !== 15'b110_0000_0000_0011) begin failures++; $display("example dout=%b", dout); end
    if (corr !== 15'b000_0000_0000_0001) begin failures++; $display("example corr=%b", corr); end
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 15; i++) perm[i] = i + 1;
      for (int i = 14; i > 0; i--) begin
        automatic int j = $urandom_range(i); automatic int x = perm[i]; perm[i] = perm[j]; perm[j] = x;
      end
      // second half: receivers drawn at random, so several sources share one
      if (t >= 150) for (int i = 0; i < 15; i++) perm[i] = 1 + $urandom_range(14);
      din = 15'($urandom);
      expd = '0; expc = '0;
      for (int i = 0; i < 15; i++) begin
        automatic int p = $urandom_range(7);     // 0: no error
        addr[i] = HAM_TABLE[perm[i]] ^ ((p == 0) ? 7'd0 : 7'b1000000 >> (p - 1));
        if (din[i]) begin expd[perm[i]-1] = 1'b1; expc[i] = (p != 0); end
      end
      @(negedge clk);
      checks += 2;
      if (dout !== expd) begin failures++; $display("t=%0d dout=%b exp %b", t, dout, expd); end
      if (corr !== expc) begin failures++; $display("t=%0d corr=%b exp %b", t, corr, expc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
