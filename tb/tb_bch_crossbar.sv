// tb_bch_crossbar - the 15 x 15 switch with BCH-coded addresses. Random
// permutations (then random, shared receivers) with random data; each address gets 0, 1 or 2 wrong bits
// (delivered) or, now and then, 3 (withheld and flagged). Receivers must see
// the expected bits and each source its error count one clock later.
module tb_bch_crossbar;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic              clk = 0, rst_n = 0;
  logic [14:0]       din, dout, expd;
  logic [14:0][14:0] addr;
  logic [14:0][2:0]  st, exps;
  int perm [15];

  bch_crossbar #(.N(15)) dut (
    .clk(clk), .rst_n(rst_n), .din(din), .addr(addr), .dout(dout), .status(st));

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
    din = '0; addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 15; i++) perm[i] = i + 1;
      for (int i = 14; i > 0; i--) begin
        automatic int j = $urandom_range(i); automatic int x = perm[i]; perm[i] = perm[j]; perm[j] = x;
      end
      // second half: receivers drawn at random, so several sources share one
      if (t >= 150) for (int i = 0; i < 15; i++) perm[i] = 1 + $urandom_range(14);
      din = 15'($urandom);
      expd = '0; exps = '0;
      for (int i = 0; i < 15; i++) begin
        automatic int w = ($urandom_range(9) == 0) ? 3 : $urandom_range(2);
        addr[i] = bch_ref_encode(5'(perm[i])) ^ rand_pattern(w);
        if (din[i]) begin
          exps[i] = (w == 1) ? 3'b100 : (w == 2) ? 3'b010 : (w == 3) ? 3'b001 : 3'b000;
          if (w < 3) expd[perm[i]-1] = 1'b1;
        end
      end
      @(negedge clk);
      checks += 2;
      if (dout !== expd) begin failures++; $display("t=%0d dout=%b exp %b", t, dout, expd); end
      if (st !== exps) begin failures++; $display("t=%0d status=%h exp %h", t, st, exps); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
