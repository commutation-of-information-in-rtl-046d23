// tb_hamming_crossbar_wide - a 3-bit wide Hamming-addressed switch. One
// address per source (with no or one wrong bit) serves all bit planes; each
// plane's bits must arrive at that receiver one clock later, with the
// corrected flag only in the planes whose bit was 1.
module tb_hamming_crossbar_wide;
  import gf_ref_pkg::*;
  localparam int B = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [B-1:0][14:0] din, dout, corr, expd, expc;
  logic [14:0][6:0]   addr;

  hamming_crossbar_wide #(.N(15), .B(B)) dut (
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
    for (int t = 0; t < 500; t++) begin
      expd = '0; expc = '0;
      for (int b = 0; b < B; b++) din[b] = 15'($urandom);
      for (int i = 0; i < 15; i++) begin
        automatic int r = 1 + $urandom_range(14);
        automatic int p = $urandom_range(7);
        addr[i] = HAM_TABLE[r] ^ ((p == 0) ? 7'd0 : 7'b1000000 >> (p - 1));
        for (int b = 0; b < B; b++)
          if (din[b][i]) begin expd[b][r-1] = 1'b1; expc[b][i] = (p != 0); end
      end
      @(negedge clk);
      checks += 2;
      if (dout !== expd) begin failures++; $display("t=%0d dout=%h exp %h", t, dout, expd); end
      if (corr !== expc) begin failures++; $display("t=%0d corr=%h exp %h", t, corr, expc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
