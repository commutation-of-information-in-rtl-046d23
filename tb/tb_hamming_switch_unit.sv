// tb_hamming_switch_unit - one channel of the Hamming switch. For every
// receiver, the table address without error and with each single bit wrong
// must light exactly that receiver's line one clock after it is applied,
// with the corrected flag set for the wrong-bit cases; a data bit of 0 must
// light nothing. The first check measures the one-cycle latency.
module tb_hamming_switch_unit;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        din;
  logic [6:0]  addr;
  logic [14:0] dout;
  logic        corr;

  hamming_switch_unit #(.NOUT(15)) dut (
    .clk(clk), .rst_n(rst_n), .din(din), .addr(addr), .dout(dout), .corrected(corr));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic d, logic [6:0] a, logic [14:0] exp_out, logic exp_corr);
    @(negedge clk);
    din = d; addr = a;
    @(negedge clk);
    checks++;
    if (dout !== exp_out || corr !== exp_corr) begin
      failures++; $display("d=%b a=%b dout=%b exp %b corr=%b", d, a, dout, exp_out, corr);
    end
  endtask

  initial begin
    din = 0; addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency: nothing before the edge, the receiver after it
    @(negedge clk);
    din = 1; addr = HAM_TABLE[15];
    #1;
    checks++;
    if (dout !== '0) begin failures++; $display("output before the clock edge"); end
    @(negedge clk);
    checks++;
    if (dout !== 15'h4000) begin failures++; $display("latency: dout=%b", dout); end
    for (int n = 1; n < 16; n++) begin
      apply(1, HAM_TABLE[n], 15'(1) << (n - 1), 0);
      for (int p = 1; p <= 7; p++)
        apply(1, HAM_TABLE[n] ^ (7'b1000000 >> (p - 1)), 15'(1) << (n - 1), 1);
      apply(0, HAM_TABLE[n], '0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
