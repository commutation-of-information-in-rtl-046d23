// tb_bch_switch_unit - one channel of the BCH switch. For every receiver:
// the clean address, addresses with one and two wrong bits (delivered, flag
// t_eq1 / t_eq2) and with three wrong bits (withheld, flag t_ge3), each one
// clock after it is applied; a data bit of 0 delivers nothing. Includes the
// worked two-error pattern (fifth and tenth positions).
module tb_bch_switch_unit;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        din;
  logic [14:0] addr, dout;
  logic [2:0]  st;

  bch_switch_unit #(.NOUT(15)) dut (
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

  task automatic apply(logic d, logic [14:0] a, logic [14:0] exp_out, logic [2:0] exp_st);
    @(negedge clk);
    din = d; addr = a;
    @(negedge clk);
    checks++;
    if (dout !== exp_out || st !== exp_st) begin
      failures++; $display("d=%b a=%b dout=%b exp %b st=%b exp %b", d, a, dout, exp_out, st, exp_st);
    end
  endtask

  initial begin
    din = 0; addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    din = 1; addr = bch_ref_encode(5'd7) ^ 15'b000010000100000;
    #1;
    checks++;
    if (dout !== '0) begin failures++; $display("output before the clock edge"); end
    @(negedge clk);
    checks++;
    if (dout !== 15'(1) << 6 || st !== 3'b010) begin failures++; $display("example dout=%b st=%b", dout, st); end
    for (int n = 1; n < 16; n++) begin
      apply(1, bch_ref_encode(5'(n)), 15'(1) << (n - 1), 3'b000);
      apply(0, bch_ref_encode(5'(n)), '0, 3'b000);
      repeat (10) apply(1, bch_ref_encode(5'(n)) ^ rand_pattern(1), 15'(1) << (n - 1), 3'b100);
      repeat (10) apply(1, bch_ref_encode(5'(n)) ^ rand_pattern(2), 15'(1) << (n - 1), 3'b010);
      repeat (10) apply(1, bch_ref_encode(5'(n)) ^ rand_pattern(3), '0, 3'b001);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
