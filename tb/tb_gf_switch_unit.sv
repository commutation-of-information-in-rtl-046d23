// tb_gf_switch_unit - units for sources 1 and 2 of the 15 x 15 switch and
// the unit for source 5 of the 7 x 7 switch over GF(2^3).
// Worked case: source 2 (a^1) with control word a^3 reaches receiver 5.
// Then every control word, with the data bit at 1 and at 0.
module tb_gf_switch_unit;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic        din;
  logic [3:0]  addr;
  logic [2:0]  addr8;
  logic [14:0] y1, y2, exp1, exp2;
  logic [6:0]  y8, exp8;

  gf_switch_unit #(.M(4), .POLY(17'b10011), .POWER(0), .NOUT(15)) dut1 (.din(din), .addr(addr), .dout(y1));
  gf_switch_unit #(.M(4), .POLY(17'b10011), .POWER(1), .NOUT(15)) dut2 (.din(din), .addr(addr), .dout(y2));
  gf_switch_unit #(.M(3), .POLY(17'b1011),  .POWER(4), .NOUT(7))  dut8 (.din(din), .addr(addr8), .dout(y8));

  function automatic logic [14:0] line15(logic [3:0] v);
    return (v == 0) ? 15'd0 : 15'(1) << (v - 1);
  endfunction

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 1; addr = GF16_EXP[3]; addr8 = 0;
    @(posedge clk);
    checks++;
    if (y2 !== 15'b000_0000_0001_0000) begin failures++; $display("example: y=%b", y2); end
    for (int d = 0; d < 2; d++)
      for (int v = 0; v < 16; v++) begin
        din = d[0]; addr = 4'(v); addr8 = 3'(v);
        exp1 = d[0] ? line15(GF16_EXP[0] ^ addr) : '0;
        exp2 = d[0] ? line15(GF16_EXP[1] ^ addr) : '0;
        exp8 = (d[0] && (GF8_EXP[4] ^ addr8) != 0) ? 7'(1) << ((GF8_EXP[4] ^ addr8) - 1) : '0;
        @(posedge clk);
        checks += 3;
        if (y1 !== exp1) begin failures++; $display("u1 d=%0d a=%b y=%b", d, addr, y1); end
        if (y2 !== exp2) begin failures++; $display("u2 d=%0d a=%b y=%b", d, addr, y2); end
        if (y8 !== exp8) begin failures++; $display("u8 d=%0d a=%b y=%b", d, addr8, y8); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
