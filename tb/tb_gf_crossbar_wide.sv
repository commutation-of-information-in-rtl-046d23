// tb_gf_crossbar_wide - a 3-bit wide 15 x 15 switch over GF(2^4): each bit
// plane gets its own random receivers (shared receivers allowed) and random
// data; every plane must deliver its own pattern in the same cycle.
module tb_gf_crossbar_wide;
  import gf_ref_pkg::*;
  localparam int B = 3;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [B-1:0][14:0]      din, dout, expd;
  logic [B-1:0][14:0][3:0] addr;

  gf_crossbar_wide #(.M(4), .POLY(17'b10011), .B(B)) dut (.din(din), .addr(addr), .dout(dout));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      expd = '0;
      for (int b = 0; b < B; b++) begin
        din[b] = 15'($urandom);
        for (int i = 0; i < 15; i++) begin
          automatic int r = $urandom_range(15);
          addr[b][i] = GF16_EXP[i] ^ 4'(r);
          if (din[b][i] && r != 0) expd[b][r-1] = 1'b1;
        end
      end
      @(posedge clk);
      for (int b = 0; b < B; b++) begin
        checks++;
        if (dout[b] !== expd[b]) begin failures++; $display("t=%0d plane %0d dout=%b exp %b", t, b, dout[b], expd[b]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
