// tb_strobe_gate - the AND group passes the address only while the strobe is 1.
// Random addresses of the Hamming (7) and BCH (15) widths, strobe 0 and 1.
module tb_strobe_gate;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic        s7, s15;
  logic [6:0]  a7, y7;
  logic [14:0] a15, y15;

  strobe_gate #(.W(7))  dut7  (.strobe(s7),  .a(a7),  .y(y7));
  strobe_gate #(.W(15)) dut15 (.strobe(s15), .a(a15), .y(y15));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      a7 = 7'($urandom); a15 = 15'($urandom); s7 = n[0]; s15 = n[1];
      @(posedge clk);
      checks += 2;
      if (y7  !== (s7  ? a7  : 7'd0))  begin failures++; $display("W7 s=%b a=%b y=%b", s7, a7, y7); end
      if (y15 !== (s15 ? a15 : 15'd0)) begin failures++; $display("W15 s=%b a=%b y=%b", s15, a15, y15); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
