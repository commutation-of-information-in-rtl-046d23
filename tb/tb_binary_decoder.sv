// tb_binary_decoder - every input number of a 4-to-15 and a 5-to-15 decoder;
// 0 and numbers above the output count must drive nothing.
module tb_binary_decoder;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic [3:0]  sel4;
  logic [4:0]  sel5;
  logic [14:0] y4, y5;

  binary_decoder #(.W(4), .NOUT(15)) dut4 (.sel(sel4), .y(y4));
  binary_decoder #(.W(5), .NOUT(15)) dut5 (.sel(sel5), .y(y5));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      sel4 = 4'(v); sel5 = 5'(v);
      @(posedge clk);
      if (v < 16) begin
        checks++;
        if (y4 !== ((v == 0) ? 15'd0 : 15'(1) << (v - 1))) begin
          failures++; $display("W4 sel=%0d y=%b", v, y4);
        end
      end
      checks++;
      if (y5 !== ((v == 0 || v > 15) ? 15'd0 : 15'(1) << (v - 1))) begin
        failures++; $display("W5 sel=%0d y=%b", v, y5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
