// tb_correction_register - register Rg: after each rising edge it holds the
// set value with the counting inputs' bits inverted, and the status bits of
// the same cycle; reset clears both.
module tb_correction_register;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  logic [4:0] info, flip, q, exp_q;
  logic [2:0] fl, flq, exp_f;

  correction_register #(.W(5), .FW(3)) dut (
    .clk(clk), .rst_n(rst_n), .info(info), .flip(flip), .flags_in(fl), .q(q), .flags_q(flq));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    info = '1; flip = '0; fl = '1;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== '0 || flq !== '0) begin failures++; $display("reset q=%b f=%b", q, flq); end
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      info = 5'($urandom); flip = 5'($urandom); fl = 3'($urandom);
      exp_q = '0;
      for (int k = 0; k < 5; k++) exp_q[k] = (info[k] != flip[k]);
      exp_f = fl;
      @(negedge clk);
      checks++;
      if (q !== exp_q || flq !== exp_f) begin
        failures++; $display("t=%0d q=%b exp %b f=%b exp %b", t, q, exp_q, flq, exp_f);
      end
    end
    rst_n = 0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("async reset q=%b", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
