// tb_bch_crossbar_wide - a 3-bit wide BCH-addressed switch. One address per
// source, with 0..3 wrong bits, serves all bit planes; planes whose bit is 1
// must deliver (0..2 errors) or withhold and flag (3 errors) one clock later.
module tb_bch_crossbar_wide;
  import gf_ref_pkg::*;
  localparam int B = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [B-1:0][14:0]      din, dout, expd;
  logic [B-1:0][14:0][2:0] st, exps;
  logic [14:0][14:0]       addr;

  bch_crossbar_wide #(.N(15), .B(B)) dut (
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
    for (int t = 0; t < 500; t++) begin
      expd = '0; exps = '0;
      for (int b = 0; b < B; b++) din[b] = 15'($urandom);
      for (int i = 0; i < 15; i++) begin
        automatic int r = 1 + $urandom_range(14);
        automatic int w = $urandom_range(3);
        addr[i] = bch_ref_encode(5'(r)) ^ rand_pattern(w);
        for (int b = 0; b < B; b++)
          if (din[b][i]) begin
            exps[b][i] = (w == 1) ? 3'b100 : (w == 2) ? 3'b010 : (w == 3) ? 3'b001 : 3'b000;
            if (w < 3) expd[b][r-1] = 1'b1;
          end
      end
      @(negedge clk);
      checks += 2;
      if (dout !== expd) begin failures++; $display("t=%0d dout=%h exp %h", t, dout, expd); end
      if (st !== exps) begin failures++; $display("t=%0d status=%h exp %h", t, st, exps); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
