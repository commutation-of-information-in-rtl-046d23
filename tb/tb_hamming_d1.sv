// tb_hamming_d1 - decoder D1 for all eight syndromes: the columns of the
// information positions 4..7 flip information bits i0..i3, the columns of
// the check positions 1..3 and 000 flip nothing.
module tb_hamming_d1;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0;
  logic [2:0] syn;
  logic [3:0] flip, exp_flip;
  logic       err;

  hamming_d1 dut (.syndrome(syn), .flip(flip), .error(err));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p <= 7; p++) begin
      syn = HAM_COL[p];
      exp_flip = (p >= 4) ? 4'(1) << (p - 4) : 4'd0;
      @(posedge clk);
      checks += 2;
      if (flip !== exp_flip) begin failures++; $display("pos %0d flip %b exp %b", p, flip, exp_flip); end
      if (err !== (p != 0)) begin failures++; $display("pos %0d error %b", p, err); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
