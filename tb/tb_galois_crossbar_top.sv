// tb_galois_crossbar_top - end-to-end run of all three switches, 15 x 15 each, at the
// default parameters (one data bit per source).
//
// Every cycle each source of each switch picks a random receiver (several
// sources may pick the same one, whose bits are then ORed) and random data.
//  * GF switch: the control word is a^(i-1) + receiver, or a^(i-1) alone to
//    leave the source unconnected; checked in the same cycle.
//  * Hamming switch: table address with no or one wrong bit; checked, with
//    the corrected flags, one clock later.
//  * BCH switch: address with 0..3 wrong bits; 3 must be withheld and
//    flagged; checked one clock later.
// Counted and required at least once: deliveries on each switch, merged
// receivers, unconnected GF sources, silent sources, Hamming corrections,
// BCH one-error and two-error corrections and three-error detections.
module tb_galois_crossbar_top;
  import gf_ref_pkg::*;
  localparam int B = 1;                    // data bits per source
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic [B-1:0][14:0]      gf_din, gf_dout, ham_din, ham_dout, ham_corr, bch_din, bch_dout;
  logic [B-1:0][14:0][3:0] gf_addr;
  logic [14:0][6:0]        ham_addr;
  logic [14:0][14:0]       bch_addr;
  logic [B-1:0][14:0][2:0] bch_st;

  logic [B-1:0][14:0]      gf_exp, ham_exp, ham_cexp, bch_exp;
  logic [B-1:0][14:0][2:0] bch_sexp;

  int n_gf_del, n_gf_unconn, n_merge, n_silent, n_ham_del, n_ham_corr;
  int n_bch_del, n_bch_t1, n_bch_t2, n_bch_t3;

  galois_crossbar_top dut (
    .clk (clk), .rst_n (rst_n),
    .gf_din (gf_din), .gf_addr (gf_addr), .gf_dout (gf_dout),
    .ham_din (ham_din), .ham_addr (ham_addr), .ham_dout (ham_dout), .ham_corrected (ham_corr),
    .bch_din (bch_din), .bch_addr (bch_addr), .bch_dout (bch_dout), .bch_status (bch_st));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [14:0] rand_pattern(int w);
    logic [14:0] p = '0;
    while ($countones(p) < w) p[$urandom_range(14)] = 1'b1;
    return p;
  endfunction

  task automatic require(string what, int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin failures++; $display("never happened: %s", what); end
  endtask

  initial begin
    gf_din = '0; gf_addr = '0; ham_din = '0; ham_addr = '0; bch_din = '0; bch_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int hits [16];
      @(negedge clk);
      for (int b = 0; b < B; b++) begin
        gf_din[b] = 15'($urandom); ham_din[b] = 15'($urandom); bch_din[b] = 15'($urandom);
      end
      gf_exp = '0; ham_exp = '0; ham_cexp = '0; bch_exp = '0; bch_sexp = '0;
      for (int b = 0; b < B; b++) begin
        foreach (hits[k]) hits[k] = 0;
        for (int i = 0; i < 15; i++) begin
          automatic int r = $urandom_range(15);                  // 0: leave unconnected
          gf_addr[b][i] = GF16_EXP[i] ^ 4'(r);
          if (gf_din[b][i] && r != 0) begin gf_exp[b][r-1] = 1'b1; n_gf_del++; hits[r]++; end
          if (gf_din[b][i] && r == 0) n_gf_unconn++;
          if (!gf_din[b][i]) n_silent++;
        end
        foreach (hits[k]) if (k > 0 && hits[k] > 1) n_merge++;
      end
      for (int i = 0; i < 15; i++) begin
        automatic int r = 1 + $urandom_range(14);
        automatic int p = $urandom_range(7);
        ham_addr[i] = HAM_TABLE[r] ^ ((p == 0) ? 7'd0 : 7'b1000000 >> (p - 1));
        for (int b = 0; b < B; b++)
          if (ham_din[b][i]) begin
            ham_exp[b][r-1] = 1'b1; ham_cexp[b][i] = (p != 0);
            n_ham_del++; if (p != 0) n_ham_corr++;
          end
      end
      for (int i = 0; i < 15; i++) begin
        automatic int r = 1 + $urandom_range(14);
        automatic int w = $urandom_range(3);
        bch_addr[i] = bch_ref_encode(5'(r)) ^ rand_pattern(w);
        for (int b = 0; b < B; b++)
          if (bch_din[b][i]) begin
            bch_sexp[b][i] = (w == 1) ? 3'b100 : (w == 2) ? 3'b010 : (w == 3) ? 3'b001 : 3'b000;
            if (w < 3) begin bch_exp[b][r-1] = 1'b1; n_bch_del++; end
            if (w == 1) n_bch_t1++;
            if (w == 2) n_bch_t2++;
            if (w == 3) n_bch_t3++;
          end
      end
      #1;
      checks++;
      if (gf_dout !== gf_exp) begin failures++; $display("t=%0d gf_dout=%b exp %b", t, gf_dout, gf_exp); end
      @(negedge clk);
      checks += 4;
      if (ham_dout !== ham_exp)  begin failures++; $display("t=%0d ham_dout=%b exp %b", t, ham_dout, ham_exp); end
      if (ham_corr !== ham_cexp) begin failures++; $display("t=%0d ham_corr=%b exp %b", t, ham_corr, ham_cexp); end
      if (bch_dout !== bch_exp)  begin failures++; $display("t=%0d bch_dout=%b exp %b", t, bch_dout, bch_exp); end
      if (bch_st !== bch_sexp)   begin failures++; $display("t=%0d bch_status=%h exp %h", t, bch_st, bch_sexp); end
    end
    require("GF deliveries", n_gf_del);
    require("GF unconnected sources", n_gf_unconn);
    require("merged receivers (OR)", n_merge);
    require("silent sources", n_silent);
    require("Hamming deliveries", n_ham_del);
    require("Hamming corrections", n_ham_corr);
    require("BCH deliveries", n_bch_del);
    require("BCH one-error corrections", n_bch_t1);
    require("BCH two-error corrections", n_bch_t2);
    require("BCH three-error detections", n_bch_t3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
