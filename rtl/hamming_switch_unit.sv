// hamming_switch_unit - one channel of the one-bit switch with Hamming-coded
// receiver addresses.
//
// The source bit strobes the 7-bit address through the AND group. The parity
// check computes the syndrome of the gated word, D1 turns it into a flip mask
// for the four information bits, and the register Rg stores the corrected
// receiver number at the next rising clock edge. D2 decodes the register to
// the NOUT receiver lines. One wrong address bit per channel is corrected.
// A source bit of 0 yields the all-zero word, register value 0 and no
// receiver line.
//
// Timing: din/addr applied before a rising edge appear on dout (and the
// corrected flag) after that edge; one cycle of latency, new data every cycle.
module hamming_switch_unit
  import hamming_pkg::*;
#(
  parameter int unsigned NOUT = 15
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            din,          // source bit
  input  ham_word_t       addr,         // receiver address (code word)
  output logic [NOUT-1:0] dout,         // receiver lines 1..NOUT
  output logic            corrected     // an address error was corrected
);
  ham_word_t  gated;
  ham_syn_t   syn;
  logic [3:0] flip, num;
  logic       err;

  strobe_gate #(.W(7)) u_and (.strobe(din), .a(addr), .y(gated));

  hamming_parity_check u_pc (.word(gated), .syndrome(syn));

  hamming_d1 u_d1 (.syndrome(syn), .flip(flip), .error(err));

  correction_register #(.W(4), .FW(1)) u_rg (
    .clk      (clk),
    .rst_n    (rst_n),
    .info     (ham_info(gated[3:0])),
    .flip     (flip),
    .flags_in (err),
    .q        (num),
    .flags_q  (corrected)
  );

  binary_decoder #(.W(4), .NOUT(NOUT)) u_d2 (.sel(num), .y(dout));
endmodule
