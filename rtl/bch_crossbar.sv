// bch_crossbar - one-bit N x N crossbar switch whose receiver addresses are
// code words of the (15,5) BCH code.
//
// Every source has its own channel (bch_switch_unit), the like-numbered D2
// outputs of all channels are ORed. Each channel corrects up to two wrong bits
// of its address and reports three or more, so the switch keeps delivering
// with two address errors on every source at once and withholds a delivery
// it cannot trust. The address of receiver n is bch_pkg::bch_encode(n).
// One cycle of latency. The code and the error counting are the original
// ones; the channel layout, OR join and withholding are this design's.
module bch_crossbar
  import bch_pkg::*;
#(
  parameter int unsigned N = 15
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic        [N-1:0]   din,      // din[i] = source i+1
  input  bch_word_t   [N-1:0]   addr,     // addr[i] = address given to source i+1
  output logic        [N-1:0]   dout,     // dout[j] = receiver j+1
  output bch_status_t [N-1:0]   status    // per source, aligned with dout
);
  logic [N-1:0][N-1:0] lines;

  for (genvar i = 0; i < N; i++) begin : g_unit
    bch_switch_unit #(.NOUT(N)) u_unit (
      .clk    (clk),
      .rst_n  (rst_n),
      .din    (din[i]),
      .addr   (addr[i]),
      .dout   (lines[i]),
      .status (status[i])
    );
  end

  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++) dout |= lines[i];
  end
endmodule
