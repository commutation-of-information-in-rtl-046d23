// hamming_crossbar - one-bit N x N crossbar switch whose receiver addresses
// are (7,4) Hamming code words.
//
// Every source has its own channel (hamming_switch_unit); the like-numbered
// D2 outputs of all channels are joined, here as an OR. Because each channel
// corrects one wrong bit of its own address, the switch delivers correctly
// with up to one address error per source at the same time (up to N errors in
// all). The address of receiver n is the code word with n in its information
// symbols (hamming_pkg::ham_encode). One cycle of latency.
// For an N-bit wide switch use N copies with shared addresses. The channel
// structure and address code are the original ones; the OR join and the
// per-source corrected flags are this design's.
module hamming_crossbar
  import hamming_pkg::*;
#(
  parameter int unsigned N = 15
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic      [N-1:0]   din,        // din[i] = source i+1
  input  ham_word_t [N-1:0]   addr,       // addr[i] = address given to source i+1
  output logic      [N-1:0]   dout,       // dout[j] = receiver j+1
  output logic      [N-1:0]   corrected   // per source, aligned with dout
);
  logic [N-1:0][N-1:0] lines;

  for (genvar i = 0; i < N; i++) begin : g_unit
    hamming_switch_unit #(.NOUT(N)) u_unit (
      .clk       (clk),
      .rst_n     (rst_n),
      .din       (din[i]),
      .addr      (addr[i]),
      .dout      (lines[i]),
      .corrected (corrected[i])
    );
  end

  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++) dout |= lines[i];
  end
endmodule
