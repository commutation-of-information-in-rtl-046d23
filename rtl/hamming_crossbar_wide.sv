// hamming_crossbar_wide - B-bit wide crossbar with Hamming-coded addresses:
// B one-bit switches that share the receiver addresses.
//
// Every bit plane has its own channels (strobe, parity check, D1, Rg, D2),
// because each plane's data bit strobes the address separately; the address
// words are common to all planes, so source i sends all B bits to the same
// receiver. One cycle of latency. Sharing the addresses between the one-bit
// modules is the original arrangement; the port layout is this design's.
module hamming_crossbar_wide
  import hamming_pkg::*;
#(
  parameter int unsigned N = 15,
  parameter int unsigned B = 1                 // data bits per source
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic      [B-1:0][N-1:0] din,        // din[b][i] = bit b of source i+1
  input  ham_word_t [N-1:0]        addr,       // shared by all bit planes
  output logic      [B-1:0][N-1:0] dout,       // dout[b][j] = bit b of receiver j+1
  output logic      [B-1:0][N-1:0] corrected   // per plane and source
);
  for (genvar b = 0; b < B; b++) begin : g_plane
    hamming_crossbar #(.N(N)) u_plane (
      .clk       (clk),
      .rst_n     (rst_n),
      .din       (din[b]),
      .addr      (addr),
      .dout      (dout[b]),
      .corrected (corrected[b])
    );
  end
endmodule
