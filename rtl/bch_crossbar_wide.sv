// bch_crossbar_wide - B-bit wide crossbar with BCH-coded addresses: B one-bit
// switches that share the receiver addresses.
//
// As in the Hamming version, each bit plane strobes the common address with
// its own data bit and has its own correction logic, so a plane whose bit is
// 0 sees no address at all. One cycle of latency. Sharing the addresses is
// the original arrangement for wide switches; the port layout is this
// design's.
module bch_crossbar_wide
  import bch_pkg::*;
#(
  parameter int unsigned N = 15,
  parameter int unsigned B = 1                 // data bits per source
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic        [B-1:0][N-1:0] din,      // din[b][i] = bit b of source i+1
  input  bch_word_t   [N-1:0]        addr,     // shared by all bit planes
  output logic        [B-1:0][N-1:0] dout,     // dout[b][j] = bit b of receiver j+1
  output bch_status_t [B-1:0][N-1:0] status    // per plane and source
);
  for (genvar b = 0; b < B; b++) begin : g_plane
    bch_crossbar #(.N(N)) u_plane (
      .clk    (clk),
      .rst_n  (rst_n),
      .din    (din[b]),
      .addr   (addr),
      .dout   (dout[b]),
      .status (status[b])
    );
  end
endmodule
