// gf_crossbar_wide - B-bit wide crossbar over GF(2^m): B one-bit switches
// side by side, bit b of every source going through switch b.
//
// Each bit plane has its own N control words, so a B-bit N x N switch takes
// B * N * m control bits; bit planes may be routed differently. With B = 1
// this is the one-bit switch. Combinational. Building a wide switch from
// one-bit modules is the original arrangement; the port layout is this
// design's.
module gf_crossbar_wide
  import gf_pkg::*;
#(
  parameter int unsigned M    = 4,
  parameter logic [16:0] POLY = 17'b10011,
  parameter int unsigned N    = (1 << M) - 1,
  parameter int unsigned B    = 1              // data bits per source
) (
  input  logic [B-1:0][N-1:0]        din,      // din[b][i] = bit b of source i+1
  input  logic [B-1:0][N-1:0][M-1:0] addr,     // addr[b][i] = control word, bit plane b
  output logic [B-1:0][N-1:0]        dout      // dout[b][j] = bit b of receiver j+1
);
  for (genvar b = 0; b < B; b++) begin : g_plane
    gf_crossbar #(.M(M), .POLY(POLY), .N(N)) u_plane (
      .din  (din[b]),
      .addr (addr[b]),
      .dout (dout[b])
    );
  end
endmodule
