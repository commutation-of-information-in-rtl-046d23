// gf_crossbar - one-bit N x N crossbar switch over GF(2^m).
//
// N = 2^m - 1 units, unit i (source i+1) encoding its bit as a^i. Each unit
// adds its control word to that element and decodes the sum to one receiver
// line; the like-numbered lines of all units are joined, here as an OR. Any
// pattern of connections, including one source to one receiver for every
// source at once, is set by the N control words of M bits (N*log2(N+1)
// control bits). If two sources are sent to one receiver their bits are
// ORed. Combinational: the data passes in the same cycle. The unit structure
// and the joined outputs are the original scheme; the OR as the join is this
// design's reading of "connected" outputs.
//
// Defaults are the worked configuration, m = 4 with X^4 + X + 1 (15 x 15).
// Other sizes take another m and primitive polynomial, e.g. m = 3 with
// X^3 + X + 1 (7 x 7) or m = 10 with X^10 + X^3 + 1 (1023 x 1023).
module gf_crossbar
  import gf_pkg::*;
#(
  parameter int unsigned M    = 4,
  parameter logic [16:0] POLY = 17'b10011,
  parameter int unsigned N    = (1 << M) - 1
) (
  input  logic [N-1:0]        din,            // din[i] = source i+1
  input  logic [N-1:0][M-1:0] addr,           // addr[i] = control word of source i+1
  output logic [N-1:0]        dout            // dout[j] = receiver j+1
);
  logic [N-1:0][N-1:0] lines;                 // lines[i][j]: unit i drives receiver j+1

  for (genvar i = 0; i < N; i++) begin : g_unit
    gf_switch_unit #(.M(M), .POLY(POLY), .POWER(i), .NOUT(N)) u_unit (
      .din  (din[i]),
      .addr (addr[i]),
      .dout (lines[i])
    );
  end

  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++) dout |= lines[i];
  end
endmodule
