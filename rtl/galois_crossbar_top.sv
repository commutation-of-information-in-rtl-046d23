// galois_crossbar_top - the three one-bit 15 x 15 crossbar switches side by
// side.
//
//  * gf_*  : switch over GF(2^m). A source is encoded as a field element,
//            added to its control word and decoded; combinational.
//  * ham_* : switch whose receiver addresses are (7,4) Hamming code words;
//            one wrong address bit per source is corrected. One cycle latency.
//  * bch_* : switch whose receiver addresses are (15,5) BCH code words; two
//            wrong bits per source are corrected, three or more detected.
//            One cycle latency.
// The switches share only the clock and reset; they are independent
// alternatives of the same idea: route the receiver's address, strobed by
// the data bit, rather than the data itself.
//
// DATA_BITS sets the width of a source (default 1, the one-bit switches). A
// wider switch is DATA_BITS one-bit switches: in the GF switch every bit
// plane has its own control words, in the two coded switches all planes share
// the addresses. Index [b][i] of a data port is bit b of source (or
// receiver) i+1.
module galois_crossbar_top
  import hamming_pkg::*, bch_pkg::*;
#(
  parameter int unsigned GF_M    = 4,
  parameter logic [16:0] GF_POLY = 17'b10011,   // X^4 + X + 1
  parameter int unsigned DATA_BITS = 1,         // bits per source
  localparam int unsigned GF_N   = (1 << GF_M) - 1,
  localparam int unsigned N      = 15           // Hamming and BCH switches
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // switch over GF(2^m)
  input  logic        [DATA_BITS-1:0][GF_N-1:0]           gf_din,
  input  logic        [DATA_BITS-1:0][GF_N-1:0][GF_M-1:0] gf_addr,
  output logic        [DATA_BITS-1:0][GF_N-1:0]           gf_dout,
  // Hamming-addressed switch
  input  logic        [DATA_BITS-1:0][N-1:0]              ham_din,
  input  ham_word_t   [N-1:0]                             ham_addr,
  output logic        [DATA_BITS-1:0][N-1:0]              ham_dout,
  output logic        [DATA_BITS-1:0][N-1:0]              ham_corrected,
  // BCH-addressed switch
  input  logic        [DATA_BITS-1:0][N-1:0]              bch_din,
  input  bch_word_t   [N-1:0]                             bch_addr,
  output logic        [DATA_BITS-1:0][N-1:0]              bch_dout,
  output bch_status_t [DATA_BITS-1:0][N-1:0]              bch_status
);
  gf_crossbar_wide #(.M(GF_M), .POLY(GF_POLY), .B(DATA_BITS)) u_gf (
    .din  (gf_din),
    .addr (gf_addr),
    .dout (gf_dout)
  );

  hamming_crossbar_wide #(.N(N), .B(DATA_BITS)) u_ham (
    .clk       (clk),
    .rst_n     (rst_n),
    .din       (ham_din),
    .addr      (ham_addr),
    .dout      (ham_dout),
    .corrected (ham_corrected)
  );

  bch_crossbar_wide #(.N(N), .B(DATA_BITS)) u_bch (
    .clk    (clk),
    .rst_n  (rst_n),
    .din    (bch_din),
    .addr   (bch_addr),
    .dout   (bch_dout),
    .status (bch_status)
  );
endmodule
