// gf_switch_unit - one unit of the one-bit crossbar switch over GF(2^m).
//
// Source number POWER+1 is encoded as the field element a^POWER: the source
// bit is wired onto the adder lines where a^POWER has ones, the other lines
// are tied to 0. The strobed modulo-2 adder adds the control word, and a
// binary decoder turns the sum into one of 2^m - 1 receiver lines. To reach
// receiver j the control word must be a^POWER + j, where j is read as the
// m-bit word of a field element (leftmost bit = coefficient of a^0). A control
// word equal to a^POWER gives the sum 0 and connects the source to nothing.
// Example (m = 4): source 2 (a^1 = 0100) with control word 0001 gives 0101,
// receiver 5.
//
// Purely combinational: encoder, adder and decoder, as in the delay estimate
// T = 2*T_D + 2*T_A of the scheme. The choice of the zero sum as "not
// connected" and the bit order of the decoder number follow the worked
// example; everything else is the scheme's own structure.
module gf_switch_unit
  import gf_pkg::*;
#(
  parameter int unsigned  M     = 4,          // field degree m
  parameter logic [16:0]  POLY  = 17'b10011,  // field polynomial X^4 + X + 1
  parameter int unsigned  POWER = 0,          // this unit's element a^POWER
  parameter int unsigned  NOUT  = 15          // receiver lines, 2^m - 1
) (
  input  logic            din,                // source bit, also the strobe
  input  logic [M-1:0]    addr,               // control word
  output logic [NOUT-1:0] dout                // receiver lines 1..NOUT
);
  localparam logic [M-1:0] ELEM = M'(gf_alpha_pow(POWER, M, gf_word_t'(POLY)));

  logic [M-1:0] enc, sum;

  assign enc = ELEM & {M{din}};              // encoder: source bit onto the a^POWER lines

  gf_mod2_adder #(.M(M)) u_adder (
    .strobe (din),
    .a      (enc),
    .b      (addr),
    .sum    (sum)
  );

  binary_decoder #(.W(M), .NOUT(NOUT)) u_dec (
    .sel (sum),
    .y   (dout)
  );
endmodule
