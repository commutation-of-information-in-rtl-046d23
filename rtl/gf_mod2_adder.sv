// gf_mod2_adder - strobed modulo-2 adder of two GF(2^m) elements.
//
// Field addition is a bitwise XOR. The adder has a strobe input driven by
// the source bit: while it is 0 the output is the zero element, which the
// following decoder sends to its unused output 0, so nothing is delivered.
// Combinational, one XOR and one AND level. The adder and its strobe input
// come from the original unit scheme; forcing the sum to zero while the strobe
// is low is how this design reads that strobe.
module gf_mod2_adder #(
  parameter int unsigned M = 4          // field degree m
) (
  input  logic         strobe,          // source bit
  input  logic [M-1:0] a,               // encoder element
  input  logic [M-1:0] b,               // control word
  output logic [M-1:0] sum              // (a + b) while strobe = 1, else 0
);
  assign sum = (a ^ b) & {M{strobe}};
endmodule
