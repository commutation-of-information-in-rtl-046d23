// strobe_gate - the group of AND elements at the entry of a switch channel.
//
// The source's data bit strobes every line of the receiver address, so the
// address reaches the rest of the channel only while the source sends a 1;
// while it sends a 0 the channel sees the all-zero word, which is the code
// word of "no receiver". Purely combinational, one AND level. The AND group
// is part of the original channel structure; sharing it between the Hamming
// and BCH channels is this design's choice.
module strobe_gate #(
  parameter int unsigned W = 7          // address width (7 for the Hamming switch)
) (
  input  logic         strobe,          // source data bit
  input  logic [W-1:0] a,               // receiver address
  output logic [W-1:0] y                // a AND strobe
);
  assign y = a & {W{strobe}};
endmodule
