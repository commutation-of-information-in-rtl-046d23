// correction_register - the register Rg of an error-correcting switch channel.
//
// The information bits of the address go to the register's set inputs and the
// correction decoder's outputs to its counting (toggle) inputs, so after the
// clock edge it holds info with the flagged bits inverted: the corrected
// receiver number, which the output decoder D2 reads. Setting and toggling
// happen at the same rising edge (q <= info ^ flip). FW status bits are
// registered alongside so that they stay aligned with the value. Asynchronous
// active-low reset clears everything, i.e. "no receiver". Clocking, reset and
// the status bits are this design's choices.
module correction_register #(
  parameter int unsigned W  = 4,        // register width (information bits)
  parameter int unsigned FW = 1         // status bits carried along
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  info,           // set inputs
  input  logic [W-1:0]  flip,           // counting inputs
  input  logic [FW-1:0] flags_in,
  output logic [W-1:0]  q,              // corrected value, one cycle later
  output logic [FW-1:0] flags_q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q       <= '0;
      flags_q <= '0;
    end else begin
      q       <= info ^ flip;
      flags_q <= flags_in;
    end
endmodule
