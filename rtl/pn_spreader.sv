// pn_spreader: direct-sequence spreading of a message by a PN sequence.
//
// In SS-CDMA each message symbol is multiplied by the user's PN chips. With
// the usual mapping of bit 0 to +1 and bit 1 to -1 that product is the XOR
// of the two bits, so each enabled clock the spreader registers
// i_Msg ^ i_PN as the next transmitted chip.
//
// Interface and timing: o_Chip changes on the rising edge of i_Clk while
// i_Enable is high and holds otherwise, so it lags i_PN and i_Msg by one
// clock. i_Msg is held by the user for as many chips as the spreading factor
// demands. i_Rst_n (asynchronous, active low) clears o_Chip.
//
// That the PN sequence multiplies the message follows the specification;
// the bit mapping, the output register and the shared enable are this
// design's own choices.
module pn_spreader (
  input  logic i_Clk,
  input  logic i_Rst_n,
  input  logic i_Enable,
  input  logic i_Msg,
  input  logic i_PN,
  output logic o_Chip
);

  always_ff @(posedge i_Clk or negedge i_Rst_n) begin
    if (!i_Rst_n)      o_Chip <= 1'b0;
    else if (i_Enable) o_Chip <= i_Msg ^ i_PN;
  end

endmodule
