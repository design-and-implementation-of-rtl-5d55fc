// pn_channel: one spreading channel, an n-bit LFSR PN generator followed by
// a spreader that multiplies the message with the generator's output chip.
//
// Both parts share clock, reset and enable: on each enabled clock the LFSR
// shifts (or loads its seed) and the spreader registers message XOR the
// current PN chip (stage XN), so o_Chip lags o_PN by one enabled clock.
// The LFSR ports are brought out unchanged; see lfsr and pn_spreader.
module pn_channel #(
  parameter int unsigned N = 64
) (
  input  logic         i_Clk,
  input  logic         i_Rst_n,
  input  logic         i_Enable,
  input  logic         i_Seed_DV,
  input  logic [N-1:0] i_Seed_Data,
  input  logic         i_Msg,
  output logic [N-1:0] o_LFSR_Data,
  output logic         o_LFSR_Done,
  output logic         o_PN,
  output logic         o_Chip
);

  lfsr #(.N(N)) u_lfsr (
    .i_Clk       (i_Clk),
    .i_Rst_n     (i_Rst_n),
    .i_Enable    (i_Enable),
    .i_Seed_DV   (i_Seed_DV),
    .i_Seed_Data (i_Seed_Data),
    .o_LFSR_Data (o_LFSR_Data),
    .o_LFSR_Done (o_LFSR_Done),
    .o_PN        (o_PN)
  );

  pn_spreader u_spreader (
    .i_Clk    (i_Clk),
    .i_Rst_n  (i_Rst_n),
    .i_Enable (i_Enable),
    .i_Msg    (i_Msg),
    .i_PN     (o_PN),
    .o_Chip   (o_Chip)
  );

endmodule
