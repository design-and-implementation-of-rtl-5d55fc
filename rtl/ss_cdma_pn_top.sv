// ss_cdma_pn_top: PN-sequence generators for SS-CDMA at the five register
// lengths of the design (4, 8, 16, 32 and 64 bits), side by side.
//
// Each channel is an n-bit maximal-length LFSR with XNOR feedback whose last
// stage is the PN chip, followed by a spreader that XORs a message bit with
// that chip. The channels are independent and only share the clock and the
// reset. Channel index c of the 5-bit vectors is, in order, the 4-, 8-, 16-,
// 32- and 64-bit generator; the seed and state buses are named by width.
//
// Timing: everything is clocked on the rising edge of i_Clk. A channel
// shifts (or, with i_Seed_DV, loads its seed) on each clock where its
// i_Enable bit is high; o_LFSR_Done[c] is high while channel c's register
// equals its seed input, i.e. after 2^N - 1 shifts from a seed load;
// o_Chip[c] is i_Msg[c] XOR o_PN[c], registered one enabled clock later.
// i_Rst_n is asynchronous and active low.
//
// The five lengths and their polynomials are those the design was specified
// with; placing them in one top with a spreader each is this design's own
// arrangement.
module ss_cdma_pn_top (
  input  logic        i_Clk,
  input  logic        i_Rst_n,
  input  logic [4:0]  i_Enable,
  input  logic [4:0]  i_Seed_DV,
  input  logic [4:0]  i_Msg,
  input  logic [3:0]  i_Seed_Data_4,
  input  logic [7:0]  i_Seed_Data_8,
  input  logic [15:0] i_Seed_Data_16,
  input  logic [31:0] i_Seed_Data_32,
  input  logic [63:0] i_Seed_Data_64,
  output logic [3:0]  o_LFSR_Data_4,
  output logic [7:0]  o_LFSR_Data_8,
  output logic [15:0] o_LFSR_Data_16,
  output logic [31:0] o_LFSR_Data_32,
  output logic [63:0] o_LFSR_Data_64,
  output logic [4:0]  o_LFSR_Done,
  output logic [4:0]  o_PN,
  output logic [4:0]  o_Chip
);

  pn_channel #(.N(4)) u_ch4 (
    .i_Clk, .i_Rst_n,
    .i_Enable (i_Enable[0]), .i_Seed_DV (i_Seed_DV[0]),
    .i_Seed_Data (i_Seed_Data_4), .i_Msg (i_Msg[0]),
    .o_LFSR_Data (o_LFSR_Data_4), .o_LFSR_Done (o_LFSR_Done[0]),
    .o_PN (o_PN[0]), .o_Chip (o_Chip[0])
  );

  pn_channel #(.N(8)) u_ch8 (
    .i_Clk, .i_Rst_n,
    .i_Enable (i_Enable[1]), .i_Seed_DV (i_Seed_DV[1]),
    .i_Seed_Data (i_Seed_Data_8), .i_Msg (i_Msg[1]),
    .o_LFSR_Data (o_LFSR_Data_8), .o_LFSR_Done (o_LFSR_Done[1]),
    .o_PN (o_PN[1]), .o_Chip (o_Chip[1])
  );

  pn_channel #(.N(16)) u_ch16 (
    .i_Clk, .i_Rst_n,
    .i_Enable (i_Enable[2]), .i_Seed_DV (i_Seed_DV[2]),
    .i_Seed_Data (i_Seed_Data_16), .i_Msg (i_Msg[2]),
    .o_LFSR_Data (o_LFSR_Data_16), .o_LFSR_Done (o_LFSR_Done[2]),
    .o_PN (o_PN[2]), .o_Chip (o_Chip[2])
  );

  pn_channel #(.N(32)) u_ch32 (
    .i_Clk, .i_Rst_n,
    .i_Enable (i_Enable[3]), .i_Seed_DV (i_Seed_DV[3]),
    .i_Seed_Data (i_Seed_Data_32), .i_Msg (i_Msg[3]),
    .o_LFSR_Data (o_LFSR_Data_32), .o_LFSR_Done (o_LFSR_Done[3]),
    .o_PN (o_PN[3]), .o_Chip (o_Chip[3])
  );

  pn_channel #(.N(64)) u_ch64 (
    .i_Clk, .i_Rst_n,
    .i_Enable (i_Enable[4]), .i_Seed_DV (i_Seed_DV[4]),
    .i_Seed_Data (i_Seed_Data_64), .i_Msg (i_Msg[4]),
    .o_LFSR_Data (o_LFSR_Data_64), .o_LFSR_Done (o_LFSR_Done[4]),
    .o_PN (o_PN[4]), .o_Chip (o_Chip[4])
  );

endmodule
