// lfsr: n-bit Fibonacci linear feedback shift register, the PN-sequence
// generator of the design.
//
// The register holds stages X1..XN; stage Xk is bit k-1 of o_LFSR_Data. On
// every enabled clock the stages shift one place from X1 towards XN and X1
// takes the XNOR (or, with FEEDBACK = FB_XOR, the XOR) of the tap stages.
// With the tap sets of lfsr_pkg::tap_mask the register visits all 2^N - 1
// legal states before it repeats. Stage XN is the PN output.
//
// Interface and timing:
//   i_Enable     clock enable. Nothing changes while it is low.
//   i_Seed_DV    while enabled, load i_Seed_Data instead of shifting.
//   o_LFSR_Data  the register, updated on the rising edge of i_Clk.
//   o_LFSR_Done  combinational: high while the register equals i_Seed_Data,
//                so after a seed load it rises again after exactly 2^N - 1
//                enabled shifts, marking one full period.
//   o_PN         stage XN, one chip per enabled clock.
//   i_Rst_n      asynchronous, active low: clears the register to all zeros
//                (XNOR) or to 0..01 (XOR), a legal state in either case.
//
// The structure (XNOR feedback, seed multiplexer in front of clock-enabled
// flip-flops, equality compare against the seed for the done flag) and the
// tap polynomials follow the specification of the design. The asynchronous
// reset and its value, the seed load being gated by the enable and the XOR
// option are this design's own choices. Loading the illegal state (all ones
// for XNOR, all zeros for XOR) locks the register in that state, as is
// inherent to an LFSR.
module lfsr #(
  parameter int unsigned         N        = 64,
  parameter lfsr_pkg::feedback_e FEEDBACK = lfsr_pkg::FB_XNOR,
  parameter logic [N-1:0]        TAPS     = N'(lfsr_pkg::tap_mask(N))
) (
  input  logic         i_Clk,
  input  logic         i_Rst_n,
  input  logic         i_Enable,
  input  logic         i_Seed_DV,
  input  logic [N-1:0] i_Seed_Data,
  output logic [N-1:0] o_LFSR_Data,
  output logic         o_LFSR_Done,
  output logic         o_PN
);

  // Reset state: all zeros is legal for XNOR feedback, not for XOR.
  localparam logic [N-1:0] RESET_STATE =
      (FEEDBACK == lfsr_pkg::FB_XNOR) ? '0 : N'(1);

  // The last stage must be a tap, otherwise the register is shorter than N.
  if (N < 2 || !TAPS[N-1]) begin : g_bad_taps
    $fatal(1, "lfsr: N=%0d needs N >= 2 and a tap on stage XN (TAPS=%0h)", N, TAPS);
  end

  logic [N-1:0] r_LFSR;
  logic         w_Feedback;

  always_comb begin
    w_Feedback = ^(r_LFSR & TAPS);
    if (FEEDBACK == lfsr_pkg::FB_XNOR) w_Feedback = ~w_Feedback;
  end

  always_ff @(posedge i_Clk or negedge i_Rst_n) begin
    if (!i_Rst_n) begin
      r_LFSR <= RESET_STATE;
    end else if (i_Enable) begin
      if (i_Seed_DV) r_LFSR <= i_Seed_Data;
      else           r_LFSR <= {r_LFSR[N-2:0], w_Feedback};
    end
  end

  assign o_LFSR_Data = r_LFSR;
  assign o_LFSR_Done = (r_LFSR == i_Seed_Data);
  assign o_PN        = r_LFSR[N-1];

endmodule
