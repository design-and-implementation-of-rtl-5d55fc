// tb_lfsr: self-checking testbench of the n-bit LFSR.
//
// Six instances run side by side from one clock: XNOR feedback at 4, 8, 16,
// 32 and 64 bits, and XOR feedback at 8 bits. Each is compared every clock
// with a reference model in this file that computes the feedback directly
// from the exponents of the generator polynomials
// (x^4+x^3+1, x^8+x^6+x^5+x^4+1, x^16+x^15+x^13+x^4+1, x^32+x^22+x^2+x+1,
// x^64+x^63+x^61+x^60+1). The 4-bit instance is also compared with its
// 15-state sequence written out by hand. Checked: reset state, seed load,
// hold while disabled, the done flag, the PN output, the period of exactly
// 2^N - 1 enabled shifts between done pulses (4, 8 and 16 bits), and the
// lock-up of the all-ones state under XNOR feedback.
// Inputs are driven and outputs checked on the falling edge.
module tb_lfsr;

  localparam int NDUT = 6;
  localparam int unsigned W [NDUT] = '{4, 8, 16, 32, 64, 8};
  localparam int unsigned EXPS [NDUT][4] = '{
    '{4, 3, 0, 0}, '{8, 6, 5, 4}, '{16, 15, 13, 4},
    '{32, 22, 2, 1}, '{64, 63, 61, 60}, '{8, 6, 5, 4}};
  localparam bit XN [NDUT] = '{1, 1, 1, 1, 1, 0};
  localparam int RUN_CYCLES = 180000;

  // 4-bit XNOR sequence from the all-zeros state, worked out by hand.
  localparam logic [3:0] SEQ4 [15] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011, 4'b0110,
    4'b1100, 4'b1001, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1000};

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic seed_dv;
  logic [63:0] seed   [NDUT];
  logic [63:0] dout   [NDUT];
  logic [3:0]  q0;
  logic [7:0]  q1;
  logic [15:0] q2;
  logic [31:0] q3;
  logic [63:0] q4;
  logic [7:0]  q5;
  logic        done   [NDUT];
  logic        pn     [NDUT];
  logic [63:0] model  [NDUT];
  longint      shifts [NDUT];
  int          periods[NDUT];
  int          idx4;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  lfsr #(.N(4)) u4 (.i_Clk(clk), .i_Rst_n(rst_n), .i_Enable(en), .i_Seed_DV(seed_dv),
    .i_Seed_Data(seed[0][3:0]), .o_LFSR_Data(q0), .o_LFSR_Done(done[0]), .o_PN(pn[0]));
  lfsr #(.N(8)) u8 (.i_Clk(clk), .i_Rst_n(rst_n), .i_Enable(en), .i_Seed_DV(seed_dv),
    .i_Seed_Data(seed[1][7:0]), .o_LFSR_Data(q1), .o_LFSR_Done(done[1]), .o_PN(pn[1]));
  lfsr #(.N(16)) u16 (.i_Clk(clk), .i_Rst_n(rst_n), .i_Enable(en), .i_Seed_DV(seed_dv),
    .i_Seed_Data(seed[2][15:0]), .o_LFSR_Data(q2), .o_LFSR_Done(done[2]), .o_PN(pn[2]));
  lfsr #(.N(32)) u32 (.i_Clk(clk), .i_Rst_n(rst_n), .i_Enable(en), .i_Seed_DV(seed_dv),
    .i_Seed_Data(seed[3][31:0]), .o_LFSR_Data(q3), .o_LFSR_Done(done[3]), .o_PN(pn[3]));
  lfsr #(.N(64)) u64 (.i_Clk(clk), .i_Rst_n(rst_n), .i_Enable(en), .i_Seed_DV(seed_dv),
    .i_Seed_Data(seed[4]), .o_LFSR_Data(q4), .o_LFSR_Done(done[4]), .o_PN(pn[4]));
  lfsr #(.N(8), .FEEDBACK(lfsr_pkg::FB_XOR)) u8x (.i_Clk(clk), .i_Rst_n(rst_n), .i_Enable(en),
    .i_Seed_DV(seed_dv), .i_Seed_Data(seed[5][7:0]), .o_LFSR_Data(q5),
    .o_LFSR_Done(done[5]), .o_PN(pn[5]));

  // Instance outputs, zero-extended to 64 bits for the common checks.
  assign dout[0] = 64'(q0);
  assign dout[1] = 64'(q1);
  assign dout[2] = 64'(q2);
  assign dout[3] = 64'(q3);
  assign dout[4] = q4;
  assign dout[5] = 64'(q5);

  function automatic logic [63:0] width_mask(int unsigned w);
    return (w == 64) ? '1 : ((64'd1 << w) - 64'd1);
  endfunction

  function automatic logic [63:0] ref_next(int d, logic [63:0] s);
    logic fb = 1'b0;
    for (int k = 0; k < 4; k++) if (EXPS[d][k] != 0) fb ^= s[EXPS[d][k]-1];
    if (XN[d]) fb = ~fb;
    return ((s << 1) | 64'(fb)) & width_mask(W[d]);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference models advance on the rising edge from the same inputs.
  always @(posedge clk) begin
    if (rst_n && en) begin
      for (int d = 0; d < NDUT; d++) begin
        if (seed_dv) begin
          model[d]  <= seed[d] & width_mask(W[d]);
          shifts[d] <= 0;
        end else begin
          model[d]  <= ref_next(d, model[d]);
          shifts[d] <= shifts[d] + 1;
        end
      end
      if (seed_dv) idx4 <= 0;
      else         idx4 <= (idx4 + 1) % 15;
    end
  end

  task automatic compare_all();
    for (int d = 0; d < NDUT; d++) begin
      check(dout[d] == model[d], $sformatf("state of instance %0d", d));
      check(done[d] == (model[d] == (seed[d] & width_mask(W[d]))), $sformatf("done of instance %0d", d));
      check(pn[d] == model[d][W[d]-1], $sformatf("pn of instance %0d", d));
    end
  endtask

  initial begin
    logic [63:0] legal;
    rst_n   = 1'b0;
    en      = 1'b0;
    seed_dv = 1'b0;
    for (int d = 0; d < NDUT; d++) begin
      shifts[d]  = 0;
      periods[d] = 0;
      model[d]   = XN[d] ? 64'd0 : 64'd1;
    end
    idx4 = 0;
    // Seeds: all zeros for the 4-bit instance (to follow SEQ4), random
    // legal values elsewhere.
    seed[0] = '0;
    for (int d = 1; d < NDUT; d++) begin
      legal = {$urandom, $urandom} & width_mask(W[d]);
      if (XN[d] && legal == width_mask(W[d])) legal = '0;
      if (!XN[d] && legal == '0) legal = 64'd1;
      seed[d] = legal;
    end

    // Reset state.
    repeat (3) @(negedge clk);
    compare_all();
    rst_n = 1'b1;

    // Run from the reset state, with random stalls, for one 4-bit period
    // before any seed is loaded.
    for (int c = 0; c < 40; c++) begin
      @(negedge clk);
      compare_all();
      check(dout[0][3:0] == SEQ4[idx4], "4-bit hand sequence from reset");
      en = ($urandom_range(0, 3) != 0);
    end

    // Seed load, then a long run with random stalls and occasional
    // reloads of the same seeds.
    en = 1'b1;
    seed_dv = 1'b1;
    for (int c = 0; c < RUN_CYCLES; c++) begin
      @(negedge clk);
      compare_all();
      check(dout[0][3:0] == SEQ4[idx4], "4-bit hand sequence");
      // Period: done must come back after exactly 2^N - 1 shifts.
      for (int d = 0; d < NDUT; d++) begin
        if (W[d] <= 16) begin
          if (done[d] && shifts[d] != 0) begin
            check(shifts[d] == (longint'(1) << W[d]) - 1, $sformatf("period of instance %0d", d));
            periods[d]++;
            shifts[d] = 0;
          end
          check(shifts[d] < (longint'(1) << W[d]), $sformatf("period overrun of instance %0d", d));
        end
      end
      en      = ($urandom_range(0, 9) != 0);
      seed_dv = (c > 0 && c < 1000 && $urandom_range(0, 99) == 0);
    end
    check(periods[0] > 100, "4-bit periods completed");
    check(periods[1] > 100, "8-bit periods completed");
    check(periods[2] >= 2,  "16-bit periods completed");
    check(periods[5] > 100, "8-bit XOR periods completed");

    // Lock-up: the all-ones state under XNOR feedback never leaves.
    seed[0] = 64'hF;
    seed_dv = 1'b1;
    en      = 1'b1;
    @(negedge clk);
    seed_dv = 1'b0;
    repeat (20) begin
      @(negedge clk);
      check(dout[0][3:0] == 4'b1111 && done[0], "all-ones lock-up");
    end

    // Asynchronous reset mid-run.
    en = 1'b1;
    #2 rst_n = 1'b0;
    #1;
    check(dout[0][3:0] == 4'b0000 && dout[5][7:0] == 8'd1, "asynchronous reset value");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_CYCLES + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
