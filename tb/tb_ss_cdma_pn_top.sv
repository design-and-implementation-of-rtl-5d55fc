// tb_ss_cdma_pn_top: end-to-end testbench of the five-channel PN generator
// and spreader, at the top's default parameters.
//
// Each channel (4, 8, 16, 32 and 64 bits) gets its own random seed, its own
// random enable pattern with stalls, and a random message whose bits are
// each held for SF enabled chips. A reference model per channel, written
// from the generator polynomials' exponents, predicts the register, the
// done flag and the PN chip every clock. The receiver side despreads: it
// XORs each received chip with the model's PN chip and requires all SF
// chips of a message bit to give that bit back.
//
// One complete operation is: reset, seed load, and a full period of the
// 4-, 8- and 16-bit generators (the done flag must return after exactly
// 2^N - 1 shifts); the 32- and 64-bit generators are compared with their
// models over the same run, their full periods being far too long to
// simulate. The mechanisms counted, each of which must occur: reset, seed
// load, enable stall, period wrap (done) on each short channel, message
// bits despread on every channel.
module tb_ss_cdma_pn_top;

  localparam int NCH = 5;
  localparam int unsigned W [NCH] = '{4, 8, 16, 32, 64};
  localparam int unsigned EXPS [NCH][4] = '{
    '{4, 3, 0, 0}, '{8, 6, 5, 4}, '{16, 15, 13, 4}, '{32, 22, 2, 1}, '{64, 63, 61, 60}};
  localparam int SF = 8;
  localparam int RUN_CYCLES = 160000;

  logic clk = 1'b0;
  logic rst_n;
  logic [4:0] en, seed_dv, msg, done, pn, chip;
  logic [3:0]  q4;
  logic [7:0]  q8;
  logic [15:0] q16;
  logic [31:0] q32;
  logic [63:0] q64;
  logic [63:0] seed  [NCH];
  logic [63:0] dout  [NCH];
  logic [63:0] model [NCH];
  logic        chip_model [NCH];
  logic [NCH-1:0] pn_used;   // PN chip the spreader took at the last enabled edge
  longint      shifts [NCH];
  int          chips_in_bit [NCH];
  int          agree [NCH];

  int n_reset = 0, n_seed_load = 0, n_stall = 0;
  int n_wrap [NCH];
  int n_bits [NCH];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  ss_cdma_pn_top dut (
    .i_Clk(clk), .i_Rst_n(rst_n), .i_Enable(en), .i_Seed_DV(seed_dv), .i_Msg(msg),
    .i_Seed_Data_4(seed[0][3:0]), .i_Seed_Data_8(seed[1][7:0]),
    .i_Seed_Data_16(seed[2][15:0]), .i_Seed_Data_32(seed[3][31:0]),
    .i_Seed_Data_64(seed[4]),
    .o_LFSR_Data_4(q4), .o_LFSR_Data_8(q8), .o_LFSR_Data_16(q16),
    .o_LFSR_Data_32(q32), .o_LFSR_Data_64(q64),
    .o_LFSR_Done(done), .o_PN(pn), .o_Chip(chip)
  );

  assign dout[0] = 64'(q4);
  assign dout[1] = 64'(q8);
  assign dout[2] = 64'(q16);
  assign dout[3] = 64'(q32);
  assign dout[4] = q64;

  function automatic logic [63:0] width_mask(int unsigned w);
    return (w == 64) ? '1 : ((64'd1 << w) - 64'd1);
  endfunction

  // XNOR feedback from the polynomial exponents, shifting towards the MSB.
  function automatic logic [63:0] ref_next(int c, logic [63:0] s);
    logic fb = 1'b1;
    for (int k = 0; k < 4; k++) if (EXPS[c][k] != 0) fb ^= s[EXPS[c][k]-1];
    return ((s << 1) | 64'(fb)) & width_mask(W[c]);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk or negedge rst_n) begin
    for (int c = 0; c < NCH; c++) begin
      if (!rst_n) begin
        model[c]      <= '0;
        chip_model[c] <= 1'b0;
        pn_used[c]    <= 1'b0;
      end else if (en[c]) begin
        chip_model[c] <= msg[c] ^ model[c][W[c]-1];
        pn_used[c]    <= model[c][W[c]-1];
        if (seed_dv[c]) begin
          model[c]  <= seed[c] & width_mask(W[c]);
          shifts[c] <= 0;
        end else begin
          model[c]  <= ref_next(c, model[c]);
          shifts[c] <= shifts[c] + 1;
        end
      end
    end
  end

  task automatic compare_all();
    for (int c = 0; c < NCH; c++) begin
      check(dout[c] == model[c], $sformatf("state of channel %0d", c));
      check(done[c] == (model[c] == (seed[c] & width_mask(W[c]))), $sformatf("done of channel %0d", c));
      check(pn[c] == model[c][W[c]-1], $sformatf("PN of channel %0d", c));
      check(chip[c] == chip_model[c], $sformatf("chip of channel %0d", c));
    end
  endtask

  initial begin
    logic [63:0] legal;
    logic [4:0]  en_q;
    rst_n = 1'b0;
    en = '0;
    seed_dv = '0;
    msg = '0;
    for (int c = 0; c < NCH; c++) begin
      shifts[c] = 0;
      n_wrap[c] = 0;
      n_bits[c] = 0;
      chips_in_bit[c] = 0;
      agree[c] = 0;
      legal = {$urandom, $urandom} & width_mask(W[c]);
      if (legal == width_mask(W[c])) legal = '0;   // all ones locks XNOR
      seed[c] = legal;
    end
    repeat (2) @(negedge clk);
    compare_all();
    check(q4 == '0 && q8 == '0 && q16 == '0 && q32 == '0 && q64 == '0 && chip == '0,
          "reset state");
    n_reset++;
    rst_n = 1'b1;

    // Load every channel's seed.
    en = '1;
    seed_dv = '1;
    msg = 5'($urandom);
    for (int cyc = 0; cyc < RUN_CYCLES; cyc++) begin
      en_q = en;
      @(negedge clk);
      compare_all();
      for (int c = 0; c < NCH; c++) begin
        if (en_q[c] && seed_dv[c]) n_seed_load++;
        if (!en_q[c]) n_stall++;
        // Period wrap on the short channels.
        if (W[c] <= 16 && done[c] && shifts[c] != 0) begin
          check(shifts[c] == (longint'(1) << W[c]) - 1, $sformatf("period of channel %0d", c));
          n_wrap[c]++;
          shifts[c] = 0;
        end
        // Despreading: the chip registered at this edge, times the PN chip
        // it was spread with, must give back the message bit.
        if (en_q[c] && !seed_dv[c]) begin
          if ((chip[c] ^ pn_used[c]) == msg[c]) agree[c]++;
          chips_in_bit[c]++;
          if (chips_in_bit[c] == SF) begin
            check(agree[c] == SF, $sformatf("despread bit of channel %0d", c));
            n_bits[c]++;
            chips_in_bit[c] = 0;
            agree[c] = 0;
            msg[c] = 1'($urandom);
          end
        end
      end
      seed_dv = '0;
      for (int c = 0; c < NCH; c++) en[c] = ($urandom_range(0, 9) != 0);
    end

    check(n_reset > 0, "reset happened");
    check(n_seed_load >= NCH, "seed loads happened");
    check(n_stall > 0, "enable stalls happened");
    for (int c = 0; c < 3; c++) check(n_wrap[c] > 0, $sformatf("period wrap on channel %0d", c));
    for (int c = 0; c < NCH; c++) check(n_bits[c] > 1000, $sformatf("bits despread on channel %0d", c));
    $display("mechanisms: reset=%0d seed_loads=%0d stalls=%0d wraps4=%0d wraps8=%0d wraps16=%0d bits=%0d/%0d/%0d/%0d/%0d",
             n_reset, n_seed_load, n_stall, n_wrap[0], n_wrap[1], n_wrap[2],
             n_bits[0], n_bits[1], n_bits[2], n_bits[3], n_bits[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
