// tb_pn_spreader: self-checking testbench of the message spreader.
//
// Random message bits, PN chips and enables are driven on the falling edge
// of the clock; after every rising edge the output chip is compared with
// message XOR PN of the last enabled clock, kept by the testbench. Also
// checked: the output holds while disabled and the asynchronous reset
// clears it. Every combination of message and PN bit is counted and must
// occur.
module tb_pn_spreader;

  localparam int CYCLES = 2000;

  logic clk = 1'b0;
  logic rst_n, en, msg, pn, chip;
  logic expected;
  int   combo [4];
  int   holds;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  pn_spreader dut (
    .i_Clk(clk), .i_Rst_n(rst_n), .i_Enable(en),
    .i_Msg(msg), .i_PN(pn), .o_Chip(chip)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    en = 1'b1;
    msg = 1'b1;
    pn = 1'b0;
    expected = 1'b0;
    holds = 0;
    for (int i = 0; i < 4; i++) combo[i] = 0;
    repeat (2) @(negedge clk);
    check(chip == 1'b0, "reset clears chip");
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      en  = ($urandom_range(0, 4) != 0);
      msg = 1'($urandom);
      pn  = 1'($urandom);
      if (en) begin
        // Multiplication of +1/-1 symbols, 0 -> +1 and 1 -> -1.
        expected = ((msg ? -1 : 1) * (pn ? -1 : 1)) < 0;
        combo[{msg, pn}]++;
      end else begin
        holds++;
      end
      @(negedge clk);
      check(chip == expected, "chip = message times PN");
    end
    for (int i = 0; i < 4; i++) check(combo[i] > 0, "all message/PN combinations seen");
    check(holds > 0, "enable low seen");
    // Asynchronous reset while the output is 1.
    en = 1'b1; msg = 1'b1; pn = 1'b0;
    @(negedge clk);
    check(chip == 1'b1, "chip before reset");
    #2 rst_n = 1'b0;
    #1 check(chip == 1'b0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
