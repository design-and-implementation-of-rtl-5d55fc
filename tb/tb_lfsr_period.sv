// tb_lfsr_period: proves that the LFSR at each of the five lengths
// (4, 8, 16, 32 and 64 bits) has the maximal period 2^N - 1, including the
// 32- and 64-bit ones whose periods are far too long to simulate.
//
// One clock of the register is an affine map over GF(2): s' = M s + c (c is
// non-zero for XNOR feedback). The testbench reads that map out of the
// hardware itself: it loads the seed 0 and every unit vector e_k, clocks
// once, and reads f(0) = c and f(e_k) = M e_k + c. From these it builds the
// (N+1) x (N+1) augmented matrix A = [M c; 0 1] and, by square-and-multiply,
// checks that A^(2^N - 1) = I while A^((2^N - 1)/p) != I for every prime p
// dividing 2^N - 1. The map then has order exactly 2^N - 1, so every state
// outside the lock-up state lies on one cycle of that length.
// Prime factors used: 2^4-1 = 3*5, 2^8-1 = 3*5*17, 2^16-1 = 3*5*17*257,
// 2^32-1 = 3*5*17*257*65537, 2^64-1 = 3*5*17*257*641*65537*6700417.
module tb_lfsr_period;

  localparam int NDUT = 5;
  localparam int unsigned W [NDUT] = '{4, 8, 16, 32, 64};
  localparam int MAXD = 65;

  typedef logic [MAXD-1:0] row_t;
  typedef row_t mat_t [MAXD];

  logic clk = 1'b0;
  logic en, seed_dv;
  logic [63:0] seed [NDUT];
  logic [63:0] dout [NDUT];
  logic [3:0]  q0;
  logic [7:0]  q1;
  logic [15:0] q2;
  logic [31:0] q3;
  logic [63:0] q4;
  logic [4:0]  done, pn;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  lfsr #(.N(4)) u4 (.i_Clk(clk), .i_Rst_n(1'b1), .i_Enable(en), .i_Seed_DV(seed_dv),
    .i_Seed_Data(seed[0][3:0]), .o_LFSR_Data(q0), .o_LFSR_Done(done[0]), .o_PN(pn[0]));
  lfsr #(.N(8)) u8 (.i_Clk(clk), .i_Rst_n(1'b1), .i_Enable(en), .i_Seed_DV(seed_dv),
    .i_Seed_Data(seed[1][7:0]), .o_LFSR_Data(q1), .o_LFSR_Done(done[1]), .o_PN(pn[1]));
  lfsr #(.N(16)) u16 (.i_Clk(clk), .i_Rst_n(1'b1), .i_Enable(en), .i_Seed_DV(seed_dv),
    .i_Seed_Data(seed[2][15:0]), .o_LFSR_Data(q2), .o_LFSR_Done(done[2]), .o_PN(pn[2]));
  lfsr #(.N(32)) u32 (.i_Clk(clk), .i_Rst_n(1'b1), .i_Enable(en), .i_Seed_DV(seed_dv),
    .i_Seed_Data(seed[3][31:0]), .o_LFSR_Data(q3), .o_LFSR_Done(done[3]), .o_PN(pn[3]));
  lfsr #(.N(64)) u64 (.i_Clk(clk), .i_Rst_n(1'b1), .i_Enable(en), .i_Seed_DV(seed_dv),
    .i_Seed_Data(seed[4]), .o_LFSR_Data(q4), .o_LFSR_Done(done[4]), .o_PN(pn[4]));

  assign dout[0] = 64'(q0);
  assign dout[1] = 64'(q1);
  assign dout[2] = 64'(q2);
  assign dout[3] = 64'(q3);
  assign dout[4] = q4;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic void mat_identity(output mat_t r, input int n);
    for (int i = 0; i < MAXD; i++) r[i] = (i < n) ? (row_t'(1) << i) : '0;
  endfunction

  // Row i of A*B is the XOR of the rows k of B for which A[i][k] is set.
  function automatic void mat_mul(output mat_t r, input mat_t a, input mat_t b, input int n);
    for (int i = 0; i < MAXD; i++) begin
      r[i] = '0;
      if (i < n) for (int k = 0; k < n; k++) if (a[i][k]) r[i] ^= b[k];
    end
  endfunction

  function automatic void mat_pow(output mat_t r, input mat_t a, input longint unsigned e,
                                  input int n);
    mat_t base, acc, t;
    base = a;
    mat_identity(acc, n);
    while (e != 0) begin
      if (e[0]) begin
        mat_mul(t, acc, base, n);
        acc = t;
      end
      mat_mul(t, base, base, n);
      base = t;
      e >>= 1;
    end
    r = acc;
  endfunction

  function automatic bit mat_is_identity(input mat_t a, input int n);
    for (int i = 0; i < n; i++) if (a[i] != (row_t'(1) << i)) return 1'b0;
    return 1'b1;
  endfunction

  // One enabled clock from seed s on every instance; returns f(s) per instance.
  task automatic step_from(input logic [63:0] s [NDUT], output logic [63:0] f [NDUT]);
    for (int d = 0; d < NDUT; d++) seed[d] = s[d];
    en = 1'b1;
    seed_dv = 1'b1;
    @(negedge clk);
    for (int d = 0; d < NDUT; d++) check(dout[d] == s[d], "seed load");
    seed_dv = 1'b0;
    @(negedge clk);
    for (int d = 0; d < NDUT; d++) f[d] = dout[d];
  endtask

  logic [63:0] s_in  [NDUT];
  logic [63:0] f0    [NDUT];
  logic [63:0] fk    [NDUT];
  mat_t        amat  [NDUT];

  initial begin
    longint unsigned period;
    longint unsigned primes [7];
    int np;
    mat_t r;

    en = 1'b0;
    seed_dv = 1'b0;
    for (int d = 0; d < NDUT; d++) seed[d] = '0;
    @(negedge clk);

    // Column N of A: the constant c = f(0); row N: the constant's own 1.
    for (int d = 0; d < NDUT; d++) s_in[d] = '0;
    step_from(s_in, f0);
    for (int d = 0; d < NDUT; d++) begin
      for (int i = 0; i < MAXD; i++) amat[d][i] = '0;
      for (int i = 0; i < W[d]; i++) amat[d][i][W[d]] = f0[d][i];
      amat[d][W[d]][W[d]] = 1'b1;
    end
    // Columns 0..N-1: M e_k = f(e_k) + c.
    for (int k = 0; k < 64; k++) begin
      for (int d = 0; d < NDUT; d++) s_in[d] = (k < W[d]) ? (64'd1 << k) : 64'd0;
      step_from(s_in, fk);
      for (int d = 0; d < NDUT; d++)
        if (k < W[d])
          for (int i = 0; i < W[d]; i++) amat[d][i][k] = fk[d][i] ^ f0[d][i];
    end

    for (int d = 0; d < NDUT; d++) begin
      period = (W[d] == 64) ? 64'hFFFF_FFFF_FFFF_FFFF : ((64'd1 << W[d]) - 64'd1);
      case (W[d])
        4:  begin primes = '{3, 5, 0, 0, 0, 0, 0}; np = 2; end
        8:  begin primes = '{3, 5, 17, 0, 0, 0, 0}; np = 3; end
        16: begin primes = '{3, 5, 17, 257, 0, 0, 0}; np = 4; end
        32: begin primes = '{3, 5, 17, 257, 65537, 0, 0}; np = 5; end
        default: begin primes = '{3, 5, 17, 257, 641, 65537, 6700417}; np = 7; end
      endcase
      mat_pow(r, amat[d], period, W[d] + 1);
      check(mat_is_identity(r, W[d] + 1), $sformatf("%0d-bit: A^(2^N-1) = I", W[d]));
      for (int j = 0; j < np; j++) begin
        check(period % primes[j] == 0, $sformatf("%0d is a factor of 2^%0d-1", primes[j], W[d]));
        mat_pow(r, amat[d], period / primes[j], W[d] + 1);
        check(!mat_is_identity(r, W[d] + 1),
              $sformatf("%0d-bit: A^((2^N-1)/%0d) != I", W[d], primes[j]));
      end
      $display("%0d-bit LFSR: period 2^%0d - 1 = %0d proven", W[d], W[d], period);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
