// tb_gemm_sa_ieee64: the 64-bit workload with the exact accumulator: IEEE-754 binary64
// operands and results on a 4 x 3 array. Every product of two binary64 values, from 2^-2148
// (two smallest subnormals) up to just below 2^2048, fits the accumulator: LSB = -2148,
// MSB = 2047 and OVF = 32 carry bits give 4228 bits, in 67 chunks of 64 bits.
//
// Random blocks use operands with 8-bit significands whose exponents stay within +-7 of a
// per-block base (bases up to +-480 for A and for B), so each block's sums are exact in a
// double and are compared bit for bit with the native binary64 encoding of that sum. Two
// directed blocks need the full accumulator: 2^1000 + 2^-1000 - 2^1000 = 2^-1000,
// 1 + 2^-1074 - 1 = 2^-1074 (a subnormal result), 2^-1074 * 2^-1074 (kept exactly, then
// rounded to +0), 2^1023 * 2^-1074 = 2^-51, two 2^1023 terms and 2^1023 * 2^1023 overflowing
// to infinity, and a NaN operand. Blocks of p = 4 .. 24 run back to back, and the first result
// row of each block must appear ROWS + COLS + 2 cycles after its EOB.
module tb_gemm_sa_ieee64;
  import tb_fp_pkg::*;
  import s3_pkg::*;

  localparam int ROWS = 4, COLS = 3, NBLK = 24, PMAX = 24;

  logic clk = 0, rst = 1;
  logic [ROWS-1:0][63:0] a_in;
  logic [COLS-1:0][63:0] b_in;
  logic sob, eob;
  logic [COLS-1:0][63:0] c_word;
  logic [COLS-1:0]       c_valid;

  gemm_sa #(.ROWS(ROWS), .COLS(COLS), .IN_FMT(FMT_IEEE), .IN_WE(11), .IN_WF(52),
            .MSB(2047), .LSB(-2148), .OVF(32), .K(64),
            .OUT_FMT(FMT_IEEE), .OUT_WE(11), .OUT_WF(52))
    dut (.clk(clk), .rst(rst), .a_in(a_in), .b_in(b_in), .sob(sob), .eob(eob),
         .c_word(c_word), .c_valid(c_valid));

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, n_dir = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam logic [63:0] ONE    = 64'h3FF0_0000_0000_0000;
  localparam logic [63:0] P1000  = 64'h7E70_0000_0000_0000;   //  2^1000
  localparam logic [63:0] N1000  = 64'hFE70_0000_0000_0000;   // -2^1000
  localparam logic [63:0] PM1000 = 64'h0170_0000_0000_0000;   //  2^-1000
  localparam logic [63:0] P1023  = 64'h7FE0_0000_0000_0000;   //  2^1023
  localparam logic [63:0] TINY   = 64'h0000_0000_0000_0001;   //  2^-1074
  localparam logic [63:0] QNAN   = 64'h7FF8_0000_0000_0000;
  localparam logic [63:0] INF    = 64'h7FF0_0000_0000_0000;

  logic [63:0] A [NBLK][ROWS][PMAX];
  logic [63:0] B [NBLK][PMAX][COLS];
  logic [63:0] C [NBLK][ROWS][COLS];
  int P [NBLK], te [NBLK];

  function automatic logic [63:0] rnd_f64(input int base);
    return {1'($urandom), 11'(1023 + base + int'($urandom_range(0, 14)) - 7), 7'($urandom), 45'd0};
  endfunction

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      int ea, eb;
      P[b] = (b < 2) ? ROWS : int'($urandom_range(ROWS, PMAX));
      ea = int'($urandom_range(0, 960)) - 480;
      eb = int'($urandom_range(0, 960)) - 480;
      for (int i = 0; i < ROWS; i++) for (int k = 0; k < PMAX; k++) A[b][i][k] = 0;
      for (int k = 0; k < PMAX; k++) for (int j = 0; j < COLS; j++) B[b][k][j] = 0;
      if (b == 0) begin
        for (int k = 0; k < 3; k++) for (int j = 0; j < COLS; j++) B[b][k][j] = ONE;
        A[b][0][0] = P1000; A[b][0][1] = PM1000; A[b][0][2] = N1000;   // 2^-1000
        A[b][1][0] = ONE;   A[b][1][1] = TINY;   A[b][1][2] = 64'hBFF0_0000_0000_0000;
        A[b][2][0] = P1023; A[b][2][1] = P1023;                         // 2^1024: inf
        A[b][3][0] = ONE;   A[b][3][1] = QNAN;
        for (int j = 0; j < COLS; j++) begin
          C[b][0][j] = PM1000; C[b][1][j] = TINY; C[b][2][j] = INF; C[b][3][j] = QNAN;
        end
      end else if (b == 1) begin
        for (int j = 0; j < COLS; j++) begin B[b][0][j] = TINY; B[b][1][j] = P1023; end
        A[b][0][0] = TINY;                                              // 2^-2148 -> +0
        A[b][1][0] = P1023;                                             // 2^-51
        A[b][2][0] = {1'b1, P1023[62:0]};                               // -2^-51
        A[b][3][1] = P1023;                                             // 2^1023 * 2^1023: inf
        A[b][3][0] = ONE;
        for (int j = 0; j < COLS; j++) begin
          C[b][0][j] = 64'h0; C[b][1][j] = 64'h3CC0_0000_0000_0000;
          C[b][2][j] = 64'hBCC0_0000_0000_0000; C[b][3][j] = INF;
        end
      end else begin
        for (int i = 0; i < ROWS; i++) for (int k = 0; k < P[b]; k++) A[b][i][k] = rnd_f64(ea);
        for (int k = 0; k < P[b]; k++) for (int j = 0; j < COLS; j++) B[b][k][j] = rnd_f64(eb);
        for (int i = 0; i < ROWS; i++)
          for (int j = 0; j < COLS; j++) begin
            real acc;
            acc = 0.0;
            for (int k = 0; k < P[b]; k++) acc += $bitstoreal(A[b][i][k]) * $bitstoreal(B[b][k][j]);
            C[b][i][j] = (acc == 0.0) ? 64'h0 : $realtobits(acc);
          end
      end
    end
    a_in = '0; b_in = '0; sob = 0; eob = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < P[b]; k++) begin
        for (int i = 0; i < ROWS; i++) a_in[i] = A[b][i][k];
        for (int j = 0; j < COLS; j++) b_in[j] = B[b][k][j];
        sob = (k == 0); eob = (k == P[b] - 1);
        if (eob) te[b] = cyc;
        @(negedge clk);
      end
    sob = 0; eob = 0;
  end

  int ob = 0, orow = 0;
  always @(posedge clk) begin
    if (!rst && c_valid != 0 && ob < NBLK) begin
      if (orow == 0) begin
        checks++;
        if (cyc != te[ob] + ROWS + COLS + 2) begin
          failures++; $display("FAIL block %0d latency %0d", ob, cyc - te[ob]);
        end
      end
      for (int j = 0; j < COLS; j++) begin
        checks++;
        if (!c_valid[j] || c_word[j] != C[ob][ROWS-1-orow][j]) begin
          failures++;
          $display("FAIL block %0d C(%0d,%0d) = %h expected %h", ob, ROWS-1-orow, j, c_word[j],
                   C[ob][ROWS-1-orow][j]);
        end else if (ob < 2) n_dir++;
      end
      orow++;
      if (orow == ROWS) begin orow = 0; ob++; end
    end
  end

  initial begin
    wait (ob == NBLK);
    checks++;
    if (n_dir != 2 * ROWS * COLS) begin
      failures++; $display("FAIL only %0d of %0d directed results matched", n_dir, 2 * ROWS * COLS);
    end
    $display("  directed results matched: %0d", n_dir);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * PMAX + 300) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
