// tb_gemm_sa_bf16: the 16-bit workload with the small "alpha" accumulator and a different
// output format: Bfloat16 operands on a 16 x 15 array, accumulator of 2 * 16 = 32 bits
// (MSB = 5, OVF = 2, LSB = -24, 16-bit chunks), results rounded to binary32. Coefficients are
// uniform random values in [-1, 1] rounded to Bfloat16. The reference truncates each exact
// product to a multiple of 2^-24 (toward zero, as the accumulator does), sums in a double
// (exact here) and rounds to binary32. Blocks of p = 16 .. 40 run back to back, and the first
// result row of each block must appear ROWS + COLS + 2 cycles after its EOB. In block 2, row 0
// of C sums to about 192, beyond the accumulator's range of +-128: it must come out as NaN
// (counted as a mechanism), while row 1 sums to about 72 and must not.
module tb_gemm_sa_bf16;
  import tb_fp_pkg::*;
  import s3_pkg::*;

  localparam int ROWS = 16, COLS = 15, NBLK = 8, PMAX = 40;

  logic clk = 0, rst = 1;
  logic [ROWS-1:0][15:0] a_in;
  logic [COLS-1:0][15:0] b_in;
  logic sob, eob;
  logic [COLS-1:0][31:0] c_word;
  logic [COLS-1:0]       c_valid;

  gemm_sa #(.ROWS(ROWS), .COLS(COLS), .IN_FMT(FMT_IEEE), .IN_WE(8), .IN_WF(7),
            .MSB(5), .LSB(-24), .OVF(2), .K(16), .OUT_FMT(FMT_IEEE), .OUT_WE(8), .OUT_WF(23))
    dut (.clk(clk), .rst(rst), .a_in(a_in), .b_in(b_in), .sob(sob), .eob(eob),
         .c_word(c_word), .c_valid(c_valid));

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, n_trunc = 0, n_ovf = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [15:0] A [NBLK][ROWS][PMAX];
  logic [15:0] B [NBLK][PMAX][COLS];
  logic [31:0] C [NBLK][ROWS][COLS];
  int P [NBLK], te [NBLK];

  function automatic logic [15:0] rnd_bf16();
    real r;
    r = (real'($urandom) / 4294967296.0) * 2.0 - 1.0;
    if (r == 0.0) return 16'h0000;
    return 16'(real_to_fp(r, 8, 7, 1'b1));
  endfunction

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      P[b] = (b == 1) ? ROWS : int'($urandom_range(ROWS, PMAX));
      for (int i = 0; i < ROWS; i++) for (int k = 0; k < P[b]; k++) A[b][i][k] = rnd_bf16();
      for (int k = 0; k < P[b]; k++) for (int j = 0; j < COLS; j++) B[b][k][j] = rnd_bf16();
      if (b == 2) begin
        // Row 0 accumulates 8 products 12 * 2 = 24 (192, beyond the +-128 range): NaN.
        // Row 1 reaches 72 with 3 of them plus small terms: in range, must stay a number.
        for (int k = 0; k < 8; k++) for (int j = 0; j < COLS; j++) B[b][k][j] = 16'h4000;
        for (int k = 0; k < 8; k++) A[b][0][k] = 16'h4140;
        for (int k = 0; k < 3; k++) A[b][1][k] = 16'h4140;
      end
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          real acc, p, q;
          acc = 0.0;
          for (int k = 0; k < P[b]; k++) begin
            p = fp_to_real(64'(A[b][i][k]), 8, 7) * fp_to_real(64'(B[b][k][j]), 8, 7);
            q = $floor((p < 0.0 ? -p : p) * pow2(24)) / pow2(24);
            if (q != (p < 0.0 ? -p : p)) n_trunc++;
            acc += (p < 0.0) ? -q : q;
          end
          C[b][i][j] = (acc == 0.0) ? 32'h0 : 32'(real_to_fp(acc, 8, 23, 1'b1));
          if (b == 2 && i == 0) C[b][i][j] = 32'h7FC0_0000;
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
        if (c_valid[j] && c_word[j] == 32'h7FC0_0000 && ob == 2) n_ovf++;
        if (!c_valid[j] || c_word[j] != C[ob][ROWS-1-orow][j]) begin
          failures++;
          $display("FAIL block %0d C(%0d,%0d) = %h expected %h", ob, ROWS-1-orow, j, c_word[j],
                   C[ob][ROWS-1-orow][j]);
        end
      end
      orow++;
      if (orow == ROWS) begin orow = 0; ob++; end
    end
  end

  initial begin
    wait (ob == NBLK);
    checks++;
    if (n_trunc == 0) begin failures++; $display("FAIL no product was truncated at LSB"); end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no accumulator overflow was reported"); end
    $display("  products truncated below 2^-24: %0d, overflowed sums: %0d", n_trunc, n_ovf);
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
