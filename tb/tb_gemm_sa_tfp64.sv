// tb_gemm_sa_tfp64: the 64-bit workload with the "gamma" accumulator and the exact output:
// TFP64 operands (binary64 layout without subnormals) on a 4 x 3 array, accumulator of
// 1 + 9 + 40 + 50 = 100 bits (OVF = 9, MSB = 40, LSB = -50, 64-bit chunks), results delivered
// as the fixed-point accumulator itself ({nan, 100-bit two's complement}, weight 2^-50), with no
// rounding at all. Operands have short significands so the reference (each product truncated
// toward zero to a multiple of 2^-50, summed in a double) is exact. Some operands carry a zero
// exponent with a nonzero fraction: TFP has no subnormals, so they must count as zero.
module tb_gemm_sa_tfp64;
  import tb_fp_pkg::*;
  import s3_pkg::*;

  localparam int ROWS = 4, COLS = 3, NBLK = 30, PMAX = 24;

  logic clk = 0, rst = 1;
  logic [ROWS-1:0][63:0] a_in;
  logic [COLS-1:0][63:0] b_in;
  logic sob, eob;
  logic [COLS-1:0][100:0] c_word;
  logic [COLS-1:0]        c_valid;

  gemm_sa #(.ROWS(ROWS), .COLS(COLS), .IN_FMT(FMT_TFP), .IN_WE(11), .IN_WF(52),
            .MSB(40), .LSB(-50), .OVF(9), .K(64), .OUT_EXACT(1'b1))
    dut (.clk(clk), .rst(rst), .a_in(a_in), .b_in(b_in), .sob(sob), .eob(eob),
         .c_word(c_word), .c_valid(c_valid));

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, n_zexp = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [63:0]  A [NBLK][ROWS][PMAX];
  logic [63:0]  B [NBLK][PMAX][COLS];
  logic [100:0] C [NBLK][ROWS][COLS];
  int P [NBLK], te [NBLK];

  function automatic logic [63:0] rnd_tfp();
    if ($urandom_range(0, 19) == 0) return {1'($urandom), 11'd0, 52'($urandom) | 52'd1};
    return {1'($urandom), 11'(1023 + int'($urandom_range(0, 27)) - 30), 10'($urandom), 42'd0};
  endfunction

  function automatic real tval(input logic [63:0] w);
    if (w[62:52] == 0) return 0.0;
    return fp_to_real(w, 11, 52);
  endfunction

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      P[b] = int'($urandom_range(ROWS, PMAX));
      for (int i = 0; i < ROWS; i++) for (int k = 0; k < P[b]; k++) A[b][i][k] = rnd_tfp();
      for (int k = 0; k < P[b]; k++) for (int j = 0; j < COLS; j++) B[b][k][j] = rnd_tfp();
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          real acc, p, q;
          acc = 0.0;
          for (int k = 0; k < P[b]; k++) begin
            if (A[b][i][k][62:52] == 0 && A[b][i][k][51:0] != 0) n_zexp++;
            p = tval(A[b][i][k]) * tval(B[b][k][j]);
            q = $floor((p < 0.0 ? -p : p) * pow2(50)) / pow2(50);
            acc += (p < 0.0) ? -q : q;
          end
          C[b][i][j] = {1'b0, 100'(longint'(acc * pow2(50)))};
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
        end
      end
      orow++;
      if (orow == ROWS) begin orow = 0; ob++; end
    end
  end

  initial begin
    wait (ob == NBLK);
    checks++;
    if (n_zexp == 0) begin failures++; $display("FAIL no zero-exponent operand was used"); end
    $display("  zero-exponent TFP operands: %0d", n_zexp);
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
