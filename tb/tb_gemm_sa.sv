// tb_gemm_sa: end-to-end test of the systolic array at its default size (8 x 7 PEs, binary32,
// exact 586-bit accumulators).
//
// It streams a sequence of GEMM blocks with no idle cycle between them, block lengths p from
// ROWS upwards, and checks every output word and the latency from a block's EOB to its first
// result row (ROWS + COLS + 2 cycles). Random blocks use operands with 8-bit significands and
// small exponents so the double-precision reference sum is exact; it is then rounded to binary32
// by tb_fp_pkg. Directed blocks hit overflow to infinity, NaN propagation, a cancellation that
// only an unrounded accumulator survives, subnormal operands and results, ties to even and zero.
// Mechanisms counted (each must occur): back-to-back blocks, result extraction overlapping
// computation (HSSD), minimum-length blocks (p = ROWS), infinity, NaN, exact cancellation,
// subnormal result, tie rounded to even, intermediate results (two blocks start without SOB, so
// the EOB before them delivers running sums and their own results continue those sums).
module tb_gemm_sa;
  import tb_fp_pkg::*;

  localparam int ROWS = 8;
  localparam int COLS = 7;
  localparam int NBLK = 14;
  localparam int PMAX = 40;

  logic clk = 0, rst = 1;
  logic [ROWS-1:0][31:0] a_in;
  logic [COLS-1:0][31:0] b_in;
  logic sob, eob;
  logic [COLS-1:0][31:0] c_word;
  logic [COLS-1:0]       c_valid;

  gemm_sa dut (.clk(clk), .rst(rst), .a_in(a_in), .b_in(b_in), .sob(sob), .eob(eob),
               .c_word(c_word), .c_valid(c_valid));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_b2b = 0, n_overlap = 0, n_minp = 0, n_inf = 0, n_nan = 0, n_cancel = 0,
      n_subn = 0, n_tie = 0, n_cont = 0;

  logic [31:0] A [NBLK][ROWS][PMAX];
  logic [31:0] B [NBLK][PMAX][COLS];
  logic [31:0] C [NBLK][ROWS][COLS];
  int          P [NBLK];
  int          te [NBLK];
  logic        busy_in;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [31:0] rnd_small();
    return f32_small(1'($urandom), int'($urandom_range(0, 14)) - 7, 7'($urandom));
  endfunction

  // Blocks that start without SOB: the previous block's EOB then delivered intermediate
  // results, and these blocks' results are the running sums over both blocks.
  function automatic bit cont(input int b);
    return b == 6 || b == 11;
  endfunction

  task automatic make_blocks();
    real acc;
    for (int b = 0; b < NBLK; b++) begin
      P[b] = (b % 4 == 1) ? ROWS : ROWS + int'($urandom_range(0, PMAX - ROWS));
      if (b == 3) P[b] = ROWS;
      for (int i = 0; i < ROWS; i++) for (int k = 0; k < PMAX; k++) A[b][i][k] = 0;
      for (int k = 0; k < PMAX; k++) for (int j = 0; j < COLS; j++) B[b][k][j] = 0;
      if (b == 3) begin
        // Directed block: B(k,j) = 1.0 for k < 4, row i exercises one special case.
        for (int k = 0; k < 4; k++) for (int j = 0; j < COLS; j++) B[b][k][j] = 32'h3F80_0000;
        A[b][0][0] = 32'h7F40_0000; A[b][0][1] = 32'h7F40_0000;   // 1.5*2^127 twice: +inf
        A[b][1][0] = 32'h3F80_0000; A[b][1][1] = 32'h7FC0_0000;   // NaN operand
        A[b][2][0] = 32'h71800000;  A[b][2][1] = 32'h4040_0000;   // 2^100 + 3 - 2^100 = 3
        A[b][2][2] = 32'hF1800000;
        A[b][3][0] = 32'h0000_0200; A[b][3][1] = 32'h0000_0001;   // subnormals: 2^-140 + 2^-149
        A[b][4][0] = 32'hC060_0000;                               // -3.5
        A[b][5][0] = 32'h3F80_0000; A[b][5][1] = 32'h3380_0000;   // 1 + 2^-24: tie, stays 1
        A[b][6][0] = 32'h3F80_0001; A[b][6][1] = 32'h3380_0000;   // (1+2^-23) + 2^-24: tie, up
        for (int j = 0; j < COLS; j++) begin
          C[b][0][j] = 32'h7F80_0000;
          C[b][1][j] = 32'h7FC0_0000;
          C[b][2][j] = 32'h4040_0000;
          C[b][3][j] = 32'h0000_0201;
          C[b][4][j] = 32'hC060_0000;
          C[b][5][j] = 32'h3F80_0000;
          C[b][6][j] = 32'h3F80_0002;
          C[b][7][j] = 32'h0000_0000;
        end
      end else begin
        for (int i = 0; i < ROWS; i++) for (int k = 0; k < P[b]; k++) A[b][i][k] = rnd_small();
        for (int k = 0; k < P[b]; k++) for (int j = 0; j < COLS; j++) B[b][k][j] = rnd_small();
        for (int i = 0; i < ROWS; i++)
          for (int j = 0; j < COLS; j++) begin
            acc = 0.0;
            if (cont(b))
              for (int k = 0; k < P[b-1]; k++)
                acc += fp_to_real(64'(A[b-1][i][k]), 8, 23) * fp_to_real(64'(B[b-1][k][j]), 8, 23);
            for (int k = 0; k < P[b]; k++)
              acc += fp_to_real(64'(A[b][i][k]), 8, 23) * fp_to_real(64'(B[b][k][j]), 8, 23);
            C[b][i][j] = 32'(real_to_fp(acc, 8, 23, 1'b1));
          end
      end
    end
  endtask

  // Stimulus: blocks back to back, inputs changed on the falling edge.
  initial begin
    make_blocks();
    a_in = '0; b_in = '0; sob = 0; eob = 0; busy_in = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    busy_in = 1;
    for (int b = 0; b < NBLK; b++) begin
      if (b > 0) n_b2b++;
      if (P[b] == ROWS) n_minp++;
      for (int k = 0; k < P[b]; k++) begin
        for (int i = 0; i < ROWS; i++) a_in[i] = A[b][i][k];
        for (int j = 0; j < COLS; j++) b_in[j] = B[b][k][j];
        sob = (k == 0) && !cont(b);
        eob = (k == P[b] - 1);
        if (k == 0 && cont(b)) n_cont++;
        if (eob) te[b] = cyc;
        @(negedge clk);
      end
    end
    sob = 0; eob = 0; busy_in = 0;
  end

  // Checker: ROWS output cycles per block, row ROWS-1 first.
  int ob = 0, orow = 0;
  always @(posedge clk) begin
    if (!rst && c_valid != 0) begin
      if (busy_in) n_overlap++;
      checks++;
      if (c_valid != {COLS{1'b1}}) begin
        failures++; $display("FAIL columns not aligned: valid=%b", c_valid);
      end
      if (ob >= NBLK) begin
        failures++; $display("FAIL unexpected output at cycle %0d", cyc);
      end else begin
        if (orow == 0) begin
          checks++;
          if (cyc != te[ob] + ROWS + COLS + 2) begin
            failures++;
            $display("FAIL block %0d latency %0d, expected %0d", ob, cyc - te[ob], ROWS + COLS + 2);
          end
        end
        for (int j = 0; j < COLS; j++) begin
          logic [31:0] exp_w;
          exp_w = C[ob][ROWS-1-orow][j];
          checks++;
          if (c_word[j] !== exp_w) begin
            failures++;
            $display("FAIL block %0d C(%0d,%0d) = %h expected %h", ob, ROWS-1-orow, j, c_word[j], exp_w);
          end else begin
            if (exp_w == 32'h7F80_0000) n_inf++;
            if (exp_w == 32'h7FC0_0000) n_nan++;
            if (ob == 3 && ROWS-1-orow == 2) n_cancel++;
            if (exp_w[30:23] == 0 && exp_w[22:0] != 0) n_subn++;
            if (ob == 3 && ROWS-1-orow == 5) n_tie++;
          end
        end
        orow++;
        if (orow == ROWS) begin orow = 0; ob++; end
      end
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %s: %0d", what, n);
  endtask

  initial begin
    wait (ob == NBLK);
    repeat (5) @(posedge clk);
    need("back-to-back blocks", n_b2b);
    need("outputs while computing (HSSD overlap)", n_overlap);
    need("blocks with p = ROWS", n_minp);
    need("overflow to infinity", n_inf);
    need("NaN propagated", n_nan);
    need("exact cancellation", n_cancel);
    need("subnormal results", n_subn);
    need("ties to even", n_tie);
    need("intermediate results (EOB without SOB after it)", n_cont);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * PMAX + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
