// tb_gemm_sa_posit4: the 4-bit workload, posit<4,0> operands and results on the full 64 x 63
// array (4032 PEs) with an exact accumulator for posit<4,0> products: products lie between
// 2^-4 and 2^4 with bits down to 2^-6, so LSB = -6 and MSB = 5, and OVF = 13 carry bits let
// about 2^14 of the largest products accumulate before the sum overflows into NaR (25 bits in
// 16-bit chunks). Matrix coefficients are random posits in [-1, 1]. Blocks of p = 64 .. 80 run
// back to back; every result is compared with the exact sum (exact in a double) rounded to
// posit<4,0>, which saturates at maxpos (4) and minpos (1/4) for most sums, and the first
// result row of each block must appear ROWS + COLS + 2 cycles after its EOB. One block carries
// a NaR operand in row 0.
module tb_gemm_sa_posit4;
  import tb_fp_pkg::*;
  import s3_pkg::*;
  `include "tb_posit_ref.svh"

  localparam int ROWS = 64, COLS = 63, NBLK = 4, PMAX = 80;

  logic clk = 0, rst = 1;
  logic [ROWS-1:0][3:0] a_in;
  logic [COLS-1:0][3:0] b_in;
  logic sob, eob;
  logic [COLS-1:0][3:0] c_word;
  logic [COLS-1:0]      c_valid;

  gemm_sa #(.ROWS(ROWS), .COLS(COLS), .IN_FMT(FMT_POSIT), .IN_PN(4), .IN_PES(0),
            .MSB(5), .LSB(-6), .OVF(13), .K(16), .OUT_FMT(FMT_POSIT), .OUT_PN(4), .OUT_PES(0))
    dut (.clk(clk), .rst(rst), .a_in(a_in), .b_in(b_in), .sob(sob), .eob(eob),
         .c_word(c_word), .c_valid(c_valid));

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, n_nar = 0, n_overlap = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [3:0] A [NBLK][ROWS][PMAX];
  logic [3:0] B [NBLK][PMAX][COLS];
  logic [3:0] C [NBLK][ROWS][COLS];
  int P [NBLK], te [NBLK];
  bit busy_in = 0;

  // Random posit<4,0> in [-1, 1]: positive patterns 0x0..0x4 (0x4 is 1.0), either sign.
  function automatic logic [3:0] rnd_posit();
    logic [3:0] p;
    p = 4'($urandom_range(0, 4));
    return $urandom_range(0, 1) ? -p : p;
  endfunction

  function automatic real pval(input logic [3:0] p);
    if (p == 0) return 0.0;
    return posit_value(64'(p), 4, 0);
  endfunction

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      P[b] = (b == 0) ? ROWS : int'($urandom_range(ROWS, PMAX));
      for (int i = 0; i < ROWS; i++) for (int k = 0; k < P[b]; k++) A[b][i][k] = rnd_posit();
      for (int k = 0; k < P[b]; k++) for (int j = 0; j < COLS; j++) B[b][k][j] = rnd_posit();
      if (b == 2) A[b][0][3] = 4'h8;
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          real acc;
          acc = 0.0;
          for (int k = 0; k < P[b]; k++) acc += pval(A[b][i][k]) * pval(B[b][k][j]);
          C[b][i][j] = (acc == 0.0) ? 4'h0 : 4'(posit_round(acc, 4, 0));
          if (b == 2 && i == 0) C[b][i][j] = 4'h8;
        end
    end
    a_in = '0; b_in = '0; sob = 0; eob = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    busy_in = 1;
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < P[b]; k++) begin
        for (int i = 0; i < ROWS; i++) a_in[i] = A[b][i][k];
        for (int j = 0; j < COLS; j++) b_in[j] = B[b][k][j];
        sob = (k == 0); eob = (k == P[b] - 1);
        if (eob) te[b] = cyc;
        @(negedge clk);
      end
    sob = 0; eob = 0; busy_in = 0;
  end

  int ob = 0, orow = 0;
  always @(posedge clk) begin
    if (!rst && c_valid != 0 && ob < NBLK) begin
      if (busy_in) n_overlap++;
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
        end else if (c_word[j] == 4'h8) n_nar++;
      end
      orow++;
      if (orow == ROWS) begin orow = 0; ob++; end
    end
  end

  initial begin
    wait (ob == NBLK);
    checks++;
    if (n_nar == 0 || n_overlap == 0) begin
      failures++; $display("FAIL NaR results %0d, overlapped output cycles %0d", n_nar, n_overlap);
    end
    $display("  NaR results: %0d, output cycles overlapping input: %0d", n_nar, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * PMAX + 400) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
