// tb_sak: checks a 3 x 3 systolic array kernel (small S3 format, 18-bit accumulators). The
// testbench skews the operands itself (row i and column j delayed by i and j cycles) and streams
// back-to-back blocks of random integer matrices with p = 3 .. 9. Every sum must leave the bottom
// of column j exactly in cycle te + 2*ROWS + j + 1 - i (te: the block's EOB cycle) with the
// right value, no other slot may be marked valid, and all sums must arrive. Blocks of p >= 6
// also carry an EOB after their third product with no SOB after it: the running sums must
// leave on the same schedule while the accumulation goes on to the block's end.
module tb_sak;
  `include "tb_small_s3.svh"

  localparam int R = 3, C = 3, NBLK = 40, PMAX = 9;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, seen = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [R-1:0][11:0] a_s3;
  logic [C-1:0][11:0] b_s3;
  logic sob, eob;
  logic [C-1:0][25:0] c_out;

  sak #(.ROWS(R), .COLS(C), .WS(4), .WF(5), .BIAS(7), .MSB(6), .LSB(-8), .OVF(3), .K(4)) dut (
    .clk(clk), .rst(rst), .a_s3(a_s3), .b_s3(b_s3), .sob(sob), .eob(eob), .c_out(c_out));

  // Unskewed stream: per cycle, one column of A and one row of B.
  int sa [NBLK*PMAX][R], sb [NBLK*PMAX][C];
  bit ssob [NBLK*PMAX], seob [NBLK*PMAX];
  int nstream, nexp = 0, nmid = 0;
  int expv [int];              // key: cycle * 8 + column

  initial begin
    int pos;
    pos = 0;
    for (int b = 0; b < NBLK; b++) begin
      int p, acc [R][C];
      p = int'($urandom_range(R, PMAX));
      if (b % 5 == 0) p = R;
      for (int i = 0; i < R; i++) for (int j = 0; j < C; j++) acc[i][j] = 0;
      for (int k = 0; k < p; k++) begin
        for (int i = 0; i < R; i++) sa[pos+k][i] = int'($urandom_range(0, 6)) - 3;
        for (int j = 0; j < C; j++) sb[pos+k][j] = int'($urandom_range(0, 6)) - 3;
        for (int i = 0; i < R; i++) for (int j = 0; j < C; j++)
          acc[i][j] += sa[pos+k][i] * sb[pos+k][j];
        ssob[pos+k] = (k == 0);
        seob[pos+k] = (k == p - 1);
        // Intermediate result: an EOB after R products with no SOB after it, in blocks long
        // enough to keep EOBs R cycles apart. The running sums leave and accumulation goes on.
        if (p >= 2 * R && k == R - 1) begin
          seob[pos+k] = 1'b1;
          nmid++;
          for (int i = 0; i < R; i++) for (int j = 0; j < C; j++)
            expv[(3 + pos + k + 2*R + j + 1 - i) * 8 + j] = acc[i][j] * 256;
        end
      end
      // Stream cycle pos+p-1 is applied during simulation cycle 3 + pos + p - 1.
      for (int i = 0; i < R; i++) for (int j = 0; j < C; j++)
        expv[(3 + pos + p - 1 + 2*R + j + 1 - i) * 8 + j] = acc[i][j] * 256;
      pos += p;
    end
    nstream = pos;
    nexp = expv.num();
  end

  initial begin
    a_s3 = '0; b_s3 = '0; sob = 0; eob = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // Cycle index during which stream element t is applied to row i: 3 + t + i.
    for (int c = 3; c < 3 + nstream + R + C; c++) begin
      for (int i = 0; i < R; i++) begin
        int t;
        t = c - 3 - i;
        a_s3[i] = (t >= 0 && t < nstream) ? s3_int(sa[t][i]) : '0;
      end
      for (int j = 0; j < C; j++) begin
        int t;
        t = c - 3 - j;
        b_s3[j] = (t >= 0 && t < nstream) ? s3_int(sb[t][j]) : '0;
      end
      sob = (c - 3 < nstream) ? ssob[c-3] : 1'b0;
      eob = (c - 3 < nstream) ? seob[c-3] : 1'b0;
      @(negedge clk);
    end
    a_s3 = '0; b_s3 = '0; sob = 0; eob = 0;
    repeat (4 * R + C + 4) @(negedge clk);
    checks++;
    if (seen != nexp || nmid == 0) begin
      failures++; $display("FAIL %0d of %0d sums arrived, %0d intermediate EOBs", seen, nexp, nmid);
    end
    $display("  sums checked: %0d, intermediate EOBs: %0d", seen, nmid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int j = 0; j < C; j++) begin
      if (!rst && c_out[j][25]) begin
        checks++;
        if (!expv.exists(cyc * 8 + j)) begin
          failures++; $display("FAIL unexpected sum in column %0d at cycle %0d", j, cyc);
        end else if (cs_value(c_out[j]) != expv[cyc * 8 + j] || c_out[j][24]) begin
          failures++;
          $display("FAIL column %0d cycle %0d: %0d expected %0d", j, cyc, cs_value(c_out[j]),
                   expv[cyc * 8 + j]);
        end else seen++;
      end
    end
  end

  initial begin
    repeat (NBLK * PMAX + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
