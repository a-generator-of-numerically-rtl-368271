// tb_s3fdp: checks the S3 fused dot product in two configurations.
// DUT 0 is the default binary32 S3FDP with the exact 586-bit accumulator: random dot products
// of operands with 8-bit significands and exponents in [-7, 7] (exact in a double), restarted
// by ftz, compared after resolving the carry-save form; plus a cancellation 2^120 + 1 - 2^120
// and NaN stickiness. DUT 1 is a small accumulator (MSB = 6, LSB = -8, OVF = 3, K = 4, 18 bits,
// five chunks) driven with integers and halves: it exercises the chunk carries every cycle,
// truncation of products below LSB (too_small), the NaN flag raised by a product above MSB
// (too_big) or by overflow of the accumulation, and its restart by ftz. Each result is checked
// one cycle after the last product.
module tb_s3fdp;
  import tb_fp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- DUT 0: binary32, exact accumulator ----------------
  localparam int WLA0 = 586, NCH0 = 10;
  logic [33:0] x0, y0;
  logic ftz0, eob0;
  logic [NCH0*64-1:0] sum0;
  logic [NCH0-2:0] car0;
  logic nan0, eobq0;
  s3fdp dut0 (.clk(clk), .rst(rst), .x(x0), .y(y0), .ftz(ftz0), .eob(eob0),
              .acc_sum(sum0), .acc_carry(car0), .nan_q(nan0), .eob_q(eobq0));

  // ---------------- DUT 1: small accumulator ----------------
  localparam int WLA1 = 18, NCH1 = 5;
  logic [11:0] x1, y1;                    // WS = 4, WF = 5, bias 7
  logic ftz1, eob1;
  logic [NCH1*4-1:0] sum1;
  logic [NCH1-2:0] car1;
  logic nan1, eobq1;
  s3fdp #(.WS(4), .WF(5), .BIAS(7), .MSB(6), .LSB(-8), .OVF(3), .K(4)) dut1 (
    .clk(clk), .rst(rst), .x(x1), .y(y1), .ftz(ftz1), .eob(eob1),
    .acc_sum(sum1), .acc_carry(car1), .nan_q(nan1), .eob_q(eobq1));

  // Value of a carry-save accumulator as a real (weights 2^lsb), via a wide signed integer.
  function automatic real cs_real(input logic [1023:0] s, input logic [63:0] c, input int nch,
                                  input int k, input int wla, input int lsb);
    logic [1023:0] v;
    real r;
    bit neg;
    v = s;
    for (int i = 0; i < nch - 1; i++) if (c[i]) v = v + (1024'(1) << (k * (i + 1)));
    v = v & ((1024'(1) << wla) - 1);
    neg = v[wla - 1];
    if (neg) v = ((1024'(1) << wla) - v) & ((1024'(1) << wla) - 1);
    r = 0.0;
    for (int b = 0; b < wla; b++) if (v[b]) r += pow2(b + lsb);
    return neg ? -r : r;
  endfunction

  // S3 of a binary32 (normal) value: {nan, sign, scale, 1, fraction}.
  function automatic logic [33:0] s3_of_f32(input logic [31:0] w);
    return {1'b0, w[31], w[30:23], 1'b1, w[22:0]};
  endfunction

  // S3 (WS=4, WF=5, bias 7) of sign * m * 2^e with m in 1.xxxxx.
  function automatic logic [11:0] s3_small(input bit s, input int e, input logic [4:0] f);
    return {1'b0, s, 4'(e + 7), 1'b1, f};
  endfunction

  function automatic real small_real(input logic [11:0] v);
    real r;
    r = real'({1'b1, v[4:0]}) * pow2(int'(v[9:6]) - 7 - 5);
    return v[10] ? -r : r;
  endfunction

  task automatic check0(input real expv, input bit expnan, input string what);
    real got;
    got = cs_real(1024'(sum0), 64'(car0), NCH0, 64, WLA0, -298);
    checks++;
    if (got != expv || nan0 != expnan || !eobq0) begin
      failures++;
      $display("FAIL dut0 %s: got %e nan=%b eob_q=%b, expected %e nan=%b", what, got, nan0, eobq0, expv, expnan);
    end
  endtask

  task automatic check1(input real expv, input bit expnan, input string what);
    real got;
    got = cs_real(1024'(sum1), 64'(car1), NCH1, 4, WLA1, -8);
    checks++;
    if ((!expnan && got != expv) || nan1 != expnan) begin
      failures++;
      $display("FAIL dut1 %s: got %f nan=%b, expected %f nan=%b", what, got, nan1, expv, expnan);
    end
  endtask

  initial begin
    x0 = '0; y0 = '0; ftz0 = 0; eob0 = 0; x1 = '0; y1 = '0; ftz1 = 0; eob1 = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // DUT 0: random dot products.
    for (int t = 0; t < 60; t++) begin
      real acc;
      int len;
      len = int'($urandom_range(1, 20));
      acc = 0.0;
      for (int k = 0; k < len; k++) begin
        logic [31:0] a, b;
        a = f32_small(1'($urandom), int'($urandom_range(0, 14)) - 7, 7'($urandom));
        b = f32_small(1'($urandom), int'($urandom_range(0, 14)) - 7, 7'($urandom));
        acc += fp_to_real(64'(a), 8, 23) * fp_to_real(64'(b), 8, 23);
        x0 = s3_of_f32(a); y0 = s3_of_f32(b);
        ftz0 = (k == 0); eob0 = (k == len - 1);
        @(negedge clk);
      end
      ftz0 = 0; eob0 = 0; x0 = '0; y0 = '0;
      check0(acc, 1'b0, "random dot product");
    end
    // Cancellation: 2^120 * 1 + 1 * 1 - 2^120 * 1 = 1.
    x0 = s3_of_f32(32'h7B80_0000); y0 = s3_of_f32(32'h3F80_0000); ftz0 = 1; @(negedge clk);
    x0 = s3_of_f32(32'h3F80_0000); ftz0 = 0; @(negedge clk);
    x0 = s3_of_f32(32'hFB80_0000); eob0 = 1; @(negedge clk);
    eob0 = 0; x0 = '0;
    check0(1.0, 1'b0, "cancellation");
    // NaN operand, sticky until the next ftz.
    x0 = s3_of_f32(32'h3F80_0000) | 34'(1) << 33; ftz0 = 1; @(negedge clk);
    x0 = s3_of_f32(32'h3F80_0000); ftz0 = 0; eob0 = 1; @(negedge clk);
    eob0 = 0;
    check0(2.0, 1'b1, "NaN sticky");
    x0 = s3_of_f32(32'h4000_0000); ftz0 = 1; eob0 = 1; @(negedge clk);
    ftz0 = 0; eob0 = 0;
    check0(2.0, 1'b0, "ftz clears NaN");

    // DUT 1: products below 16 in magnitude, at most 12 of them: |sum| < 192, well inside the
    // signed range of the 18-bit accumulator (+-512), so no overflow may be flagged.
    for (int t = 0; t < 200; t++) begin
      real acc;
      int len;
      len = int'($urandom_range(1, 12));
      acc = 0.0;
      for (int k = 0; k < len; k++) begin
        logic [11:0] a, b;
        a = s3_small(1'($urandom), int'($urandom_range(0, 3)) - 2, 5'($urandom));
        b = s3_small(1'($urandom), int'($urandom_range(0, 2)) - 1, 5'($urandom));
        // Reference: exact product truncated (toward zero) to multiples of 2^-8.
        begin
          real p, q;
          p = small_real(a) * small_real(b);
          q = $floor((p < 0 ? -p : p) * 256.0) / 256.0;
          acc += (p < 0) ? -q : q;
        end
        x1 = a; y1 = b; ftz1 = (k == 0); eob1 = (k == len - 1);
        @(negedge clk);
      end
      ftz1 = 0; eob1 = 0;
      check1(acc, 1'b0, "small accumulator");
    end
    // too_small: 2^-6 * 2^-5 = 2^-11 is below LSB: contributes nothing.
    x1 = s3_small(0, -6, 5'd0); y1 = s3_small(0, -5, 5'd0); ftz1 = 1; @(negedge clk);
    x1 = s3_small(0, 0, 5'd0);  y1 = s3_small(0, 0, 5'd0); ftz1 = 0; @(negedge clk);
    check1(1.0, 1'b0, "too_small dropped");
    // too_big: 2^4 * 2^4 = 2^8 lies above MSB = 6: NaN.
    x1 = s3_small(0, 4, 5'd0); y1 = s3_small(0, 4, 5'd0); ftz1 = 1; @(negedge clk);
    ftz1 = 0; x1 = '0; y1 = '0;
    check1(0.0, 1'b1, "too_big raises NaN");
    x1 = s3_small(0, 1, 5'd0); y1 = s3_small(1, 0, 5'd0); ftz1 = 1; @(negedge clk);
    ftz1 = 0; x1 = '0; y1 = '0;
    check1(-2.0, 1'b0, "restart after too_big");
    // Overflow of the accumulation: 10 products of 1.5 * 2^3 * 1.5 * 2^2 = 72 give 720 > 511,
    // then the same with negative products; NaN must be raised and cleared by the next ftz.
    for (int sg = 0; sg < 2; sg++) begin
      for (int k = 0; k < 10; k++) begin
        x1 = s3_small(1'(sg), 3, 5'b10000); y1 = s3_small(0, 2, 5'b10000); ftz1 = (k == 0);
        @(negedge clk);
      end
      ftz1 = 0; x1 = '0; y1 = '0;
      check1(0.0, 1'b1, (sg != 0) ? "negative overflow raises NaN" : "positive overflow raises NaN");
    end
    // In range: 6 such products (432) and then 6 negative ones (back to 0) raise nothing.
    for (int k = 0; k < 12; k++) begin
      x1 = s3_small(1'(k >= 6), 3, 5'b10000); y1 = s3_small(0, 2, 5'b10000); ftz1 = (k == 0);
      @(negedge clk);
    end
    ftz1 = 0; x1 = '0; y1 = '0;
    check1(0.0, 1'b0, "large sum inside the range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
