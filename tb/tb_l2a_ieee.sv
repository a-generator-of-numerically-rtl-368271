// tb_l2a_ieee: checks the L2A normalising/rounding unit on the default 586-bit accumulator
// (LSB = -298) for three output formats: binary32 with subnormals, binary16 with subnormals
// (an output format narrower than the input one) and a 16-bit TFP without subnormals. Each cycle
// it presents a random value +-m * 2^(s + LSB), m up to 53 bits, split randomly into sum and
// pending carries, and compares the registered output with the value rounded to nearest-even by
// the double-based reference: normal, subnormal, underflowing and overflowing results all occur.
// It also checks NaN bundles, zero and the one-cycle valid delay.
module tb_l2a_ieee;
  import tb_fp_pkg::*;

  localparam int WLA = 586, NCH = 10, K = 64, HW = 2 + NCH - 1 + NCH * K;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_sub = 0, n_inf = 0, n_norm = 0, n_zero = 0;

  logic [HW-1:0] bundle;
  logic [31:0] w32; logic v32;
  logic [15:0] w16; logic v16;
  logic [15:0] wtf; logic vtf;

  l2a_ieee dut32 (.clk(clk), .rst(rst), .bundle(bundle), .word_q(w32), .valid_q(v32));
  l2a_ieee #(.OWE(5), .OWF(10)) dut16 (.clk(clk), .rst(rst), .bundle(bundle), .word_q(w16),
                                       .valid_q(v16));
  l2a_ieee #(.OWE(5), .OWF(10), .SUBNORMALS(1'b0)) duttfp (.clk(clk), .rst(rst), .bundle(bundle),
                                                          .word_q(wtf), .valid_q(vtf));

  // Build a bundle holding v (two's complement over NCH*K bits) with random pending carries.
  function automatic logic [HW-1:0] make_bundle(input bit valid, input bit nan,
                                                input logic [NCH*K-1:0] v);
    logic [NCH-2:0]   c;
    logic [NCH*K-1:0] s;
    c = (NCH - 1)'($urandom);
    s = v;
    for (int i = 0; i < NCH - 1; i++) if (c[i]) s = s - ((NCH*K)'(1) << (K * (i + 1)));
    return {valid, nan, c, s};
  endfunction

  initial begin
    bundle = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4000; t++) begin
      logic [63:0] m;
      logic [NCH*K-1:0] v;
      int s, mb;
      bit neg, nan, valid;
      real r;
      logic [31:0] e32; logic [15:0] e16, etf;
      mb  = int'($urandom_range(1, 53));
      m   = {$urandom, $urandom} & ((64'd1 << mb) - 1);
      if (t % 2 == 0) s = int'($urandom_range(0, WLA - 1 - 32 - mb));
      else            s = int'($urandom_range(250, 320));
      neg = 1'($urandom);
      nan = (t % 50 == 7);
      valid = 1'($urandom);
      if (t % 97 == 3) m = 0;
      v = (NCH*K)'(m) << s;
      if (neg) v = -v;
      r = real'(m) * pow2(s - 298);
      if (neg) r = -r;
      e32 = 32'(real_to_fp(r, 8, 23, 1'b1));
      e16 = 16'(real_to_fp(r, 5, 10, 1'b1));
      etf = 16'(real_to_fp(r, 5, 10, 1'b0));
      if (m == 0) begin e32 = 0; e16 = 0; etf = 0; end
      if (nan) begin e32 = 32'h7FC0_0000; e16 = 16'h7E00; etf = 16'h7E00; end
      bundle = make_bundle(valid, nan, v);
      @(negedge clk);
      checks++;
      if (w32 != e32 || w16 != e16 || wtf != etf || v32 != valid || v16 != valid || vtf != valid) begin
        failures++;
        $display("FAIL value %e nan %b: got %h %h %h, expected %h %h %h", r, nan, w32, w16, wtf,
                 e32, e16, etf);
      end
      if (!nan && m != 0) begin
        if (e32[30:23] == 0) n_sub++;
        else if (e32[30:23] == 8'hFF) n_inf++;
        else n_norm++;
      end
      if (m == 0) n_zero++;
    end
    $display("  binary32 results: %0d normal, %0d subnormal or zero, %0d infinite, %0d exact zero",
             n_norm, n_sub, n_inf, n_zero);
    checks++;
    if (n_sub == 0 || n_inf == 0 || n_norm == 0 || n_zero == 0) begin
      failures++; $display("FAIL a result class never occurred");
    end
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
