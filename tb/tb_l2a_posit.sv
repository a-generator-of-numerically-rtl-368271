// tb_l2a_posit: checks the posit L2A unit on the default 586-bit accumulator (LSB = -298) for
// posit<4,0>, posit<8,0>, posit<8,2> and posit<16,1> outputs. Each cycle it presents a random
// value +-m * 2^(s + LSB) (m up to 24 bits, scales around and beyond each format's range) split into
// sum and pending carries, and compares the registered outputs with a reference that builds
// the long posit encoding of the value bit by bit with reals and rounds it to nearest, ties to
// even, with saturation at maxpos/minpos. NaN bundles must give NaR and zero must give 0.
module tb_l2a_posit;
  import tb_fp_pkg::*;
  `include "tb_posit_ref.svh"

  localparam int WLA = 586, NCH = 10, K = 64, HW = 2 + NCH - 1 + NCH * K;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_sat = 0;

  logic [HW-1:0] bundle;
  logic [7:0] w80, w82; logic [15:0] w161; logic [3:0] w40;
  logic v80, v82, v161, v40;

  l2a_posit #(.N(8), .ES(0)) d80 (.clk(clk), .rst(rst), .bundle(bundle), .word_q(w80), .valid_q(v80));
  l2a_posit #(.N(8), .ES(2)) d82 (.clk(clk), .rst(rst), .bundle(bundle), .word_q(w82), .valid_q(v82));
  l2a_posit #(.N(4), .ES(0)) d40 (.clk(clk), .rst(rst), .bundle(bundle), .word_q(w40), .valid_q(v40));
  l2a_posit #(.N(16), .ES(1)) d161 (.clk(clk), .rst(rst), .bundle(bundle), .word_q(w161),
                                    .valid_q(v161));

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
    for (int t = 0; t < 3000; t++) begin
      logic [63:0] m;
      logic [NCH*K-1:0] v;
      int s, mb;
      bit neg, nan, valid;
      real r;
      logic [7:0] e80, e82; logic [15:0] e161; logic [3:0] e40;
      mb  = int'($urandom_range(1, 24));
      m   = 64'($urandom) & ((64'd1 << mb) - 1);
      if (m == 0) m = 1;
      s   = 298 + int'($urandom_range(0, 64)) - 32 - mb + 1;
      if (t % 3 == 0) s = 298 + int'($urandom_range(0, 16)) - 8 - mb + 1;
      if (t % 3 == 1) s = 298 + int'($urandom_range(0, 6)) - 3 - mb + 1;
      neg = 1'($urandom);
      nan = (t % 40 == 5);
      valid = 1'($urandom);
      if (t % 61 == 9) m = 0;
      v = (NCH*K)'(m) << s;
      if (neg) v = -v;
      r = real'(m) * pow2(s - 298);
      if (neg) r = -r;
      if (m == 0) begin e80 = 0; e82 = 0; e161 = 0; e40 = 0; end
      else begin
        e80  = 8'(posit_round(r, 8, 0));
        e82  = 8'(posit_round(r, 8, 2));
        e161 = 16'(posit_round(r, 16, 1));
        e40  = 4'(posit_round(r, 4, 0));
      end
      if (nan) begin e80 = 8'h80; e82 = 8'h80; e161 = 16'h8000; e40 = 4'h8; end
      if (!nan && m != 0 && (e80 == 8'h7F || e80 == 8'h81 || e80 == 8'h01 || e80 == 8'hFF)) n_sat++;
      bundle = make_bundle(valid, nan, v);
      @(negedge clk);
      checks++;
      if (w80 != e80 || w82 != e82 || w161 != e161 || w40 != e40 ||
          v80 != valid || v82 != valid || v161 != valid || v40 != valid) begin
        failures++;
        $display("FAIL value %e nan %b: got %h %h %h %h, expected %h %h %h %h", r, nan, w80, w82,
                 w161, w40, e80, e82, e161, e40);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no result at maxpos/minpos"); end
    $display("  posit<8,0> results at maxpos/minpos: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
