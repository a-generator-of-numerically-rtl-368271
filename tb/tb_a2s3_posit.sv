// tb_a2s3_posit: exhaustive check of the posit A2S3 unit for posit<4,0>, posit<8,0>,
// posit<8,2>, posit<16,1> and posit<16,2>, and random patterns of posit<32,2> and posit<64,3>. Every pattern is decoded by a bit-walking
// reference; the S3 value (-1)^sign * 1.fraction * 2^(scale - bias - WF) must equal it, zero
// must give a zero significand and NaR must set the NaN bit. The S3 field widths follow
// WS = clog2(2 * bias + 1), bias = (N - 2) * 2^es and WF = N - 3 - es; posit<8,0> (scale on
// 4 bits, bias 6, fraction on 5 bits) and posit<16,2> (7, 56, 11) are published examples, and
// the encoding of 1.0 in posit<8,0> is checked against its published S3 quintuple.
module tb_a2s3_posit;
  import tb_fp_pkg::*;
  `include "tb_posit_ref.svh"

  int checks = 0, failures = 0;

  logic [7:0]  p80, p82;
  logic [15:0] p161, p162;
  logic [3:0]  p40;
  logic [31:0] p322;
  logic [63:0] p643;
  logic [11:0] s80;      // WS 4, WF 5
  logic [11:0] s82;      // WS 6, WF 3  (bias 24)
  logic [20:0] s161;     // WS 6, WF 12 (bias 28)
  logic [20:0] s162;     // WS 7, WF 11 (bias 56)
  logic [6:0]  s40;      // WS 3, WF 1  (bias 2)
  logic [37:0] s322;     // WS 8, WF 27 (bias 120)
  logic [70:0] s643;     // WS 10, WF 58 (bias 496)

  a2s3_posit #(.N(8), .ES(0))  d80  (.word(p80),  .s3(s80));
  a2s3_posit #(.N(8), .ES(2))  d82  (.word(p82),  .s3(s82));
  a2s3_posit #(.N(16), .ES(1)) d161 (.word(p161), .s3(s161));
  a2s3_posit #(.N(16), .ES(2)) d162 (.word(p162), .s3(s162));
  a2s3_posit #(.N(4), .ES(0))  d40  (.word(p40),  .s3(s40));
  a2s3_posit #(.N(32), .ES(2)) d322 (.word(p322), .s3(s322));
  a2s3_posit #(.N(64), .ES(3)) d643 (.word(p643), .s3(s643));

  function automatic real s3v(input logic [127:0] s3, input int ws, input int wf, input int bias);
    int scale;
    real r;
    scale = int'((s3 >> (wf + 1)) & ((128'd1 << ws) - 1));
    r = real'(s3 & ((128'd1 << (wf + 1)) - 1)) * pow2(scale - bias - wf);
    return s3[ws + wf + 1] ? -r : r;
  endfunction

  task automatic check(input logic [63:0] p, input logic [127:0] s3, input int n, input int es,
                       input int ws, input int wf);
    int bias;
    bit ok;
    bias = (n - 2) << es;
    if (p == 0) ok = (s3[ws + wf + 2] == 0) && ((s3 & ((128'd1 << (wf + 1)) - 1)) == 0);
    else if (p == (64'd1 << (n - 1))) ok = s3[ws + wf + 2];
    else ok = !s3[ws + wf + 2] && s3v(s3, ws, wf, bias) == posit_value(p, n, es);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL posit<%0d,%0d> %h -> s3 %h", n, es, p, s3);
    end
  endtask

  initial begin
    p80 = 8'h40; #1;        // 1.0 -> (0, 0, 0110, 1, 00000)
    checks++;
    if (s80 != {1'b0, 1'b0, 4'b0110, 1'b1, 5'b00000}) begin
      failures++; $display("FAIL posit<8,0> 1.0 gives %b", s80);
    end
    for (int v = 0; v < 256; v++) begin
      p80 = 8'(v); p82 = 8'(v); #1;
      check(64'(p80), 128'(s80), 8, 0, 4, 5);
      check(64'(p82), 128'(s82), 8, 2, 6, 3);
    end
    for (int v = 0; v < 65536; v++) begin
      p161 = 16'(v); p162 = 16'(v); #1;
      check(64'(p161), 128'(s161), 16, 1, 6, 12);
      check(64'(p162), 128'(s162), 16, 2, 7, 11);
    end
    for (int v = 0; v < 16; v++) begin
      p40 = 4'(v); #1;
      check(64'(p40), 128'(s40), 4, 0, 3, 1);
    end
    // Wide posits: random patterns (all regime lengths), zero and NaR. For posit<64,3> the low
    // 12 bits are cleared so that every value has at most 50 fraction bits, exact in a double.
    for (int t = 0; t < 20000; t++) begin
      int r;
      r = int'($urandom_range(0, 40));
      p322 = $urandom >> (r % 32);
      p643 = {$urandom, $urandom} >> r;
      p643[11:0] = '0;
      if ($urandom_range(0, 1)) p322 = -p322;
      if ($urandom_range(0, 1)) p643 = -p643;
      if (t == 0) begin p322 = '0; p643 = '0; end
      if (t == 1) begin p322 = 32'h8000_0000; p643 = 64'h8000_0000_0000_0000; end
      #1;
      check(64'(p322), 128'(s322), 32, 2, 8, 27);
      check(p643, 128'(s643), 64, 3, 10, 58);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
