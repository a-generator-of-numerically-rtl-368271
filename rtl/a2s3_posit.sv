// a2s3_posit: A2S3 unit for posit<N,ES> words.
//
// The word is decoded the usual way: zero stays zero; the pattern 100..0 (NaR, "not a real")
// sets the S3 NaN bit; otherwise the two's complement of negative words is taken, the regime
// run length L of identical bits after the sign gives k = L-1 (run of ones) or -L (run of
// zeros), the next ES bits (zeros where the word ends) give the exponent e, and the remaining
// bits are the fraction, left-aligned into WF = N-3-ES bits. The S3 scale is k*2^ES + e plus the
// bias (N-2)*2^ES, on WS = clog2(2*(N-2)*2^ES + 1) bits; the implicit bit is 1. These widths and
// biases match the posit examples of the S3 format (posit<8,0>: scale 4 bits, bias 6, fraction
// 5 bits; posit<16,2>: 7, 56, 11). Purely combinational.
module a2s3_posit
  import s3_pkg::*;
#(
  parameter int N  = 8,
  parameter int ES = 0,
  localparam int WS  = posit_ws(N, ES),
  localparam int WF  = posit_wf(N, ES),
  localparam int S3W = s3_width(WS, WF)
) (
  input  logic [N-1:0]   word,
  output logic [S3W-1:0] s3
);

  localparam int BIAS = posit_bias(N, ES);

  logic          sgn, r0;
  logic [N-1:0]  mag;
  logic [N-2:0]  body, tail;
  int            run, k, e, scale;
  logic [WF-1:0] frac;

  always_comb begin
    sgn  = word[N-1];
    mag  = sgn ? (~word + 1'b1) : word;
    body = mag[N-2:0];
    r0   = body[N-2];
    run  = N - 1;
    for (int b = 0; b < N - 1; b++)
      if (body[b] != r0) run = N - 2 - b;      // the highest differing bit ends the run
    k    = r0 ? run - 1 : -run;
    tail = (run + 1 >= N - 1) ? '0 : body << (run + 1);
    e    = (ES == 0) ? 0 : int'((ES+1)'(tail >> (N - 1 - ES)));
    frac = WF'(tail >> (N - 1 - ES - WF));
    scale = k * (1 << ES) + e + BIAS;
    if (word == '0)
      s3 = '0;
    else if (word == {1'b1, {(N-1){1'b0}}})
      s3 = {1'b1, 1'b0, WS'(0), 1'b0, WF'(0)};
    else
      s3 = {1'b0, sgn, WS'(scale), 1'b1, frac};
  end

endmodule
