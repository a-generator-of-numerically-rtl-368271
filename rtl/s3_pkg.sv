// s3_pkg: shared types and constant functions of the batched-GEMM systolic array.
//
// The array works internally on S3 (Sign Scale Significand) quintuples, packed MSB first as
// {nan, sign, scale[WS-1:0], implicit, fraction[WF-1:0]} (WS + WF + 3 bits). The functions
// below derive the S3 field widths and biases of the supported input/output formats and the
// geometry of the carry-save fixed-point accumulator. The accumulator holds
// WLA = OVF + MSB - LSB + 1 bits, bit 0 having weight 2^LSB; it is split into chunks of K bits
// that are added by separate ripple-carry adders whose carries are kept in registers.
package s3_pkg;

  // Number formats with an A2S3/L2A pair. IEEE covers IEEE-754 and Bfloat16 (with
  // subnormals); TFP is the same layout without subnormals; POSIT is posit<N,es>.
  typedef enum logic [1:0] {FMT_IEEE = 2'd0, FMT_TFP = 2'd1, FMT_POSIT = 2'd2} fmt_e;

  // Width of an S3 bus.
  function automatic int s3_width(input int ws, input int wf);
    return ws + wf + 3;
  endfunction

  // Bias of an IEEE-754 / TFP exponent (and of its S3 scale): 2^(we-1) - 1.
  function automatic int ieee_bias(input int we);
    return (1 << (we - 1)) - 1;
  endfunction

  // Posit<n,es>: the scale spans [-(n-2)*2^es, (n-2)*2^es]; it is biased by (n-2)*2^es.
  function automatic int posit_bias(input int n, input int es);
    return (n - 2) << es;
  endfunction

  function automatic int posit_ws(input int n, input int es);
    return $clog2(2 * posit_bias(n, es) + 1);
  endfunction

  // Largest number of fraction bits a posit<n,es> can carry (regime of 2 bits).
  function automatic int posit_wf(input int n, input int es);
    return n - 3 - es;
  endfunction

  // Accumulator width, and its number of K-bit chunks.
  function automatic int acc_width(input int ovf, input int msb, input int lsb);
    return ovf + msb - lsb + 1;
  endfunction

  function automatic int acc_chunks(input int wla, input int k);
    return (wla + k - 1) / k;
  endfunction

  // Width of the bundle an HSSD chain carries:
  // {valid, nan, carries[NCH-2:0], sum[NCH*K-1:0]}.
  function automatic int hssd_width(input int wla, input int k);
    return 2 + (acc_chunks(wla, k) - 1) + acc_chunks(wla, k) * k;
  endfunction

endpackage
