// l2a_posit: L2A normalising and rounding unit producing posit<N,ES> words.
//
// It receives an HSSD bundle {valid, nan, carries, sum} holding a carry-save fixed-point
// accumulator (WLA bits, bit 0 of weight 2^LSB). After resolving the carries it takes sign and
// magnitude, counts leading zeros to get the scale sc of the leading one, splits sc into regime
// k = floor(sc / 2^ES) and exponent e, and assembles regime bits (k+1 ones and a zero, or -k
// zeros and a one), the ES exponent bits and the fraction bits below the leading one in one
// long vector. Its top N-1 bits are rounded to nearest, ties to even, using the next bit and the
// OR of the rest, and the sign is applied by two's complement. As posit arithmetic requires, a
// nonzero result never rounds to zero or NaR: scales beyond the representable range saturate to
// maxpos / minpos. A NaN accumulator gives NaR (100..0); zero gives 0. The rounding rule is this
// design's choice (the document names none).
//
// Timing: one register stage; word_q/valid_q follow the bundle by one cycle.
module l2a_posit
  import s3_pkg::*;
#(
  parameter int MSB = 255,
  parameter int LSB = -298,
  parameter int OVF = 32,
  parameter int K   = 64,
  parameter int N   = 8,
  parameter int ES  = 0,
  localparam int WLA = acc_width(OVF, MSB, LSB),
  localparam int NCH = acc_chunks(WLA, K),
  localparam int HW  = hssd_width(WLA, K)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [HW-1:0] bundle,
  output logic [N-1:0]  word_q,
  output logic          valid_q
);

  localparam int SMAX = (N - 2) << ES;        // largest scale (maxpos = 2^SMAX)
  localparam int RW   = N + 1;                // regime field, left-aligned
  localparam int BW   = RW + ES + WLA;        // regime, exponent, fraction

  logic             b_valid, b_nan;
  logic [NCH-2:0]   b_carry;
  logic [NCH*K-1:0] b_sum;
  assign {b_valid, b_nan, b_carry, b_sum} = bundle;

  logic [WLA-1:0] value;
  cs_resolve #(.WLA(WLA), .K(K)) u_res (.sum(b_sum), .carry(b_carry), .value(value));

  logic           sgn, g, st, inc;
  logic [WLA-1:0] mag, norm;
  logic [RW-1:0]  regime;
  logic [BW-1:0]  bits;
  logic [BW:0]    tmp;
  logic [N-2:0]   top, rounded;
  logic [N-1:0]   word;
  int             lz, sc, k, e, rlen;

  always_comb begin
    sgn  = value[WLA-1];
    mag  = sgn ? (~value + 1'b1) : value;
    lz   = WLA;
    for (int b = 0; b < WLA; b++)
      if (mag[b]) lz = WLA - 1 - b;
    norm = mag << lz;
    sc   = (WLA - 1 - lz) + LSB;
    if (sc > SMAX)  sc = SMAX;
    if (sc < -SMAX) sc = -SMAX;
    k    = sc >>> ES;                          // floor division by 2^ES
    e    = sc - k * (1 << ES);
    if (k >= 0) begin
      rlen   = k + 2;
      regime = ({RW{1'b1}} >> (RW - k - 1)) << 1;
    end else begin
      rlen   = 1 - k;
      regime = RW'(1);
    end
    // The exponent field is built one bit wider (so that ES = 0 works) and its always-zero top
    // bit is dropped again.
    tmp    = {regime, (ES+1)'(e), norm << 1};
    // The regime is right-aligned in its RW-bit field: shifting the whole vector left by the
    // unused part of that field puts exponent and fraction right after the regime.
    bits   = {tmp[BW -: RW], tmp[BW-RW-1:0]} << (RW - rlen);
    top    = bits[BW-1 -: N-1];
    g      = bits[BW-N];
    st     = |bits[BW-N-1:0];
    inc    = g & (st | top[0]);
    rounded = top + (N-1)'(inc);
    if (rounded == '0) rounded = top;          // never wraps past maxpos
    // Saturated scales: the rounding above could only move away from maxpos/minpos.
    if ((WLA - 1 - lz) + LSB > SMAX)  rounded = {(N-1){1'b1}};
    if ((WLA - 1 - lz) + LSB < -SMAX) rounded = (N-1)'(1);
    word = {1'b0, rounded};
    if (sgn) word = ~word + 1'b1;
    if (b_nan)          word = {1'b1, {(N-1){1'b0}}};
    else if (lz == WLA) word = '0;
  end

  always_ff @(posedge clk) begin
    word_q <= word;
    if (rst) valid_q <= 1'b0;
    else     valid_q <= b_valid;
  end

endmodule
