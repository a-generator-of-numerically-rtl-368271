// l2a_ieee: L2A normalising and rounding unit for IEEE-754-style output words (and TFP words
// when SUBNORMALS = 0). One sits below each column of the array.
//
// It receives an HSSD bundle {valid, nan, carries, sum} holding a carry-save fixed-point
// accumulator (WLA bits, bit 0 of weight 2^LSB) and produces a word {sign, exponent[OWE-1:0],
// fraction[OWF-1:0]} with bias 2^(OWE-1)-1. Steps: resolve the carries; take sign and magnitude;
// count leading zeros to find the scale; shift the magnitude so its leading one is at the top,
// keeping a guard bit and a sticky bit; build the exponent; round to nearest, ties to even; and
// handle exceptions: a NaN accumulator gives the quiet NaN {0, all ones, 10..0}, an exponent
// beyond the largest finite one gives infinity, and results below the normal range become
// subnormals (SUBNORMALS = 1) or signed zero (SUBNORMALS = 0). An exact zero gives +0. The
// output format may differ from the array's input format. The rounding mode, working on
// sign-magnitude rather than counting leading zeros/ones of the two's complement value, and the
// TFP underflow rule are this design's choices.
//
// Timing: one register stage; word_q/valid_q follow the bundle by one cycle.
module l2a_ieee
  import s3_pkg::*;
#(
  parameter int MSB        = 255,
  parameter int LSB        = -298,
  parameter int OVF        = 32,
  parameter int K          = 64,
  parameter int OWE        = 8,
  parameter int OWF        = 23,
  parameter bit SUBNORMALS = 1'b1,
  localparam int WLA = acc_width(OVF, MSB, LSB),
  localparam int NCH = acc_chunks(WLA, K),
  localparam int HW  = hssd_width(WLA, K),
  localparam int ON  = 1 + OWE + OWF
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [HW-1:0] bundle,
  output logic [ON-1:0] word_q,
  output logic          valid_q
);

  localparam int OBIAS = ieee_bias(OWE);
  localparam int EMAXF = (1 << OWE) - 2;      // largest finite biased exponent

  logic             b_valid, b_nan;
  logic [NCH-2:0]   b_carry;
  logic [NCH*K-1:0] b_sum;
  assign {b_valid, b_nan, b_carry, b_sum} = bundle;

  logic [WLA-1:0] value;
  cs_resolve #(.WLA(WLA), .K(K)) u_res (.sum(b_sum), .carry(b_carry), .value(value));

  logic           sgn, sticky_d, g, s, inc;
  logic [WLA-1:0] mag, norm, shifted;
  logic [OWF:0]   mant;
  logic [OWF+1:0] mr;
  int             lz, be, d, eo;
  logic [ON-1:0]  word;

  always_comb begin
    sgn  = value[WLA-1];
    mag  = sgn ? (~value + 1'b1) : value;
    lz   = WLA;
    for (int b = 0; b < WLA; b++)
      if (mag[b]) lz = WLA - 1 - b;
    norm = mag << lz;
    be   = (WLA - 1 - lz) + LSB + OBIAS;        // biased exponent of the leading one
    // Denormalising shift for results below the normal range.
    d        = (be < 1) ? 1 - be : 0;
    if (d > WLA) d = WLA;
    shifted  = norm >> d;
    sticky_d = |(norm & ~({WLA{1'b1}} << d));
    mant     = shifted[WLA-1 -: OWF+1];
    g        = shifted[WLA-OWF-2];
    s        = (|shifted[WLA-OWF-3:0]) | sticky_d;
    inc      = g & (s | mant[0]);
    mr       = {1'b0, mant} + (OWF+2)'(inc);
    word     = '0;
    eo       = 0;
    if (b_nan) begin
      word = {1'b0, {OWE{1'b1}}, 1'b1, {(OWF-1){1'b0}}};
    end else if (lz == WLA) begin
      word = '0;
    end else if (be < 1) begin
      if (SUBNORMALS)                          // rounding may carry into the smallest normal
        word = {sgn, (OWE)'(mr[OWF]), mr[OWF-1:0]};
      else
        word = {sgn, {(OWE+OWF){1'b0}}};
    end else begin
      eo = be + int'(mr[OWF+1]);
      if (eo > EMAXF)
        word = {sgn, {OWE{1'b1}}, {OWF{1'b0}}};
      else if (mr[OWF+1])
        word = {sgn, OWE'(eo), {OWF{1'b0}}};
      else
        word = {sgn, OWE'(eo), mr[OWF-1:0]};
    end
  end

  always_ff @(posedge clk) begin
    word_q <= word;
    if (rst) valid_q <= 1'b0;
    else     valid_q <= b_valid;
  end

  initial begin
    assert (WLA >= OWF + 3) else $fatal(1, "l2a_ieee: accumulator narrower than the output significand");
  end

endmodule
