// a2s3_ieee: A2S3 unit for IEEE-754-style words (IEEE-754 binary16/32/64, Bfloat16) and for
// tapered floating point (TFP) words of the same layout.
//
// A word {sign, exponent[WE-1:0], fraction[WF-1:0]} becomes the S3 quintuple
// {nan, sign, scale, implicit, fraction} with scale width WE and the IEEE bias 2^(WE-1)-1, so
// normal numbers keep their exponent field as scale and get implicit bit 1. An all-ones exponent
// (infinity or NaN) sets the S3 NaN bit, infinity not being a real number. With SUBNORMALS = 1 an
// all-zero exponent gives scale 1 and implicit bit 0, which codes both subnormals and zero (zero
// has a zero significand). TFP has no subnormals (SUBNORMALS = 0): this design reads an all-zero
// exponent as zero there. Purely combinational.
module a2s3_ieee
  import s3_pkg::*;
#(
  parameter int WE         = 8,
  parameter int WF         = 23,
  parameter bit SUBNORMALS = 1'b1,
  localparam int N   = 1 + WE + WF,
  localparam int S3W = s3_width(WE, WF)
) (
  input  logic [N-1:0]   word,
  output logic [S3W-1:0] s3
);

  logic          sgn;
  logic [WE-1:0] ex;
  logic [WF-1:0] fr;
  assign {sgn, ex, fr} = word;

  always_comb begin
    if (&ex)                       // infinity or NaN
      s3 = {1'b1, sgn, ex, 1'b1, fr};
    else if (ex == '0 && SUBNORMALS)
      s3 = {1'b0, sgn, WE'(1), 1'b0, fr};
    else if (ex == '0)             // TFP zero
      s3 = {1'b0, sgn, WE'(0), 1'b0, WF'(0)};
    else
      s3 = {1'b0, sgn, ex, 1'b1, fr};
  end

endmodule
