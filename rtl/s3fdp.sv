// s3fdp: S3 fused dot product, the arithmetic kernel of every processing element.
//
// Each cycle it multiplies two S3 operands exactly, aligns the product to a fixed-point
// accumulator of WLA = OVF + MSB - LSB + 1 bits (bit 0 weighs 2^LSB) and adds it there, so no
// rounding happens between the products of a dot product. The three stages follow the
// reference datapath: (1) unsigned scale adder, unsigned significand multiplier and sign XOR;
// (2) a shift value generator producing the shift amount and the too_small / too_big flags, a
// barrel shifter with part select between the MSB and LSB weights, and one's complementing of
// negative products (the +1 enters as carry-in of the lowest chunk); (3) a carry-save adder of
// radix 2^K: the accumulator is cut into NCH chunks, each added by its own ripple-carry adder
// whose carry-out is registered and enters the next chunk one cycle later. The accumulator is
// therefore kept as (sum, carries); the L2A unit resolves it. This design's own choices: the
// chunk size K (a timing-driven choice in the reference flow, 64 here), truncation of product
// bits below LSB, and too_big only raised for a nonzero product.
//
// ftz (driven by SOB) replaces the fed-back accumulator and NaN flag by zero for the operand
// pair presented in the same cycle, so that pair starts a new dot product. The NaN flag is
// sticky: it is set by a NaN operand, by a product whose scale lies above MSB, or when the
// accumulation overflows the WLA-bit range. Overflow is detected as signed overflow of the
// addition in the top chunk (its sign bit is accumulator bit WLA-1). The check is exact except
// within about two top-chunk units (2^(K*(NCH-1)+LSB) each) of the range limit, where carries
// still on their way up can make it flag a sum just inside the range or miss one just outside.
// NaN on overflow follows the reference behaviour; the detection method is this design's own.
//
// Timing: operands, ftz and eob are sampled on a rising edge; the updated accumulator,
// nan_q and eob_q (eob delayed one cycle) are valid after that edge. One product per cycle.
module s3fdp
  import s3_pkg::*;
#(
  parameter int WS   = 8,     // S3 scale width
  parameter int WF   = 23,    // S3 fraction width
  parameter int BIAS = 127,   // S3 scale bias
  parameter int MSB  = 255,   // weight of the highest product bit kept
  parameter int LSB  = -298,  // weight of accumulator bit 0
  parameter int OVF  = 32,    // carry bits above MSB
  parameter int K    = 64,    // carry-save chunk size
  localparam int S3W  = s3_width(WS, WF),
  localparam int WLA  = acc_width(OVF, MSB, LSB),
  localparam int NCH  = acc_chunks(WLA, K),
  localparam int WLAP = NCH * K
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [S3W-1:0]    x,
  input  logic [S3W-1:0]    y,
  input  logic              ftz,
  input  logic              eob,
  output logic [WLAP-1:0]   acc_sum,
  output logic [NCH-2:0]    acc_carry,   // acc_carry[i] weighs 2^(K*(i+1)) relative to bit 0
  output logic              nan_q,
  output logic              eob_q
);

  localparam int PW  = 2 * WF + 2;           // product significand width
  localparam int WIN = MSB - LSB + 1;        // product window of the accumulator
  localparam int EXW = WIN + PW;             // window extended below LSB

  // Operand fields.
  logic          nan_x, nan_y, sgn_x, sgn_y;
  logic [WS-1:0] scl_x, scl_y;
  logic [WF:0]   sig_x, sig_y;
  assign {nan_x, sgn_x, scl_x, sig_x} = x;
  assign {nan_y, sgn_y, scl_y, sig_y} = y;

  // Stage 1: exact product.
  logic [WS:0]   scl_sum;
  logic [PW-1:0] prod;
  logic          sgn_p, nonzero;
  assign scl_sum = {1'b0, scl_x} + {1'b0, scl_y};
  assign prod    = sig_x * sig_y;
  assign sgn_p   = sgn_x ^ sgn_y;
  assign nonzero = (|sig_x) & (|sig_y);

  // Stage 2: shift value generation and alignment. sh is the left shift of the product into
  // the extended window whose bit PW has weight 2^LSB; the product's top bit then lands at
  // accumulator position sh - 1.
  int             sh;
  logic           too_small, too_big;
  logic [EXW-1:0] ext;
  logic [WLAP-1:0] addend;
  logic           cin0;

  always_comb begin
    sh        = int'(scl_sum) - 2 * BIAS - LSB + 2;
    too_small = (sh < 1);
    too_big   = nonzero && (sh - 1 > MSB - LSB);
    ext       = '0;
    if (!too_small && !too_big)
      ext = EXW'(prod) << sh;
    addend = WLAP'(ext[EXW-1:PW]);           // zero padding above MSB (OVF bits and chunk pad)
    cin0   = 1'b0;
    if (sgn_p && !too_small && !too_big) begin
      addend = ~addend;                        // one's complement, +1 as carry-in
      cin0   = 1'b1;
    end
  end

  // Stage 3: carry-save accumulation, radix 2^K.
  logic [WLAP-1:0] fb_sum;
  logic [NCH-1:0]  fb_cin;
  logic [WLAP-1:0] nx_sum;
  logic [NCH-2:0]  nx_carry;
  logic            ovf;

  // Bits of the top chunk that belong to the accumulator; bit WT-1 of it is the sign bit.
  localparam int WT = WLA - (NCH - 1) * K;

  always_comb begin
    ovf    = 1'b0;
    fb_sum = ftz ? '0 : acc_sum;
    fb_cin = {(ftz ? '0 : acc_carry), cin0};
    nx_carry = '0;
    for (int c = 0; c < NCH; c++) begin
      logic [K:0] s;
      s = {1'b0, fb_sum[c*K +: K]} + {1'b0, addend[c*K +: K]} + (K+1)'(fb_cin[c]);
      nx_sum[c*K +: K] = s[K-1:0];
      if (c < NCH - 1) nx_carry[c] = s[K];     // top chunk's carry-out wraps (modular sum)
      else begin
        // Signed overflow of the top chunk: both terms have the same sign, the result not.
        ovf = (fb_sum[c*K + WT-1] == addend[c*K + WT-1]) && (s[WT-1] != fb_sum[c*K + WT-1]);
      end
    end
  end

  always_ff @(posedge clk) begin
    acc_sum   <= nx_sum;
    acc_carry <= nx_carry;
    nan_q     <= (nan_q & ~ftz) | nan_x | nan_y | too_big | ovf;
    if (rst) eob_q <= 1'b0;
    else     eob_q <= eob;
  end

  initial begin
    assert (NCH >= 2) else $fatal(1, "s3fdp: accumulator must span at least two chunks");
  end

endmodule
