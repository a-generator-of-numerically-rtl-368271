// gemm_sa: systolic array (SA) for batched GEMM blocks, C(ROWS x COLS) = A(ROWS x p) * B(p x COLS).
//
// Structure (left to right): one operand word per row of A and per column of B arrives each
// cycle; row i and column j are delayed by i and j registers so the operands meet in the right
// PE; an A2S3 unit per row and per column converts the input format to S3 quintuples; the SAK
// (ROWS x COLS output-stationary PEs) accumulates every dot product exactly in fixed point; the
// Half-Speed Sink Down (HSSD) chains carry finished sums to one L2A unit per column, which
// normalises and rounds them once to the output format; a last set of COLS-1-j registers per
// column re-aligns the columns. OUT_EXACT = 1 replaces the L2A units by a carry resolver and
// outputs the fixed-point accumulator itself.
//
// Stream protocol (this design's choice of framing around the document's SOB/EOB bits): a block
// is p >= ROWS consecutive cycles; in cycle k of the block, a_in[i] = A(i,k) and b_in[j] = B(k,j);
// sob is high in its first cycle and eob in its last (both in the same cycle when p = 1 and
// ROWS = 1). Blocks may follow each other without any gap: the array never stalls. If eob is
// high at cycle te, the block's result leaves as ROWS consecutive output cycles starting at
// te + ROWS + COLS + 2, with c_valid high on all columns; the first output cycle carries row
// ROWS-1 of C, the last row 0. c_word[j] is column j. An EOB with no SOB after it delivers the
// running sums as intermediate results and lets the accumulation continue. EOBs must be at
// least ROWS cycles apart; an assertion reports a violation in simulation.
//
// Default configuration: IEEE-754 binary32 operands and results on an 8 x 7 array with the exact
// (Kulisch-style) accumulator of 586 bits: LSB = -298 (the weight of the smallest product of two
// subnormals), MSB = 255 (the largest product) and OVF = 32 carry bits. Input and output formats
// may differ (IN_* / OUT_* parameters): IEEE-754-style formats (binary16/32/64, Bfloat16), TFP
// (no subnormals) and posit<N,ES> are available on either side.
module gemm_sa
  import s3_pkg::*;
#(
  parameter int   ROWS      = 8,
  parameter int   COLS      = 7,
  parameter fmt_e IN_FMT    = FMT_IEEE,   // FMT_IEEE, FMT_TFP or FMT_POSIT
  parameter int   IN_WE     = 8,          // IEEE/TFP exponent width
  parameter int   IN_WF     = 23,         // IEEE/TFP fraction width
  parameter int   IN_PN     = 8,          // posit width
  parameter int   IN_PES    = 0,          // posit exponent size
  parameter int   MSB       = 255,
  parameter int   LSB       = -298,
  parameter int   OVF       = 32,
  parameter int   K         = 64,
  parameter bit   OUT_EXACT = 1'b0,
  parameter fmt_e OUT_FMT   = FMT_IEEE,   // FMT_IEEE, FMT_TFP or FMT_POSIT
  parameter int   OUT_WE    = 8,
  parameter int   OUT_WF    = 23,
  parameter int   OUT_PN    = 8,
  parameter int   OUT_PES   = 0,
  localparam int  IN_W  = (IN_FMT == FMT_POSIT) ? IN_PN : 1 + IN_WE + IN_WF,
  localparam int  WLA   = acc_width(OVF, MSB, LSB),
  localparam int  OUT_W = OUT_EXACT ? WLA + 1 :
                          (OUT_FMT == FMT_POSIT) ? OUT_PN : 1 + OUT_WE + OUT_WF
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [ROWS-1:0][IN_W-1:0]  a_in,
  input  logic [COLS-1:0][IN_W-1:0]  b_in,
  input  logic                       sob,
  input  logic                       eob,
  output logic [COLS-1:0][OUT_W-1:0] c_word,   // exact mode: {nan, accumulator}
  output logic [COLS-1:0]            c_valid
);

  localparam bit IN_POSIT = (IN_FMT == FMT_POSIT);
  localparam int WS   = IN_POSIT ? posit_ws(IN_PN, IN_PES)   : IN_WE;
  localparam int WF   = IN_POSIT ? posit_wf(IN_PN, IN_PES)   : IN_WF;
  localparam int BIAS = IN_POSIT ? posit_bias(IN_PN, IN_PES) : ieee_bias(IN_WE);
  localparam int S3W  = s3_width(WS, WF);
  localparam int HW   = hssd_width(WLA, K);
  localparam int NCH  = acc_chunks(WLA, K);

  logic [ROWS-1:0][S3W-1:0] a_s3;
  logic [COLS-1:0][S3W-1:0] b_s3;
  logic [COLS-1:0][HW-1:0]  c_bundle;

  // Input skew and format conversion.
  for (genvar i = 0; i < ROWS; i++) begin : g_a
    logic [IN_W-1:0] a_dly;
    skew_delay #(.W(IN_W), .DEPTH(i)) u_skew (.clk(clk), .d(a_in[i]), .q(a_dly));
    if (IN_POSIT) begin : g_posit
      a2s3_posit #(.N(IN_PN), .ES(IN_PES)) u_a2s3 (.word(a_dly), .s3(a_s3[i]));
    end else begin : g_ieee
      a2s3_ieee #(.WE(IN_WE), .WF(IN_WF), .SUBNORMALS(IN_FMT == FMT_IEEE)) u_a2s3 (
        .word(a_dly), .s3(a_s3[i]));
    end
  end

  for (genvar j = 0; j < COLS; j++) begin : g_b
    logic [IN_W-1:0] b_dly;
    skew_delay #(.W(IN_W), .DEPTH(j)) u_skew (.clk(clk), .d(b_in[j]), .q(b_dly));
    if (IN_POSIT) begin : g_posit
      a2s3_posit #(.N(IN_PN), .ES(IN_PES)) u_a2s3 (.word(b_dly), .s3(b_s3[j]));
    end else begin : g_ieee
      a2s3_ieee #(.WE(IN_WE), .WF(IN_WF), .SUBNORMALS(IN_FMT == FMT_IEEE)) u_a2s3 (
        .word(b_dly), .s3(b_s3[j]));
    end
  end

  sak #(
    .ROWS(ROWS), .COLS(COLS), .WS(WS), .WF(WF), .BIAS(BIAS),
    .MSB(MSB), .LSB(LSB), .OVF(OVF), .K(K)
  ) u_sak (
    .clk  (clk),
    .rst  (rst),
    .a_s3 (a_s3),
    .b_s3 (b_s3),
    .sob  (sob),
    .eob  (eob),
    .c_out(c_bundle)
  );

  // Output conversion and column re-alignment.
  for (genvar j = 0; j < COLS; j++) begin : g_c
    logic [OUT_W-1:0] w;
    logic             v;
    if (OUT_EXACT) begin : g_exact
      logic             e_valid, e_nan;
      logic [NCH-2:0]   e_carry;
      logic [NCH*K-1:0] e_sum;
      logic [WLA-1:0]   e_value;
      assign {e_valid, e_nan, e_carry, e_sum} = c_bundle[j];
      cs_resolve #(.WLA(WLA), .K(K)) u_res (.sum(e_sum), .carry(e_carry), .value(e_value));
      always_ff @(posedge clk) begin
        w <= {e_nan, e_value};
        if (rst) v <= 1'b0;
        else     v <= e_valid;
      end
    end else if (OUT_FMT == FMT_POSIT) begin : g_l2a_posit
      l2a_posit #(
        .MSB(MSB), .LSB(LSB), .OVF(OVF), .K(K), .N(OUT_PN), .ES(OUT_PES)
      ) u_l2a (
        .clk    (clk),
        .rst    (rst),
        .bundle (c_bundle[j]),
        .word_q (w),
        .valid_q(v)
      );
    end else begin : g_l2a
      l2a_ieee #(
        .MSB(MSB), .LSB(LSB), .OVF(OVF), .K(K), .OWE(OUT_WE), .OWF(OUT_WF),
        .SUBNORMALS(OUT_FMT == FMT_IEEE)
      ) u_l2a (
        .clk    (clk),
        .rst    (rst),
        .bundle (c_bundle[j]),
        .word_q (w),
        .valid_q(v)
      );
    end
    skew_delay #(.W(OUT_W), .DEPTH(COLS - 1 - j)) u_wdly (.clk(clk), .d(w), .q(c_word[j]));
    // The valid bit is delayed with its own reset registers.
    if (COLS - 1 - j == 0) begin : g_v0
      assign c_valid[j] = v;
    end else begin : g_vd
      logic [COLS-2-j:0] vsr;
      always_ff @(posedge clk) begin
        if (rst) vsr <= '0;
        else     vsr <= (COLS-1-j)'({vsr, v});
      end
      assign c_valid[j] = vsr[COLS-2-j];
    end
  end

  // Protocol check: two EOBs must be at least ROWS cycles apart, or the sums of the later block
  // would catch up with those of the earlier one in the HSSD chains.
  int unsigned since_eob;
  always_ff @(posedge clk) begin
    if (rst) since_eob <= ROWS;
    else if (eob) begin
      assert (since_eob >= ROWS)
        else $error("gemm_sa: EOB only %0d cycles after the previous one (ROWS = %0d)",
                    since_eob, ROWS);
      since_eob <= 1;
    end else if (since_eob < ROWS) since_eob <= since_eob + 1;
  end

endmodule
