// sak: systolic array kernel, a ROWS x COLS grid of output-stationary PEs.
//
// Row i's S3 operands (matrix A) enter PE(i,0) and travel right; column j's S3 operands
// (matrix B) enter PE(0,j) and travel down; every link is between neighbours, so there are no
// global lines other than clock and reset. The SOB/EOB control pair enters PE(0,0) together with
// the first column's and first row's operands; it travels down every column and, along row 0,
// from each PE to its right neighbour (this design's way of reaching the other columns), so that
// PE(i,j) sees the control of a k-th operand pair in the same cycle as that pair. The HSSD
// chain of every column starts with an empty bundle above row 0 and leaves below row ROWS-1.
//
// Timing: if operand k reaches PE(i,0) / PE(0,j) at cycle t + k + i / t + k + j (skewed inputs),
// PE(i,j) multiplies A(i,k) * B(k,j) at cycle t + k + i + j. If a block's EOB enters PE(0,0)
// at cycle te, the sum of PE(i,j) is on c_out[j] at cycle te + 2*ROWS + j + 1 - i: each column
// delivers its ROWS sums in consecutive cycles, row ROWS-1 first.
module sak
  import s3_pkg::*;
#(
  parameter int ROWS = 8,
  parameter int COLS = 7,
  parameter int WS   = 8,
  parameter int WF   = 23,
  parameter int BIAS = 127,
  parameter int MSB  = 255,
  parameter int LSB  = -298,
  parameter int OVF  = 32,
  parameter int K    = 64,
  localparam int S3W  = s3_width(WS, WF),
  localparam int HW   = hssd_width(acc_width(OVF, MSB, LSB), K)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [ROWS-1:0][S3W-1:0]  a_s3,    // row operands, already skewed
  input  logic [COLS-1:0][S3W-1:0]  b_s3,    // column operands, already skewed
  input  logic                      sob,
  input  logic                      eob,
  output logic [COLS-1:0][HW-1:0]   c_out    // HSSD bundles leaving the bottom row
);

  // Horizontal (A) links: ah[i][j] enters PE(i,j). Vertical links: bv[i][j] enters PE(i,j).
  logic [ROWS-1:0][COLS:0][S3W-1:0] ah;
  logic [ROWS:0][COLS-1:0][S3W-1:0] bv;
  logic [ROWS:0][COLS-1:0]          sv, ev;
  logic [ROWS:0][COLS-1:0][HW-1:0]  cv;

  for (genvar i = 0; i < ROWS; i++) begin : g_row_in
    assign ah[i][0] = a_s3[i];
  end

  for (genvar j = 0; j < COLS; j++) begin : g_col_in
    assign bv[0][j] = b_s3[j];
    assign cv[0][j] = '0;
    if (j == 0) begin : g_ctl0
      assign sv[0][j] = sob;
      assign ev[0][j] = eob;
    end else begin : g_ctlj
      // Control of PE(0,j) comes from PE(0,j-1)'s registered control.
      assign sv[0][j] = sv[1][j-1];
      assign ev[0][j] = ev[1][j-1];
    end
    assign c_out[j] = cv[ROWS][j];
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_r
    for (genvar j = 0; j < COLS; j++) begin : g_c
      pe #(
        .WS(WS), .WF(WF), .BIAS(BIAS), .MSB(MSB), .LSB(LSB), .OVF(OVF), .K(K)
      ) u_pe (
        .clk    (clk),
        .rst    (rst),
        .a_in   (ah[i][j]),
        .b_in   (bv[i][j]),
        .sob_in (sv[i][j]),
        .eob_in (ev[i][j]),
        .c_in   (cv[i][j]),
        .a_out  (ah[i][j+1]),
        .b_out  (bv[i+1][j]),
        .sob_out(sv[i+1][j]),
        .eob_out(ev[i+1][j]),
        .c_out  (cv[i+1][j])
      );
    end
  end

endmodule
