// pe: processing element of the output-stationary systolic array.
//
// A PE does four things each cycle: it registers the S3 operand arriving from the left (a_in)
// and passes it right (a_out), registers the S3 operand arriving from the top (b_in) and passes
// it down (b_out); it registers the SOB/EOB control bits arriving from the top and passes them
// down; its S3FDP accumulates a_in * b_in without rounding (SOB restarts the sum); and it takes
// part in the Half-Speed Sink Down (HSSD) chain that moves finished sums down the column.
//
// HSSD: a 2:1 multiplexer selects the PE's own accumulator in the cycle after EOB (when the
// S3FDP's eob_q is high) and otherwise the bundle coming from the PE above (c_in). The result
// goes through two registers, C1 and C2, before leaving at the bottom (c_out). Finished sums
// therefore descend at one PE per two cycles. Because the PE below finishes one cycle later
// than this one, the two registers give each sum a free slot, so a column's sums never collide
// and computing never stalls while results are extracted (this requires p >= ROWS products per
// block, since a column emits one sum per cycle).
//
// The bundle is {valid, nan, carries, sum} of the carry-save accumulator; the valid bit is this
// design's addition so the bottom of the chain knows which slots hold a sum.
//
// Timing: a_out, b_out, sob_out, eob_out are the inputs delayed by one cycle; c_out is the
// selected bundle delayed by two cycles.
module pe
  import s3_pkg::*;
#(
  parameter int WS   = 8,
  parameter int WF   = 23,
  parameter int BIAS = 127,
  parameter int MSB  = 255,
  parameter int LSB  = -298,
  parameter int OVF  = 32,
  parameter int K    = 64,
  localparam int S3W  = s3_width(WS, WF),
  localparam int WLA  = acc_width(OVF, MSB, LSB),
  localparam int NCH  = acc_chunks(WLA, K),
  localparam int HW   = hssd_width(WLA, K)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [S3W-1:0] a_in,
  input  logic [S3W-1:0] b_in,
  input  logic           sob_in,
  input  logic           eob_in,
  input  logic [HW-1:0]  c_in,
  output logic [S3W-1:0] a_out,
  output logic [S3W-1:0] b_out,
  output logic           sob_out,
  output logic           eob_out,
  output logic [HW-1:0]  c_out
);

  logic [NCH*K-1:0] acc_sum;
  logic [NCH-2:0]   acc_carry;
  logic             acc_nan, acc_done;

  s3fdp #(
    .WS(WS), .WF(WF), .BIAS(BIAS), .MSB(MSB), .LSB(LSB), .OVF(OVF), .K(K)
  ) u_fdp (
    .clk      (clk),
    .rst      (rst),
    .x        (a_in),
    .y        (b_in),
    .ftz      (sob_in),
    .eob      (eob_in),
    .acc_sum  (acc_sum),
    .acc_carry(acc_carry),
    .nan_q    (acc_nan),
    .eob_q    (acc_done)
  );

  // Operand and control forwarding.
  always_ff @(posedge clk) begin
    a_out <= a_in;
    b_out <= b_in;
    if (rst) begin
      sob_out <= 1'b0;
      eob_out <= 1'b0;
    end else begin
      sob_out <= sob_in;
      eob_out <= eob_in;
    end
  end

  // HSSD stage.
  logic [HW-1:0] hssd_mux, c1;
  assign hssd_mux = acc_done ? {1'b1, acc_nan, acc_carry, acc_sum} : c_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      c1    <= '0;
      c_out <= '0;
    end else begin
      c1    <= hssd_mux;
      c_out <= c1;
    end
  end

endmodule
