// skew_delay: DEPTH-stage register chain (DEPTH = 0 is a plain wire). The array uses one per
// input row/column to skew the operands and one per output column to re-align the results.
// No reset: the data it carries is qualified by separately reset control bits.
module skew_delay #(
  parameter int W     = 32,
  parameter int DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [DEPTH-1:0][W-1:0] sr;
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int s = 1; s < DEPTH; s++) sr[s] <= sr[s-1];
    end
    assign q = sr[DEPTH-1];
  end

endmodule
