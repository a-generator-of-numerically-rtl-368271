// cs_resolve: turns an HSSD bundle's carry-save accumulator into a plain two's complement number.
//
// The accumulator is kept as a sum vector of NCH chunks of K bits plus one pending carry per
// chunk boundary (carry[i] weighs 2^(K*(i+1))). This adds the carries in with one wide adder
// and keeps the low WLA bits, which are the accumulator in two's complement with bit 0 of weight
// 2^LSB. Purely combinational; shared by the L2A units and the exact (fixed-point) output.
module cs_resolve
  import s3_pkg::*;
#(
  parameter int WLA = 586,
  parameter int K   = 64,
  localparam int NCH = acc_chunks(WLA, K)
) (
  input  logic [NCH*K-1:0] sum,
  input  logic [NCH-2:0]   carry,
  output logic [WLA-1:0]   value
);

  logic [NCH*K-1:0] cvec, full;

  always_comb begin
    cvec = '0;
    for (int c = 0; c < NCH - 1; c++)
      cvec[(c+1)*K] = carry[c];
    full  = sum + cvec;
    value = full[WLA-1:0];
  end

endmodule
