// Helpers shared by tb_pe and tb_sak: S3 operands of a small format (WS = 4, WF = 5, bias 7)
// holding integers -3..3, and the value of an 18-bit carry-save accumulator (LSB = -8, K = 4,
// five chunks) in units of 2^-8.
function automatic logic [11:0] s3_int(input int v);
  int m;
  m = (v < 0) ? -v : v;
  case (m)
    0:       return {1'b0, v < 0, 4'd0, 1'b0, 5'd0};
    1:       return {1'b0, v < 0, 4'd7, 1'b1, 5'd0};
    2:       return {1'b0, v < 0, 4'd8, 1'b1, 5'd0};
    default: return {1'b0, v < 0, 4'd8, 1'b1, 5'b10000};
  endcase
endfunction

function automatic int cs_value(input logic [25:0] bundle);
  logic [19:0] s, cv;
  logic [17:0] v;
  s  = bundle[19:0];
  cv = {bundle[23], 3'b0, bundle[22], 3'b0, bundle[21], 3'b0, bundle[20], 4'b0};
  v  = 18'(s + cv);
  return int'(signed'(v));
endfunction
