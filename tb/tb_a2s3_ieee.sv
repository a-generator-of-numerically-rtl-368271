// tb_a2s3_ieee: checks the A2S3 unit for binary32 (with subnormals), binary16 and a TFP
// configuration (no subnormals). For random words of every class it rebuilds the value from the
// S3 fields, (-1)^sign * implicit.fraction * 2^(scale - bias - WF), and compares it with the
// value decoded independently from the word; it also checks the NaN bit for infinities and
// NaNs and that TFP words with a zero exponent give zero.
module tb_a2s3_ieee;
  import tb_fp_pkg::*;

  int checks = 0, failures = 0;

  logic [31:0] w32; logic [33:0] s32;
  logic [15:0] w16; logic [17:0] s16;
  logic [15:0] wt;  logic [17:0] st;

  a2s3_ieee dut32 (.word(w32), .s3(s32));
  a2s3_ieee #(.WE(5), .WF(10)) dut16 (.word(w16), .s3(s16));
  a2s3_ieee #(.WE(5), .WF(10), .SUBNORMALS(1'b0)) duttfp (.word(wt), .s3(st));

  function automatic real s3_value(input logic [63:0] s3, input int ws, input int wf);
    int  scale, bias;
    real r;
    bias  = (1 << (ws - 1)) - 1;
    scale = int'((s3 >> (wf + 1)) & ((64'd1 << ws) - 1));
    r     = real'(s3 & ((64'd1 << (wf + 1)) - 1)) * pow2(scale - bias - wf);
    return s3[ws + wf + 1] ? -r : r;
  endfunction

  task automatic check(input logic [63:0] w, input logic [63:0] s3, input int we, input int wf,
                       input bit sub);
    int  ex;
    bit  expnan, gotnan;
    real expv, gotv;
    ex     = int'((w >> wf) & ((64'd1 << we) - 1));
    expnan = (ex == (1 << we) - 1);
    gotnan = s3[we + wf + 2];
    expv   = (ex == 0 && !sub) ? 0.0 : fp_to_real(w, we, wf);
    gotv   = s3_value(s3, we, wf);
    checks++;
    if (gotnan != expnan || (!expnan && gotv != expv) || s3[we + wf + 1] != w[we + wf]) begin
      failures++;
      $display("FAIL we=%0d sub=%0d word %h -> s3 %h (value %e nan %b), expected %e nan %b",
               we, sub, w, s3, gotv, gotnan, expv, expnan);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      w32 = $urandom;
      w16 = 16'($urandom);
      wt  = 16'($urandom);
      case (t % 4)
        0: begin w32[30:23] = 0; w16[14:10] = 0; wt[14:10] = 0; end
        1: begin w32[30:23] = '1; w16[14:10] = '1; wt[14:10] = '1; end
        2: begin w32[30:0] = 0; w16[14:0] = 0; wt[14:0] = 0; end
        default: ;
      endcase
      #1;
      check(64'(w32), 64'(s32), 8, 23, 1'b1);
      check(64'(w16), 64'(s16), 5, 10, 1'b1);
      check(64'(wt), 64'(st), 5, 10, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
