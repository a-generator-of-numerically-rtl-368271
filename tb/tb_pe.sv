// tb_pe: checks one processing element (small S3 format, 18-bit accumulator). Random integer
// operands, random SOB/EOB and random bundles on the HSSD input are applied every cycle. It
// checks that operands and control leave one cycle later, that the HSSD output two cycles
// after the multiplexer carries the PE's own finished sum (valid, value in the carry-save form)
// in the cycle after an EOB and otherwise the bundle from above, and the accumulated values
// against a model of SOB-restarted dot products.
module tb_pe;
  `include "tb_small_s3.svh"

  localparam int T = 3000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_own = 0, n_pass = 0;

  logic [11:0] a_in, b_in, a_out, b_out;
  logic sob_in, eob_in, sob_out, eob_out;
  logic [25:0] c_in, c_out;

  pe #(.WS(4), .WF(5), .BIAS(7), .MSB(6), .LSB(-8), .OVF(3), .K(4)) dut (
    .clk(clk), .rst(rst), .a_in(a_in), .b_in(b_in), .sob_in(sob_in), .eob_in(eob_in),
    .c_in(c_in), .a_out(a_out), .b_out(b_out), .sob_out(sob_out), .eob_out(eob_out),
    .c_out(c_out));

  int av[T], bv[T], accv[T];
  bit sobv[T], eobv[T];
  logic [25:0] cinv[T];

  initial begin
    for (int t = 0; t < T; t++) begin
      av[t] = int'($urandom_range(0, 6)) - 3;
      bv[t] = int'($urandom_range(0, 6)) - 3;
      sobv[t] = (t == 0) || ($urandom_range(0, 5) == 0);
      eobv[t] = ($urandom_range(0, 4) == 0);
      cinv[t] = {1'($urandom), 1'b0, 4'($urandom), 20'($urandom)};
      accv[t] = (sobv[t] ? 0 : (t > 0 ? accv[t-1] : 0)) + av[t] * bv[t];
    end
    a_in = '0; b_in = '0; sob_in = 0; eob_in = 0; c_in = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < T; t++) begin
      a_in = s3_int(av[t]); b_in = s3_int(bv[t]); sob_in = sobv[t]; eob_in = eobv[t];
      c_in = cinv[t];
      @(negedge clk);
      // Now after edge t.
      checks++;
      if (a_out != s3_int(av[t]) || b_out != s3_int(bv[t]) || sob_out != sobv[t] ||
          eob_out != eobv[t]) begin
        failures++; $display("FAIL forwarding at %0d", t);
      end
      if (t >= 3) begin
        checks++;
        if (eobv[t-2]) begin
          n_own++;
          if (!c_out[25] || c_out[24] || cs_value(c_out) != accv[t-2] * 256) begin
            failures++;
            $display("FAIL own sum at %0d: %0d expected %0d", t, cs_value(c_out), accv[t-2] * 256);
          end
        end else begin
          n_pass++;
          if (c_out != cinv[t-1]) begin
            failures++; $display("FAIL pass-through at %0d: %h expected %h", t, c_out, cinv[t-1]);
          end
        end
      end
    end
    $display("  own sums inserted: %0d, bundles passed down: %0d", n_own, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
