// tb_fp_pkg: reference floating-point helpers for the testbenches, written on top of the
// simulator's double-precision reals. fp_to_real decodes an IEEE-754-style word with a WE-bit
// exponent and WF-bit fraction; real_to_fp rounds a double to such a word, to nearest with ties
// to even, with subnormals (or flush to zero when sub = 0), overflow to infinity. wf must be at
// most 51 and the double must be normal.
package tb_fp_pkg;

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp_to_real(input logic [63:0] w, input int we, input int wf);
    int          bias, ex;
    logic [63:0] fr;
    real         r;
    bias = (1 << (we - 1)) - 1;
    ex   = int'((w >> wf) & ((64'd1 << we) - 1));
    fr   = w & ((64'd1 << wf) - 1);
    if (ex == 0) r = real'(fr) * pow2(1 - bias - wf);
    else         r = real'(fr + (64'd1 << wf)) * pow2(ex - bias - wf);
    if (w[we + wf]) r = -r;
    return r;
  endfunction

  function automatic logic [63:0] real_to_fp(input real r, input int we, input int wf,
                                             input bit sub);
    logic [63:0] b, m, q, res;
    logic        s, g, st;
    int          e, bias, emin, sh, ef;
    b = $realtobits(r);
    s = b[63];
    res = 64'(s) << (we + wf);
    if (b[62:0] == 0) return res;
    e    = int'(b[62:52]) - 1023;
    m    = {11'd0, 1'b1, b[51:0]};
    bias = (1 << (we - 1)) - 1;
    emin = 1 - bias;
    if (e >= emin) begin
      sh = 52 - wf;
      q  = m >> sh;
      g  = m[sh - 1];
      st = (m & ((64'd1 << (sh - 1)) - 1)) != 0;
      if (g && (st || q[0])) q = q + 1;
      ef = e + bias;
      if (q >> (wf + 1) != 0) begin q = q >> 1; ef = ef + 1; end
      if (ef >= (1 << we) - 1) return res | (((64'd1 << we) - 1) << wf);
      return res | (64'(ef) << wf) | (q & ((64'd1 << wf) - 1));
    end
    if (!sub) return res;
    sh = (emin - wf) - (e - 52);          // right shift to units of 2^(emin-wf)
    if (sh > 60) return res;
    q  = m >> sh;
    g  = m[sh - 1];
    st = (sh > 1) && ((m & ((64'd1 << (sh - 1)) - 1)) != 0);
    if (g && (st || q[0])) q = q + 1;
    return res | q;
  endfunction

  // A binary32 word with an 8-bit significand 1.xxxxxxx and the given exponent.
  function automatic logic [31:0] f32_small(input bit s, input int e, input logic [6:0] m);
    return {s, 8'(e + 127), m, 16'd0};
  endfunction

endpackage
