// Reference posit helpers for tb_a2s3_posit and tb_l2a_posit, written with reals.
// posit_value: decodes posit<n,es> pattern p by walking its bits (p must not be 0 or NaR).
// posit_round: encodes a nonzero real as posit<n,es>, rounding the infinitely long encoding to
// nearest with ties to even and saturating at maxpos/minpos.
function automatic real posit_value(input logic [63:0] p, input int n, input int es);
  logic [63:0] x;
  int i, run, k, e, flen;
  bit r0, neg;
  real f, v;
  neg = p[n-1];
  x = neg ? ((~p + 1) & ((64'd1 << n) - 1)) : p;
  i = n - 2;
  r0 = x[i];
  run = 0;
  while (i >= 0 && x[i] == r0) begin run++; i--; end
  k = r0 ? run - 1 : -run;
  i--;                                  // terminating bit
  e = 0;
  for (int b = 0; b < es; b++) begin
    e = e * 2 + ((i >= 0) ? int'(x[i]) : 0);
    i--;
  end
  f = 0.0; flen = 0;
  while (i >= 0) begin f = f * 2.0 + real'(x[i]); flen++; i--; end
  v = pow2(k * (1 << es) + e) * (1.0 + f / pow2(flen));
  return neg ? -v : v;
endfunction

function automatic logic [63:0] posit_round(input real r, input int n, input int es);
  real a, m;
  int sc, smax, k, e, len;
  bit neg, g, st;
  logic [127:0] bits;
  logic [63:0] top, res;
  neg = (r < 0.0);
  a = neg ? -r : r;
  smax = (n - 2) << es;
  sc = 0;
  while (a >= pow2(sc + 1)) sc++;
  while (a < pow2(sc)) sc--;
  if (sc > smax) top = (64'd1 << (n - 1)) - 1;
  else if (sc < -smax) top = 1;
  else begin
    k = (sc >= 0) ? sc / (1 << es) : -((-sc + (1 << es) - 1) / (1 << es));
    e = sc - k * (1 << es);
    bits = 0; len = 0;
    if (k >= 0) begin
      for (int b = 0; b <= k; b++) begin bits = (bits << 1) | 1; len++; end
      bits = bits << 1; len++;
    end else begin
      for (int b = 0; b < -k; b++) begin bits = bits << 1; len++; end
      bits = (bits << 1) | 1; len++;
    end
    for (int b = es - 1; b >= 0; b--) begin bits = (bits << 1) | 128'((e >>> b) & 32'd1); len++; end
    m = a / pow2(sc) - 1.0;
    while (len < 120) begin
      m = m * 2.0;
      bits = bits << 1;
      if (m >= 1.0) begin bits = bits | 1; m = m - 1.0; end
      len++;
    end
    top = 64'(bits >> (120 - (n - 1)));
    g   = bits[120 - n];
    st  = ((bits & ((128'd1 << (120 - n)) - 1)) != 0) || (m != 0.0);
    if (g && (st || top[0])) top = top + 1;
    if (top >= (64'd1 << (n - 1))) top = (64'd1 << (n - 1)) - 1;
  end
  res = neg ? ((~top + 1) & ((64'd1 << n) - 1)) : top;
  return res;
endfunction
