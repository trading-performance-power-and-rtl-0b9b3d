// posit_ref_pkg: bit-serial reference model of posit arithmetic for the
// testbenches.
//
// Values are held as signed fixed-point numbers with FX_F fraction bits in
// 512 bits (fx_t), wide enough for exact products and sums of posits up to
// 16 bits. Decoding walks the bits one at a time; encoding writes the
// regime, exponent and fraction bits one at a time into a bit string and
// rounds that string to nearest, ties to even, with the posit rules that a
// non-zero value never becomes zero and never exceeds maxpos. None of this
// shares code or structure with the shifter/LZC datapath it checks.
package posit_ref_pkg;

  localparam int FX_F = 200;
  typedef logic signed [511:0] fx_t;

  // Decode: value = (-1)^sign * mant * 2^(sf - fbits), mant has its hidden one
  // at bit fbits.
  function automatic void ref_decode(input int n, input int es, input logic [31:0] p,
                                     output bit zero, output bit nar, output bit sign,
                                     output int sf, output longint mant, output int fbits);
    logic [31:0] x;
    int i, m, k, e, ebits;
    bit r0;
    x = p & ((32'd1 << n) - 1);
    zero = (x == 0);
    nar  = (x == (32'd1 << (n - 1)));
    sign = x[n-1];
    sf = 0; mant = 0; fbits = 0;
    if (zero || nar) return;
    if (sign) x = ((~x) + 1) & ((32'd1 << n) - 1);
    i = n - 2;
    r0 = x[i];
    m = 0;
    while (i >= 0 && x[i] == r0) begin m++; i--; end
    i--;                                   // skip terminating bit
    k = r0 ? m - 1 : -m;
    e = 0; ebits = 0;
    while (ebits < es) begin
      e = e * 2 + ((i >= 0) ? int'(x[i]) : 0);
      ebits++; i--;
    end
    sf = k * (1 << es) + e;
    mant = 1;
    while (i >= 0) begin
      mant = mant * 2 + longint'(x[i]);
      fbits++; i--;
    end
  endfunction

  function automatic fx_t to_fx(input bit sign, input longint mant, input int exp2);
    // (-1)^sign * mant * 2^exp2 in fixed point
    fx_t v;
    v = fx_t'(mant);
    if (exp2 + FX_F >= 0) v = v <<< (exp2 + FX_F);
    else                  v = v >>> (-(exp2 + FX_F));
    return sign ? -v : v;
  endfunction

  function automatic fx_t ref_value(input int n, input int es, input logic [31:0] p);
    bit z, nr, s; int sf, fb; longint m;
    ref_decode(n, es, p, z, nr, s, sf, m, fb);
    if (z || nr) return '0;
    return to_fx(s, m, sf - fb);
  endfunction

  // Exact product of two posits (mantissas multiplied, exponents added, so
  // nothing wider than the product itself is formed).
  function automatic fx_t ref_product(input int n, input int es,
                                      input logic [31:0] pa, input logic [31:0] pb);
    bit za, na, sa, zb, nb, sb; int sfa, sfb, fba, fbb; longint ma, mb;
    ref_decode(n, es, pa, za, na, sa, sfa, ma, fba);
    ref_decode(n, es, pb, zb, nb, sb, sfb, mb, fbb);
    if (za || na || zb || nb) return '0;
    return to_fx(sa ^ sb, ma * mb, sfa + sfb - fba - fbb);
  endfunction

  // Encode an exact fixed-point value into posit<n,es> by building the bit
  // string and rounding it.
  function automatic logic [31:0] ref_encode(input int n, input int es, input fx_t v);
    bit sign;
    fx_t mag;
    int p, sf, k, e, len, i;
    bit bits [0:1100];
    logic [31:0] body, res;
    bit guard, sticky;
    if (v == 0) return 0;
    sign = (v < 0);
    mag = sign ? -v : v;
    p = 511;
    while (mag[p] == 1'b0) p--;
    sf = p - FX_F;
    k = sf >>> es;                       // floor division
    e = sf - k * (1 << es);
    len = 0;
    if (k >= 0) begin
      for (i = 0; i <= k && len < 100; i++) bits[len++] = 1;
      bits[len++] = 0;
    end else begin
      for (i = 0; i < -k && len < 100; i++) bits[len++] = 0;
      bits[len++] = 1;
    end
    for (i = es - 1; i >= 0; i--) bits[len++] = e[i];
    for (i = p - 1; i >= 0; i--) bits[len++] = mag[i];
    body = 0;
    for (i = 0; i < n - 1; i++) body = (body << 1) | 32'(bits[i]);
    guard = bits[n-1];
    sticky = 0;
    for (i = n; i < len; i++) sticky |= bits[i];
    if (guard && (body[0] || sticky)) body = body + 1;
    if (body >= (32'd1 << (n - 1))) body = (32'd1 << (n - 1)) - 1;   // maxpos
    if (body == 0) body = 1;                                          // minpos
    res = sign ? ((~body) + 1) : body;
    return res & ((32'd1 << n) - 1);
  endfunction

  // Random posit with a bias towards the interesting encodings.
  function automatic logic [31:0] rand_posit(input int n);
    int r;
    r = $urandom_range(0, 99);
    if (r < 3)  return 0;
    if (r < 5)  return 32'd1 << (n - 1);          // NaR
    if (r < 8)  return (32'd1 << (n - 1)) - 1;    // maxpos
    if (r < 10) return 1;                         // minpos
    return $urandom & ((32'd1 << n) - 1);
  endfunction

  // Scaled accumulator reference for posit<n,es>: a 4n-bit base with its
  // hidden-one position at bit 4n-8 and a signed scale field. One step
  // applies addend (+/-) a*b, where the addend is c (acc = 0) or the state
  // itself (acc = 1). Returns 1 when the step had to rescale (guard overflow).
  function automatic bit sa_step(input int n, input int es,
                                 inout longint base, inout int scale,
                                 input logic [31:0] pa, input logic [31:0] pb,
                                 input logic [31:0] pc, input bit acc, input bit sub);
    bit za, na, sa, zb, nb, sb, zc, nc, sc, neg, adj;
    int sfa, sfb, sfc, fba, fbb, fbc, bf, scw, sc_min, sc_max, q, s_m, s_c, s_o, big_s, diff;
    longint ma, mb, mc, b_m, b_c, b_o, b_big, b_sml, sum;
    bf = 4 * n - 8;
    scw = $clog2(n) + es + 2;
    sc_min = -(1 << (scw - 1));
    sc_max = (1 << (scw - 1)) - 1;
    ref_decode(n, es, pa, za, na, sa, sfa, ma, fba);
    ref_decode(n, es, pb, zb, nb, sb, sfb, mb, fbb);
    ref_decode(n, es, pc, zc, nc, sc, sfc, mc, fbc);
    // product, renormalised so that its leading one sits at bit bf
    if (za || na || zb || nb) begin b_m = 0; s_m = sc_min; end
    else begin
      b_m = ma * mb;
      q = 62;
      while (!b_m[q]) q--;
      s_m = sfa + sfb + (q - fba - fbb);
      b_m = (q > bf) ? (b_m >>> (q - bf)) : (b_m <<< (bf - q));
      if (sa ^ sb ^ sub) b_m = -b_m;
    end
    if (zc || nc) begin b_c = 0; s_c = sc_min; end
    else begin
      b_c = mc <<< (bf - fbc);
      s_c = sfc;
      if (sc) b_c = -b_c;
    end
    b_o = acc ? base : b_c;
    s_o = acc ? scale : s_c;
    if (b_m == 0) s_m = sc_min;
    if (b_o == 0) s_o = sc_min;
    if (s_m >= s_o) begin b_big = b_m; big_s = s_m; b_sml = b_o; diff = s_m - s_o; end
    else            begin b_big = b_o; big_s = s_o; b_sml = b_m; diff = s_o - s_m; end
    if (diff > 4 * n - 1) diff = 4 * n - 1;
    sum = b_big + (b_sml >>> diff);
    adj = 0;
    if (sum >= (64'sd1 <<< (4 * n - 2)) || sum < -(64'sd1 <<< (4 * n - 2))) begin
      sum = sum >>> 1;
      big_s = (big_s == sc_max) ? sc_max : big_s + 1;
      adj = 1;
    end
    base = sum;
    scale = big_s;
    return adj;
  endfunction

endpackage
