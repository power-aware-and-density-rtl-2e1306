// Reference model of HUB posits for the testbenches, written independently of
// the RTL structure: words are decoded bit by bit into real numbers and
// results are encoded by a binary search over the word space.
//
// Value of a Posit(n, 2) word with sign s, regime r, exponent e, fraction f
// read from the raw bits (no two's complement):
//   ((1 - 3s) + f) * 2^((-1)^s * (4r + e + s)).
// A HUB word is read with a 1 appended after its last stored bit (the iLSB),
// the conventional reading of the same bits with a 0 appended. For each sign
// the conventional value grows with the stored bits read as an unsigned
// number, so truncating an exact value means taking the largest word whose
// conventional value does not exceed it.
package posit_ref_pkg;

  // Decode word w of an n-bit posit, with bit `ilsb` appended.
  function automatic void decode(input logic [15:0] w, input int n, input bit ilsb,
                        output int r, output int e, output real f,
                        output int scale, output real value);
    bit b[32];
    int run, pos;
    real wgt;
    bit s;
    s = w[n-1];
    for (int i = 0; i < n - 1; i++) b[i] = w[n-2-i];
    b[n-1] = ilsb;
    run = 1;
    while (run < n && b[run] == b[0]) run++;
    r = b[0] ? run - 1 : -run;
    pos = run + 1;
    e = 0;
    for (int j = 0; j < 2; j++) begin
      e = 2 * e + ((pos < n) ? int'(b[pos]) : 0);
      pos++;
    end
    f = 0.0;
    wgt = 0.5;
    while (pos < n) begin
      if (b[pos]) f += wgt;
      wgt /= 2.0;
      pos++;
    end
    scale = s ? -(4 * r + e + 1) : 4 * r + e;
    value = (s ? (f - 2.0) : (1.0 + f)) * (2.0 ** scale);
  endfunction

  function automatic real hub_value(input logic [15:0] w, input int n);
    int r, e, sc;
    real f, v;
    decode(w, n, 1'b1, r, e, f, sc, v);
    return v;
  endfunction

  function automatic real conv_value(input logic [15:0] w, input int n);
    int r, e, sc;
    real f, v;
    decode(w, n, 1'b0, r, e, f, sc, v);
    return v;
  endfunction

  // Truncating HUB encoder: largest word of the right sign whose
  // conventional value is <= t, saturating at the ends of the range.
  function automatic logic [15:0] encode(input real t, input int n);
    logic [15:0] sgn;
    int lo, hi, mid;
    sgn = (t < 0.0) ? (16'd1 << (n - 1)) : 16'd0;
    lo = 1;
    hi = (1 << (n - 1)) - 1;
    if (conv_value(sgn | 16'(lo), n) > t) return sgn | 16'(lo);
    while (lo < hi) begin
      mid = (lo + hi + 1) / 2;
      if (conv_value(sgn | 16'(mid), n) <= t) lo = mid;
      else hi = mid - 1;
    end
    return sgn | 16'(lo);
  endfunction

  // Expected sum of the HUB adder: operands aligned to the larger scale with
  // the smaller one truncated to one bit below the adder's last place (zero
  // when shifted beyond its whole significand), exact sum, then truncation.
  function automatic logic [15:0] add(input logic [15:0] a, input logic [15:0] b,
                                      input int n);
    logic [15:0] nar, msk;
    int ra, ea, sca, rb, eb, scb, d, big_sc;
    real fa, va, fb, vb, grid, vbig, vsm, t;
    nar = 16'd1 << (n - 1);
    msk = (16'd1 << n) - 16'd1;
    if ((a & msk) == nar || (b & msk) == nar) return nar;
    if ((a & msk) == 0) return b;
    if ((b & msk) == 0) return a;
    decode(a, n, 1'b1, ra, ea, fa, sca, va);
    decode(b, n, 1'b1, rb, eb, fb, scb, vb);
    if (sca >= scb) begin big_sc = sca; vbig = va; vsm = vb; d = sca - scb; end
    else            begin big_sc = scb; vbig = vb; vsm = va; d = scb - sca; end
    grid = 2.0 ** (big_sc - (n - 4) - 1);
    if (d > n - 2) vsm = 0.0;
    else vsm = $floor(vsm / grid) * grid;
    t = vbig + vsm;
    if (t == 0.0) return 16'd0;
    return encode(t, n);
  endfunction

endpackage
