// Shared constants, types and helper functions of the HUB posit adder.
//
// ES is the exponent field width of every posit format used here (2). The
// square-root carry-select adder groups (sizes 2, 2, 3, 4, 5, ...: bits [1:0],
// [3:2], [6:4], [10:7], [15:11] for 16 bits) are computed by constant
// functions, so the adder and the segment gating of the mantissa neutralizer
// agree on the same boundaries for any width. hub_dec6_t carries the decode of
// one HUB Posit6 word: two of them make up a Posit11 decode.
package posit_hub_pkg;

  localparam int ES = 2;

  // Size of carry-select group g: the first two groups are 2 bits wide,
  // every later group is one bit wider than the one before.
  function automatic int grp_size(input int g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // Index of the lowest bit of group g.
  function automatic int grp_lo(input int g);
    int lo;
    lo = 0;
    for (int i = 0; i < g; i++) lo += grp_size(i);
    return lo;
  endfunction

  // Index of the highest bit of group g in an adder of width w (the last
  // group is cut to fit).
  function automatic int grp_hi(input int g, input int w);
    int hi;
    hi = grp_lo(g) + grp_size(g) - 1;
    return (hi > w - 1) ? w - 1 : hi;
  endfunction

  // Number of groups needed for an adder of width w.
  function automatic int num_grps(input int w);
    int g;
    g = 0;
    while (grp_lo(g) < w) g++;
    return g;
  endfunction

  // Width of the signed scale factor 2^ES*r + e of a Posit(n, ES) adder,
  // with headroom for the carry and the normalization shift.
  function automatic int scale_w(input int n);
    return $clog2(n) + ES + 3;
  endfunction

  // Decode of one HUB Posit6 word (ES = 2): regime, exponent, fraction with
  // its iLSB, regime run length, live fraction bits and whether the regime
  // ends inside the stored bits.
  typedef struct packed {
    logic signed [3:0] r;
    logic [1:0]        e;
    logic [1:0]        f;
    logic [2:0]        k;
    logic [1:0]        fw_act;
    logic              term;
  } hub_dec6_t;

  // What the adder did to produce one result.
  typedef struct packed {
    logic excess_shift;  // negative operand shifted out entirely, zero used
    logic cancel;        // discarded bit re-entered during normalization
    logic seg_gated;     // at least one adder segment was switched off
    logic clamped;       // result saturated to maxpos or minpos
    logic zero;          // result is zero
    logic nar;           // result is NaR
  } add_flags_t;

endpackage
