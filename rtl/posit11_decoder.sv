// Posit11 decoder built from two HUB Posit6 decoders.
//
// The 11-bit word is cut into its sign p[10] and two 5-bit halves. Each half,
// preceded by the shared sign, is decoded as an independent HUB Posit6 word
// (its own iLSB appended), giving a regime, exponent and fraction per half.
// The Regime+Exponent stage (regime_exponent) merges the two half decodes into
// the decode of the whole word. Zero (all bits 0) and NaR (1 followed by
// zeros) are flagged here. Purely combinational.
module posit11_decoder
  import posit_hub_pkg::*;
(
  input  logic [10:0] p,
  output logic        s,
  output hub_dec6_t   h1,      // decode of {p[10], p[9:5]}
  output hub_dec6_t   h2,      // decode of {p[10], p[4:0]}
  output logic [9:0]  body,    // p[9:0]
  output logic        is_zero,
  output logic        is_nar
);
  logic s1;

  hub_posit_decoder #(.N(6), .ES(ES)) u_half1 (
    .p({p[10], p[9:5]}), .s(s1), .r(h1.r), .e(h1.e), .f(h1.f), .k(h1.k),
    .fw_act(h1.fw_act), .term(h1.term)
  );
  hub_posit_decoder #(.N(6), .ES(ES)) u_half2 (
    .p({p[10], p[4:0]}), .s(), .r(h2.r), .e(h2.e), .f(h2.f), .k(h2.k),
    .fw_act(h2.fw_act), .term(h2.term)
  );

  assign s       = s1;
  assign body    = p[9:0];
  assign is_zero = (p == 11'b0);
  assign is_nar  = (p == 11'b100_0000_0000);
endmodule
