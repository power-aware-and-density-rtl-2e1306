// Regime+Exponent stage of the Posit11 decoder.
//
// Merges the HUB Posit6 decodes of the two 5-bit halves of a Posit11 word
// (see posit11_decoder) into the regime r, exponent e and fraction f of the
// whole word, then forms what the adder needs: the scale factor
// scale = (4r + e) xor s (equal to (-1)^s * (4r + e + s)) and the two's
// complement significand {s, ~s, f}, whose value is (1-3s) + f.
//
// Merge rule (this design's own):
//  * the first half's regime ends inside the first half: r = r1, and the
//    exponent and fraction come from the whole body {p[9:0], iLSB} shifted
//    left past the regime by the run length the first half's decoder found;
//  * the first half is one run and the second half starts with the other
//    bit value (the terminator): r = 4 for ones, -5 for zeros, exponent and
//    fraction from the body shifted left by 6;
//  * the run continues into the second half: r = r1 + r2 (a run of 5 ones
//    gives r1 = 5 because the half's iLSB extends it, a run of 5 zeros gives
//    r1 = -5), and the exponent and fraction are the second half's, whose
//    iLSB is the word's iLSB.
// fw_act counts the fraction bits, from the top, that can be non-zero.
// Purely combinational.
module regime_exponent
  import posit_hub_pkg::*;
#(
  localparam int SCW = scale_w(11)
) (
  input  logic                  s,
  input  hub_dec6_t             h1,
  input  hub_dec6_t             h2,
  input  logic [9:0]            body,
  output logic signed [4:0]     r,
  output logic [1:0]            e,
  output logic [6:0]            f,
  output logic [2:0]            fw_act,
  output logic signed [SCW-1:0] scale,
  output logic [8:0]            sig
);
  logic [10:0] ext;
  logic [10:0] shifted;
  logic [2:0]  k_all;
  logic signed [SCW-1:0] t;

  assign ext     = {body, 1'b1};
  assign shifted = ext << (int'(k_all) + 1);

  // k_all: run length of the regime when it ends inside the stored bits of
  // the first half (h1.k) or right at the first bit of the second half (5).
  always_comb begin
    if (!h1.term && (body[4] == body[9])) begin
      // The run continues into the second half.
      r      = 5'(h1.r) + 5'(h2.r);
      e      = h2.e;
      f      = {h2.f, 5'b0};
      fw_act = 3'(h2.fw_act);
      k_all  = 3'd5;
    end else begin
      k_all  = h1.term ? h1.k : 3'd5;
      r      = h1.term ? 5'(h1.r) : (body[9] ? 5'sd4 : -5'sd5);
      e      = shifted[10:9];
      f      = shifted[8:2];
      fw_act = 3'(8 - int'(k_all));
    end
  end

  assign t     = (SCW'(r) <<< 2) + SCW'(signed'({1'b0, e}));
  assign scale = t ^ {SCW{s}};
  assign sig   = {s, ~s, f};
endmodule
