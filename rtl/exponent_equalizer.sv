// Exponent equalizer: aligns the significand of the smaller operand to the
// larger one for a Posit(N, ES) HUB adder.
//
// Each operand arrives as its scale factor (2^ES*r + e) xor s and its two's
// complement significand {s, ~s, f} (SW = N-2 bits, FW = N-4 fraction bits
// with the iLSB). The operand with the larger scale (A on a tie) passes
// unchanged, sign-extended to the adder width AW = SW+1; the extra bit holds
// the carry of the sum. The other one is shifted right by the scale
// difference d with sign extension (arithmetic shift). No guard, round or
// sticky bits are kept, since the HUB adder does not round; only the first
// bit shifted out is kept (guard) so that the normalizer can put it back
// after a cancellation.
//
// If d is larger than the significand width, the whole significand has left
// the adder. An arithmetic shift would then leave all ones for a negative
// operand and take one unit in the last place off the sum; the shift fills
// with zeros instead (logical shift) so the operand contributes nothing, and
// excess reports that this happened to a negative operand.
//
// lsb_pos is the lowest adder bit that can be non-zero in either aligned
// operand (from the live fraction widths fw_a, fw_b given by the regimes); the
// mantissa neutralizer switches off the adder segments below it.
// Purely combinational.
module exponent_equalizer
  import posit_hub_pkg::*;
#(
  parameter int N = 11,
  localparam int FW  = N - ES - 2,
  localparam int SW  = FW + 2,
  localparam int AW  = SW + 1,
  localparam int SCW = scale_w(N),
  localparam int AWW = $clog2(FW + 1),
  localparam int LW  = $clog2(AW) + 1
) (
  input  logic signed [SCW-1:0] scale_a,
  input  logic [SW-1:0]         sig_a,
  input  logic [AWW-1:0]        fw_a,
  input  logic signed [SCW-1:0] scale_b,
  input  logic [SW-1:0]         sig_b,
  input  logic [AWW-1:0]        fw_b,
  output logic signed [SCW-1:0] scale_big,
  output logic [AW-1:0]         big_sig,
  output logic [AW-1:0]         small_sig,
  output logic                  guard,
  output logic [LW-1:0]         lsb_pos,
  output logic                  excess
);
  logic                  a_big;
  logic signed [SCW:0]   diff;
  logic [SCW:0]          d;
  logic [SW-1:0]         sig_s;
  logic [AWW-1:0]        fw_big, fw_small;
  logic signed [AW:0]    small_ext;
  logic signed [AW:0]    arith;
  logic [AW:0]           shifted;
  logic                  too_far;
  int                    pb, ps;

  assign a_big     = (scale_a >= scale_b);
  assign diff      = a_big ? (SCW+1)'(scale_a) - (SCW+1)'(scale_b)
                           : (SCW+1)'(scale_b) - (SCW+1)'(scale_a);
  assign d         = diff;
  assign scale_big = a_big ? scale_a : scale_b;
  assign big_sig   = a_big ? AW'(signed'(sig_a)) : AW'(signed'(sig_b));
  assign sig_s     = a_big ? sig_b : sig_a;
  assign fw_big    = a_big ? fw_a : fw_b;
  assign fw_small  = a_big ? fw_b : fw_a;

  assign small_ext = {AW'(signed'(sig_s)), 1'b0};
  assign too_far   = (d > (SCW+1)'(SW));
  assign arith     = small_ext >>> d;
  assign shifted   = too_far ? '0 : arith;
  assign small_sig = shifted[AW:1];
  assign guard     = shifted[0];
  assign excess    = too_far & sig_s[SW-1];

  // Lowest live bit of each aligned operand; bit FW is the unit bit.
  always_comb begin
    pb = FW - int'(fw_big);
    ps = FW - int'(fw_small) - int'(d);
    if (ps < 0) ps = 0;
    if (too_far || ps > pb) lsb_pos = LW'(pb);
    else                    lsb_pos = LW'(ps);
  end
endmodule
