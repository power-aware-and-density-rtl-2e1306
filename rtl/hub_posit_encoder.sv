// HUB posit encoder for Posit(N, ES).
//
// Packs sign s, regime r, exponent e and fraction f into an N-bit word. The
// regime logic starts from {10, e, f} for r >= 0 or {01, e, f} for r < 0, and
// a right shifter moves it right by r (r >= 0, filling with ones) or by
// -r-1 (r < 0, filling with zeros), which leaves a run of r+1 ones or -r
// zeros followed by the terminator, the exponent and the fraction. The top
// N-1 bits are kept and the rest is dropped: a HUB posit is rounded to
// nearest by plain truncation because its iLSB stands for the half unit, so
// there are no round and sticky bits and no increment adder. Negative values
// are stored from raw bits (no two's complement), matching hub_posit_decoder.
//
// Saturation: a regime of N-2 or more fills every stored bit with ones and
// gives the all-ones body by itself; a body that would be all zero (the zero
// or NaR pattern) is replaced by 0...01. For a positive word these two ends
// are maxpos and minpos. Because negative words are stored from raw bits,
// for a negative word they are the smallest and the largest magnitude. So
// results neither overflow nor underflow. clamped reports either case. Purely combinational.
module hub_posit_encoder
  import posit_hub_pkg::*;
#(
  parameter int N   = 11,
  parameter int FIW = N - 2,
  localparam int RIW = scale_w(N) - ES,
  localparam int XW  = 2 + ES + FIW
) (
  input  logic                  s,
  input  logic signed [RIW-1:0] r,
  input  logic [ES-1:0]         e,
  input  logic [FIW-1:0]        f,
  output logic [N-1:0]          p,
  output logic                  clamped
);
  logic                 neg_r;
  logic [RIW-1:0]       amount;
  logic signed [XW-1:0] seed;
  logic signed [XW-1:0] arith;
  logic [XW-1:0]        shifted;
  logic [N-2:0]         body;

  assign neg_r   = r[RIW-1];
  assign amount  = neg_r ? ~r : r;
  assign seed    = {neg_r ? 2'b01 : 2'b10, e, f};
  assign arith   = seed >>> amount;
  assign shifted = (int'(amount) >= XW) ? {XW{~neg_r}} : arith;
  assign body    = shifted[XW-1 -: N-1];

  always_comb begin
    if (body == '0) begin
      p       = {s, {(N-2){1'b0}}, 1'b1};
      clamped = 1'b1;
    end else begin
      p       = {s, body};
      clamped = !neg_r && (int'(r) >= N - 2);
    end
  end
endmodule
