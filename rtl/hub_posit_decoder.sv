// HUB posit decoder for Posit(N, ES).
//
// A HUB posit carries an implicit least significant bit (iLSB) that is always
// 1; it is appended right after the N-1 stored bits that follow the sign, so
// that it lands in the regime, the exponent or the fraction depending on the
// regime length. A leading-bit counter measures the run k of bits equal to the
// first regime bit in {p[N-2:0], 1}; the regime is k-1 for a run of ones and
// -k for a run of zeros. A left shift by k+1 drops the regime and its
// terminator, leaving the exponent (ES bits) and the fraction (N-ES-2 bits,
// the iLSB included) at full size; missing bits read as zero.
//
// Negative words are decoded from their raw bits, without a two's
// complement, so r, e and f do not depend on the sign; the value is
// ((1-3s) + f) * 2^((-1)^s * (2^ES*r + e + s)). The widths of r (clog2(N)+1)
// and f (N-5+1 for ES = 2) follow the posit decoder structure this design is
// based on; k, fw_act and term are this design's extra outputs:
//   k      run length of the regime (the iLSB may extend it),
//   fw_act number of fraction bits, from the top, that carry stored bits or
//          the iLSB (the rest are always zero),
//   term   the regime terminator lies within the stored bits.
// Zero and NaR are not flagged here. Purely combinational.
module hub_posit_decoder #(
  parameter int N  = 6,
  parameter int ES = posit_hub_pkg::ES,
  localparam int RW = $clog2(N) + 1,
  localparam int FW = N - ES - 2,
  localparam int KW = $clog2(N + 1),
  localparam int AWW = $clog2(FW + 1)
) (
  input  logic [N-1:0]          p,
  output logic                  s,
  output logic signed [RW-1:0]  r,
  output logic [ES-1:0]         e,
  output logic [FW-1:0]         f,
  output logic [KW-1:0]         k,
  output logic [AWW-1:0]        fw_act,
  output logic                  term
);
  logic [N-1:0] ext;      // stored bits after the sign, then the iLSB
  logic [N-1:0] shifted;

  assign s   = p[N-1];
  assign ext = {p[N-2:0], 1'b1};

  // Leading-bit counter: length of the run of bits equal to ext[N-1].
  always_comb begin
    logic stop;
    stop = 1'b0;
    k    = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!stop && (ext[i] == ext[N-1])) k = k + 1'b1;
      else stop = 1'b1;
    end
  end

  // Regime logic.
  assign r    = ext[N-1] ? RW'(signed'({1'b0, k}) - 1) : RW'(-signed'({1'b0, k}));
  assign term = (int'(k) <= N - 2);

  // Left shifter: drop the regime and its terminator.
  assign shifted = ext << (int'(k) + 1);
  assign e       = shifted[N-1 -: ES];
  assign f       = shifted[N-1-ES -: FW];
  assign fw_act  = (int'(k) <= N - ES - 2) ? AWW'(N - ES - 1 - int'(k)) : '0;
endmodule
