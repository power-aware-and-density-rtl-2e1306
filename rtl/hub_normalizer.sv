// Normalizer of the HUB posit adder.
//
// The adder output (AW bits, two's complement) gets the bit that alignment
// shifted out of the smaller operand appended below it; without rounding
// logic this bit would otherwise be lost when two close values cancel and the
// result is shifted left. The leading-bit detector counts lz, the run of bits
// below the sign that equal the sign, and the word is shifted left by lz so
// that it reads {s, ~s, fraction}: 1.f for a positive result, -2+f for a
// negative one, which is the form in which posit words store a value. The
// scale becomes scale_big + 1 - lz (the adder has one bit above the unit
// bit). The scale is then split into regime and exponent for the encoder:
// 2^ES*r + e = scale xor s.
//
// zero flags an exact zero sum; cancel flags that the guard bit was 1 and was
// shifted into the result (lz >= 2). Purely combinational.
module hub_normalizer
  import posit_hub_pkg::*;
#(
  parameter int N = 11,
  localparam int FW  = N - ES - 2,
  localparam int AW  = FW + 3,
  localparam int SCW = scale_w(N),
  localparam int RIW = SCW - ES
) (
  input  logic [AW-1:0]          sum,
  input  logic                   guard,
  input  logic signed [SCW-1:0]  scale_big,
  output logic                   s,
  output logic signed [RIW-1:0]  r,
  output logic [ES-1:0]          e,
  output logic [AW-2:0]          frac,
  output logic                   zero,
  output logic                   cancel
);
  logic [AW:0]           t;
  logic [AW:0]           norm;
  logic [$clog2(AW+1)-1:0] lz;
  logic signed [SCW-1:0] scale;
  logic signed [SCW-1:0] u;

  assign t    = {sum, guard};
  assign s    = t[AW];
  assign zero = (t == '0);

  // Leading-bit detector: bits equal to the sign, counted from AW-1 down.
  always_comb begin
    logic stop;
    stop = 1'b0;
    lz   = '0;
    for (int i = AW - 1; i >= 0; i--) begin
      if (!stop && (t[i] == t[AW])) lz = lz + 1'b1;
      else stop = 1'b1;
    end
  end

  assign norm   = t << lz;
  assign frac   = norm[AW-2:0];
  assign scale  = scale_big + SCW'(1) - SCW'(lz);
  assign u      = scale ^ {SCW{s}};
  assign r      = RIW'(u >>> ES);
  assign e      = u[ES-1:0];
  assign cancel = guard & (int'(lz) >= 2);
endmodule
