// Binary to excess-1 converter: x = b + 1 (modulo 2^WIDTH) without an adder.
// Bit 0 is inverted; every higher bit i is XORed with the AND of all bits
// below it, the AND being built as a chain as in the 4-bit structure
// (X0 = ~B0, X1 = B1^B0, X2 = B2^(B1&B0), X3 = B3^(B2&B1&B0)). The default
// width of 4 is that structure; wider converters continue the chain.
// Purely combinational.
module bec #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);
  logic [WIDTH-1:0] all_ones;  // all_ones[i] = &b[i:0]
  assign all_ones[0] = b[0];
  assign x[0]        = ~b[0];
  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    assign all_ones[i] = all_ones[i-1] & b[i];
    assign x[i]        = b[i] ^ all_ones[i-1];
  end
endmodule
