// Ripple-carry adder of WIDTH full adders (default 4, the block size of the
// basic carry-select building block). The carry ripples from bit 0 to bit
// WIDTH-1; cout is the carry out of the top cell. Purely combinational.
module rca #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule
