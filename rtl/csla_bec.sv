// Modified square-root carry-select adder (CSLA) with binary to excess-1
// converters (BEC).
//
// The operands are cut into groups of 2, 2, 3, 4, 5, ... bits (for the
// default 16 bits: [1:0], [3:2], [6:4], [10:7], [15:11]). The lowest group is
// a ripple-carry adder fed by cin. Every other group of n bits has one
// ripple-carry adder with carry-in 0, and an (n+1)-bit BEC that adds one to
// that adder's {carry, sum}; this replaces the second ripple-carry adder with
// carry-in 1 of the regular CSLA. A mux driven by the carry out of the group
// below chooses between the two, so the carry crosses each group through one
// mux. For widths other than 16 the group sizes continue 6, 7, ... and the top
// group is cut to fit; that continuation is this design's choice.
// Purely combinational: {cout, sum} = a + b + cin.
module csla_bec
  import posit_hub_pkg::*;
#(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NG = num_grps(WIDTH);

  logic [NG:0] c;  // c[g] is the carry into group g
  assign c[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int LO = grp_lo(g);
    localparam int HI = grp_hi(g, WIDTH);
    localparam int W  = HI - LO + 1;
    if (g == 0) begin : g_first
      rca #(.WIDTH(W)) u_rca (
        .a(a[HI:LO]), .b(b[HI:LO]), .cin(c[0]), .sum(sum[HI:LO]), .cout(c[1])
      );
    end else begin : g_sel
      logic [W-1:0] s0;
      logic         c0;
      logic [W:0]   x1;
      rca #(.WIDTH(W)) u_rca (
        .a(a[HI:LO]), .b(b[HI:LO]), .cin(1'b0), .sum(s0), .cout(c0)
      );
      bec #(.WIDTH(W + 1)) u_bec (.b({c0, s0}), .x(x1));
      assign {c[g+1], sum[HI:LO]} = c[g] ? x1 : {c0, s0};
    end
  end

  assign cout = c[NG];
endmodule
