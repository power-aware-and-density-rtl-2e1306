// Mantissa neutralizer: switches off the segments of the mantissa adder that
// hold no live bits.
//
// The mantissa adder is built for the largest significand, but the regime
// length of each operand decides how many fraction bits it really has, and
// everything below the lowest live bit is zero. The segments are the groups
// of the square-root carry-select adder (csla_bec, same boundaries from
// posit_hub_pkg). A segment is enabled when its top bit is at or above
// lsb_pos; the operand bits of a disabled segment are forced to 0, so that
// segment's ripple-carry adder, excess-1 converter and mux hold still. Since
// those bits are zero already when lsb_pos is right, the sum is unchanged.
// AND-gating of the operands is this design's choice of how a segment is
// switched off. Purely combinational.
module mantissa_neutralizer
  import posit_hub_pkg::*;
#(
  parameter int WIDTH = 16,
  localparam int NG = num_grps(WIDTH),
  localparam int LW = $clog2(WIDTH) + 1
) (
  input  logic [WIDTH-1:0] a_in,
  input  logic [WIDTH-1:0] b_in,
  input  logic [LW-1:0]    lsb_pos,
  output logic [WIDTH-1:0] a_out,
  output logic [WIDTH-1:0] b_out,
  output logic [NG-1:0]    seg_en
);
  logic [WIDTH-1:0] mask;

  for (genvar g = 0; g < NG; g++) begin : g_seg
    localparam int LO = grp_lo(g);
    localparam int HI = grp_hi(g, WIDTH);
    assign seg_en[g]      = (int'(lsb_pos) <= HI);
    assign mask[HI:LO]    = {(HI - LO + 1){seg_en[g]}};
  end

  assign a_out = a_in & mask;
  assign b_out = b_in & mask;
endmodule
