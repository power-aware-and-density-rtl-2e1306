// One-bit full adder, the cell the ripple-carry groups are built from.
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
