// full_adder: one-bit full adder, the cell of ripple_carry_adder.
//
// sum  = a ^ b ^ cin
// cout = majority(a, b, cin) = (a & b) | (cin & (a ^ b))
// The multiplier description names full adders as the cells of its ripple
// carry adders but does not give their gates; the two-level sum/majority form
// used here is this design's choice.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;  // propagate

  assign p    = a ^ b;
  assign sum  = p ^ cin;
  assign cout = (a & b) | (cin & p);
endmodule
