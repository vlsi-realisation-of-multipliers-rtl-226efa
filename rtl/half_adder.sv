// half_adder: one-bit half adder.
//
// Adds two bits: sum = a ^ b, carry = a & b. The 2x2 Vedic multiplier
// (vedic_mult_2x2) is built from two of these. The cell itself is only drawn
// as a box in the source description; the XOR/AND gate pair is the standard
// realisation and this design's choice.
//
// Interface: a, b in; sum, carry out. Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
