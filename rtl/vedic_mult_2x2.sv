// vedic_mult_2x2: 2x2-bit unsigned multiplier, vertically and crosswise.
//
// The Urdhva Tiryagbhyam ("vertically and crosswise") rule on two-bit
// operands a = a1a0 and b = b1b0:
//   vertical right : p0 = a0&b0
//   crosswise      : a0&b1 + a1&b0      -> half adder -> p1, carry c1
//   vertical left  : a1&b1 + c1         -> half adder -> p2, carry p3
// Four AND gates form the partial products, all at once; two half adders
// sum them. This is exactly the structure of the 2x2 block in the source
// description.
//
// Interface: a, b (2 bits) in; p (4 bits) = a * b out.
// Purely combinational, no clock.
module vedic_mult_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;

  assign p[0] = a[0] & b[0];

  half_adder u_ha_cross (
    .a    (a[0] & b[1]),
    .b    (a[1] & b[0]),
    .sum  (p[1]),
    .carry(c1)
  );

  half_adder u_ha_left (
    .a    (a[1] & b[1]),
    .b    (c1),
    .sum  (p[2]),
    .carry(p[3])
  );
endmodule
