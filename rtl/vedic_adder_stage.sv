// vedic_adder_stage: combines four half-size products into one full product.
//
// For WIDTH-bit operands split into halves of H = WIDTH/2 bits, the four
// H x H products (each WIDTH bits wide) are
//   q_ll = aL*bL   q_hl = aH*bL   q_lh = aL*bH   q_hh = aH*bH
// and the product is q_hh*2^WIDTH + (q_hl + q_lh)*2^H + q_ll. Three WIDTH-bit
// ripple carry adders form it:
//   RCA1: q_hl + q_lh                          -> s1, carry ca1
//   RCA2: s1 + {H'b0, q_ll[WIDTH-1:H]}         -> s2, carry ca2
//   RCA3: q_hh + {0.., ca1|ca2, s2[WIDTH-1:H]} -> s3, carry ca3 (always 0)
//   p = {s3, s2[H-1:0], q_ll[H-1:0]}
// At WIDTH = 4 this is the adder network of the 4x4 Vedic multiplier: three
// 4-bit ripple carry adders, with the "00" padding on the second adder's
// operand, bits 1..0 of the right-hand product passed straight to the output.
//
// Departure from the source description, kept on purpose: it feeds RCA3 with
// {ca1, 0, s2[3:2]} and leaves ca2 open. That places ca1 one bit too high and
// drops ca2, and gives wrong products (15*15 -> 33, 14*15 -> 146). Both
// carries weigh bit H of RCA3's second operand, and they can never both be 1
// (q_hl + q_lh + q_ll/2^H < 2^(WIDTH+1)), so one OR gate merges them. The
// product fits in 2*WIDTH bits, so RCA3 never carries out; an assertion
// checks that.
//
// Interface: four WIDTH-bit products in, p (2*WIDTH bits) out. Purely
// combinational, no clock.
module vedic_adder_stage #(
  parameter int unsigned WIDTH = 4  // width of each input product, even
) (
  input  logic [WIDTH-1:0]   q_ll,  // low  x low
  input  logic [WIDTH-1:0]   q_hl,  // high x low  (crosswise)
  input  logic [WIDTH-1:0]   q_lh,  // low  x high (crosswise)
  input  logic [WIDTH-1:0]   q_hh,  // high x high
  output logic [2*WIDTH-1:0] p
);
  localparam int unsigned H = WIDTH / 2;

  logic [WIDTH-1:0] s1, s2, s3;     // the three adder sums
  logic             ca1, ca2, ca3;  // the three adder carries
  logic [WIDTH-1:0] rc2_b, rc3_b;   // aligned second operands

  // RCA1: sum of the two crosswise products
  ripple_carry_adder #(.WIDTH(WIDTH)) u_rca1 (
    .a   (q_hl),
    .b   (q_lh),
    .cin (1'b0),
    .sum (s1),
    .cout(ca1)
  );

  // RCA2: add the upper half of the low x low product
  assign rc2_b = {{H{1'b0}}, q_ll[WIDTH-1:H]};

  ripple_carry_adder #(.WIDTH(WIDTH)) u_rca2 (
    .a   (s1),
    .b   (rc2_b),
    .cin (1'b0),
    .sum (s2),
    .cout(ca2)
  );

  // RCA3: add the middle column's upper half and its carry to high x high
  always_comb begin
    rc3_b        = '0;
    rc3_b[H-1:0] = s2[WIDTH-1:H];
    rc3_b[H]     = ca1 | ca2;
  end

  ripple_carry_adder #(.WIDTH(WIDTH)) u_rca3 (
    .a   (q_hh),
    .b   (rc3_b),
    .cin (1'b0),
    .sum (s3),
    .cout(ca3)
  );

  assign p = {s3, s2[H-1:0], q_ll[H-1:0]};

  always_comb begin
    assert final (!ca3) else $error("vedic_adder_stage: RCA3 carry out set");
  end
endmodule
