// ripple_carry_adder: WIDTH-bit ripple carry adder.
//
// A chain of WIDTH full_adder cells. Cell i adds a[i], b[i] and the carry of
// cell i-1; cell 0 takes cin and the last cell's carry is cout, so
// {cout, sum} = a + b + cin. The carry ripples through all WIDTH cells, so
// the delay grows linearly with WIDTH. The Vedic multiplier uses three of
// these per recursion level; the default WIDTH of 4 is the adder width of the
// 4x4 multiplier. The cell-chain structure is the textbook ripple carry adder.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout out.
// Purely combinational, no clock.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;  // c[i] is the carry into cell i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
