// vedic_mult: WIDTH x WIDTH-bit unsigned Vedic multiplier (top of the design).
//
// Urdhva Tiryagbhyam ("vertically and crosswise") multiplication by halving:
// an N-bit product is built from four N/2-bit products (low x low, the two
// crosswise ones, high x high), all formed at once, and one adder stage
// (vedic_adder_stage, three ripple carry adders). At the default WIDTH = 4
// this is the 4x4 multiplier of the source design: four 2x2 Vedic
// multipliers (vedic_mult_2x2) feeding three 4-bit ripple carry adders.
//
// Wider operands (8, 16, ... any power of two) apply the halving again at
// each level. The tree is laid out level by level rather than by recursive
// instantiation: level 1 multiplies every pair of 2-bit operand digits with
// a vedic_mult_2x2; level k combines, for every pair of 2^k-bit digits
// (i, j), the four level k-1 products of its sub-digits with a
// vedic_adder_stage of width 2^k. The last level has a single digit pair,
// the whole operands. Its hardware is the same as the recursive description:
// (WIDTH/2)^2 2x2 multipliers, and (WIDTH/2^k)^2 adder stages at level k.
// Extending the 4x4 structure to other widths in this way is this design's
// choice; only the 4x4 one is drawn in full in the source.
//
// Interface: a, b (WIDTH bits) in; p (2*WIDTH bits) = a * b out.
// Purely combinational, no clock: the product is valid one propagation delay
// after the operands settle.
module vedic_mult #(
  parameter int unsigned WIDTH = 4  // operand width, a power of two >= 2
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);
  localparam int unsigned LEVELS = $clog2(WIDTH);

  if (WIDTH < 2 || (WIDTH & (WIDTH - 1)) != 0) begin : g_bad_width
    $error("vedic_mult: WIDTH must be a power of two >= 2");
  end

  // g_lvl[k].prod[i*N + j] = (digit i of a) * (digit j of b), with digits of
  // C = 2^k bits and N = WIDTH / C digits per operand.
  for (genvar k = 1; k <= LEVELS; k++) begin : g_lvl
    localparam int unsigned C = 1 << k;
    localparam int unsigned N = WIDTH / C;

    logic [N*N-1:0][2*C-1:0] prod;

    for (genvar i = 0; i < N; i++) begin : g_i
      for (genvar j = 0; j < N; j++) begin : g_j
        if (k == 1) begin : g_2x2
          vedic_mult_2x2 u_m2 (
            .a(a[2*i +: 2]),
            .b(b[2*j +: 2]),
            .p(prod[i*N + j])
          );
        end else begin : g_stage
          // sub-digits of the previous level: 2i (low) and 2i+1 (high)
          localparam int unsigned NP = 2 * N;

          vedic_adder_stage #(.WIDTH(C)) u_add (
            .q_ll(g_lvl[k-1].prod[(2*i)   * NP + (2*j)]),
            .q_hl(g_lvl[k-1].prod[(2*i+1) * NP + (2*j)]),
            .q_lh(g_lvl[k-1].prod[(2*i)   * NP + (2*j+1)]),
            .q_hh(g_lvl[k-1].prod[(2*i+1) * NP + (2*j+1)]),
            .p   (prod[i*N + j])
          );
        end
      end
    end
  end

  assign p = g_lvl[LEVELS].prod[0];
endmodule
