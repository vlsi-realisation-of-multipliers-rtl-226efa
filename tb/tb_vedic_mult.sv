// tb_vedic_mult: end-to-end test of the 4x4 Vedic multiplier at its default
// parameters.
//
// Applies all 256 operand pairs, one every 10 ns like a bench stimulus, and
// compares the 8-bit product with a * b computed as integers. It also counts
// how often each carry path of the adder stage is exercised: the carry out
// of the crosswise adder (ca1), the carry out of the second adder (ca2), and
// cases where the middle column carries into the upper half at all. Each of
// these must occur at least once; 14 * 15 and 15 * 15 are applied by name
// since they are the cases that need ca2 and ca1 to land on the right bit.
// 5 * 15 (= 75) is the operand pair of the reference bench waveform.
module tb_vedic_mult;
  localparam int unsigned W = 4;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0, n_mid_carry = 0;

  vedic_mult dut (.a(a), .b(b), .p(p));

  // Carries of the adder stage, worked out from the operands alone:
  // ca1 = carry of aH*bL + aL*bH, ca2 = carry of adding (aL*bL) >> 2 to the
  // low four bits of that sum.
  task automatic carries(input logic [W-1:0] x, input logic [W-1:0] y,
                         output bit c1, output bit c2);
    int xh, xl, yh, yl, m;
    xh = int'(x) >> 2; xl = int'(x) & 3;
    yh = int'(y) >> 2; yl = int'(y) & 3;
    m  = xh * yl + xl * yh;
    c1 = (m >= 16);
    c2 = ((m % 16) + ((xl * yl) >> 2)) >= 16;
  endtask

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
    bit c1, c2;
    a = x; b = y;
    #10;
    checks++;
    if (p != (2*W)'(int'(x) * int'(y))) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d (expected %0d)", x, y, p, int'(x) * int'(y));
    end
    carries(x, y, c1, c2);
    if (c1) n_ca1++;
    if (c2) n_ca2++;
    if (c1 || c2) n_mid_carry++;
  endtask

  task automatic require(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("mechanism %s exercised %0d times", what, n);
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(4'd14, 4'd15);
    apply(4'd15, 4'd15);
    apply(4'd5,  4'd15);
    for (int i = 0; i < (1 << (2*W)); i++)
      apply(W'(i >> W), W'(i));
    require("crosswise adder carry ca1", n_ca1);
    require("second adder carry ca2", n_ca2);
    require("middle column carry into upper half", n_mid_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
