// tb_vedic_mult_table1: the Vedic multiplier at the operand widths of the
// published comparison, 2, 8 and 16 bits (4 bits is tb_vedic_mult).
//
// The 2-bit and 8-bit instances are checked exhaustively (16 and 65536
// pairs), the 16-bit one with the corner cases 0, 1 and all-ones plus random
// operands. Products are compared with integer multiplication. At 8 and 16
// bits the carries ca1 and ca2 of the outermost adder stage must each occur.
module tb_vedic_mult_table1;
  logic [1:0]  a2, b2;
  logic [3:0]  p2;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;
  int n8_ca1 = 0, n8_ca2 = 0, n16_ca1 = 0, n16_ca2 = 0;

  vedic_mult #(.WIDTH(2))  dut2  (.a(a2),  .b(b2),  .p(p2));
  vedic_mult #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mult #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .p(p16));

  // Carries of the outermost adder stage for w-bit operands, worked out from
  // the operands alone: ca1 = carry of aH*bL + aL*bH out of w bits, ca2 =
  // carry of adding (aL*bL) >> w/2 to the low w bits of that sum.
  task automatic carries(input longint x, input longint y, input int w,
                         output bit c1, output bit c2);
    longint h, xh, xl, yh, yl, m;
    h  = longint'(w) / 2;
    xh = x >> h; xl = x & ((64'd1 << h) - 1);
    yh = y >> h; yl = y & ((64'd1 << h) - 1);
    m  = xh * yl + xl * yh;
    c1 = (m >> w) != 0;
    c2 = (((m & ((64'd1 << w) - 1)) + ((xl * yl) >> h)) >> w) != 0;
  endtask

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    bit c1, c2;
    a16 = x; b16 = y;
    #1;
    checks++;
    if (p16 != 32'(longint'(x) * longint'(y))) begin
      failures++;
      $display("FAIL16 %0d * %0d -> %0d", x, y, p16);
    end
    carries(64'(x), 64'(y), 16, c1, c2);
    if (c1) n16_ca1++;
    if (c2) n16_ca2++;
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
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit c1, c2;
    for (int i = 0; i < 16; i++) begin
      {a2, b2} = 4'(i);
      #1;
      checks++;
      if (p2 != 4'(int'(a2) * int'(b2))) begin
        failures++;
        $display("FAIL2 %0d * %0d -> %0d", a2, b2, p2);
      end
    end
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (p8 != 16'(int'(a8) * int'(b8))) begin
        failures++;
        if (failures < 20) $display("FAIL8 %0d * %0d -> %0d", a8, b8, p8);
      end
      carries(64'(a8), 64'(b8), 8, c1, c2);
      if (c1) n8_ca1++;
      if (c2) n8_ca2++;
    end
    check16(16'd0, 16'hFFFF);
    check16(16'd1, 16'hFFFF);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'hFFFE, 16'hFFFF);
    for (int i = 0; i < 20000; i++)
      check16(16'($urandom), 16'($urandom));
    require("8-bit ca1", n8_ca1);
    require("8-bit ca2", n8_ca2);
    require("16-bit ca1", n16_ca1);
    require("16-bit ca2", n16_ca2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
