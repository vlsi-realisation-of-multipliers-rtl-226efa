// tb_ripple_carry_adder: self-checking test of ripple_carry_adder.
// At the default width of 4 it applies every a, b and cin (512 cases); a
// second instance at 16 bits gets random operands plus the full-length carry
// ripple 0xFFFF + 0 + 1. {cout, sum} is compared with the integer a + b + cin.
module tb_ripple_carry_adder;
  logic [3:0]  a4, b4, s4;
  logic        c4, co4;
  logic [15:0] a16, b16, s16;
  logic        c16, co16;
  int checks = 0, failures = 0;

  ripple_carry_adder dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  ripple_carry_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic ci);
    a16 = x; b16 = y; c16 = ci;
    #1;
    checks++;
    if ({co16, s16} != 17'(int'(x) + int'(y) + int'(ci))) begin
      failures++;
      $display("FAIL16 %h + %h + %0b -> %0b %h", x, y, ci, co16, s16);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(c4))) begin
        failures++;
        $display("FAIL4 %h + %h + %0b -> %0b %h", a4, b4, c4, co4, s4);
      end
    end
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    for (int i = 0; i < 2000; i++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
