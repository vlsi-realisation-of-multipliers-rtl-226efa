// tb_vedic_adder_stage: self-checking test of the three-adder combining
// stage.
//
// At the default width of 4 the four inputs are the 2x2 products of every
// pair of 4-bit operands (aL*bL, aH*bL, aL*bH, aH*bH, computed here as
// integers), 256 cases; the output must equal a * b. A second instance at
// width 8 gets the products of random 8-bit operands. The 14 * 15 and
// 15 * 15 cases, where the middle column's carry must land on the right bit,
// are applied first.
module tb_vedic_adder_stage;
  logic [3:0]  ll4, hl4, lh4, hh4;
  logic [7:0]  p4;
  logic [7:0]  ll8, hl8, lh8, hh8;
  logic [15:0] p8;
  int checks = 0, failures = 0;

  vedic_adder_stage dut4 (.q_ll(ll4), .q_hl(hl4), .q_lh(lh4), .q_hh(hh4), .p(p4));
  vedic_adder_stage #(.WIDTH(8)) dut8 (.q_ll(ll8), .q_hl(hl8), .q_lh(lh8), .q_hh(hh8), .p(p8));

  task automatic check4(input int x, input int y);
    ll4 = 4'((x & 3) * (y & 3));
    hl4 = 4'((x >> 2) * (y & 3));
    lh4 = 4'((x & 3) * (y >> 2));
    hh4 = 4'((x >> 2) * (y >> 2));
    #1;
    checks++;
    if (p4 != 8'(x * y)) begin
      failures++;
      $display("FAIL4 %0d * %0d -> %0d", x, y, p4);
    end
  endtask

  task automatic check8(input int x, input int y);
    ll8 = 8'((x & 15) * (y & 15));
    hl8 = 8'((x >> 4) * (y & 15));
    lh8 = 8'((x & 15) * (y >> 4));
    hh8 = 8'((x >> 4) * (y >> 4));
    #1;
    checks++;
    if (p8 != 16'(x * y)) begin
      failures++;
      $display("FAIL8 %0d * %0d -> %0d", x, y, p8);
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
    check4(14, 15);
    check4(15, 15);
    for (int i = 0; i < 256; i++)
      check4(i >> 4, i & 15);
    check8(255, 255);
    check8(254, 255);
    for (int i = 0; i < 2000; i++)
      check8(int'($urandom & 255), int'($urandom & 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
