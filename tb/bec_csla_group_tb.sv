// bec_csla_group_tb: self-checking test of one BEC-based carry select group.
//
// The 4-bit group (default) is checked for every operand pair and both
// incoming carries; a 16-bit and a 2-bit group, the widest and narrowest of
// the square-root adder, are checked with random and boundary operands.
// Expected value: {cout, sum} = a + b + cin.
module bec_csla_group_tb;
  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4, s4;
  logic        c4, co4;
  logic [15:0] a16, b16, s16;
  logic        c16, co16;
  logic [1:0]  a2, b2, s2;
  logic        c2, co2;

  bec_csla_group           u4  (.a(a4),  .b(b4),  .cin(c4),  .sum(s4),  .cout(co4));
  bec_csla_group #(.W(16)) u16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));
  bec_csla_group #(.W(2))  u2  (.a(a2),  .b(b2),  .cin(c2),  .sum(s2),  .cout(co2));

  task automatic check16(input int unsigned x, input int unsigned y, input int unsigned ci);
    a16 = 16'(x); b16 = 16'(y); c16 = 1'(ci);
    #1;
    checks++;
    if ({co16, s16} != 17'(x + y + ci)) begin
      failures++;
      if (failures < 10) $display("FAIL W=16 %h+%h+%0d -> %h", x, y, ci, {co16, s16});
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          a4 = 4'(x); b4 = 4'(y); c4 = 1'(ci);
          #1;
          checks++;
          if ({co4, s4} != 5'(x + y + ci)) begin
            failures++;
            if (failures < 10) $display("FAIL W=4 %0d+%0d+%0d -> %0d", x, y, ci, {co4, s4});
          end
        end
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 4; x++)
        for (int y = 0; y < 4; y++) begin
          a2 = 2'(x); b2 = 2'(y); c2 = 1'(ci);
          #1;
          checks++;
          if ({co2, s2} != 3'(x + y + ci)) begin
            failures++;
            $display("FAIL W=2 %0d+%0d+%0d -> %0d", x, y, ci, {co2, s2});
          end
        end
    check16(32'hffff, 0, 1);
    check16(32'hffff, 32'hffff, 1);
    check16(32'hffff, 32'hffff, 0);
    check16(0, 0, 1);
    for (int n = 0; n < 3000; n++) check16($urandom & 32'hffff, $urandom & 32'hffff, $urandom & 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
