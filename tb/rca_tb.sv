// rca_tb: self-checking test of the ripple carry adder.
//
// Checks a 4-bit adder (the default size) and an 8-bit one exhaustively,
// every operand pair with both carry inputs, and a 16-bit one with random
// operands, against integer addition.
module rca_tb;
  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4, s4;
  logic        c4, co4;
  logic [7:0]  a8, b8, s8;
  logic        c8, co8;
  logic [15:0] a16, b16, s16;
  logic        c16, co16;

  rca                u4  (.a(a4),  .b(b4),  .cin(c4),  .sum(s4),  .cout(co4));
  rca #(.W(8))       u8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  rca #(.W(16))      u16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  initial begin
    #100000000;
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
            $display("FAIL W=4 %0d+%0d+%0d -> %0d", x, y, ci, {co4, s4});
          end
        end
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          a8 = 8'(x); b8 = 8'(y); c8 = 1'(ci);
          #1;
          checks++;
          if ({co8, s8} != 9'(x + y + ci)) begin
            failures++;
            if (failures < 10) $display("FAIL W=8 %0d+%0d+%0d -> %0d", x, y, ci, {co8, s8});
          end
        end
    for (int n = 0; n < 2000; n++) begin
      int unsigned x, y, ci;
      x = $urandom & 32'hffff; y = $urandom & 32'hffff; ci = $urandom & 1;
      a16 = 16'(x); b16 = 16'(y); c16 = 1'(ci);
      #1;
      checks++;
      if ({co16, s16} != 17'(x + y + ci)) begin
        failures++;
        if (failures < 10) $display("FAIL W=16 %0d+%0d+%0d", x, y, ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
