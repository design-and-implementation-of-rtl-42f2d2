// bec_tb: self-checking test of the binary to excess-1 converter.
//
// The 5-bit converter (default size, used by 4-bit groups) and a 2-bit one
// (the smallest, used by 1-bit groups) are checked for every input; the
// 17-bit one of a 16-bit group is checked with random inputs and with the
// all-ones and all-ones-but-top patterns, where the add-one carry runs the
// whole length. Expected value: x + 1 modulo 2^W.
module bec_tb;
  int checks = 0;
  int failures = 0;

  logic [4:0]  x5, y5;
  logic [1:0]  x2, y2;
  logic [16:0] x17, y17;

  bec           u5  (.x(x5),  .y(y5));
  bec #(.W(2))  u2  (.x(x2),  .y(y2));
  bec #(.W(17)) u17 (.x(x17), .y(y17));

  task automatic check17(input logic [16:0] v);
    x17 = v;
    #1;
    checks++;
    if (y17 != 17'(v + 17'd1)) begin
      failures++;
      $display("FAIL W=17 x=%h y=%h", v, y17);
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
    for (int v = 0; v < 32; v++) begin
      x5 = 5'(v);
      #1;
      checks++;
      if (y5 != 5'(v + 1)) begin
        failures++;
        $display("FAIL W=5 x=%0d y=%0d", v, y5);
      end
    end
    for (int v = 0; v < 4; v++) begin
      x2 = 2'(v);
      #1;
      checks++;
      if (y2 != 2'(v + 1)) begin
        failures++;
        $display("FAIL W=2 x=%0d y=%0d", v, y2);
      end
    end
    check17('1);
    check17(17'h0ffff);
    check17('0);
    for (int n = 0; n < 17; n++) check17(17'((1 << n) - 1));
    for (int n = 0; n < 2000; n++) check17(17'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
