// csel_mux_tb: self-checking test of the carry select multiplexer.
//
// Drives random data words on both inputs of a 5-bit (default) and a 17-bit
// multiplexer with each select value and checks the chosen word.
module csel_mux_tb;
  int checks = 0;
  int failures = 0;

  logic        s5, s17;
  logic [4:0]  a5, b5, y5;
  logic [16:0] a17, b17, y17;

  csel_mux           u5  (.sel(s5),  .d0(a5),  .d1(b5),  .y(y5));
  csel_mux #(.W(17)) u17 (.sel(s17), .d0(a17), .d1(b17), .y(y17));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      a5 = 5'($urandom); b5 = 5'($urandom);
      a17 = 17'($urandom); b17 = 17'($urandom);
      s5 = 1'(n); s17 = 1'(n >> 1);
      #1;
      checks += 2;
      if (y5 != (s5 ? b5 : a5)) begin
        failures++;
        $display("FAIL W=5 sel=%0b d0=%h d1=%h y=%h", s5, a5, b5, y5);
      end
      if (y17 != (s17 ? b17 : a17)) begin
        failures++;
        $display("FAIL W=17 sel=%0b d0=%h d1=%h y=%h", s17, a17, b17, y17);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
