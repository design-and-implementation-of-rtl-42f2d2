// mod_linear_csla_tb: self-checking test of the 128-bit modified linear
// carry select adder at its default size (32 groups of 4 bits).
//
// Applies boundary vectors (full-length carry ripple, carries that stop at
// every bit position) and random vectors, and compares {cout, sum} with a
// 129-bit behavioural sum a + b + cin.
`include "csla_vectors.svh"

module mod_linear_csla_tb;
  int checks = 0;
  int failures = 0;

  logic [127:0] a, b, sum;
  logic         cin, cout;
  logic [127:0] va, vb;
  logic         vc;
  logic [128:0] expected;

  mod_linear_csla dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      next_vector(n, 128, va, vb, vc);
      a = va; b = vb; cin = vc;
      #1;
      expected = {1'b0, a} + {1'b0, b} + 129'(cin);
      checks++;
      if ({cout, sum} != expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d a=%h b=%h cin=%0b got %h expected %h",
                   n, a, b, cin, {cout, sum}, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
