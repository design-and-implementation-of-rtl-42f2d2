// mod_sqrt_csla_tb: self-checking test of the 128-bit modified square-root
// carry select adder at its default size.
//
// First checks the group layout against the published top groups (127:112,
// 111:97, 96:83, 82:70) and the chosen bottom group (1:0). Then applies
// boundary vectors (full-length carry ripple, carries that stop at every bit
// position) and random vectors, and compares {cout, sum} with a 129-bit
// behavioural sum a + b + cin. A 40-bit instance (groups 9, 8, 7, 6, 5, 4, 1)
// is checked the same way.
`include "csla_vectors.svh"

module mod_sqrt_csla_tb;
  import csla_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [127:0] a, b, sum;
  logic         cin, cout;
  logic [39:0]  a40, b40, sum40;
  logic         cin40, cout40;
  logic [127:0] va, vb;
  logic         vc;
  logic [128:0] expected;
  logic [40:0]  expected40;

  mod_sqrt_csla dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  mod_sqrt_csla #(.WIDTH(40), .MAX_GROUP_W(9)) dut40 (
    .a(a40), .b(b40), .cin(cin40), .sum(sum40), .cout(cout40));

  task automatic check_group(input int g, input int msb, input int lsb);
    checks++;
    if (sqrt_group_lsb(128, 16, g) != lsb ||
        sqrt_group_lsb(128, 16, g) + sqrt_group_width(128, 16, g) - 1 != msb) begin
      failures++;
      $display("FAIL group %0d is %0d:%0d, expected %0d:%0d", g,
               sqrt_group_lsb(128, 16, g) + sqrt_group_width(128, 16, g) - 1,
               sqrt_group_lsb(128, 16, g), msb, lsb);
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
    checks++;
    if (sqrt_num_groups(128, 16) != 13) begin
      failures++;
      $display("FAIL %0d groups, expected 13", sqrt_num_groups(128, 16));
    end
    check_group(12, 127, 112);
    check_group(11, 111, 97);
    check_group(10, 96, 83);
    check_group(9, 82, 70);
    check_group(1, 6, 2);
    check_group(0, 1, 0);

    for (int n = 0; n < 5000; n++) begin
      next_vector(n, 128, va, vb, vc);
      a = va; b = vb; cin = vc;
      next_vector(n, 40, va, vb, vc);
      a40 = va[39:0]; b40 = vb[39:0]; cin40 = vc;
      #1;
      expected = {1'b0, a} + {1'b0, b} + 129'(cin);
      expected40 = {1'b0, a40} + {1'b0, b40} + 41'(cin40);
      checks += 2;
      if ({cout, sum} != expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d a=%h b=%h cin=%0b got %h expected %h",
                   n, a, b, cin, {cout, sum}, expected);
      end
      if ({cout40, sum40} != expected40) begin
        failures++;
        if (failures < 10)
          $display("FAIL W=40 n=%0d a=%h b=%h cin=%0b got %h expected %h",
                   n, a40, b40, cin40, {cout40, sum40}, expected40);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
