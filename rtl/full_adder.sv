// full_adder: one-bit full adder, the cell the ripple carry adders are
// chained from. Purely combinational: sum = a ^ b ^ cin, and the carry out is
// the majority of the three inputs. The published design names ripple
// carry adders but not their gates; these are the textbook equations.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end
endmodule
