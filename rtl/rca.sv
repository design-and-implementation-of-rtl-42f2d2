// rca: W-bit ripple carry adder.
//
// A chain of W full adders; bit i takes its carry from bit i-1, so the delay
// grows linearly with W. In the carry select adders every group holds one of
// these with its carry input tied to 0. The default W = 4 is the group width
// of the linear adder. Purely combinational. Ripple adders with carry-in 0
// are part of the published group structure; building them from full-adder
// cells is the obvious choice, not a published detail.
//
// Ports: a, b (W bits), cin; sum (W bits), cout.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
