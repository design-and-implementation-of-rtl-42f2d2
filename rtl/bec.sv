// bec: W-bit binary to excess-1 converter (an "add one" circuit).
//
// Produces y = x + 1 (mod 2^W) with far fewer gates than a W-bit adder: bit 0
// is inverted, and every higher bit i is toggled when all bits below it are 1,
// i.e. y[i] = x[i] ^ (x[0] & ... & x[i-1]). The AND terms are built as a
// chain. In a carry select group the converter takes the (W-1)-bit sum plus
// carry of the group's ripple adder, which was computed for carry-in 0, and
// turns it into the result for carry-in 1, replacing the second ripple adder
// of a conventional carry select adder. The default W = 5 matches the 4-bit
// groups of the linear adder (4 sum bits + carry). Purely combinational.
// The converter's function and widths follow the published design; this
// gate-level form is the simplest add-one and is this implementation's own.
//
// Ports: x (W bits) in, y (W bits) out.
module bec #(
  parameter int unsigned W = 5  // at least 2
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  // all_ones[i] = x[0] & ... & x[i]; the top bit's term is never needed.
  logic [W-2:0] all_ones;

  assign all_ones[0] = x[0];
  assign y[0]        = ~x[0];

  for (genvar i = 1; i < W - 1; i++) begin : g_and
    assign all_ones[i] = all_ones[i-1] & x[i];
  end

  for (genvar i = 1; i < W; i++) begin : g_bit
    assign y[i] = x[i] ^ all_ones[i-1];
  end
endmodule
