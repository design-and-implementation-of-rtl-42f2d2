// csel_mux: W-bit 2:1 multiplexer of a carry select group.
//
// Picks d0 (the result computed for carry-in 0) when sel is 0 and d1 (the
// result for carry-in 1) when sel is 1; sel is the carry out of the group
// below. A 4-bit group selects 5 bits out of 10 (sum and carry of each
// candidate), hence the default W = 5. Purely combinational. The widths
// follow the published design; carry 1 picking d1 is implied by what the two
// inputs carry.
//
// Ports: sel, d0, d1 (W bits) in; y (W bits) out.
module csel_mux #(
  parameter int unsigned W = 5
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
