// bec_csla_group: one W-bit group of a BEC-based carry select adder.
//
// The group's ripple carry adder adds a and b with its carry input tied to 0,
// giving the (W+1)-bit word {c0, s0}. A (W+1)-bit binary to excess-1
// converter adds one to that word, which is exactly the result for carry-in 1,
// {c1, s1}. The incoming carry cin (the carry out of the group below) drives
// the (W+1)-bit multiplexer that picks one of the two words. Because a + b is
// at most 2^(W+1) - 2, adding one never overflows the W+1 bits.
//
// The RCA and BEC work while the lower groups still settle; only the
// multiplexer lies on the carry path between groups. Purely combinational.
// This structure (one RCA with carry-in 0, a (W+1)-bit BEC and a (W+1)-bit
// multiplexer per group) is the published one.
//
// Ports: a, b (W bits), cin; sum (W bits), cout.
module bec_csla_group #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] r0;  // {carry, sum} for carry-in 0
  logic [W:0] r1;  // {carry, sum} for carry-in 1

  rca #(.W(W)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (r0[W-1:0]),
    .cout(r0[W])
  );

  bec #(.W(W + 1)) u_bec (
    .x(r0),
    .y(r1)
  );

  csel_mux #(.W(W + 1)) u_mux (
    .sel(cin),
    .d0 (r0),
    .d1 (r1),
    .y  ({cout, sum})
  );
endmodule
