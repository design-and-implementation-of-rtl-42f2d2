// mod_linear_csla: modified linear carry select adder (BEC based).
//
// The WIDTH-bit operands are cut into WIDTH/GROUP_W groups of equal width
// (32 groups of 4 bits at the default 128/4). Every group holds one ripple
// carry adder with carry-in 0, one binary to excess-1 converter and one
// multiplexer (see bec_csla_group); the carry out of each group selects the
// result of the next one, and the adder's own carry input selects the
// result of the lowest group. All groups compute in parallel, so the critical
// path is one 4-bit ripple adder plus converter followed by a chain of
// WIDTH/GROUP_W multiplexers.
//
// The 128-bit width, the 4-bit groups and the structure of a group follow the
// published design; treating the lowest group like every other one (rather
// than as a plain ripple adder fed with cin) is this implementation's choice.
//
// Ports: a, b (WIDTH bits), cin; sum (WIDTH bits), cout. Purely
// combinational: {cout, sum} = a + b + cin.
module mod_linear_csla
#(
  parameter int unsigned WIDTH   = 128,
  parameter int unsigned GROUP_W = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NGROUPS = WIDTH / GROUP_W;

  if (WIDTH % GROUP_W != 0) begin : g_bad_width
    $error("mod_linear_csla: WIDTH must be a multiple of GROUP_W");
  end

  // c[g] is the carry into group g; c[NGROUPS] is the adder's carry out.
  logic [NGROUPS:0] c;

  assign c[0] = cin;

  for (genvar g = 0; g < NGROUPS; g++) begin : g_grp
    bec_csla_group #(.W(GROUP_W)) u_grp (
      .a   (a[g*GROUP_W +: GROUP_W]),
      .b   (b[g*GROUP_W +: GROUP_W]),
      .cin (c[g]),
      .sum (sum[g*GROUP_W +: GROUP_W]),
      .cout(c[g+1])
    );
  end

  assign cout = c[NGROUPS];
endmodule
