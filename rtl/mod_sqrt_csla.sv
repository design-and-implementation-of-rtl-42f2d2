// mod_sqrt_csla: modified square-root carry select adder (BEC based).
//
// Unlike the linear adder, the groups grow by one bit per group towards the
// most significant end, so that a group's ripple adder and converter finish
// at about the time the select carry from the groups below arrives. At the
// default WIDTH = 128 and MAX_GROUP_W = 16 the groups, from the top, are
// 127:112 (16 bits), 111:97 (15), 96:83 (14), 82:70 (13), and so on down to
// 6:2 (5 bits); the two bits 1:0 that remain form the bottom group (13 groups
// in all). The layout is computed by csla_pkg. Every group holds one ripple
// carry adder with carry-in 0, one binary to excess-1 converter and one
// multiplexer (bec_csla_group); the adder's carry input selects the bottom
// group's result.
//
// The 128-bit width, the top group widths and the group structure follow the
// published design; how the widths continue below 82:70 and the 2-bit bottom
// group are this implementation's choice.
//
// Ports: a, b (WIDTH bits), cin; sum (WIDTH bits), cout. Purely
// combinational: {cout, sum} = a + b + cin.
module mod_sqrt_csla
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH       = 128,
  parameter int unsigned MAX_GROUP_W = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NGROUPS = sqrt_num_groups(WIDTH, MAX_GROUP_W);

  // c[g] is the carry into group g; c[NGROUPS] is the adder's carry out.
  logic [NGROUPS:0] c;

  assign c[0] = cin;

  for (genvar g = 0; g < NGROUPS; g++) begin : g_grp
    localparam int GW  = sqrt_group_width(WIDTH, MAX_GROUP_W, g);
    localparam int LSB = sqrt_group_lsb(WIDTH, MAX_GROUP_W, g);

    bec_csla_group #(.W(GW)) u_grp (
      .a   (a[LSB +: GW]),
      .b   (b[LSB +: GW]),
      .cin (c[g]),
      .sum (sum[LSB +: GW]),
      .cout(c[g+1])
    );
  end

  assign cout = c[NGROUPS];
endmodule
