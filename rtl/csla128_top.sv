// csla128_top: the two proposed 128-bit BEC-based carry select adders side
// by side.
//
// Both adders compute {cout, sum} = a + b + cin in one combinational pass;
// they differ only in how the word is cut into groups. The linear adder uses
// equal 4-bit groups; the square-root adder uses groups that widen towards
// the top (16 bits at 127:112), which shortens its multiplexer chain. Each
// adder has its own operand and result ports so that either can be used, or
// both compared, on its own. Both adders are published proposals; putting
// them in one top with separate ports is this implementation's choice.
//
// Ports: lin_* belong to the linear adder and sqrt_* to the square-root
// adder; each set is a, b (WIDTH bits), cin in and sum (WIDTH bits), cout out.
module csla128_top
#(
  parameter int unsigned WIDTH                = 128,
  parameter int unsigned LIN_GROUP_WIDTH      = 4,
  parameter int unsigned SQRT_MAX_GROUP_WIDTH = 16
) (
  input  logic [WIDTH-1:0] lin_a,
  input  logic [WIDTH-1:0] lin_b,
  input  logic             lin_cin,
  output logic [WIDTH-1:0] lin_sum,
  output logic             lin_cout,

  input  logic [WIDTH-1:0] sqrt_a,
  input  logic [WIDTH-1:0] sqrt_b,
  input  logic             sqrt_cin,
  output logic [WIDTH-1:0] sqrt_sum,
  output logic             sqrt_cout
);
  mod_linear_csla #(
    .WIDTH  (WIDTH),
    .GROUP_W(LIN_GROUP_WIDTH)
  ) u_lin (
    .a   (lin_a),
    .b   (lin_b),
    .cin (lin_cin),
    .sum (lin_sum),
    .cout(lin_cout)
  );

  mod_sqrt_csla #(
    .WIDTH      (WIDTH),
    .MAX_GROUP_W(SQRT_MAX_GROUP_WIDTH)
  ) u_sqrt (
    .a   (sqrt_a),
    .b   (sqrt_b),
    .cin (sqrt_cin),
    .sum (sqrt_sum),
    .cout(sqrt_cout)
  );
endmodule
