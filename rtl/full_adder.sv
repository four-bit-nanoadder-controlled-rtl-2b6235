// full_adder -- one-bit full adder from one three-input and one five-input
// majority element.
//
// The carry is the majority of the three inputs:
//   c = maj3(x1, x0, c0).
// The sum is the majority of five values: the three inputs and the inverted
// carry counted twice:
//   s = maj5(x1, x0, c0, ~c, ~c).
// Why this works: if c = 0, at most one input is 1, the two copies of ~c are
// 1, so s = 1 exactly when one input is 1. If c = 1, at least two inputs are
// 1 and the copies of ~c are 0, so s = 1 only when all three inputs are 1.
//
// Interface: operand bits x1 and x0, carry in c0; sum s and carry out c.
// Purely combinational. The gate structure (two majority elements and the
// double-weight inverted carry) is the published one; drawing the inverting
// output of the three-input element as a separate inverter is this design's
// choice.
module full_adder (
  input  logic x1,
  input  logic x0,
  input  logic c0,
  output logic s,
  output logic c
);

  logic carry;
  logic carry_n;

  maj3 u_carry (
    .x2 (x1),
    .x1 (x0),
    .x0 (c0),
    .y  (carry)
  );

  qca_inverter u_inv (
    .a (carry),
    .y (carry_n)
  );

  maj5 u_sum (
    .x ({x1, x0, c0, carry_n, carry_n}),
    .y (s)
  );

  assign c = carry;

endmodule
