// maj5 -- five-input majority element.
//
// The output is 1 when at least three of the five inputs are 1 (a threshold
// element of threshold 3). In the full adder it forms the sum: fed with the
// two operand bits, the carry in, and the inverted carry out on two of its
// inputs, it yields the sum bit with a single gate.
//
// Interface: a five-bit input vector x (order is irrelevant, the function is
// symmetric) and a one-bit output y. Purely combinational. The threshold is
// the published one; counting the ones with an adder tree is this design's
// own way of expressing it.
module maj5 (
  input  logic [4:0] x,
  output logic       y
);

  logic [2:0] ones;

  always_comb begin
    ones = 3'd0;
    for (int i = 0; i < 5; i++) ones += 3'(x[i]);
    y = (ones >= 3'd3);
  end

endmodule
